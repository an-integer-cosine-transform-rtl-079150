// 8x8 2-D integer cosine transform ICT(10,9,6,2,3,1) processor.
//
// The 2-D transform X = K J x J^t K^t is done as a 2-D J transform followed
// by a normalization: a first 1-D J processor transforms the eight rows of
// each 8x8 block, the transposition memory turns the row results around,
// a second 1-D J processor transforms the columns, and a pipelined multiplier
// optionally scales each coefficient by k_u * k_v.  Data flow is continuous:
// one pixel in and one coefficient out every Clk1 cycle, with no gaps
// between blocks.  All arithmetic except the final scaling is additions,
// subtractions and wired shifts.
//
// Interface: pixels are 9-bit signed, presented row by row (x[r][0..7] for
// r = 0..7), one per cycle, starting in the first cycle after reset and
// never pausing.  Coefficients leave dout column by column: for each
// horizontal frequency v = 0..7 the eight vertical frequencies u = 0..7.
// dout is the 23-bit unnormalized Y(u,v) when norm_sel = 0 and the 12-bit
// normalized X(u,v), sign-extended, when norm_sel = 1.  dout_valid rises with
// the first coefficient of the first block and dout_start marks Y(0,0) of
// every block.  m1 and m2 are the multiplexer select signals (f_s/4, f_s/8),
// ce2 the Clk2 phase (f_s/2) and mem_by_cols the current direction of the
// transposition memory.
//
// Latency: row processor 40 cycles, transposition memory 64, column
// processor 40, normalization 3: LATENCY = 147 cycles from x[0][0] to Y(0,0).
// The pixel width, the reset alignment, the flags and the column-wise output
// order are this design's choices; the structure follows the chip.
module ict2d_top
  import ict_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W_PIX-1:0]  x,
  input  logic              norm_sel,
  output logic [W_2D-1:0]   dout,
  output logic              dout_valid,
  output logic              dout_start,
  output logic              ce2,
  output logic              m1,
  output logic              m2,
  output logic              mem_by_cols
);

  localparam int LAT_1D   = 40;
  localparam int LAT_MEM  = 64;
  localparam int LAT_NORM = 3;
  localparam int LATENCY  = 2 * LAT_1D + LAT_MEM + LAT_NORM;   // 147
  // The memory's block counter must read 0 when the first row result
  // arrives, LAT_1D cycles after reset: start it at -LAT_1D mod 128.
  localparam logic [6:0] MEM_START = 7'(128 - LAT_1D);

  logic [W_1D-1:0] row_y;
  logic [W_1D-1:0] col_x;
  logic [W_2D-1:0] col_y;

  timing_gen u_tg (.clk, .rst_n, .ce2, .m1, .m2);

  ict_1d #(.W_IN(W_PIX), .W_OUT(W_1D)) u_row (
    .clk, .ce2, .m1, .m2, .x, .y(row_y)
  );

  transpose_mem #(.W(W_1D), .START(MEM_START)) u_mem (
    .clk, .rst_n, .din(row_y), .dout(col_x), .by_cols(mem_by_cols)
  );

  ict_1d #(.W_IN(W_1D), .W_OUT(W_2D)) u_col (
    .clk, .ce2, .m1, .m2, .x(col_x), .y(col_y)
  );

  // Position of the column processor's output within its block:
  // pos[5:3] = horizontal frequency v, pos[2:0] = vertical frequency u.
  // Column output k of a block leaves 2*LAT_1D + LAT_MEM cycles after the
  // block's first pixel, so pos is a cycle count offset by that amount.
  localparam int LAT_COL = 2 * LAT_1D + LAT_MEM;   // 144, a multiple of 64
  logic [5:0] pos;
  logic [7:0] fill;     // cycles since reset, saturating at LATENCY
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos  <= 6'(64 - (LAT_COL % 64));
      fill <= '0;
    end else begin
      pos  <= pos + 6'd1;
      if (fill != 8'(LATENCY)) fill <= fill + 8'd1;
    end
  end

  norm_mult #(.W_IN(W_2D), .W_OUT(W_NORM)) u_norm (
    .clk, .norm_en(norm_sel), .u(pos[2:0]), .v(pos[5:3]), .y_in(col_y), .y_out(dout)
  );

  // Flags, delayed to match the normalization pipeline.
  logic [LAT_NORM-1:0] start_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_d <= '0;
    else        start_d <= {start_d[LAT_NORM-2:0], pos == 6'd0};
  end

  assign dout_valid = (fill == 8'(LATENCY));
  assign dout_start = dout_valid && start_d[LAT_NORM-1];

endmodule
