// Transposition memory between the row and column 1-D processors.
//
// An 8x8 file of shift registers that is one long 64-stage shift register in
// either of two orders: by rows (row-major) or by columns (column-major).
// Each Clk1 cycle one word shifts in at the far corner m[7][7] and the word
// at m[0][0] shifts out.  A block written in one order is read in the other,
// because the direction changes every 64 cycles: while block n+1 is written
// by columns, block n, which was written by rows, leaves by columns, i.e.
// transposed; the next block is then written by rows while block n+1 leaves
// by rows.  No second buffer is needed, so the storage is one block (64
// words), as in the chip.  A 7-bit counter sequences it: the low six bits
// count the words of a block, bit 6 is the direction.
//
// Interface and timing: din is taken every Clk1 cycle; dout is the word
// that went in 64 cycles earlier, with rows and columns of each 64-word block
// exchanged.  The counter starts at START after reset; it must be chosen so
// that the low six bits are 0 in the cycle where the first word of a block
// is at din.  The snake order of the rows/columns is this design's choice.
module transpose_mem #(
  parameter int         W     = 16,
  parameter logic [6:0] START = 7'd0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         by_cols     // current direction: 1 = by columns
);

  logic [6:0]   cnt;
  logic [W-1:0] m [8][8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= START;
    else        cnt <= cnt + 7'd1;
  end

  assign by_cols = cnt[6];

  always_ff @(posedge clk) begin
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) begin
        if (!by_cols) begin
          // row-major: (r,c) <- (r,c+1), end of row <- start of next row
          if (c < 7)      m[r][c] <= m[r][c+1];
          else if (r < 7) m[r][c] <= m[r+1][0];
          else            m[r][c] <= din;
        end else begin
          // column-major: (r,c) <- (r+1,c), end of column <- next column
          if (r < 7)      m[r][c] <= m[r+1][c];
          else if (c < 7) m[r][c] <= m[0][c+1];
          else            m[r][c] <= din;
        end
      end
    end
  end

  assign dout = m[0][0];

endmodule
