// line_buffer: the shift-register line buffer of the convolution unit.
//
// K rows of ROW_LEN words each (3 rows of 28 pixels for the first MNIST
// layer). When shift_en is high, a new pixel enters row 0 on the left and
// every word moves one place to the right; the rightmost word of a row
// enters the next row on the left and the rightmost word of the last row
// is dropped. With raster-order input, the rightmost K words of each row
// are therefore a KxK window of the image. Its bottom-right pixel P9 is
// not the newest pixel but the one pushed ROW_LEN-K shifts before it (25
// for a 28-wide image): after n pushes, P9 is pixel n-1-(ROW_LEN-K) and
// P(1+K*a+b) is pixel n-1-(ROW_LEN-K)-(K-1-a)*ROW_LEN-(K-1-b).
//
// Window numbering (as in the published figure): row 0 holds P9 P8 P7,
// row 1 P6 P5 P4, row 2 P3 P2 P1, the lowest number rightmost. window[i]
// is P(i+1), so window[0] = P1 is the top-left image pixel and window[8] =
// P9 the bottom-right one.
//
// Timing: the window changes on the clock edge on which shift_en is high
// and is available from the registers in the following cycle. Reset
// clears all words to 0. The row length, the row count and the shift
// behaviour follow the published design; the synchronous active-low reset
// and the shift enable are this implementation's choices.
module line_buffer #(
  parameter int unsigned ROW_LEN = bnn_pkg::IMG_W,
  parameter int unsigned K       = bnn_pkg::KSIZE,
  parameter int unsigned PIX_W   = bnn_pkg::PIX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic [PIX_W-1:0] pix_in,
  output logic [PIX_W-1:0] window [K*K]
);

  // Word 0 of a row is its leftmost, word ROW_LEN-1 its rightmost.
  logic [PIX_W-1:0] rows [K][ROW_LEN];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(K); r++)
        for (int c = 0; c < int'(ROW_LEN); c++)
          rows[r][c] <= '0;
    end else if (shift_en) begin
      for (int r = 0; r < int'(K); r++) begin
        rows[r][0] <= (r == 0) ? pix_in : rows[r-1][ROW_LEN-1];
        for (int c = 1; c < int'(ROW_LEN); c++)
          rows[r][c] <= rows[r][c-1];
      end
    end
  end

  // Row r (0 = entry row) supplies window row K-1-r; within a row the
  // rightmost word is the leftmost window column.
  always_comb begin
    for (int r = 0; r < int'(K); r++)
      for (int j = 0; j < int'(K); j++)
        window[(K-1-r)*K + (K-1-j)] = rows[r][ROW_LEN-K+j];
  end

  initial begin
    assert (ROW_LEN >= K) else $fatal(1, "line_buffer: ROW_LEN must be at least K");
  end

endmodule
