// conv_unit: the convolution unit of the first BNN layer.
//
// A line buffer (three rows of the image width) receives one pixel per
// clock cycle in raster order; its 3x3 window and the current binary kernel
// feed a combinational adder tree, and the tree's sum is registered. One
// result is produced for every pixel that enters, one per clock cycle.
// Because the window sits at the right end of the rows, the result for a
// push belongs to the window whose bottom-right pixel P9 entered
// ROW_LEN-K (25) pushes earlier: a 28x28 image needs 25 further pushes
// (the next image, or filler) before its last window is evaluated. Results
// whose window wraps across an image edge (P9 in one of the first two rows
// or columns) are produced too and must be discarded by the caller: only
// 26x26 results per image are output feature map values.
//
// Interface: pix_valid/pix_in push one pixel; kernel must be held stable
// while a pass runs. res_valid/res follow pix_valid/pix_in by exactly two
// clock cycles: the line buffer shifts on the first edge and the sum is
// registered on the second. No back-pressure.
//
// The line buffer, the add/subtract by kernel bit and the one-result-per-
// cycle rate follow the published design; the output register and the
// two-cycle latency are this implementation's choices.
module conv_unit #(
  parameter int unsigned ROW_LEN = bnn_pkg::IMG_W,
  parameter int unsigned K       = bnn_pkg::KSIZE,
  parameter int unsigned PIX_W   = bnn_pkg::PIX_W,
  parameter int unsigned SUM_W   = bnn_pkg::SUM_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_valid,
  input  logic [PIX_W-1:0]        pix_in,
  input  logic [K*K-1:0]          kernel,
  output logic                    res_valid,
  output logic signed [SUM_W-1:0] res
);

  logic [PIX_W-1:0]        window [K*K];
  logic signed [SUM_W-1:0] sum;
  logic                    win_valid;

  line_buffer #(.ROW_LEN(ROW_LEN), .K(K), .PIX_W(PIX_W)) u_line_buffer (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (pix_valid),
    .pix_in   (pix_in),
    .window   (window)
  );

  conv_adder_tree #(.TAPS(K*K), .PIX_W(PIX_W), .SUM_W(SUM_W)) u_adder_tree (
    .window (window),
    .kernel (kernel),
    .sum    (sum)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      win_valid <= pix_valid;
      res_valid <= win_valid;
      if (win_valid) res <= sum;
    end
  end

endmodule
