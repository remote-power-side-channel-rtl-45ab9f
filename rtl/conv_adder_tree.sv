// conv_adder_tree: binary-weight multiply and combinational adder tree.
//
// In a binarized network every kernel element is -1 or +1, so each of the
// nine window pixels is either added or subtracted: kernel bit 1 (+1) adds
// the pixel, bit 0 (-1) subtracts it. The nine signed terms are summed by a
// balanced tree of two-input adders (padded with zero leaves to 16, four
// levels) in a single cycle, with no registers: the result follows the
// inputs combinationally.
//
// window[i] and kernel[i] are P(i+1) and K(i+1); the output is
// sum_i (kernel[i] ? +window[i] : -window[i]). Pixels are unsigned. The
// add/subtract operation and the combinational tree follow the published
// design; the tree's shape is this implementation's choice.
module conv_adder_tree #(
  parameter int unsigned TAPS  = bnn_pkg::KTAPS,
  parameter int unsigned PIX_W = bnn_pkg::PIX_W,
  parameter int unsigned SUM_W = bnn_pkg::SUM_W
) (
  input  logic [PIX_W-1:0]        window [TAPS],
  input  logic [TAPS-1:0]         kernel,
  output logic signed [SUM_W-1:0] sum
);

  // Number of levels of a binary tree over TAPS leaves.
  localparam int unsigned LEVELS = $clog2(TAPS);
  localparam int unsigned LEAVES = 1 << LEVELS;

  logic signed [SUM_W-1:0] node [LEVELS+1][LEAVES];

  always_comb begin
    for (int i = 0; i < int'(LEAVES); i++) begin
      if (i < int'(TAPS)) begin
        node[0][i] = kernel[i] ?  $signed({{(SUM_W-PIX_W){1'b0}}, window[i]})
                               : -$signed({{(SUM_W-PIX_W){1'b0}}, window[i]});
      end else begin
        node[0][i] = '0;
      end
    end
    for (int l = 1; l <= int'(LEVELS); l++) begin
      for (int i = 0; i < int'(LEAVES); i++) begin
        if (i < int'(LEAVES >> l)) node[l][i] = node[l-1][2*i] + node[l-1][2*i+1];
        else                       node[l][i] = '0;
      end
    end
  end

  assign sum = node[LEVELS][0];

endmodule
