// pdn_model: a testbench model of the supply drop that the convolution unit
// causes at the TDC. It is not part of the design. The drop during a cycle
// is a static 4 mV, plus 8 uV per unit of the sum of the nine pixels in the
// window the adder tree evaluates (a stand-in for its switching activity:
// bright pixels give large partial sums), plus a slow ripple of up to 4 mV
// with a 300-cycle period, plus uniform noise of 0..noise_uv (4 mV unless a
// testbench writes the variable to model a noisier board). The value is
// set on the falling edge, so it is stable for the rising edge at which the
// sensor captures.
module pdn_model (
  input  logic        clk,
  input  logic [7:0]  window [9],
  output logic [31:0] vdrop_uv
);
  int          cyc = 0;
  int unsigned noise_uv = 4000;

  initial vdrop_uv = '0;

  always @(negedge clk) begin
    automatic int act = 0;
    for (int i = 0; i < 9; i++) act += int'(window[i]);
    vdrop_uv <= 32'(4000 + 8 * act
                    + int'(2000.0 * (1.0 + $sin(6.2832 * real'(cyc) / 300.0)))
                    + int'($urandom_range(0, noise_uv)));
    cyc <= cyc + 1;
  end
endmodule
