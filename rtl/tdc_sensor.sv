// tdc_sensor: behavioural model of the time-to-digital converter (TDC) used
// as an on-chip voltage sensor. It is a model, not synthesizable logic: the
// real sensor is a chain of FPGA carry primitives (CARRY4 or CARRY8) whose
// delay cannot be written in portable RTL.
//
// The real circuit launches every rising clock edge through an adjustable
// delay into a 256-stage carry chain; a flip-flop on each stage output
// captures, at the next rising edge, how far the edge has travelled. The
// sample is a thermometer code whose Hamming weight falls when the local
// supply voltage drops, because every stage then gets slower.
//
// The model computes that Hamming weight each clock from
//   reached = (CLK_PERIOD_PS - initial delay) / tap delay,
//   initial delay = ADJ_BASE_PS + delay_sel * ADJ_STEP_PS,
//   tap delay     = TAP_PS * (1 + DELAY_PPM_PER_MV * 1e-9 * vdrop_uv),
// rounds it down, clamps it to 0..STAGES and registers the thermometer code (stages
// 0..reached-1 set) on the rising clock edge. vdrop_uv is the supply drop
// at the sensor, in microvolts, during the cycle that ends at that edge.
//
// Interface and timing: sample changes only on the rising edge of clk; one
// sample per clock, no reset (the flip-flops just capture). The 256
// stages, the adjustable delay, one sample per cycle, about 25 ps per stage
// and the 50 MHz clock of the Artix-7 board are the published design's;
// the adjustable delay's range and the delay-voltage sensitivity are this
// model's own assumptions.
module tdc_sensor #(
  parameter int unsigned STAGES           = bnn_pkg::TDC_STAGES,
  parameter int unsigned CLK_PERIOD_PS    = 20000,
  parameter int unsigned TAP_PS           = 25,
  parameter int unsigned ADJ_BASE_PS      = 13600,
  parameter int unsigned ADJ_STEP_PS      = 50,
  parameter int unsigned DELAY_PPM_PER_MV = 1000
) (
  input  logic              clk,
  input  logic [7:0]        delay_sel,
  input  logic [31:0]       vdrop_uv,
  output logic [STAGES-1:0] sample
);

  // Fixed-point form of the formula: delays in ps scaled by 1e9 so that the
  // voltage term (ppm per mV times uV) stays an integer.
  function automatic int unsigned stages_reached(input logic [7:0] sel,
                                                 input logic [31:0] drop_uv);
    longint signed window_ps, num, den, n;
    window_ps = longint'(CLK_PERIOD_PS) - longint'(ADJ_BASE_PS)
              - longint'(sel) * longint'(ADJ_STEP_PS);
    if (window_ps <= 0) return 0;
    num = window_ps * 64'd1_000_000_000;
    den = longint'(TAP_PS) * (64'd1_000_000_000 + longint'(DELAY_PPM_PER_MV) * longint'(drop_uv));
    n   = num / den;
    if (n >= longint'(STAGES)) return STAGES;
    return int'(n);
  endfunction

  always_ff @(posedge clk) begin
    automatic int unsigned n = stages_reached(delay_sel, vdrop_uv);
    for (int i = 0; i < int'(STAGES); i++) sample[i] <= (i < int'(n));
  end

endmodule
