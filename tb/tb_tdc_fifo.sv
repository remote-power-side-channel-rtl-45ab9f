// tb_tdc_fifo: drives the capture FIFO (depth 16 here) with a known sample
// stream and a trigger pattern. Checks that it stores exactly the samples
// of the cycles following trigger cycles, only while armed, in order,
// readable as eight 32-bit words each; count, empty, full and overflow
// flags; pop; clear; and the delay_sel register.
module tb_tdc_fifo;
  localparam int D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  axil_if bus ();
  logic [255:0] sample;
  logic         trigger = 1'b0;
  logic [7:0]   delay_sel;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [255:0] expq [$];

  tdc_fifo #(.DEPTH(D)) dut (.clk, .rst_n, .s_axil(bus), .sample, .trigger, .delay_sel);
  axil_master_bfm u_bfm (.clk, .m(bus));

  always #5 clk = ~clk;

  // The sample presented in cycle c: a pattern made from c.
  function automatic logic [255:0] pat(int c);
    logic [255:0] p;
    for (int w = 0; w < 8; w++) p[32*w +: 32] = 32'(c * 8 + w) ^ 32'h5A5A_0000;
    return p;
  endfunction
  assign sample = pat(cyc);

  logic armed_model = 1'b0, trig_q = 1'b0;
  always @(posedge clk) begin
    // A sample is stored when the trigger was high in the previous cycle.
    if (rst_n && armed_model && trig_q && expq.size() < D) expq.push_back(sample);
    trig_q <= trigger;
    cyc <= cyc + 1;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic pulse_trigger(int n, int gap);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1 trigger = 1'b1;
      repeat (gap) begin @(posedge clk); #1 trigger = 1'b0; end
    end
    @(posedge clk); #1 trigger = 1'b0;
    repeat (3) @(posedge clk);
  endtask

  task automatic drain_and_check(int n);
    logic [31:0] v;
    logic [1:0]  resp;
    for (int i = 0; i < n; i++) begin
      logic [255:0] e;
      e = expq.pop_front();
      for (int w = 0; w < 8; w++) begin
        u_bfm.read(32'h20 + 32'(4*w), v, resp);
        expect_eq("sample word", int'(v), int'(e[32*w +: 32]));
      end
      u_bfm.write(32'h08, 0, 4'hF, resp);
    end
  endtask

  initial begin
    logic [31:0] v;
    logic [1:0]  resp;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    expect_eq("delay_sel reset", int'(delay_sel), 64);
    // Not armed: nothing stored.
    pulse_trigger(5, 1);
    u_bfm.read(32'h04, v, resp);
    expect_eq("count unarmed", int'(v[15:0]), 0);
    expect_eq("empty", int'(v[17]), 1);
    // Arm with delay_sel 77, capture 6 samples with gaps.
    u_bfm.write(32'h00, 32'h0000_4D01, 4'hF, resp);
    @(posedge clk); #1 armed_model = 1'b1;
    expect_eq("delay_sel", int'(delay_sel), 77);
    pulse_trigger(6, 2);
    u_bfm.read(32'h04, v, resp);
    expect_eq("count", int'(v[15:0]), 6);
    drain_and_check(6);
    u_bfm.read(32'h04, v, resp);
    expect_eq("empty after pops", int'(v[17]), 1);
    // Fill past full with a continuous trigger: overflow.
    @(posedge clk); #1 trigger = 1'b1;
    repeat (D + 5) @(posedge clk);
    #1 trigger = 1'b0;
    repeat (3) @(posedge clk);
    u_bfm.read(32'h04, v, resp);
    expect_eq("count full", int'(v[15:0]), D);
    expect_eq("full flag", int'(v[16]), 1);
    expect_eq("overflow flag", int'(v[18]), 1);
    drain_and_check(3);
    // Clear.
    u_bfm.write(32'h00, 32'h0000_4003, 4'hF, resp);
    expq.delete();
    u_bfm.read(32'h04, v, resp);
    expect_eq("count after clear", int'(v[15:0]), 0);
    expect_eq("overflow cleared", int'(v[18]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
