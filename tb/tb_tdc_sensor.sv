// tb_tdc_sensor: checks the TDC model's thermometer code against the delay
// arithmetic done here independently in real numbers: stages reached =
// floor((20000 ps - 13600 ps - 50 ps * delay_sel) / (25 ps * (1 + 1e-9 *
// 1000 * drop_uV))). At delay_sel 64 and no drop the edge reaches 128
// stages; a larger drop must never give more stages; the sample is a
// contiguous run of ones from stage 0; it changes only on a rising edge.
// Two more instances use the timing of the 120 MHz and 100 MHz boards
// (8,333 ps with a 1,933 ps initial delay, 10,000 ps with 3,600 ps) and
// must also sit at stage 128 and follow the same formula.
module tb_tdc_sensor;
  logic clk = 1'b0;
  logic [7:0]   delay_sel = 8'd64;
  logic [31:0]  vdrop_uv = '0;
  logic [255:0] sample;
  int checks = 0, failures = 0;

  tdc_sensor dut (.clk, .delay_sel, .vdrop_uv, .sample);

  logic [255:0] sample_120, sample_100;
  tdc_sensor #(.CLK_PERIOD_PS(8333), .ADJ_BASE_PS(1933)) dut_120 (
    .clk, .delay_sel, .vdrop_uv, .sample(sample_120)
  );
  tdc_sensor #(.CLK_PERIOD_PS(10000), .ADJ_BASE_PS(3600)) dut_100 (
    .clk, .delay_sel, .vdrop_uv, .sample(sample_100)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_n(int sel, int drop, real period = 20000.0, real base = 13600.0);
    real n = (period - base - 50.0 * sel) / (25.0 * (1.0 + 1.0e-6 * drop));
    if (n < 0.0) return 0;
    if (n > 256.0) return 256;
    return int'($floor(n + 1.0e-9));
  endfunction

  function automatic bit is_thermo(logic [255:0] s);
    for (int i = 1; i < 256; i++) if (s[i] && !s[i-1]) return 0;
    return 1;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int prev;
    @(negedge clk);
    @(negedge clk);
    expect_eq("nominal", $countones(sample), 128);
    expect_eq("nominal 120 MHz", $countones(sample_120), 128);
    expect_eq("nominal 100 MHz", $countones(sample_100), 128);
    prev = 256;
    for (int d = 0; d <= 40000; d += 1000) begin
      vdrop_uv = 32'(d);
      @(negedge clk);
      expect_eq("hamming weight", $countones(sample), expect_n(64, d));
      expect_eq("thermometer", int'(is_thermo(sample)), 1);
      expect_eq("120 MHz weight", $countones(sample_120), expect_n(64, d, 8333.0, 1933.0));
      expect_eq("100 MHz weight", $countones(sample_100), expect_n(64, d, 10000.0, 3600.0));
      checks++;
      if ($countones(sample) > prev) begin
        failures++;
        $display("FAIL weight rose with drop %0d", d);
      end
      prev = $countones(sample);
    end
    vdrop_uv = 32'd5000;
    for (int s = 0; s < 256; s += 9) begin
      delay_sel = 8'(s);
      @(negedge clk);
      expect_eq("delay_sel", $countones(sample), expect_n(s, 5000));
    end
    // The sample only changes on the rising edge.
    delay_sel = 8'd64;
    vdrop_uv  = 32'd0;
    @(negedge clk);
    prev = $countones(sample);
    vdrop_uv = 32'd30000;
    #2;
    expect_eq("held between edges", $countones(sample), prev);
    @(negedge clk);
    expect_eq("after edge", $countones(sample), expect_n(64, 30000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
