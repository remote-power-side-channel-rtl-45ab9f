// tb_attack_workloads: the attack experiments, run on the full design at its
// default size through the bus.
//
//  A. Runs versus image quality: one digit image, 3,000 captures of the
//     first kernel's pass with a noisy supply (noise up to NOISE_A_UV per
//     cycle); the image is recovered from the average of the first 100,
//     500, 1,000 and 3,000 traces, the run counts of the original sweep.
//     3,000 runs must beat 100 runs and reach a normalised
//     cross-correlation of at least MIN_CCR_3000.
//  B. All ten digits: each digit 0-9 (a 5x7 dot pattern scaled by three,
//     bright strokes on a dark background) is captured 16 times and
//     recovered; each must reach a correlation of at least 0.2.
// Each capture is one run of one kernel (784 + 25 + 3 cycles, checked),
// followed by reading the 784 samples out of the FIFO. The supply drop
// comes from pdn_model; the analysis is in attack_analysis.
module tb_attack_workloads;
  import bnn_pkg::*;

  localparam logic [31:0] A_CTRL = 32'h0000_0000;
  localparam logic [31:0] A_TDC  = 32'h0004_0000;
  localparam logic [31:0] A_IMG  = 32'h0008_0000;
  localparam logic [31:0] A_PAR  = 32'h000C_0000;
  localparam int unsigned NOISE_A_UV   = 200_000;
  localparam real         MIN_CCR_3000 = 0.3;

  logic clk = 1'b0, rst_n = 1'b0;
  axil_if bus ();
  logic [31:0] vdrop_uv;
  logic        busy, trace_valid;

  bnn_top dut (
    .clk, .rst_n,
    .s_axil_awaddr(bus.awaddr), .s_axil_awvalid(bus.awvalid), .s_axil_awready(bus.awready),
    .s_axil_wdata(bus.wdata), .s_axil_wstrb(bus.wstrb), .s_axil_wvalid(bus.wvalid),
    .s_axil_wready(bus.wready), .s_axil_bresp(bus.bresp), .s_axil_bvalid(bus.bvalid),
    .s_axil_bready(bus.bready), .s_axil_araddr(bus.araddr), .s_axil_arvalid(bus.arvalid),
    .s_axil_arready(bus.arready), .s_axil_rdata(bus.rdata), .s_axil_rresp(bus.rresp),
    .s_axil_rvalid(bus.rvalid), .s_axil_rready(bus.rready),
    .vdrop_uv, .busy, .trace_valid
  );
  axil_master_bfm u_bfm (.clk, .m(bus));
  attack_analysis u_attack ();
  pdn_model u_pdn (.clk, .window(dut.u_conv.window), .vdrop_uv);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 5x7 digit patterns, one row per byte, bit 4 = leftmost column.
  localparam logic [4:0] FONT [10][7] = '{
    '{5'h0E, 5'h11, 5'h13, 5'h15, 5'h19, 5'h11, 5'h0E},
    '{5'h04, 5'h0C, 5'h04, 5'h04, 5'h04, 5'h04, 5'h0E},
    '{5'h0E, 5'h11, 5'h01, 5'h02, 5'h04, 5'h08, 5'h1F},
    '{5'h1F, 5'h02, 5'h04, 5'h02, 5'h01, 5'h11, 5'h0E},
    '{5'h02, 5'h06, 5'h0A, 5'h12, 5'h1F, 5'h02, 5'h02},
    '{5'h1F, 5'h10, 5'h1E, 5'h01, 5'h01, 5'h11, 5'h0E},
    '{5'h06, 5'h08, 5'h10, 5'h1E, 5'h11, 5'h11, 5'h0E},
    '{5'h1F, 5'h01, 5'h02, 5'h04, 5'h08, 5'h08, 5'h08},
    '{5'h0E, 5'h11, 5'h11, 5'h0E, 5'h11, 5'h11, 5'h0E},
    '{5'h0E, 5'h11, 5'h11, 5'h0F, 5'h01, 5'h02, 5'h0C}
  };

  logic [7:0] img [IMG_PIXELS];

  task automatic make_digit(int d);
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        automatic int fr = (r - 3) / 3, fc = (c - 6) / 3;
        automatic bit fg = (r >= 3 && r < 24 && c >= 6 && c < 21) && FONT[d][fr][4 - fc];
        img[r * IMG_W + c] = fg ? 8'(200 + $urandom_range(0, 55)) : 8'($urandom_range(0, 6));
      end
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic wr(logic [31:0] a, logic [31:0] d);
    logic [1:0] resp;
    u_bfm.write(a, d, 4'hF, resp);
    expect_eq("write resp", int'(resp), 0);
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d);
    logic [1:0] resp;
    u_bfm.read(a, d, resp);
    expect_eq("read resp", int'(resp), 0);
  endtask

  task automatic load_image();
    for (int i = 0; i < IMG_PIXELS; i++) wr(A_IMG + 32'(4 * i), 32'(img[i]));
  endtask

  // One capture: run the first kernel once, read the 784 Hamming weights.
  task automatic capture(ref int hw [IMG_PIXELS]);
    logic [31:0] v;
    wr(A_CTRL + 32'h00, 32'd1);
    do rd(A_CTRL + 32'h04, v); while (v[0]);
    rd(A_CTRL + 32'h18, v);
    expect_eq("cycles per capture", int'(v), IMG_PIXELS + (IMG_W - KSIZE) + 3);
    rd(A_TDC + 32'h04, v);
    expect_eq("samples per capture", int'(v[15:0]), IMG_PIXELS);
    for (int i = 0; i < IMG_PIXELS; i++) begin
      automatic int w = 0;
      for (int k = 0; k < 8; k++) begin
        rd(A_TDC + 32'h20 + 32'(4 * k), v);
        w += $countones(v);
      end
      hw[i] = w;
      wr(A_TDC + 32'h08, 0);
    end
  endtask

  function automatic real score(real sum [IMG_PIXELS], int n);
    real avg [IMG_PIXELS];
    real orig [IMG_PIXELS];
    bit  rec [IMG_PIXELS];
    int  tbin;
    for (int i = 0; i < IMG_PIXELS; i++) begin
      avg[i]  = sum[i] / real'(n);
      orig[i] = real'(img[i]);
    end
    u_attack.recover(avg, rec, tbin);
    return u_attack.ccr_n(orig, rec);
  endfunction

  initial begin
    int  hw [IMG_PIXELS];
    real sum [IMG_PIXELS];
    real c100, c500, c1000, c3000, cd;

    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    wr(A_PAR, 32'h0AB);                 // kernel 0
    wr(A_CTRL + 32'h08, 32'd1);         // one kernel per run
    wr(A_TDC + 32'h00, 32'h0000_4003);  // clear, arm, delay_sel 64

    // A. Runs versus quality.
    u_pdn.noise_uv = NOISE_A_UV;
    make_digit(6);
    load_image();
    foreach (sum[i]) sum[i] = 0.0;
    for (int n = 1; n <= 3000; n++) begin
      capture(hw);
      foreach (sum[i]) sum[i] += real'(hw[i]);
      if (n == 100)  c100  = score(sum, n);
      if (n == 500)  c500  = score(sum, n);
      if (n == 1000) c1000 = score(sum, n);
      if (n == 3000) c3000 = score(sum, n);
    end
    $display("runs vs CCR_N: 100 -> %0.3f, 500 -> %0.3f, 1000 -> %0.3f, 3000 -> %0.3f",
             c100, c500, c1000, c3000);
    checks += 2;
    if (!(c3000 > c100)) begin
      failures++;
      $display("FAIL more runs did not improve the recovered image");
    end
    if (c3000 < MIN_CCR_3000) begin
      failures++;
      $display("FAIL 3000-run correlation %0.3f", c3000);
    end
    u_pdn.noise_uv = 4000;

    // B. All ten digits, 16 runs each.
    for (int d = 0; d < 10; d++) begin
      make_digit(d);
      load_image();
      foreach (sum[i]) sum[i] = 0.0;
      for (int n = 0; n < 16; n++) begin
        capture(hw);
        foreach (sum[i]) sum[i] += real'(hw[i]);
      end
      cd = score(sum, 16);
      $display("digit %0d: CCR_N = %0.3f", d, cd);
      checks++;
      if (cd < 0.2) begin
        failures++;
        $display("FAIL digit %0d correlation %0.3f", d, cd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
