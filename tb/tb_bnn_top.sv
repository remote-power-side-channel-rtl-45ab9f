// tb_bnn_top: end-to-end test of the whole design at its default size,
// driven only through the AXI4-Lite port, as the JTAG bridge would.
//
//  1. Loads a 28x28 digit-like test image (bright strokes on a dark
//     background) into Input Image and 64 pseudo-random binary kernels into
//     Param; reads them back.
//  2. Arms the TDC capture, runs all 64 kernels and checks the run length
//     (64*784 + 25 + 3 cycles) and all 64*676 Output Feature Map words
//     against Eq. (1) computed here.
//  3. Repeats the first-kernel pass NRUNS times more, each time reading the
//     784 captured TDC samples, and mounts the power side-channel attack on
//     them: average the Hamming weights over the runs, subtract the mean of
//     the previous ten samples (high-pass), take the absolute value, build a
//     40-bin histogram, set the threshold where the counts have fallen off
//     the background peak, and classify every pixel. The recovered image
//     must correlate with the input (normalised cross-correlation, Eq. (3),
//     of at least 0.25; the window sum smears and offsets the image by one
//     pixel, which bounds the value this model can reach).
//  4. Exercises the remaining mechanisms: FIFO overflow and clear, a traced
//     kernel other than the first, register writes ignored while busy,
//     DECERR for an unmapped address, SLVERR past a memory's end.
// Every mechanism is counted; one that never happened is a failure.
//
// The supply drop fed to the TDC model comes from pdn_model, a simple model
// of the power distribution network (static part, a part proportional to
// the sum of the nine pixels in the evaluated window, ripple, noise); the
// analysis is in attack_analysis.
module tb_bnn_top;
  import bnn_pkg::*;

  localparam int NRUNS    = 16;
  localparam int LAG      = IMG_W - KSIZE;
  localparam logic [31:0] A_CTRL = 32'h0000_0000;
  localparam logic [31:0] A_TDC  = 32'h0004_0000;
  localparam logic [31:0] A_IMG  = 32'h0008_0000;
  localparam logic [31:0] A_PAR  = 32'h000C_0000;
  localparam logic [31:0] A_OFM  = 32'h0010_0000;

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

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ test data
  logic [7:0] img [IMG_H][IMG_W];
  logic [8:0] kern [NUM_KERNELS];

  // A "6": a ring in the lower half plus a stroke rising to the upper right.
  task automatic make_image();
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        automatic int d2 = (r - 17) * (r - 17) + (c - 13) * (c - 13);
        automatic bit fg = (d2 >= 16 && d2 <= 36)
                        || (r >= 5 && r <= 16 && (c - 10 + (r - 5) / 2) >= 0
                            && (c - 10 + (r - 5) / 2) <= 1 && c >= 9);
        img[r][c] = fg ? 8'(200 + $urandom_range(0, 55)) : 8'($urandom_range(0, 6));
      end
  endtask

  function automatic int golden(int k, int oy, int ox);
    int s = 0;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        s += kern[k][3*a+b] ? int'(img[oy+a][ox+b]) : -int'(img[oy+a][ox+b]);
    return s;
  endfunction

  // ------------------------------------------------------------ PDN model
  pdn_model u_pdn (.clk, .window(dut.u_conv.window), .vdrop_uv);

  // ------------------------------------------------------------ helpers
  int n_decerr = 0, n_slverr = 0, n_overflow = 0, n_busy_ignored = 0;
  int n_kernel_loads = 0, n_flush = 0, n_trace_other = 0, n_ofm_writes = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_ctrl.param_en) n_kernel_loads++;
    if (dut.u_ctrl.img_en && dut.u_ctrl.rd_pass == dut.u_ctrl.npass) n_flush++;
    if (dut.ofm_en && dut.ofm_we) n_ofm_writes++;
  end

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
    expect_eq($sformatf("write resp @%h", a), int'(resp), 0);
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d);
    logic [1:0] resp;
    u_bfm.read(a, d, resp);
    expect_eq($sformatf("read resp @%h", a), int'(resp), 0);
  endtask

  task automatic run(int nk, int trace_k, output int cycles);
    logic [31:0] v;
    wr(A_CTRL + 32'h08, 32'(nk));
    wr(A_CTRL + 32'h1C, 32'(trace_k));
    wr(A_CTRL + 32'h00, 32'd1);
    do rd(A_CTRL + 32'h04, v); while (v[0]);
    expect_eq("done", int'(v[1]), 1);
    rd(A_CTRL + 32'h18, v);
    cycles = int'(v);
  endtask

  // Reads n samples from the FIFO, returns their Hamming weights.
  task automatic read_trace(int n, ref int hw [IMG_PIXELS]);
    logic [31:0] v;
    for (int i = 0; i < n; i++) begin
      automatic int w = 0;
      for (int k = 0; k < 8; k++) begin
        rd(A_TDC + 32'h20 + 32'(4*k), v);
        w += $countones(v);
      end
      hw[i] = w;
      wr(A_TDC + 32'h08, 0);
    end
  endtask

  // ------------------------------------------------------------ main
  initial begin
    logic [31:0] v;
    logic [1:0]  resp;
    int cycles;
    int hw [IMG_PIXELS];
    real avg [IMG_PIXELS];
    bit  rec [IMG_PIXELS];
    int  tbin;
    real ccr_n;

    make_image();
    foreach (kern[k]) kern[k] = 9'($urandom);
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // 1. Load memories.
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++)
        wr(A_IMG + 32'(4 * (r * IMG_W + c)), 32'(img[r][c]));
    foreach (kern[k]) wr(A_PAR + 32'(4 * k), 32'(kern[k]));
    for (int i = 0; i < IMG_PIXELS; i += 37) begin
      rd(A_IMG + 32'(4 * i), v);
      expect_eq("image readback", int'(v), int'(img[i / IMG_W][i % IMG_W]));
    end
    rd(A_PAR + 32'(4 * 63), v);
    expect_eq("param readback", int'(v), int'(kern[63]));

    // 2. Full run, 64 kernels, capture kernel 0.
    wr(A_TDC + 32'h00, 32'h0000_4002);          // clear
    wr(A_TDC + 32'h00, 32'h0000_4001);          // arm, delay_sel 64
    rd(A_CTRL + 32'h08, v);
    expect_eq("NUM_KERNELS default", int'(v), NUM_KERNELS);
    wr(A_CTRL + 32'h00, 32'd1);
    wr(A_CTRL + 32'h08, 32'd3);                 // ignored: busy
    do rd(A_CTRL + 32'h04, v); while (v[0]);
    rd(A_CTRL + 32'h08, v);
    if (int'(v) == NUM_KERNELS) n_busy_ignored++;
    rd(A_CTRL + 32'h18, v);
    expect_eq("cycles for 64 kernels", int'(v), NUM_KERNELS * IMG_PIXELS + LAG + 3);
    expect_eq("kernel loads", n_kernel_loads, NUM_KERNELS);
    expect_eq("ofm writes", n_ofm_writes, NUM_KERNELS * OUT_PIXELS);
    for (int k = 0; k < NUM_KERNELS; k++)
      for (int oy = 0; oy < OUT_H; oy++)
        for (int ox = 0; ox < OUT_W; ox++) begin
          rd(A_OFM + 32'(4 * (k * OUT_PIXELS + oy * OUT_W + ox)), v);
          expect_eq($sformatf("O[%0d][%0d][%0d]", k, oy, ox),
                    int'($signed(v[15:0])), golden(k, oy, ox));
        end
    rd(A_TDC + 32'h04, v);
    expect_eq("samples captured", int'(v[15:0]), IMG_PIXELS);

    // 3. Attack: average NRUNS traces of the first kernel.
    foreach (avg[i]) avg[i] = 0.0;
    read_trace(IMG_PIXELS, hw);
    foreach (avg[i]) avg[i] += real'(hw[i]);
    for (int n = 1; n < NRUNS; n++) begin
      run(1, 0, cycles);
      expect_eq("cycles for 1 kernel", cycles, IMG_PIXELS + LAG + 3);
      rd(A_TDC + 32'h04, v);
      expect_eq("samples per run", int'(v[15:0]), IMG_PIXELS);
      read_trace(IMG_PIXELS, hw);
      foreach (avg[i]) avg[i] += real'(hw[i]);
    end
    foreach (avg[i]) avg[i] /= real'(NRUNS);
    begin
      real orig [IMG_PIXELS];
      for (int i = 0; i < IMG_PIXELS; i++) orig[i] = real'(img[i / IMG_W][i % IMG_W]);
      u_attack.recover(avg, rec, tbin);
      ccr_n = u_attack.ccr_n(orig, rec);
    end
    $display("attack: %0d runs, threshold bin %0d of 40, CCR_N = %0.3f", NRUNS, tbin, ccr_n);
    for (int r = 0; r < IMG_H; r++) begin
      automatic string line = "";
      for (int c = 0; c < IMG_W; c++) line = {line, rec[r * IMG_W + c] ? "#" : "."};
      $display("  %s", line);
    end
    checks++;
    if (ccr_n < 0.25) begin
      failures++;
      $display("FAIL recovered image correlation %0.3f", ccr_n);
    end

    // 4. Other mechanisms.
    // FIFO overflow: two captures without reading.
    run(1, 0, cycles);
    run(1, 0, cycles);
    rd(A_TDC + 32'h04, v);
    expect_eq("fifo full", int'(v[16]), 1);
    if (v[18]) n_overflow++;
    wr(A_TDC + 32'h00, 32'h0000_4003);          // clear, stay armed
    rd(A_TDC + 32'h04, v);
    expect_eq("fifo cleared", int'(v[15:0]), 0);
    // Trace another kernel: the samples must follow its pass.
    run(8, 5, cycles);
    expect_eq("cycles for 8 kernels", cycles, 8 * IMG_PIXELS + LAG + 3);
    rd(A_TDC + 32'h04, v);
    if (int'(v[15:0]) == IMG_PIXELS) n_trace_other++;
    wr(A_TDC + 32'h00, 32'h0000_4002);          // clear and disarm
    // Bus errors.
    u_bfm.read(32'h001C_0000, v, resp);
    if (resp == RESP_DECERR) n_decerr++;
    u_bfm.write(32'h0014_0000, 32'h1, 4'hF, resp);
    if (resp == RESP_DECERR) n_decerr++;
    u_bfm.read(A_IMG + 32'(4 * IMG_PIXELS), v, resp);
    if (resp == RESP_SLVERR) n_slverr++;

    $display("mechanisms: kernel loads %0d, flush pushes %0d, busy-ignored %0d, overflow %0d, other traced kernel %0d, DECERR %0d, SLVERR %0d",
             n_kernel_loads, n_flush, n_busy_ignored, n_overflow, n_trace_other, n_decerr, n_slverr);
    if (n_kernel_loads == 0 || n_flush == 0 || n_busy_ignored == 0 || n_overflow == 0
        || n_trace_other == 0 || n_decerr == 0 || n_slverr == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
