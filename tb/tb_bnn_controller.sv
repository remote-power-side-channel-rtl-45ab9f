// tb_bnn_controller: runs the controller with the real convolution unit and
// simple memory models (one cycle of read latency, like the block RAMs).
// Programs non-zero base addresses and several kernels through the
// register port, starts a run and checks
//   * every Output Feature Map write (address and value) against Eq. (1)
//     computed directly from the image and kernels, and their number;
//   * the Param reads (one per kernel, in order);
//   * the run length: NUM_KERNELS*784 + 25 + 3 cycles, in CYCLES and in
//     the busy signal, i.e. 784 cycles per kernel;
//   * trace_valid: 784 cycles, during the pass of TRACE_KERNEL;
//   * that register writes are ignored while busy and a second run works.
module tb_bnn_controller;
  import bnn_pkg::*;

  localparam int NK        = 3;
  localparam int IMG_BASE  = 100;
  localparam int PAR_BASE  = 5;
  localparam int OFM_BASE  = 1000;
  localparam int IMG_AW    = 10;
  localparam int PARAM_AW  = 6;
  localparam int OFM_AW    = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  axil_if bus ();

  logic                img_en, param_en, ofm_en, ofm_we;
  logic [IMG_AW-1:0]   img_addr;
  logic [PARAM_AW-1:0] param_addr;
  logic [OFM_AW-1:0]   ofm_addr;
  logic                conv_pix_valid, conv_res_valid, busy, trace_valid;
  logic [PIX_W-1:0]    img_q;
  logic [KTAPS-1:0]    kern_q;
  conv_sum_t           conv_res;

  logic [PIX_W-1:0] img_mem [1 << IMG_AW];
  logic [KTAPS-1:0] par_mem [1 << PARAM_AW];
  int checks = 0, failures = 0;

  bnn_controller #(.IMG_AW(IMG_AW), .PARAM_AW(PARAM_AW), .OFM_AW(OFM_AW)) dut (
    .clk, .rst_n, .s_axil(bus),
    .img_en, .img_addr, .param_en, .param_addr,
    .conv_pix_valid, .conv_res_valid,
    .ofm_en, .ofm_we, .ofm_addr, .busy, .trace_valid
  );

  conv_unit u_conv (
    .clk, .rst_n, .pix_valid(conv_pix_valid), .pix_in(img_q), .kernel(kern_q),
    .res_valid(conv_res_valid), .res(conv_res)
  );

  axil_master_bfm u_bfm (.clk, .m(bus));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (img_en)   img_q  <= img_mem[img_addr];
    if (param_en) kern_q <= par_mem[param_addr];
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int golden(int k, int oy, int ox);
    int s = 0;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        int pix = int'(img_mem[IMG_BASE + (oy + a) * IMG_W + ox + b]);
        s += par_mem[PAR_BASE + k][3*a+b] ? pix : -pix;
      end
    return s;
  endfunction

  // Monitors
  int n_ofm = 0, n_param = 0, n_trace = 0, busy_cycles = 0, trace_first = -1, cyc = 0;
  int expect_trace_first;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (busy) busy_cycles++;
    if (trace_valid) begin
      if (trace_first < 0) trace_first = cyc;
      n_trace++;
    end
    if (param_en) begin
      checks++;
      if (int'(param_addr) != PAR_BASE + n_param) begin
        failures++;
        $display("FAIL param read %0d at %0d", n_param, param_addr);
      end
      n_param++;
    end
    if (ofm_en && ofm_we) begin
      int idx, k, oy, ox;
      idx = n_ofm % (NK * OUT_PIXELS);
      k   = idx / OUT_PIXELS;
      oy  = (idx % OUT_PIXELS) / OUT_W;
      ox  = idx % OUT_W;
      checks += 2;
      if (int'(ofm_addr) != OFM_BASE + idx) begin
        failures++;
        if (failures < 10) $display("FAIL ofm addr %0d exp %0d", ofm_addr, OFM_BASE + idx);
      end
      if (int'(conv_res) != golden(k, oy, ox)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d O[%0d][%0d] got %0d exp %0d", k, oy, ox, conv_res, golden(k, oy, ox));
      end
      n_ofm++;
    end
  end

  task automatic wr(int addr, int data);
    logic [1:0] resp;
    u_bfm.write(32'(addr), 32'(data), 4'hF, resp);
  endtask

  task automatic rd(int addr, output logic [31:0] data);
    logic [1:0] resp;
    u_bfm.read(32'(addr), data, resp);
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run_and_wait();
    logic [31:0] st;
    wr('h00, 1);
    do rd('h04, st); while (st[0]);
    expect_eq("done bit", int'(st[1]), 1);
  endtask

  initial begin
    logic [31:0] v;
    foreach (img_mem[i]) img_mem[i] = PIX_W'($urandom);
    foreach (par_mem[i]) par_mem[i] = KTAPS'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    rd('h08, v);
    expect_eq("NUM_KERNELS reset", int'(v), NUM_KERNELS);
    wr('h08, NK);
    wr('h0C, IMG_BASE);
    wr('h10, PAR_BASE);
    wr('h14, OFM_BASE);
    wr('h1C, 1);
    rd('h0C, v);
    expect_eq("IMG_BASE", int'(v), IMG_BASE);
    busy_cycles = 0;
    run_and_wait();
    rd('h18, v);
    expect_eq("CYCLES", int'(v), NK * IMG_PIXELS + (IMG_W - KSIZE) + 3);
    expect_eq("busy cycles", busy_cycles, NK * IMG_PIXELS + (IMG_W - KSIZE) + 3);
    expect_eq("ofm writes", n_ofm, NK * OUT_PIXELS);
    expect_eq("param reads", n_param, NK);
    expect_eq("trace cycles", n_trace, IMG_PIXELS);

    // Second run, one kernel, trace the first pass; a write while busy is ignored.
    wr('h08, 1);
    wr('h1C, 0);
    n_ofm = 0; n_param = 0; n_trace = 0; trace_first = -1;
    wr('h00, 1);
    wr('h08, 7);
    do rd('h04, v); while (v[0]);
    rd('h08, v);
    expect_eq("write ignored while busy", int'(v), 1);
    expect_eq("ofm writes run 2", n_ofm, OUT_PIXELS);
    expect_eq("param reads run 2", n_param, 1);
    expect_eq("trace cycles run 2", n_trace, IMG_PIXELS);
    rd('h18, v);
    expect_eq("CYCLES run 2", int'(v), IMG_PIXELS + (IMG_W - KSIZE) + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
