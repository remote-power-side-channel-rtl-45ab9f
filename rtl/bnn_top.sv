// bnn_top: a BNN accelerator and a TDC voltage sensor sharing one FPGA.
//
// The victim side is the first convolution layer of a binarized neural
// network for 28x28 MNIST images: three block memories (Input Image, Param,
// Output Feature Map), an on-chip controller and the convolution unit
// (line buffer plus binary adder tree, one result per clock). The
// adversary side is a 256-stage TDC whose raw samples are stored in a
// 256-bit wide FIFO while the convolution of one chosen kernel runs.
// Everything is reached over a 32-bit AXI4-Lite bus, whose single master
// (an external JTAG-to-AXI bridge) is connected through the s_axil_* ports.
//
// Address map (bits [20:18] select the slave):
//   0x0000_0000 controller registers     0x0004_0000 TDC/FIFO registers
//   0x0008_0000 Input Image (784 words)  0x000C_0000 Param (64 words)
//   0x0010_0000 Output Feature Map (64 x 676 words)
// One word per 32-bit bus word in all three memories.
//
// vdrop_uv is not logic: it is the supply voltage drop at the sensor, in
// microvolts, which drives the TDC's behavioural model. On a real FPGA it
// comes from the power drawn by the logic around the sensor. busy and
// trace_valid are the controller's run and capture strobes, brought out for
// observation.
//
// The block structure follows the published system; the address map, the
// register maps and the capture trigger are this implementation's choices.
module bnn_top #(
  parameter int unsigned IMG_W    = bnn_pkg::IMG_W,
  parameter int unsigned IMG_H    = bnn_pkg::IMG_H,
  parameter int unsigned NUM_KERN = bnn_pkg::NUM_KERNELS,
  parameter int unsigned FIFO_DEPTH = 1024,
  // sensor timing: 20,000 ps for the 50 MHz board; 8,333 ps (120 MHz) or
  // 10,000 ps (100 MHz) with an initial delay of 1,933 or 3,600 ps keep
  // the edge at stage 128 for delay_sel 64
  parameter int unsigned TDC_CLK_PERIOD_PS = 20000,
  parameter int unsigned TDC_ADJ_BASE_PS   = 13600
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave port, driven by the JTAG-to-AXI master
  input  logic [31:0] s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [31:0] s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // Supply drop at the TDC (behavioural model input)
  input  logic [31:0] vdrop_uv,
  // Observation
  output logic        busy,
  output logic        trace_valid
);
  import bnn_pkg::*;

  localparam int unsigned K        = KSIZE;
  localparam int unsigned NPIX     = IMG_W * IMG_H;
  localparam int unsigned NOUT     = (IMG_W-K+1) * (IMG_H-K+1);
  localparam int unsigned IMG_AW   = $clog2(NPIX);
  localparam int unsigned PARAM_AW = (NUM_KERN > 1) ? $clog2(NUM_KERN) : 1;
  localparam int unsigned OFM_AW   = $clog2(NUM_KERN * NOUT);

  axil_if bus ();
  axil_if slv [NUM_SLAVES] ();

  assign bus.awaddr     = s_axil_awaddr;
  assign bus.awvalid    = s_axil_awvalid;
  assign s_axil_awready = bus.awready;
  assign bus.wdata      = s_axil_wdata;
  assign bus.wstrb      = s_axil_wstrb;
  assign bus.wvalid     = s_axil_wvalid;
  assign s_axil_wready  = bus.wready;
  assign s_axil_bresp   = bus.bresp;
  assign s_axil_bvalid  = bus.bvalid;
  assign bus.bready     = s_axil_bready;
  assign bus.araddr     = s_axil_araddr;
  assign bus.arvalid    = s_axil_arvalid;
  assign s_axil_arready = bus.arready;
  assign s_axil_rdata   = bus.rdata;
  assign s_axil_rresp   = bus.rresp;
  assign s_axil_rvalid  = bus.rvalid;
  assign bus.rready     = s_axil_rready;

  axil_interconnect #(.N(NUM_SLAVES)) u_xbar (
    .clk, .rst_n, .s_axil(bus), .m_axil(slv)
  );

  // ------------------------------------------------------------ accelerator
  logic                img_en, param_en, ofm_en, ofm_we;
  logic [IMG_AW-1:0]   img_addr;
  logic [PARAM_AW-1:0] param_addr;
  logic [OFM_AW-1:0]   ofm_addr;
  logic [PIX_W-1:0]    img_rdata;
  logic [KTAPS-1:0]    kernel;
  logic [OFM_W-1:0]    ofm_rdata_unused;
  logic                conv_pix_valid, conv_res_valid;
  conv_sum_t           conv_res;

  bnn_controller #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .MAX_KERN(NUM_KERN),
    .IMG_AW(IMG_AW), .PARAM_AW(PARAM_AW), .OFM_AW(OFM_AW)
  ) u_ctrl (
    .clk, .rst_n, .s_axil(slv[SLV_CTRL]),
    .img_en, .img_addr, .param_en, .param_addr,
    .conv_pix_valid, .conv_res_valid,
    .ofm_en, .ofm_we, .ofm_addr,
    .busy, .trace_valid
  );

  axil_bram #(.WIDTH(PIX_W), .DEPTH(NPIX), .ADDR_W(IMG_AW)) u_input_image (
    .clk, .rst_n, .s_axil(slv[SLV_IMG]),
    .b_en(img_en), .b_we(1'b0), .b_addr(img_addr), .b_wdata('0), .b_rdata(img_rdata)
  );

  axil_bram #(.WIDTH(KTAPS), .DEPTH(NUM_KERN), .ADDR_W(PARAM_AW)) u_param (
    .clk, .rst_n, .s_axil(slv[SLV_PARAM]),
    .b_en(param_en), .b_we(1'b0), .b_addr(param_addr), .b_wdata('0), .b_rdata(kernel)
  );

  axil_bram #(.WIDTH(OFM_W), .DEPTH(NUM_KERN * NOUT), .ADDR_W(OFM_AW)) u_ofm (
    .clk, .rst_n, .s_axil(slv[SLV_OFM]),
    .b_en(ofm_en), .b_we(ofm_we), .b_addr(ofm_addr),
    .b_wdata(OFM_W'(conv_res)), .b_rdata(ofm_rdata_unused)
  );

  conv_unit #(.ROW_LEN(IMG_W), .K(K), .PIX_W(PIX_W), .SUM_W(SUM_W)) u_conv (
    .clk, .rst_n,
    .pix_valid(conv_pix_valid), .pix_in(img_rdata), .kernel(kernel),
    .res_valid(conv_res_valid), .res(conv_res)
  );

  // ------------------------------------------------------------ sensor
  logic [7:0]          delay_sel;
  logic [TDC_STAGES-1:0] tdc_sample;

  tdc_sensor #(
    .STAGES(TDC_STAGES), .CLK_PERIOD_PS(TDC_CLK_PERIOD_PS), .ADJ_BASE_PS(TDC_ADJ_BASE_PS)
  ) u_tdc (
    .clk, .delay_sel, .vdrop_uv, .sample(tdc_sample)
  );

  tdc_fifo #(.WIDTH(TDC_STAGES), .DEPTH(FIFO_DEPTH)) u_tdc_fifo (
    .clk, .rst_n, .s_axil(slv[SLV_TDC]),
    .sample(tdc_sample), .trigger(trace_valid), .delay_sel
  );

endmodule
