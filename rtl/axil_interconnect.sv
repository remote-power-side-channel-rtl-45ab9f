// axil_interconnect: AXI4-Lite crossbar from the one bus master (the JTAG
// bridge) to the design's slaves: controller registers, TDC/FIFO registers
// and the three block memories.
//
// Address bits [SEL_LSB+SEL_BITS-1:SEL_LSB] pick the slave; the full
// address is passed on, and each slave decodes the bits below SEL_LSB. An
// address whose select value has no slave completes with DECERR (reads
// return 0) without reaching any slave.
//
// One write and one read can be in flight at a time (they are independent
// of each other). A write's slave is decoded from AWADDR and held from the
// AW handshake until the B handshake; W is routed only while AW is valid
// or has been accepted, so slaves may take AW and W in either order. Reads
// are handled the same way from AR to the R handshake. No cycle is added on
// any channel: all routing is combinational.
//
// The interconnect and the AXI4-Lite protocol are the published design's;
// the address map and this single-outstanding scheme are this
// implementation's choices.
module axil_interconnect #(
  parameter int unsigned N        = bnn_pkg::NUM_SLAVES,
  parameter int unsigned SEL_LSB  = bnn_pkg::SLV_SEL_LSB,
  parameter int unsigned SEL_BITS = bnn_pkg::SLV_SEL_BITS
) (
  input  logic  clk,
  input  logic  rst_n,
  axil_if.slave  s_axil,
  axil_if.master m_axil [N]
);
  import bnn_pkg::*;

  typedef logic [SEL_BITS-1:0] sel_t;

  // Flattened copies of the slave-side response signals.
  logic        m_awready [N];
  logic        m_wready  [N];
  logic        m_bvalid  [N];
  logic [1:0]  m_bresp   [N];
  logic        m_arready [N];
  logic        m_rvalid  [N];
  logic [1:0]  m_rresp   [N];
  logic [31:0] m_rdata   [N];

  logic aw_done, w_done, ar_done;
  sel_t wsel_q, rsel_q, wsel, rsel;

  assign wsel = aw_done ? wsel_q : s_axil.awaddr[SEL_LSB +: SEL_BITS];
  assign rsel = ar_done ? rsel_q : s_axil.araddr[SEL_LSB +: SEL_BITS];

  logic w_hit, r_hit;  // the selected slave exists
  assign w_hit = (32'(wsel) < N);
  assign r_hit = (32'(rsel) < N);

  logic aw_go, w_go;   // the master's AW / W may be forwarded now
  assign aw_go = s_axil.awvalid && !aw_done;
  assign w_go  = s_axil.wvalid && !w_done && (aw_done || s_axil.awvalid);

  for (genvar i = 0; i < int'(N); i++) begin : g_slave
    assign m_axil[i].awaddr  = s_axil.awaddr;
    assign m_axil[i].awvalid = aw_go && (32'(wsel) == i);
    assign m_axil[i].wdata   = s_axil.wdata;
    assign m_axil[i].wstrb   = s_axil.wstrb;
    assign m_axil[i].wvalid  = w_go && (32'(wsel) == i);
    assign m_axil[i].bready  = s_axil.bready && aw_done && w_done && (32'(wsel_q) == i);
    assign m_axil[i].araddr  = s_axil.araddr;
    assign m_axil[i].arvalid = s_axil.arvalid && !ar_done && (32'(rsel) == i);
    assign m_axil[i].rready  = s_axil.rready && ar_done && (32'(rsel_q) == i);

    assign m_awready[i] = m_axil[i].awready;
    assign m_wready[i]  = m_axil[i].wready;
    assign m_bvalid[i]  = m_axil[i].bvalid;
    assign m_bresp[i]   = m_axil[i].bresp;
    assign m_arready[i] = m_axil[i].arready;
    assign m_rvalid[i]  = m_axil[i].rvalid;
    assign m_rresp[i]   = m_axil[i].rresp;
    assign m_rdata[i]   = m_axil[i].rdata;
  end

  always_comb begin
    // Defaults: the unmapped (error) target accepts everything at once.
    s_axil.awready = aw_go;
    s_axil.wready  = w_go;
    s_axil.bvalid  = aw_done && w_done;
    s_axil.bresp   = RESP_DECERR;
    s_axil.arready = !ar_done;
    s_axil.rvalid  = ar_done;
    s_axil.rresp   = RESP_DECERR;
    s_axil.rdata   = '0;
    if (w_hit) begin
      s_axil.awready = aw_go && m_awready[wsel];
      s_axil.wready  = w_go && m_wready[wsel];
    end
    if (aw_done && w_done && 32'(wsel_q) < N) begin
      s_axil.bvalid = m_bvalid[wsel_q];
      s_axil.bresp  = m_bresp[wsel_q];
    end
    if (r_hit) s_axil.arready = !ar_done && m_arready[rsel];
    if (ar_done && 32'(rsel_q) < N) begin
      s_axil.rvalid = m_rvalid[rsel_q];
      s_axil.rresp  = m_rresp[rsel_q];
      s_axil.rdata  = m_rdata[rsel_q];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      ar_done <= 1'b0;
      wsel_q  <= '0;
      rsel_q  <= '0;
    end else begin
      if (s_axil.awvalid && s_axil.awready) begin
        aw_done <= 1'b1;
        wsel_q  <= wsel;
      end
      if (s_axil.wvalid && s_axil.wready) w_done <= 1'b1;
      if (s_axil.bvalid && s_axil.bready) begin
        aw_done <= 1'b0;
        w_done  <= 1'b0;
      end
      if (s_axil.arvalid && s_axil.arready) begin
        ar_done <= 1'b1;
        rsel_q  <= rsel;
      end
      if (s_axil.rvalid && s_axil.rready) ar_done <= 1'b0;
    end
  end

endmodule
