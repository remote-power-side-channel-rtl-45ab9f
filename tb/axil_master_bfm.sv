// axil_master_bfm: AXI4-Lite master for testbenches.
//
// write(addr, data, strb, resp) and read(addr, data, resp) each run one
// complete transaction and return the response code. Address and data of a
// write are presented together. Signals change 1 time unit after a rising
// edge of clk; handshakes are judged from the settled ready/valid values at
// the falling edge before the rising edge on which they take place. Every
// wait is bounded by the caller's watchdog.
module axil_master_bfm (
  input logic    clk,
  axil_if.master m
);

  initial begin
    m.awvalid = 1'b0;
    m.wvalid  = 1'b0;
    m.bready  = 1'b0;
    m.arvalid = 1'b0;
    m.rready  = 1'b0;
    m.awaddr  = '0;
    m.wdata   = '0;
    m.wstrb   = '0;
    m.araddr  = '0;
  end

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] strb, output logic [1:0] resp);
    bit aw_hs, w_hs;
    @(posedge clk); #1;
    m.awaddr  = addr;
    m.awvalid = 1'b1;
    m.wdata   = data;
    m.wstrb   = strb;
    m.wvalid  = 1'b1;
    m.bready  = 1'b1;
    while (m.awvalid || m.wvalid) begin
      @(negedge clk);
      aw_hs = m.awvalid && m.awready;
      w_hs  = m.wvalid && m.wready;
      @(posedge clk); #1;
      if (aw_hs) m.awvalid = 1'b0;
      if (w_hs)  m.wvalid  = 1'b0;
    end
    forever begin
      @(negedge clk);
      if (m.bvalid) break;
    end
    resp = m.bresp;
    @(posedge clk); #1;
    m.bready = 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output logic [1:0] resp);
    bit ar_hs;
    @(posedge clk); #1;
    m.araddr  = addr;
    m.arvalid = 1'b1;
    m.rready  = 1'b1;
    while (m.arvalid) begin
      @(negedge clk);
      ar_hs = m.arready;
      @(posedge clk); #1;
      if (ar_hs) m.arvalid = 1'b0;
    end
    forever begin
      @(negedge clk);
      if (m.rvalid) break;
    end
    data = m.rdata;
    resp = m.rresp;
    @(posedge clk); #1;
    m.rready = 1'b0;
  endtask

endmodule
