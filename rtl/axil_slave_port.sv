// axil_slave_port: turns AXI4-Lite slave transactions into simple register
// or memory accesses.
//
// One transaction of each kind is handled at a time. A write is accepted
// when address and data are both valid (AWREADY and WREADY rise together
// for one cycle); in that cycle wr_en pulses with the word address, data
// and byte strobes, and the B response follows in the next cycle. A read
// is accepted when AR is valid and no read is pending; rd_en pulses in
// that cycle and the target must present rd_data and rd_err in the next
// cycle (one cycle of read latency, as a block RAM has), when R becomes
// valid. wr_err/rd_err turn the response into SLVERR.
//
// ADDR_W is the number of word-address bits passed on: byte address bits
// [ADDR_W+1:2]; the upper bits are left to the interconnect's decoder.
// The AXI4-Lite protocol is the one the published design uses on chip;
// this one-at-a-time adapter is this implementation's own.
module axil_slave_port #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  axil_if.slave             s_axil,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data,
  output logic [3:0]        wr_strb,
  input  logic              wr_err,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [31:0]       rd_data,
  input  logic              rd_err
);
  import bnn_pkg::*;

  logic rd_pend;

  // Write channel: address and data are taken together.
  assign wr_en          = s_axil.awvalid && s_axil.wvalid && !s_axil.bvalid;
  assign s_axil.awready = wr_en;
  assign s_axil.wready  = wr_en;
  assign wr_addr        = s_axil.awaddr[ADDR_W+1:2];
  assign wr_data        = s_axil.wdata;
  assign wr_strb        = s_axil.wstrb;

  // Read channel.
  assign s_axil.arready = !s_axil.rvalid && !rd_pend;
  assign rd_en          = s_axil.arvalid && s_axil.arready;
  assign rd_addr        = s_axil.araddr[ADDR_W+1:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil.bvalid <= 1'b0;
      s_axil.bresp  <= RESP_OKAY;
      s_axil.rvalid <= 1'b0;
      s_axil.rresp  <= RESP_OKAY;
      s_axil.rdata  <= '0;
      rd_pend       <= 1'b0;
    end else begin
      if (wr_en) begin
        s_axil.bvalid <= 1'b1;
        s_axil.bresp  <= wr_err ? RESP_SLVERR : RESP_OKAY;
      end else if (s_axil.bready) begin
        s_axil.bvalid <= 1'b0;
      end

      rd_pend <= rd_en;
      if (rd_pend) begin
        s_axil.rvalid <= 1'b1;
        s_axil.rdata  <= rd_data;
        s_axil.rresp  <= rd_err ? RESP_SLVERR : RESP_OKAY;
      end else if (s_axil.rready) begin
        s_axil.rvalid <= 1'b0;
      end
    end
  end

endmodule
