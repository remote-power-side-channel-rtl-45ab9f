// axil_bram: a dual-port on-chip block memory with one port on the AXI4-Lite
// bus and one port for the accelerator.
//
// The design uses three of these: Input Image (784 x 8-bit pixels), Param
// (64 x 9-bit binary kernels, bit value 1 for +1 and 0 for -1) and Output
// Feature Map (64 x 676 results of 16 bits). The user loads the first two
// and reads the third over the bus; the controller reads and writes them
// through port B.
//
// Port A (bus): one WIDTH-bit word per 32-bit bus word, right-aligned;
// reads return it zero-extended. Byte strobes are honoured for the bytes
// the word has. A word address at or above DEPTH is ignored on a write and
// reads as 0, with an SLVERR response. Port B: b_en with b_we writes
// b_wdata, b_en without it reads; b_rdata is valid the cycle after b_en (one
// cycle of latency on both ports). A write and a read of the same word in
// one cycle on different ports return the old word.
//
// The three memories and what they hold follow the published design; the
// widths, depths, one word per bus word, and the error response are this
// implementation's choices.
module axil_bram #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned DEPTH  = bnn_pkg::NUM_KERNELS * bnn_pkg::OUT_PIXELS,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  axil_if.slave             s_axil,
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [WIDTH-1:0]  b_wdata,
  output logic [WIDTH-1:0]  b_rdata
);

  // The bus port decodes 16 word-address bits: 256 KiB regions.
  localparam int unsigned BUS_AW = 16;

  logic [WIDTH-1:0] mem [DEPTH];

  logic              a_wr_en, a_rd_en;
  logic [BUS_AW-1:0] a_wr_addr, a_rd_addr;
  logic [31:0]       a_wr_data, a_rd_word;
  logic [3:0]        a_wr_strb;
  logic              a_wr_err, a_rd_err;
  logic [WIDTH-1:0]  a_rdata, a_wr_mask;

  axil_slave_port #(.ADDR_W(BUS_AW)) u_port (
    .clk     (clk),
    .rst_n   (rst_n),
    .s_axil  (s_axil),
    .wr_en   (a_wr_en),
    .wr_addr (a_wr_addr),
    .wr_data (a_wr_data),
    .wr_strb (a_wr_strb),
    .wr_err  (a_wr_err),
    .rd_en   (a_rd_en),
    .rd_addr (a_rd_addr),
    .rd_data (a_rd_word),
    .rd_err  (a_rd_err)
  );

  assign a_wr_err = (32'(a_wr_addr) >= DEPTH);

  always_comb begin
    for (int i = 0; i < int'(WIDTH); i++) a_wr_mask[i] = (i < 32) ? a_wr_strb[i/8 % 4] : 1'b0;
  end

  always_ff @(posedge clk) begin
    if (a_wr_en && !a_wr_err)
      mem[a_wr_addr[ADDR_W-1:0]] <= (mem[a_wr_addr[ADDR_W-1:0]] & ~a_wr_mask)
                                  | (a_wr_data[WIDTH-1:0] & a_wr_mask);
    if (b_en && b_we)
      mem[b_addr] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_rd_en) begin
      a_rd_err <= (32'(a_rd_addr) >= DEPTH);
      a_rdata  <= (32'(a_rd_addr) >= DEPTH) ? '0 : mem[a_rd_addr[ADDR_W-1:0]];
    end
    if (b_en && !b_we)
      b_rdata <= mem[b_addr];
  end

  assign a_rd_word = 32'(a_rdata);

  initial begin
    assert (WIDTH <= 32) else $fatal(1, "axil_bram: WIDTH must fit a bus word");
    assert (ADDR_W <= BUS_AW) else $fatal(1, "axil_bram: DEPTH exceeds the bus region");
  end

endmodule
