// tb_axil_interconnect: five small block memories behind the interconnect
// with the design's address map (bits [20:18] select the slave). Writes a
// distinct value to the same offset in every region and reads all back,
// which fails if any transaction reaches the wrong slave; then checks that
// the three unmapped select values answer DECERR and read 0, and that the
// slaves' own SLVERR passes through.
module tb_axil_interconnect;
  import bnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  axil_if bus ();
  axil_if slv [NUM_SLAVES] ();
  int checks = 0, failures = 0;

  axil_interconnect dut (.clk, .rst_n, .s_axil(bus), .m_axil(slv));
  axil_master_bfm u_bfm (.clk, .m(bus));

  for (genvar i = 0; i < NUM_SLAVES; i++) begin : g_mem
    logic [31:0] unused_rdata;
    axil_bram #(.WIDTH(32), .DEPTH(16), .ADDR_W(4)) u_mem (
      .clk, .rst_n, .s_axil(slv[i]),
      .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_rdata(unused_rdata)
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] region(int s, int word);
    return (32'(s) << SLV_SEL_LSB) | 32'(4 * word);
  endfunction

  initial begin
    logic [31:0] v;
    logic [1:0]  resp;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int w = 0; w < 4; w++)
      for (int s = 0; s < NUM_SLAVES; s++) begin
        u_bfm.write(region(s, w), 32'hA000_0000 | 32'(s << 8) | 32'(w), 4'hF, resp);
        expect_eq("write resp", int'(resp), 0);
      end
    for (int w = 0; w < 4; w++)
      for (int s = 0; s < NUM_SLAVES; s++) begin
        u_bfm.read(region(s, w), v, resp);
        expect_eq("read back", int'(v), int'(32'hA000_0000 | 32'(s << 8) | 32'(w)));
        expect_eq("read resp", int'(resp), 0);
      end
    for (int s = NUM_SLAVES; s < (1 << SLV_SEL_BITS); s++) begin
      u_bfm.write(region(s, 0), 32'h5555_5555, 4'hF, resp);
      expect_eq("unmapped write resp", int'(resp), 3);
      u_bfm.read(region(s, 0), v, resp);
      expect_eq("unmapped read resp", int'(resp), 3);
      expect_eq("unmapped read data", int'(v), 0);
    end
    u_bfm.read(region(2, 20), v, resp);
    expect_eq("slave error passes", int'(resp), 2);
    for (int s = 0; s < NUM_SLAVES; s++) begin
      u_bfm.read(region(s, 0), v, resp);
      expect_eq("intact after errors", int'(v), int'(32'hA000_0000 | 32'(s << 8)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
