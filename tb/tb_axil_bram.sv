// tb_axil_bram: checks one dual-port block memory (16-bit words, 100 deep):
// bus writes and reads of every word, byte strobes, SLVERR and no effect
// for addresses at or above the depth, port-B writes seen on the bus, bus
// writes seen on port B with one cycle of latency.
module tb_axil_bram;
  localparam int W = 16, D = 100, AW = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  axil_if bus ();
  logic          b_en = 1'b0, b_we = 1'b0;
  logic [AW-1:0] b_addr = '0;
  logic [W-1:0]  b_wdata = '0, b_rdata;
  logic [W-1:0]  model [D];
  int checks = 0, failures = 0;

  axil_bram #(.WIDTH(W), .DEPTH(D), .ADDR_W(AW)) dut (
    .clk, .rst_n, .s_axil(bus), .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );
  axil_master_bfm u_bfm (.clk, .m(bus));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] v;
    logic [1:0]  resp;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < D; i++) begin
      model[i] = W'($urandom);
      u_bfm.write(32'(4*i), {16'hDEAD, model[i]}, 4'hF, resp);
      expect_eq("write resp", int'(resp), 0);
    end
    for (int i = 0; i < D; i++) begin
      u_bfm.read(32'(4*i), v, resp);
      expect_eq("read data", int'(v), int'(model[i]));
      expect_eq("read resp", int'(resp), 0);
    end
    // Byte strobe: only the upper byte of word 7.
    u_bfm.write(32'(4*7), 32'h0000_AB55, 4'b0010, resp);
    model[7][15:8] = 8'hAB;
    u_bfm.read(32'(4*7), v, resp);
    expect_eq("strobe", int'(v), int'(model[7]));
    // Out of range.
    u_bfm.write(32'(4*D), 32'h1234, 4'hF, resp);
    expect_eq("oor write resp", int'(resp), 2);
    u_bfm.read(32'(4*D), v, resp);
    expect_eq("oor read resp", int'(resp), 2);
    expect_eq("oor read data", int'(v), 0);
    u_bfm.read(32'(4*(D-1)), v, resp);
    expect_eq("last word intact", int'(v), int'(model[D-1]));
    // Port B reads with one cycle of latency.
    for (int i = 0; i < D; i += 7) begin
      @(posedge clk); #1;
      b_en = 1'b1; b_we = 1'b0; b_addr = AW'(i);
      @(posedge clk); #1;
      b_en = 1'b0;
      expect_eq("port B read", int'(b_rdata), int'(model[i]));
    end
    // Port B writes, seen on the bus.
    for (int i = 3; i < D; i += 11) begin
      @(posedge clk); #1;
      model[i] = W'($urandom);
      b_en = 1'b1; b_we = 1'b1; b_addr = AW'(i); b_wdata = model[i];
      @(posedge clk); #1;
      b_en = 1'b0; b_we = 1'b0;
      u_bfm.read(32'(4*i), v, resp);
      expect_eq("port B write", int'(v), int'(model[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
