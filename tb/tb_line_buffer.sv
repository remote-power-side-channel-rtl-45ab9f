// tb_line_buffer: checks the 3x28 line buffer against a record of every
// pixel pushed. After n shifts, window P(1+3a+b) must equal pixel
// n-1-25-(2-a)*28-(2-b) (0 before that many pushes, from reset): the
// window is the right end of each row, 25 words behind the entry point. Cycles with shift_en low must leave the window unchanged.
module tb_line_buffer;
  import bnn_pkg::*;

  localparam int W = IMG_W;
  localparam int N = 400;

  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0;
  logic [PIX_W-1:0] pix_in = '0;
  logic [PIX_W-1:0] window [KTAPS];
  int checks = 0, failures = 0;
  logic [PIX_W-1:0] hist [N];
  int n = 0;

  line_buffer dut (.clk, .rst_n, .shift_en, .pix_in, .window);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PIX_W-1:0] expect_p(int idx);  // idx 0..8 -> P(idx+1)
    int a = idx / 3, b = idx % 3;
    int back = (W - 3) + (2 - a) * W + (2 - b);
    return (n - 1 - back >= 0) ? hist[n - 1 - back] : '0;
  endfunction

  task automatic check_window();
    for (int i = 0; i < KTAPS; i++) begin
      checks++;
      if (window[i] !== expect_p(i)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d P%0d got %0d exp %0d", n, i+1, window[i], expect_p(i));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check_window();  // all zero after reset
    while (n < N) begin
      logic do_shift;
      do_shift = ($urandom_range(0, 3) != 0);
      shift_en <= do_shift;
      pix_in   <= PIX_W'($urandom);
      @(posedge clk);
      shift_en <= 1'b0;
      #1;
      if (do_shift) begin
        hist[n] = pix_in;
        n++;
      end
      check_window();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
