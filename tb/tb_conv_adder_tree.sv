// tb_conv_adder_tree: compares the binary adder tree with a direct sum of
// +/-pixels for the extreme cases and for random windows and kernels.
module tb_conv_adder_tree;
  import bnn_pkg::*;

  logic [PIX_W-1:0] window [KTAPS];
  logic [KTAPS-1:0] kernel;
  conv_sum_t        sum;
  int checks = 0, failures = 0;

  conv_adder_tree dut (.window, .kernel, .sum);

  function automatic int model();
    int s = 0;
    for (int i = 0; i < KTAPS; i++) s += kernel[i] ? int'(window[i]) : -int'(window[i]);
    return s;
  endfunction

  task automatic check(string what);
    #1;
    checks++;
    if (int'(sum) != model()) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, sum, model());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (window[i]) window[i] = 8'd255;
    kernel = '1;
    check("all +255");
    if (sum != 13'sd2295) begin failures++; $display("FAIL max sum %0d", sum); end
    checks++;
    kernel = '0;
    check("all -255");
    if (sum != -13'sd2295) begin failures++; $display("FAIL min sum %0d", sum); end
    checks++;
    for (int t = 0; t < 2000; t++) begin
      foreach (window[i]) window[i] = PIX_W'($urandom);
      kernel = KTAPS'($urandom);
      check("random");
    end
    // One tap at a time: each kernel bit must act on its own pixel only.
    for (int i = 0; i < KTAPS; i++) begin
      foreach (window[j]) window[j] = '0;
      window[i] = 8'(10 + i);
      kernel = KTAPS'(1) << i;
      check("single +");
      kernel = ~kernel;
      check("single -");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
