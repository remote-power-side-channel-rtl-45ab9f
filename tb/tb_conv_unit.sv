// tb_conv_unit: streams whole 28x28 images through the convolution unit,
// with and without gaps between pixels, and checks every result whose
// window lies inside the image against Eq. (1) computed directly from the
// image. Each image is followed by 25 filler pixels, since the window
// trails the entry point of the line buffer by 25 words. Also checks that
// every result appears exactly two cycles after its push and that one
// result is produced per push.
module tb_conv_unit;
  import bnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_valid = 1'b0;
  logic [PIX_W-1:0] pix_in = '0;
  logic [KTAPS-1:0] kernel = '0;
  logic res_valid;
  conv_sum_t res;
  int checks = 0, failures = 0;

  logic [PIX_W-1:0] img [IMG_H][IMG_W];
  int push_cycle [$];
  int cycle = 0;
  int nres = 0;
  int nchecked = 0;
  localparam int LAG = IMG_W - KSIZE;

  conv_unit dut (.clk, .rst_n, .pix_valid, .pix_in, .kernel, .res_valid, .res);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (pix_valid) push_cycle.push_back(cycle);
    cycle <= cycle + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int r, int c);  // newest pixel at (r, c)
    int s = 0;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        s += kernel[3*a+b] ? int'(img[r-2+a][c-2+b]) : -int'(img[r-2+a][c-2+b]);
    return s;
  endfunction

  // Result checker: results come back in pixel order.
  always @(posedge clk) if (rst_n && res_valid) begin
    int q, p, r, c, pc;
    q  = nres % (IMG_W*IMG_H + LAG);
    p  = q - LAG;
    r  = p / IMG_W;
    c  = p % IMG_W;
    pc = push_cycle.pop_front();
    checks++;
    if (cycle - pc != 2) begin
      failures++;
      $display("FAIL latency %0d for pixel %0d", cycle - pc, p);
    end
    if (p >= 0 && r >= 2 && c >= 2) begin
      nchecked++;
      checks++;
      if (int'(res) != expected(r, c)) begin
        failures++;
        if (failures < 10) $display("FAIL O[%0d][%0d] got %0d exp %0d", r-2, c-2, res, expected(r, c));
      end
    end
    nres++;
  end

  task automatic run_image(int gap_pct);
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        while ($urandom_range(0, 99) < gap_pct) begin
          pix_valid <= 1'b0;
          @(posedge clk);
        end
        pix_valid <= 1'b1;
        pix_in    <= img[r][c];
        @(posedge clk);
      end
    for (int i = 0; i < LAG; i++) begin
      pix_valid <= 1'b1;
      pix_in    <= PIX_W'($urandom);
      @(posedge clk);
    end
    pix_valid <= 1'b0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Image 1: a digit-like ring of bright pixels on a dark background.
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        automatic int d2 = (r-14)*(r-14) + (c-14)*(c-14);
        img[r][c] = (d2 > 30 && d2 < 70) ? 8'd250 : 8'd3;
      end
    kernel = 9'b101_010_110;
    run_image(0);
    // Image 2: random pixels, random kernel, random gaps.
    foreach (img[r, c]) img[r][c] = PIX_W'($urandom);
    kernel = KTAPS'($urandom);
    run_image(30);
    checks++;
    if (nres != 2 * (IMG_W * IMG_H + LAG) || nchecked != 2 * OUT_PIXELS) begin
      failures++;
      $display("FAIL %0d results, %0d checked", nres, nchecked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
