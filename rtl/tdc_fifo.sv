// tdc_fifo: capture of TDC samples into a 256-bit wide FIFO, read over
// AXI4-Lite.
//
// While armed, the FIFO stores one raw TDC sample (all 256 flip-flop
// values) in each clock cycle in which the capture trigger was high one
// cycle earlier: the sensor registers what happened during a cycle at the
// edge that ends it, so the stored sample describes the trigger cycle. The
// trigger comes from the BNN controller and marks the 784 cycles of one
// kernel pass, so a run leaves one sample per input pixel. A sample that
// arrives while the FIFO is full is dropped and sets the sticky overflow
// flag. Software reads the head sample as eight 32-bit words and pops it.
//
// Registers (byte offset):
//   0x00 CTRL    R/W: bit 0 arm, bits 15:8 delay_sel (adjustable delay of
//                the sensor, reset 64); writing bit 1 empties the FIFO and
//                clears overflow
//   0x04 STATUS  R: bits 15:0 count, bit 16 full, bit 17 empty, bit 18 overflow
//   0x08 POP     W: any write removes the head sample (ignored when empty)
//   0x20+4*i     R: bits 32*i+31..32*i of the head sample, i = 0..7
// Reads of the head words take one cycle (block RAM read); a pop in the
// same cycle as a capture is allowed.
//
// The 256-bit width and one sample per clock cycle follow the published
// design; the depth (1024, enough for one 784-cycle pass), the trigger, the
// register map and the overflow handling are this implementation's choices.
module tdc_fifo #(
  parameter int unsigned WIDTH = bnn_pkg::TDC_STAGES,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  axil_if.slave            s_axil,
  input  logic [WIDTH-1:0] sample,
  input  logic             trigger,
  output logic [7:0]       delay_sel
);

  localparam int unsigned PW    = $clog2(DEPTH);

  logic        wr_en, rd_en, rd_err;
  logic [3:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  axil_slave_port #(.ADDR_W(4)) u_port (
    .clk, .rst_n, .s_axil,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_err(1'b0),
    .rd_en, .rd_addr, .rd_data, .rd_err
  );

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic [PW:0]      count;
  logic             armed, overflow, trig_q;
  logic             push, pop, full, empty, clear;

  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == '0);
  assign clear = wr_en && (wr_addr == 4'h0) && wr_data[1];
  assign push  = armed && trig_q && !full && !clear;
  assign pop   = wr_en && (wr_addr == 4'h2) && !empty && !clear;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed     <= 1'b0;
      delay_sel <= 8'd64;
      overflow  <= 1'b0;
      trig_q    <= 1'b0;
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
    end else begin
      trig_q <= trigger;
      if (wr_en && wr_addr == 4'h0) begin
        armed     <= wr_data[0];
        delay_sel <= wr_data[15:8];
      end
      if (clear) begin
        wptr     <= '0;
        rptr     <= '0;
        count    <= '0;
        overflow <= 1'b0;
      end else begin
        if (armed && trig_q && full) overflow <= 1'b1;
        if (push) wptr <= (32'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
        if (pop)  rptr <= (32'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
        count <= count + (PW+1)'(push) - (PW+1)'(pop);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= sample;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_err <= 1'b0;
      if (rd_addr[3]) begin
        rd_data <= mem[rptr][32*rd_addr[2:0] +: 32];
      end else begin
        case (rd_addr)
          4'h0:    rd_data <= {16'd0, delay_sel, 7'd0, armed};
          4'h1:    rd_data <= {13'd0, overflow, empty, full, 16'(count)};
          default: rd_data <= '0;
        endcase
      end
    end
  end

  initial begin
    assert (WIDTH == 256) else $fatal(1, "tdc_fifo: the register map holds 8 words per sample");
  end

endmodule
