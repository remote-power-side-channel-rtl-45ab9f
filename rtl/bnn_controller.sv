// bnn_controller: the on-chip controller of the BNN accelerator.
//
// Software sets the memory parameters and starts a run through AXI4-Lite
// registers. A run convolves the image in Input Image with NUM_KERNELS
// kernels from Param and writes the 26x26 valid results of each kernel to
// Output Feature Map, kernel after kernel, row-major.
//
// The image is streamed from Input Image into the convolution unit once per
// kernel, back to back, one pixel per clock cycle: the read address steps
// through the 784 pixels and wraps. The line buffer's window trails its
// input by LAG = IMG_W-K = 25 pushes, so
//   * push s evaluates the window whose bottom-right pixel P9 is global
//     pixel g = s - LAG, which belongs to kernel pass g / 784;
//   * the kernel word is read from Param (whose read port feeds the
//     convolution unit directly and holds its value) in the cycle after
//     push s = LAG + 784*k is issued, so kernel k reaches the adder tree
//     exactly when the first window of pass k is evaluated;
//   * after the last pass LAG more pixels are pushed (re-reads of the
//     first pixels, whose results are thrown away) to flush the last
//     windows out of the line buffer.
// Each result whose P9 lies in row >= 2 and column >= 2 of its image is
// written to Output Feature Map at consecutive addresses. A run therefore
// takes NUM_KERNELS*784 + LAG + 3 cycles: one result per clock, 784 clock
// cycles per kernel, plus the flush and three cycles of pipeline (memory
// read, line-buffer shift, result register).
//
// Registers (byte offset, 32 bits each):
//   0x00 CTRL         W: bit 0 = start (ignored while busy)
//   0x04 STATUS       R: bit 0 busy, bit 1 done (cleared by start)
//   0x08 NUM_KERNELS  R/W: kernels per run, 1..64 (reset 64)
//   0x0C IMG_BASE     R/W: word address of pixel 0 in Input Image
//   0x10 PARAM_BASE   R/W: word address of kernel 0 in Param
//   0x14 OFM_BASE     R/W: word address of the first result in Output Feature Map
//   0x18 CYCLES       R: clock cycles the last run was busy
//   0x1C TRACE_KERNEL R/W: kernel pass whose windows drive trace_valid (reset 0)
// Writes other than CTRL are ignored while busy. trace_valid is high in
// each of the 784 cycles in which the adder tree evaluates a window of pass
// TRACE_KERNEL, whether or not the window is a valid one; the TDC capture
// uses it, so the n-th captured sample belongs to the window whose P9 is
// pixel n.
//
// The controller's role (memory parameters, running the convolution) and
// the rate of one output per clock are the published design's; the
// register map, the back-to-back streaming with its kernel timing, the
// flush and the trace strobe are this implementation's choices. Software
// must keep every base plus size within its memory; addresses wrap at the
// port width.
module bnn_controller #(
  parameter int unsigned IMG_W    = bnn_pkg::IMG_W,
  parameter int unsigned IMG_H    = bnn_pkg::IMG_H,
  parameter int unsigned K        = bnn_pkg::KSIZE,
  parameter int unsigned MAX_KERN = bnn_pkg::NUM_KERNELS,
  parameter int unsigned IMG_AW   = $clog2(IMG_W * IMG_H),
  parameter int unsigned PARAM_AW = (MAX_KERN > 1) ? $clog2(MAX_KERN) : 1,
  parameter int unsigned OFM_AW   = $clog2(MAX_KERN * (IMG_W-K+1) * (IMG_H-K+1))
) (
  input  logic                clk,
  input  logic                rst_n,
  axil_if.slave               s_axil,
  // Input Image read port
  output logic                img_en,
  output logic [IMG_AW-1:0]   img_addr,
  // Param read port
  output logic                param_en,
  output logic [PARAM_AW-1:0] param_addr,
  // Convolution unit
  output logic                conv_pix_valid,
  input  logic                conv_res_valid,
  // Output Feature Map write port (data comes from the convolution unit)
  output logic                ofm_en,
  output logic                ofm_we,
  output logic [OFM_AW-1:0]   ofm_addr,
  // Status for the rest of the chip
  output logic                busy,
  output logic                trace_valid
);

  typedef enum logic [1:0] {S_IDLE, S_STREAM, S_DRAIN} state_e;

  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned LAG  = IMG_W - K;
  localparam int unsigned PW   = $clog2(NPIX);

  // ---------------------------------------------------------------- registers
  logic        wr_en, rd_en, rd_err;
  logic [3:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  axil_slave_port #(.ADDR_W(4)) u_port (
    .clk, .rst_n, .s_axil,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_err(1'b0),
    .rd_en, .rd_addr, .rd_data, .rd_err
  );

  logic [31:0] num_kernels, img_base, param_base, ofm_base, cycles, trace_kernel;
  logic        done;
  logic        start;

  state_e      state;
  logic [31:0] npass;      // passes in this run (NUM_KERNELS, at least 1)
  // Issue side: one pixel read per cycle in S_STREAM.
  logic [PW-1:0] rd_pix;   // pixel index of the read, wraps at NPIX
  logic [31:0]   rd_pass;  // pass of the pixel being read
  logic [31:0]   kload;    // next kernel to load
  logic          load_q;   // load the kernel in this cycle
  // Window side: the window P9 of the push issued now (valid once s >= LAG).
  logic [31:0]   lag_cnt;  // pushes issued, saturating at LAG
  logic [PW-1:0] win_pix;
  logic [31:0]   win_pass;
  // Result side.
  logic [31:0]              res_skip;  // results still to discard (first LAG)
  logic [$clog2(IMG_W)-1:0] res_col;
  logic [$clog2(IMG_H)-1:0] res_row;
  logic [31:0]              res_pass;
  logic [OFM_AW-1:0]        ofm_ptr;
  logic                     res_last;

  assign start = wr_en && (wr_addr == 4'h0) && wr_data[0] && (state == S_IDLE);
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      num_kernels  <= 32'(MAX_KERN);
      img_base     <= '0;
      param_base   <= '0;
      ofm_base     <= '0;
      trace_kernel <= '0;
    end else if (wr_en && !busy) begin
      case (wr_addr)
        4'h2: num_kernels  <= wr_data;
        4'h3: img_base     <= wr_data;
        4'h4: param_base   <= wr_data;
        4'h5: ofm_base     <= wr_data;
        4'h7: trace_kernel <= wr_data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_err <= 1'b0;
      case (rd_addr)
        4'h1:    rd_data <= {30'd0, done, busy};
        4'h2:    rd_data <= num_kernels;
        4'h3:    rd_data <= img_base;
        4'h4:    rd_data <= param_base;
        4'h5:    rd_data <= ofm_base;
        4'h6:    rd_data <= cycles;
        4'h7:    rd_data <= trace_kernel;
        default: rd_data <= '0;
      endcase
    end
  end

  // ---------------------------------------------------------------- sequencer
  logic issue_last;  // the last push of the run is issued now
  assign issue_last = (state == S_STREAM) && (rd_pass == npass) && (32'(rd_pix) == LAG - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      npass    <= 32'd1;
      rd_pix   <= '0;
      rd_pass  <= '0;
      kload    <= '0;
      load_q   <= 1'b0;
      lag_cnt  <= '0;
      win_pix  <= '0;
      win_pass <= '0;
      done     <= 1'b0;
      cycles   <= '0;
    end else begin
      load_q <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_STREAM;
          npass    <= (num_kernels == 0) ? 32'd1 : num_kernels;
          rd_pix   <= '0;
          rd_pass  <= '0;
          kload    <= '0;
          lag_cnt  <= '0;
          win_pix  <= '0;
          win_pass <= '0;
          done     <= 1'b0;
          cycles   <= '0;
        end
        S_STREAM: begin
          if (32'(rd_pix) == NPIX - 1) begin
            rd_pix  <= '0;
            rd_pass <= rd_pass + 1;
          end else begin
            rd_pix <= rd_pix + 1'b1;
          end
          // The push issued now is s = rd_pass*NPIX + rd_pix.
          if (32'(rd_pix) == LAG && rd_pass < npass) begin
            load_q <= 1'b1;
          end
          if (lag_cnt < LAG) begin
            lag_cnt <= lag_cnt + 1;
          end else if (32'(win_pix) == NPIX - 1) begin
            win_pix  <= '0;
            win_pass <= win_pass + 1;
          end else begin
            win_pix <= win_pix + 1'b1;
          end
          if (issue_last) state <= S_DRAIN;
        end
        S_DRAIN: if (res_last) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      if (load_q) kload <= kload + 1;
      if (busy) cycles <= cycles + 1;
    end
  end

  assign param_en   = load_q;
  assign param_addr = PARAM_AW'(param_base + kload);
  assign img_en     = (state == S_STREAM);
  assign img_addr   = IMG_AW'(img_base + 32'(rd_pix));

  // The pixel read in one cycle is pushed in the next; its window is
  // evaluated by the adder tree in the cycle after that.
  logic pix_valid_q, trace_q1, trace_q2;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pix_valid_q <= 1'b0;
      trace_q1    <= 1'b0;
      trace_q2    <= 1'b0;
    end else begin
      pix_valid_q <= img_en;
      trace_q1    <= img_en && (lag_cnt >= LAG) && (win_pass == trace_kernel);
      trace_q2    <= trace_q1;
    end
  end
  assign conv_pix_valid = pix_valid_q;
  assign trace_valid    = trace_q2;

  // ---------------------------------------------------------------- results
  // Results arrive in push order; the first LAG of a run are discarded, the
  // rest are counted by the position of their window's P9.
  assign res_last = conv_res_valid && (res_skip == 0) && (res_pass == npass - 1)
                 && (32'(res_row) == IMG_H - 1) && (32'(res_col) == IMG_W - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_skip <= '0;
      res_col  <= '0;
      res_row  <= '0;
      res_pass <= '0;
      ofm_ptr  <= '0;
    end else if (start) begin
      res_skip <= 32'(LAG);
      res_col  <= '0;
      res_row  <= '0;
      res_pass <= '0;
      ofm_ptr  <= OFM_AW'(ofm_base);
    end else if (conv_res_valid) begin
      if (res_skip != 0) begin
        res_skip <= res_skip - 1;
      end else begin
        if (32'(res_col) == IMG_W - 1) begin
          res_col <= '0;
          if (32'(res_row) == IMG_H - 1) begin
            res_row  <= '0;
            res_pass <= res_pass + 1;
          end else begin
            res_row <= res_row + 1'b1;
          end
        end else begin
          res_col <= res_col + 1'b1;
        end
        if (ofm_we) ofm_ptr <= ofm_ptr + 1'b1;
      end
    end
  end

  assign ofm_we   = conv_res_valid && (res_skip == 0)
                 && (32'(res_row) >= K - 1) && (32'(res_col) >= K - 1);
  assign ofm_en   = ofm_we;
  assign ofm_addr = ofm_ptr;

  // A result never arrives when no pass is running.
  assert property (@(posedge clk) disable iff (!rst_n) conv_res_valid |-> busy);

endmodule
