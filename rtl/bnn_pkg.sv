// bnn_pkg: constants and types shared by the BNN accelerator and the TDC
// capture logic.
//
// The first convolution layer of the MNIST network takes a 28x28 grayscale
// image (8-bit pixels, 0..255) and 64 binary 3x3 kernels. A kernel element
// of +1 is stored as bit 1 and -1 as bit 0; bit i of a kernel word is K(i+1)
// in the K1..K9 numbering (K1 top-left, K9 bottom-right). Every window sum
// of nine +/-pixels lies in -2295..+2295, so it fits a 13-bit signed value;
// the output feature map keeps it sign-extended to 16 bits.
//
// The image size, kernel size, kernel count and 256-stage TDC follow the
// published design. The result widths, the memory depths and the AXI-Lite
// address map below are this implementation's own choices.
package bnn_pkg;

  // Image and kernel geometry of the first layer.
  localparam int unsigned IMG_W       = 28;
  localparam int unsigned IMG_H       = 28;
  localparam int unsigned IMG_PIXELS  = IMG_W * IMG_H;        // 784
  localparam int unsigned KSIZE       = 3;
  localparam int unsigned KTAPS       = KSIZE * KSIZE;        // 9
  localparam int unsigned NUM_KERNELS = 64;
  localparam int unsigned OUT_W       = IMG_W - KSIZE + 1;    // 26
  localparam int unsigned OUT_H       = IMG_H - KSIZE + 1;    // 26
  localparam int unsigned OUT_PIXELS  = OUT_W * OUT_H;        // 676

  localparam int unsigned PIX_W = 8;   // unsigned grayscale pixel
  localparam int unsigned SUM_W = 13;  // ceil(log2(9*255*2+1)) signed
  localparam int unsigned OFM_W = 16;  // stored width of one result

  typedef logic [PIX_W-1:0]        pixel_t;
  typedef logic [KTAPS-1:0]        kernel_t;   // bit i = K(i+1), 1 = +1
  typedef logic signed [SUM_W-1:0] conv_sum_t;

  // TDC: 256 carry stages, one sample per clock.
  localparam int unsigned TDC_STAGES = 256;
  typedef logic [TDC_STAGES-1:0] tdc_sample_t;

  // AXI4-Lite data path is 32 bits wide.
  localparam int unsigned AXI_AW = 32;
  localparam int unsigned AXI_DW = 32;

  // Address map: bits [20:18] select one of five 256 KiB regions.
  localparam int unsigned NUM_SLAVES   = 5;
  localparam int unsigned SLV_CTRL     = 0;  // 0x0000_0000 controller registers
  localparam int unsigned SLV_TDC      = 1;  // 0x0004_0000 TDC and FIFO
  localparam int unsigned SLV_IMG      = 2;  // 0x0008_0000 Input Image
  localparam int unsigned SLV_PARAM    = 3;  // 0x000C_0000 Param
  localparam int unsigned SLV_OFM      = 4;  // 0x0010_0000 Output Feature Map
  localparam int unsigned SLV_SEL_LSB  = 18;
  localparam int unsigned SLV_SEL_BITS = 3;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

endpackage
