// cnv_pkg: shared constants and arithmetic helpers of the quantised CIFAR-10
// classifier.
//
// The network is five 3x3 convolutions (32, 64, 128, 128, 256 filters), two
// 2x2 max-pools and three dense layers (512, 512, 10 outputs) on 32x32 RGB
// images. The layer shapes are the network's own. The folding of each engine
// (PE = processing elements, SIMD = lanes per PE) is worked out from the
// per-layer latencies the design was characterised with: a layer needs
// (output pixels) x (MH/PE) x (MW/SIMD) cycles per image, where MH is the
// number of output channels and MW the length of one input vector.
//
// Number encodings (this design's choice, the classic binarised/quantised
// conventions):
//   weights, 1 bit     : 1 -> +1, 0 -> -1
//   weights, 2 bit     : two's complement, -2..+1
//   activations, 1 bit : 1 -> +1, 0 -> -1 (bipolar)
//   activations, 2 bit : unsigned 0..3
//   image pixels       : 8-bit unsigned, three channels (R, G, B)
// A thresholded output is the number of thresholds the accumulator reaches,
// which for 1-bit activations is the bit (acc >= T).
package cnv_pkg;

  // Image and first-layer input
  localparam int unsigned IMG_DIM   = 32;
  localparam int unsigned IMG_CH    = 3;
  localparam int unsigned PIX_BITS  = 8;

  // Accumulator width. Largest magnitude: layer 1 with 2-bit weights,
  // 27 x 2 x 255 = 13770, and dense layer 1 with 2-bit weights and
  // activations, 2304 x 2 x 3 = 13824. Both fit a signed 16-bit word.
  localparam int unsigned ACC_W     = 16;

  localparam int unsigned KDIM      = 3;    // all convolutions are 3x3
  localparam int unsigned NUM_CLASSES = 10;

  // Per-layer shapes (channels) and folding.
  localparam int unsigned C1_OUT = 32,  C1_PE = 16, C1_SIMD = 3;
  localparam int unsigned C2_OUT = 64,  C2_PE = 32, C2_SIMD = 32;
  localparam int unsigned C3_OUT = 128, C3_PE = 16, C3_SIMD = 32;
  localparam int unsigned C4_OUT = 128, C4_PE = 16, C4_SIMD = 32;
  localparam int unsigned C5_OUT = 256, C5_PE = 4,  C5_SIMD = 32;
  localparam int unsigned D1_OUT = 512, D1_PE = 1,  D1_SIMD = 4;
  localparam int unsigned D2_OUT = 512, D2_PE = 1,  D2_SIMD = 8;
  // The last layer is computed with 64 rows (10 classes plus 54 rows whose
  // scores are ignored), which is the row count its operation count and
  // latency correspond to.
  localparam int unsigned D3_OUT = 64,  D3_PE = 4,  D3_SIMD = 1;

  // Signed value of one weight.
  function automatic int wval(input logic [1:0] w, input int unsigned wbits);
    if (wbits == 1) return w[0] ? 1 : -1;
    else            return int'($signed(w[1:0]));
  endfunction

  // Value of one input element: bipolar bit, unsigned 2-bit or 8-bit pixel.
  function automatic int aval(input logic [7:0] a, input int unsigned abits,
                              input bit bipolar);
    if (bipolar)         return a[0] ? 1 : -1;
    else if (abits == 8) return int'(a);
    else                 return int'(a[1:0]);
  endfunction

  // Parameter-load port shared by all engines. The host writes one weight
  // word (SIMD weights of one PE) or one threshold word (the thresholds of one
  // row of one PE) per cycle.
  localparam int unsigned CFG_DATA_W = 64;
  typedef struct packed {
    logic                  wr_w;    // write a weight word
    logic                  wr_t;    // write a threshold word
    logic [3:0]            layer;   // engine 0..7 (conv1..conv5, dense1..dense3)
    logic [7:0]            pe;      // processing element
    logic [23:0]           addr;    // weights: nf*SF + sf, thresholds: nf
    logic [CFG_DATA_W-1:0] data;    // lane s at bits [s*WBITS +: WBITS]
  } cfg_t;

endpackage
