// cnv_top: streaming quantised CNN classifier for 32x32 RGB images (CIFAR-10).
//
// Every layer of the network has its own engine, sized for that layer, and
// the engines are chained by streams, so a new image can enter as soon as the
// first engine is done with the previous one and several images are in
// flight at once. The chain is:
//
//   image -> conv1 (3x3, 32)  -> conv2 (3x3, 64)  -> max-pool 2x2
//         -> conv3 (3x3, 128) -> conv4 (3x3, 128) -> max-pool 2x2
//         -> conv5 (3x3, 256) -> dense1 (512) -> dense2 (512) -> dense3 (10)
//         -> class decision
//
// Each convolution is a sliding window unit (swu) feeding a
// matrix-vector-threshold unit (mvtu); dense1 receives the whole 3x3x256 map
// through a swu whose window covers the full map. The layer shapes and the
// weight/activation precisions (WBITS, ABITS of 1 or 2 bits, giving the four
// variants w1a1, w1a2, w2a1, w2a2) are the network's. The folding of the
// engines is derived from their per-layer latencies (see cnv_pkg). The image
// input, the parameter-load port, the class-decision unit and all encodings
// are this design's choices; in a full system the image and result streams
// come from and go to main memory through a DMA engine and the parameter port
// is driven by the host processor, neither of which is part of this block.
//
// Interface and timing
//   cfg                          : one weight or threshold word per cycle,
//                                  written before images are sent (cnv_pkg)
//   img_valid/img_ready/img_data : pixels in row-major order, 32x32 per image,
//                                  R at [7:0], G at [15:8], B at [23:16]
//   res_valid/res_ready          : one result per image, in image order
//   res_class                    : index 0..9 of the highest score
//   res_scores                   : the ten signed 16-bit class scores
// The slowest engine (dense1, 294912 cycles per image with 1-bit weights)
// sets the image interval; the first result appears about 460k cycles
// after the first pixel.
module cnv_top
  import cnv_pkg::*;
#(
  parameter int unsigned WBITS = 1,
  parameter int unsigned ABITS = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  cfg_t                        cfg,
  input  logic                        img_valid,
  output logic                        img_ready,
  input  logic [IMG_CH*PIX_BITS-1:0]  img_data,
  output logic                        res_valid,
  input  logic                        res_ready,
  output logic [3:0]                  res_class,
  output logic [NUM_CLASSES*ACC_W-1:0] res_scores
);

  localparam bit BIP = (ABITS == 1);
  localparam int unsigned K = KDIM;

  // ---------------------------------------------------------------- input
  logic                       i_v, i_r;
  logic [IMG_CH*PIX_BITS-1:0] i_d;
  stream_fifo #(.W(IMG_CH*PIX_BITS), .DEPTH(2)) u_fifo_img (
    .clk, .rst_n, .in_valid(img_valid), .in_ready(img_ready), .in_data(img_data),
    .out_valid(i_v), .out_ready(i_r), .out_data(i_d));

  // ---------------------------------------------------------------- conv1
  localparam int unsigned D0 = IMG_DIM;           // 32
  logic w0_v, w0_r;  logic [K*K*IMG_CH*PIX_BITS-1:0] w0_d;
  swu #(.IFM_DIM(D0), .C(IMG_CH), .EBITS(PIX_BITS), .K(K)) u_swu1 (
    .clk, .rst_n, .in_valid(i_v), .in_ready(i_r), .in_data(i_d),
    .out_valid(w0_v), .out_ready(w0_r), .out_data(w0_d));

  logic m0_v, m0_r;  logic [C1_OUT*ABITS-1:0] m0_d;
  mvtu #(.LAYER_ID(0), .MW(K*K*IMG_CH), .MH(C1_OUT), .PE(C1_PE), .SIMD(C1_SIMD),
         .WBITS(WBITS), .IN_BITS(PIX_BITS), .IN_BIPOLAR(1'b0), .OBITS(ABITS)) u_conv1 (
    .clk, .rst_n, .cfg, .in_valid(w0_v), .in_ready(w0_r), .in_data(w0_d),
    .out_valid(m0_v), .out_ready(m0_r), .out_data(m0_d));

  logic f0_v, f0_r;  logic [C1_OUT*ABITS-1:0] f0_d;
  stream_fifo #(.W(C1_OUT*ABITS)) u_fifo1 (
    .clk, .rst_n, .in_valid(m0_v), .in_ready(m0_r), .in_data(m0_d),
    .out_valid(f0_v), .out_ready(f0_r), .out_data(f0_d));

  // ---------------------------------------------------------------- conv2
  localparam int unsigned D1 = D0 - K + 1;        // 30
  logic w1_v, w1_r;  logic [K*K*C1_OUT*ABITS-1:0] w1_d;
  swu #(.IFM_DIM(D1), .C(C1_OUT), .EBITS(ABITS), .K(K)) u_swu2 (
    .clk, .rst_n, .in_valid(f0_v), .in_ready(f0_r), .in_data(f0_d),
    .out_valid(w1_v), .out_ready(w1_r), .out_data(w1_d));

  logic m1_v, m1_r;  logic [C2_OUT*ABITS-1:0] m1_d;
  mvtu #(.LAYER_ID(1), .MW(K*K*C1_OUT), .MH(C2_OUT), .PE(C2_PE), .SIMD(C2_SIMD),
         .WBITS(WBITS), .IN_BITS(ABITS), .IN_BIPOLAR(BIP), .OBITS(ABITS)) u_conv2 (
    .clk, .rst_n, .cfg, .in_valid(w1_v), .in_ready(w1_r), .in_data(w1_d),
    .out_valid(m1_v), .out_ready(m1_r), .out_data(m1_d));

  logic f1_v, f1_r;  logic [C2_OUT*ABITS-1:0] f1_d;
  stream_fifo #(.W(C2_OUT*ABITS)) u_fifo2 (
    .clk, .rst_n, .in_valid(m1_v), .in_ready(m1_r), .in_data(m1_d),
    .out_valid(f1_v), .out_ready(f1_r), .out_data(f1_d));

  // ---------------------------------------------------------------- pool1
  localparam int unsigned D2 = D1 - K + 1;        // 28
  logic p0_v, p0_r;  logic [C2_OUT*ABITS-1:0] p0_d;
  maxpool #(.DIM(D2), .C(C2_OUT), .EBITS(ABITS)) u_pool1 (
    .clk, .rst_n, .in_valid(f1_v), .in_ready(f1_r), .in_data(f1_d),
    .out_valid(p0_v), .out_ready(p0_r), .out_data(p0_d));

  // ---------------------------------------------------------------- conv3
  localparam int unsigned D3 = D2 / 2;            // 14
  logic w2_v, w2_r;  logic [K*K*C2_OUT*ABITS-1:0] w2_d;
  swu #(.IFM_DIM(D3), .C(C2_OUT), .EBITS(ABITS), .K(K)) u_swu3 (
    .clk, .rst_n, .in_valid(p0_v), .in_ready(p0_r), .in_data(p0_d),
    .out_valid(w2_v), .out_ready(w2_r), .out_data(w2_d));

  logic m2_v, m2_r;  logic [C3_OUT*ABITS-1:0] m2_d;
  mvtu #(.LAYER_ID(2), .MW(K*K*C2_OUT), .MH(C3_OUT), .PE(C3_PE), .SIMD(C3_SIMD),
         .WBITS(WBITS), .IN_BITS(ABITS), .IN_BIPOLAR(BIP), .OBITS(ABITS)) u_conv3 (
    .clk, .rst_n, .cfg, .in_valid(w2_v), .in_ready(w2_r), .in_data(w2_d),
    .out_valid(m2_v), .out_ready(m2_r), .out_data(m2_d));

  logic f2_v, f2_r;  logic [C3_OUT*ABITS-1:0] f2_d;
  stream_fifo #(.W(C3_OUT*ABITS)) u_fifo3 (
    .clk, .rst_n, .in_valid(m2_v), .in_ready(m2_r), .in_data(m2_d),
    .out_valid(f2_v), .out_ready(f2_r), .out_data(f2_d));

  // ---------------------------------------------------------------- conv4
  localparam int unsigned D4 = D3 - K + 1;        // 12
  logic w3_v, w3_r;  logic [K*K*C3_OUT*ABITS-1:0] w3_d;
  swu #(.IFM_DIM(D4), .C(C3_OUT), .EBITS(ABITS), .K(K)) u_swu4 (
    .clk, .rst_n, .in_valid(f2_v), .in_ready(f2_r), .in_data(f2_d),
    .out_valid(w3_v), .out_ready(w3_r), .out_data(w3_d));

  logic m3_v, m3_r;  logic [C4_OUT*ABITS-1:0] m3_d;
  mvtu #(.LAYER_ID(3), .MW(K*K*C3_OUT), .MH(C4_OUT), .PE(C4_PE), .SIMD(C4_SIMD),
         .WBITS(WBITS), .IN_BITS(ABITS), .IN_BIPOLAR(BIP), .OBITS(ABITS)) u_conv4 (
    .clk, .rst_n, .cfg, .in_valid(w3_v), .in_ready(w3_r), .in_data(w3_d),
    .out_valid(m3_v), .out_ready(m3_r), .out_data(m3_d));

  logic f3_v, f3_r;  logic [C4_OUT*ABITS-1:0] f3_d;
  stream_fifo #(.W(C4_OUT*ABITS)) u_fifo4 (
    .clk, .rst_n, .in_valid(m3_v), .in_ready(m3_r), .in_data(m3_d),
    .out_valid(f3_v), .out_ready(f3_r), .out_data(f3_d));

  // ---------------------------------------------------------------- pool2
  localparam int unsigned D5 = D4 - K + 1;        // 10
  logic p1_v, p1_r;  logic [C4_OUT*ABITS-1:0] p1_d;
  maxpool #(.DIM(D5), .C(C4_OUT), .EBITS(ABITS)) u_pool2 (
    .clk, .rst_n, .in_valid(f3_v), .in_ready(f3_r), .in_data(f3_d),
    .out_valid(p1_v), .out_ready(p1_r), .out_data(p1_d));

  // ---------------------------------------------------------------- conv5
  localparam int unsigned D6 = D5 / 2;            // 5
  logic w4_v, w4_r;  logic [K*K*C4_OUT*ABITS-1:0] w4_d;
  swu #(.IFM_DIM(D6), .C(C4_OUT), .EBITS(ABITS), .K(K)) u_swu5 (
    .clk, .rst_n, .in_valid(p1_v), .in_ready(p1_r), .in_data(p1_d),
    .out_valid(w4_v), .out_ready(w4_r), .out_data(w4_d));

  logic m4_v, m4_r;  logic [C5_OUT*ABITS-1:0] m4_d;
  mvtu #(.LAYER_ID(4), .MW(K*K*C4_OUT), .MH(C5_OUT), .PE(C5_PE), .SIMD(C5_SIMD),
         .WBITS(WBITS), .IN_BITS(ABITS), .IN_BIPOLAR(BIP), .OBITS(ABITS)) u_conv5 (
    .clk, .rst_n, .cfg, .in_valid(w4_v), .in_ready(w4_r), .in_data(w4_d),
    .out_valid(m4_v), .out_ready(m4_r), .out_data(m4_d));

  logic f4_v, f4_r;  logic [C5_OUT*ABITS-1:0] f4_d;
  stream_fifo #(.W(C5_OUT*ABITS)) u_fifo5 (
    .clk, .rst_n, .in_valid(m4_v), .in_ready(m4_r), .in_data(m4_d),
    .out_valid(f4_v), .out_ready(f4_r), .out_data(f4_d));

  // --------------------------------------------------- flatten 3x3x256 map
  localparam int unsigned D7 = D6 - K + 1;        // 3
  localparam int unsigned D1_IN = D7 * D7 * C5_OUT; // 2304
  logic w5_v, w5_r;  logic [D1_IN*ABITS-1:0] w5_d;
  swu #(.IFM_DIM(D7), .C(C5_OUT), .EBITS(ABITS), .K(D7)) u_flatten (
    .clk, .rst_n, .in_valid(f4_v), .in_ready(f4_r), .in_data(f4_d),
    .out_valid(w5_v), .out_ready(w5_r), .out_data(w5_d));

  // --------------------------------------------------------------- dense1
  logic m5_v, m5_r;  logic [D1_OUT*ABITS-1:0] m5_d;
  mvtu #(.LAYER_ID(5), .MW(D1_IN), .MH(D1_OUT), .PE(D1_PE), .SIMD(D1_SIMD),
         .WBITS(WBITS), .IN_BITS(ABITS), .IN_BIPOLAR(BIP), .OBITS(ABITS)) u_dense1 (
    .clk, .rst_n, .cfg, .in_valid(w5_v), .in_ready(w5_r), .in_data(w5_d),
    .out_valid(m5_v), .out_ready(m5_r), .out_data(m5_d));

  logic f5_v, f5_r;  logic [D1_OUT*ABITS-1:0] f5_d;
  stream_fifo #(.W(D1_OUT*ABITS)) u_fifo6 (
    .clk, .rst_n, .in_valid(m5_v), .in_ready(m5_r), .in_data(m5_d),
    .out_valid(f5_v), .out_ready(f5_r), .out_data(f5_d));

  // --------------------------------------------------------------- dense2
  logic m6_v, m6_r;  logic [D2_OUT*ABITS-1:0] m6_d;
  mvtu #(.LAYER_ID(6), .MW(D1_OUT), .MH(D2_OUT), .PE(D2_PE), .SIMD(D2_SIMD),
         .WBITS(WBITS), .IN_BITS(ABITS), .IN_BIPOLAR(BIP), .OBITS(ABITS)) u_dense2 (
    .clk, .rst_n, .cfg, .in_valid(f5_v), .in_ready(f5_r), .in_data(f5_d),
    .out_valid(m6_v), .out_ready(m6_r), .out_data(m6_d));

  logic f6_v, f6_r;  logic [D2_OUT*ABITS-1:0] f6_d;
  stream_fifo #(.W(D2_OUT*ABITS)) u_fifo7 (
    .clk, .rst_n, .in_valid(m6_v), .in_ready(m6_r), .in_data(m6_d),
    .out_valid(f6_v), .out_ready(f6_r), .out_data(f6_d));

  // --------------------------------------------------------------- dense3
  logic m7_v, m7_r;  logic [D3_OUT*ACC_W-1:0] m7_d;
  mvtu #(.LAYER_ID(7), .MW(D2_OUT), .MH(D3_OUT), .PE(D3_PE), .SIMD(D3_SIMD),
         .WBITS(WBITS), .IN_BITS(ABITS), .IN_BIPOLAR(BIP), .OBITS(ABITS),
         .USE_THR(1'b0)) u_dense3 (
    .clk, .rst_n, .cfg, .in_valid(f6_v), .in_ready(f6_r), .in_data(f6_d),
    .out_valid(m7_v), .out_ready(m7_r), .out_data(m7_d));

  // ------------------------------------------------------- class decision
  argmax #(.N_IN(D3_OUT), .NUM(NUM_CLASSES), .IDXW(4)) u_argmax (
    .clk, .rst_n, .in_valid(m7_v), .in_ready(m7_r), .in_data(m7_d),
    .out_valid(res_valid), .out_ready(res_ready),
    .out_class(res_class), .out_scores(res_scores));

endmodule
