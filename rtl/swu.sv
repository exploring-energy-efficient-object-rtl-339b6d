// swu: sliding window unit (convolution input generator).
//
// A convolution engine consumes, for every output pixel, the vector of the
// K x K x C input values under the filter window (Eq. of the convolution
// sum). This unit receives the input feature map as a row-major stream of
// pixels, each pixel carrying all C channels, and emits the window vectors of
// a K x K filter with stride 1 and no padding, one per output pixel in
// row-major order: (IFM_DIM-K+1)^2 windows per image. With IFM_DIM = K it
// emits one vector holding the whole map, which is how the first dense layer
// receives the flattened 3x3x256 map.
//
// Inside, pixels go to a ring of K+1 line buffers. A pixel of row y may be
// written once row y-(K+1) is no longer needed by the current window row; a
// window is emitted once its bottom-right pixel has arrived. After the last
// window of an image the unit starts the next image. Buffer organisation and
// flow control are this design's choice.
//
// Interface and timing
//   in_valid/in_ready/in_data   : pixels, channel c at [c*EBITS +: EBITS]
//   out_valid/out_ready/out_data: windows, element (ky*K+kx)*C + c at
//                                 [((ky*K+kx)*C+c)*EBITS +: EBITS]
// The output is a register: a window appears the cycle after the pixel that
// completes it is written, at most one window per cycle.
module swu #(
  parameter int unsigned IFM_DIM = 5,
  parameter int unsigned C       = 2,
  parameter int unsigned EBITS   = 1,
  parameter int unsigned K       = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [C*EBITS-1:0]       in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [K*K*C*EBITS-1:0]   out_data
);

  localparam int unsigned OFM_DIM = IFM_DIM - K + 1;
  localparam int unsigned R       = K + 1;
  localparam int unsigned PW      = C * EBITS;

  logic [PW-1:0] lbuf [R][IFM_DIM];

  int unsigned wy, wx, oy, ox;
  logic        wdone, rdone;

  logic win_avail, load;
  assign in_ready  = !wdone && (wy < oy + R);
  assign win_avail = !rdone &&
                     (wdone || (wy > oy + K - 1) ||
                      (wy == oy + K - 1 && wx > ox + K - 1));
  assign load      = win_avail && (!out_valid || out_ready);

  logic [K*K*PW-1:0] window;
  always_comb begin
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        window[(ky*K + kx)*PW +: PW] = lbuf[(oy + ky) % R][ox + kx];
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) lbuf[wy % R][wx] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wy <= 0; wx <= 0; oy <= 0; ox <= 0;
      wdone     <= 1'b0;
      rdone     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (wdone && rdone) begin
        // whole image written and all its windows issued: next image
        wy <= 0; wx <= 0; oy <= 0; ox <= 0;
        wdone <= 1'b0;
        rdone <= 1'b0;
      end else begin
        if (in_valid && in_ready) begin
          if (wx == IFM_DIM - 1) begin
            wx <= 0;
            wy <= wy + 1;
            if (wy == IFM_DIM - 1) wdone <= 1'b1;
          end else begin
            wx <= wx + 1;
          end
        end
        if (load) begin
          out_data  <= window;
          out_valid <= 1'b1;
          if (ox == OFM_DIM - 1) begin
            ox <= 0;
            oy <= oy + 1;
            if (oy == OFM_DIM - 1) rdone <= 1'b1;
          end else begin
            ox <= ox + 1;
          end
        end
      end
    end
  end

endmodule
