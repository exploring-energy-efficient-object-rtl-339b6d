// maxpool: streaming 2x2 max-pool with stride 2.
//
// Takes a DIM x DIM feature map as a row-major pixel stream (all C channels
// of a pixel in one word) and emits the (DIM/2) x (DIM/2) map whose pixels are
// the channel-wise maximum of each non-overlapping 2x2 block. Values compare
// as unsigned EBITS numbers, which orders both encodings used in this design
// correctly (bipolar 1-bit: 1 = +1 above 0 = -1; 2-bit unsigned).
//
// A register keeps the even-column pixel of a pair; the pair maximum of an
// even row is kept in a half-row buffer and combined with the pair maximum of
// the odd row below it. Buffering is this design's choice.
//
// Interface and timing
//   in_valid/in_ready/in_data   : pixels, channel c at [c*EBITS +: EBITS]
//   out_valid/out_ready/out_data: pooled pixels, same layout
// A pooled pixel appears the cycle after the bottom-right pixel of its block
// is accepted; the input stalls only while an output is waiting.
module maxpool #(
  parameter int unsigned DIM   = 4,
  parameter int unsigned C     = 2,
  parameter int unsigned EBITS = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [C*EBITS-1:0]   in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [C*EBITS-1:0]   out_data
);

  localparam int unsigned PW = C * EBITS;

  function automatic logic [PW-1:0] vmax(input logic [PW-1:0] a, input logic [PW-1:0] b);
    logic [PW-1:0] r;
    for (int c = 0; c < C; c++)
      r[c*EBITS +: EBITS] = (a[c*EBITS +: EBITS] > b[c*EBITS +: EBITS]) ?
                            a[c*EBITS +: EBITS] : b[c*EBITS +: EBITS];
    return r;
  endfunction

  logic [PW-1:0] rbuf [DIM/2];
  logic [PW-1:0] hold;
  int unsigned   x, y;
  logic          acc_in;
  logic [PW-1:0] pair_max;

  assign in_ready = !out_valid || out_ready;
  assign acc_in   = in_valid && in_ready;
  assign pair_max = vmax(hold, in_data);

  always_ff @(posedge clk) begin
    if (acc_in && x[0] && !y[0]) rbuf[x/2] <= pair_max;
    if (acc_in && !x[0])         hold      <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= 0; y <= 0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (acc_in) begin
        if (x[0] && y[0]) begin
          out_data  <= vmax(rbuf[x/2], pair_max);
          out_valid <= 1'b1;
        end
        if (x == DIM - 1) begin
          x <= 0;
          y <= (y == DIM - 1) ? 0 : y + 1;
        end else begin
          x <= x + 1;
        end
      end
    end
  end

endmodule
