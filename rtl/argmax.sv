// argmax: class decision at the end of the classifier.
//
// Takes the score vector of the last dense layer (N_IN signed ACC_W-bit row
// sums, of which the first NUM are class scores and the rest are ignored) and
// returns the index of the highest score, the lowest index winning a tie.
// The class scores are passed along with the decision. The comparison tree
// is plain combinational logic in front of an output register; the unit is
// this design's own, standing in for the label assignment that picks the
// prediction with the highest confidence.
//
// Interface and timing
//   in_valid/in_ready/in_data : score vectors, row r at [r*ACC_W +: ACC_W]
//   out_valid/out_ready       : result handshake
//   out_class                 : index of the best class
//   out_scores                : the NUM class scores, same layout as in_data
// A result appears the cycle after its vector is accepted.
module argmax
  import cnv_pkg::*;
#(
  parameter int unsigned N_IN = 16,
  parameter int unsigned NUM  = 10,
  parameter int unsigned IDXW = (NUM > 1) ? $clog2(NUM) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [N_IN*ACC_W-1:0]    in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [IDXW-1:0]          out_class,
  output logic [NUM*ACC_W-1:0]     out_scores
);

  logic [IDXW-1:0]         best_idx;
  always_comb begin
    logic signed [ACC_W-1:0] best;
    best     = $signed(in_data[ACC_W-1:0]);
    best_idx = '0;
    for (int i = 1; i < NUM; i++) begin
      if ($signed(in_data[i*ACC_W +: ACC_W]) > best) begin
        best     = $signed(in_data[i*ACC_W +: ACC_W]);
        best_idx = IDXW'(i);
      end
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_class  <= '0;
      out_scores <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid  <= 1'b1;
        out_class  <= best_idx;
        out_scores <= in_data[NUM*ACC_W-1:0];
      end
    end
  end

endmodule
