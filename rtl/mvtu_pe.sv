// mvtu_pe: one processing element of a matrix-vector-threshold unit.
//
// Each step the PE multiplies SIMD weights with SIMD input elements, sums the
// products and adds them to its running accumulator; a matrix row of MW
// elements therefore takes MW/SIMD steps (the synapse fold). On the last step
// of a row the PE also presents the finished sum and its quantised
// activation: the number of the row's 2^OBITS-1 thresholds the sum reaches.
// The engine structure (PEs with SIMD lanes fed with the same data and flow
// control) follows the design; the arithmetic encodings and the threshold
// rule are listed in cnv_pkg and are this design's choice.
//
// Interface and timing
//   step      : perform one synapse-fold step this cycle
//   first     : this step starts a new row (accumulator restarts from 0)
//   act, wgt  : SIMD input elements of IN_BITS and SIMD weights of WBITS
//   thr       : thresholds of the current row, ascending, ACC_W bits each
//   res_acc   : accumulator including this step's products (combinational)
//   res_act   : thresholded res_acc (combinational); valid on the last step
// The accumulator register updates at the clock edge that ends a step.
module mvtu_pe
  import cnv_pkg::*;
#(
  parameter int unsigned SIMD       = 4,
  parameter int unsigned WBITS      = 1,
  parameter int unsigned IN_BITS    = 1,
  parameter bit          IN_BIPOLAR = 1'b1,
  parameter int unsigned OBITS      = 1,
  parameter int unsigned NT         = (1 << OBITS) - 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          step,
  input  logic                          first,
  input  logic [SIMD*IN_BITS-1:0]       act,
  input  logic [SIMD*WBITS-1:0]         wgt,
  input  logic [NT*ACC_W-1:0]           thr,
  output logic signed [ACC_W-1:0]       res_acc,
  output logic [OBITS-1:0]              res_act
);

  logic signed [ACC_W-1:0] acc_q;
  logic signed [ACC_W-1:0] dot;

  // Sum of the SIMD products of this step.
  function automatic logic signed [ACC_W-1:0] dot_product(
      input logic [SIMD*IN_BITS-1:0] a_v, input logic [SIMD*WBITS-1:0] w_v);
    int sum;
    sum = 0;
    for (int s = 0; s < SIMD; s++)
      sum += wval(2'(w_v[s*WBITS +: WBITS]), WBITS) *
             aval(8'(a_v[s*IN_BITS +: IN_BITS]), IN_BITS, IN_BIPOLAR);
    return ACC_W'(sum);
  endfunction

  // Number of thresholds the sum reaches.
  function automatic logic [OBITS-1:0] quantise(
      input logic signed [ACC_W-1:0] v, input logic [NT*ACC_W-1:0] t_v);
    int unsigned cnt;
    cnt = 0;
    for (int t = 0; t < NT; t++)
      if (v >= $signed(t_v[t*ACC_W +: ACC_W])) cnt++;
    return OBITS'(cnt);
  endfunction

  assign dot     = dot_product(act, wgt);
  assign res_acc = (first ? ACC_W'(0) : acc_q) + dot;
  assign res_act = quantise(res_acc, thr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc_q <= '0;
    else if (step) acc_q <= res_acc;
  end

endmodule
