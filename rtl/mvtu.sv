// mvtu: matrix-vector-threshold unit, the compute engine of one layer.
//
// It multiplies each input vector of MW elements with an MH x MW weight
// matrix held on chip and thresholds every row sum into a quantised
// activation (or, with USE_THR = 0, passes the raw sums on, as the last
// layer does). The structure is the one of the design: an input vector
// buffer, PE processing elements of SIMD lanes each that all receive the same
// input slice and flow control, and an output vector buffer. The matrix is
// folded: PE rows are computed at a time (neuron fold NF = MH/PE) and SIMD
// columns per step (synapse fold SF = MW/SIMD), so one vector takes exactly
// NF*SF cycles, and a new vector is accepted in the cycle the previous one
// finishes, so back-to-back vectors run without a bubble.
//
// Memory layout (this design's choice): PE p owns rows p, PE+p, 2PE+p, ...
// Its weight memory holds NF*SF words of SIMD weights, word nf*SF+sf holding
// row nf*PE+p, columns sf*SIMD .. sf*SIMD+SIMD-1. Its threshold memory holds
// NF words, word nf holding the 2^OBITS-1 ascending thresholds of row
// nf*PE+p. Both are written through the shared cfg port while the engine is
// idle; they are read combinationally (distributed-memory style).
//
// Interface and timing
//   in_valid/in_ready/in_data   : input vectors, element i at [i*IN_BITS +: IN_BITS]
//   out_valid/out_ready/out_data: output vectors, row r at [r*OUT_EW +: OUT_EW]
//   cfg                         : weight/threshold writes addressed to LAYER_ID
// The output vector appears the cycle after its last step and is held until
// taken; the engine stalls on its last step while the previous result is
// still waiting.
module mvtu
  import cnv_pkg::*;
#(
  parameter int unsigned LAYER_ID   = 0,
  parameter int unsigned MW         = 8,
  parameter int unsigned MH         = 4,
  parameter int unsigned PE         = 2,
  parameter int unsigned SIMD       = 2,
  parameter int unsigned WBITS      = 1,
  parameter int unsigned IN_BITS    = 1,
  parameter bit          IN_BIPOLAR = 1'b1,
  parameter int unsigned OBITS      = 1,
  parameter bit          USE_THR    = 1'b1,
  parameter int unsigned OUT_EW     = USE_THR ? OBITS : ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_t                     cfg,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [MW*IN_BITS-1:0]    in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [MH*OUT_EW-1:0]     out_data
);

  localparam int unsigned NF = MH / PE;
  localparam int unsigned SF = MW / SIMD;
  localparam int unsigned NT = (1 << OBITS) - 1;
  localparam int unsigned NF_W = (NF > 1) ? $clog2(NF) : 1;
  localparam int unsigned SF_W = (SF > 1) ? $clog2(SF) : 1;
  localparam int unsigned PE_W = (PE > 1) ? $clog2(PE) : 1;
  localparam int unsigned WA_W = (NF*SF > 1) ? $clog2(NF*SF) : 1;

  // Parameter memories
  logic [SIMD*WBITS-1:0] wmem [PE][NF*SF];
  logic [NT*ACC_W-1:0]   tmem [PE][NF];

  logic                  cfg_hit;
  assign cfg_hit = (cfg.layer == 4'(LAYER_ID));

  always_ff @(posedge clk) begin
    if (cfg_hit && cfg.wr_w) begin
      assert (32'(cfg.pe) < PE && 32'(cfg.addr) < NF*SF)
        else $error("mvtu %0d: weight write out of range", LAYER_ID);
      wmem[cfg.pe[PE_W-1:0]][cfg.addr[WA_W-1:0]] <= cfg.data[SIMD*WBITS-1:0];
    end
    if (USE_THR && cfg_hit && cfg.wr_t) begin
      assert (32'(cfg.pe) < PE && 32'(cfg.addr) < NF)
        else $error("mvtu %0d: threshold write out of range", LAYER_ID);
      tmem[cfg.pe[PE_W-1:0]][cfg.addr[NF_W-1:0]] <= cfg.data[NT*ACC_W-1:0];
    end
  end

  // Control
  logic                  busy;
  logic [NF_W-1:0]       nf;
  logic [SF_W-1:0]       sf;
  logic [MW*IN_BITS-1:0] ibuf;
  logic [MH*OUT_EW-1:0]  work, work_next;
  logic                  last_sf, last_step, adv;

  assign last_sf   = (32'(sf) == SF - 1);
  assign last_step = last_sf && (32'(nf) == NF - 1);
  assign adv       = busy && !(last_step && out_valid && !out_ready);
  assign in_ready  = !busy || (adv && last_step);

  // Processing elements
  logic signed [ACC_W-1:0] pe_acc [PE];
  logic [OBITS-1:0]        pe_act [PE];
  logic [SIMD*IN_BITS-1:0] slice;
  logic [WA_W-1:0]         waddr;
  assign waddr = WA_W'(32'(nf)*SF + 32'(sf));
  assign slice = ibuf[32'(sf)*SIMD*IN_BITS +: SIMD*IN_BITS];

  for (genvar p = 0; p < PE; p++) begin : g_pe
    logic [NT*ACC_W-1:0] thr;
    assign thr = USE_THR ? tmem[p][nf] : '0;
    mvtu_pe #(
      .SIMD(SIMD), .WBITS(WBITS), .IN_BITS(IN_BITS),
      .IN_BIPOLAR(IN_BIPOLAR), .OBITS(OBITS)
    ) u_pe (
      .clk, .rst_n,
      .step   (adv),
      .first  (sf == '0),
      .act    (slice),
      .wgt    (wmem[p][waddr]),
      .thr    (thr),
      .res_acc(pe_acc[p]),
      .res_act(pe_act[p])
    );
  end

  always_comb begin
    work_next = work;
    for (int p = 0; p < PE; p++) begin
      if (USE_THR) work_next[(32'(nf)*PE + p)*OUT_EW +: OUT_EW] = OUT_EW'(pe_act[p]);
      else         work_next[(32'(nf)*PE + p)*OUT_EW +: OUT_EW] = OUT_EW'(pe_acc[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      nf        <= '0;
      sf        <= '0;
      ibuf      <= '0;
      work      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        ibuf <= in_data;
        busy <= 1'b1;
      end else if (adv && last_step) begin
        busy <= 1'b0;
      end
      if (adv) begin
        if (last_sf) begin
          work <= work_next;
          sf   <= '0;
          if (last_step) begin
            nf        <= '0;
            out_data  <= work_next;
            out_valid <= 1'b1;
          end else begin
            nf <= nf + 1'b1;
          end
        end else begin
          sf <= sf + 1'b1;
        end
      end
    end
  end

endmodule
