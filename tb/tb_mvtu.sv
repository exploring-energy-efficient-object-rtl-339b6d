// tb_mvtu: self-checking test of mvtu.
// Instance A: 2-bit weights, 2-bit unsigned inputs, 2-bit thresholded output,
// MW=12, MH=8, PE=2, SIMD=3 (NF=4, SF=4). Instance B: bipolar 1-bit weights
// and inputs, raw sums out (USE_THR=0), same shape. Random weights and
// thresholds are written through the cfg port, then random vectors are sent
// under random backpressure and every output vector is compared with a
// matrix-vector product and threshold count computed in the testbench.
// Finally vectors are sent back to back with the output always ready and the
// interval between results is checked to be NF*SF cycles.
module tb_mvtu;
  import cnv_pkg::*;
  localparam int MW = 12, MH = 8, PE = 2, SIMD = 3, NF = MH / PE, SF = MW / SIMD;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cfg_t cfg;
  logic in_valid, in_ready_a, in_ready_b, out_ready;
  logic [MW*2-1:0] in_a;
  logic [MW-1:0]   in_b;
  logic out_valid_a, out_valid_b;
  logic [MH*2-1:0]     out_a;
  logic [MH*ACC_W-1:0] out_b;

  mvtu #(.LAYER_ID(3), .MW(MW), .MH(MH), .PE(PE), .SIMD(SIMD), .WBITS(2),
         .IN_BITS(2), .IN_BIPOLAR(1'b0), .OBITS(2)) dut_a (
    .clk, .rst_n, .cfg, .in_valid, .in_ready(in_ready_a), .in_data(in_a),
    .out_valid(out_valid_a), .out_ready, .out_data(out_a));
  mvtu #(.LAYER_ID(5), .MW(MW), .MH(MH), .PE(PE), .SIMD(SIMD), .WBITS(1),
         .IN_BITS(1), .IN_BIPOLAR(1'b1), .OBITS(1), .USE_THR(1'b0)) dut_b (
    .clk, .rst_n, .cfg, .in_valid, .in_ready(in_ready_b), .in_data(in_b),
    .out_valid(out_valid_b), .out_ready, .out_data(out_b));

  int wa [MH][MW], wb [MH][MW], ta [MH][3];
  logic [MH*2-1:0]     exp_a[$];
  logic [MH*ACC_W-1:0] exp_b[$];
  int n_out = 0;
  longint t_now = 0;
  longint times[$];
  int intervals_ok = 0, intervals_bad = 0;
  bit measure = 0;

  always @(posedge clk) t_now++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid_a && out_ready) begin
      checks++;
      if (exp_a.size() == 0 || out_a != exp_a[0]) begin failures++; $display("A mismatch %h exp %h", out_a, exp_a.size() ? exp_a[0] : '0); end
      if (exp_a.size()) void'(exp_a.pop_front());
      if (measure) times.push_back(t_now);
      n_out++;
    end
    if (out_valid_b && out_ready) begin
      checks++;
      if (exp_b.size() == 0 || out_b != exp_b[0]) begin failures++; $display("B mismatch"); end
      if (exp_b.size()) void'(exp_b.pop_front());
    end
  end

  task automatic send_vec();
    logic [MW*2-1:0] a;
    logic [MW-1:0]   b;
    logic [MH*2-1:0] ea;
    logic [MH*ACC_W-1:0] eb;
    a = (MW*2)'({$urandom, $urandom});
    b = MW'($urandom);
    for (int r = 0; r < MH; r++) begin
      int s, sb, cnt;
      s = 0; sb = 0;
      for (int c = 0; c < MW; c++) begin
        s  += wa[r][c] * int'(a[c*2 +: 2]);
        sb += wb[r][c] * (b[c] ? 1 : -1);
      end
      cnt = 0; for (int k = 0; k < 3; k++) if (s >= ta[r][k]) cnt++;
      ea[r*2 +: 2] = 2'(cnt);
      eb[r*ACC_W +: ACC_W] = ACC_W'(sb);
    end
    exp_a.push_back(ea); exp_b.push_back(eb);
    in_valid = 1; in_a = a; in_b = b;
    #1;
    while (!(in_ready_a && in_ready_b)) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    cfg = '0; in_valid = 0; in_a = '0; in_b = '0; out_ready = 0;
    for (int r = 0; r < MH; r++) begin
      for (int c = 0; c < MW; c++) begin
        wa[r][c] = int'($urandom % 4) - 2;
        wb[r][c] = ($urandom % 2) ? 1 : -1;
      end
      // sums have mean -9 and spread about 7.5: spread thresholds over it
      ta[r][0] = int'($urandom % 5) - 16;
      ta[r][1] = ta[r][0] + 4 + int'($urandom % 4);
      ta[r][2] = ta[r][1] + 4 + int'($urandom % 4);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load parameters
    for (int p = 0; p < PE; p++)
      for (int nf = 0; nf < NF; nf++) begin
        for (int sf = 0; sf < SF; sf++) begin
          @(negedge clk);
          cfg = '0; cfg.wr_w = 1; cfg.pe = 8'(p); cfg.addr = 24'(nf*SF + sf);
          cfg.layer = 3;
          for (int s = 0; s < SIMD; s++) cfg.data[s*2 +: 2] = 2'(wa[nf*PE+p][sf*SIMD+s]);
          @(negedge clk);
          cfg.layer = 5; cfg.data = '0;
          for (int s = 0; s < SIMD; s++) cfg.data[s] = (wb[nf*PE+p][sf*SIMD+s] > 0);
        end
        @(negedge clk);
        cfg = '0; cfg.wr_t = 1; cfg.layer = 3; cfg.pe = 8'(p); cfg.addr = 24'(nf);
        for (int k = 0; k < 3; k++) cfg.data[k*ACC_W +: ACC_W] = ACC_W'(ta[nf*PE+p][k]);
      end
    @(negedge clk); cfg = '0;
    // random traffic with backpressure
    fork
      begin
        for (int v = 0; v < 40; v++) begin
          while ($urandom % 4 == 0) @(negedge clk);
          send_vec();
        end
      end
      begin
        for (int i = 0; i < 1500; i++) begin @(negedge clk); out_ready = ($urandom % 3) != 0; end
        out_ready = 1;
      end
    join
    while (exp_a.size() != 0) @(negedge clk);
    // back-to-back rate
    out_ready = 1;
    measure = 1;
    fork
      begin
        for (int v = 0; v < 10; v++) begin
          in_valid = 1;
          send_vec_nb();
        end
        in_valid = 0;
      end
    join
    repeat (NF*SF*3) @(negedge clk);
    checks++; if (exp_a.size() != 0 || exp_b.size() != 0) begin failures++; $display("outputs missing"); end
    for (int i = 1; i < times.size(); i++)
      if (times[i] - times[i-1] == NF*SF) intervals_ok++; else intervals_bad++;
    checks++; if (intervals_ok < 8 || intervals_bad != 0) begin
      failures++; $display("rate: %0d intervals of NF*SF, %0d others", intervals_ok, intervals_bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // back-to-back sender: keeps in_valid high across vectors
  task automatic send_vec_nb();
    logic [MW*2-1:0] a;
    logic [MW-1:0]   b;
    logic [MH*2-1:0] ea;
    logic [MH*ACC_W-1:0] eb;
    a = (MW*2)'({$urandom, $urandom});
    b = MW'($urandom);
    for (int r = 0; r < MH; r++) begin
      int s, sb, cnt;
      s = 0; sb = 0;
      for (int c = 0; c < MW; c++) begin
        s  += wa[r][c] * int'(a[c*2 +: 2]);
        sb += wb[r][c] * (b[c] ? 1 : -1);
      end
      cnt = 0; for (int k = 0; k < 3; k++) if (s >= ta[r][k]) cnt++;
      ea[r*2 +: 2] = 2'(cnt);
      eb[r*ACC_W +: ACC_W] = ACC_W'(sb);
    end
    exp_a.push_back(ea); exp_b.push_back(eb);
    in_a = a; in_b = b;
    #1;
    while (!(in_ready_a && in_ready_b)) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
  endtask
endmodule
