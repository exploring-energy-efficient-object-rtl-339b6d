// tb_mvtu_pe: self-checking test of mvtu_pe.
// Runs rows of SF steps with random 2-bit signed weights, 2-bit unsigned
// activations and three random ascending thresholds, with random idle cycles
// between steps, and checks the finished row sum and the thresholded 2-bit
// activation of every row against a reference computed in the testbench.
// A second instance checks the bipolar 1-bit weight/activation case.
module tb_mvtu_pe;
  import cnv_pkg::*;
  localparam int SIMD = 4, SF = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic step, first;
  logic [SIMD*2-1:0] act, wgt;
  logic [3*ACC_W-1:0] thr;
  logic signed [ACC_W-1:0] res_acc;
  logic [1:0] res_act;
  mvtu_pe #(.SIMD(SIMD), .WBITS(2), .IN_BITS(2), .IN_BIPOLAR(1'b0), .OBITS(2)) dut (
    .clk, .rst_n, .step, .first, .act, .wgt, .thr, .res_acc, .res_act);

  logic [SIMD-1:0] act1, wgt1;
  logic [ACC_W-1:0] thr1;
  logic signed [ACC_W-1:0] res_acc1;
  logic res_act1;
  mvtu_pe #(.SIMD(SIMD), .WBITS(1), .IN_BITS(1), .IN_BIPOLAR(1'b1), .OBITS(1)) dut1 (
    .clk, .rst_n, .step, .first, .act(act1), .wgt(wgt1), .thr(thr1),
    .res_acc(res_acc1), .res_act(res_act1));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step = 0; first = 0; act = '0; wgt = '0; thr = '0; act1 = '0; wgt1 = '0; thr1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 500; row++) begin
      int sum, sum1, t[3], e, e1;
      sum = 0; sum1 = 0;
      t[0] = int'($urandom % 20) - 10;
      t[1] = t[0] + int'($urandom % 8);
      t[2] = t[1] + int'($urandom % 8);
      for (int k = 0; k < 3; k++) thr[k*ACC_W +: ACC_W] = ACC_W'(t[k]);
      thr1 = ACC_W'(int'($urandom % 9) - 4);
      for (int s = 0; s < SF; s++) begin
        @(negedge clk);
        step = 0;
        while ($urandom % 3 == 0) @(negedge clk);
        act = SIMD*2'($urandom); wgt = SIMD*2'($urandom);
        act1 = SIMD'($urandom); wgt1 = SIMD'($urandom);
        for (int l = 0; l < SIMD; l++) begin
          sum  += int'($signed(wgt[l*2 +: 2])) * int'(act[l*2 +: 2]);
          sum1 += (wgt1[l] ? 1 : -1) * (act1[l] ? 1 : -1);
        end
        step = 1; first = (s == 0);
        if (s == SF - 1) begin
          #1;
          e = 0; for (int k = 0; k < 3; k++) if (sum >= t[k]) e++;
          e1 = (sum1 >= int'($signed(thr1))) ? 1 : 0;
          checks += 4;
          if (int'(res_acc) != sum) begin failures++; $display("acc %0d exp %0d", res_acc, sum); end
          if (int'(res_act) != e)   begin failures++; $display("act %0d exp %0d", res_act, e); end
          if (int'(res_acc1) != sum1) begin failures++; $display("acc1 %0d exp %0d", res_acc1, sum1); end
          if (int'(res_act1) != e1) begin failures++; $display("act1 %0d exp %0d", res_act1, e1); end
        end
      end
    end
    @(negedge clk); step = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
