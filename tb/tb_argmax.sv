// tb_argmax: self-checking test of argmax.
// Sends random score vectors (with deliberate ties and decoy values in the
// ignored rows) under random backpressure and checks the chosen class (the
// lowest index of the maximum among the first NUM rows) and the passed-on
// scores against a reference computed in the testbench.
module tb_argmax;
  import cnv_pkg::*;
  localparam int N_IN = 16, NUM = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [N_IN*ACC_W-1:0] in_data;
  logic [3:0] out_class;
  logic [NUM*ACC_W-1:0] out_scores;
  int checks = 0, failures = 0;

  argmax #(.N_IN(N_IN), .NUM(NUM), .IDXW(4)) dut (.*);

  int exp_cls[$];
  logic [NUM*ACC_W-1:0] exp_sc[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      int best, bi;
      best = -100000; bi = 0;
      for (int i = 0; i < NUM; i++)
        if (int'($signed(in_data[i*ACC_W +: ACC_W])) > best) begin
          best = int'($signed(in_data[i*ACC_W +: ACC_W])); bi = i;
        end
      exp_cls.push_back(bi);
      exp_sc.push_back(in_data[NUM*ACC_W-1:0]);
    end
    if (out_valid && out_ready) begin
      checks++;
      if (exp_cls.size() == 0 || int'(out_class) != exp_cls[0] || out_scores != exp_sc[0]) begin
        failures++;
        $display("mismatch: class %0d expected %0d", out_class, exp_cls.size() ? exp_cls[0] : -1);
      end
      if (exp_cls.size()) begin void'(exp_cls.pop_front()); void'(exp_sc.pop_front()); end
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      out_ready = ($urandom % 4) != 0;
      for (int i = 0; i < N_IN; i++) begin
        int v;
        v = (n % 3 == 0) ? int'($urandom % 7) - 3 : int'($urandom % 4000) - 2000;
        in_data[i*ACC_W +: ACC_W] = ACC_W'(v);
      end
      if (n % 5 == 0) in_data[12*ACC_W +: ACC_W] = 16'sh7fff;  // ignored row
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    checks++; if (exp_cls.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
