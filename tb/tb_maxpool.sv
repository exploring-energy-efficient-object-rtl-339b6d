// tb_maxpool: self-checking test of maxpool.
// Streams three random 6x6 maps of three 2-bit channels with random valid
// and random backpressure and checks each pooled pixel against the
// channel-wise maximum of its 2x2 block, computed in the testbench, and that
// each map yields exactly 3x3 pixels.
module tb_maxpool;
  localparam int DIM = 6, C = 3, EB = 2, NIMG = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [C*EB-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  maxpool #(.DIM(DIM), .C(C), .EBITS(EB)) dut (.*);

  logic [C*EB-1:0] img [NIMG][DIM][DIM];
  logic [C*EB-1:0] exp_q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || out_data != exp_q[0]) begin
      failures++; $display("mismatch %h exp %h", out_data, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    for (int n = 0; n < NIMG; n++)
      for (int y = 0; y < DIM; y++)
        for (int x = 0; x < DIM; x++) img[n][y][x] = (C*EB)'($urandom);
    for (int n = 0; n < NIMG; n++)
      for (int y = 0; y < DIM; y += 2)
        for (int x = 0; x < DIM; x += 2) begin
          logic [C*EB-1:0] m;
          for (int c = 0; c < C; c++) begin
            int v;
            v = 0;
            for (int dy = 0; dy < 2; dy++)
              for (int dx = 0; dx < 2; dx++)
                if (int'(img[n][y+dy][x+dx][c*EB +: EB]) > v) v = int'(img[n][y+dy][x+dx][c*EB +: EB]);
            m[c*EB +: EB] = EB'(v);
          end
          exp_q.push_back(m);
        end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int n = 0; n < NIMG; n++)
          for (int y = 0; y < DIM; y++)
            for (int x = 0; x < DIM; x++) begin
              @(negedge clk);
              in_valid = 0;
              while ($urandom % 3 == 0) @(negedge clk);
              in_valid = 1; in_data = img[n][y][x];
              #1;
              while (!in_ready) begin @(negedge clk); #1; end
              @(posedge clk);
            end
        @(negedge clk); in_valid = 0;
      end
      begin
        for (int i = 0; i < 400; i++) begin @(negedge clk); out_ready = ($urandom % 3) != 0; end
        out_ready = 1;
      end
    join
    repeat (5) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
