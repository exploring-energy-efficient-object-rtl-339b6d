// tb_stream_fifo: self-checking test of stream_fifo.
// Pushes a counter sequence of random words with random valid and random
// ready and checks that they come out complete and in order, that the FIFO
// reports full after DEPTH pushes without pops, and that it sustains one word
// per cycle when both sides are always willing.
module tb_stream_fifo;
  localparam int W = 12, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  stream_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] q[$];
  int n_out = 0, mode = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) q.push_back(in_data);
    if (out_valid && out_ready) begin
      checks++;
      if (q.size() == 0 || out_data != q[0]) begin
        failures++;
        $display("mismatch: got %h", out_data);
      end
      if (q.size() > 0) void'(q.pop_front());
      n_out++;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill without popping
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); in_valid = 1; in_data = W'($urandom);
    end
    @(negedge clk); in_valid = 0;
    checks++; if (in_ready !== 1'b0) begin failures++; $display("not full after DEPTH pushes"); end
    // drain and random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_data   = W'($urandom);
      out_ready = ($urandom % 4) != 0;
    end
    // full-rate: both always active
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (10) @(negedge clk);
    begin
      int n_start;
      n_start = n_out;
      in_valid = 1;
      for (int i = 0; i < 100; i++) begin @(negedge clk); in_data = W'($urandom); end
      in_valid = 0;
      repeat (DEPTH + 2) @(negedge clk);
      checks++;
      if (n_out - n_start != 100) begin failures++; $display("rate: %0d words", n_out - n_start); end
    end
    checks++; if (q.size() != 0) begin failures++; $display("words left: %0d", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
