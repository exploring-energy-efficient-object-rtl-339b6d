// tb_swu: self-checking test of swu.
// Streams three random 7x7 maps of two 2-bit channels with random valid and
// random backpressure through a 3x3 window unit and checks every window
// vector (element (ky*3+kx)*C+c) against the map, and that each map gives
// 5x5 windows. A second instance with K equal to the map size checks the
// flatten case (one vector per map).
module tb_swu;
  localparam int IFM = 7, C = 2, EB = 2, K = 3, NIMG = 3, OFM = IFM - K + 1;
  localparam int PW = C * EB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [PW-1:0] in_data;
  logic [K*K*PW-1:0] out_data;
  int checks = 0, failures = 0;

  swu #(.IFM_DIM(IFM), .C(C), .EBITS(EB), .K(K)) dut (.*);

  // flatten instance: 3x3 maps, driven from the same kind of stream
  logic f_in_valid, f_in_ready, f_out_valid;
  logic [PW-1:0] f_in_data;
  logic [9*PW-1:0] f_out_data;
  swu #(.IFM_DIM(3), .C(C), .EBITS(EB), .K(3)) dut_flat (
    .clk, .rst_n, .in_valid(f_in_valid), .in_ready(f_in_ready), .in_data(f_in_data),
    .out_valid(f_out_valid), .out_ready(out_ready), .out_data(f_out_data));

  logic [PW-1:0] img [NIMG][IFM][IFM];
  logic [K*K*PW-1:0] exp_q[$];
  logic [9*PW-1:0] fexp_q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data != exp_q[0]) begin failures++; $display("window mismatch"); end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
    if (f_out_valid && out_ready) begin
      checks++;
      if (fexp_q.size() == 0 || f_out_data != fexp_q[0]) begin failures++; $display("flatten mismatch"); end
      if (fexp_q.size()) void'(fexp_q.pop_front());
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0; f_in_valid = 0; f_in_data = '0;
    for (int n = 0; n < NIMG; n++)
      for (int y = 0; y < IFM; y++)
        for (int x = 0; x < IFM; x++) img[n][y][x] = PW'($urandom);
    for (int n = 0; n < NIMG; n++) begin
      logic [9*PW-1:0] f;
      for (int oy = 0; oy < OFM; oy++)
        for (int ox = 0; ox < OFM; ox++) begin
          logic [K*K*PW-1:0] w;
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              w[(ky*K+kx)*PW +: PW] = img[n][oy+ky][ox+kx];
          exp_q.push_back(w);
        end
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 3; x++) f[(y*3+x)*PW +: PW] = img[n][y][x];
      fexp_q.push_back(f);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int n = 0; n < NIMG; n++)
          for (int y = 0; y < IFM; y++)
            for (int x = 0; x < IFM; x++) begin
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
        for (int n = 0; n < NIMG; n++)
          for (int y = 0; y < 3; y++)
            for (int x = 0; x < 3; x++) begin
              @(negedge clk);
              f_in_valid = 1; f_in_data = img[n][y][x];
              #1;
              while (!f_in_ready) begin @(negedge clk); #1; end
              @(posedge clk);
            end
        @(negedge clk); f_in_valid = 0;
      end
      begin
        for (int i = 0; i < 500; i++) begin @(negedge clk); out_ready = ($urandom % 3) != 0; end
        out_ready = 1;
      end
    join
    repeat (10) @(negedge clk);
    checks++; if (exp_q.size() != 0 || fexp_q.size() != 0) begin failures++; $display("windows missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
