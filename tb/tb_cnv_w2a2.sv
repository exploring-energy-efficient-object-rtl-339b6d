// tb_cnv_w2a2: end-to-end test of the classifier built with 2-bit weights and
// 2-bit activations (the w2a2 variant), full network size. Two random images
// go through the whole chain and are compared with a reference model; see
// tb_cnv_body.svh for what is checked.
module tb_cnv_w2a2;
  localparam int WB = 2;
  localparam int AB = 2;
`include "tb_cnv_body.svh"

  // Watchdog: a full run takes about 1.1 million cycles.
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cnv_top #(.WBITS(WB), .ABITS(AB)) dut (
    .clk, .rst_n, .cfg, .img_valid, .img_ready, .img_data,
    .res_valid, .res_ready, .res_class, .res_scores);
endmodule
