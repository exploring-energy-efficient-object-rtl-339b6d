// tb_cnv_top: end-to-end test of the classifier at its default precision
// (1-bit weights, 1-bit activations), full network size. Two random images
// go through the whole chain and are compared with a reference model; see
// tb_cnv_body.svh for what is checked.
module tb_cnv_top;
  localparam int WB = 1;
  localparam int AB = 1;
`include "tb_cnv_body.svh"

  // Watchdog: a full run takes about 1.1 million cycles.
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cnv_top dut (
    .clk, .rst_n, .cfg, .img_valid, .img_ready, .img_data,
    .res_valid, .res_ready, .res_class, .res_scores);
endmodule
