// stream_fifo: valid/ready FIFO for the data streams between layer engines.
//
// Layers exchange data only through streams; this FIFO decouples a producer
// from its consumer so that either may stall briefly without stopping the
// other. It is a DEPTH-entry circular buffer whose head entry drives the output directly.
// Depth and handshake are this design's choice.
//
// Interface and timing
//   in_valid/in_ready/in_data   : push side, in_ready = not full
//   out_valid/out_ready/out_data: pop side, out_valid = not empty
// A word pushed in one cycle can be popped in the next; full throughput of
// one word per cycle is sustained.
module stream_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  out_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   count;
  logic          push, pop;

  assign in_ready  = (32'(count) < DEPTH);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      assert (!(pop && count == '0)) else $error("stream_fifo: pop when empty");
    end
  end

endmodule
