// sync_edge: brings an asynchronous input into the clk domain and reports its
// rising edges.
//
// Two flip-flops resynchronise the input, a third remembers the previous
// sample; `rise` is a one-cycle pulse in the cycle the synchronised input goes
// from 0 to 1, three clk edges after the input changed at the latest. Used for
// the GPS 1PPS and 10 MHz signals so that both see the same delay.
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic d_async,   // asynchronous input
  output logic level,     // synchronised level
  output logic rise       // one-cycle pulse on a 0 -> 1 transition
);
  logic [2:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[1:0], d_async};
  end

  assign level = sh[1];
  assign rise  = sh[1] & ~sh[2];
endmodule
