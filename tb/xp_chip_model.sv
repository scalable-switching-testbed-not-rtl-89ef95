// xp_chip_model: behavioural model of one crosspoint switch chip, for
// testbenches only.
//
// A PORTS x PORTS crosspoint whose programming interface has two ranks of
// configuration registers: a write (xp_wr high on a clk rising edge) stores
// xp_data as the input selected for output xp_addr in the first rank; the
// falling edge of xp_strobe copies the whole first rank into the second rank,
// which drives the switch. Data lanes are modelled as TOK_W-bit tokens rather
// than serial bits, so that a testbench can see which input reached which
// output. Both ranks start at input 0. The real part also has input
// equalisers and output clock recovery, which are not modelled.
module xp_chip_model #(
  parameter int unsigned PORTS = 144,
  parameter int unsigned SEL_W = 8,
  parameter int unsigned TOK_W = 16
) (
  input  logic                         clk,
  input  logic [SEL_W-1:0]             xp_addr,
  input  logic [SEL_W-1:0]             xp_data,
  input  logic                         xp_wr,
  input  logic                         xp_strobe,
  input  logic [PORTS-1:0][TOK_W-1:0]  din,
  output logic [PORTS-1:0][TOK_W-1:0]  dout
);
  logic [SEL_W-1:0] rank1 [PORTS];
  logic [SEL_W-1:0] rank2 [PORTS];
  int unsigned n_latch = 0;

  initial begin
    for (int o = 0; o < PORTS; o++) begin
      rank1[o] = '0;
      rank2[o] = '0;
    end
  end

  always @(posedge clk)
    if (xp_wr && int'(xp_addr) < int'(PORTS)) rank1[xp_addr] <= xp_data;

  always @(negedge xp_strobe) begin
    rank2 = rank1;
    n_latch++;
  end

  always_comb
    for (int o = 0; o < PORTS; o++) dout[o] = din[rank2[o]];
endmodule
