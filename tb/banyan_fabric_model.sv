// banyan_fabric_model: behavioural model of the two-stage Banyan switching
// fabric built from crosspoint chips, for testbenches only.
//
// A x A logical ports per chip, A chips per stage, so the fabric has A*A
// logical ports. Each logical port is W parallel wires (lanes) that are
// switched together; a chip therefore uses A*W of its PORTS lanes, and the
// rest are left unconnected (inputs tied to token 0). Chip x of the
// controller's data bus is chip x of the fabric: chips 0 .. A-1 form the first
// stage, A .. 2A-1 the second. Fabric input port (i, p) enters first-stage
// chip i at port p; output port o of first-stage chip i is wired to input port
// i of second-stage chip o; output port q of second-stage chip o is fabric
// output port (o, q). Lanes carry TOK_W-bit tokens.
module banyan_fabric_model #(
  parameter int unsigned A     = 32,
  parameter int unsigned W     = 4,
  parameter int unsigned PORTS = 144,
  parameter int unsigned SEL_W = 8,
  parameter int unsigned TOK_W = 16,
  localparam int unsigned NUM_XP = 2 * A,
  localparam int unsigned LANES  = A * A * W
) (
  input  logic                              clk,
  input  logic [SEL_W-1:0]                  xp_addr,
  input  logic [NUM_XP-1:0][SEL_W-1:0]      xp_data,
  input  logic                              xp_wr,
  input  logic                              xp_strobe,
  input  logic [LANES-1:0][TOK_W-1:0]       fab_in,
  output logic [LANES-1:0][TOK_W-1:0]       fab_out
);
  logic [PORTS-1:0][TOK_W-1:0] chip_in  [NUM_XP];
  logic [PORTS-1:0][TOK_W-1:0] chip_out [NUM_XP];

  for (genvar x = 0; x < NUM_XP; x++) begin : g_chip
    xp_chip_model #(.PORTS(PORTS), .SEL_W(SEL_W), .TOK_W(TOK_W)) u_chip (
      .clk, .xp_addr, .xp_data(xp_data[x]), .xp_wr, .xp_strobe,
      .din(chip_in[x]), .dout(chip_out[x]));
  end

  always_comb begin
    for (int x = 0; x < int'(NUM_XP); x++) chip_in[x] = '0;
    for (int c = 0; c < int'(A); c++)
      for (int p = 0; p < int'(A); p++)
        for (int w = 0; w < int'(W); w++) begin
          // first stage: fabric input (c, p)
          chip_in[c][p * W + w] = fab_in[(c * A + p) * W + w];
          // interconnection: first-stage chip p, output port c -> second-stage chip c, input p
          chip_in[A + c][p * W + w] = chip_out[p][c * W + w];
          // second stage: output port p of chip c is fabric output (c, p)
          fab_out[(c * A + p) * W + w] = chip_out[A + c][p * W + w];
        end
  end
endmodule
