// xp_config_table: the switch controller's memory table of crosspoint
// configurations.
//
// For every time-frame of the time cycle (TF_PER_TC = 1000) and every output
// of a crosspoint chip (XP_PORTS = 144) it holds, for each of the NUM_XP chips,
// the number of the input that output is connected to during that
// time-frame. The table is organised as NUM_XP byte lanes, one memory per
// chip, all addressed by the same (time-frame, output) pair, so that one read
// returns the selections of one output on every chip at once: the word the
// controller drives onto its data bus. Entry (tf, out) is at row
// tf * XP_PORTS + out.
//
// Interface: a write port for the host that loads the schedule (per-lane write
// enables, so one chip's entry can be changed alone) and a read port for the
// configuration writer. Reads are synchronous: rd_data shows the row addressed
// in the cycle before rd_en was high, and holds otherwise. What the table holds
// is the source's; its organisation into lanes, the host port and the read
// latency are this design's choices. The memory is not reset; rows must be
// written before they are used.
module xp_config_table
  import tds_pkg::*;
#(
  parameter int unsigned NUM_XP    = NUM_XP_DEF,
  parameter int unsigned XP_PORTS  = XP_PORTS_DEF,
  parameter int unsigned TF_PER_TC = TF_PER_TC_DEF,
  localparam int unsigned SEL_W    = cnt_w(XP_PORTS),
  localparam int unsigned TF_W     = cnt_w(TF_PER_TC),
  localparam int unsigned DEPTH    = TF_PER_TC * XP_PORTS,
  localparam int unsigned ADDR_W   = cnt_w(DEPTH)
) (
  input  logic                          clk,
  // host write port
  input  logic                          wr_en,
  input  logic [TF_W-1:0]               wr_tf,
  input  logic [SEL_W-1:0]              wr_out,
  input  logic [NUM_XP-1:0]             wr_lane_en,
  input  logic [NUM_XP-1:0][SEL_W-1:0]  wr_data,
  // configuration read port
  input  logic                          rd_en,
  input  logic [TF_W-1:0]               rd_tf,
  input  logic [SEL_W-1:0]              rd_out,
  output logic [NUM_XP-1:0][SEL_W-1:0]  rd_data
);
  logic [ADDR_W-1:0] wr_addr, rd_addr;

  always_comb begin
    wr_addr = ADDR_W'(wr_tf) * ADDR_W'(XP_PORTS) + ADDR_W'(wr_out);
    rd_addr = ADDR_W'(rd_tf) * ADDR_W'(XP_PORTS) + ADDR_W'(rd_out);
  end

  for (genvar x = 0; x < NUM_XP; x++) begin : g_lane
    logic [SEL_W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (wr_en && wr_lane_en[x]) mem[wr_addr] <= wr_data[x];
      if (rd_en)                  rd_data[x]   <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) assert (int'(wr_tf) < int'(TF_PER_TC) && int'(wr_out) < int'(XP_PORTS))
      else $error("xp_config_table: write outside the table");
    if (rd_en) assert (int'(rd_tf) < int'(TF_PER_TC) && int'(rd_out) < int'(XP_PORTS))
      else $error("xp_config_table: read outside the table");
  end

endmodule
