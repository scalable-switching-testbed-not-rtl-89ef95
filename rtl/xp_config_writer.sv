// xp_config_writer: writes each time-frame's crosspoint configuration onto
// the crosspoint chips and latches it with the strobe.
//
// At the start of time-frame t (tf_start) the writer reads, from the
// configuration table, the rows of time-frame t+1 (mod TF_PER_TC) for outputs
// 0 .. XP_PORTS-1, one per clk cycle, and writes each onto the chips: the
// output number goes on the address bus, shared by all chips, and every chip
// takes its own input selection from its byte lane of the data bus. The chips
// hold these writes in a first rank of configuration registers. Once all
// outputs are written the strobe is raised; at the start of time-frame t+1 the
// strobe falls and this falling edge makes every chip switch to the new
// configuration at once. The source fixes the address, data and strobe signals
// and that the writes must end before the falling strobe edge that starts the
// next time-frame; the one-row-per-cycle sequence, the shared address bus with
// one data lane per chip, the write enable and the strobe's rising point are
// this design's choices.
//
// Late configuration: if a time-frame starts before the writes for it have
// ended (a clk too slow for XP_PORTS writes per time-frame, or a 1PPS resync
// that cut the time-frame short), the strobe does not fall, so the chips keep
// the configuration they have, `cfg_late` pulses, and writing starts over for
// the following time-frame.
//
// Timing (counting the clk edge that samples tf_start as edge 0): the first
// table read is requested in the cycle after edge 0, the first write is on the
// bus after edge 3, the last after edge XP_PORTS + 2, and the strobe is high
// after edge XP_PORTS + 3. The next tf_start must therefore come at least
// XP_PORTS + 3 cycles after the previous one (147 for 144 outputs). The strobe
// falls on edge 0 of the next time-frame.
module xp_config_writer
  import tds_pkg::*;
#(
  parameter int unsigned NUM_XP    = NUM_XP_DEF,
  parameter int unsigned XP_PORTS  = XP_PORTS_DEF,
  parameter int unsigned TF_PER_TC = TF_PER_TC_DEF,
  localparam int unsigned SEL_W    = cnt_w(XP_PORTS),
  localparam int unsigned TF_W     = cnt_w(TF_PER_TC)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // from the common time reference
  input  logic                          tf_start,
  input  logic [TF_W-1:0]               tf_idx,
  // configuration table read port (data one cycle after the request)
  output logic                          rd_en,
  output logic [TF_W-1:0]               rd_tf,
  output logic [SEL_W-1:0]              rd_out,
  input  logic [NUM_XP-1:0][SEL_W-1:0]  rd_data,
  // crosspoint programming bus
  output logic [SEL_W-1:0]              xp_addr,    // output being configured
  output logic [NUM_XP-1:0][SEL_W-1:0]  xp_data,    // input selection, one lane per chip
  output logic                          xp_wr,      // write enable for xp_addr/xp_data
  output logic                          xp_strobe,  // falling edge: apply configuration
  // status
  output logic                          busy,       // reading the table
  output logic                          cfg_late    // pulse: a time-frame started unconfigured
);
  logic [SEL_W-1:0] rd_cnt;
  logic [TF_W-1:0]  next_tf;
  logic             rd_valid_q;
  logic [SEL_W-1:0] rd_out_q;
  logic             pending;     // a write sequence was started and not yet applied

  always_comb begin
    rd_en  = busy && !tf_start;
    rd_tf  = next_tf;
    rd_out = rd_cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      rd_cnt     <= '0;
      next_tf    <= '0;
      rd_valid_q <= 1'b0;
      rd_out_q   <= '0;
      pending    <= 1'b0;
      xp_addr    <= '0;
      xp_data    <= '0;
      xp_wr      <= 1'b0;
      xp_strobe  <= 1'b0;
      cfg_late   <= 1'b0;
    end else begin
      cfg_late <= 1'b0;

      // write stage: one table row onto the bus
      xp_wr   <= rd_valid_q && !tf_start;
      xp_addr <= rd_out_q;
      xp_data <= rd_data;

      if (tf_start) begin
        if (xp_strobe)    xp_strobe <= 1'b0;   // falling edge: chips apply
        else if (pending) cfg_late  <= 1'b1;   // writes not finished in time
        pending    <= 1'b1;
        busy       <= 1'b1;
        rd_cnt     <= '0;
        rd_valid_q <= 1'b0;
        next_tf    <= (tf_idx == TF_W'(TF_PER_TC - 1)) ? '0 : tf_idx + 1'b1;
      end else begin
        rd_valid_q <= busy;
        rd_out_q   <= rd_cnt;
        if (busy) begin
          if (rd_cnt == SEL_W'(XP_PORTS - 1)) busy   <= 1'b0;
          else                                rd_cnt <= rd_cnt + 1'b1;
        end
        if (xp_wr && xp_addr == SEL_W'(XP_PORTS - 1)) xp_strobe <= 1'b1;
      end
    end
  end

  // The strobe may only rise once the last output has been written, and no
  // write may happen while it is high.
  a_no_write_while_strobe: assert property (@(posedge clk) disable iff (!rst_n)
    !(xp_strobe && xp_wr))
    else $error("xp_config_writer: write while the strobe is high");
  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    !xp_wr || int'(xp_addr) < int'(XP_PORTS))
    else $error("xp_config_writer: output address out of range");

endmodule
