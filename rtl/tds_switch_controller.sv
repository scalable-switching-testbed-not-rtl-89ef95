// tds_switch_controller: switch controller of a time-driven (pipeline
// forwarding) switch built from crosspoint chips.
//
// The switch fabric is a two-stage Banyan network of NUM_XP crosspoint chips
// of XP_PORTS x XP_PORTS (64 chips of 144 x 144 in the 10 Tb/s module). The
// chips switch serial bit streams without buffering them; what makes them a
// packet switch is that their input-to-output permutation changes at every
// time-frame boundary of a UTC-aligned time grid, following a schedule that is
// the same at every time cycle. This controller keeps that time grid and
// reprograms the chips:
//
//   ctr_timer         GPS 1PPS + 10 MHz -> time-frame / time-cycle counters,
//                     one time-frame = 125 reference cycles = 12.5 us
//   xp_config_table   for each of the 1000 time-frames of a time cycle and
//                     each chip output, the input it is connected to
//   xp_config_writer  during time-frame t, writes the table rows of t+1 onto
//                     the chips (address bus = output, one data-bus lane per
//                     chip) and drops the strobe at the start of t+1, which
//                     makes all chips change their permutation together
//
// The chips themselves, the GPS receiver and the optical interconnect are
// outside this module: its xp_* ports drive the chips' programming pins, and
// gps_* come from the GPS receiver. The host port loads the schedule into the
// table; it may be written at any time, and a row takes effect the next time
// it is read (one time-frame before the time-frame it describes).
//
// Clock: clk is the controller's own clock, asynchronous to the GPS signals.
// It must run fast enough to sample the 10 MHz reference (several times
// 10 MHz) and to write XP_PORTS rows per time-frame, which takes XP_PORTS + 3
// cycles; 100 MHz gives 1250 cycles per time-frame against the 147 needed.
// The source gives the blocks, their signals and the time grid; the clocking,
// the host port and the split of the data bus are this design's choices.
module tds_switch_controller
  import tds_pkg::*;
#(
  parameter int unsigned REF_HZ    = REF_HZ_DEF,
  parameter int unsigned TF_PER_TC = TF_PER_TC_DEF,
  parameter int unsigned TC_PER_SC = TC_PER_SC_DEF,
  parameter int unsigned NUM_XP    = NUM_XP_DEF,
  parameter int unsigned XP_PORTS  = XP_PORTS_DEF,
  localparam int unsigned SEL_W    = cnt_w(XP_PORTS),
  localparam int unsigned TF_W     = cnt_w(TF_PER_TC),
  localparam int unsigned TC_W     = cnt_w(TC_PER_SC)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // GPS receiver
  input  logic                          gps_10mhz,
  input  logic                          gps_1pps,
  // host port: schedule load
  input  logic                          cfg_we,
  input  logic [TF_W-1:0]               cfg_tf,
  input  logic [SEL_W-1:0]              cfg_out,
  input  logic [NUM_XP-1:0]             cfg_lane_en,
  input  logic [NUM_XP-1:0][SEL_W-1:0]  cfg_data,
  // crosspoint programming bus
  output logic [SEL_W-1:0]              xp_addr,
  output logic [NUM_XP-1:0][SEL_W-1:0]  xp_data,
  output logic                          xp_wr,
  output logic                          xp_strobe,
  // status
  output logic                          locked,
  output logic                          tf_start,
  output logic                          sc_start,
  output logic [TF_W-1:0]               tf_idx,
  output logic [TC_W-1:0]               tc_idx,
  output logic                          pps_slip,
  output logic                          pps_missing,
  output logic                          cfg_late
);
  logic                         rd_en;
  logic [TF_W-1:0]              rd_tf;
  logic [SEL_W-1:0]             rd_out;
  logic [NUM_XP-1:0][SEL_W-1:0] rd_data;
  logic                         wr_busy;

  ctr_timer #(
    .REF_HZ(REF_HZ), .TF_PER_TC(TF_PER_TC), .TC_PER_SC(TC_PER_SC)
  ) u_timer (
    .clk, .rst_n,
    .ref_in(gps_10mhz), .pps_in(gps_1pps),
    .locked, .tf_start, .sc_start, .tf_idx, .tc_idx, .pps_slip, .pps_missing
  );

  xp_config_table #(
    .NUM_XP(NUM_XP), .XP_PORTS(XP_PORTS), .TF_PER_TC(TF_PER_TC)
  ) u_table (
    .clk,
    .wr_en(cfg_we), .wr_tf(cfg_tf), .wr_out(cfg_out), .wr_lane_en(cfg_lane_en),
    .wr_data(cfg_data),
    .rd_en, .rd_tf, .rd_out, .rd_data
  );

  xp_config_writer #(
    .NUM_XP(NUM_XP), .XP_PORTS(XP_PORTS), .TF_PER_TC(TF_PER_TC)
  ) u_writer (
    .clk, .rst_n,
    .tf_start, .tf_idx,
    .rd_en, .rd_tf, .rd_out, .rd_data,
    .xp_addr, .xp_data, .xp_wr, .xp_strobe,
    .busy(wr_busy), .cfg_late
  );

  // wr_busy is kept for observation in simulation only.
  logic unused_busy;
  assign unused_busy = wr_busy;

endmodule
