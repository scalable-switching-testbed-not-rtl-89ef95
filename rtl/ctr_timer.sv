// ctr_timer: common time reference (CTR) of the time-driven switch.
//
// The UTC second is the super cycle. It is divided into TC_PER_SC time cycles
// of TF_PER_TC time-frames each (80 x 1000 in the prototype), so that a
// time-frame lasts REF_HZ / (TF_PER_TC * TC_PER_SC) cycles of the GPS 10 MHz
// reference: 125 cycles, 12.5 us. Both GPS signals are asynchronous to clk and
// pass through identical synchronisers; clk must be at least a few times
// faster than the reference.
//
// Operation. Until the first 1PPS rising edge the timer is unlocked and emits
// nothing. A 1PPS edge starts time-frame 0 of time cycle 0 and counts as
// reference tick 0 of it; every further reference rising edge advances the
// tick count, and every TICKS ticks start the next time-frame. Because the
// 10 MHz reference is cycle locked to 1PPS, the next 1PPS edge is expected on
// exactly the reference edge that ends the super cycle. A 1PPS edge at any
// other time resynchronises the counters and pulses `pps_slip`; a super cycle
// that ends with no 1PPS edge is continued from the 10 MHz reference alone and
// pulses `pps_missing`. Both are this design's own choices; the source only
// requires that switching follow the UTC second.
//
// Timing: `tf_start` is a one-cycle pulse in the cycle `tf_idx` and `tc_idx`
// first show the new time-frame; it is set by the third rising clk edge after the reference
// (or 1PPS) edge that begins it at the pins. `sc_start` marks the first
// time-frame of a UTC second. Time-frames and time cycles are numbered from 0
// (the figure of the source numbers time-frames 1 to 1000).
module ctr_timer
  import tds_pkg::*;
#(
  parameter int unsigned REF_HZ    = REF_HZ_DEF,
  parameter int unsigned TF_PER_TC = TF_PER_TC_DEF,
  parameter int unsigned TC_PER_SC = TC_PER_SC_DEF,
  localparam int unsigned TICKS    = ticks_per_tf(REF_HZ, TF_PER_TC, TC_PER_SC),
  localparam int unsigned TICK_W   = cnt_w(TICKS),
  localparam int unsigned TF_W     = cnt_w(TF_PER_TC),
  localparam int unsigned TC_W     = cnt_w(TC_PER_SC)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ref_in,       // GPS 10 MHz reference (squared), asynchronous
  input  logic              pps_in,       // GPS 1PPS, asynchronous
  output logic              locked,       // a 1PPS edge has been seen
  output logic              tf_start,     // pulse: a time-frame begins
  output logic              sc_start,     // pulse: a UTC second (super cycle) begins
  output logic [TF_W-1:0]   tf_idx,       // time-frame within the time cycle
  output logic [TC_W-1:0]   tc_idx,       // time cycle within the super cycle
  output logic              pps_slip,     // pulse: 1PPS came at an unexpected time
  output logic              pps_missing   // pulse: a super cycle ended without 1PPS
);
  initial begin
    assert (TICKS >= 2)
      else $fatal(1, "ctr_timer: fewer than 2 reference cycles per time-frame");
  end

  logic ref_rise, pps_rise, ref_level, pps_level;
  logic [TICK_W-1:0] tick_cnt;

  sync_edge u_ref_sync (.clk, .rst_n, .d_async(ref_in), .level(ref_level), .rise(ref_rise));
  sync_edge u_pps_sync (.clk, .rst_n, .d_async(pps_in), .level(pps_level), .rise(pps_rise));

  logic last_tick, last_tf, last_tc, end_of_sc;
  always_comb begin
    last_tick = (tick_cnt == TICK_W'(TICKS - 1));
    last_tf   = (tf_idx   == TF_W'(TF_PER_TC - 1));
    last_tc   = (tc_idx   == TC_W'(TC_PER_SC - 1));
    end_of_sc = last_tick && last_tf && last_tc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked      <= 1'b0;
      tick_cnt    <= '0;
      tf_idx      <= '0;
      tc_idx      <= '0;
      tf_start    <= 1'b0;
      sc_start    <= 1'b0;
      pps_slip    <= 1'b0;
      pps_missing <= 1'b0;
    end else begin
      tf_start    <= 1'b0;
      sc_start    <= 1'b0;
      pps_slip    <= 1'b0;
      pps_missing <= 1'b0;
      if (pps_rise) begin
        // Start of a UTC second: on time only if the reference edge that ends
        // the super cycle arrives together with it.
        if (locked && !(ref_rise && end_of_sc)) pps_slip <= 1'b1;
        locked   <= 1'b1;
        tick_cnt <= '0;
        tf_idx   <= '0;
        tc_idx   <= '0;
        tf_start <= 1'b1;
        sc_start <= 1'b1;
      end else if (ref_rise && locked) begin
        if (last_tick) begin
          tick_cnt <= '0;
          tf_start <= 1'b1;
          if (last_tf) begin
            tf_idx <= '0;
            if (last_tc) begin
              // Holdover: the second ended without its 1PPS edge.
              tc_idx      <= '0;
              sc_start    <= 1'b1;
              pps_missing <= 1'b1;
            end else begin
              tc_idx <= tc_idx + 1'b1;
            end
          end else begin
            tf_idx <= tf_idx + 1'b1;
          end
        end else begin
          tick_cnt <= tick_cnt + 1'b1;
        end
      end
    end
  end

  // The levels are only needed for edge detection.
  logic unused_levels;
  assign unused_levels = ref_level ^ pps_level;

endmodule
