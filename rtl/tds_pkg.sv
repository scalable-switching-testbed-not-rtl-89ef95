// tds_pkg: constants and types shared by the time-driven switch controller.
//
// The common time reference divides every UTC second (one super cycle) into
// TC_PER_SC time cycles of TF_PER_TC time-frames each: 80 x 1000 = 80,000
// time-frames of 12.5 us. With the GPS 10 MHz reference that is 125 reference
// cycles per time-frame. Each crosspoint chip has XP_PORTS = 144 outputs, and
// an output is configured by writing the number of the input it connects to.
// These numbers are those of the prototype switch; the parameters of the
// modules default to them and may be overridden.
package tds_pkg;

  // GPS frequency reference, cycle locked to the 1PPS pulse.
  localparam int unsigned REF_HZ_DEF    = 10_000_000;
  // Time-frames per time cycle and time cycles per super cycle (UTC second).
  localparam int unsigned TF_PER_TC_DEF = 1000;
  localparam int unsigned TC_PER_SC_DEF = 80;
  // Ports of one crosspoint chip (144-by-144).
  localparam int unsigned XP_PORTS_DEF  = 144;
  // Crosspoint chips driven by one controller: two Banyan stages of 32 chips.
  localparam int unsigned NUM_XP_DEF    = 64;

  // Reference cycles in one time-frame (125 with the defaults).
  function automatic int unsigned ticks_per_tf(int unsigned ref_hz, int unsigned tf_per_tc,
                                               int unsigned tc_per_sc);
    return ref_hz / (tf_per_tc * tc_per_sc);
  endfunction

  // Width of a counter that holds 0 .. n-1 (at least one bit).
  function automatic int unsigned cnt_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
