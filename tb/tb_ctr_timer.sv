// tb_ctr_timer: self-checking test of the common-time-reference counter.
//
// Runs the timer at a small time grid (5 reference cycles per time-frame,
// 4 time-frames per time cycle, 3 time cycles per second) and drives a
// 10 MHz-like reference and a 1PPS signal. An independent reference model
// counts reference edges since the last 1PPS and predicts every time-frame
// start with its indices, super-cycle start, slip and missing-pulse flags.
// Each tf_start is compared with the prediction and must come exactly LAT
// clk cycles after the reference edge that causes it. Covered: no output
// before lock, lock on the first 1PPS, time-frame, time-cycle and second
// rollover with an on-time 1PPS, a missing 1PPS (holdover) and an early 1PPS
// (resynchronisation).
module tb_ctr_timer;
  import tds_pkg::*;

  localparam int unsigned TF_PER_TC = 4;
  localparam int unsigned TC_PER_SC = 3;
  localparam int unsigned TICKS     = 5;
  localparam int unsigned REF_HZ    = TICKS * TF_PER_TC * TC_PER_SC;   // 60 reference cycles / second
  localparam int unsigned LAT       = 3;   // clk edges from reference edge to tf_start

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ref_in = 1'b0, pps_in = 1'b0;
  logic locked, tf_start, sc_start, pps_slip, pps_missing;
  logic [1:0] tf_idx;   // widths of the reduced grid
  logic [1:0] tc_idx;

  ctr_timer #(.REF_HZ(REF_HZ), .TF_PER_TC(TF_PER_TC), .TC_PER_SC(TC_PER_SC)) dut (
    .clk, .rst_n, .ref_in, .pps_in, .locked, .tf_start, .sc_start,
    .tf_idx, .tc_idx, .pps_slip, .pps_missing);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    int unsigned cyc;
    int unsigned tf, tc;
    bit sc, slip, missing;
  } ev_t;
  ev_t exp_q[$];

  // reference model state
  bit          m_locked = 0;
  int unsigned m_n = 0;      // reference edges since the last 1PPS
  int unsigned n_tf = 0, n_slip = 0, n_missing = 0, n_sc = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // One reference period (4 clk), optionally with a 1PPS rising edge on its
  // rising edge. Edges are driven on the falling clk edge.
  task automatic ref_cycle(input bit with_pps);
    ev_t e;
    @(negedge clk);
    ref_in = 1'b1;
    pps_in = with_pps;
    if (with_pps) begin
      e.cyc = cyc; e.tf = 0; e.tc = 0; e.sc = 1; e.missing = 0;
      e.slip = m_locked && ((m_n + 1) % (TICKS * TF_PER_TC * TC_PER_SC) != 0);
      exp_q.push_back(e);
      m_locked = 1; m_n = 0;
    end else if (m_locked) begin
      m_n++;
      if (m_n % TICKS == 0) begin
        int unsigned g;
        g = m_n / TICKS;
        e.cyc = cyc; e.tf = g % TF_PER_TC; e.tc = (g / TF_PER_TC) % TC_PER_SC;
        e.sc = (g % (TF_PER_TC * TC_PER_SC)) == 0;
        e.missing = e.sc; e.slip = 0;
        exp_q.push_back(e);
      end
    end
    @(negedge clk);
    @(negedge clk);
    ref_in = 1'b0;
    pps_in = 1'b0;
    @(negedge clk);
  endtask

  // compare every time-frame start with the model
  always @(posedge clk) begin
    if (rst_n && (tf_start || pps_slip || pps_missing || sc_start)) begin
      if (exp_q.size() == 0) begin
        check(0, "unexpected time-frame start");
      end else begin
        ev_t e;
        e = exp_q.pop_front();
        check(tf_start, "flag without tf_start");
        check(cyc - e.cyc == LAT, $sformatf("latency %0d, expected %0d", cyc - e.cyc, LAT));
        check(tf_idx == e.tf[1:0], $sformatf("tf_idx %0d expected %0d", tf_idx, e.tf));
        check(tc_idx == e.tc[1:0], $sformatf("tc_idx %0d expected %0d", tc_idx, e.tc));
        check(sc_start == e.sc, "sc_start");
        check(pps_slip == e.slip, "pps_slip");
        check(pps_missing == e.missing, "pps_missing");
        n_tf++;
        if (pps_slip) n_slip++;
        if (pps_missing) n_missing++;
        if (sc_start) n_sc++;
      end
    end
  end

  localparam int unsigned SEC = REF_HZ;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // free-running reference before any 1PPS: nothing happens
    repeat (17) ref_cycle(0);
    check(!locked, "locked before the first 1PPS");
    // two seconds with on-time 1PPS
    for (int s = 0; s < 2; s++) begin
      ref_cycle(1);
      repeat (SEC - 1) ref_cycle(0);
    end
    // a second with no 1PPS: holdover
    repeat (SEC) ref_cycle(0);
    // 1PPS back on time, then an early 1PPS 23 reference cycles later
    ref_cycle(1);
    repeat (22) ref_cycle(0);
    ref_cycle(1);
    repeat (SEC + 7) ref_cycle(0);
    repeat (8) @(negedge clk);
    check(exp_q.size() == 0, "time-frame starts missing at the end");
    check(n_slip == 1, $sformatf("slips seen %0d, expected 1", n_slip));
    check(n_missing == 2, $sformatf("missing 1PPS seen %0d, expected 2", n_missing));
    check(n_tf == 3 * TF_PER_TC * TC_PER_SC + 5 + 14, $sformatf("time-frames seen %0d", n_tf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
