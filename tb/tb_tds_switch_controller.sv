// tb_tds_switch_controller: end-to-end test of the switch controller driving a
// two-stage Banyan fabric of crosspoint chip models.
//
// Reduced sizes: 4 x 4-port chips per stage with 2 wires per port (16 logical
// ports, chips of 10 lanes so that some lanes are unused), 6 time-frames per
// time cycle, 2 time cycles per second, 20 reference cycles per time-frame,
// reference period 4 clk. The schedule of time-frame t routes fabric input
// (i, p) to output ((p + t) mod A, (i + 4t + p) mod A): a different
// permutation in every time-frame. The host port loads it; the test then
// drives the GPS signals and, at every time-frame start, checks the time-frame
// indices against an independent model of the time grid and every fabric
// output against the permutation that should be active.
//
// Mechanisms made to happen and counted: lock on the first 1PPS, a
// configuration applied by the strobe, time-cycle wrap, second wrap with an
// on-time 1PPS, a missing 1PPS (holdover), an early 1PPS (resync), a late
// configuration caused by it, and a schedule change through the host port
// while switching. Each must occur at least once.
module tb_tds_switch_controller;
  import tds_pkg::*;

  localparam int unsigned A = 4, W = 2;
  localparam int unsigned NUM_XP = 2 * A;
  localparam int unsigned XP_PORTS = 10;
  localparam int unsigned TF_PER_TC = 6, TC_PER_SC = 2, TICKS = 20;
  localparam int unsigned REF_HZ = TICKS * TF_PER_TC * TC_PER_SC;
  localparam int unsigned SEC = REF_HZ;            // reference cycles per second
  localparam int unsigned SEL_W = 4, TF_W = 3, TC_W = 1;
  localparam int unsigned LANES = A * A * W;
  localparam int unsigned LAT = 3;                 // reference edge -> tf_start
  localparam int unsigned NEED = XP_PORTS + 3;     // cycles to write one time-frame
  localparam int unsigned TOK_W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic gps_10mhz = 1'b0, gps_1pps = 1'b0;
  logic                         cfg_we = 1'b0;
  logic [TF_W-1:0]              cfg_tf = '0;
  logic [SEL_W-1:0]             cfg_out = '0;
  logic [NUM_XP-1:0]            cfg_lane_en = '0;
  logic [NUM_XP-1:0][SEL_W-1:0] cfg_data = '0;
  logic [SEL_W-1:0]             xp_addr;
  logic [NUM_XP-1:0][SEL_W-1:0] xp_data;
  logic xp_wr, xp_strobe, locked, tf_start, sc_start, pps_slip, pps_missing, cfg_late;
  logic [TF_W-1:0] tf_idx;
  logic [TC_W-1:0] tc_idx;

  tds_switch_controller #(
    .REF_HZ(REF_HZ), .TF_PER_TC(TF_PER_TC), .TC_PER_SC(TC_PER_SC),
    .NUM_XP(NUM_XP), .XP_PORTS(XP_PORTS)
  ) dut (
    .clk, .rst_n, .gps_10mhz, .gps_1pps,
    .cfg_we, .cfg_tf, .cfg_out, .cfg_lane_en, .cfg_data,
    .xp_addr, .xp_data, .xp_wr, .xp_strobe,
    .locked, .tf_start, .sc_start, .tf_idx, .tc_idx, .pps_slip, .pps_missing, .cfg_late);

  logic [LANES-1:0][TOK_W-1:0] fab_in, fab_out;
  banyan_fabric_model #(.A(A), .W(W), .PORTS(XP_PORTS), .SEL_W(SEL_W), .TOK_W(TOK_W)) u_fabric (
    .clk, .xp_addr, .xp_data, .xp_wr, .xp_strobe, .fab_in, .fab_out);
  always_comb for (int l = 0; l < int'(LANES); l++) fab_in[l] = TOK_W'(l + 1);

  // ---------------------------------------------------------------- schedule
  // pattern k: input (i, p) -> first-stage output o = (p + k) mod A,
  //            second-stage output q = (i + 3k + o) mod A
  function automatic int unsigned sched_sel(int unsigned k, int unsigned x, int unsigned lane);
    int unsigned port = lane / W, w = lane % W;
    if (lane >= A * W) return (k + lane) % XP_PORTS;
    if (x < A) return ((port + A * 8 - k % A) % A) * W + w;
    return ((port + A * 8 - (3 * k) % A - (x - A)) % A) * W + w;
  endfunction

  // input lane expected at fabric output lane l under pattern k
  function automatic int unsigned src_lane(int unsigned k, int unsigned l);
    int unsigned o = l / (A * W), q = (l / W) % A, w = l % W;
    int unsigned i = (q + A * 8 - (3 * k) % A - o) % A;
    int unsigned p = (o + A * 8 - k % A) % A;
    return (i * A + p) * W + w;
  endfunction

  int unsigned pat [TF_PER_TC];   // pattern held by each table row

  task automatic load_row(input int unsigned t, input int unsigned k);
    for (int unsigned o = 0; o < XP_PORTS; o++) begin
      @(negedge clk);
      cfg_we = 1; cfg_tf = TF_W'(t); cfg_out = SEL_W'(o); cfg_lane_en = '1;
      for (int unsigned x = 0; x < NUM_XP; x++) cfg_data[x] = SEL_W'(sched_sel(k, x, o));
    end
    @(negedge clk);
    cfg_we = 0;
    pat[t] = k;
  endtask

  // ---------------------------------------------------------------- checking
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int unsigned cyc, tf, tc; bit sc, slip, missing; } ev_t;
  ev_t exp_q[$];
  bit          m_locked = 0;
  int unsigned m_n = 0;

  // mechanism counters
  int n_lock = 0, n_applied = 0, n_tc_wrap = 0, n_sc_on_time = 0, n_missing = 0;
  int n_slip = 0, n_late = 0, n_host_update = 0, n_strobe_fall = 0;

  task automatic ref_cycle(input bit with_pps);
    ev_t e;
    @(negedge clk);
    gps_10mhz = 1'b1;
    gps_1pps = with_pps;
    if (with_pps) begin
      e.cyc = cyc; e.tf = 0; e.tc = 0; e.sc = 1; e.missing = 0;
      e.slip = m_locked && ((m_n + 1) % SEC != 0);
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
    gps_10mhz = 1'b0;
    gps_1pps = 1'b0;
    @(negedge clk);
  endtask

  // model of configuration application
  bit          have_prev = 0;
  int unsigned prev_cyc = 0;
  int          active_pat = -1;
  int unsigned check_at = 0;
  bit          check_due = 0, late_exp = 0;
  bit          was_locked = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (locked && !was_locked) n_lock++;
      was_locked <= locked;
      if (tf_start) begin
        if (exp_q.size() == 0) check(0, "unexpected time-frame start");
        else begin
          ev_t e;
          bit applied;
          e = exp_q.pop_front();
          check(cyc - e.cyc == LAT, $sformatf("tf_start latency %0d", cyc - e.cyc));
          check(tf_idx == TF_W'(e.tf) && tc_idx == TC_W'(e.tc),
                $sformatf("index tf %0d tc %0d, expected %0d %0d", tf_idx, tc_idx, e.tf, e.tc));
          check(sc_start == e.sc && pps_slip == e.slip && pps_missing == e.missing, "second flags");
          if (e.slip) n_slip++;
          if (e.missing) n_missing++;
          if (e.sc && !e.slip && !e.missing && have_prev) n_sc_on_time++;
          if (!e.sc && e.tf == 0) n_tc_wrap++;
          applied = have_prev && (e.cyc - prev_cyc) >= NEED;
          late_exp = have_prev && !applied;
          if (applied) begin
            active_pat = int'(pat[e.tf]);
            n_applied++;
          end
          have_prev = 1;
          prev_cyc = e.cyc;
          check_at = cyc + 1;
          check_due = 1;
        end
      end
      if (check_due && cyc == check_at) begin
        check_due = 0;
        check(cfg_late == late_exp, $sformatf("cfg_late %0d, expected %0d", cfg_late, late_exp));
        if (cfg_late) n_late++;
        if (active_pat >= 0)
          for (int unsigned l = 0; l < LANES; l++)
            check(fab_out[l] == TOK_W'(src_lane(active_pat, l) + 1),
                  $sformatf("pattern %0d: output lane %0d carries %0d, expected %0d",
                            active_pat, l, fab_out[l], src_lane(active_pat, l) + 1));
      end
    end
  end

  always @(negedge xp_strobe) if (rst_n) n_strobe_fall++;

  // ---------------------------------------------------------------- stimulus
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int unsigned t = 0; t < TF_PER_TC; t++) load_row(t, t);
    // reference without 1PPS: controller idle
    repeat (30) ref_cycle(0);
    check(!locked && n_strobe_fall == 0 && !xp_wr, "idle before the first 1PPS");
    // two seconds with on-time 1PPS
    for (int s = 0; s < 2; s++) begin
      ref_cycle(1);
      repeat (SEC - 1) ref_cycle(0);
    end
    // one second in holdover (no 1PPS); change the schedule of time-frame 1 on the way
    fork
      repeat (SEC) ref_cycle(0);
      begin
        wait (tf_start && tf_idx == TF_W'(3));
        load_row(1, 7);
        n_host_update++;
      end
    join
    // 1PPS back on time, then an early one right after a time-frame start
    ref_cycle(1);
    repeat (2 * TICKS) ref_cycle(0);
    ref_cycle(0);
    ref_cycle(1);
    repeat (SEC + 3 * TICKS) ref_cycle(0);
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "time-frame starts missing at the end");
    check(n_strobe_fall == n_applied, $sformatf("strobe falls %0d, applied %0d", n_strobe_fall, n_applied));
    check(n_lock == 1, "lock");
    check(n_applied > 0, "no configuration applied");
    check(n_tc_wrap > 0, "no time-cycle wrap");
    check(n_sc_on_time > 0, "no on-time 1PPS");
    check(n_missing > 0, "no missing 1PPS");
    check(n_slip > 0, "no early 1PPS");
    check(n_late > 0, "no late configuration");
    check(n_host_update > 0, "no host update");
    $display("mechanisms: lock=%0d applied=%0d tc_wrap=%0d sc_on_time=%0d missing=%0d slip=%0d late=%0d host_update=%0d",
             n_lock, n_applied, n_tc_wrap, n_sc_on_time, n_missing, n_slip, n_late, n_host_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
