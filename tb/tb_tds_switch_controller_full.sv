// tb_tds_switch_controller_full: the switch controller at its full size,
// driving the 10 Tb/s fabric of 64 crosspoint chip models.
//
// Sizes are the controller's defaults: 64 chips of 144 x 144 in two Banyan
// stages of 32 chips, each logical 10 Gb/s port carried on 4 wires (128 of
// the 144 lanes used), a time grid of 1000 time-frames per time cycle and 80
// time cycles per second, 10 MHz reference, controller clock 100 MHz. The
// host port loads all 1000 x 144 rows; a 1PPS edge starts the grid, and the
// test runs one complete time cycle and the first time-frames of the next. At
// every time-frame start it checks the indices, the spacing of 1250 clk cycles
// between time-frame starts, and all 4096 fabric output lanes against the
// permutation scheduled for that time-frame. During the run the schedule of
// time-frame 5 is rewritten through the host port, and the new permutation
// must appear in the next time cycle.
module tb_tds_switch_controller_full;
  import tds_pkg::*;

  localparam int unsigned A = 32, W = 4;
  localparam int unsigned NUM_XP = NUM_XP_DEF;          // 64 = 2 * A
  localparam int unsigned XP_PORTS = XP_PORTS_DEF;      // 144
  localparam int unsigned TF_PER_TC = TF_PER_TC_DEF;    // 1000
  localparam int unsigned TICKS = ticks_per_tf(REF_HZ_DEF, TF_PER_TC_DEF, TC_PER_SC_DEF);
  localparam int unsigned CLK_PER_REF = 10;             // 100 MHz / 10 MHz
  localparam int unsigned SEL_W = 8, TF_W = 10, TC_W = 7;
  localparam int unsigned LANES = A * A * W;
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

  tds_switch_controller dut (
    .clk, .rst_n, .gps_10mhz, .gps_1pps,
    .cfg_we, .cfg_tf, .cfg_out, .cfg_lane_en, .cfg_data,
    .xp_addr, .xp_data, .xp_wr, .xp_strobe,
    .locked, .tf_start, .sc_start, .tf_idx, .tc_idx, .pps_slip, .pps_missing, .cfg_late);

  logic [LANES-1:0][TOK_W-1:0] fab_in, fab_out;
  banyan_fabric_model #(.A(A), .W(W), .PORTS(XP_PORTS), .SEL_W(SEL_W), .TOK_W(TOK_W)) u_fabric (
    .clk, .xp_addr, .xp_data, .xp_wr, .xp_strobe, .fab_in, .fab_out);
  always_comb for (int l = 0; l < int'(LANES); l++) fab_in[l] = TOK_W'(l + 1);

  // pattern k: input (i, p) -> first-stage output o = (p + k) mod A,
  //            second-stage output q = (i + 3k + o) mod A
  function automatic int unsigned sched_sel(int unsigned k, int unsigned x, int unsigned lane);
    int unsigned port = lane / W, w = lane % W;
    if (lane >= A * W) return (k + lane) % XP_PORTS;
    if (x < A) return ((port + A * 8 - k % A) % A) * W + w;
    return ((port + A * 8 - (3 * k) % A - (x - A)) % A) * W + w;
  endfunction

  function automatic int unsigned src_lane(int unsigned k, int unsigned l);
    int unsigned o = l / (A * W), q = (l / W) % A, w = l % W;
    int unsigned i = (q + A * 8 - (3 * k) % A - o) % A;
    int unsigned p = (o + A * 8 - k % A) % A;
    return (i * A + p) * W + w;
  endfunction

  int unsigned pat [TF_PER_TC];
  int unsigned latch0 = 0;

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

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // the time-frames expected, counted from the 1PPS edge
  int unsigned n_tf = 0, n_applied = 0, n_tc_wrap = 0, n_host_update = 0, n_late = 0;
  int unsigned last_tf_cyc = 0;
  int          active_pat = -1;
  int unsigned check_at = 0;
  bit          check_due = 0;

  always @(posedge clk) begin
    if (rst_n && tf_start) begin
      int unsigned g;
      g = n_tf;
      check(tf_idx == TF_W'(g % TF_PER_TC) && tc_idx == TC_W'(g / TF_PER_TC),
            $sformatf("time-frame %0d: tf_idx %0d tc_idx %0d", g, tf_idx, tc_idx));
      check(sc_start == (g == 0) && !pps_slip && !pps_missing, "second flags");
      if (g > 0) begin
        check(cyc - last_tf_cyc == TICKS * CLK_PER_REF,
              $sformatf("time-frame length %0d cycles", cyc - last_tf_cyc));
        active_pat = int'(pat[g % TF_PER_TC]);
        n_applied++;
      end
      if (g > 0 && g % TF_PER_TC == 0) n_tc_wrap++;
      last_tf_cyc = cyc;
      n_tf++;
      check_at = cyc + 1;
      check_due = 1;
    end
    if (check_due && cyc == check_at) begin
      check_due = 0;
      if (cfg_late) n_late++;
      if (active_pat >= 0)
        for (int unsigned l = 0; l < LANES; l++)
          check(fab_out[l] == TOK_W'(src_lane(active_pat, l) + 1),
                $sformatf("pattern %0d: output lane %0d", active_pat, l));
    end
  end

  localparam int unsigned RUN_TF = TF_PER_TC + 6;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    latch0 = u_fabric.g_chip[0].u_chip.n_latch;   // a strobe edge at power-up is not counted
    for (int unsigned t = 0; t < TF_PER_TC; t++) load_row(t, t);
    // 10 MHz reference; 1PPS with the first rising edge of the run
    fork
      for (int unsigned r = 0; r < RUN_TF * TICKS + 2; r++) begin
        @(negedge clk);
        gps_10mhz = 1'b1;
        gps_1pps = (r == 0);
        repeat (CLK_PER_REF / 2) @(negedge clk);
        gps_10mhz = 1'b0;
        repeat (CLK_PER_REF / 2 - 1) @(negedge clk);
      end
      begin
        wait (tf_start && tf_idx == TF_W'(20));
        load_row(5, 77);
        n_host_update++;
      end
    join
    gps_1pps = 1'b0;
    repeat (20) @(negedge clk);
    check(locked, "not locked");
    check(n_tf == RUN_TF + 1, $sformatf("time-frames %0d, expected %0d", n_tf, RUN_TF + 1));
    check(n_applied == RUN_TF, "configurations applied");
    check(u_fabric.g_chip[0].u_chip.n_latch - latch0 == RUN_TF, "strobe falling edges");
    check(n_tc_wrap == 1, "time-cycle wrap");
    check(n_late == 0, "late configuration");
    check(n_host_update == 1, "host update");
    $display("mechanisms: applied=%0d tc_wrap=%0d host_update=%0d", n_applied, n_tc_wrap, n_host_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
