// tb_xp_config_writer: self-checking test of the configuration writer.
//
// The writer (2 chips, 5 outputs, 4 time-frames per cycle) reads from a
// table model filled with a known pattern and programs two crosspoint chip
// models. Time-frame starts are driven with gaps of at least XP_PORTS + 3
// cycles (enough) and with shorter gaps (too short). Checked: every bus write
// carries the next time-frame's row, in output order, one per output; the
// strobe falls the cycle after tf_start exactly when the previous time-frame
// had room for all writes, and the chips then hold the new time-frame's
// configuration; otherwise cfg_late pulses and the chips keep their previous
// configuration; the strobe is up XP_PORTS + 3 cycles after tf_start.
module tb_xp_config_writer;
  import tds_pkg::*;

  localparam int unsigned NUM_XP = 2, XP_PORTS = 5, TF_PER_TC = 4;
  localparam int unsigned SEL_W = 3, TF_W = 2;
  localparam int unsigned NEED = XP_PORTS + 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic                         tf_start = 0;
  logic [TF_W-1:0]              tf_idx = '0;
  logic                         rd_en;
  logic [TF_W-1:0]              rd_tf;
  logic [SEL_W-1:0]             rd_out;
  logic [NUM_XP-1:0][SEL_W-1:0] rd_data;
  logic [SEL_W-1:0]             xp_addr;
  logic [NUM_XP-1:0][SEL_W-1:0] xp_data;
  logic                         xp_wr, xp_strobe, busy, cfg_late;

  xp_config_writer #(.NUM_XP(NUM_XP), .XP_PORTS(XP_PORTS), .TF_PER_TC(TF_PER_TC)) dut (
    .clk, .rst_n, .tf_start, .tf_idx, .rd_en, .rd_tf, .rd_out, .rd_data,
    .xp_addr, .xp_data, .xp_wr, .xp_strobe, .busy, .cfg_late);

  // schedule pattern: input selected by output o of chip x in time-frame t
  function automatic logic [SEL_W-1:0] sel(int unsigned t, int unsigned o, int unsigned x);
    return SEL_W'((o + 2 * t + 3 * x + 1) % XP_PORTS);
  endfunction

  // table model with a one-cycle read
  always_ff @(posedge clk)
    if (rd_en) for (int x = 0; x < NUM_XP; x++) rd_data[x] <= sel(rd_tf, rd_out, x);

  logic [XP_PORTS-1:0][7:0] chip_in;
  logic [XP_PORTS-1:0][7:0] chip_out [NUM_XP];
  for (genvar x = 0; x < NUM_XP; x++) begin : g_chip
    xp_chip_model #(.PORTS(XP_PORTS), .SEL_W(SEL_W), .TOK_W(8)) u_chip (
      .clk, .xp_addr, .xp_data(xp_data[x]), .xp_wr, .xp_strobe,
      .din(chip_in), .dout(chip_out[x]));
  end
  always_comb for (int i = 0; i < XP_PORTS; i++) chip_in[i] = 8'(8'h40 + i);

  int checks = 0, failures = 0;
  int n_late = 0, n_applied = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // bus monitor: writes of the current sequence
  int unsigned wr_cnt = 0;
  int unsigned cur_next_tf = 0;
  always @(posedge clk) if (rst_n && xp_wr) begin
    check(xp_addr == SEL_W'(wr_cnt), $sformatf("write order: addr %0d, expected %0d", xp_addr, wr_cnt));
    for (int x = 0; x < NUM_XP; x++)
      check(xp_data[x] == sel(cur_next_tf, xp_addr, x),
            $sformatf("write data chip %0d out %0d tf %0d", x, xp_addr, cur_next_tf));
    wr_cnt++;
  end

  int active_tf = -1;   // time-frame whose configuration the chips hold
  bit started = 0;      // a write sequence has been started
  int unsigned latch0 = 0;

  // one time-frame: pulse tf_start, then wait gap cycles in total
  task automatic frame(input int unsigned t, input int unsigned gap, input bit prev_ok);
    @(negedge clk);
    tf_start = 1; tf_idx = TF_W'(t);
    @(posedge clk);
    check(xp_strobe == prev_ok, "strobe level at tf_start");
    @(negedge clk);
    tf_start = 0;
    check(xp_strobe == 1'b0, "strobe low after tf_start");
    check(cfg_late == (!prev_ok && started), "cfg_late");
    if (cfg_late) n_late++;
    if (prev_ok) begin
      active_tf = int'(t);
      n_applied++;
    end
    if (active_tf >= 0)
      for (int x = 0; x < NUM_XP; x++)
        for (int o = 0; o < XP_PORTS; o++)
          check(chip_out[x][o] == 8'(8'h40 + sel(active_tf, o, x)),
                $sformatf("chip %0d output %0d in tf %0d", x, o, t));
    // the new sequence
    if (started) check(wr_cnt == (prev_ok ? XP_PORTS : wr_cnt), "writes per time-frame");
    wr_cnt = 0;
    cur_next_tf = (t + 1) % TF_PER_TC;
    started = 1;
    for (int c = 2; c < int'(gap); c++) begin
      @(negedge clk);
      if (c == int'(XP_PORTS) + 2) check(xp_strobe == 1'b0, "strobe one cycle early");
      if (c == int'(XP_PORTS) + 3) check(xp_strobe == 1'b1, "strobe not up XP_PORTS+3 after tf_start");
    end
  endtask


  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    latch0 = g_chip[0].u_chip.n_latch;   // a strobe edge at power-up is not counted
    repeat (3) @(negedge clk);
    check(!xp_strobe && !xp_wr, "idle after reset");
    // first time-frame: nothing pending
    frame(0, NEED, 0);
    // enough room in every time-frame, across a time-cycle wrap
    for (int t = 1; t <= 6; t++) frame(t % TF_PER_TC, NEED + t, 1);
    // a time-frame one cycle too short: the next start is late
    frame(3, NEED - 1, 1);
    frame(0, NEED, 0);
    // a much too short time-frame in the middle of writing
    frame(1, 4, 1);
    frame(2, NEED, 0);
    frame(3, NEED, 1);
    frame(0, NEED, 1);
    check(n_late == 2, $sformatf("late starts %0d, expected 2", n_late));
    check(n_applied == 10, $sformatf("applied configurations %0d, expected 10", n_applied));
    check(g_chip[0].u_chip.n_latch - latch0 == 10, "strobe falling edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
