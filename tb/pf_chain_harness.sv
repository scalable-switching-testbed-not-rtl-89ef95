// pf_chain_harness: a chain of time-driven switches carrying two scheduled
// streams end to end, for the network testbenches.
//
// NODES switches, each a switch controller driving one or two crosspoint chip
// models (bit n of TWO_CHIP set: two chips), all locked to one shared GPS
// 1PPS / 10 MHz. Between node n and node n+1 a link delays the stream by
// HOP_TF[n] whole time-frames (a fibre whose length is a multiple of the
// time-frame). A source at node 0 plays the network interface: it sends flow
// A in time-frames 0 and 2 and flow B in time-frames 1 and 3 of every time
// cycle (4 and 5 stay idle), only inside each time-frame, leaving a guard of
// GUARD clocks at both ends. Every node's schedule is the source's, shifted by
// the delay D_n from the source to that node. A two-chip node splits the two
// flows onto two channels in its first chip and merges them back in the
// second; the last node sends flow A to receiver 1 and flow B to receiver 2.
//
// Checked: every token reaching a receiver belongs to that receiver's flow
// and arrives in sequence; nothing is lost (all sent tokens arrive); every
// node applies its configuration in every time-frame (strobe edges counted).
// The tokens are never stored inside a node: only the links delay them.
module pf_chain_harness #(
  parameter int unsigned NODES    = 2,
  parameter bit [7:0]    TWO_CHIP = 8'b0000_0001,
  parameter int unsigned HOP_TF [8] = '{10, 10, 10, 10, 10, 10, 10, 10},
  parameter int unsigned SEND_TC  = 4           // time cycles of traffic
) (
  output int checks,
  output int failures,
  output bit done
);
  import tds_pkg::*;

  localparam int unsigned TF_PER_TC = 6, TC_PER_SC = 2, TICKS = 10;
  localparam int unsigned REF_HZ = TICKS * TF_PER_TC * TC_PER_SC;
  localparam int unsigned CLK_PER_REF = 4;
  localparam int unsigned TF_CLK = TICKS * CLK_PER_REF;   // 40 clocks per time-frame
  localparam int unsigned XP_PORTS = 4, NUM_XP = 2, SEL_W = 2, TF_W = 3, TC_W = 1;
  localparam int unsigned IDLE = 3;                      // input with nothing connected
  localparam int unsigned GUARD = 8;
  localparam int unsigned TOK_W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic gps_10mhz = 1'b0, gps_1pps = 1'b0;

  // delay from the source to node n, in time-frames
  function automatic int unsigned d_of(int unsigned n);
    int unsigned d = 0;
    for (int unsigned h = 0; h < n; h++) d += HOP_TF[h];
    return d;
  endfunction

  // flow carried in time-frame u at node n: 1 = A, 2 = B, 0 = idle
  function automatic int unsigned flow_at(int unsigned n, int unsigned u);
    int unsigned s = (u + TF_PER_TC * 64 - d_of(n) % TF_PER_TC) % TF_PER_TC;
    return (s == 0 || s == 2) ? 1 : (s == 1 || s == 3) ? 2 : 0;
  endfunction

  // input selected by output o of chip c (0 first, 1 second) of node n in time-frame u
  function automatic int unsigned sel_of(int unsigned n, int unsigned c, int unsigned o, int unsigned u);
    int unsigned f = flow_at(n, u);
    bit last = (n == NODES - 1);
    if (TWO_CHIP[n] && !last) begin
      if (c == 0) return (o == 0 && f == 1) || (o == 1 && f == 2) ? 0 : IDLE;
      return (o == 0 && f == 1) ? 0 : (o == 0 && f == 2) ? 1 : IDLE;
    end
    if (c != 0) return IDLE;
    if (last) return (o == 0 && f == 1) || (o == 1 && f == 2) ? 0 : IDLE;
    return (o == 0 && f != 0) ? 0 : IDLE;
  endfunction

  logic [TOK_W-1:0] node_in  [NODES];
  logic [TOK_W-1:0] node_out [NODES];
  logic [TOK_W-1:0] rx1, rx2;

  logic                         cfg_we = 1'b0;
  logic [TF_W-1:0]              cfg_tf = '0;
  logic [SEL_W-1:0]             cfg_out = '0;
  logic [NUM_XP-1:0][SEL_W-1:0] cfg_data [NODES];
  int unsigned n_strobe [NODES];
  logic [NODES-1:0] locked_v;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    logic [SEL_W-1:0]             xp_addr;
    logic [NUM_XP-1:0][SEL_W-1:0] xp_data;
    logic xp_wr, xp_strobe, locked, tf_start, sc_start, pps_slip, pps_missing, cfg_late;
    logic [TF_W-1:0] tf_idx;
    logic [TC_W-1:0] tc_idx;
    logic [XP_PORTS-1:0][TOK_W-1:0] a_in, a_out, b_in, b_out;

    tds_switch_controller #(
      .REF_HZ(REF_HZ), .TF_PER_TC(TF_PER_TC), .TC_PER_SC(TC_PER_SC),
      .NUM_XP(NUM_XP), .XP_PORTS(XP_PORTS)
    ) u_ctrl (
      .clk, .rst_n, .gps_10mhz, .gps_1pps,
      .cfg_we, .cfg_tf, .cfg_out, .cfg_lane_en(2'b11), .cfg_data(cfg_data[n]),
      .xp_addr, .xp_data, .xp_wr, .xp_strobe,
      .locked, .tf_start, .sc_start, .tf_idx, .tc_idx, .pps_slip, .pps_missing, .cfg_late);

    xp_chip_model #(.PORTS(XP_PORTS), .SEL_W(SEL_W), .TOK_W(TOK_W)) u_a (
      .clk, .xp_addr, .xp_data(xp_data[0]), .xp_wr, .xp_strobe, .din(a_in), .dout(a_out));
    xp_chip_model #(.PORTS(XP_PORTS), .SEL_W(SEL_W), .TOK_W(TOK_W)) u_b (
      .clk, .xp_addr, .xp_data(xp_data[1]), .xp_wr, .xp_strobe, .din(b_in), .dout(b_out));

    always_comb begin
      a_in = '0;
      a_in[0] = node_in[n];
      b_in = '0;
      b_in[0] = a_out[0];
      b_in[1] = a_out[1];
      node_out[n] = (TWO_CHIP[n] && n != NODES - 1) ? b_out[0] : a_out[0];
    end

    always @(negedge xp_strobe) if (rst_n) n_strobe[n]++;
    assign locked_v[n] = locked;

    // link to the next node: exactly HOP_TF[n] time-frames
    if (n < NODES - 1) begin : g_link
      localparam int unsigned L = HOP_TF[n] * TF_CLK;
      logic [TOK_W-1:0] line [L];
      int unsigned ptr = 0;
      initial for (int i = 0; i < int'(L); i++) line[i] = '0;
      always @(posedge clk) begin
        node_in[n + 1] <= line[ptr];
        line[ptr] <= node_out[n];
        ptr <= (ptr == L - 1) ? 0 : ptr + 1;
      end
    end else begin : g_rx
      assign rx1 = a_out[0];
      assign rx2 = a_out[1];
    end
  end

  initial for (int n = 1; n < int'(NODES); n++) node_in[n] = '0;
  initial for (int n = 0; n < int'(NODES); n++) n_strobe[n] = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ------------------------------------------------------------ GPS and source
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  bit          pps_seen = 0;
  int unsigned c_first = 0;          // cycle of the first 1PPS edge
  int unsigned sent [3] = '{0, 0, 0};
  int unsigned got  [3] = '{0, 0, 0};

  // source: from the second time cycle on, for SEND_TC time cycles, tokens of
  // the flow scheduled in each time-frame, inside the guard interval
  always @(negedge clk) begin
    node_in[0] = '0;
    if (pps_seen) begin
      int unsigned k, tf_abs, pos, f;
      k = cyc - c_first;
      tf_abs = k / TF_CLK;
      pos = k % TF_CLK;
      f = flow_at(0, tf_abs % TF_PER_TC);
      if (tf_abs >= TF_PER_TC && tf_abs < TF_PER_TC * (1 + SEND_TC) &&
          f != 0 && pos >= GUARD && pos < TF_CLK - GUARD) begin
        node_in[0] = TOK_W'(16'h8000 | ((f - 1) << 14) | (sent[f] & 16'h3fff));
        sent[f]++;
      end
    end
  end

  // receivers
  always @(posedge clk) if (rst_n) begin
    if (rx1 != '0) begin
      check(rx1[15:14] == 2'b10 && rx1[13:0] == 14'(got[1]),
            $sformatf("receiver 1 got %h, expected flow A token %0d", rx1, got[1]));
      got[1]++;
    end
    if (rx2 != '0) begin
      check(rx2[15:14] == 2'b11 && rx2[13:0] == 14'(got[2]),
            $sformatf("receiver 2 got %h, expected flow B token %0d", rx2, got[2]));
      got[2]++;
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int n = 0; n < int'(NODES); n++) cfg_data[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load every node's schedule
    for (int unsigned u = 0; u < TF_PER_TC; u++)
      for (int unsigned o = 0; o < XP_PORTS; o++) begin
        @(negedge clk);
        cfg_we = 1; cfg_tf = TF_W'(u); cfg_out = SEL_W'(o);
        for (int unsigned n = 0; n < NODES; n++)
          for (int unsigned c = 0; c < NUM_XP; c++) cfg_data[n][c] = SEL_W'(sel_of(n, c, o, u));
      end
    @(negedge clk);
    cfg_we = 0;
    // shared GPS: 10 MHz-like reference, 1PPS on time every REF_HZ cycles
    for (int unsigned r = 0; ; r++) begin
      @(negedge clk);
      gps_10mhz = 1'b1;
      gps_1pps = (r % REF_HZ == 0);
      if (r == 0) begin
        c_first = cyc;
        pps_seen = 1;
      end
      repeat (CLK_PER_REF / 2) @(negedge clk);
      gps_10mhz = 1'b0;
      gps_1pps = 1'b0;
      repeat (CLK_PER_REF / 2 - 1) @(negedge clk);
      if (r == ((1 + SEND_TC) * TF_PER_TC + d_of(NODES - 1) + 2) * TICKS) begin
        check(&locked_v, "a node did not lock");
        check(sent[1] > 0 && sent[2] > 0, "no traffic sent");
        check(got[1] == sent[1], $sformatf("flow A: sent %0d, received %0d", sent[1], got[1]));
        check(got[2] == sent[2], $sformatf("flow B: sent %0d, received %0d", sent[2], got[2]));
        for (int n = 0; n < int'(NODES); n++)
          check(n_strobe[n] > 0, $sformatf("node %0d never applied a configuration", n));
        $display("delivered: flow A %0d of %0d, flow B %0d of %0d tokens through %0d nodes, %0d time-frames of link delay",
                 got[1], sent[1], got[2], sent[2], NODES, d_of(NODES - 1));
        done = 1;
      end
    end
  end
endmodule
