// tb_xp_config_table: self-checking test of the crosspoint configuration table.
//
// A reduced table (3 chips, 6 outputs, 5 time-frames) is filled through the
// host port, then rewritten at random with random per-chip lane enables, while
// random reads are issued on the read port. A shadow array in the testbench
// predicts every read; a read result must appear one cycle after the request
// and hold while no read is requested.
module tb_xp_config_table;
  import tds_pkg::*;

  localparam int unsigned NUM_XP = 3, XP_PORTS = 6, TF_PER_TC = 5;
  localparam int unsigned SEL_W = 3, TF_W = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                         wr_en = 0, rd_en = 0;
  logic [TF_W-1:0]              wr_tf = '0, rd_tf = '0;
  logic [SEL_W-1:0]             wr_out = '0, rd_out = '0;
  logic [NUM_XP-1:0]            wr_lane_en = '0;
  logic [NUM_XP-1:0][SEL_W-1:0] wr_data = '0, rd_data;

  xp_config_table #(.NUM_XP(NUM_XP), .XP_PORTS(XP_PORTS), .TF_PER_TC(TF_PER_TC)) dut (
    .clk, .wr_en, .wr_tf, .wr_out, .wr_lane_en, .wr_data, .rd_en, .rd_tf, .rd_out, .rd_data);

  int checks = 0, failures = 0;
  logic [SEL_W-1:0] shadow [TF_PER_TC][XP_PORTS][NUM_XP];
  logic [NUM_XP-1:0][SEL_W-1:0] expect_q;
  bit have_read = 0;   // rd_data is undefined before the first read

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    // fill every entry
    for (int t = 0; t < TF_PER_TC; t++)
      for (int o = 0; o < XP_PORTS; o++) begin
        @(negedge clk);
        wr_en = 1; wr_tf = TF_W'(t); wr_out = SEL_W'(o); wr_lane_en = '1;
        for (int x = 0; x < NUM_XP; x++) begin
          wr_data[x] = SEL_W'((t * 7 + o * 3 + x * 5) % XP_PORTS);
          shadow[t][o][x] = wr_data[x];
        end
      end
    @(negedge clk);
    wr_en = 0;
    // random mix of reads and partial writes
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 2) == 0);
      wr_tf = TF_W'($urandom_range(0, TF_PER_TC - 1));
      wr_out = SEL_W'($urandom_range(0, XP_PORTS - 1));
      wr_lane_en = NUM_XP'($urandom);
      for (int x = 0; x < NUM_XP; x++) wr_data[x] = SEL_W'($urandom_range(0, XP_PORTS - 1));
      rd_en = ($urandom_range(0, 3) != 0);
      rd_tf = TF_W'($urandom_range(0, TF_PER_TC - 1));
      rd_out = SEL_W'($urandom_range(0, XP_PORTS - 1));
      // a read of the row being written returns the old contents
      if (rd_en) for (int x = 0; x < NUM_XP; x++) expect_q[x] = shadow[rd_tf][rd_out][x];
      if (rd_en) have_read = 1;
      if (wr_en)
        for (int x = 0; x < NUM_XP; x++) if (wr_lane_en[x]) shadow[wr_tf][wr_out][x] = wr_data[x];
      @(posedge clk);
      #1;
      if (have_read) check(rd_data == expect_q, $sformatf("read tf %0d out %0d: got %h expected %h",
                                           rd_tf, rd_out, rd_data, expect_q));
    end
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
