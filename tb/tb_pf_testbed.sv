// tb_pf_testbed: the two-switch testbed. The first switch has two crosspoint
// chips: the first splits the two scheduled video flows onto two channels,
// the second merges them back onto one channel. A 25 km fibre, taken here as
// exactly 10 time-frames of delay (about 5 us/km, 125 us), leads to the second
// switch, whose single chip sends each flow to its own receiver. Passes if
// every token reaches the right receiver, in order, with none lost.
module tb_pf_testbed;
  int checks, failures;
  bit done;

  pf_chain_harness #(.NODES(2), .TWO_CHIP(8'b0000_0001),
                     .HOP_TF('{10, 0, 0, 0, 0, 0, 0, 0}), .SEND_TC(4)) u_net (
    .checks, .failures, .done);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
