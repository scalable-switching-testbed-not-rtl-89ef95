// tb_pf_metro6: the six-node, 100 km metropolitan chain. Nodes 1, 3 and 5
// have two crosspoint chips (split and merge), nodes 2, 4 and 6 one (node 6
// delivers each flow to its receiver). Node 1 reaches node 2 over a short link
// taken as one time-frame; the four 25 km fibre segments between nodes 2 to 6
// are taken as 10 time-frames each. The two flows cross all six nodes without
// being stored in any of them; the test checks they arrive complete, in order
// and at the right receivers.
module tb_pf_metro6;
  int checks, failures;
  bit done;

  pf_chain_harness #(.NODES(6), .TWO_CHIP(8'b0001_0101),
                     .HOP_TF('{1, 10, 10, 10, 10, 0, 0, 0}), .SEND_TC(4)) u_net (
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
