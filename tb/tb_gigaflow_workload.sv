// tb_gigaflow_workload: the evaluation scenario, minimum-size frames at line
// rate through the three packet paths (Ethernet to Ethernet, Ethernet to
// MPLS, MPLS to Ethernet), with one and with four processing units.
//
// Two benches (gigaflow_wl_bench) run side by side, each with its own GigaFlow
// core, its own clock and its own processing-unit models; they differ only in
// the number of processing units. Each checks every forwarded frame and
// prints the forwarded packet rate per path; this module adds up their checks
// and failures. The cores are at their default sizes apart from NPPU.
module tb_gigaflow_workload;
  logic done1, done4;
  int   checks1, failures1, checks4, failures4;

  gigaflow_wl_bench #(.NPPU(1)) u_one  (.done(done1), .n_checks(checks1), .n_failures(failures1));
  gigaflow_wl_bench #(.NPPU(4)) u_four (.done(done4), .n_checks(checks4), .n_failures(failures4));

  initial begin
    #60ms;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks4, failures1 + failures4 + 1);
    $finish;
  end

  initial begin
    wait (done1 && done4);
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks4, failures1 + failures4);
    $finish;
  end
endmodule
