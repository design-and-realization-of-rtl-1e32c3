// tb_ci_system_full: one complete operation of the whole system at its
// default sizes in the largest configuration: 40 pulses of 100 frames each.
// The fill phase takes 4000 frames (68 ms of simulated time); then two
// integrated frames are checked, with the output delay limited to 33 us.
module tb_ci_system_full;
  logic done;
  int checks, failures;

  ci_system_harness #(.N1(40), .M1(100), .LAT1(33.0), .N2(0), .FRAMES_OUT(2)) h (.*);

  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
