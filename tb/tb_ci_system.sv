// tb_ci_system: end-to-end test of the whole system at its default sizes,
// with short runs: 3 pulses of 2 frames, then reconfigured to 20 pulses of
// one frame (output delay limit 24 us, the 20-pulse figure).
module tb_ci_system;
  logic done;
  int checks, failures;

  ci_system_harness #(.N1(3), .M1(2), .LAT1(24.0), .N2(20), .M2(1), .LAT2(24.0), .FRAMES_OUT(3)) h (.*);

  initial begin
    #20ms;
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
