// tb_ci_system_table1: the whole system at its default sizes, in the two
// pulse counts of the latency table: 20 pulses of 100 frames (34 ms fill,
// output delay at most 24 us), then, after a change of the registers, 40
// pulses of 10 frames (6.8 ms fill, output delay at most 33 us). The fill
// times are checked against N*M frames of 17 us within 2 %.
module tb_ci_system_table1;
  logic done;
  int checks, failures;

  ci_system_harness #(.N1(20), .M1(100), .LAT1(24.0), .N2(40), .M2(10), .LAT2(33.0),
                      .FRAMES_OUT(2)) h (.*);

  initial begin
    #60ms;
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
