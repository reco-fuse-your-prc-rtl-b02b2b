// tb_recofuse_top_full: the end-to-end test with the top at its default
// parameters: 100 MHz clock, 1 ms ticks, 64 ms time steps, a 640 ms
// time-out, four modules and a distance limit of 6. About 170 million
// clocks; see top_harness for the phases and checks.
module tb_recofuse_top_full;
  int checks, failures;
  bit done;

  top_harness #(.FULL(1'b1), .N_NORMAL(8)) u_h (.checks(checks), .failures(failures), .done(done));

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4_000_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
