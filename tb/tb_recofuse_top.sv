// tb_recofuse_top: end-to-end test of the protected system at a reduced
// clock-to-millisecond ratio (10 clocks per tick); see top_harness for the
// phases and checks.
module tb_recofuse_top;
  int checks, failures;
  bit done;

  top_harness #(.FULL(1'b0), .N_NORMAL(40)) u_h (.checks(checks), .failures(failures), .done(done));

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
