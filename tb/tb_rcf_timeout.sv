// tb_rcf_timeout: self-checking test of the time-out fuse.
//
// Runs with short ticks (TICK_CYCLES=4, TIMEOUT=10). A reference model in
// the testbench counts ticks of RP activity on its own and predicts the
// clock at which error must rise: the timer reaches TIMEOUT after
// TIMEOUT*TICK_CYCLES clocks of unbroken RP activity, and error follows one
// clock later. Checked: no error while reconfigurations come in time, the exact
// rise cycle when they stop, that error stays, that disabling clears it.
module tb_rcf_timeout;
  localparam int TICK = 4;
  localparam int TO   = 10;

  logic clk = 1'b0, rst = 1'b1, enable = 1'b1, rp_active = 1'b0;
  logic error;
  logic [$clog2(TO+1)-1:0] cnt;
  int checks = 0, failures = 0;
  int cyc = 0;

  rcf_timeout #(.TICK_CYCLES(TICK), .TIMEOUT(TO)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // keep the RP active for n clocks, then reconfigure for 3 clocks
  task automatic active_for(input int n);
    rp_active = 1'b1;
    repeat (n) begin
      @(posedge clk); #1;
      check(error == 1'b0, "no error while in time");
    end
    rp_active = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(cnt == 0, "reconfiguration clears timer");
  endtask

  initial begin
    int start, rise;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // reconfigurations in time, up to the last tick before expiry
    active_for(5);
    active_for(TO*TICK - 1);
    active_for(TO*TICK);
    active_for(17);
    // time-out attack: RP kept active
    rp_active = 1'b1;
    start = cyc;
    rise  = -1;
    repeat (TO*TICK + 10) begin
      @(posedge clk); #1;
      if (error && rise < 0) rise = cyc;
    end
    check(rise - start == TO*TICK + 1, $sformatf("error rises on time (%0d)", rise - start));
    check(32'(cnt) == TO, "timer stops at TIMEOUT");
    // bad state is kept even when reconfiguration resumes
    rp_active = 1'b0;
    repeat (5) @(posedge clk);
    #1 check(error == 1'b1, "bad state is sticky");
    // disabling the fuse clears it
    enable = 1'b0;
    @(posedge clk); #1;
    check(error == 1'b0 && cnt == 0, "disable clears fuse");
    enable = 1'b1;
    rp_active = 1'b1;
    repeat (TO*TICK) @(posedge clk);
    #1 check(error == 1'b0, "fresh start after enable");
    repeat (3) @(posedge clk);
    #1 check(error == 1'b1, "expires again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
