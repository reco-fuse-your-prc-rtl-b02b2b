// tb_sysctrl: self-checking test of the system controller.
//
// Runs with a short time step (STEP_CYCLES=20). Checks that a trigger comes
// exactly every time step, is one-hot and agrees with trig_id, that every
// round of N_RM triggers loads every module exactly once, that a module
// follows itself only across a round boundary, that the order is not fixed
// (several different rounds occur). Then checks the two fault-injection
// inputs: fi_hold stops all triggers, fi_fixed makes every trigger name
// fi_id.
module tb_sysctrl;
  localparam int N = 4;
  localparam int STEP = 20;
  logic clk = 1'b0, rst = 1'b1;
  logic fi_hold = 1'b0, fi_fixed = 1'b0;
  logic [1:0] fi_id = 2'd2;
  logic [N-1:0] hw_trigger;
  logic trig_valid;
  logic [1:0] trig_id;
  int checks = 0, failures = 0;
  int hist[N];
  int cyc = 0, last_trig = 0, n_trig = 0, cur = 0;
  logic [N-1:0] round_mask = '0;
  int round_code = 0, n_repeat = 0;
  bit round_seen[int];

  sysctrl #(.N_RM(N), .STEP_CYCLES(STEP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    #1;
    if (!rst && trig_valid) begin
      check(hw_trigger == N'(1) << trig_id, "one-hot trigger matches id");
      if (!fi_fixed) begin
        if (int'(trig_id) == cur && n_trig != 0) begin
          n_repeat++;
          check(n_trig % N == 0, "a module follows itself only across rounds");
        end
        check(cyc - last_trig == STEP || n_trig == 0, "one trigger per time step");
        check(!round_mask[trig_id], "each module once per round");
        round_mask[trig_id] = 1'b1;
        round_code = round_code * N + int'(trig_id);
        if (n_trig % N == N - 1) begin
          check(round_mask == '1, "round complete");
          round_seen[round_code] = 1'b1;
          round_mask = '0;
          round_code = 0;
        end
      end else begin
        check(trig_id == fi_id, "fixed choice under fault injection");
      end
      hist[trig_id]++;
      cur = int'(trig_id);
      last_trig = cyc;
      n_trig++;
    end else if (!rst) begin
      check(hw_trigger == '0, "no trigger between steps");
    end
  end

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (STEP * 1200 + 2) @(posedge clk);
    #1;
    check(n_trig == 1200, $sformatf("trigger count %0d", n_trig));
    for (int i = 0; i < N; i++)
      check(hist[i] == 300, $sformatf("uniform use: RM%0d %0d times", i + 1, hist[i]));
    check(round_seen.num() >= 12, $sformatf("random order: %0d distinct rounds", round_seen.num()));
    check(n_repeat < 100, $sformatf("few repeats: %0d", n_repeat));
    fi_hold = 1'b1;
    n0 = n_trig;
    repeat (STEP * 10) @(posedge clk);
    #1 check(n_trig == n0, "fi_hold suppresses replacement");
    fi_hold = 1'b0;
    fi_fixed = 1'b1;
    n0 = n_trig;
    repeat (STEP * 10) @(posedge clk);
    #1 check(n_trig - n0 == 10, "fi_fixed keeps triggering");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (STEP * 1300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
