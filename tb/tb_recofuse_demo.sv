// tb_recofuse_demo: replays the two attack demonstrations of the original
// evaluation on the whole system, with the clock slowed to 10 clocks per
// millisecond (every ratio of the defaults kept: 64 ms steps, 640 ms limit).
//
// Time-out demonstration: after reset sysctrl loads RM1 at 64 ms, then RM2
// and RM3 one step each, then RM4, which is then kept (replacement
// suppressed). The timer restarts at every load, never passes 63 ms while
// modules change, and the time-out fuse must fire when the timer reaches
// 640 ms after RM4 became active, inside a 960 ms window.
//
// Replay demonstration: the load sequence RM1 RM2 RM3 RM2 RM3 RM4 gives
// counts (1,2,2,1), which the shift window cuts to (0,1,1,0); seven further
// loads of RM1 follow. The replay fuse must stay quiet up to distance 6 and
// fire at the 13th load with the counters at (7,1,1,0). The recorded replay
// trace has the same 13 loads (six, then seven of RM1), spread over 15 steps.
module tb_recofuse_demo;
  import recofuse_pkg::*;
  import bitfile_pkg::*;

  localparam int N    = 4;
  localparam int TICK = 10;
  localparam int STEP = 64 * TICK;
  localparam int TO   = 640;
  localparam logic [N-1:0][31:0] BASE = {32'h1030_0000, 32'h1020_0000,
                                         32'h1010_0000, 32'h1000_0000};

  logic clk = 1'b0, rst = 1'b1;
  logic fi_hold = 1'b0, fi_fixed = 1'b1;
  logic [1:0] fi_id = 2'd0;
  logic [N-1:0] prc_hw_trigger;
  logic trig_valid;
  logic [1:0] trig_id;
  axi_ar_t prc_ar, mem_ar;
  axi_r_t  prc_r, mem_r;
  logic prc_arvalid, prc_arready, prc_rvalid, prc_rready;
  logic mem_arvalid, mem_arready, mem_rvalid, mem_rready;
  icap_wr_t prc_icap_wr, icap_wr;
  logic [31:0] prc_icap_o;
  logic [31:0] icap_o = 32'h0;
  logic prc_decouple;
  logic cfg_wr = 1'b0, cfg_rd = 1'b0, cfg_addr = 1'b0;
  logic [N_RCF-1:0] cfg_wdata = '0, cfg_rdata, error_slots;
  logic error, rp_active, rm_unknown, reconf_start, reconf_done;
  logic [9:0] timer;
  logic [N-1:0][2:0] rm_count;
  logic [2:0] rm_distance;
  int words_to_icap, reconfigs;
  int checks = 0, failures = 0;
  int cyc = 0;

  recofuse_top #(.TICK_CYCLES(TICK), .STEP_CYCLES(STEP), .TIMEOUT(TO)) dut (.*);

  prc_model #(.N_RM(N), .BS_ADDR(BASE)) u_prc (
    .clk(clk), .rst(rst), .hw_trigger(prc_hw_trigger),
    .ar(prc_ar), .arvalid(prc_arvalid), .arready(prc_arready),
    .r(prc_r), .rvalid(prc_rvalid), .rready(prc_rready),
    .icap(prc_icap_wr), .decouple(prc_decouple),
    .words_to_icap(words_to_icap), .reconfigs(reconfigs));

  axi_mem_model u_mem (
    .clk(clk), .rst(rst), .ar(mem_ar), .arvalid(mem_arvalid), .arready(mem_arready),
    .r(mem_r), .rvalid(mem_rvalid), .rready(mem_rready));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0d ms", what, cyc / TICK); end
  endtask

  // highest timer value while modules keep changing
  int timer_peak = 0;
  bit holding = 1'b0;
  always @(posedge clk)
    if (!rst && !holding && int'(timer) > timer_peak) timer_peak = int'(timer);

  task automatic do_reset();
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
  endtask

  // force the next replacement to module id and wait for it to be issued
  task automatic next_load(input int id);
    fi_id = 2'(id);
    @(posedge clk);
    while (!trig_valid) @(posedge clk);
    #1;
  endtask

  initial begin
    int t_rm4, t_err;
    for (int i = 0; i < N; i++) begin
      bitfile_t b;
      b = make_bitfile(32'h0040_0000, 40 + 8 * i, 1'b1);
      u_prc.bs_words[i] = b.w.size();
      foreach (b.w[j]) u_mem.put(BASE[i] + 32'(4 * j), b.w[j]);
    end

    // ---- time-out demonstration ----
    do_reset();
    next_load(0);
    check(cyc / TICK >= 64 && cyc / TICK <= 65, "RM1 loaded after 64 ms");
    next_load(1);
    next_load(2);
    next_load(3);
    fi_hold = 1'b1;
    holding = 1'b1;
    // RM4 becomes active once its reconfiguration is done
    while (!reconf_done) begin @(posedge clk); #1; end
    while (!rp_active) begin @(posedge clk); #1; end
    t_rm4 = cyc;
    check(timer_peak == 63 || timer_peak == 64, $sformatf("timer peak %0d while modules change", timer_peak));
    t_err = -1;
    while (t_err < 0 && cyc < 960 * TICK + 10) begin
      @(posedge clk); #1;
      if (error) t_err = cyc;
      if (t_err < 0 && int'(timer) < TO) check(error_slots == '0, "quiet before expiry");
    end
    check(t_err > 0, "time-out fuse fires inside the 960 ms window");
    check(int'(timer) == TO, "timer reached 640");
    check((t_err - t_rm4) / TICK == TO, $sformatf("expiry %0d ms after RM4", (t_err - t_rm4) / TICK));
    check(error_slots == 2'b01, "only the time-out fuse fired");
    $display("time-out demo: RM4 active at %0d ms, error at %0d ms", t_rm4 / TICK, t_err / TICK);

    // ---- replay demonstration ----
    fi_hold = 1'b0;
    holding = 1'b0;
    do_reset();
    begin
      int seq[6] = '{0, 1, 2, 1, 2, 3};
      foreach (seq[k]) begin
        next_load(seq[k]);
        repeat (STEP / 2) @(posedge clk);
        #1;
      end
    end
    check(rm_count[0] == 0 && rm_count[1] == 1 && rm_count[2] == 1 && rm_count[3] == 0,
          "(1,2,2,1) cut to (0,1,1,0)");
    for (int k = 7; k <= 13; k++) begin
      next_load(0);
      repeat (STEP / 2) @(posedge clk);
      #1;
      check(error_slots[RCF_REPLAY] == (k == 13), $sformatf("replay fuse after step %0d", k));
    end
    check(rm_count[0] == 7 && rm_count[1] == 1 && rm_count[2] == 1 && rm_count[3] == 0,
          "counters (7,1,1,0) at the error");
    check(error_slots == 2'b10 && error == 1'b1, "only the replay fuse fired");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * STEP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
