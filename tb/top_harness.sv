// top_harness: end-to-end test of recofuse_top with behavioural PRC and
// bitfile memory, shared by the reduced and the full-size testbench.
//
// FULL=0 runs the top with a 10-clock tick (time step 640 clocks, time-out
// 6400 clocks): every ratio of the default configuration is kept, only the
// clock is slower. FULL=1 instantiates the top with no parameter override,
// i.e. 1 ms ticks and 64 ms steps at 100 MHz.
//
// Phases, as in the original demonstration:
//   1. normal operation: sysctrl swaps a random module every step for
//      N_NORMAL steps; no fuse may fire;
//   2. replay attack: sysctrl's choice is forced to RM1; the replay fuse must
//      fire at the load that makes the load-count distance exceed 6, as
//      computed here from the triggers actually issued;
//   3. mode switch: the replay slot is disabled by the configuration
//      register, which must clear the error output, and enabled again;
//   4. time-out attack: replacements are suppressed; the time-out fuse must
//      fire TIMEOUT ticks after the partition became active, to the clock.
// Each mechanism (reconfiguration, decouple, timer advance, counter cut,
// both fuse errors, mode switch) is counted and must occur at least once.
module top_harness
  import recofuse_pkg::*;
#(
  parameter bit FULL     = 1'b0,
  parameter int N_NORMAL = 40
) (
  output int checks,
  output int failures,
  output bit done
);
  import bitfile_pkg::*;

  localparam int N    = 4;
  localparam int TICK = FULL ? 100_000 : 10;
  localparam int STEP = 64 * TICK;
  localparam int TO   = 640;
  localparam logic [N-1:0][31:0] BASE = {32'h1030_0000, 32'h1020_0000,
                                         32'h1010_0000, 32'h1000_0000};
  localparam logic [31:0] FAR = 32'h0040_0000;

  logic clk = 1'b0, rst = 1'b1;
  logic fi_hold = 1'b0, fi_fixed = 1'b0;
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

  if (FULL) begin : g_dut
    recofuse_top u_top (.*);
  end else begin : g_dut
    recofuse_top #(.TICK_CYCLES(TICK), .STEP_CYCLES(STEP), .TIMEOUT(TO)) u_top (.*);
  end

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---- mechanism counters and reference model -------------------------
  int cyc = 0;
  int n_reconf = 0, n_decouple = 0, n_tick = 0, n_cut = 0;
  int n_err_timeout = 0, n_err_replay = 0, n_mode_switch = 0, n_icap = 0;
  int h[N];
  int prev_sum = 0, prev_timer = 0;
  logic prev_dec = 1'b0, prev_e0 = 1'b0, prev_e1 = 1'b0;
  int active_since = 0;
  logic prev_active = 1'b0;

  function automatic int hdist();
    int mx = h[0], mn = h[0];
    foreach (h[i]) begin
      if (h[i] > mx) mx = h[i];
      if (h[i] < mn) mn = h[i];
    end
    return mx - mn;
  endfunction

  always @(posedge clk) begin
    int s;
    cyc <= cyc + 1;
    if (!rst) begin
      s = 0;
      for (int i = 0; i < N; i++) s += int'(rm_count[i]);
      if (s < prev_sum) n_cut++;
      prev_sum = s;
      if (int'(timer) > prev_timer) n_tick++;
      prev_timer = int'(timer);
      if (reconf_done) n_reconf++;
      if (prc_decouple && !prev_dec) n_decouple++;
      prev_dec = prc_decouple;
      if (error_slots[RCF_TIMEOUT] && !prev_e0) n_err_timeout++;
      if (error_slots[RCF_REPLAY] && !prev_e1) n_err_replay++;
      prev_e0 = error_slots[RCF_TIMEOUT];
      prev_e1 = error_slots[RCF_REPLAY];
      if (!icap_wr.csib && !icap_wr.rdwrb) n_icap++;
      if (rp_active && !prev_active) active_since = cyc;
      prev_active = rp_active;
      if (trig_valid) h[trig_id]++;
    end
  end

  // ---- stimulus ---------------------------------------------------------
  task automatic cfg_write(input logic [N_RCF-1:0] d);
    @(posedge clk); #1;
    cfg_wr = 1'b1; cfg_addr = 1'b0; cfg_wdata = d;
    @(posedge clk); #1;
    cfg_wr = 1'b0;
    n_mode_switch++;
  endtask

  task automatic wait_trigger();
    @(posedge clk);
    while (!trig_valid) @(posedge clk);
  endtask

  initial begin
    int rise;
    bit expect_err;
    checks = 0; failures = 0; done = 1'b0;
    foreach (h[i]) h[i] = 0;
    for (int i = 0; i < N; i++) begin
      bitfile_t b;
      b = make_bitfile(FAR, 40 + 8 * i, 1'b1);
      u_prc.bs_words[i] = b.w.size();
      foreach (b.w[j]) u_mem.put(BASE[i] + 32'(4 * j), b.w[j]);
    end
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;

    // 1. normal operation
    for (int k = 0; k < N_NORMAL; k++) begin
      wait_trigger();
      check(error == 1'b0, "no error in normal operation");
    end
    // let the last reconfiguration finish
    repeat (STEP / 2) @(posedge clk);
    #1;
    check(error == 1'b0 && error_slots == '0, "normal operation leaves fuses intact");
    check(int'(rm_distance) == hdist(), $sformatf("RM distance %0d vs %0d", rm_distance, hdist()));
    $display("normal phase: loads per RM %0d %0d %0d %0d", h[0], h[1], h[2], h[3]);

    // 2. replay attack: always RM1
    fi_fixed = 1'b1; fi_id = 2'd0;
    expect_err = 1'b0;
    while (!expect_err) begin
      wait_trigger();
      // h is updated at this edge; the load reaches the fuse a few hundred
      // clocks later
      #1 expect_err = hdist() > 6;
      check(error_slots[RCF_REPLAY] == 1'b0, "replay fuse quiet before the offending load");
      repeat (STEP / 2) @(posedge clk);
      #1;
      check(error_slots[RCF_REPLAY] == expect_err,
            $sformatf("replay fuse after load (distance %0d)", hdist()));
    end
    check(error == 1'b1, "error output raised by replay fuse");
    check(rm_count[0] == 3'd7, "MFU counter at 7 when the fuse fires");

    // 3. mode switch: disable slot 1, error output drops; enable again
    cfg_write(2'b01);
    repeat (2) @(posedge clk);
    #1 check(error == 1'b0, "disabled slot no longer raises error");
    cfg_write(2'b11);
    foreach (h[i]) h[i] = 0;
    fi_fixed = 1'b0;
    wait_trigger();

    // 4. time-out attack: no more replacements
    fi_hold = 1'b1;
    rise = -1;
    while (rise < 0) begin
      @(posedge clk); #1;
      if (error_slots[RCF_TIMEOUT]) rise = cyc;
      if (cyc - active_since > TO * TICK + 100) break;
    end
    check(rise >= 0, "time-out fuse fires");
    // active_since is the index of the first clock edge that saw rp_active,
    // rise is counted after the edge that raised error: TO*TICK edges later
    check(rise - active_since == TO * TICK + 1,
          $sformatf("time-out %0d clocks after RP became active (expected %0d)",
                    rise - active_since, TO * TICK + 1));
    check(int'(timer) == TO, "timer stands at TIMEOUT");
    @(posedge clk); #1;
    check(error == 1'b1, "error output raised by time-out fuse");

    // every mechanism happened
    check(n_reconf > 0, "reconfigurations");
    check(n_decouple > 0, "decouple");
    check(n_tick > 0, "timer advance");
    check(n_cut > 0, "shift-window cut");
    check(n_err_replay == 1, "replay error");
    check(n_err_timeout == 1, "time-out error");
    check(n_mode_switch == 2, "mode switch");
    check(n_icap == words_to_icap, "ICAP pass-through");
    check(rm_unknown == 1'b0, "all bitfiles identified");
    $display("reconfigurations %0d, decouples %0d, timer ticks %0d, cuts %0d, fuse errors %0d/%0d, mode switches %0d, ICAP words %0d",
             n_reconf, n_decouple, n_tick, n_cut, n_err_timeout, n_err_replay, n_mode_switch, n_icap);
    done = 1'b1;
  end
endmodule
