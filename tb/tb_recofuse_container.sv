// tb_recofuse_container: self-checking test of the ReCoFuse Container with
// behavioural PRC and bitfile memory around it.
//
// Short time base (TICK_CYCLES=4, TIMEOUT=100 ticks). The testbench triggers
// the PRC model itself. Checked:
//   - pass-through: every word reaching the ICAP primitive is the word of
//     the requested bitfile, in order;
//   - uniform reconfiguration in time raises no error, and the RM counters
//     keep the distances of the testbench's own load counts;
//   - replay attack (one RM loaded again and again): slot 1 and the OR'd
//     error rise at the load that makes the count distance exceed 6;
//   - with slot 1 disabled by the configuration register the same attack
//     raises nothing; STATUS read-back shows the slot errors;
//   - time-out attack (no trigger): slot 0 fires TIMEOUT ticks after the end
//     of the last reconfiguration; disabling slot 0 clears the error output.
module tb_recofuse_container;
  import recofuse_pkg::*;
  import bitfile_pkg::*;

  localparam int N = 4;
  localparam int TICK = 4;
  localparam int TO = 100;
  localparam logic [N-1:0][31:0] BASE = {32'h1030_0000, 32'h1020_0000,
                                         32'h1010_0000, 32'h1000_0000};
  localparam logic [31:0] FAR = 32'h0040_0000;

  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] trig = '0;
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
  logic [$clog2(TO+1)-1:0] timer;
  logic [N-1:0][2:0] rm_count;
  logic [2:0] rm_distance;
  int words_to_icap, reconfigs;
  int checks = 0, failures = 0;
  int h[N];
  logic [31:0] expect_q[$];
  bitfile_t bf[N];

  recofuse_container #(.N_RM(N), .TICK_CYCLES(TICK), .TIMEOUT(TO)) dut (.*);

  prc_model #(.N_RM(N), .BS_ADDR(BASE)) u_prc (
    .clk(clk), .rst(rst), .hw_trigger(trig),
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
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int hdist();
    int mx = h[0], mn = h[0];
    foreach (h[i]) begin
      if (h[i] > mx) mx = h[i];
      if (h[i] < mn) mn = h[i];
    end
    return mx - mn;
  endfunction

  // ICAP primitive side: words must arrive as expected
  always @(posedge clk) begin
    if (!icap_wr.csib && !icap_wr.rdwrb) begin
      if (expect_q.size() == 0) check(1'b0, "unexpected ICAP word");
      else check(icap_wr.data == expect_q.pop_front(), "ICAP word passes through");
    end
  end

  // one reconfiguration of RM id, waits until the PRC is done
  task automatic reconfigure(input int id);
    int r0;
    r0 = reconfigs;
    foreach (bf[id].w[j]) expect_q.push_back(bf[id].w[j]);
    trig[id] = 1'b1;
    @(posedge clk); #1;
    trig = '0;
    while (reconfigs == r0) begin @(posedge clk); #1; end
    repeat (6) @(posedge clk);
    #1;
    h[id]++;
  endtask

  task automatic cfg_write(input logic [N_RCF-1:0] d);
    cfg_wr = 1'b1; cfg_addr = 1'b0; cfg_wdata = d;
    @(posedge clk); #1;
    cfg_wr = 1'b0;
  endtask

  task automatic do_reset();
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    foreach (h[i]) h[i] = 0;
  endtask

  initial begin
    int perm[N];
    int t0, rise;
    for (int i = 0; i < N; i++) begin
      bf[i] = make_bitfile(FAR, 30 + 10 * i, 1'b1);
      u_prc.bs_words[i] = bf[i].w.size();
      foreach (bf[i].w[j]) u_mem.put(BASE[i] + 32'(4 * j), bf[i].w[j]);
    end
    do_reset();

    // uniform, in-time reconfiguration
    for (int r = 0; r < 10; r++) begin
      foreach (perm[i]) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, t;
        j = $urandom_range(i);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      foreach (perm[i]) begin
        reconfigure(perm[i]);
        check(error == 1'b0, "no error in normal operation");
        for (int k = 1; k < N; k++)
          check(int'(rm_count[k]) - int'(rm_count[0]) == h[k] - h[0], "RM counters");
      end
    end
    check(expect_q.size() == 0, "all words reached ICAP");

    // replay attack on RM 2
    while (hdist() <= 6) begin
      check(error_slots[RCF_REPLAY] == 1'b0, "replay fuse quiet within distance");
      reconfigure(2);
    end
    check(error_slots[RCF_REPLAY] == 1'b1, "replay fuse fires");
    check(error == 1'b1, "error output set by replay fuse");
    cfg_rd = 1'b1; cfg_addr = 1'b1;
    @(posedge clk); #1;
    cfg_rd = 1'b0;
    check(cfg_rdata[RCF_REPLAY] == 1'b1, "STATUS shows replay fuse");

    // same attack with the replay fuse disabled
    do_reset();
    cfg_write(2'b01);
    for (int k = 0; k < 10; k++) reconfigure(1);
    check(error == 1'b0 && error_slots == '0, "disabled replay fuse stays quiet");
    cfg_write(2'b11);

    // time-out attack: no further trigger
    t0 = $time / 10;
    rise = -1;
    while (rise < 0 && ($time / 10) - t0 < TO * TICK + 50) begin
      @(posedge clk); #1;
      if (error_slots[RCF_TIMEOUT]) rise = $time / 10;
    end
    // the reconfigure task returned 6 clocks after the PRC finished;
    // rp_active rose about 3 clocks before that (DESYNC, then decouple low)
    check(rise > 0, "time-out fuse fires");
    check(rise - t0 >= TO * TICK - 10 && rise - t0 <= TO * TICK, $sformatf("time-out after %0d clocks", rise - t0));
    @(posedge clk); #1;
    check(error == 1'b1, "error output set by time-out fuse");
    cfg_write(2'b10);
    @(posedge clk); #1;
    check(error == 1'b0, "disabling the slot clears the error output");

    $display("reconfigurations %0d, words to ICAP %0d", reconfigs, words_to_icap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired: reconfigs %0d words %0d q %0d", reconfigs, words_to_icap, expect_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
