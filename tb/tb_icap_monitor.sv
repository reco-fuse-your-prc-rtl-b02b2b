// tb_icap_monitor: self-checking test of the RP_active derivation.
//
// Writes synthetic partial bitfiles to the ICAP tap with random idle gaps
// (chip select high) and interleaved read cycles that must be ignored.
// Frame data holds sync, CMD and DESYNC words, which must be skipped. The
// reference predicts rp_active from the known word positions: low from one
// clock after the sync word to one clock after the DESYNC value, and always
// low while decouple is high. Runs once with plain and once with bit-swapped
// words (two instances).
module tb_icap_monitor;
  import bitfile_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic csib = 1'b1, rdwrb = 1'b1;
  logic [31:0] data = '0, data_sw;
  logic decouple = 1'b0;
  logic rp_active, rp_active_sw;
  logic start, done, start_sw, done_sw;
  int checks = 0, failures = 0;
  int n_start = 0, n_done = 0;
  bit in_reconf = 1'b0;   // reference

  icap_monitor dut (
    .clk(clk), .rst(rst), .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i(data),
    .prc_decouple(decouple), .rp_active(rp_active),
    .reconf_start(start), .reconf_done(done));

  always_comb
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 8; k++) data_sw[8*b + k] = data[8*b + 7 - k];

  icap_monitor #(.ICAP_BITSWAP(1'b1)) dut_sw (
    .clk(clk), .rst(rst), .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i(data_sw),
    .prc_decouple(decouple), .rp_active(rp_active_sw),
    .reconf_start(start_sw), .reconf_done(done_sw));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // compare every clock with the reference
  always @(posedge clk) begin
    #2;
    if (!rst) begin
      check(rp_active == (!in_reconf && !decouple), "rp_active");
      check(rp_active_sw == rp_active, "bit-swapped instance agrees");
      if (start) n_start++;
      if (done) n_done++;
    end
  end

  task automatic send(input bitfile_t b);
    for (int i = 0; i < b.w.size(); i++) begin
      // idle or read cycles in between
      while ($urandom_range(3) == 0) begin
        csib  = $urandom_range(1);
        rdwrb = 1'b1;
        data  = $urandom;
        @(posedge clk); #1;
      end
      csib = 1'b0; rdwrb = 1'b0; data = b.w[i];
      @(posedge clk);
      // the reference changes one clock after the word is written
      if (i == b.sync_idx)   in_reconf <= 1'b1;
      if (i == b.desync_idx) in_reconf <= 1'b0;
      #1;
    end
    csib = 1'b1; rdwrb = 1'b1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    for (int r = 0; r < 20; r++) begin
      bitfile_t b;
      b = make_bitfile($urandom, 20 + $urandom_range(60), r % 2 == 0);
      decouple = (r % 3 == 0);
      send(b);
      repeat (2) @(posedge clk);
      #1 decouple = 1'b0;
      repeat ($urandom_range(10)) @(posedge clk);
      #1;
    end
    repeat (3) @(posedge clk);
    check(n_start == 20 && n_done == 20, $sformatf("start/done pulses %0d/%0d", n_start, n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
