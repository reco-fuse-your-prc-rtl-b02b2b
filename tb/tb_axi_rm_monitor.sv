// tb_axi_rm_monitor: self-checking test of RM identification on AXI.
//
// Plays the AXI4 read traffic of a PRC fetching synthetic partial bitfiles:
// 16-beat bursts (shorter at the end), up to four read addresses
// outstanding, random stalls on both valid and ready. Bitfiles are placed
// in the RM windows of the default table, or outside them, or carry a wrong
// FAR value. Each bitfile must give exactly one event: rm_valid with the
// right rm_id if address window and FAR match, otherwise rm_unknown. The
// frame data contains FAR and sync look-alikes that must be skipped.
module tb_axi_rm_monitor;
  import bitfile_pkg::*;

  localparam int N = 4;
  localparam logic [N-1:0][31:0] BASE = {32'h1030_0000, 32'h1020_0000,
                                         32'h1010_0000, 32'h1000_0000};
  localparam logic [31:0] FAR = 32'h0040_0000;

  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] araddr = '0, rdata = '0;
  logic arvalid = 1'b0, arready = 1'b0, rvalid = 1'b0, rready = 1'b0, rlast = 1'b0;
  logic rm_valid, rm_unknown;
  logic [1:0] rm_id;
  int checks = 0, failures = 0;
  int n_valid = 0, n_unknown = 0, last_id = -1;

  axi_rm_monitor dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (rm_valid) begin n_valid++; last_id = int'(rm_id); end
    if (rm_unknown) n_unknown++;
  end

  // burst lengths in flight, shared by the address and data processes
  int bursts[$];
  int outstanding = 0;

  task automatic fetch(input logic [31:0] addr, input bitfile_t b);
    int n = b.w.size();
    int nb = (n + 15) / 16;
    fork
      begin : ar_proc
        for (int k = 0; k < nb; k++) begin
          int len;
          len = (n - 16*k >= 16) ? 16 : n - 16*k;
          while (outstanding >= 4) begin @(posedge clk); #1; end
          repeat ($urandom_range(2)) begin @(posedge clk); #1; end
          araddr = addr + 32'(64*k); arvalid = 1'b1; arready = $urandom_range(1);
          while (!arready) begin @(posedge clk); #1; arready = $urandom_range(1); end
          @(posedge clk); #1;
          bursts.push_back(len);
          outstanding++;
          arvalid = 1'b0; arready = 1'b0; araddr = $urandom;
        end
      end
      begin : r_proc
        int idx = 0;
        for (int k = 0; k < nb; k++) begin
          int len;
          while (bursts.size() == 0) begin @(posedge clk); #1; end
          len = bursts.pop_front();
          for (int j = 0; j < len; j++) begin
            rdata = b.w[idx]; rlast = (j == len - 1);
            rvalid = $urandom_range(3) != 0; rready = $urandom_range(3) != 0;
            while (!(rvalid && rready)) begin
              @(posedge clk); #1;
              rvalid = $urandom_range(3) != 0; rready = $urandom_range(3) != 0;
            end
            @(posedge clk); #1;
            idx++;
          end
          outstanding--;
          rvalid = 1'b0; rready = 1'b0; rlast = 1'b0; rdata = $urandom;
        end
      end
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int r = 0; r < 60; r++) begin
      int id, kind, v0, u0;
      logic [31:0] addr, far;
      bitfile_t b;
      id = $urandom_range(N - 1);
      kind = $urandom_range(5);          // 0: outside windows, 1: wrong FAR
      addr = BASE[id] + 32'($urandom_range(3) * 4096);
      far  = FAR;
      if (kind == 0) addr = 32'h2000_0000 + 32'($urandom_range(255) * 4096);
      if (kind == 1) far  = FAR ^ 32'h0000_0100;
      b = make_bitfile(far, 30 + $urandom_range(100), r % 2 == 0);
      v0 = n_valid; u0 = n_unknown;
      fetch(addr, b);
      repeat (4) @(posedge clk);
      #1;
      if (kind <= 1) begin
        check(n_valid == v0 && n_unknown == u0 + 1, "unknown bitfile reported once");
      end else begin
        check(n_valid == v0 + 1 && n_unknown == u0, "known bitfile reported once");
        check(last_id == id, $sformatf("RM id %0d (got %0d)", id, last_id));
      end
    end
    $display("identified %0d, unknown %0d", n_valid, n_unknown);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
