// axi_mem_model: behavioural AXI4 read slave standing in for the partial
// bitfile memory (on the original board, DDR3 reached through the
// processing system's AXI slave port). Not synthesizable.
//
// Words live in an associative array indexed by byte address and are placed
// there with the put task. Read addresses are accepted into a queue with
// random ready; each burst is answered in order, INCR bursts of 32-bit
// beats, with random gaps on rvalid. Outputs change at the falling clock
// edge and handshakes count at the rising edge. Unwritten words read as zero.
module axi_mem_model
  import recofuse_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  axi_ar_t ar,
  input  logic    arvalid,
  output logic    arready,
  output axi_r_t  r,
  output logic    rvalid,
  input  logic    rready
);
  logic [31:0] mem[logic [31:0]];
  axi_ar_t     pending[$];

  task automatic put(input logic [31:0] addr, input logic [31:0] data);
    mem[addr] = data;
  endtask

  initial begin
    arready = 1'b0;
    rvalid  = 1'b0;
    r       = '0;
  end

  // address channel: ready changes at the falling edge, handshakes are
  // sampled at the rising edge
  always @(negedge clk)
    arready = !rst && ($urandom_range(3) != 0) && pending.size() < 3;
  always @(posedge clk)
    if (!rst && arvalid && arready) pending.push_back(ar);

  // data channel
  initial begin
    forever begin
      @(negedge clk);
      if (!rst && pending.size() != 0) begin
        axi_ar_t a;
        a = pending.pop_front();
        for (int k = 0; k <= int'(a.len); k++) begin
          logic [31:0] addr;
          addr = a.addr + 32'(4 * k);
          while ($urandom_range(7) == 0) @(negedge clk);
          r.data = mem.exists(addr) ? mem[addr] : 32'h0;
          r.resp = 2'b00;
          r.last = (k == int'(a.len));
          rvalid = 1'b1;
          @(posedge clk);
          while (!rready) @(posedge clk);
          @(negedge clk);
          rvalid = 1'b0;
        end
      end
    end
  end
endmodule
