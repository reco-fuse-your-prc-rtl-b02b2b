// axi_rm_monitor: identifies which reconfigurable module (RM) the PRC loads.
//
// Taps the AXI4 read channels between the configuration memory and the PRC.
// Every accepted read address is queued (AXI returns read data in address
// order for one ID); the queue head is the address of the burst whose data
// is on the R channel and is popped with its last beat. The data beats are
// followed by cfg_packet_parser. At the first frame-address (FAR) write of a
// bitfile the RM is identified by the pair (FAR value, memory address): the
// burst address must lie in RM i's bitfile window [RM_BASE[i],
// RM_BASE[i]+RM_SIZE) and the FAR value must equal RM_FAR[i]. A match gives
// a one-clock rm_valid pulse with rm_id = i; no match gives rm_unknown.
//
// Timing: rm_valid follows the beat carrying the FAR value by two clocks.
// The table contents are parameters of this design (the bitfile layout in
// memory is fixed when the bitfiles are placed there); 32-bit data and a
// single AXI ID are assumed. AR_DEPTH bounds the outstanding bursts tracked.
module axi_rm_monitor #(
  parameter int unsigned N_RM     = 4,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned ID_W     = (N_RM > 1) ? $clog2(N_RM) : 1,
  parameter int unsigned AR_DEPTH = 4,
  parameter logic [N_RM-1:0][ADDR_W-1:0] RM_BASE = {32'h1030_0000, 32'h1020_0000,
                                                     32'h1010_0000, 32'h1000_0000},
  parameter logic [ADDR_W-1:0]           RM_SIZE = 32'h0010_0000,
  parameter logic [N_RM-1:0][31:0]       RM_FAR  = {N_RM{32'h0040_0000}}
) (
  input  logic              clk,
  input  logic              rst,        // synchronous, active high
  // AXI4 read address channel (observed)
  input  logic [ADDR_W-1:0] araddr,
  input  logic              arvalid,
  input  logic              arready,
  // AXI4 read data channel (observed)
  input  logic [31:0]       rdata,
  input  logic              rvalid,
  input  logic              rready,
  input  logic              rlast,
  // identified load event
  output logic              rm_valid,
  output logic [ID_W-1:0]   rm_id,
  output logic              rm_unknown
);

  localparam int unsigned PTR_W = (AR_DEPTH > 1) ? $clog2(AR_DEPTH) : 1;

  logic [AR_DEPTH-1:0][ADDR_W-1:0] q_addr;
  logic [PTR_W-1:0]                wp, rp;
  logic [PTR_W:0]                  fill;
  logic                            push, pop, beat;
  logic [ADDR_W-1:0]               burst_addr, far_addr;

  logic        in_bitfile, sync_seen, desync_seen, far_seen, far_first;
  logic [31:0] far_value;

  assign push = arvalid && arready;
  assign beat = rvalid && rready;
  assign pop  = beat && rlast;

  // outstanding read bursts
  always_ff @(posedge clk) begin
    if (rst) begin
      wp   <= '0;
      rp   <= '0;
      fill <= '0;
    end else begin
      if (push) begin
        q_addr[wp] <= araddr;
        wp         <= (32'(wp) == AR_DEPTH - 1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (32'(rp) == AR_DEPTH - 1) ? '0 : rp + 1'b1;
      fill <= fill + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
    end
  end

  assign burst_addr = (fill != '0) ? q_addr[rp] : araddr;

  // address of the burst that carried the last parsed word
  always_ff @(posedge clk) begin
    if (rst)       far_addr <= '0;
    else if (beat) far_addr <= burst_addr;
  end

  cfg_packet_parser u_parser (
    .clk         (clk),
    .rst         (rst),
    .word_valid  (beat),
    .word        (rdata),
    .in_bitfile  (in_bitfile),
    .sync_seen   (sync_seen),
    .desync_seen (desync_seen),
    .far_seen    (far_seen),
    .far_first   (far_first),
    .far_value   (far_value)
  );

  // table lookup
  always_ff @(posedge clk) begin
    rm_valid   <= 1'b0;
    rm_unknown <= 1'b0;
    if (rst) begin
      rm_id <= '0;
    end else if (far_seen && far_first) begin
      rm_unknown <= 1'b1;
      for (int i = N_RM - 1; i >= 0; i--) begin
        if (far_addr >= RM_BASE[i] && far_addr - RM_BASE[i] < RM_SIZE &&
            far_value == RM_FAR[i]) begin
          rm_valid   <= 1'b1;
          rm_unknown <= 1'b0;
          rm_id      <= ID_W'(i);
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    !(push && !pop && 32'(fill) == AR_DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst)
    !(pop && fill == '0));

endmodule
