// recofuse_container: the ReCoFuse Container around the partial
// reconfiguration controller (PRC).
//
// The PRC itself is vendor IP and sits outside this module; the container
// owns every data path leaving it and every path towards it. The AXI4 read
// channels between configuration memory and PRC and the PRC's write port to
// the ICAP primitive pass straight through, and each is also fed to an
// interface monitor that turns the traffic into events:
//   icap_monitor    -> rp_active (no reconfiguration runs, RP holds a module)
//   axi_rm_monitor  -> rm_valid/rm_id (which RM the PRC is loading)
// The events drive the ReCoFuse slots:
//   slot 0  rcf_timeout  (RCF0) RP kept too long without reconfiguration
//   slot 1  rcf_replay   (RCF1) RM usage no longer uniform
// A configuration register enables or disables each slot, and the enabled
// slots' error signals are ORed into one error output (registered, one
// clock after the slot's error). error_slots gives them separately.
//
// The pass-through adds no delay. Parameters are those of the fuses and the
// RM table; defaults follow the original case study where it gives numbers
// (4 RMs, distance 6, time-out of 640 one-millisecond ticks) and are this
// design's assumption elsewhere.
module recofuse_container
  import recofuse_pkg::*;
#(
  parameter int unsigned N_RM        = 4,
  parameter int unsigned MAX_DIST    = 6,
  parameter int unsigned TICK_CYCLES = 100_000,
  parameter int unsigned TIMEOUT     = 640,
  parameter bit          ICAP_BITSWAP = 1'b0,
  parameter logic [N_RM-1:0][31:0] RM_BASE = {32'h1030_0000, 32'h1020_0000,
                                              32'h1010_0000, 32'h1000_0000},
  parameter logic [31:0]           RM_SIZE = 32'h0010_0000,
  parameter logic [N_RM-1:0][31:0] RM_FAR  = {N_RM{32'h0040_0000}},
  parameter int unsigned ID_W  = (N_RM > 1) ? $clog2(N_RM) : 1,
  parameter int unsigned CNT_W = $clog2(MAX_DIST + 2),
  parameter int unsigned TMR_W = $clog2(TIMEOUT + 1)
) (
  input  logic             clk,
  input  logic             rst,            // synchronous, active high
  // PRC side of the AXI4 read channels (PRC is the master)
  input  axi_ar_t          prc_ar,
  input  logic             prc_arvalid,
  output logic             prc_arready,
  output axi_r_t           prc_r,
  output logic             prc_rvalid,
  input  logic             prc_rready,
  // memory side of the AXI4 read channels
  output axi_ar_t          mem_ar,
  output logic             mem_arvalid,
  input  logic             mem_arready,
  input  axi_r_t           mem_r,
  input  logic             mem_rvalid,
  output logic             mem_rready,
  // PRC side of the ICAP port
  input  icap_wr_t         prc_icap_wr,
  output logic [31:0]      prc_icap_o,
  // ICAP primitive side
  output icap_wr_t         icap_wr,
  input  logic [31:0]      icap_o,
  // PRC status used for RP_active
  input  logic             prc_decouple,
  // configuration register port
  input  logic             cfg_wr,
  input  logic             cfg_rd,
  input  logic             cfg_addr,
  input  logic [N_RCF-1:0] cfg_wdata,
  output logic [N_RCF-1:0] cfg_rdata,
  // fuse outputs
  output logic             error,
  output logic [N_RCF-1:0] error_slots,
  output logic             rp_active,
  output logic [TMR_W-1:0] timer,
  output logic [N_RM-1:0][CNT_W-1:0] rm_count,
  output logic [CNT_W-1:0] rm_distance,
  output logic             rm_unknown,
  output logic             reconf_start,
  output logic             reconf_done
);

  logic [N_RCF-1:0] slot_enable;
  logic             rm_valid;
  logic [ID_W-1:0]  rm_id;

  // pass-through
  assign mem_ar      = prc_ar;
  assign mem_arvalid = prc_arvalid;
  assign prc_arready = mem_arready;
  assign prc_r       = mem_r;
  assign prc_rvalid  = mem_rvalid;
  assign mem_rready  = prc_rready;
  assign icap_wr     = prc_icap_wr;
  assign prc_icap_o  = icap_o;

  icap_monitor #(.ICAP_BITSWAP(ICAP_BITSWAP)) u_icap_mon (
    .clk          (clk),
    .rst          (rst),
    .icap_csib    (prc_icap_wr.csib),
    .icap_rdwrb   (prc_icap_wr.rdwrb),
    .icap_i       (prc_icap_wr.data),
    .prc_decouple (prc_decouple),
    .rp_active    (rp_active),
    .reconf_start (reconf_start),
    .reconf_done  (reconf_done)
  );

  axi_rm_monitor #(
    .N_RM    (N_RM),
    .ADDR_W  (32),
    .ID_W    (ID_W),
    .RM_BASE (RM_BASE),
    .RM_SIZE (RM_SIZE),
    .RM_FAR  (RM_FAR)
  ) u_axi_mon (
    .clk        (clk),
    .rst        (rst),
    .araddr     (prc_ar.addr),
    .arvalid    (prc_arvalid),
    .arready    (mem_arready),
    .rdata      (mem_r.data),
    .rvalid     (mem_rvalid),
    .rready     (prc_rready),
    .rlast      (mem_r.last),
    .rm_valid   (rm_valid),
    .rm_id      (rm_id),
    .rm_unknown (rm_unknown)
  );

  // slot 0: RCF0
  rcf_timeout #(
    .TICK_CYCLES (TICK_CYCLES),
    .TIMEOUT     (TIMEOUT),
    .CNT_W       (TMR_W)
  ) u_rcf0 (
    .clk       (clk),
    .rst       (rst),
    .enable    (slot_enable[RCF_TIMEOUT]),
    .rp_active (rp_active),
    .error     (error_slots[RCF_TIMEOUT]),
    .cnt       (timer)
  );

  // slot 1: RCF1
  rcf_replay #(
    .N_RM     (N_RM),
    .MAX_DIST (MAX_DIST),
    .ID_W     (ID_W),
    .CNT_W    (CNT_W)
  ) u_rcf1 (
    .clk      (clk),
    .rst      (rst),
    .enable   (slot_enable[RCF_REPLAY]),
    .rm_valid (rm_valid),
    .rm_id    (rm_id),
    .error    (error_slots[RCF_REPLAY]),
    .cnt      (rm_count),
    .distance (rm_distance)
  );

  rcf_config_reg #(.N_SLOTS(N_RCF)) u_cfg (
    .clk         (clk),
    .rst         (rst),
    .cfg_wr      (cfg_wr),
    .cfg_rd      (cfg_rd),
    .cfg_addr    (cfg_addr),
    .cfg_wdata   (cfg_wdata),
    .cfg_rdata   (cfg_rdata),
    .slot_error  (error_slots),
    .slot_enable (slot_enable)
  );

  // fuse box: OR of the enabled slots' errors
  always_ff @(posedge clk) begin
    if (rst) error <= 1'b0;
    else     error <= |(error_slots & slot_enable);
  end

endmodule
