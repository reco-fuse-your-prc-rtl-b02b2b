// recofuse_top: reconfiguration-based moving-target system with a
// ReCoFuse-protected PRC.
//
// Puts together the parts of the protected system that are logic of its
// own: sysctrl, which periodically asks the PRC to swap a randomly chosen
// reconfigurable module (RM) into the partition, and recofuse_container,
// which encapsulates the PRC and raises error when reconfiguration stops
// (time-out fuse) or loses its diversity (replay fuse). The PRC, the
// configuration memory holding the partial bitfiles, the ICAP primitive and
// the swapped modules themselves are outside; their connections are ports:
//   prc_hw_trigger        -> PRC hardware trigger inputs, one per RM
//   prc_* AXI/ICAP        <-> PRC master ports
//   mem_* AXI             <-> configuration memory (AXI slave)
//   icap_*                <-> ICAP primitive
// fi_* are the fault-injection inputs of sysctrl. All paths are synchronous
// to clk with a synchronous active-high reset; parameter defaults are those
// of recofuse_container and sysctrl.
module recofuse_top
  import recofuse_pkg::*;
#(
  parameter int unsigned N_RM        = 4,
  parameter int unsigned MAX_DIST    = 6,
  parameter int unsigned TICK_CYCLES = 100_000,
  parameter int unsigned TIMEOUT     = 640,
  parameter int unsigned STEP_CYCLES = 6_400_000,
  parameter int unsigned ID_W  = (N_RM > 1) ? $clog2(N_RM) : 1,
  parameter int unsigned CNT_W = $clog2(MAX_DIST + 2),
  parameter int unsigned TMR_W = $clog2(TIMEOUT + 1)
) (
  input  logic             clk,
  input  logic             rst,
  // sysctrl
  input  logic             fi_hold,
  input  logic             fi_fixed,
  input  logic [ID_W-1:0]  fi_id,
  output logic [N_RM-1:0]  prc_hw_trigger,
  output logic             trig_valid,
  output logic [ID_W-1:0]  trig_id,
  // PRC master ports
  input  axi_ar_t          prc_ar,
  input  logic             prc_arvalid,
  output logic             prc_arready,
  output axi_r_t           prc_r,
  output logic             prc_rvalid,
  input  logic             prc_rready,
  input  icap_wr_t         prc_icap_wr,
  output logic [31:0]      prc_icap_o,
  input  logic             prc_decouple,
  // configuration memory
  output axi_ar_t          mem_ar,
  output logic             mem_arvalid,
  input  logic             mem_arready,
  input  axi_r_t           mem_r,
  input  logic             mem_rvalid,
  output logic             mem_rready,
  // ICAP primitive
  output icap_wr_t         icap_wr,
  input  logic [31:0]      icap_o,
  // container configuration and status
  input  logic             cfg_wr,
  input  logic             cfg_rd,
  input  logic             cfg_addr,
  input  logic [N_RCF-1:0] cfg_wdata,
  output logic [N_RCF-1:0] cfg_rdata,
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

  sysctrl #(
    .N_RM        (N_RM),
    .STEP_CYCLES (STEP_CYCLES),
    .ID_W        (ID_W)
  ) u_sysctrl (
    .clk        (clk),
    .rst        (rst),
    .fi_hold    (fi_hold),
    .fi_fixed   (fi_fixed),
    .fi_id      (fi_id),
    .hw_trigger (prc_hw_trigger),
    .trig_valid (trig_valid),
    .trig_id    (trig_id)
  );

  recofuse_container #(
    .N_RM        (N_RM),
    .MAX_DIST    (MAX_DIST),
    .TICK_CYCLES (TICK_CYCLES),
    .TIMEOUT     (TIMEOUT),
    .ID_W        (ID_W),
    .CNT_W       (CNT_W),
    .TMR_W       (TMR_W)
  ) u_container (
    .clk          (clk),
    .rst          (rst),
    .prc_ar       (prc_ar),
    .prc_arvalid  (prc_arvalid),
    .prc_arready  (prc_arready),
    .prc_r        (prc_r),
    .prc_rvalid   (prc_rvalid),
    .prc_rready   (prc_rready),
    .mem_ar       (mem_ar),
    .mem_arvalid  (mem_arvalid),
    .mem_arready  (mem_arready),
    .mem_r        (mem_r),
    .mem_rvalid   (mem_rvalid),
    .mem_rready   (mem_rready),
    .prc_icap_wr  (prc_icap_wr),
    .prc_icap_o   (prc_icap_o),
    .icap_wr      (icap_wr),
    .icap_o       (icap_o),
    .prc_decouple (prc_decouple),
    .cfg_wr       (cfg_wr),
    .cfg_rd       (cfg_rd),
    .cfg_addr     (cfg_addr),
    .cfg_wdata    (cfg_wdata),
    .cfg_rdata    (cfg_rdata),
    .error        (error),
    .error_slots  (error_slots),
    .rp_active    (rp_active),
    .timer        (timer),
    .rm_count     (rm_count),
    .rm_distance  (rm_distance),
    .rm_unknown   (rm_unknown),
    .reconf_start (reconf_start),
    .reconf_done  (reconf_done)
  );

endmodule
