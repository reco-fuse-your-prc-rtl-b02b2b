// rcf_config_reg: user configuration register of the ReCoFuse container.
//
// Lets the user enable or disable each ReCoFuse slot at run time. A disabled
// fuse is held in its reset state, so enabling it again starts it fresh. The
// bus is a minimal synchronous register port of this design's choosing:
//   address 0  ENABLE  read/write, bit i enables slot i (reset: all enabled)
//   address 1  STATUS  read only, bit i is the error output of slot i
// A write takes effect at the next clock edge; read data is registered and
// valid one clock after cfg_rd.
module rcf_config_reg #(
  parameter int unsigned N_SLOTS = 2
) (
  input  logic               clk,
  input  logic               rst,        // synchronous, active high
  input  logic               cfg_wr,
  input  logic               cfg_rd,
  input  logic               cfg_addr,
  input  logic [N_SLOTS-1:0] cfg_wdata,
  output logic [N_SLOTS-1:0] cfg_rdata,
  input  logic [N_SLOTS-1:0] slot_error,
  output logic [N_SLOTS-1:0] slot_enable
);

  always_ff @(posedge clk) begin
    if (rst) begin
      slot_enable <= '1;
      cfg_rdata   <= '0;
    end else begin
      if (cfg_wr && cfg_addr == 1'b0) slot_enable <= cfg_wdata;
      if (cfg_rd) cfg_rdata <= (cfg_addr == 1'b0) ? slot_enable : slot_error;
    end
  end

endmodule
