// icap_monitor: derives RP_active for the time-out fuse.
//
// Taps the write port between PRC and ICAP primitive (chip select and
// read/write strobe low mark a word written into the configuration logic)
// and follows the bitfile with cfg_packet_parser. A reconfiguration runs
// from the sync word to the DESYNC command. RP_active, "the partition holds
// a module and no reconfiguration is performed", is the combination of that
// with the PRC's own decouple output, which it raises while the partition is
// being swapped.
//
// ICAP_BITSWAP=1 reverses the bits of every byte before parsing, for a port
// that carries the bit-swapped word order of the 7-series ICAP; the default
// expects words as they are stored in the bitfile. rp_active falls one clock
// after the sync word is written and rises one clock after the DESYNC command;
// it follows prc_decouple without delay.
// reconf_start and reconf_done are one-clock pulses at those points.
module icap_monitor #(
  parameter bit ICAP_BITSWAP = 1'b0
) (
  input  logic        clk,
  input  logic        rst,            // synchronous, active high
  input  logic        icap_csib,      // ICAP chip select, active low
  input  logic        icap_rdwrb,     // 0 = write
  input  logic [31:0] icap_i,         // word written to ICAP
  input  logic        prc_decouple,   // PRC decouple output for the RP
  output logic        rp_active,
  output logic        reconf_start,
  output logic        reconf_done
);

  logic        wr;
  logic [31:0] w;
  logic        in_bitfile;
  logic        far_seen, far_first;
  logic [31:0] far_value;

  assign wr = !icap_csib && !icap_rdwrb;

  always_comb begin
    w = icap_i;
    if (ICAP_BITSWAP)
      for (int b = 0; b < 4; b++)
        for (int k = 0; k < 8; k++)
          w[8*b + k] = icap_i[8*b + 7 - k];
  end

  cfg_packet_parser u_parser (
    .clk         (clk),
    .rst         (rst),
    .word_valid  (wr),
    .word        (w),
    .in_bitfile  (in_bitfile),
    .sync_seen   (reconf_start),
    .desync_seen (reconf_done),
    .far_seen    (far_seen),
    .far_first   (far_first),
    .far_value   (far_value)
  );

  assign rp_active = !in_bitfile && !prc_decouple;

endmodule
