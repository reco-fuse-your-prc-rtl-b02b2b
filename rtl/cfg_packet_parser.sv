// cfg_packet_parser: follows a partial bitfile word by word.
//
// Used by both interface monitors of the container: on the ICAP write
// stream and on the AXI read data between configuration memory and PRC.
// It hunts for the sync word, then reads configuration packets: a type-1
// header names a register and a payload length, a type-2 header extends the
// payload of the preceding type-1 packet. Payload words are skipped by
// count, so frame data can never be mistaken for a header (the "sync word in
// combination with the bitfile length" route to the reconfiguration events).
// A write of DESYNC to the CMD register ends the bitfile and the parser goes
// back to hunting.
//
// Outputs are single-clock pulses, registered, one clock after the word that
// causes them: sync_seen (start of a bitfile), far_seen with far_value (a
// word written to the frame address register; far_first marks the first one
// of the bitfile) and desync_seen (end of the bitfile). in_bitfile is high
// from the sync word to the DESYNC command.
module cfg_packet_parser
  import recofuse_pkg::*;
(
  input  logic        clk,
  input  logic        rst,          // synchronous, active high
  input  logic        word_valid,
  input  logic [31:0] word,
  output logic        in_bitfile,
  output logic        sync_seen,
  output logic        desync_seen,
  output logic        far_seen,
  output logic        far_first,
  output logic [31:0] far_value
);

  localparam logic [13:0] REG_FAR = 14'h0001;
  localparam logic [13:0] REG_CMD = 14'h0004;

  typedef enum logic [1:0] {S_HUNT, S_HDR, S_PAYLOAD} state_e;

  state_e      state;
  logic [13:0] reg_addr;
  logic [26:0] remaining;
  logic        far_done;

  // header fields
  logic [2:0]  hdr_type;
  logic [1:0]  hdr_op;
  assign hdr_type = word[31:29];
  assign hdr_op   = word[28:27];

  always_ff @(posedge clk) begin
    sync_seen   <= 1'b0;
    desync_seen <= 1'b0;
    far_seen    <= 1'b0;
    if (rst) begin
      state      <= S_HUNT;
      reg_addr   <= '0;
      remaining  <= '0;
      far_done   <= 1'b0;
      far_first  <= 1'b0;
      far_value  <= '0;
      in_bitfile <= 1'b0;
    end else if (word_valid) begin
      unique case (state)
        S_HUNT: begin
          if (word == SYNC_WORD) begin
            state      <= S_HDR;
            far_done   <= 1'b0;
            in_bitfile <= 1'b1;
            sync_seen  <= 1'b1;
          end
        end
        S_HDR: begin
          if (hdr_type == 3'b001) begin
            reg_addr <= word[26:13];
            // only writes carry a payload in the stream
            if (hdr_op == 2'b10 && word[10:0] != '0) begin
              remaining <= 27'(word[10:0]);
              state     <= S_PAYLOAD;
            end
          end else if (hdr_type == 3'b010) begin
            if (word[26:0] != '0) begin
              remaining <= word[26:0];
              state     <= S_PAYLOAD;
            end
          end
        end
        S_PAYLOAD: begin
          remaining <= remaining - 1'b1;
          if (remaining == 27'd1) state <= S_HDR;
          if (reg_addr == REG_FAR) begin
            far_seen  <= 1'b1;
            far_first <= !far_done;
            far_value <= word;
            far_done  <= 1'b1;
          end
          if (reg_addr == REG_CMD && word == CMD_DESYNC) begin
            state       <= S_HUNT;
            in_bitfile  <= 1'b0;
            desync_seen <= 1'b1;
          end
        end
        default: state <= S_HUNT;
      endcase
    end
  end

endmodule
