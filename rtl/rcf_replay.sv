// rcf_replay: replay ReCoFuse (RCF1), the uniformity check.
//
// Guards the moving-target property in diversity: every reconfigurable
// module (RM) should be loaded about equally often. The fuse keeps one
// usage counter per RM and watches the distance between the most (MFU) and
// the least (LFU) frequently used RM. If that distance exceeds MAX_DIST the
// fuse enters its bad state and raises error; the bad state is kept until
// reset or until the fuse is disabled.
//
// Shift window: to keep the counters narrow they are "cut" at the bottom.
// A mask rm_seen records which RMs were loaded since the last cut; once all
// were (rm_seen all ones) every counter is decremented by one and the mask
// is cleared, which keeps the distance and zero-aligns the LFU counter.
// This design also cuts whenever no counter is zero, which the mask alone
// does not guarantee; with it the LFU counter is always zero when the FSM
// waits for the next RM, so CNT_W = clog2(MAX_DIST+2) bits never overflow.
//
// FSM per load event: SYNQ (wait for an RM identifier) -> CHECK_ERR (compare
// distance with MAX_DIST; error one clock later if exceeded) -> SHIFT_WINDOW
// (cut if due) -> SYNQ. An event arriving while the FSM is busy is held in a
// one-entry buffer; load events are thousands of clocks apart in practice.
//
// Interface: rm_valid/rm_id is one load event from the AXI monitor. enable
// low holds the fuse in reset. cnt and distance are brought out for observation.
// Defaults N_RM=4 and MAX_DIST=6 are the values of the original case study.
module rcf_replay #(
  parameter int unsigned N_RM     = 4,
  parameter int unsigned MAX_DIST = 6,
  parameter int unsigned ID_W     = (N_RM > 1) ? $clog2(N_RM) : 1,
  parameter int unsigned CNT_W    = $clog2(MAX_DIST + 2)
) (
  input  logic                       clk,
  input  logic                       rst,       // synchronous, active high
  input  logic                       enable,
  input  logic                       rm_valid,
  input  logic [ID_W-1:0]            rm_id,
  output logic                       error,
  output logic [N_RM-1:0][CNT_W-1:0] cnt,
  output logic [CNT_W-1:0]           distance
);

  typedef enum logic [1:0] {S_SYNQ, S_CHECK_ERR, S_SHIFT_WINDOW, S_BAD} state_e;

  state_e            state;
  logic [N_RM-1:0]   rm_seen;
  logic              pend_v;
  logic [ID_W-1:0]   pend_id;
  logic [CNT_W-1:0]  cmax, cmin;
  logic              ev_v;
  logic [ID_W-1:0]   ev_id;
  logic              cut_due;

  // MFU and LFU counter values and their distance.
  always_comb begin
    cmax = '0;
    cmin = '1;
    for (int i = 0; i < N_RM; i++) begin
      if (cnt[i] > cmax) cmax = cnt[i];
      if (cnt[i] < cmin) cmin = cnt[i];
    end
    distance = cmax - cmin;
  end

  assign cut_due = (&rm_seen) || (cmin != '0);
  assign ev_v    = pend_v || rm_valid;
  assign ev_id   = pend_v ? pend_id : rm_id;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      state   <= S_SYNQ;
      rm_seen <= '0;
      cnt     <= '0;
      pend_v  <= 1'b0;
      pend_id <= '0;
      error   <= 1'b0;
    end else begin
      // one-entry buffer for events that arrive while the FSM is busy
      if (state == S_SYNQ) begin
        if (pend_v) begin
          pend_v  <= rm_valid;
          pend_id <= rm_id;
        end
      end else if (rm_valid && state != S_BAD) begin
        pend_v  <= 1'b1;
        pend_id <= rm_id;
      end

      unique case (state)
        S_SYNQ: begin
          if (ev_v && (32'(ev_id) < N_RM)) begin
            cnt[ev_id]     <= cnt[ev_id] + 1'b1;
            rm_seen[ev_id] <= 1'b1;
            state          <= S_CHECK_ERR;
          end
        end
        S_CHECK_ERR: begin
          if (32'(distance) > MAX_DIST) begin
            state <= S_BAD;
            error <= 1'b1;
          end else begin
            state <= S_SHIFT_WINDOW;
          end
        end
        S_SHIFT_WINDOW: begin
          if (cut_due) begin
            for (int i = 0; i < N_RM; i++) cnt[i] <= cnt[i] - 1'b1;
            rm_seen <= '0;
          end
          state <= S_SYNQ;
        end
        S_BAD: error <= 1'b1;  // bad state is final
      endcase
    end
  end

  // Waiting for an event, the LFU counter is zero-aligned and the MFU
  // counter is within the allowed distance.
  a_zero_aligned: assert property (@(posedge clk) disable iff (rst || !enable)
    (state == S_SYNQ) |-> (cmin == '0 && 32'(cmax) <= MAX_DIST));
  // A cut never takes a counter below zero.
  a_cut_safe: assert property (@(posedge clk) disable iff (rst || !enable)
    (state == S_SHIFT_WINDOW && cut_due) |-> (cmin != '0));
  // No load event is lost in the one-entry buffer.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst || !enable)
    (pend_v && state != S_SYNQ && state != S_BAD) |-> !rm_valid);
  // Bad state raises error.
  a_bad_raises_error: assert property (@(posedge clk) disable iff (rst || !enable)
    (state == S_BAD) |-> error);

endmodule
