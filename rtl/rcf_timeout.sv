// rcf_timeout: time-out ReCoFuse (RCF0).
//
// Guards the moving-target property in time: after a reconfiguration has
// finished, the reconfigurable partition (RP) may keep its module only for a
// bounded time. While rp_active is high (the RP holds a module and no
// reconfiguration runs) a counter advances once per time tick; any
// reconfiguration (rp_active low) clears it. When the counter stands at
// TIMEOUT with the RP still active, the fuse enters its bad state and raises
// error one clock later; the bad state is kept until reset or until the fuse
// is disabled.
//
// Timing: a tick is TICK_CYCLES clocks; the prescaler restarts whenever
// rp_active is low, so the time is measured from the end of the last
// reconfiguration. The defaults (1 ms ticks at a 100 MHz clock, TIMEOUT=640
// ticks, i.e. ten 64 ms time steps) reproduce the demonstration setting of
// the original evaluation; the clock frequency is this design's assumption.
//
// Interface: enable low holds the fuse in its reset state (it is the slot's
// bit of the container's configuration register). cnt is the timer value,
// brought out for observation.
module rcf_timeout #(
  parameter int unsigned TICK_CYCLES = 100_000,
  parameter int unsigned TIMEOUT     = 640,
  parameter int unsigned CNT_W       = $clog2(TIMEOUT + 1)
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high
  input  logic             enable,
  input  logic             rp_active,
  output logic             error,
  output logic [CNT_W-1:0] cnt
);

  localparam int unsigned PRE_W = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;

  typedef enum logic {S_WATCH, S_BAD} state_e;
  state_e           state;
  logic [PRE_W-1:0] pre;
  logic             tick;

  assign tick = (pre == PRE_W'(TICK_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      state <= S_WATCH;
      pre   <= '0;
      cnt   <= '0;
      error <= 1'b0;
    end else begin
      unique case (state)
        S_WATCH: begin
          if (!rp_active) begin
            pre <= '0;
            cnt <= '0;
          end else if (cnt == CNT_W'(TIMEOUT)) begin
            state <= S_BAD;
          end else begin
            pre <= tick ? '0 : pre + 1'b1;
            if (tick) cnt <= cnt + 1'b1;
          end
        end
        S_BAD: ;  // bad state is final
      endcase
      error <= (state == S_BAD) || (state == S_WATCH && rp_active && cnt == CNT_W'(TIMEOUT));
    end
  end

  // A fuse that is in its bad state signals it.
  a_bad_raises_error: assert property (@(posedge clk) disable iff (rst || !enable)
    (state == S_BAD) |=> error);
  // The timer never passes its limit.
  a_cnt_bounded: assert property (@(posedge clk) disable iff (rst)
    cnt <= CNT_W'(TIMEOUT));

endmodule
