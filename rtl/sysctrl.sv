// sysctrl: system controller of the moving-target encryption system.
//
// Every time step (STEP_CYCLES clocks) it replaces the module in the
// reconfigurable partition with a randomly chosen successor. The choice is
// random but balanced: modules are drawn from a "bag" that holds every
// module once per round, so each round loads every module exactly once in
// random order. Within the bag the current module is skipped whenever
// another one is left, so a module follows itself only in the rare case
// that the last module of a round is drawn again first. The random number
// comes from a 16-bit Galois LFSR (x^16+x^14+x^13+x^11+1); the k-th
// remaining candidate is taken, k = lfsr mod (number of candidates).
//
// Why a bag: independent uniform draws let the load counts drift apart like
// a random walk (a distance of 8 after 40 steps is typical), which the
// replay fuse, with its limit of 6, rightly reports. A controller meant to
// run under that fuse must keep the usage uniform over short windows too.
//
// The choice is signalled to the PRC as a one-clock pulse on the matching
// bit of hw_trigger (the PRC's per-module hardware trigger inputs), with
// trig_valid/trig_id giving the same in binary.
//
// Two inputs reproduce the fault injection of the original evaluation and
// let a testbench mount both attacks: fi_hold suppresses every replacement
// (time-out attack), fi_fixed replaces the random choice with fi_id (replay
// attack). The default time step of 64 ms at an assumed 100 MHz clock is the
// step of the original demonstration; the LFSR and the bag are this design's
// choices. The first trigger follows reset by one time step.
module sysctrl #(
  parameter int unsigned N_RM        = 4,
  parameter int unsigned STEP_CYCLES = 6_400_000,
  parameter logic [15:0] SEED        = 16'hACE1,
  parameter int unsigned ID_W        = (N_RM > 1) ? $clog2(N_RM) : 1
) (
  input  logic            clk,
  input  logic            rst,          // synchronous, active high
  input  logic            fi_hold,
  input  logic            fi_fixed,
  input  logic [ID_W-1:0] fi_id,
  output logic [N_RM-1:0] hw_trigger,
  output logic            trig_valid,
  output logic [ID_W-1:0] trig_id
);

  localparam int unsigned STEP_W = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;

  logic [STEP_W-1:0] step_cnt;
  logic [15:0]       lfsr;
  logic [ID_W-1:0]   cur, next_id;
  logic [N_RM-1:0]   bag, cand;
  logic              step_end;

  assign step_end = (step_cnt == STEP_W'(STEP_CYCLES - 1));

  // draw the k-th candidate from the bag
  always_comb begin
    logic [N_RM-1:0] b;
    int unsigned n, k, seen;
    b    = (bag == '0) ? '1 : bag;          // refill an empty bag
    cand = b;
    cand[cur] = 1'b0;
    if (cand == '0) cand = b;               // only the current one is left
    n = 0;
    for (int i = 0; i < N_RM; i++) n += 32'(cand[i]);
    k       = 32'(lfsr) % n;
    seen    = 0;
    next_id = '0;
    for (int i = 0; i < N_RM; i++) begin
      if (cand[i]) begin
        if (seen == k) next_id = ID_W'(i);
        seen++;
      end
    end
    if (fi_fixed) next_id = fi_id;
  end

  always_ff @(posedge clk) begin
    trig_valid <= 1'b0;
    hw_trigger <= '0;
    if (rst) begin
      step_cnt <= '0;
      lfsr     <= SEED;
      cur      <= '0;
      trig_id  <= '0;
      bag      <= '1;
    end else begin
      lfsr     <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
      step_cnt <= step_end ? '0 : step_cnt + 1'b1;
      if (step_end && !fi_hold) begin
        cur                 <= next_id;
        bag                 <= ((bag == '0) ? '1 : bag) & ~(N_RM'(1) << next_id);
        trig_id             <= next_id;
        trig_valid          <= 1'b1;
        hw_trigger[next_id] <= 1'b1;
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst)
    trig_valid |-> $onehot(hw_trigger));

endmodule
