// tb_rcf_replay: self-checking test of the replay (uniformity) fuse.
//
// The reference keeps plain, never-cut usage counts h[i]. Cutting lowers
// all counters together, so the fuse must always show cnt[i]-cnt[j] equal
// to h[i]-h[j], a zero LFU counter, and must raise error exactly after the
// event that first makes max(h)-min(h) exceed MAX_DIST (error two clocks
// after that event is presented). Sequences: the worked example of the
// uniformity check (6 mixed loads giving (1,2,2,1), cut to (0,1,1,0), then
// seven loads of RM1 giving (7,1,1,0) and the error at the 13th load),
// long random-permutation runs that must never fail, random biased runs,
// and back-to-back events that use the one-entry event buffer.
module tb_rcf_replay;
  localparam int N   = 4;
  localparam int MAX = 6;
  localparam int CW  = $clog2(MAX + 2);

  logic clk = 1'b0, rst = 1'b1, enable = 1'b1;
  logic rm_valid = 1'b0;
  logic [1:0] rm_id = '0;
  logic error;
  logic [N-1:0][CW-1:0] cnt;
  logic [CW-1:0] distance;
  int checks = 0, failures = 0;
  int h[N];
  int n_cut_seen = 0;

  rcf_replay #(.N_RM(N), .MAX_DIST(MAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int hdist();
    int mx = h[0], mn = h[0];
    foreach (h[i]) begin
      if (h[i] > mx) mx = h[i];
      if (h[i] < mn) mn = h[i];
    end
    return mx - mn;
  endfunction

  task automatic clear();
    enable = 1'b0;
    @(posedge clk); #1;
    enable = 1'b1;
    foreach (h[i]) h[i] = 0;
    check(error == 1'b0 && cnt == '0, "cleared");
  endtask

  // present one load event; the FSM needs three clocks per event, so the
  // task waits one clock more than its two checking clocks, plus gap
  task automatic load(input int id, input int gap, output bit errored);
    bit expect_err, was_err;
    was_err = error;
    rm_id = 2'(id);
    rm_valid = 1'b1;
    h[id]++;
    expect_err = was_err || hdist() > MAX;
    @(posedge clk); #1;
    rm_valid = 1'b0;
    check(error == was_err, "no change one clock after event");
    @(posedge clk); #1;
    check(error == expect_err, $sformatf("error after load of RM%0d (dist %0d)", id + 1, hdist()));
    repeat (gap + 1) @(posedge clk);
    #1;
    errored = error;
    if (!expect_err) begin
      int mn = 8;
      for (int i = 0; i < N; i++) if (int'(cnt[i]) < mn) mn = int'(cnt[i]);
      check(mn == 0, "LFU counter zero aligned");
      for (int i = 1; i < N; i++)
        check(int'(cnt[i]) - int'(cnt[0]) == h[i] - h[0], "distances kept");
      check(int'(distance) == hdist(), "distance output");
    end
  endtask

  // counts cuts: the counter sum drops
  int prev_sum = 0;
  always @(posedge clk) begin
    int s;
    s = 0;
    for (int i = 0; i < N; i++) s += int'(cnt[i]);
    if (!rst && enable && s < prev_sum) n_cut_seen++;
    prev_sum = s;
  end

  initial begin
    bit e;
    int perm[N];
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // worked example: RM1 RM2 RM3 RM2 RM3 RM4 -> (1,2,2,1) -> cut (0,1,1,0)
    load(0, 2, e); load(1, 2, e); load(2, 2, e); load(1, 2, e); load(2, 2, e);
    load(3, 2, e);
    check(cnt[0] == 0 && cnt[1] == 1 && cnt[2] == 1 && cnt[3] == 0, "example cut to (0,1,1,0)");
    for (int k = 0; k < 6; k++) load(0, 2, e);
    check(e == 1'b0, "distance 6 is still allowed");
    load(0, 2, e);
    check(e == 1'b1, "13th load raises error");
    check(cnt[0] == 7 && cnt[1] == 1 && cnt[2] == 1 && cnt[3] == 0, "footnote counters (7,1,1,0)");
    load(1, 2, e);
    check(e == 1'b1, "bad state is sticky");
    clear();

    // uniform operation: random permutations of all RMs never trip the fuse
    for (int r = 0; r < 200; r++) begin
      foreach (perm[i]) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, t;
        j = $urandom_range(i);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      foreach (perm[i]) load(perm[i], $urandom_range(3), e);
    end
    check(error == 1'b0, "uniform use never trips");
    clear();

    // biased random runs until the fuse trips, exactly when the model says
    for (int r = 0; r < 20; r++) begin
      int fav, id;
      fav = $urandom_range(N - 1);
      e = 1'b0;
      while (!e) begin
        id = ($urandom_range(99) < 40) ? fav : $urandom_range(N - 1);
        load(id, $urandom_range(2), e);
      end
      clear();
    end

    // back-to-back events: second one waits in the buffer
    for (int r = 0; r < 50; r++) begin
      int a, b;
      a = $urandom_range(N - 1);
      b = $urandom_range(N - 1);
      rm_id = 2'(a); rm_valid = 1'b1; h[a]++;
      @(posedge clk); #1;
      rm_id = 2'(b); h[b]++;
      @(posedge clk); #1;
      rm_valid = 1'b0;
      repeat (6) @(posedge clk);
      #1;
      if (hdist() <= MAX) begin
        check(error == 1'b0, "burst: no error");
        for (int i = 1; i < N; i++)
          check(int'(cnt[i]) - int'(cnt[0]) == h[i] - h[0], "burst: both events counted");
      end else begin
        clear();
      end
    end

    check(n_cut_seen > 0, "shift window operation happened");
    $display("shift-window cuts observed: %0d", n_cut_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
