// iql_sp_kernel_tb -- lock-contention kernels at the evaluated machine sizes.
//
// Runs the top at its default size and drives it with critical-section kernels
// shaped like the lock-intensive programs the scheme was evaluated with: every
// active processor repeatedly acquires one shared lock, writes the data its
// critical section protects and releases the lock. Four phases:
//   A. 4 processors, two migratory lines written in every critical section;
//   B. 8 processors, the same two lines;
//   C. 16 processors, one migratory line;
//   D. 16 processors, each critical section writing one line chosen at random
//      from a pool of eight, so that the data does not follow the lock;
//   E. 16 processors on two locks, each with its own two lines, with caches
//      that evict data lines between critical sections and refuse one push in
//      four at random (a stress mix of every race the protocol must survive).
// For each phase it reports the critical sections, the cycles they took, the
// mean lock hand-over time (release store to the next holder's lock-line) and
// how the pushes ended: used (found in the cache or completing a waiting write
// fault), evicted before use, rejected by the cache, or invalidated before use. It checks that every
// critical section completes, that no line is ever owned by two caches, that in
// the migratory phases most pushes are used, and that in phase D the confidence
// counters keep the push rate per critical section below that of phase A.
// Processor and cache are behavioural models as in the end-to-end test.
module iql_sp_kernel_tb;
  import iql_pkg::*;

  localparam int unsigned NODES = 16;      // the top's default
  localparam int unsigned DS    = 2;       // the top's default DATA_SLOTS
  localparam int unsigned NL    = 16;      // lines the cache model tracks
  localparam int unsigned ROUNDS = 6;       // critical sections per processor and phase

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              disp_valid [NODES], disp_pred [NODES];
  logic [ADDR_W-1:0] disp_pc [NODES];
  logic              exec_valid [NODES], exec_pred [NODES];
  logic [ADDR_W-1:0] exec_addr [NODES];
  logic              train_valid [NODES], train_is_lock [NODES];
  logic [ADDR_W-1:0] train_pc [NODES];
  logic              acc_valid [NODES], acc_wfault [NODES];
  logic [ADDR_W-1:0] acc_addr [NODES];
  logic              st_valid [NODES];
  logic [ADDR_W-1:0] st_addr [NODES];
  line_addr_t        q_lock_addr [NODES], q_in_addr [NODES], q_sink_addr [NODES];
  logic              q_lock_present [NODES], q_in_has [NODES], q_sink_ok [NODES];
  line_addr_t        q_push_addr [NODES][DS];
  logic              q_push_mod [NODES][DS];
  logic              fill_valid [NODES][2];
  line_addr_t        fill_addr [NODES][2];
  logic              inval_valid [NODES][2+DS];
  line_addr_t        inval_addr [NODES][2+DS];
  logic              ev_valid [NODES], ev_ready [NODES];
  line_addr_t        ev_addr [NODES];
  logic ev_deferred [NODES], ev_lock_sent [NODES], ev_timeout [NODES], ev_push_sent [NODES];
  logic ev_push_commit [NODES], ev_push_drop [NODES], ev_push_refuse [NODES], ev_retry [NODES];
  logic ev_queue_fwd, ev_breakdown, ev_push_grant, ev_push_nack;

  iql_sp_system dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- cache model: one ownership bit per line ----------------
  logic has    [NODES][NL];
  logic pushed [NODES][NL];    // line arrived by a committed push, not yet used
  logic waitp  [NODES][NL];    // write fault waiting for a line whose push is announced
  logic sink_ok_cfg = 1'b1;

  function automatic int li(input line_addr_t a);
    return int'(a[3:0]);
  endfunction

  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      q_lock_present[n] = has[n][li(q_lock_addr[n])];
      q_in_has[n]       = has[n][li(q_in_addr[n])];
      q_sink_ok[n]      = sink_ok_cfg && !has[n][li(q_sink_addr[n])];
      for (int s = 0; s < DS; s++) q_push_mod[n][s] = has[n][li(q_push_addr[n][s])];
    end
  end

  // per-phase statistics
  int c_cs = 0, c_push = 0, c_used = 0, c_rej = 0, c_inv = 0, c_commit = 0, c_evp = 0;
  int c_ho = 0, c_ho_cyc = 0;
  int cyc = 0;
  int rel_cyc = -1;              // cycle of the last release store

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      for (int n = 0; n < NODES; n++) begin
        for (int i = 0; i < 2 + DS; i++)
          if (inval_valid[n][i]) begin
            if (pushed[n][li(inval_addr[n][i])]) c_inv++;
            has[n][li(inval_addr[n][i])]    <= 1'b0;
            pushed[n][li(inval_addr[n][i])] <= 1'b0;
          end
        if (fill_valid[n][0]) begin
          has[n][li(fill_addr[n][0])]   <= 1'b1;
          waitp[n][li(fill_addr[n][0])] <= 1'b0;
          if (fill_addr[n][0] == LOCK_L && rel_cyc >= 0) begin
            c_ho++;
            c_ho_cyc += cyc - rel_cyc;
            rel_cyc = -1;
          end
        end
        if (fill_valid[n][1]) begin
          has[n][li(fill_addr[n][1])] <= 1'b1;
          c_commit++;
          if (waitp[n][li(fill_addr[n][1])]) c_used++;
          else pushed[n][li(fill_addr[n][1])] <= 1'b1;
          waitp[n][li(fill_addr[n][1])] <= 1'b0;
        end
        if (ev_valid[n] && ev_ready[n]) begin
          if (pushed[n][li(ev_addr[n])]) c_evp++;
          has[n][li(ev_addr[n])]    <= 1'b0;
          pushed[n][li(ev_addr[n])] <= 1'b0;
        end
        for (int i = 2; i < 2 + DS; i++) c_push += int'(inval_valid[n][i]);   // one per pushed line
        c_rej  += int'(ev_push_refuse[n]);
      end
    end
  end

  int owner_viol = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < NL; l++) begin
        int k;
        k = 0;
        for (int n = 0; n < NODES; n++) k += int'(has[n][l]);
        if (k > 1) owner_viol++;
      end
    end
  end

  localparam line_addr_t LOCK_L = 26'h1, LOCK_M = 26'h2, D1 = 26'h4, D2 = 26'h5;
  localparam line_addr_t E1 = 26'hA, E2 = 26'hB;
  localparam logic [ADDR_W-1:0] PC_ACQ = 32'h0040_0100;

  function automatic logic [ADDR_W-1:0] byte_of(input line_addr_t l);
    return {l, 6'h0};
  endfunction

  task automatic wait_has(input int n, input line_addr_t l);
    int w;
    w = 0;
    while (!has[n][li(l)] && w < 50000) begin
      @(negedge clk);
      w++;
    end
    check(has[n][li(l)], $sformatf("node %0d: line %h arrives", n, l));
  endtask

  // one critical section writing nd lines: the pattern picks them
  //   pat 0: D1 then D2; pat 1: D1; pat 2: one random line of the pool 8..15;
  //   pat 3: lock L with D1, D2 or lock M with E1, E2 at random, then perhaps
  //          an eviction of one of those lines
  task automatic crit(input int n, input int pat);
    line_addr_t d, lk, da, db, v;
    int nd;
    logic taken;
    lk = LOCK_L; da = D1; db = D2;
    if (pat == 3 && $urandom_range(0, 1) == 1) begin
      lk = LOCK_M; da = E1; db = E2;
    end
    // the acquire counts once the lock-line stays; a line that is handed on
    // while the acquire settles means the lock went to the successor
    do begin
      @(negedge clk);
      disp_valid[n] = 1; disp_pc[n] = PC_ACQ;
      #1 exec_pred[n] = disp_pred[n];
      exec_valid[n] = 1; exec_addr[n] = byte_of(lk);
      @(negedge clk);
      disp_valid[n] = 0; exec_valid[n] = 0;
      wait_has(n, lk);
      repeat (4) @(negedge clk);
    end while (!has[n][li(lk)]);
    nd = (pat == 0 || pat == 3) ? 2 : 1;
    for (int i = 0; i < nd; i++) begin
      d = (pat == 2) ? line_addr_t'(8 + $urandom_range(0, 7)) : ((i == 0) ? da : db);
      acc_valid[n] = 1; acc_addr[n] = byte_of(d); acc_wfault[n] = !has[n][li(d)];
      if (has[n][li(d)] && pushed[n][li(d)]) c_used++;
      pushed[n][li(d)] = 1'b0;
      if (!has[n][li(d)]) waitp[n][li(d)] = 1'b1;
      @(negedge clk);
      acc_valid[n] = 0;
      wait_has(n, d);
    end
    repeat (10) @(negedge clk);
    st_valid[n] = 1; st_addr[n] = byte_of(lk);
    if (lk == LOCK_L) rel_cyc = cyc;
    @(negedge clk);
    st_valid[n] = 0;
    c_cs++;
    // the model takes possession of the lock-line as holding the lock, so a
    // processor lets a queued successor's hand-over start before it competes
    // for the lock again
    if (pat == 3) repeat (3) @(negedge clk);
    if (pat == 3 && $urandom_range(0, 2) == 0) begin
      v = ($urandom_range(0, 1) == 0) ? da : db;
      if (has[n][li(v)]) begin
        ev_valid[n] = 1; ev_addr[n] = v;
        do begin
          #1 taken = ev_ready[n];
          @(negedge clk);
        end while (!taken);
        ev_valid[n] = 0;
      end
    end
  endtask

  real push_rate_a;

  task automatic phase(input string name, input int act, input int pat, output real push_rate);
    int t0;
    c_cs = 0; c_push = 0; c_used = 0; c_rej = 0; c_inv = 0; c_commit = 0; c_ho = 0; c_ho_cyc = 0;
    c_evp = 0;
    t0 = cyc;
    for (int n = 0; n < act; n++) begin
      fork
        automatic int nn = n;
        begin
          repeat (nn) @(negedge clk);
          for (int r = 0; r < ROUNDS; r++) begin
            crit(nn, pat);
            repeat ($urandom_range(1, 8)) @(negedge clk);
          end
        end
      join_none
    end
    wait fork;
    repeat (20) @(negedge clk);
    push_rate = real'(c_push) / real'(c_cs);
    $display("%s: %0d processors, %0d critical sections in %0d cycles, hand-over %0d cycles mean",
             name, act, c_cs, cyc - t0, (c_ho > 0) ? c_ho_cyc / c_ho : 0);
    $display("   pushes %0d (%.2f per critical section): used %0d, evicted %0d, rejected %0d, invalidated %0d",
             c_push, push_rate, c_used, c_evp, c_rej, c_inv);
    check(c_cs == act * ROUNDS, $sformatf("%s: all critical sections complete", name));
  endtask

  real r;
  logic stress_on = 1'b1;

  initial begin
    for (int n = 0; n < NODES; n++) begin
      disp_valid[n] = 0; disp_pc[n] = '0; exec_valid[n] = 0; exec_pred[n] = 0; exec_addr[n] = '0;
      train_valid[n] = 0; train_pc[n] = '0; train_is_lock[n] = 0;
      acc_valid[n] = 0; acc_addr[n] = '0; acc_wfault[n] = 0; st_valid[n] = 0; st_addr[n] = '0;
      ev_valid[n] = 0; ev_addr[n] = '0;
      for (int l = 0; l < NL; l++) begin
        has[n][l] = 1'b0;
        pushed[n][l] = 1'b0;
        waitp[n][l] = 1'b0;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NODES; n++) begin
      train_valid[n] = 1; train_pc[n] = PC_ACQ; train_is_lock[n] = 1;
    end
    @(negedge clk);
    for (int n = 0; n < NODES; n++) train_valid[n] = 0;

    phase("A", 4, 0, push_rate_a);
    check(c_push > 0 && c_used * 2 >= c_push, $sformatf("A: most pushes used (%0d of %0d)", c_used, c_push));
    phase("B", 8, 0, r);
    check(c_push > 0 && c_used * 2 >= c_push, $sformatf("B: most pushes used (%0d of %0d)", c_used, c_push));
    phase("C", 16, 1, r);
    check(c_push > 0 && c_used * 2 >= c_push, $sformatf("C: most pushes used (%0d of %0d)", c_used, c_push));
    phase("D", 16, 2, r);
    check(r < push_rate_a, $sformatf("D: fewer pushes per critical section (%.2f) than A (%.2f)", r, push_rate_a));
    // stress mix: random refusals by the caches while it runs
    fork
      begin
        phase("E", 16, 3, r);
        stress_on = 1'b0;
      end
      while (stress_on) begin
        @(negedge clk);
        sink_ok_cfg = ($urandom_range(0, 3) != 0);
      end
    join
    sink_ok_cfg = 1'b1;
    check(c_push > 0 && c_used > 0, "E: pushes used under stress");
    check(owner_viol == 0, $sformatf("single owner per line (%0d violations)", owner_viol));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
