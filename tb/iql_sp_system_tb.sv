// iql_sp_system_tb -- end-to-end testbench of the IQL + Speculative Push system.
//
// Runs the top at its default size (16 nodes) with four active processors. Each
// processor is a small behavioural model: it trains its lock predictor, then
// repeatedly acquires a lock (predicted acquire at the execute stage), waits for
// the lock-line, writes two data lines of the critical section (a write fault
// when the line is not in its cache), holds the lock a while and releases it with
// a store to the lock address. Each cache is modelled as one ownership bit per
// line, updated by the node's fill and invalidate strobes.
//
// Phases: contention on one lock (queueing, deferral, lock hand-over, learning
// of the data lines and then pushes that arrive with the lock); a round in which
// the caches refuse pushes; a holder that keeps the lock past the deferral bound;
// a holder that writes the lock-line back while two requestors are queued
// (queue breakdown, NACKs and retries); and a third processor that writes a
// pushed line while the push is under way (the push is cancelled).
//
// Checked throughout: no line is ever owned by two caches; every critical section
// completes; every mechanism happens at least once (counted and reported).
module iql_sp_system_tb;
  import iql_pkg::*;

  localparam int unsigned NODES = 16;      // the top's default
  localparam int unsigned DS    = 2;       // the top's default DATA_SLOTS
  localparam int unsigned ACT   = 4;       // active processors
  localparam int unsigned NL    = 16;      // lines the cache model tracks
  localparam int unsigned ROUNDS = 8;

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

  // mechanism counters
  int c_deferred = 0, c_lock_sent = 0, c_timeout = 0, c_push_sent = 0, c_commit = 0;
  int c_drop = 0, c_refuse = 0, c_retry = 0, c_qfwd = 0, c_brk = 0, c_grant = 0, c_pnack = 0;
  int c_used = 0, c_used_wait = 0, c_cs = 0;
  int cyc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      for (int n = 0; n < NODES; n++) begin
        for (int i = 0; i < 2 + DS; i++)
          if (inval_valid[n][i]) begin
            has[n][li(inval_addr[n][i])]    <= 1'b0;
            pushed[n][li(inval_addr[n][i])] <= 1'b0;
          end
        if (fill_valid[n][0]) has[n][li(fill_addr[n][0])] <= 1'b1;
        if (fill_valid[n][1]) begin
          has[n][li(fill_addr[n][1])]    <= 1'b1;
          pushed[n][li(fill_addr[n][1])] <= 1'b1;
          // a write fault that waited for this push is served by it, not by a miss
          if (waitp[n][li(fill_addr[n][1])]) c_used_wait++;
        end
        if (fill_valid[n][0]) waitp[n][li(fill_addr[n][0])] <= 1'b0;
        if (fill_valid[n][1]) waitp[n][li(fill_addr[n][1])] <= 1'b0;
        if (ev_valid[n] && ev_ready[n]) has[n][li(ev_addr[n])] <= 1'b0;
        c_deferred += int'(ev_deferred[n]);
        c_lock_sent += int'(ev_lock_sent[n]);
        c_timeout  += int'(ev_timeout[n]);
        c_push_sent += int'(ev_push_sent[n]);
        c_commit   += int'(ev_push_commit[n]);
        c_drop     += int'(ev_push_drop[n]);
        c_refuse   += int'(ev_push_refuse[n]);
        c_retry    += int'(ev_retry[n]);
      end
      c_qfwd  += int'(ev_queue_fwd);
      c_brk   += int'(ev_breakdown);
      c_grant += int'(ev_push_grant);
      c_pnack += int'(ev_push_nack);
    end
  end

  // single-owner invariant, checked every cycle (counted once per violation)
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

  // ---------------- processor model ----------------
  localparam line_addr_t LOCK_L = 26'h1, LOCK_M = 26'h2, D1 = 26'h4, D2 = 26'h5;
  localparam logic [ADDR_W-1:0] PC_ACQ = 32'h0040_0100;

  function automatic logic [ADDR_W-1:0] byte_of(input line_addr_t l);
    return {l, 6'h0};
  endfunction

  task automatic wait_has(input int n, input line_addr_t l, input string what);
    int w;
    w = 0;
    while (!has[n][li(l)] && w < 20000) begin
      @(negedge clk);
      w++;
    end
    check(has[n][li(l)], $sformatf("node %0d: %s arrives", n, what));
  endtask

  // One critical section. evict_lock: write the lock-line back instead of
  // releasing it (provokes the queue breakdown).
  task automatic crit(input int n, input line_addr_t lock, input int nd, input int hold,
                      input logic evict_lock);
    line_addr_t d;
    @(negedge clk);
    disp_valid[n] = 1; disp_pc[n] = PC_ACQ;
    #1 exec_pred[n] = disp_pred[n];
    check(disp_pred[n], "acquire predicted by the LPT");
    exec_valid[n] = 1; exec_addr[n] = byte_of(lock);
    @(negedge clk);
    disp_valid[n] = 0; exec_valid[n] = 0;
    wait_has(n, lock, "lock-line");
    repeat (4) @(negedge clk);     // test-and-set of the lock word
    for (int i = 0; i < nd; i++) begin
      d = (i == 0) ? D1 : D2;
      acc_valid[n] = 1; acc_addr[n] = byte_of(d); acc_wfault[n] = !has[n][li(d)];
      if (has[n][li(d)] && pushed[n][li(d)]) c_used++;
      if (!has[n][li(d)]) waitp[n][li(d)] = 1'b1;
      @(negedge clk);
      acc_valid[n] = 0;
      wait_has(n, d, "data line");
    end
    repeat (hold) @(negedge clk);
    if (evict_lock) begin
      ev_valid[n] = 1; ev_addr[n] = lock;
      do @(negedge clk); while (!ev_ready[n]);
      ev_valid[n] = 0;
    end else begin
      st_valid[n] = 1; st_addr[n] = byte_of(lock);
      @(negedge clk);
      st_valid[n] = 0;
    end
    c_cs++;
  endtask

  int t_start;

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

    // train every active processor's predictor on the acquiring instruction
    @(negedge clk);
    for (int n = 0; n < ACT; n++) begin
      train_valid[n] = 1; train_pc[n] = PC_ACQ; train_is_lock[n] = 1;
    end
    @(negedge clk);
    for (int n = 0; n < ACT; n++) train_valid[n] = 0;

    // ---- phase 1: contention on lock L
    t_start = cyc;
    for (int n = 0; n < ACT; n++) begin
      fork
        automatic int nn = n;
        begin
          repeat (nn * 3) @(negedge clk);
          for (int r = 0; r < ROUNDS; r++) begin
            crit(nn, LOCK_L, 2, 20, 1'b0);
            repeat ($urandom_range(1, 10)) @(negedge clk);
          end
        end
      join_none
    end
    wait fork;
    check(c_cs == ACT * ROUNDS, $sformatf("phase 1: %0d critical sections", c_cs));
    $display("phase 1: %0d critical sections in %0d cycles, %0d pushes, %0d+%0d used",
             c_cs, cyc - t_start, c_push_sent, c_used, c_used_wait);

    // ---- phase 2: caches refuse pushes
    sink_ok_cfg = 1'b0;
    for (int n = 0; n < 2; n++) begin
      fork
        automatic int nn = n;
        begin
          repeat (nn * 3) @(negedge clk);
          for (int r = 0; r < 3; r++) crit(nn, LOCK_L, 2, 20, 1'b0);
        end
      join_none
    end
    wait fork;
    sink_ok_cfg = 1'b1;

    // ---- phase 3: a holder past the deferral bound (1024 cycles)
    fork
      crit(2, LOCK_L, 0, 1200, 1'b0);
      begin
        repeat (40) @(negedge clk);
        crit(3, LOCK_L, 0, 5, 1'b0);
      end
    join

    // ---- phase 4: queue breakdown on lock M
    fork
      crit(0, LOCK_M, 0, 300, 1'b1);
      begin
        repeat (40) @(negedge clk);
        crit(1, LOCK_M, 0, 5, 1'b0);
      end
      begin
        repeat (60) @(negedge clk);
        crit(2, LOCK_M, 0, 5, 1'b0);
      end
    join

    // ---- phase 5: a third processor writes a line while it is being pushed
    for (int off = 0; off < 12 && c_drop == 0; off++) begin
      fork
        crit(0, LOCK_L, 2, 10, 1'b0);
        begin
          repeat (3) @(negedge clk);
          crit(1, LOCK_L, 2, 10, 1'b0);
        end
      join
      fork
        crit(0, LOCK_L, 2, 60, 1'b0);
        begin
          repeat (20) @(negedge clk);
          crit(1, LOCK_L, 2, 10, 1'b0);
        end
        begin
          // node 3 write-faults on D1 around node 0's release
          repeat (20 + 60 + off) @(negedge clk);
          acc_valid[3] = 1; acc_addr[3] = byte_of(D1); acc_wfault[3] = !has[3][li(D1)];
          @(negedge clk);
          acc_valid[3] = 0;
          wait_has(3, D1, "third processor's line");
        end
      join
    end

    repeat (50) @(negedge clk);
    check(owner_viol == 0, $sformatf("single owner per line (%0d violations)", owner_viol));
    $display("mechanisms: deferred=%0d lock_sent=%0d queue_fwd=%0d push_sent=%0d grant=%0d commit=%0d used=%0d+%0d",
             c_deferred, c_lock_sent, c_qfwd, c_push_sent, c_grant, c_commit, c_used, c_used_wait);
    $display("            refuse=%0d perm_nack=%0d drop=%0d timeout=%0d breakdown=%0d retry=%0d",
             c_refuse, c_pnack, c_drop, c_timeout, c_brk, c_retry);
    check(c_deferred > 0, "request deferral happened");
    check(c_lock_sent > 0, "lock-line hand-over happened");
    check(c_qfwd > 0, "forward to last requestor happened");
    check(c_push_sent > 0, "speculative push happened");
    check(c_grant > 0, "push permission granted");
    check(c_commit > 0, "pushed line committed");
    check(c_used > 0, "pushed line found in the cache");
    check(c_used_wait > 0, "write fault served by a push under way");
    check(c_refuse > 0, "push refused by a full cache");
    check(c_pnack > 0, "push permission refused");
    check(c_drop > 0, "push cancelled by a third processor");
    check(c_timeout > 0, "deferral bound reached");
    check(c_brk > 0, "queue breakdown happened");
    check(c_retry > 0, "NACKed request retried");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
