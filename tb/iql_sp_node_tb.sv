// iql_sp_node_tb -- self-checking testbench for one node controller.
//
// The testbench plays the processor, the cache (one ownership bit per line), the
// home directory and the other nodes. It checks the messages the node sends, in
// order, for: a predicted acquire (rd_X_lp), a write fault (rd_X), a NACK and its
// retry after the retry delay, an intervention deferred while the lock is
// requested and served by the release (lock-line to the requestor, revision to
// the directory), learning of a data line over two critical sections and its
// push with the next hand-over (hint ahead of the lock-line, annotated
// write-back to the directory), the receiving side of a push (commit; a write
// fault that waits for an announced push and turns into a rd_X when the push is
// cancelled; a granted push that the cache cannot take, handed back), a plain
// intervention, the deferral bound, and the write-back of an evicted line.
module iql_sp_node_tb;
  import iql_pkg::*;

  localparam int unsigned NODES = 4;
  localparam int unsigned ID    = 1;
  localparam int unsigned DS    = 2;
  localparam int unsigned DEFER = 40;
  localparam int unsigned RDLY  = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic disp_valid, disp_pred, exec_valid, exec_pred, train_valid, train_is_lock;
  logic [ADDR_W-1:0] disp_pc, exec_addr, train_pc, acc_addr, st_addr;
  logic acc_valid, acc_wfault, st_valid;
  line_addr_t q_lock_addr, q_in_addr;
  logic q_lock_present, q_in_has, q_sink_ok;
  line_addr_t q_push_addr [DS];
  logic       q_push_mod  [DS];
  logic       fill_valid  [2];
  line_addr_t fill_addr   [2];
  logic       inval_valid [2+DS];
  line_addr_t inval_addr  [2+DS];
  logic ev_valid, ev_ready;
  line_addr_t ev_addr;
  logic in_valid, out_valid, out_ready;
  msg_t in_msg, out_msg;
  logic ev_deferred, ev_lock_sent, ev_timeout, ev_push_sent, ev_push_commit, ev_push_drop;
  logic ev_push_refuse, ev_retry;

  iql_sp_node #(.NODES(NODES), .ID(ID), .DATA_SLOTS(DS), .DEFER_LIMIT(DEFER),
                .RETRY_DELAY(RDLY)) dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- cache model ----------------
  logic has [16];
  logic sink_ok_cfg;

  function automatic int li(input line_addr_t a);
    return int'(a[3:0]);
  endfunction

  always_comb begin
    q_lock_present = has[li(q_lock_addr)];
    q_in_has       = has[li(q_in_addr)];
    q_sink_ok      = sink_ok_cfg && !has[li(in_msg.addr)];
    for (int s = 0; s < DS; s++) q_push_mod[s] = has[li(q_push_addr[s])];
  end

  msg_t got [$];
  int   cyc = 0;
  int   n_def = 0, n_to = 0, n_commit = 0, n_drop = 0, n_refuse = 0, n_retry = 0, n_push = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int i = 0; i < 2 + DS; i++) if (inval_valid[i]) has[li(inval_addr[i])] <= 1'b0;
      for (int i = 0; i < 2; i++) if (fill_valid[i]) has[li(fill_addr[i])] <= 1'b1;
      if (ev_valid && ev_ready) has[li(ev_addr)] <= 1'b0;
      if (out_valid && out_ready) got.push_back(out_msg);
      n_def    += int'(ev_deferred);
      n_to     += int'(ev_timeout);
      n_commit += int'(ev_push_commit);
      n_drop   += int'(ev_push_drop);
      n_refuse += int'(ev_push_refuse);
      n_retry  += int'(ev_retry);
      n_push   += int'(ev_push_sent);
    end
  end

  // ---------------- stimulus helpers ----------------
  localparam line_addr_t L = 26'h1, D1 = 26'h4, D2 = 26'h5, D3 = 26'h6, D4 = 26'h7, D5 = 26'h8;
  localparam logic [ADDR_W-1:0] PC_ACQ = 32'h0000_2000;

  function automatic logic [ADDR_W-1:0] byte_of(input line_addr_t l);
    return {l, 6'h0};
  endfunction

  task automatic tick();
    @(negedge clk);
    disp_valid = 0; exec_valid = 0; train_valid = 0; acc_valid = 0; st_valid = 0;
    ev_valid = 0; in_valid = 0;
  endtask

  task automatic deliver(input msg_type_e t, input int src, input int aux, input line_addr_t a,
                         input logic retry = 1'b0);
    in_msg = '0;
    in_msg.mtype = t; in_msg.src = node_id_t'(src); in_msg.dst = node_id_t'(ID);
    in_msg.aux = node_id_t'(aux); in_msg.retry = retry; in_msg.addr = a;
    in_valid = 1;
    tick();
  endtask

  task automatic acquire();
    disp_valid = 1; disp_pc = PC_ACQ;
    #1 exec_pred = disp_pred;
    check(disp_pred, "acquire predicted");
    exec_valid = 1; exec_addr = byte_of(L);
    tick();
  endtask

  task automatic access(input line_addr_t a);
    acc_valid = 1; acc_addr = byte_of(a); acc_wfault = !has[li(a)];
    tick();
  endtask

  task automatic release_lock();
    st_valid = 1; st_addr = byte_of(L);
    tick();
  endtask

  task automatic expect_msg(input msg_type_e t, input int dst, input int aux, input line_addr_t a,
                            input string what);
    msg_t m;
    int   w;
    w = 0;
    while (got.size() == 0 && w < 20) begin
      tick();
      w++;
    end
    if (got.size() == 0) begin
      check(1'b0, {what, ": no message"});
    end else begin
      m = got.pop_front();
      check(m.mtype == t && int'(m.dst) == dst && int'(m.aux) == aux && m.addr == a,
            $sformatf("%s: got type %0d dst %0d aux %0d addr %h", what, m.mtype, m.dst, m.aux, m.addr));
    end
  endtask

  task automatic expect_quiet(input int cycles, input string what);
    repeat (cycles) tick();
    check(got.size() == 0, {what, ": no message expected"});
    got.delete();
  endtask

  int t0;

  initial begin
    disp_valid = 0; exec_valid = 0; train_valid = 0; acc_valid = 0; st_valid = 0; ev_valid = 0;
    in_valid = 0; disp_pc = '0; exec_pred = 0; exec_addr = '0; train_pc = '0; train_is_lock = 0;
    acc_addr = '0; acc_wfault = 0; st_addr = '0; ev_addr = '0; in_msg = '0; out_ready = 1;
    sink_ok_cfg = 1;
    for (int i = 0; i < 16; i++) has[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    tick();
    got.delete();

    train_valid = 1; train_pc = PC_ACQ; train_is_lock = 1;
    tick();

    // ---- critical section 1: request, deferral, release hand-over
    acquire();
    expect_msg(M_RDX_LP, NODES, ID, L, "CS1 rd_X_lp to the home");
    deliver(M_FWD_LP, NODES, 2, L);        // node 2 queued behind us
    expect_quiet(3, "CS1 intervention deferred while REQUESTED");
    check(n_def == 1, "one deferral");
    deliver(M_DATA_X, NODES, ID, L);
    check(has[li(L)], "lock-line filled");
    access(D1);
    expect_msg(M_RDX, NODES, ID, D1, "CS1 write fault D1");
    deliver(M_DATA_X, NODES, ID, D1);
    access(D2);
    expect_msg(M_RDX, NODES, ID, D2, "CS1 write fault D2");
    t0 = cyc;
    deliver(M_NACK, NODES, ID, D2);
    expect_msg(M_RDX, NODES, ID, D2, "CS1 D2 retried after a NACK");
    check(cyc - t0 >= RDLY && cyc - t0 <= RDLY + 4,
          $sformatf("retry after %0d cycles, delay %0d", cyc - t0, RDLY));
    deliver(M_DATA_X, NODES, ID, D2);
    release_lock();
    expect_msg(M_LINE_X, 2, ID, L, "CS1 release: lock-line to node 2");
    expect_msg(M_REVISION, NODES, ID, L, "CS1 release: revision to the home");
    check(!has[li(L)], "lock-line given up");
    check(n_push == 0, "nothing learned yet");

    // ---- CS2: D1 written again, no waiter: the lock stays PRESENT
    acquire();
    expect_msg(M_RDX_LP, NODES, ID, L, "CS2 rd_X_lp");
    deliver(M_DATA_X, NODES, ID, L);
    access(D1);
    release_lock();
    expect_quiet(3, "CS2 release without a waiter");

    // ---- hand-over of a PRESENT lock with D1 pushed
    deliver(M_FWD_LP, NODES, 3, L);
    expect_msg(M_PUSH_HINT, 3, ID, D1, "push hint ahead of the lock-line");
    expect_msg(M_LINE_X, 3, ID, L, "lock-line to node 3");
    expect_msg(M_REVISION, NODES, ID, L, "revision");
    expect_msg(M_PUSH_WB, NODES, 3, D1, "annotated write-back of D1, target 3");
    expect_quiet(2, "D2 not confident");
    check(!has[li(D1)] && !has[li(L)], "pushed line and lock-line given up");
    check(n_push == 1, "one push sent");

    // ---- receiving side: hint then permission commits the line
    deliver(M_PUSH_HINT, 2, 2, D3);
    deliver(M_PERM_X, NODES, 2, D3);
    tick();                               // outcome is registered
    check(has[li(D3)] && n_commit == 1, "pushed D3 installed");
    expect_quiet(2, "commit sends nothing");

    // ---- write fault to an announced line waits; a cancelled push turns into rd_X
    deliver(M_PUSH_HINT, 2, 2, D4);
    access(D4);
    expect_quiet(4, "write fault to an announced line issues no request");
    deliver(M_PERM_NACK, NODES, 2, D4);
    tick();                               // outcome is registered
    check(n_drop == 1, "push dropped");
    expect_msg(M_RDX, NODES, ID, D4, "held write fault becomes a rd_X");
    deliver(M_DATA_X, NODES, ID, D4);

    // ---- write fault to an announced line served by the push
    deliver(M_PUSH_HINT, 2, 2, D2);        // D2 is held here: this hint is refused
    deliver(M_PERM_NACK, NODES, 2, D2);    // and pairs off with a refused permission
    deliver(M_FWD, NODES, 0, D2);          // plain intervention from node 0
    expect_msg(M_LINE_X, 0, ID, D2, "plain intervention answered at once");
    expect_msg(M_REVISION, NODES, ID, D2, "plain intervention revision");
    check(!has[li(D2)], "D2 invalidated");
    got.delete();
    deliver(M_PUSH_HINT, 2, 2, D2);
    access(D2);
    deliver(M_PERM_X, NODES, 2, D2);
    tick();                               // outcome is registered
    check(has[li(D2)] && n_commit == 2, "waiting write fault served by the push");
    expect_quiet(RDLY + 4, "no request for a pushed line");

    // ---- refused push: granted permission is handed back
    sink_ok_cfg = 0;
    deliver(M_PUSH_HINT, 2, 2, D5);
    sink_ok_cfg = 1;
    deliver(M_PERM_X, NODES, 2, D5);
    tick();                               // outcome is registered
    check(n_refuse == 1 && !has[li(D5)], "push refused");
    expect_msg(M_WB, NODES, ID, D5, "refused line written back");

    // ---- deferral bound: a held lock is handed over after DEFER cycles
    acquire();
    expect_msg(M_RDX_LP, NODES, ID, L, "CS3 rd_X_lp");
    deliver(M_DATA_X, NODES, ID, L);
    deliver(M_FWD_LP, NODES, 2, L);
    t0 = cyc;
    while (got.size() == 0 && cyc - t0 < 4 * DEFER) tick();
    check(n_to == 1, "deferral bound reached");
    check(cyc - t0 >= DEFER && cyc - t0 <= DEFER + 4,
          $sformatf("hand-over after %0d cycles, bound %0d", cyc - t0, DEFER));
    expect_msg(M_LINE_X, 2, ID, L, "lock-line handed over at the bound");
    expect_msg(M_REVISION, NODES, ID, L, "revision at the bound");
    release_lock();
    expect_quiet(3, "late release sends nothing");

    // ---- replacement eviction writes the line back
    ev_valid = 1; ev_addr = D3;
    tick();
    expect_msg(M_WB, NODES, ID, D3, "evicted line written back");
    check(!has[li(D3)], "D3 gone");
    check(n_retry == 2, $sformatf("two retries, got %0d", n_retry));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
