// iql_directory_tb -- self-checking testbench for the IQL directory controller.
//
// Builds an inferential queue of three requestors and dissolves it with revision
// messages, checks the base-protocol NACK of a busy line, breaks a queue of four
// down with a write-back and drains it with retried requests, resolves the
// two-member write-back race, and orders speculative pushes (grant, refusal, and
// refusal of a push that meets a busy line). Every expected message is written
// out by hand from the protocol rules.
module iql_directory_tb;
  import iql_pkg::*;

  localparam int unsigned NODES = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  msg_t in_msg, out_msg;
  logic ev_queue_fwd, ev_breakdown, ev_push_grant, ev_push_nack;

  iql_directory #(.NODES(NODES), .LINES(16)) dut (.*);

  int checks = 0;
  int failures = 0;
  int n_queue = 0, n_brk = 0, n_pg = 0, n_pn = 0;
  msg_t got [$];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_msg);
    n_queue += int'(ev_queue_fwd);
    n_brk   += int'(ev_breakdown);
    n_pg    += int'(ev_push_grant);
    n_pn    += int'(ev_push_nack);
  end

  task automatic send(input msg_type_e t, input int src, input line_addr_t a,
                      input int aux = 0, input logic retry = 1'b0);
    in_msg       = '0;
    in_msg.mtype = t;
    in_msg.src   = node_id_t'(src);
    in_msg.dst   = node_id_t'(NODES);
    in_msg.aux   = node_id_t'(aux);
    in_msg.retry = retry;
    in_msg.addr  = a;
    in_valid     = 1'b1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
  endtask

  task automatic expect_msg(input msg_type_e t, input int dst, input int aux, input line_addr_t a,
                            input string what);
    msg_t m;
    int   w;
    w = 0;
    while (got.size() == 0 && w < 20) begin
      @(posedge clk);
      #1 w++;
    end
    if (got.size() == 0) begin
      check(1'b0, {what, ": no message"});
    end else begin
      m = got.pop_front();
      check(m.mtype == t && int'(m.dst) == dst && int'(m.aux) == aux && m.addr == a,
            $sformatf("%s: got type %0d dst %0d aux %0d addr %h", what, m.mtype, m.dst, m.aux, m.addr));
    end
  endtask

  task automatic expect_none(input string what);
    repeat (3) @(posedge clk);
    #1 check(got.size() == 0, {what, ": no message expected"});
    got.delete();
  endtask

  localparam line_addr_t L = 26'h5, M = 26'h6, N = 26'h7, Q = 26'h8, R = 26'h9;

  initial begin
    in_valid = 0; in_msg = '0; out_ready = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    got.delete();
    n_queue = 0; n_brk = 0; n_pg = 0; n_pn = 0;

    // ---- queue of P1 <- P2 <- P3 on lock-line L
    send(M_RDX_LP, 1, L);
    expect_msg(M_DATA_X, 1, 1, L, "P1 gets L from memory");
    send(M_RDX_LP, 2, L);
    expect_msg(M_FWD_LP, 1, 2, L, "P2 forwarded to owner P1");
    send(M_RDX_LP, 3, L);
    expect_msg(M_FWD_LP, 2, 3, L, "P3 forwarded to last requestor P2");
    check(dut.dir_q[5].synch && dut.dir_q[5].vec == 4'b1110, "synch_bit and three bits");
    send(M_REVISION, 1, L);
    check(dut.dir_q[5].st == DS_BUSY, "still busy with two bits");
    send(M_REVISION, 2, L);
    check(dut.dir_q[5].st == DS_EXCL && dut.dir_q[5].owner == 3 && !dut.dir_q[5].synch,
          "P3 owner, Exclusive, synch_bit clear");
    expect_none("revisions are silent");

    // ---- base protocol: rd_X to an owned line, busy NACKs
    send(M_RDX, 0, L);
    expect_msg(M_FWD, 3, 0, L, "rd_X forwarded to P3");
    send(M_RDX_LP, 1, L);
    expect_msg(M_NACK, 1, 1, L, "busy without synch_bit NACKs");
    send(M_REVISION, 3, L);
    check(dut.dir_q[5].st == DS_EXCL && dut.dir_q[5].owner == 0, "P0 owner");

    // ---- queue breakdown on line M
    send(M_RDX_LP, 0, M);
    expect_msg(M_DATA_X, 0, 0, M, "P0 gets M");
    send(M_RDX_LP, 1, M);
    expect_msg(M_FWD_LP, 0, 1, M, "P1 queued");
    send(M_RDX_LP, 2, M);
    expect_msg(M_FWD_LP, 1, 2, M, "P2 queued");
    send(M_RDX_LP, 3, M);
    expect_msg(M_FWD_LP, 2, 3, M, "P3 queued");
    send(M_WB, 0, M);
    expect_msg(M_NACK, 1, 1, M, "breakdown NACK P1");
    expect_msg(M_NACK, 2, 2, M, "breakdown NACK P2");
    expect_msg(M_NACK, 3, 3, M, "breakdown NACK P3");
    check(dut.dir_q[6].st == DS_BREAK && !dut.dir_q[6].synch, "BusyExcl, synch_bit clear");
    send(M_RDX_LP, 1, M, 0, 1'b1);
    expect_msg(M_NACK, 1, 1, M, "retry P1 NACKed while draining");
    send(M_RDX_LP, 2, M, 0, 1'b1);
    expect_msg(M_NACK, 2, 2, M, "retry P2 NACKed while draining");
    check(dut.dir_q[6].st == DS_BREAK, "one bit left");
    send(M_RDX_LP, 3, M, 0, 1'b1);
    expect_msg(M_NACK, 3, 3, M, "retry P3 NACKed, queue empty");
    check(dut.dir_q[6].st == DS_UNOWNED, "Unowned after drain");
    send(M_RDX_LP, 2, M, 0, 1'b1);
    expect_msg(M_DATA_X, 2, 2, M, "retry served from memory");

    // ---- write-back with two bits: remaining requestor gets the data
    send(M_RDX_LP, 0, N);
    expect_msg(M_DATA_X, 0, 0, N, "P0 gets N");
    send(M_RDX_LP, 1, N);
    expect_msg(M_FWD_LP, 0, 1, N, "P1 queued on N");
    send(M_WB, 0, N);
    expect_msg(M_DATA_X, 1, 1, N, "write-back race: P1 served by directory");
    check(dut.dir_q[7].st == DS_EXCL && dut.dir_q[7].owner == 1, "P1 owns N");

    // ---- speculative push ordering
    send(M_RDX, 2, Q);
    expect_msg(M_DATA_X, 2, 2, Q, "P2 gets Q");
    send(M_PUSH_WB, 2, Q, 3);
    expect_msg(M_PERM_X, 3, 2, Q, "push of Q to P3 granted");
    check(dut.dir_q[8].owner == 3, "P3 owns Q");
    send(M_PUSH_WB, 2, Q, 1);
    expect_msg(M_PERM_NACK, 1, 2, Q, "push from a non-owner refused");

    send(M_RDX, 0, R);
    expect_msg(M_DATA_X, 0, 0, R, "P0 gets R");
    send(M_RDX, 1, R);
    expect_msg(M_FWD, 0, 1, R, "P1 rd_X forwarded to P0");
    send(M_PUSH_WB, 0, R, 2);
    expect_msg(M_DATA_X, 1, 1, R, "third processor gets the data");
    expect_msg(M_PERM_NACK, 2, 0, R, "push to P2 cancelled");

    check(n_queue == 3, $sformatf("queue forwards %0d", n_queue));
    check(n_brk == 1, "one breakdown");
    check(n_pg == 1 && n_pn == 2, "push grants/refusals");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
