// lst_tb -- self-checking testbench for the extended Lock State Table.
//
// Walks one lock through the IQL states (request, deferral of an incoming
// rd_X_lp, release that serves it), trains the Speculative Push confidence
// counters over several critical sections and checks that a line is named for
// pushing only once its counter has saturated, and kept until it falls to zero.
// It also checks the deferral bound (cycle count), eviction of the lock-line,
// a NACK dropping a buffered request, and slot replacement. Expected values are
// worked out by hand from the rules, independently of the RTL.
module lst_tb;
  import iql_pkg::*;

  localparam int unsigned DEFER = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic acq_valid, acq_line_present, fill_valid, nack_valid, acc_valid, acc_wfault;
  logic st_valid, ev_valid, ev_replace, ext_valid;
  logic [ADDR_W-1:0] acq_addr, st_addr;
  line_addr_t fill_addr, nack_addr, acc_addr, ev_addr, ext_addr;
  node_id_t ext_src;
  logic ext_untracked, issue_valid, issue_lp, svc_valid, svc_timeout, ext_deferred;
  line_addr_t issue_addr, svc_addr;
  node_id_t svc_dst;
  logic [1:0] svc_push_mask;
  line_addr_t svc_push_addr [2];

  lst #(.ENTRIES(4), .DATA_SLOTS(2), .DEFER_LIMIT(DEFER)) dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle();
    acq_valid = 0; acq_line_present = 0; fill_valid = 0; nack_valid = 0;
    acc_valid = 0; acc_wfault = 0; st_valid = 0; ev_valid = 0; ev_replace = 0;
    ext_valid = 0;
  endtask

  // apply the inputs set up by the caller for one clock, then clear them
  task automatic tick();
    @(posedge clk);
    #1;
    idle();
  endtask

  localparam logic [ADDR_W-1:0] LOCK  = 32'h0000_1040;
  localparam line_addr_t        LOCKL = LOCK[ADDR_W-1:LINE_OFF];
  localparam line_addr_t        D1 = 26'h100, D2 = 26'h101, D3 = 26'h102;

  // need: the lock-line is not in the LST as PRESENT and not in the cache
  task automatic acquire(input logic present, input logic need);
    acq_valid = 1; acq_addr = LOCK; acq_line_present = present;
    tick();
    check(issue_valid == need, "issue on acquire");
    if (need) begin
      check(issue_lp && issue_addr == LOCKL, "rd_X_lp to the lock-line");
      fill_valid = 1; fill_addr = LOCKL;
      tick();
    end
  endtask

  task automatic access(input line_addr_t a, input logic wf);
    acc_valid = 1; acc_addr = a; acc_wfault = wf;
    tick();
  endtask

  task automatic release_lock();
    st_valid = 1; st_addr = LOCK;
    tick();
  endtask

  task automatic ext_req(input node_id_t src);
    ext_valid = 1; ext_addr = LOCKL; ext_src = src;
    #0 check(!ext_untracked, "request recognised");
    tick();
  endtask

  int t0;

  initial begin
    idle();
    acq_addr = '0; st_addr = '0; fill_addr = '0; nack_addr = '0; acc_addr = '0;
    ev_addr = '0; ext_addr = '0; ext_src = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // --- critical section 1: request deferred while REQUESTED, served at release
    acq_valid = 1; acq_addr = LOCK; acq_line_present = 0;
    tick();
    check(issue_valid && issue_lp && issue_addr == LOCKL, "CS1: rd_X_lp issued");
    ext_req(6'd5);
    check(ext_deferred && !svc_valid, "CS1: request buffered while REQUESTED");
    fill_valid = 1; fill_addr = LOCKL;
    tick();
    access(D1, 1);
    access(D2, 1);
    release_lock();
    check(svc_valid && svc_dst == 6'd5 && svc_addr == LOCKL, "CS1: release serves buffered request");
    check(svc_push_mask == 2'b00, "CS1: no confident lines yet");
    check(!svc_timeout, "CS1: not a timeout");

    // --- CS2: only D1 touched; release without a waiter -> PRESENT
    acquire(0, 1);
    access(D1, 0);
    release_lock();
    check(!svc_valid, "CS2: no waiter, no service");
    ext_req(6'd7);
    check(svc_valid && svc_dst == 6'd7, "CS2: PRESENT lock served at once");
    check(svc_push_mask == 2'b01 && svc_push_addr[0] == D1, "CS2: D1 reached max, pushed");

    // --- CS3: nothing touched; D1 drops to 2 but stays enabled, D2 to 0
    acquire(0, 1);
    release_lock();
    ext_req(6'd3);
    check(svc_valid && svc_push_mask == 2'b01, "CS3: D1 still enabled (hysteresis)");

    // --- CS4, CS5: still nothing; D1 -> 1 -> 0 disables it
    acquire(0, 1);
    release_lock();
    acquire(0, 0);           // still PRESENT: HELD without a request
    release_lock();
    ext_req(6'd3);
    check(svc_valid && svc_push_mask == 2'b00, "CS5: D1 disabled at zero");

    // --- slot replacement: D3 write fault replaces a lowest-counter slot
    acquire(0, 1);
    access(D1, 0);           // D1 -> A set
    access(D3, 1);           // both slots hold counters 0; one is replaced
    check(dut.slot_q[0][0].addr == D3 || dut.slot_q[0][1].addr == D3, "D3 allocated");
    release_lock();

    // --- deferral bound: waiter served after DEFER cycles without a release
    acquire(0, 0);
    ext_req(6'd9);
    check(ext_deferred, "timeout: request buffered while HELD");
    t0 = 0;
    while (!svc_valid && t0 < 100) begin
      tick();
      t0++;
    end
    check(svc_valid && svc_timeout && svc_dst == 6'd9, "timeout: served by the bound");
    check(t0 == DEFER, $sformatf("timeout after %0d cycles, expected %0d", t0, DEFER));

    // --- NACK drops a buffered request
    acq_valid = 1; acq_addr = LOCK; acq_line_present = 0;
    tick();
    ext_req(6'd4);
    nack_valid = 1; nack_addr = LOCKL;
    tick();
    fill_valid = 1; fill_addr = LOCKL;
    tick();
    release_lock();
    check(!svc_valid, "NACK dropped the buffered request");

    // --- already present lock-line: HELD without a request; eviction -> INVALID
    acquire(1, 0);
    check(dut.ent_q[0].st == LS_HELD, "present line goes straight to HELD");
    ev_valid = 1; ev_addr = LOCKL; ev_replace = 1;
    tick();
    ext_valid = 1; ext_addr = LOCKL; ext_src = 6'd2;
    #0 check(ext_untracked, "evicted lock no longer tracked");
    tick();
    check(!svc_valid, "no service for evicted lock");

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
