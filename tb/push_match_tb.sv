// push_match_tb -- self-checking testbench for the push/permission matching table.
//
// Sends push hints and directory permissions in both orders and checks each
// of the four accept/refuse combinations, the pairing of
// refusals across different lines, the free-entry count, and the query that
// tells whether an accepted push of a line is waiting for its permission.
module push_match_tb;
  import iql_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic push_valid, push_can_sink, perm_valid, perm_grant;
  line_addr_t push_addr, perm_addr;
  logic commit_valid, drop_valid, refuse_valid, overflow;
  line_addr_t commit_addr, drop_addr, refuse_addr;
  logic [2:0] track_free;
  line_addr_t q_addr;
  logic       q_pending;

  push_match #(.TRACK(4)) dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
    push_valid = 0;
    perm_valid = 0;
  endtask

  task automatic push(input line_addr_t a, input logic sink);
    push_valid = 1; push_addr = a; push_can_sink = sink;
  endtask

  task automatic perm(input line_addr_t a, input logic g);
    perm_valid = 1; perm_addr = a; perm_grant = g;
  endtask

  task automatic expect_out(input logic c, input logic d, input logic r, input line_addr_t a,
                            input string what);
    check(commit_valid == c && drop_valid == d && refuse_valid == r, {what, ": outcome"});
    if (c) check(commit_addr == a, {what, ": commit address"});
    if (d) check(drop_addr == a, {what, ": drop address"});
    if (r) check(refuse_addr == a, {what, ": refuse address"});
  endtask

  initial begin
    push_valid = 0; perm_valid = 0; push_can_sink = 0; perm_grant = 0;
    push_addr = '0; perm_addr = '0; q_addr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(track_free == 3'd4, "empty table");

    // accepted push, then granted permission -> commit
    push(26'h10, 1); tick();
    expect_out(0, 0, 0, '0, "push waits");
    check(track_free == 3'd3, "one entry open");
    q_addr = 26'h10;
    #1 check(q_pending, "accepted push of 10 pending");
    q_addr = 26'h11;
    #1 check(!q_pending, "no push of 11");
    q_addr = 26'h10;
    perm(26'h10, 1); tick();
    expect_out(1, 0, 0, 26'h10, "push+grant");
    check(track_free == 3'd4, "entry freed");
    #1 check(!q_pending, "nothing pending after the commit");

    // permission first, then accepted push -> commit
    perm(26'h20, 1); tick();
    push(26'h20, 1); tick();
    expect_out(1, 0, 0, 26'h20, "grant+push");

    // accepted push, refused permission -> drop
    push(26'h30, 1); tick();
    perm(26'h30, 0); tick();
    expect_out(0, 1, 0, 26'h30, "push+nack");

    // refused push, granted permission -> refuse the permission
    push(26'h40, 0); tick();
    q_addr = 26'h40;
    #1 check(!q_pending, "a refused push is not pending");
    perm(26'h40, 1); tick();
    expect_out(0, 0, 1, 26'h40, "reject+grant");

    // refused push pairs with a refused permission of another line
    push(26'h50, 0); tick();
    check(track_free == 3'd3, "reject waits");
    perm(26'h51, 0); tick();
    expect_out(0, 0, 0, '0, "reject+reject");
    check(track_free == 3'd4, "rejects paired across lines");

    // a granted permission does not pair with another line's push
    push(26'h60, 1); tick();
    perm(26'h61, 1); tick();
    expect_out(0, 0, 0, '0, "different lines stay apart");
    check(track_free == 3'd2, "two entries open");
    push(26'h61, 1); tick();
    expect_out(1, 0, 0, 26'h61, "second line paired");
    perm(26'h60, 1); tick();
    expect_out(1, 0, 0, 26'h60, "first line paired");
    check(track_free == 3'd4, "all entries freed");
    check(!overflow, "no overflow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
