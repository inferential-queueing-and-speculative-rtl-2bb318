// push_match -- pairs speculative pushes with their coherence permissions.
//
// A speculative push reaches the target node in two halves that may arrive in
// either order and over different networks: the push itself (in the directory
// system an address hint sent with the lock-line, for which the target sets
// aside a buffer) and the coherence permission from the directory (an exclusive
// grant carrying the data, or a refusal). Both halves of a pair occur exactly
// once, so each half that arrives is held in this small table until its partner
// arrives, and both are then answered alike: if either half is refused, the other
// is refused too. The decisions, following the described rule:
//   push accepted + permission granted -> commit: install the line exclusive
//   push accepted + permission refused -> drop the buffer set aside for it
//   push refused  + permission granted -> refuse the permission (the node hands
//                                         the ownership back to the directory)
//   push refused  + permission refused -> nothing
// A half is paired with a waiting half of the other kind for the same line; a
// refused half with no such partner may pair with any refused half of the other
// kind, since any push reject can be matched with any permission reject.
// TRACK is the number of pairs the node can keep open; a requestor advertises it
// (track_free) so that pushers do not exceed it. q_addr/q_pending tell the node
// that an accepted push for a line is on its way, so that a write fault to that
// line waits for the push instead of requesting the line. Its value is not given and is
// this design's choice. A push is accepted when push_can_sink is set (the cache
// has an invalid way, or a buffer, for it).
//
// Interface and timing: push_* and perm_* are sampled at the clock edge; a node
// receives one message per cycle, so at most one of them is valid in a cycle.
// commit_*, drop_* and refuse_* are registered, valid one cycle later for one
// cycle.
module push_match
  import iql_pkg::*;
#(
  parameter int unsigned TRACK = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push_valid,
  input  line_addr_t push_addr,
  input  logic       push_can_sink,
  input  logic       perm_valid,
  input  line_addr_t perm_addr,
  input  logic       perm_grant,
  output logic       commit_valid,
  output line_addr_t commit_addr,
  output logic       drop_valid,
  output line_addr_t drop_addr,
  output logic       refuse_valid,
  output line_addr_t refuse_addr,
  input  line_addr_t q_addr,        // is an accepted push for this line waiting?
  output logic       q_pending,
  output logic [$clog2(TRACK+1)-1:0] track_free,
  output logic       overflow
);

  typedef struct packed {
    logic       valid;
    logic       is_push;   // 1: a push waits for its permission, 0: the reverse
    logic       ok;        // push accepted / permission granted
    line_addr_t addr;
  } pm_ent_t;

  pm_ent_t tab_q [TRACK];
  pm_ent_t tab_d [TRACK];

  logic       n_commit, n_drop, n_refuse, n_overflow;
  line_addr_t n_commit_a, n_drop_a, n_refuse_a;

  // Pair one arriving half against the table.
  task automatic arrive(input logic is_push, input line_addr_t addr, input logic ok_in);
    int   m;
    int   fr;
    logic ok_push, ok_perm;
    m  = -1;
    fr = -1;
    for (int i = TRACK - 1; i >= 0; i--) begin
      if (tab_d[i].valid && tab_d[i].is_push != is_push && tab_d[i].addr == addr) m = i;
      if (!tab_d[i].valid) fr = i;
    end
    if (m < 0 && !ok_in)
      for (int i = TRACK - 1; i >= 0; i--)
        if (tab_d[i].valid && tab_d[i].is_push != is_push && !tab_d[i].ok) m = i;
    if (m >= 0) begin
      ok_push = is_push ? ok_in : tab_d[m].ok;
      ok_perm = is_push ? tab_d[m].ok : ok_in;
      if (ok_push && ok_perm) begin
        n_commit = 1'b1; n_commit_a = addr;
      end else if (ok_push) begin
        n_drop = 1'b1;   n_drop_a = addr;
      end else if (ok_perm) begin
        n_refuse = 1'b1; n_refuse_a = is_push ? tab_d[m].addr : addr;
      end
      tab_d[m].valid = 1'b0;
    end else if (fr >= 0) begin
      tab_d[fr] = '{valid: 1'b1, is_push: is_push, ok: ok_in, addr: addr};
    end else begin
      n_overflow = 1'b1;
    end
  endtask

  always_comb begin
    tab_d      = tab_q;
    n_commit   = 1'b0; n_commit_a = '0;
    n_drop     = 1'b0; n_drop_a   = '0;
    n_refuse   = 1'b0; n_refuse_a = '0;
    n_overflow = 1'b0;
    if (push_valid) arrive(1'b1, push_addr, push_can_sink);
    if (perm_valid) arrive(1'b0, perm_addr, perm_grant);
  end

  always_comb begin
    q_pending = 1'b0;
    for (int i = 0; i < TRACK; i++)
      if (tab_q[i].valid && tab_q[i].is_push && tab_q[i].ok && tab_q[i].addr == q_addr)
        q_pending = 1'b1;
  end

  always_comb begin
    track_free = '0;
    for (int i = 0; i < TRACK; i++)
      if (!tab_q[i].valid) track_free = track_free + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TRACK; i++) tab_q[i] <= '0;
      commit_valid <= 1'b0; commit_addr <= '0;
      drop_valid   <= 1'b0; drop_addr   <= '0;
      refuse_valid <= 1'b0; refuse_addr <= '0;
      overflow     <= 1'b0;
    end else begin
      tab_q        <= tab_d;
      commit_valid <= n_commit; commit_addr <= n_commit_a;
      drop_valid   <= n_drop;   drop_addr   <= n_drop_a;
      refuse_valid <= n_refuse; refuse_addr <= n_refuse_a;
      overflow     <= n_overflow;
    end
  end

  a_one_half: assert property (@(posedge clk) disable iff (!rst_n) !(push_valid && perm_valid))
    else $error("push_match: push and permission in the same cycle");

  // Pushers must respect the advertised capacity.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !n_overflow)
    else $error("push_match: more open pushes than TRACK");

endmodule
