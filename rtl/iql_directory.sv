// iql_directory -- home directory controller with inferentially queued locks
// and the ordering point of speculative pushes.
//
// Each memory line of this home has an entry: a state, the synch_bit, an owner
// pointer and a sharing bit-vector with one bit per node. The underlying
// protocol is a memory-based directory with request forwarding: a read for
// exclusive to an owned line is forwarded to the owner as an intervention, the
// requestor becomes the owner, and the entry stays busy until the previous owner
// sends a revision message; requests that reach a busy entry are NACKed.
//
// The IQL additions (following the described protocol and its transition
// diagram):
//   * Exclusive + rd_X_lp: forward to the owner, set the requestor's bit (the
//     owner's bit is already set), record the requestor as last requestor in the
//     owner pointer, set synch_bit, go busy.
//   * Busy with synch_bit + rd_X_lp: forward to the last requestor instead of
//     NACKing, set the bit, the requestor becomes last requestor. Each node so
//     receives at most one intervention per line and a queue forms.
//   * Revision: clear the sender's bit; when one bit is left, the last requestor
//     is the owner, synch_bit is cleared and the entry is Exclusive again.
//   * Write-back while busy with synch_bit and more than two bits set: the queue
//     is broken down. synch_bit is cleared and every other node in the vector
//     is NACKed. Each of them retries with the ack-for-NACK bit set; that retry
//     clears its bit, and the entry is Unowned once no bit is left.
// Choices of this design where the description is silent: the writer's own bit is
// cleared at the breakdown and the writer is not NACKed; a retry seen while the
// queue drains is NACKed again (the node retries once more and then finds the
// line Unowned); a write-back with at most two bits set hands the written-back
// data to the one remaining requestor, which becomes the owner; a plain rd_X to a
// busy entry is NACKed even with synch_bit set. Shared copies of the underlying
// protocol are not modelled: every grant here is exclusive.
//
// Speculative push: an annotated write-back (M_PUSH_WB, aux = target) from the
// owner of an Exclusive line writes the line back and passes it, with exclusive
// permission, to the target (M_PERM_X), which becomes the owner. In any other
// state it is handled as a write-back and the target is refused (M_PERM_NACK).
//
// Interface and timing: one message is taken per cycle when in_ready is high and
// at most one leaves per cycle on out_* (valid/ready) from a four-entry output
// queue. in_ready depends only on registered state: it is high while the queue
// has room for the two messages one input can produce and no breakdown NACKs are
// still being sent (they leave one per cycle). This home serves line addresses
// 0 .. LINES-1, one entry each (an assertion flags any other address). Reset
// makes every entry Unowned.
module iql_directory
  import iql_pkg::*;
#(
  parameter int unsigned NODES = 16,
  parameter int unsigned LINES = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  msg_t in_msg,
  output logic out_valid,
  input  logic out_ready,
  output msg_t out_msg,
  // event pulses for monitoring
  output logic ev_queue_fwd,     // rd_X_lp forwarded to a last requestor
  output logic ev_breakdown,     // queue broken down by a write-back
  output logic ev_push_grant,
  output logic ev_push_nack
);

  localparam int unsigned IDX_W = $clog2(LINES);

  typedef struct packed {
    dir_state_e       st;
    logic             synch;
    node_id_t         owner;     // owner, or last requestor when synch is set
    logic [NODES-1:0] vec;
  } dir_ent_t;

  dir_ent_t dir_q [LINES];

  // output queue: room for the two messages one input can produce
  msg_t             oq [4];
  logic [1:0]       oq_rd_q, oq_wr_q;
  logic [2:0]       oq_cnt_q;
  logic [NODES-1:0] nack_vec_q;
  line_addr_t       nack_addr_q;

  function automatic int unsigned popc(input logic [NODES-1:0] v);
    int unsigned c;
    c = 0;
    for (int i = 0; i < NODES; i++) c += int'(v[i]);
    return c;
  endfunction

  function automatic node_id_t lowest(input logic [NODES-1:0] v);
    node_id_t n;
    n = '0;
    for (int i = NODES - 1; i >= 0; i--) if (v[i]) n = node_id_t'(i);
    return n;
  endfunction

  function automatic msg_t mk(input msg_type_e t, input node_id_t dst, input node_id_t aux,
                              input line_addr_t a);
    msg_t m;
    m.mtype = t;
    m.src   = node_id_t'(NODES);   // the directory's port number
    m.dst   = dst;
    m.aux   = aux;
    m.retry = 1'b0;
    m.addr  = a;
    return m;
  endfunction

  // in_ready depends on registered state only
  assign out_valid = (oq_cnt_q != '0);
  assign out_msg   = oq[oq_rd_q];
  assign in_ready  = (nack_vec_q == '0) && (oq_cnt_q <= 3'd2);

  logic [IDX_W-1:0] idx;
  dir_ent_t         e, en;
  logic             o_v;
  msg_t             o_m;
  logic             x_v;
  msg_t             x_m;
  logic [NODES-1:0] n_nack;
  logic             f_queue, f_brk, f_pg, f_pn;

  assign idx = in_msg.addr[IDX_W-1:0];
  assign e   = dir_q[idx];

  always_comb begin
    node_id_t         s;
    logic [NODES-1:0] sbit;
    logic [NODES-1:0] v2;
    logic             lp;
    logic             is_push;
    en      = e;
    o_v     = 1'b0;
    o_m     = '0;
    x_v     = 1'b0;
    x_m     = '0;
    n_nack  = '0;
    f_queue = 1'b0;
    f_brk   = 1'b0;
    f_pg    = 1'b0;
    f_pn    = 1'b0;
    s       = in_msg.src;
    sbit    = '0;
    sbit[s] = 1'b1;
    v2      = e.vec & ~sbit;
    lp      = (in_msg.mtype == M_RDX_LP);
    is_push = (in_msg.mtype == M_PUSH_WB);

    unique case (in_msg.mtype)
      M_RDX, M_RDX_LP: begin
        unique case (e.st)
          DS_UNOWNED: begin
            o_v = 1'b1; o_m = mk(M_DATA_X, s, s, in_msg.addr);
            en  = '{st: DS_EXCL, synch: 1'b0, owner: s, vec: sbit};
          end
          DS_EXCL: begin
            if (e.owner == s) begin
              o_v = 1'b1; o_m = mk(M_DATA_X, s, s, in_msg.addr);
            end else begin
              o_v = 1'b1; o_m = mk(lp ? M_FWD_LP : M_FWD, e.owner, s, in_msg.addr);
              en  = '{st: DS_BUSY, synch: lp, owner: s, vec: e.vec | sbit};
            end
          end
          DS_BUSY: begin
            if (e.synch && lp) begin
              o_v = 1'b1; o_m = mk(M_FWD_LP, e.owner, s, in_msg.addr);
              en.owner = s;
              en.vec   = e.vec | sbit;
              f_queue  = 1'b1;
            end else begin
              o_v = 1'b1; o_m = mk(M_NACK, s, s, in_msg.addr);
            end
          end
          DS_BREAK: begin
            if (lp && in_msg.retry && e.vec[s]) begin
              en.vec = v2;
              if (v2 == '0) en.st = DS_UNOWNED;
            end
            o_v = 1'b1; o_m = mk(M_NACK, s, s, in_msg.addr);
          end
        endcase
      end

      M_REVISION: begin
        if (e.st == DS_BUSY && e.vec[s]) begin
          en.vec = v2;
          if (popc(v2) <= 1) begin
            en.st    = DS_EXCL;
            en.synch = 1'b0;
          end
        end
      end

      M_WB, M_PUSH_WB: begin
        if (e.st == DS_EXCL && e.owner == s) begin
          if (is_push) begin
            o_v  = 1'b1; o_m = mk(M_PERM_X, in_msg.aux, s, in_msg.addr);
            en   = '{st: DS_EXCL, synch: 1'b0, owner: in_msg.aux, vec: '0};
            en.vec[in_msg.aux] = 1'b1;
            f_pg = 1'b1;
          end else begin
            en = '{st: DS_UNOWNED, synch: 1'b0, owner: '0, vec: '0};
          end
        end else begin
          if (e.st == DS_BUSY && e.vec[s]) begin
            if (e.synch && popc(e.vec) > 2) begin
              en.st    = DS_BREAK;
              en.synch = 1'b0;
              en.vec   = v2;
              n_nack   = v2;
              f_brk    = 1'b1;
            end else if (v2 == '0) begin
              en = '{st: DS_UNOWNED, synch: 1'b0, owner: '0, vec: '0};
            end else begin
              o_v = 1'b1; o_m = mk(M_DATA_X, lowest(v2), lowest(v2), in_msg.addr);
              en  = '{st: DS_EXCL, synch: 1'b0, owner: lowest(v2), vec: '0};
              en.vec[lowest(v2)] = 1'b1;
            end
          end
          if (is_push) begin
            f_pn = 1'b1;
            if (o_v) begin
              x_v = 1'b1; x_m = mk(M_PERM_NACK, in_msg.aux, s, in_msg.addr);
            end else begin
              o_v = 1'b1; o_m = mk(M_PERM_NACK, in_msg.aux, s, in_msg.addr);
            end
          end
        end
      end

      default: ;   // messages meant for nodes are ignored
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) dir_q[i] <= '{st: DS_UNOWNED, synch: 1'b0, owner: '0, vec: '0};
      for (int i = 0; i < 4; i++) oq[i] <= '0;
      oq_rd_q       <= '0;
      oq_wr_q       <= '0;
      oq_cnt_q      <= '0;
      nack_vec_q    <= '0;
      nack_addr_q   <= '0;
      ev_queue_fwd  <= 1'b0;
      ev_breakdown  <= 1'b0;
      ev_push_grant <= 1'b0;
      ev_push_nack  <= 1'b0;
    end else begin
      logic [1:0] w;
      logic [2:0] cnt;
      w   = oq_wr_q;
      cnt = oq_cnt_q;
      if (out_valid && out_ready) begin
        oq_rd_q <= oq_rd_q + 1'b1;
        cnt     = cnt - 1'b1;
      end
      ev_queue_fwd  <= 1'b0;
      ev_breakdown  <= 1'b0;
      ev_push_grant <= 1'b0;
      ev_push_nack  <= 1'b0;
      if (in_valid && in_ready) begin
        dir_q[idx]    <= en;
        ev_queue_fwd  <= f_queue;
        ev_breakdown  <= f_brk;
        ev_push_grant <= f_pg;
        ev_push_nack  <= f_pn;
        if (o_v) begin
          oq[w] <= o_m;
          w     = w + 1'b1;
          cnt   = cnt + 1'b1;
        end
        if (x_v) begin
          oq[w] <= x_m;
          w     = w + 1'b1;
          cnt   = cnt + 1'b1;
        end
        if (n_nack != '0) begin
          nack_vec_q  <= n_nack;
          nack_addr_q <= in_msg.addr;
        end
      end else if (nack_vec_q != '0 && oq_cnt_q < 3'd4) begin
        oq[w] <= mk(M_NACK, lowest(nack_vec_q), lowest(nack_vec_q), nack_addr_q);
        w     = w + 1'b1;
        cnt   = cnt + 1'b1;
        nack_vec_q[lowest(nack_vec_q)] <= 1'b0;
      end
      oq_wr_q  <= w;
      oq_cnt_q <= cnt;
    end
  end

  // every line of this home has its own entry: a line address beyond LINES
  // would share another line's entry
  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> (in_msg.addr < line_addr_t'(LINES)))
    else $error("iql_directory: line %h is not served by this home", in_msg.addr);

  a_out_held: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_msg))
    else $error("iql_directory: output message changed while stalled");

endmodule
