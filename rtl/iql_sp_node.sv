// iql_sp_node -- coherence-controller logic of one processor node with
// inferentially queued locks and speculative push.
//
// It joins the three node structures of the design: the Lock Predictor Table
// (lpt), the extended Lock State Table (lst) and the push/permission matching
// table (push_match), and turns what they decide into protocol messages:
//   * a predicted acquire whose lock-line is absent issues a rd_X_lp to the home
//     directory; a write fault issues a rd_X for the data line;
//   * a rd_X_lp intervention for a HELD or REQUESTED lock is deferred in the LST;
//     when the lock is released (or at once, for a PRESENT lock) the lock-line is
//     sent straight to the requestor (M_LINE_X), a revision message goes to the
//     directory and, for each line the LST names for pushing that the cache
//     still holds modified, an address hint goes to the requestor and a
//     write-back annotated with the requestor as target goes to the directory;
//   * an incoming hint and the directory's permission for a pushed line are
//     paired in push_match; a committed pair installs the line exclusive, a
//     granted permission for a refused push is handed back with a write-back;
//   * a write fault to a line whose push has been announced by a hint issues no
//     request: it waits in an MSHR for the push, and turns into a rd_X only if
//     the push is cancelled. This is what the hints are for: they keep the
//     target from requesting lines that are about to be pushed to it;
//   * the first access to a line that arrived by push is reported to the LST as
//     a candidate, as a write fault would be, so that a migrating line keeps
//     being pushed along the queue of lock holders;
//   * a plain intervention (rd_X of another node) is answered at once;
//   * NACKed requests are held in a small table of outstanding requests (MSHRs)
//     and retried after RETRY_DELAY cycles, a rd_X_lp with its ack-for-NACK bit.
// The directory path (hints with the lock-line, data with the permission) is the
// one described for directory systems. Sending the hints just ahead of the
// lock-line rather than on arrival of the request, the number of MSHRs, the retry delay
// and the queueing of outgoing messages are this design's choices.
//
// The cache itself is outside: the node asks it through combinational queries
// (is a lock-line present, is a line held, is a candidate still modified, is
// there an invalid way for a push) and tells it through fill and invalidate
// strobes. Evictions reported by the cache (ev_*) are taken when ev_ready is
// high; a replacement eviction is written back. Three address outputs are the incoming
// message's address passed straight to the cache, because that is the line the
// cache must look up or update in that cycle: q_in_addr, fill_addr[0] (line
// received) and inval_addr[0] (line given up to a plain intervention).
// The cache's answers do not yet show this cycle's fills and invalidations, so
// a lock-line handed over in this cycle is not taken as present by an acquire,
// and an intervention for a line whose push commits in this cycle is answered
// with the pushed data, which passes through without being installed.
//
// Interface and timing: the network input is always accepted, one message per
// cycle. Messages leave through an internal queue of OQ_DEPTH entries, one per
// cycle on out_* (valid/ready). A lock-line leaves two cycles after the release
// store that frees it (LST register, then the queue).
module iql_sp_node
  import iql_pkg::*;
#(
  parameter int unsigned NODES       = 16,
  parameter int unsigned ID          = 0,
  parameter int unsigned LST_ENTRIES = 8,
  parameter int unsigned DATA_SLOTS  = 2,
  parameter int unsigned DEFER_LIMIT = 1024,
  parameter int unsigned TRACK       = 4,
  parameter int unsigned MSHRS       = 4,
  parameter int unsigned RETRY_DELAY = 16,
  parameter int unsigned OQ_DEPTH    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor: dispatch, execute, training, data accesses, stores
  input  logic              disp_valid,
  input  logic [ADDR_W-1:0] disp_pc,
  output logic              disp_pred,
  input  logic              exec_valid,
  input  logic              exec_pred,
  input  logic [ADDR_W-1:0] exec_addr,
  input  logic              train_valid,
  input  logic [ADDR_W-1:0] train_pc,
  input  logic              train_is_lock,
  input  logic              acc_valid,
  input  logic [ADDR_W-1:0] acc_addr,
  input  logic              acc_wfault,
  input  logic              st_valid,
  input  logic [ADDR_W-1:0] st_addr,
  // cache queries (combinational answers expected in the same cycle)
  output line_addr_t        q_lock_addr,
  input  logic              q_lock_present,
  output line_addr_t        q_in_addr,
  input  logic              q_in_has,
  output line_addr_t        q_push_addr [DATA_SLOTS],
  input  logic              q_push_mod  [DATA_SLOTS],
  input  logic              q_sink_ok,
  // cache updates
  output logic              fill_valid  [2],
  output line_addr_t        fill_addr   [2],
  output logic              inval_valid [2+DATA_SLOTS],
  output line_addr_t        inval_addr  [2+DATA_SLOTS],
  input  logic              ev_valid,
  input  line_addr_t        ev_addr,
  output logic              ev_ready,
  // network
  input  logic              in_valid,
  input  msg_t              in_msg,
  output logic              out_valid,
  input  logic              out_ready,
  output msg_t              out_msg,
  // event pulses for monitoring
  output logic              ev_deferred,
  output logic              ev_lock_sent,
  output logic              ev_timeout,
  output logic              ev_push_sent,
  output logic              ev_push_commit,
  output logic              ev_push_drop,
  output logic              ev_push_refuse,
  output logic              ev_retry
);

  localparam node_id_t MY_ID  = node_id_t'(ID);
  localparam node_id_t DIR_ID = node_id_t'(NODES);
  localparam int unsigned NC  = 9 + 2 * DATA_SLOTS;   // messages one cycle can produce
  localparam int unsigned OQ_W = $clog2(OQ_DEPTH);
  localparam int unsigned RD_W = $clog2(RETRY_DELAY + 1);

  function automatic msg_t mk(input msg_type_e t, input node_id_t dst, input node_id_t aux,
                              input line_addr_t a, input logic retry);
    msg_t m;
    m.mtype = t;
    m.src   = MY_ID;
    m.dst   = dst;
    m.aux   = aux;
    m.retry = retry;
    m.addr  = a;
    return m;
  endfunction

  // ---------------- incoming message decode ----------------
  logic in_data, in_fwd_lp, in_fwd, in_nack, in_perm, in_hint;
  assign in_data   = in_valid && (in_msg.mtype == M_DATA_X || in_msg.mtype == M_LINE_X);
  assign in_fwd_lp = in_valid && in_msg.mtype == M_FWD_LP;
  assign in_fwd    = in_valid && in_msg.mtype == M_FWD;
  assign in_nack   = in_valid && in_msg.mtype == M_NACK;
  assign in_perm   = in_valid && (in_msg.mtype == M_PERM_X || in_msg.mtype == M_PERM_NACK);
  assign in_hint   = in_valid && in_msg.mtype == M_PUSH_HINT;
  assign q_in_addr = in_msg.addr;

  // ---------------- LPT ----------------
  logic              lk_valid;
  logic [ADDR_W-1:0] lk_addr;

  lpt #(.PC_W(ADDR_W)) u_lpt (
    .clk, .rst_n,
    .disp_valid, .disp_pc, .disp_pred,
    .exec_valid, .exec_pred, .exec_addr,
    .lock_valid (lk_valid), .lock_addr (lk_addr),
    .train_valid, .train_pc, .train_is_lock
  );
  assign q_lock_addr = lk_addr[ADDR_W-1:LINE_OFF];

  // ---------------- LST ----------------
  logic lock_here;      // lock-line present and not leaving in this cycle
  logic in_has;         // line of the incoming message held (or arriving now)
  logic pass_thru;      // intervention answered with a line committed this cycle

  logic       ext_untracked;
  logic       iss_v, iss_lp;
  line_addr_t iss_a;
  logic       svc_v, svc_to;
  line_addr_t svc_a;
  node_id_t   svc_dst;
  logic [DATA_SLOTS-1:0] svc_mask;
  line_addr_t svc_paddr [DATA_SLOTS];
  logic       lst_ev_v, lst_ev_repl;
  line_addr_t lst_ev_a;
  logic       fwd_serve;      // plain or untracked intervention answered now
  logic       acc_cand;       // access that names a push candidate (see below)

  // A plain intervention invalidates the line through the LST eviction input;
  // cache-reported evictions wait (ev_ready low) in that cycle.
  assign fwd_serve   = (in_fwd || (in_fwd_lp && ext_untracked)) && in_has;
  assign ev_ready    = !fwd_serve;
  assign lst_ev_v    = fwd_serve || ev_valid;
  assign lst_ev_a    = fwd_serve ? in_msg.addr : ev_addr;
  assign lst_ev_repl = !fwd_serve;

  lst #(.ENTRIES(LST_ENTRIES), .DATA_SLOTS(DATA_SLOTS), .DEFER_LIMIT(DEFER_LIMIT)) u_lst (
    .clk, .rst_n,
    .acq_valid (lk_valid), .acq_addr (lk_addr), .acq_line_present (lock_here),
    .fill_valid (in_data), .fill_addr (in_msg.addr),
    .nack_valid (in_nack), .nack_addr (in_msg.addr),
    .acc_valid, .acc_addr (acc_addr[ADDR_W-1:LINE_OFF]), .acc_wfault (acc_cand),
    .st_valid, .st_addr,
    .ev_valid (lst_ev_v), .ev_addr (lst_ev_a), .ev_replace (lst_ev_repl),
    .ext_valid (in_fwd_lp), .ext_addr (in_msg.addr), .ext_src (in_msg.aux),
    .ext_untracked,
    .issue_valid (iss_v), .issue_lp (iss_lp), .issue_addr (iss_a),
    .svc_valid (svc_v), .svc_addr (svc_a), .svc_dst, .svc_timeout (svc_to),
    .svc_push_mask (svc_mask), .svc_push_addr (svc_paddr),
    .ext_deferred (ev_deferred)
  );

  always_comb for (int s = 0; s < DATA_SLOTS; s++) q_push_addr[s] = svc_paddr[s];

  // ---------------- push / permission matching ----------------
  logic       pm_commit, pm_drop, pm_refuse, pm_ovf, pm_pending;
  line_addr_t pm_commit_a, pm_drop_a, pm_refuse_a;
  logic [$clog2(TRACK+1)-1:0] pm_free;

  push_match #(.TRACK(TRACK)) u_pm (
    .clk, .rst_n,
    .push_valid (in_hint), .push_addr (in_msg.addr), .push_can_sink (q_sink_ok),
    .perm_valid (in_perm), .perm_addr (in_msg.addr), .perm_grant (in_msg.mtype == M_PERM_X),
    .commit_valid (pm_commit), .commit_addr (pm_commit_a),
    .drop_valid (pm_drop), .drop_addr (pm_drop_a),
    .refuse_valid (pm_refuse), .refuse_addr (pm_refuse_a),
    .q_addr (acc_addr[ADDR_W-1:LINE_OFF]), .q_pending (pm_pending),
    .track_free (pm_free), .overflow (pm_ovf)
  );

  // The cache's answers do not yet show this cycle's fills and invalidations.
  // A lock-line handed over in this cycle does not count as present, and a line
  // whose push commits in this cycle counts as held: an intervention for it is
  // answered from the pushed data, which passes straight through.
  assign lock_here = q_lock_present
                     && !(svc_v && svc_a == q_lock_addr)
                     && !(fwd_serve && in_msg.addr == q_lock_addr);
  assign in_has    = q_in_has || (pm_commit && pm_commit_a == in_msg.addr);
  assign pass_thru = fwd_serve && pm_commit && pm_commit_a == in_msg.addr;

  // ---------------- lines received by push ----------------
  // A pushed line causes no write fault, yet it is as much a candidate for the
  // next push as a line that did. The addresses of committed pushes are kept
  // (TRACK of them, oldest overwritten) until the processor first touches them;
  // that access is reported to the LST like a write fault.
  logic [TRACK-1:0] pl_v_q;
  line_addr_t       pl_a_q [TRACK];
  localparam int unsigned PLW = (TRACK > 1) ? $clog2(TRACK) : 1;
  logic [PLW-1:0]   pl_wp_q;
  logic             pl_hit;
  int               pl_hit_i;

  always_comb begin
    pl_hit   = 1'b0;
    pl_hit_i = 0;
    for (int i = 0; i < TRACK; i++)
      if (pl_v_q[i] && pl_a_q[i] == acc_addr[ADDR_W-1:LINE_OFF]) begin
        pl_hit   = 1'b1;
        pl_hit_i = i;
      end
  end
  assign acc_cand = acc_wfault || pl_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pl_v_q  <= '0;
      pl_wp_q <= '0;
      for (int i = 0; i < TRACK; i++) pl_a_q[i] <= '0;
    end else begin
      if (acc_valid && pl_hit) pl_v_q[pl_hit_i] <= 1'b0;
      if (pm_commit && !pass_thru) begin
        pl_v_q[pl_wp_q] <= 1'b1;
        pl_a_q[pl_wp_q] <= pm_commit_a;
        pl_wp_q         <= (int'(pl_wp_q) == TRACK - 1) ? '0 : pl_wp_q + 1'b1;
      end
    end
  end

  // ---------------- outstanding requests (MSHRs) ----------------
  typedef struct packed {
    logic             valid;
    logic             lp;
    logic             waiting;   // NACKed, counting down to the retry
    logic             hold;      // write fault waiting for an announced push
    logic [RD_W-1:0]  timer;
    line_addr_t       addr;
  } mshr_t;

  mshr_t mshr_q [MSHRS];
  mshr_t mshr_d [MSHRS];
  logic       rty_v;
  msg_t       rty_m;
  logic       wf_issue, wf_hold, refuse_wb;

  always_comb begin
    logic pending;
    int   fr;
    fr     = -1;
    mshr_d = mshr_q;
    rty_v  = 1'b0;
    rty_m  = '0;
    // a write fault issues a rd_X unless that line is already outstanding
    pending = 1'b0;
    for (int i = 0; i < MSHRS; i++)
      if (mshr_q[i].valid && mshr_q[i].addr == acc_addr[ADDR_W-1:LINE_OFF]) pending = 1'b1;
    // ... and waits without a request when a push of the line has been announced
    wf_issue = acc_valid && acc_wfault && !pending && !pm_pending;
    wf_hold  = acc_valid && acc_wfault && !pending && pm_pending;
    // a refused push whose permission was granted is handed back, unless our own
    // request for the line is outstanding or leaves in this cycle (the directory
    // then sends us the line)
    refuse_wb = pm_refuse && !(wf_issue && acc_addr[ADDR_W-1:LINE_OFF] == pm_refuse_a)
                          && !(iss_v && iss_a == pm_refuse_a);
    for (int i = 0; i < MSHRS; i++)
      if (mshr_q[i].valid && !mshr_q[i].hold && mshr_q[i].addr == pm_refuse_a) refuse_wb = 1'b0;
    // replies
    for (int i = 0; i < MSHRS; i++) begin
      if (in_data && mshr_d[i].valid && mshr_d[i].addr == in_msg.addr) mshr_d[i].valid = 1'b0;
      if (pm_commit && !pass_thru && mshr_d[i].valid && mshr_d[i].addr == pm_commit_a)
        mshr_d[i].valid = 1'b0;
      // push cancelled or passed through: the held write fault becomes a request
      // (sent next cycle)
      if (((pm_drop && mshr_d[i].addr == pm_drop_a) || (pass_thru && mshr_d[i].addr == pm_commit_a))
          && mshr_d[i].valid && mshr_d[i].hold) begin
        mshr_d[i].hold    = 1'b0;
        mshr_d[i].waiting = 1'b1;
        mshr_d[i].timer   = '0;
      end
      if (in_nack && mshr_d[i].valid && mshr_d[i].addr == in_msg.addr) begin
        mshr_d[i].waiting = 1'b1;
        mshr_d[i].timer   = RD_W'(RETRY_DELAY);
      end
    end
    // retries, one per cycle
    for (int i = 0; i < MSHRS; i++) begin
      if (mshr_q[i].valid && mshr_q[i].waiting && !(in_nack && mshr_q[i].addr == in_msg.addr)) begin
        if (mshr_q[i].timer == '0) begin
          if (!rty_v) begin
            rty_v = 1'b1;
            rty_m = mk(mshr_q[i].lp ? M_RDX_LP : M_RDX, DIR_ID, MY_ID, mshr_q[i].addr,
                       mshr_q[i].lp);
            mshr_d[i].waiting = 1'b0;
          end
        end else begin
          mshr_d[i].timer = mshr_q[i].timer - 1'b1;
        end
      end
    end
    // new requests
    if (iss_v) begin
      fr = -1;
      for (int i = MSHRS - 1; i >= 0; i--) if (!mshr_d[i].valid) fr = i;
      if (fr >= 0) mshr_d[fr] = '{valid: 1'b1, lp: iss_lp, waiting: 1'b0, hold: 1'b0, timer: '0,
                                  addr: iss_a};
    end
    if (wf_issue || wf_hold) begin
      fr = -1;
      for (int i = MSHRS - 1; i >= 0; i--) if (!mshr_d[i].valid) fr = i;
      if (fr >= 0) mshr_d[fr] = '{valid: 1'b1, lp: 1'b0, waiting: 1'b0, hold: wf_hold, timer: '0,
                                  addr: acc_addr[ADDR_W-1:LINE_OFF]};
    end
  end

  // ---------------- messages produced this cycle ----------------
  logic c_v [NC];
  msg_t c_m [NC];
  logic [DATA_SLOTS-1:0] push_now;

  always_comb begin
    for (int i = 0; i < NC; i++) begin
      c_v[i] = 1'b0;
      c_m[i] = '0;
    end
    c_v[0] = iss_v;
    c_m[0] = mk(iss_lp ? M_RDX_LP : M_RDX, DIR_ID, MY_ID, iss_a, 1'b0);
    c_v[1] = wf_issue;
    c_m[1] = mk(M_RDX, DIR_ID, MY_ID, acc_addr[ADDR_W-1:LINE_OFF], 1'b0);
    c_v[2] = rty_v;
    c_m[2] = rty_m;
    c_v[3] = fwd_serve;
    c_m[3] = mk(M_LINE_X, in_msg.aux, MY_ID, in_msg.addr, 1'b0);
    c_v[4] = fwd_serve;
    c_m[4] = mk(M_REVISION, DIR_ID, MY_ID, in_msg.addr, 1'b0);
    c_v[5] = refuse_wb;
    c_m[5] = mk(M_WB, DIR_ID, MY_ID, pm_refuse_a, 1'b0);
    c_v[6] = ev_valid && ev_ready;
    c_m[6] = mk(M_WB, DIR_ID, MY_ID, ev_addr, 1'b0);
    // hints leave ahead of the lock-line so that they reach the target first
    for (int s = 0; s < DATA_SLOTS; s++) begin
      push_now[s]  = svc_v && svc_mask[s] && q_push_mod[s];
      c_v[7+s]     = push_now[s];
      c_m[7+s]     = mk(M_PUSH_HINT, svc_dst, MY_ID, svc_paddr[s], 1'b0);
      c_v[9+DATA_SLOTS+s] = push_now[s];
      c_m[9+DATA_SLOTS+s] = mk(M_PUSH_WB, DIR_ID, svc_dst, svc_paddr[s], 1'b0);
    end
    c_v[7+DATA_SLOTS] = svc_v;
    c_m[7+DATA_SLOTS] = mk(M_LINE_X, svc_dst, MY_ID, svc_a, 1'b0);
    c_v[8+DATA_SLOTS] = svc_v;
    c_m[8+DATA_SLOTS] = mk(M_REVISION, DIR_ID, MY_ID, svc_a, 1'b0);
  end

  // ---------------- outgoing queue ----------------
  msg_t          oq [OQ_DEPTH];
  logic [OQ_W-1:0] oq_rd_q, oq_wr_q;
  logic [OQ_W:0]   oq_cnt_q;
  logic          oq_ovf;

  assign out_valid = (oq_cnt_q != '0);
  assign out_msg   = oq[oq_rd_q];

  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < NC; i++) n += int'(c_v[i]);
    oq_ovf = (int'(oq_cnt_q) + n > OQ_DEPTH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oq_rd_q  <= '0;
      oq_wr_q  <= '0;
      oq_cnt_q <= '0;
      for (int i = 0; i < OQ_DEPTH; i++) oq[i] <= '0;
      for (int i = 0; i < MSHRS; i++) mshr_q[i] <= '0;
    end else begin
      logic [OQ_W-1:0] w;
      logic [OQ_W:0]   cnt;
      w   = oq_wr_q;
      cnt = oq_cnt_q;
      if (out_valid && out_ready) begin
        oq_rd_q <= oq_rd_q + 1'b1;
        cnt     = cnt - 1'b1;
      end
      for (int i = 0; i < NC; i++) begin
        if (c_v[i] && int'(cnt) < OQ_DEPTH) begin
          oq[w] <= c_m[i];
          w     = w + 1'b1;
          cnt   = cnt + 1'b1;
        end
      end
      oq_wr_q  <= w;
      oq_cnt_q <= cnt;
      mshr_q   <= mshr_d;
    end
  end

  // ---------------- cache updates ----------------
  assign fill_valid[0] = in_data;
  assign fill_addr[0]  = in_msg.addr;
  assign fill_valid[1] = pm_commit && !pass_thru;
  assign fill_addr[1]  = pm_commit_a;
  assign inval_valid[0] = fwd_serve;
  assign inval_addr[0]  = in_msg.addr;
  assign inval_valid[1] = svc_v;
  assign inval_addr[1]  = svc_a;
  always_comb
    for (int s = 0; s < DATA_SLOTS; s++) begin
      inval_valid[2+s] = push_now[s];
      inval_addr[2+s]  = svc_paddr[s];
    end

  // ---------------- monitoring ----------------
  assign ev_lock_sent   = svc_v;
  assign ev_timeout     = svc_v && svc_to;
  assign ev_push_sent   = |push_now;
  assign ev_push_commit = pm_commit;
  assign ev_push_drop   = pm_drop;
  assign ev_push_refuse = pm_refuse;
  assign ev_retry       = rty_v;

  a_oq_room: assert property (@(posedge clk) disable iff (!rst_n) !oq_ovf)
    else $error("iql_sp_node %0d: outgoing queue overflow", ID);
  a_pm_room: assert property (@(posedge clk) disable iff (!rst_n) !pm_ovf)
    else $error("iql_sp_node %0d: push table overflow", ID);
  a_track: assert property (@(posedge clk) disable iff (!rst_n) int'(pm_free) <= TRACK);

endmodule
