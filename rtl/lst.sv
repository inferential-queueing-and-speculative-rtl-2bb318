// lst -- extended Lock State Table (IQL + Speculative Push).
//
// One entry per predicted lock. Each entry holds the lock's byte address, its
// IQL state and, for Speculative Push, DATA_SLOTS candidate data lines, each with
// an access bit A and a saturating confidence counter.
//
// IQL part (follows the described state machine):
//   * predicted acquire: a lock-line already in the cache (PRESENT, or reported
//     present by the cache) becomes HELD; otherwise a rd_X_lp is issued and the
//     entry becomes REQUESTED.
//   * lock-line received: REQUESTED -> HELD.
//   * store to the lock's byte address while HELD is the inferred release: with a
//     buffered request the lock-line is sent to the buffered requestor and the
//     entry becomes INVALID; without one it becomes PRESENT.
//   * eviction or invalidation of the lock-line: INVALID.
//   * incoming rd_X_lp: PRESENT -> send the lock-line (INVALID); HELD or
//     REQUESTED -> buffer the request until the release.
// A NACK of our own rd_X_lp drops a buffered request (the directory has broken
// the queue down and every member retries). The deferral is bounded: a request
// buffered for DEFER_LIMIT cycles is served even without a release. The bound is
// this design's choice; the protocol only needs it to be brief and bounded.
//
// Speculative Push part (follows the described recording and confidence rules):
//   * while an entry is HELD, every access to a recorded line sets its A bit; a
//     write fault (acc_wfault; the node also raises it for the first access to a
//     line that arrived by push) to an unrecorded line allocates a slot (a free one, else the
//     one with the lowest counter, ties broken by an LFSR) with A = 1.
//   * at the release each counter counts up if A is set and down otherwise, and
//     A is cleared. A counter reaching its maximum enables pushing that line, one
//     reaching zero disables it.
//   * a replacement eviction of a recorded line counts its counter down.
//   * when the lock-line is sent (release with a buffered request, request to a
//     PRESENT lock, or deferral timeout) the enabled lines are named for pushing.
// The confidence counters sit per data line, the entry count, counter width,
// initial count and deferral bound are this design's choices.
//
// Interface and timing: all event inputs are sampled at the clock edge and may
// arrive together; they are applied in the order eviction, fill, NACK, access,
// store, acquire, incoming request, deferral timer. issue_* and svc_* are
// registered and valid for one cycle, one cycle after the causing event. At most
// one service leaves per cycle; an incoming request to a PRESENT lock that meets
// another service in the same cycle is buffered and served on the next cycle.
module lst
  import iql_pkg::*;
#(
  parameter int unsigned ENTRIES     = 8,     // locks tracked (assumed)
  parameter int unsigned DATA_SLOTS  = 2,     // candidate lines per lock
  parameter int unsigned CTR_W       = 2,     // confidence counter width (assumed)
  parameter int unsigned CTR_INIT    = 1,     // counter of a new slot (assumed)
  parameter int unsigned DEFER_LIMIT = 1024   // deferral bound in cycles (assumed)
) (
  input  logic              clk,
  input  logic              rst_n,
  // predicted lock acquire (from the LPT)
  input  logic              acq_valid,
  input  logic [ADDR_W-1:0] acq_addr,
  input  logic              acq_line_present,
  // lock-line received / own rd_X_lp refused
  input  logic              fill_valid,
  input  line_addr_t        fill_addr,
  input  logic              nack_valid,
  input  line_addr_t        nack_addr,
  // processor data accesses and stores
  input  logic              acc_valid,
  input  line_addr_t        acc_addr,
  input  logic              acc_wfault,
  input  logic              st_valid,
  input  logic [ADDR_W-1:0] st_addr,
  // a line left the local cache (ev_replace: by replacement, else by coherence)
  input  logic              ev_valid,
  input  line_addr_t        ev_addr,
  input  logic              ev_replace,
  // incoming rd_X_lp intervention
  input  logic              ext_valid,
  input  line_addr_t        ext_addr,
  input  node_id_t          ext_src,
  output logic              ext_untracked,    // same cycle: no live entry for it
  // rd_X_lp (or plain rd_X if untracked) to issue
  output logic              issue_valid,
  output logic              issue_lp,
  output line_addr_t        issue_addr,
  // lock-line to send, with lines to push
  output logic              svc_valid,
  output line_addr_t        svc_addr,
  output node_id_t          svc_dst,
  output logic              svc_timeout,
  output logic [DATA_SLOTS-1:0] svc_push_mask,
  output line_addr_t        svc_push_addr [DATA_SLOTS],
  // status
  output logic              ext_deferred      // pulses when a request is buffered
);

  localparam int unsigned DEF_W = $clog2(DEFER_LIMIT + 1);
  localparam logic [CTR_W-1:0] CTR_MAX = '1;

  typedef struct packed {
    logic              valid;
    lst_state_e        st;
    logic [ADDR_W-1:0] lock_addr;
    logic              buf_v;
    node_id_t          buf_src;
    logic [DEF_W-1:0]  timer;
  } lock_ent_t;

  typedef struct packed {
    logic             valid;
    line_addr_t       addr;
    logic             a;
    logic [CTR_W-1:0] ctr;
    logic             en;
  } slot_t;

  lock_ent_t ent_q [ENTRIES];
  lock_ent_t ent_d [ENTRIES];
  slot_t     slot_q [ENTRIES][DATA_SLOTS];
  slot_t     slot_d [ENTRIES][DATA_SLOTS];
  logic [15:0] lfsr_q;

  function automatic line_addr_t line_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1:LINE_OFF];
  endfunction

  // next-state of all entries plus the registered outputs
  logic              n_issue_valid, n_issue_lp;
  line_addr_t        n_issue_addr;
  logic              n_svc_valid, n_svc_timeout;
  line_addr_t        n_svc_addr;
  node_id_t          n_svc_dst;
  logic [DATA_SLOTS-1:0] n_push_mask;
  line_addr_t        n_push_addr [DATA_SLOTS];
  logic              n_deferred;

  // Decided from the registered table so that the answer does not depend on
  // events of the same cycle.
  always_comb begin
    ext_untracked = ext_valid;
    for (int e = 0; e < ENTRIES; e++)
      if (ent_q[e].valid && line_of(ent_q[e].lock_addr) == ext_addr && ent_q[e].st != LS_INVALID)
        ext_untracked = 1'b0;
  end

  always_comb begin
    int hit;
    int victim;
    int best;
    int start;
    logic found;
    logic done;

    ent_d  = ent_q;
    slot_d = slot_q;
    n_issue_valid = 1'b0;
    n_issue_lp    = 1'b0;
    n_issue_addr  = '0;
    n_svc_valid   = 1'b0;
    n_svc_timeout = 1'b0;
    n_svc_addr    = '0;
    n_svc_dst     = '0;
    n_push_mask   = '0;
    for (int s = 0; s < DATA_SLOTS; s++) n_push_addr[s] = '0;
    n_deferred    = 1'b0;

    // ---- eviction / invalidation ----
    if (ev_valid) begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (ent_d[e].valid && line_of(ent_d[e].lock_addr) == ev_addr) begin
          ent_d[e].st    = LS_INVALID;
          ent_d[e].buf_v = 1'b0;
        end
        if (ev_replace) begin
          for (int s = 0; s < DATA_SLOTS; s++) begin
            if (ent_d[e].valid && slot_d[e][s].valid && slot_d[e][s].addr == ev_addr &&
                slot_d[e][s].ctr != '0) begin
              slot_d[e][s].ctr = slot_d[e][s].ctr - 1'b1;
              if (slot_d[e][s].ctr == '0) slot_d[e][s].en = 1'b0;
            end
          end
        end
      end
    end

    // ---- lock-line received ----
    if (fill_valid) begin
      for (int e = 0; e < ENTRIES; e++)
        if (ent_d[e].valid && ent_d[e].st == LS_REQUESTED &&
            line_of(ent_d[e].lock_addr) == fill_addr)
          ent_d[e].st = LS_HELD;
    end

    // ---- own rd_X_lp NACKed: queue broken down, drop buffered request ----
    if (nack_valid) begin
      for (int e = 0; e < ENTRIES; e++)
        if (ent_d[e].valid && line_of(ent_d[e].lock_addr) == nack_addr) begin
          ent_d[e].buf_v = 1'b0;
          ent_d[e].timer = '0;
        end
    end

    // ---- data access inside an inferred critical section ----
    if (acc_valid) begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (ent_d[e].valid && ent_d[e].st == LS_HELD &&
            line_of(ent_d[e].lock_addr) != acc_addr) begin
          found = 1'b0;
          for (int s = 0; s < DATA_SLOTS; s++)
            if (slot_d[e][s].valid && slot_d[e][s].addr == acc_addr) begin
              slot_d[e][s].a = 1'b1;
              found = 1'b1;
            end
          if (!found && acc_wfault) begin
            victim = -1;
            for (int s = 0; s < DATA_SLOTS; s++)
              if (victim < 0 && !slot_d[e][s].valid) victim = s;
            if (victim < 0) begin
              start = int'(lfsr_q) % DATA_SLOTS;
              best  = start;
              for (int k = 1; k < DATA_SLOTS; k++) begin
                int j;
                j = (start + k) % DATA_SLOTS;
                if (slot_d[e][j].ctr < slot_d[e][best].ctr) best = j;
              end
              victim = best;
            end
            slot_d[e][victim] = '{valid: 1'b1, addr: acc_addr, a: 1'b1,
                                  ctr: CTR_W'(CTR_INIT), en: 1'b0};
          end
        end
      end
    end

    // ---- store: inferred release ----
    if (st_valid) begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (ent_d[e].valid && ent_d[e].st == LS_HELD && ent_d[e].lock_addr == st_addr) begin
          // confidence update, then clear the access bits
          for (int s = 0; s < DATA_SLOTS; s++) begin
            if (slot_d[e][s].valid) begin
              if (slot_d[e][s].a && slot_d[e][s].ctr != CTR_MAX)
                slot_d[e][s].ctr = slot_d[e][s].ctr + 1'b1;
              else if (!slot_d[e][s].a && slot_d[e][s].ctr != '0)
                slot_d[e][s].ctr = slot_d[e][s].ctr - 1'b1;
              if (slot_d[e][s].ctr == CTR_MAX) slot_d[e][s].en = 1'b1;
              if (slot_d[e][s].ctr == '0)      slot_d[e][s].en = 1'b0;
              slot_d[e][s].a = 1'b0;
            end
          end
          if (ent_d[e].buf_v && !n_svc_valid) begin
            n_svc_valid = 1'b1;
            n_svc_addr  = line_of(ent_d[e].lock_addr);
            n_svc_dst   = ent_d[e].buf_src;
            for (int s = 0; s < DATA_SLOTS; s++) begin
              n_push_mask[s] = slot_d[e][s].valid && slot_d[e][s].en;
              n_push_addr[s] = slot_d[e][s].addr;
            end
            ent_d[e].st    = LS_INVALID;
            ent_d[e].buf_v = 1'b0;
            ent_d[e].timer = '0;
          end else if (ent_d[e].buf_v) begin
            // a second service in this cycle: let the timer path send it next cycle
            ent_d[e].st    = LS_PRESENT;
            ent_d[e].timer = DEF_W'(DEFER_LIMIT);
          end else begin
            ent_d[e].st = LS_PRESENT;
          end
        end
      end
    end

    // ---- predicted acquire ----
    if (acq_valid) begin
      hit = -1;
      for (int e = 0; e < ENTRIES; e++)
        if (ent_d[e].valid && line_of(ent_d[e].lock_addr) == line_of(acq_addr)) hit = e;
      if (hit < 0) begin
        // allocate: free entry, else an INVALID one, else a PRESENT one
        for (int e = ENTRIES - 1; e >= 0; e--)
          if (ent_d[e].valid && !ent_d[e].buf_v &&
              (ent_d[e].st == LS_PRESENT)) hit = e;
        for (int e = ENTRIES - 1; e >= 0; e--)
          if (ent_d[e].valid && !ent_d[e].buf_v && ent_d[e].st == LS_INVALID) hit = e;
        for (int e = ENTRIES - 1; e >= 0; e--)
          if (!ent_d[e].valid) hit = e;
        if (hit >= 0) begin
          ent_d[hit] = '{valid: 1'b1, st: LS_INVALID, lock_addr: acq_addr,
                         buf_v: 1'b0, buf_src: '0, timer: '0};
          for (int s = 0; s < DATA_SLOTS; s++) slot_d[hit][s] = '0;
        end
      end
      if (hit >= 0) begin
        ent_d[hit].lock_addr = acq_addr;
        case (ent_d[hit].st)
          LS_PRESENT, LS_HELD: ent_d[hit].st = LS_HELD;
          LS_INVALID: begin
            if (acq_line_present) ent_d[hit].st = LS_HELD;
            else begin
              ent_d[hit].st = LS_REQUESTED;
              n_issue_valid = 1'b1;
              n_issue_lp    = 1'b1;
              n_issue_addr  = line_of(acq_addr);
            end
          end
          default: ;   // REQUESTED: request already outstanding
        endcase
      end else if (!acq_line_present) begin
        n_issue_valid = 1'b1;          // table full: ordinary read-for-exclusive
        n_issue_lp    = 1'b0;
        n_issue_addr  = line_of(acq_addr);
      end
    end

    // ---- incoming rd_X_lp ----
    if (ext_valid) begin
      hit = -1;
      for (int e = 0; e < ENTRIES; e++)
        if (ent_d[e].valid && line_of(ent_d[e].lock_addr) == ext_addr &&
            ent_d[e].st != LS_INVALID) hit = e;
      if (ext_untracked || hit < 0) begin
        // not a lock we track (or its line left this cycle): not ours to defer
      end else if (ent_d[hit].st == LS_PRESENT && !n_svc_valid) begin
        n_svc_valid = 1'b1;
        n_svc_addr  = ext_addr;
        n_svc_dst   = ext_src;
        for (int s = 0; s < DATA_SLOTS; s++) begin
          n_push_mask[s] = slot_d[hit][s].valid && slot_d[hit][s].en;
          n_push_addr[s] = slot_d[hit][s].addr;
        end
        ent_d[hit].st = LS_INVALID;
      end else begin
        ent_d[hit].buf_v   = 1'b1;
        ent_d[hit].buf_src = ext_src;
        ent_d[hit].timer   = (ent_d[hit].st == LS_PRESENT) ? DEF_W'(DEFER_LIMIT) : '0;
        n_deferred         = (ent_d[hit].st != LS_PRESENT);
      end
    end

    // ---- deferral bound ----
    done = 1'b0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (ent_d[e].valid && ent_d[e].buf_v) begin
        if (ent_d[e].timer >= DEF_W'(DEFER_LIMIT)) begin
          if (!n_svc_valid && !done) begin
            done          = 1'b1;
            n_svc_valid   = 1'b1;
            n_svc_timeout = (ent_d[e].st != LS_PRESENT);
            n_svc_addr    = line_of(ent_d[e].lock_addr);
            n_svc_dst     = ent_d[e].buf_src;
            for (int s = 0; s < DATA_SLOTS; s++) begin
              n_push_mask[s] = slot_d[e][s].valid && slot_d[e][s].en;
              n_push_addr[s] = slot_d[e][s].addr;
            end
            ent_d[e].st    = LS_INVALID;
            ent_d[e].buf_v = 1'b0;
            ent_d[e].timer = '0;
          end
        end else begin
          ent_d[e].timer = ent_d[e].timer + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        ent_q[e] <= '0;
        for (int s = 0; s < DATA_SLOTS; s++) slot_q[e][s] <= '0;
      end
      lfsr_q        <= 16'hACE1;
      issue_valid   <= 1'b0;
      issue_lp      <= 1'b0;
      issue_addr    <= '0;
      svc_valid     <= 1'b0;
      svc_timeout   <= 1'b0;
      svc_addr      <= '0;
      svc_dst       <= '0;
      svc_push_mask <= '0;
      for (int s = 0; s < DATA_SLOTS; s++) svc_push_addr[s] <= '0;
      ext_deferred  <= 1'b0;
    end else begin
      ent_q         <= ent_d;
      slot_q        <= slot_d;
      lfsr_q        <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      issue_valid   <= n_issue_valid;
      issue_lp      <= n_issue_lp;
      issue_addr    <= n_issue_addr;
      svc_valid     <= n_svc_valid;
      svc_timeout   <= n_svc_timeout;
      svc_addr      <= n_svc_addr;
      svc_dst       <= n_svc_dst;
      svc_push_mask <= n_push_mask;
      svc_push_addr <= n_push_addr;
      ext_deferred  <= n_deferred;
    end
  end

endmodule
