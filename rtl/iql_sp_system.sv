// iql_sp_system -- a distributed shared-memory system with inferentially
// queued locks (IQL) and speculative push (SP).
//
// NODES processor nodes (iql_sp_node: lock predictor, extended lock state table,
// push matching table, request tracking) and one home directory
// (iql_directory) exchange coherence messages over a fully connected network
// (msg_network) whose ports 0..NODES-1 are the nodes and port NODES is the
// directory. Lock requests queue through the directory's synch_bit mechanism and
// the lock-line then passes straight from holder to next requestor; with the
// lock go the critical-section data lines that each holder's LST has learned,
// as address hints to the target and annotated write-backs ordered by the
// directory.
//
// The processors and their caches are outside this module: each node's
// processor events (dispatch/execute/training of the lock predictor, data
// accesses, stores) and cache queries/updates are brought out as per-node port
// arrays. The memory data path is not modelled: messages carry addresses only.
// One home directory serves all lines; the number of homes, like every size here
// not stated by the design, is this design's choice. NODES = 16 is the largest
// machine evaluated.
//
// Interface and timing: all per-node ports are arrays indexed by node number;
// the ev_* outputs are one-cycle event pulses for monitoring.
module iql_sp_system
  import iql_pkg::*;
#(
  parameter int unsigned NODES       = 16,
  parameter int unsigned DIR_LINES   = 256,
  parameter int unsigned LST_ENTRIES = 8,
  parameter int unsigned DATA_SLOTS  = 2,
  parameter int unsigned DEFER_LIMIT = 1024,
  parameter int unsigned TRACK       = 4,
  parameter int unsigned RETRY_DELAY = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // processors
  input  logic              disp_valid    [NODES],
  input  logic [ADDR_W-1:0] disp_pc       [NODES],
  output logic              disp_pred     [NODES],
  input  logic              exec_valid    [NODES],
  input  logic              exec_pred     [NODES],
  input  logic [ADDR_W-1:0] exec_addr     [NODES],
  input  logic              train_valid   [NODES],
  input  logic [ADDR_W-1:0] train_pc      [NODES],
  input  logic              train_is_lock [NODES],
  input  logic              acc_valid     [NODES],
  input  logic [ADDR_W-1:0] acc_addr      [NODES],
  input  logic              acc_wfault    [NODES],
  input  logic              st_valid      [NODES],
  input  logic [ADDR_W-1:0] st_addr       [NODES],
  // caches
  output line_addr_t        q_lock_addr    [NODES],
  input  logic              q_lock_present [NODES],
  output line_addr_t        q_in_addr      [NODES],
  input  logic              q_in_has       [NODES],
  output line_addr_t        q_push_addr    [NODES][DATA_SLOTS],
  input  logic              q_push_mod     [NODES][DATA_SLOTS],
  output line_addr_t        q_sink_addr    [NODES],
  input  logic              q_sink_ok      [NODES],
  output logic              fill_valid     [NODES][2],
  output line_addr_t        fill_addr      [NODES][2],
  output logic              inval_valid    [NODES][2+DATA_SLOTS],
  output line_addr_t        inval_addr     [NODES][2+DATA_SLOTS],
  input  logic              ev_valid       [NODES],
  input  line_addr_t        ev_addr        [NODES],
  output logic              ev_ready       [NODES],
  // monitoring
  output logic              ev_deferred    [NODES],
  output logic              ev_lock_sent   [NODES],
  output logic              ev_timeout     [NODES],
  output logic              ev_push_sent   [NODES],
  output logic              ev_push_commit [NODES],
  output logic              ev_push_drop   [NODES],
  output logic              ev_push_refuse [NODES],
  output logic              ev_retry       [NODES],
  output logic              ev_queue_fwd,
  output logic              ev_breakdown,
  output logic              ev_push_grant,
  output logic              ev_push_nack
);

  localparam int unsigned PORTS = NODES + 1;

  logic src_valid [PORTS];
  logic src_ready [PORTS];
  msg_t src_msg   [PORTS];
  logic dst_valid [PORTS];
  logic dst_ready [PORTS];
  msg_t dst_msg   [PORTS];

  msg_network #(.PORTS(PORTS)) u_net (
    .clk, .rst_n,
    .src_valid, .src_ready, .src_msg,
    .dst_valid, .dst_ready, .dst_msg
  );

  for (genvar n = 0; n < NODES; n++) begin : g_node
    assign dst_ready[n]   = 1'b1;      // nodes take one message every cycle
    assign q_sink_addr[n] = dst_msg[n].addr;

    iql_sp_node #(
      .NODES       (NODES),
      .ID          (n),
      .LST_ENTRIES (LST_ENTRIES),
      .DATA_SLOTS  (DATA_SLOTS),
      .DEFER_LIMIT (DEFER_LIMIT),
      .TRACK       (TRACK),
      .RETRY_DELAY (RETRY_DELAY)
    ) u_node (
      .clk, .rst_n,
      .disp_valid    (disp_valid[n]),
      .disp_pc       (disp_pc[n]),
      .disp_pred     (disp_pred[n]),
      .exec_valid    (exec_valid[n]),
      .exec_pred     (exec_pred[n]),
      .exec_addr     (exec_addr[n]),
      .train_valid   (train_valid[n]),
      .train_pc      (train_pc[n]),
      .train_is_lock (train_is_lock[n]),
      .acc_valid     (acc_valid[n]),
      .acc_addr      (acc_addr[n]),
      .acc_wfault    (acc_wfault[n]),
      .st_valid      (st_valid[n]),
      .st_addr       (st_addr[n]),
      .q_lock_addr   (q_lock_addr[n]),
      .q_lock_present(q_lock_present[n]),
      .q_in_addr     (q_in_addr[n]),
      .q_in_has      (q_in_has[n]),
      .q_push_addr   (q_push_addr[n]),
      .q_push_mod    (q_push_mod[n]),
      .q_sink_ok     (q_sink_ok[n]),
      .fill_valid    (fill_valid[n]),
      .fill_addr     (fill_addr[n]),
      .inval_valid   (inval_valid[n]),
      .inval_addr    (inval_addr[n]),
      .ev_valid      (ev_valid[n]),
      .ev_addr       (ev_addr[n]),
      .ev_ready      (ev_ready[n]),
      .in_valid      (dst_valid[n]),
      .in_msg        (dst_msg[n]),
      .out_valid     (src_valid[n]),
      .out_ready     (src_ready[n]),
      .out_msg       (src_msg[n]),
      .ev_deferred   (ev_deferred[n]),
      .ev_lock_sent  (ev_lock_sent[n]),
      .ev_timeout    (ev_timeout[n]),
      .ev_push_sent  (ev_push_sent[n]),
      .ev_push_commit(ev_push_commit[n]),
      .ev_push_drop  (ev_push_drop[n]),
      .ev_push_refuse(ev_push_refuse[n]),
      .ev_retry      (ev_retry[n])
    );
  end

  iql_directory #(.NODES(NODES), .LINES(DIR_LINES)) u_dir (
    .clk, .rst_n,
    .in_valid  (dst_valid[NODES]),
    .in_ready  (dst_ready[NODES]),
    .in_msg    (dst_msg[NODES]),
    .out_valid (src_valid[NODES]),
    .out_ready (src_ready[NODES]),
    .out_msg   (src_msg[NODES]),
    .ev_queue_fwd,
    .ev_breakdown,
    .ev_push_grant,
    .ev_push_nack
  );

endmodule
