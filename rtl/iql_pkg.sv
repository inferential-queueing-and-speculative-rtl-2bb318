// iql_pkg -- types and constants shared by the inferential-queueing (IQL) and
// speculative-push (SP) coherence logic.
//
// Addresses travel as cache-line addresses: the 64-byte line of the evaluated
// machines gives LINE_OFF = 6 offset bits. Messages carry no data payload: the
// line data moves alongside a message on the data path of the memory system,
// which this logic does not model. A message names its sender, its receiver and
// an auxiliary node (the original requestor of a forwarded request, or the
// target of a push). Node identifiers are NODE_W bits wide, enough for 64 nodes.
//
// Message kinds follow the directory protocol the design extends (a memory-based
// MESI directory with request forwarding, revision messages and NACKs) plus the
// low-priority read-for-exclusive (rd_X_lp), the annotated write-back of a push,
// its permission grant or rejection, and the push address hint. The encodings
// are this design's own choice.
package iql_pkg;

  localparam int unsigned ADDR_W   = 32;          // byte address width
  localparam int unsigned LINE_OFF = 6;           // 64-byte lines
  localparam int unsigned LADDR_W  = ADDR_W - LINE_OFF;
  localparam int unsigned NODE_W   = 6;           // up to 64 nodes

  typedef logic [LADDR_W-1:0] line_addr_t;
  typedef logic [NODE_W-1:0]  node_id_t;

  typedef enum logic [3:0] {
    M_RDX       = 4'd0,   // node -> dir : read for exclusive
    M_RDX_LP    = 4'd1,   // node -> dir : low-priority read for exclusive (lock)
    M_REVISION  = 4'd2,   // node -> dir : previous owner has handed the line on
    M_WB        = 4'd3,   // node -> dir : write-back of a modified line
    M_PUSH_WB   = 4'd4,   // node -> dir : write-back annotated with a push target
    M_DATA_X    = 4'd5,   // dir  -> node: exclusive data reply from memory
    M_FWD       = 4'd6,   // dir  -> node: intervention for a rd_X (aux = requestor)
    M_FWD_LP    = 4'd7,   // dir  -> node: intervention for a rd_X_lp (aux = requestor)
    M_NACK      = 4'd8,   // dir  -> node: request refused, retry
    M_PERM_X    = 4'd9,   // dir  -> node: pushed line granted in exclusive state
    M_PERM_NACK = 4'd10,  // dir  -> node: push permission refused
    M_LINE_X    = 4'd11,  // node -> node: line handed over by the previous owner
    M_PUSH_HINT = 4'd12   // node -> node: address hint announcing a push
  } msg_type_e;

  typedef struct packed {
    msg_type_e  mtype;
    node_id_t   src;
    node_id_t   dst;
    node_id_t   aux;      // requestor of a forwarded request / target of a push
    logic       retry;    // rd_X_lp retried after a NACK (piggybacked ack-for-NACK)
    line_addr_t addr;
  } msg_t;

  // Lock State Table states.
  typedef enum logic [1:0] {
    LS_INVALID   = 2'd0,
    LS_PRESENT   = 2'd1,
    LS_HELD      = 2'd2,
    LS_REQUESTED = 2'd3
  } lst_state_e;

  // Directory entry states. DS_BUSY with synch_bit set is the inferential queue;
  // DS_BREAK is the busy-exclusive state with synch_bit clear that drains a
  // broken-down queue.
  typedef enum logic [1:0] {
    DS_UNOWNED = 2'd0,
    DS_EXCL    = 2'd1,
    DS_BUSY    = 2'd2,
    DS_BREAK   = 2'd3
  } dir_state_e;

endpackage
