// lpt -- Lock Predictor Table.
//
// The LPT tells the processor whether a synchronizing instruction (for example a
// load-locked that starts a test&test&set sequence) is acquiring a lock, based on
// what that instruction did in earlier executions. It is consulted with the PC
// at dispatch; the prediction travels with the instruction, and when the
// instruction reaches the execute stage with a predicted acquire its lock
// address is handed on to the Lock State Table. That PC -> LPT -> lock address
// -> LST path follows the organization of the IQL hardware. How the predictor is
// built is not specified by the design; this one is the simplest that does the
// job and is this design's own choice: a direct-mapped table indexed by the PC,
// each entry holding a tag and a 2-bit saturating counter. An entry predicts an
// acquire when its counter is 2 or 3. Training reports, per PC, whether the
// instruction turned out to acquire a lock (a later store to the same address
// released it); a new entry is allocated only for an observed acquire, with the
// counter set to 2.
//
// Interface and timing:
//   disp_*  : combinational lookup, disp_pred is valid in the same cycle.
//   exec_*  : an executing instruction with its prediction bit and byte address;
//             lock_valid/lock_addr follow one cycle later when exec_pred is set.
//   train_* : one training update per cycle, applied at the clock edge.
//   Reset clears every entry.
module lpt
  import iql_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,   // table size (not given, assumed)
  parameter int unsigned PC_W    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              disp_valid,
  input  logic [PC_W-1:0]   disp_pc,
  output logic              disp_pred,
  input  logic              exec_valid,
  input  logic              exec_pred,
  input  logic [ADDR_W-1:0] exec_addr,
  output logic              lock_valid,
  output logic [ADDR_W-1:0] lock_addr,
  input  logic              train_valid,
  input  logic [PC_W-1:0]   train_pc,
  input  logic              train_is_lock
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = PC_W - IDX_W - 2;   // instructions are 4-byte aligned

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [1:0]       ctr;
  } lpt_entry_t;

  lpt_entry_t table_q [ENTRIES];

  function automatic logic [IDX_W-1:0] idx_of(input logic [PC_W-1:0] pc);
    return pc[IDX_W+1:2];
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(input logic [PC_W-1:0] pc);
    return pc[PC_W-1:IDX_W+2];
  endfunction

  lpt_entry_t disp_e;
  assign disp_e    = table_q[idx_of(disp_pc)];
  assign disp_pred = disp_valid && disp_e.valid && (disp_e.tag == tag_of(disp_pc)) && disp_e.ctr[1];

  lpt_entry_t tr_e;
  logic       tr_hit;
  assign tr_e   = table_q[idx_of(train_pc)];
  assign tr_hit = tr_e.valid && (tr_e.tag == tag_of(train_pc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= '0;
    end else if (train_valid) begin
      if (tr_hit) begin
        if (train_is_lock && tr_e.ctr != 2'd3)
          table_q[idx_of(train_pc)].ctr <= tr_e.ctr + 2'd1;
        else if (!train_is_lock && tr_e.ctr != 2'd0)
          table_q[idx_of(train_pc)].ctr <= tr_e.ctr - 2'd1;
      end else if (train_is_lock) begin
        table_q[idx_of(train_pc)] <= '{valid: 1'b1, tag: tag_of(train_pc), ctr: 2'd2};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_valid <= 1'b0;
      lock_addr  <= '0;
    end else begin
      lock_valid <= exec_valid && exec_pred;
      if (exec_valid && exec_pred) lock_addr <= exec_addr;
    end
  end

endmodule
