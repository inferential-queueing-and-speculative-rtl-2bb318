// lpt_tb -- self-checking testbench for the Lock Predictor Table.
//
// Trains PCs as lock acquires or as plain atomic operations and checks the
// dispatch-time prediction (counter thresholds, tag match, aliasing of two PCs
// on one entry) and the one-cycle hand-over of a predicted lock address at the
// execute stage.
module lpt_tb;
  import iql_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic disp_valid, disp_pred, exec_valid, exec_pred, lock_valid, train_valid, train_is_lock;
  logic [31:0] disp_pc, train_pc;
  logic [ADDR_W-1:0] exec_addr, lock_addr;

  lpt #(.ENTRIES(16), .PC_W(32)) dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic train(input logic [31:0] pc, input logic is_lock);
    train_valid = 1; train_pc = pc; train_is_lock = is_lock;
    @(posedge clk);
    #1 train_valid = 0;
  endtask

  task automatic predict(input logic [31:0] pc, output logic pred);
    disp_valid = 1; disp_pc = pc;
    #1 pred = disp_pred;
  endtask

  localparam logic [31:0] PC_A = 32'h0040_1000;   // index 0
  localparam logic [31:0] PC_B = 32'h0080_1000;   // same index, other tag
  localparam logic [31:0] PC_C = 32'h0040_1004;   // index 1

  logic p;

  initial begin
    disp_valid = 0; disp_pc = '0; exec_valid = 0; exec_pred = 0; exec_addr = '0;
    train_valid = 0; train_pc = '0; train_is_lock = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    predict(PC_A, p); check(!p, "untrained PC not predicted");
    train(PC_C, 0);
    predict(PC_C, p); check(!p, "non-lock is not allocated");
    train(PC_A, 1);
    predict(PC_A, p); check(p, "trained once -> predicted (counter 2)");
    predict(PC_B, p); check(!p, "other tag on the same entry not predicted");
    train(PC_A, 0);
    predict(PC_A, p); check(!p, "one miss -> counter 1, not predicted");
    train(PC_A, 1);
    train(PC_A, 1);
    train(PC_A, 1);
    train(PC_A, 0);
    predict(PC_A, p); check(p, "saturated at 3, one miss keeps prediction");
    train(PC_B, 1);
    predict(PC_B, p); check(p, "PC_B replaces the entry");
    predict(PC_A, p); check(!p, "PC_A evicted");
    disp_valid = 0;
    #0 check(!disp_pred, "no prediction without dispatch");

    // execute-stage hand-over
    exec_valid = 1; exec_pred = 1; exec_addr = 32'h0000_2044;
    @(posedge clk);
    #1 exec_valid = 0;
    check(lock_valid && lock_addr == 32'h0000_2044, "lock address handed on next cycle");
    @(posedge clk);
    #1 check(!lock_valid, "single pulse");
    exec_valid = 1; exec_pred = 0; exec_addr = 32'h0000_3000;
    @(posedge clk);
    #1 exec_valid = 0;
    check(!lock_valid, "unpredicted instruction not handed on");

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
