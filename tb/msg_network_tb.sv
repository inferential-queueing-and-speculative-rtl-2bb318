// msg_network_tb -- self-checking testbench for the point-to-point network.
//
// Every source sends a stream of messages to random destinations while the
// destinations apply random back-pressure. A scoreboard checks that every
// message arrives exactly once, at the port it names, in order per source and
// destination. Directed checks cover the one-cycle latency, the round-robin
// alternation of two sources contending for one destination, and fairness when
// every source contends for the same destination.
module msg_network_tb;
  import iql_pkg::*;

  localparam int unsigned PORTS = 4;
  localparam int unsigned PER_SRC = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic src_valid [PORTS];
  logic src_ready [PORTS];
  msg_t src_msg   [PORTS];
  logic dst_valid [PORTS];
  logic dst_ready [PORTS];
  msg_t dst_msg   [PORTS];

  msg_network #(.PORTS(PORTS)) dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected sequence numbers per (source, destination)
  int exp_seq [PORTS][PORTS];
  int sent [PORTS];
  int seq_to [PORTS][PORTS];
  int received = 0;
  logic random_phase = 1'b0;
  logic [1:0] dsel [PORTS];
  logic last_acc [PORTS];   // the head was accepted at the last edge

  always @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < PORTS; d++) begin
        if (dst_valid[d] && dst_ready[d] && random_phase) begin
          int s;
          s = int'(dst_msg[d].src);
          check(int'(dst_msg[d].dst) == d, "delivered to the named port");
          check(int'(dst_msg[d].addr) == exp_seq[s][d], "in order per source/destination");
          exp_seq[s][d]++;
          received++;
        end
      end
      // source side: advance a stream on acceptance
      for (int s = 0; s < PORTS; s++) begin
        if (random_phase && src_valid[s] && src_ready[s]) begin
          sent[s]++;
          seq_to[s][dsel[s]]++;
        end
      end
    end
  end

  // drive the random streams after each edge
  always @(negedge clk) begin
    if (random_phase) begin
      for (int s = 0; s < PORTS; s++) begin
        if (sent[s] < PER_SRC) begin
          if (!src_valid[s] || last_acc[s]) begin
            dsel[s]          = 2'($urandom_range(0, PORTS - 1));
            src_msg[s]       = '0;
            src_msg[s].src   = node_id_t'(s);
            src_msg[s].dst   = node_id_t'(dsel[s]);
            src_msg[s].addr  = line_addr_t'(seq_to[s][dsel[s]]);
            src_valid[s]     = 1'b1;
          end
        end else begin
          src_valid[s] = 1'b0;
        end
        dst_ready[s] = ($urandom_range(0, 3) != 0);
      end
    end
  end

  always @(posedge clk) for (int s = 0; s < PORTS; s++) last_acc[s] <= src_valid[s] && src_ready[s];

  int cyc;
  int wins [PORTS];

  initial begin
    for (int s = 0; s < PORTS; s++) begin
      src_valid[s] = 0; src_msg[s] = '0; dst_ready[s] = 1; sent[s] = 0; dsel[s] = '0;
      for (int d = 0; d < PORTS; d++) begin
        exp_seq[s][d] = 0;
        seq_to[s][d]  = 0;
      end
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // one-cycle latency
    src_valid[1] = 1; src_msg[1].src = 1; src_msg[1].dst = 2; src_msg[1].addr = 26'h77;
    #1 check(src_ready[1], "free destination accepts at once");
    @(posedge clk);
    #1 src_valid[1] = 0;
    check(dst_valid[2] && dst_msg[2].addr == 26'h77, "arrives one cycle later");
    @(posedge clk);
    #1 check(!dst_valid[2], "delivered once");

    // round-robin between sources 0 and 3 towards destination 1
    src_valid[0] = 1; src_msg[0].src = 0; src_msg[0].dst = 1; src_msg[0].addr = 26'h10;
    src_valid[3] = 1; src_msg[3].src = 3; src_msg[3].dst = 1; src_msg[3].addr = 26'h30;
    #1 check(src_ready[0] != src_ready[3], "one grant per destination");
    @(posedge clk);
    #1 if (dst_msg[1].src == 0) src_valid[0] = 0; else src_valid[3] = 0;
    check(dst_valid[1], "first winner delivered");
    @(posedge clk);
    #1 check(dst_valid[1] && (dst_msg[1].addr == 26'h10 || dst_msg[1].addr == 26'h30), "loser served next");
    src_valid[0] = 0; src_valid[3] = 0;
    @(posedge clk);
    #1;

    // every source contends for destination 0: round robin gives each a turn
    for (int k = 0; k < PORTS; k++) begin
      wins[k] = 0;
      src_valid[k] = 1; src_msg[k] = '0; src_msg[k].src = node_id_t'(k); src_msg[k].dst = 0;
    end
    repeat (4 * PORTS) begin
      #1 for (int k = 0; k < PORTS; k++) wins[k] += int'(src_ready[k]);
      @(posedge clk);
    end
    #1 for (int k = 0; k < PORTS; k++) src_valid[k] = 0;
    for (int k = 0; k < PORTS; k++)
      check(wins[k] >= 3, $sformatf("source %0d won %0d of %0d contended cycles", k, wins[k], 4 * PORTS));
    repeat (2) @(posedge clk);
    #1;

    // random traffic with back-pressure
    random_phase = 1;
    cyc = 0;
    while (received < PORTS * PER_SRC && cyc < 20000) begin
      @(posedge clk);
      cyc++;
    end
    check(received == PORTS * PER_SRC, $sformatf("all %0d messages delivered (%0d)", PORTS * PER_SRC, received));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
