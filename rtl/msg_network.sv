// msg_network -- fully connected point-to-point message network.
//
// Joins PORTS endpoints (the nodes, numbered 0..PORTS-2, and the home directory,
// port PORTS-1). Every message names its destination port in msg.dst. Each
// destination has one output register; when it is free, a round-robin arbiter
// picks one of the sources whose head message is addressed to it, and that
// source sees src_ready in the same cycle. A message thus crosses the network in
// one cycle, the constant one-hop latency of the evaluated machines' network,
// and every destination receives at most one message per cycle. Messages from one
// source to one destination stay in order; the nodes use this to have a push
// hint reach its target ahead of the lock-line sent right after it (the
// protocol stays correct without it, the target then requests the line). Arbitration and the register per destination are this design's
// choices; only the fully connected, constant-latency topology is given.
//
// Interface and timing: valid/ready on both sides; a destination output holds
// its message until dst_ready.
module msg_network
  import iql_pkg::*;
#(
  parameter int unsigned PORTS = 17
) (
  input  logic clk,
  input  logic rst_n,
  input  logic src_valid [PORTS],
  output logic src_ready [PORTS],
  input  msg_t src_msg   [PORTS],
  output logic dst_valid [PORTS],
  input  logic dst_ready [PORTS],
  output msg_t dst_msg   [PORTS]
);

  localparam int unsigned PW = $clog2(PORTS);

  logic [PW-1:0] rr_q [PORTS];
  logic          gnt_v [PORTS];
  logic [PW-1:0] gnt_s [PORTS];

  always_comb begin
    int s;
    s = 0;
    for (int i = 0; i < PORTS; i++) src_ready[i] = 1'b0;
    for (int d = 0; d < PORTS; d++) begin
      gnt_v[d] = 1'b0;
      gnt_s[d] = '0;
      if (!dst_valid[d] || dst_ready[d]) begin
        for (int k = 0; k < PORTS; k++) begin
          s = (int'(rr_q[d]) + k) % PORTS;
          if (!gnt_v[d] && src_valid[s] && int'(src_msg[s].dst) == d) begin
            gnt_v[d] = 1'b1;
            gnt_s[d] = PW'(s);
          end
        end
      end
      if (gnt_v[d]) src_ready[gnt_s[d]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < PORTS; d++) begin
        rr_q[d]      <= '0;
        dst_valid[d] <= 1'b0;
        dst_msg[d]   <= '0;
      end
    end else begin
      for (int d = 0; d < PORTS; d++) begin
        if (gnt_v[d]) begin
          dst_valid[d] <= 1'b1;
          dst_msg[d]   <= src_msg[gnt_s[d]];
          rr_q[d]      <= (int'(gnt_s[d]) == PORTS - 1) ? '0 : gnt_s[d] + 1'b1;
        end else if (dst_ready[d]) begin
          dst_valid[d] <= 1'b0;
        end
      end
    end
  end

endmodule
