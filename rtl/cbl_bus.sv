// cbl_bus: the shared snooping bus of the cache-based lock system.
//
// Every node may request the bus; a round-robin arbiter grants one node per
// bus cycle, and the granted node's command (lock request, read-unlock, wake or
// write-back, with address, source node, target node and line data) is
// broadcast to all nodes and to memory in that same cycle. The snoop answers
// of all nodes (hit, wait, wait(T)) are combined and returned to the requester
// in that cycle; the protocol guarantees that at most one cache, the tail of
// the line's queue, answers. While memory is busy (mem_busy) nothing is
// granted, so a memory access holds the bus until it completes.
//
// The protocol names the bus signals but not the bus itself: the round-robin
// arbitration, the one-cycle address/response phase and holding the bus over
// a memory access are choices of this design.
module cbl_bus
  import cbl_pkg::*;
#(
  parameter int unsigned NODES  = 16,
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned LINE_W = 128,
  localparam int unsigned ID_W  = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // node masters
  input  logic              req      [NODES],
  output logic              gnt      [NODES],
  input  bus_cmd_e          m_cmd    [NODES],
  input  logic [ADDR_W-1:0] m_addr   [NODES],
  input  logic [ID_W-1:0]   m_target [NODES],
  input  logic              m_wb     [NODES],
  input  logic [LINE_W-1:0] m_data   [NODES],
  input  logic              mem_busy,
  // broadcast
  output logic              s_valid,
  output bus_cmd_e          s_cmd,
  output logic [ID_W-1:0]   s_src,
  output logic [ADDR_W-1:0] s_addr,
  output logic [ID_W-1:0]   s_target,
  output logic              s_wb,
  output logic [LINE_W-1:0] s_data,
  // snoop answers and their combination
  input  bus_resp_e         n_kind   [NODES],
  input  logic [LINE_W-1:0] n_data   [NODES],
  output bus_resp_e         r_kind,
  output logic [ID_W-1:0]   r_id,
  output logic [LINE_W-1:0] r_data,
  output logic              r_any
);

  logic [ID_W-1:0] prio;     // node with the highest priority this cycle
  logic            found;
  logic [ID_W-1:0] winner;

  // round robin: first requester at or after prio
  always_comb begin
    found  = 1'b0;
    winner = '0;
    for (int k = 0; k < NODES; k++) begin
      logic [ID_W-1:0] n;
      n = ID_W'((int'(prio) + k) % NODES);
      if (!found && req[n]) begin
        found  = 1'b1;
        winner = n;
      end
    end
    if (mem_busy) found = 1'b0;
    for (int i = 0; i < NODES; i++) gnt[i] = found && (winner == ID_W'(i));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     prio <= '0;
    else if (found) prio <= (winner == ID_W'(NODES - 1)) ? '0 : winner + 1'b1;
  end

  assign s_valid  = found;
  assign s_cmd    = found ? m_cmd[winner] : BC_NONE;
  assign s_src    = winner;
  assign s_addr   = m_addr[winner];
  assign s_target = m_target[winner];
  assign s_wb     = found && m_wb[winner];
  assign s_data   = m_data[winner];

  // at most one cache (the tail) answers; combine
  int unsigned n_resp;
  always_comb begin
    r_kind = BR_NONE;
    r_id   = '0;
    r_data = '0;
    n_resp = 0;
    for (int i = 0; i < NODES; i++) begin
      if (n_kind[i] != BR_NONE) begin
        r_kind = n_kind[i];
        r_id   = ID_W'(i);
        r_data = n_data[i];
        n_resp = n_resp + 1;
      end
    end
    r_any = (n_resp != 0);
  end

  a_one_answer: assert property (@(posedge clk) disable iff (!rst_n) n_resp <= 1)
    else $error("more than one cache answered a lock request");

endmodule
