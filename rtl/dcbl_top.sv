// dcbl_top: a multiprocessor memory system with directory-based cache locks.
//
// NODES lock-line controllers (dcbl_node), one per processor, and the memory
// with its queue-tail directory (dcbl_directory, endpoint NODES) exchange
// messages over an interconnect (dcbl_network) that keeps messages between any
// two endpoints in order. Lock queues are doubly linked lists through the
// nodes. The processors are outside this design; their request/response
// signals are ports, as arrays indexed by node id.
//
// Defaults: 128 nodes, the largest directory system evaluated, and 4-word
// blocks of 32-bit words. The network queue depth is this design's choice.
module dcbl_top
  import dcbl_pkg::*;
  import cbl_pkg::proc_op_e;
#(
  parameter int unsigned NODES  = 128,
  parameter int unsigned WORD_W = 32,
  parameter int unsigned QD     = 4,
  localparam int unsigned WSEL_W = ((DC_LINE_W / WORD_W) > 1) ? $clog2(DC_LINE_W / WORD_W) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 p_valid [NODES],
  input  proc_op_e             p_op    [NODES],
  input  logic [DC_ADDR_W-1:0] p_addr  [NODES],
  input  logic [WSEL_W-1:0]    p_word  [NODES],
  input  logic [WORD_W-1:0]    p_wdata [NODES],
  output logic                 p_done  [NODES],
  output logic                 p_err   [NODES],
  output logic [WORD_W-1:0]    p_rdata [NODES]
);

  localparam int unsigned EP = NODES + 1;

  logic tx_valid [EP], tx_ready [EP], rx_valid [EP], rx_ready [EP];
  msg_t tx_msg [EP], rx_msg [EP];

  for (genvar g = 0; g < NODES; g++) begin : g_node
    dcbl_node #(.NODES(NODES), .NODE_ID(g), .WORD_W(WORD_W)) u_node (
      .clk, .rst_n,
      .p_valid(p_valid[g]), .p_op(p_op[g]), .p_addr(p_addr[g]), .p_word(p_word[g]),
      .p_wdata(p_wdata[g]), .p_done(p_done[g]), .p_err(p_err[g]), .p_rdata(p_rdata[g]),
      .tx_valid(tx_valid[g]), .tx_ready(tx_ready[g]), .tx_msg(tx_msg[g]),
      .rx_valid(rx_valid[g]), .rx_ready(rx_ready[g]), .rx_msg(rx_msg[g])
    );
  end

  dcbl_directory #(.NODES(NODES)) u_dir (
    .clk, .rst_n,
    .tx_valid(tx_valid[NODES]), .tx_ready(tx_ready[NODES]), .tx_msg(tx_msg[NODES]),
    .rx_valid(rx_valid[NODES]), .rx_ready(rx_ready[NODES]), .rx_msg(rx_msg[NODES])
  );

  dcbl_network #(.EP(EP), .QD(QD)) u_net (
    .clk, .rst_n, .tx_valid, .tx_ready, .tx_msg, .rx_valid, .rx_ready, .rx_msg
  );

endmodule
