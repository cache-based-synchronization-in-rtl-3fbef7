// cbl_top: the two cache-based lock systems side by side.
//
// The document proposes cache-based locks in two forms that do not share
// hardware: a bus-based (snoopy) system, where the lock queue is kept by
// broadcast and the caches' answers, and a directory-based system for larger
// machines, where the queue is a doubly linked list through the caches and the
// memory keeps the queue tail. This top holds one of each at the sizes the
// evaluation used as the largest: 16 processors on the bus, 128 on the
// network. The two have separate ports: the snoopy system's
// signals start with s_, the directory system's with d_; both run on clk and
// rst_n (active low, synchronous).
//
// Processor port per node (both systems): p_valid/p_op/p_addr/p_word/p_wdata
// in, p_done/p_err/p_rdata out; p_valid is held until p_done (see cbl_pkg and
// the two system tops). The snoopy system also shows its bus transaction of
// each cycle (s_bus_*), so a system around it can observe lock traffic.
module cbl_top
  import cbl_pkg::*;
  import dcbl_pkg::DC_ADDR_W;
#(
  localparam int unsigned S_NODES  = 16,
  localparam int unsigned S_ADDR_W = 10,
  localparam int unsigned S_ID_W   = $clog2(S_NODES),
  localparam int unsigned D_NODES  = 128,
  localparam int unsigned WORD_W   = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // snoopy system
  input  logic                 s_p_valid [S_NODES],
  input  proc_op_e             s_p_op    [S_NODES],
  input  logic [S_ADDR_W-1:0]  s_p_addr  [S_NODES],
  input  logic [1:0]           s_p_word  [S_NODES],
  input  logic [WORD_W-1:0]    s_p_wdata [S_NODES],
  output logic                 s_p_done  [S_NODES],
  output logic                 s_p_err   [S_NODES],
  output logic [WORD_W-1:0]    s_p_rdata [S_NODES],
  output logic                 s_bus_valid,
  output bus_cmd_e             s_bus_cmd,
  output logic [S_ID_W-1:0]    s_bus_src,
  output logic [S_ADDR_W-1:0]  s_bus_addr,
  output logic [S_ID_W-1:0]    s_bus_target,
  output bus_resp_e            s_bus_resp,
  output logic                 s_bus_mem_done,
  // directory system
  input  logic                 d_p_valid [D_NODES],
  input  proc_op_e             d_p_op    [D_NODES],
  input  logic [DC_ADDR_W-1:0] d_p_addr  [D_NODES],
  input  logic [1:0]           d_p_word  [D_NODES],
  input  logic [WORD_W-1:0]    d_p_wdata [D_NODES],
  output logic                 d_p_done  [D_NODES],
  output logic                 d_p_err   [D_NODES],
  output logic [WORD_W-1:0]    d_p_rdata [D_NODES]
);

  cbl_snoopy_top u_snoopy (
    .clk, .rst_n,
    .p_valid(s_p_valid), .p_op(s_p_op), .p_addr(s_p_addr), .p_word(s_p_word),
    .p_wdata(s_p_wdata), .p_done(s_p_done), .p_err(s_p_err), .p_rdata(s_p_rdata),
    .bus_valid(s_bus_valid), .bus_cmd(s_bus_cmd), .bus_src(s_bus_src), .bus_addr(s_bus_addr),
    .bus_target(s_bus_target), .bus_resp(s_bus_resp), .bus_mem_done(s_bus_mem_done)
  );

  dcbl_top u_directory (
    .clk, .rst_n,
    .p_valid(d_p_valid), .p_op(d_p_op), .p_addr(d_p_addr), .p_word(d_p_word),
    .p_wdata(d_p_wdata), .p_done(d_p_done), .p_err(d_p_err), .p_rdata(d_p_rdata)
  );

endmodule
