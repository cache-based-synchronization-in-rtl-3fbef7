// cbl_snoopy_top: a bus-based shared memory multiprocessor memory system with
// cache-based locks.
//
// NODES lock-cache controllers (cbl_lock_cache), one per processor, share one
// snooping bus (cbl_bus) with main memory (cbl_memory). The processors are
// outside this design: each node's processor request/response signals are
// ports of this module, as arrays indexed by node id. Lock queues are built in
// the caches by the snoop protocol; a lock grant and the line's data arrive
// together.
//
// Defaults: 16 nodes (the largest bus system evaluated), 4-word lines of
// 32-bit words (the evaluated block size and bus width) and a memory cycle of 4
// processor cycles follow the evaluation setup. The 4-entry lock cache per
// node and the 1024-line memory are choices of this design.
//
// Timing: see cbl_lock_cache for the processor handshake. An uncontended lock
// taken from memory finishes MEM_CYCLES + 3 cycles after the request (one cycle
// to request the bus, the bus cycle, the memory access, the completion cycle).
module cbl_snoopy_top
  import cbl_pkg::*;
#(
  parameter int unsigned NODES      = 16,
  parameter int unsigned ADDR_W     = 10,
  parameter int unsigned WORDS      = 4,
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned ENTRIES    = 4,
  parameter int unsigned MEM_CYCLES = 4,
  localparam int unsigned ID_W      = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int unsigned LINE_W    = WORDS * WORD_W,
  localparam int unsigned WSEL_W    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              p_valid [NODES],
  input  proc_op_e          p_op    [NODES],
  input  logic [ADDR_W-1:0] p_addr  [NODES],
  input  logic [WSEL_W-1:0] p_word  [NODES],
  input  logic [WORD_W-1:0] p_wdata [NODES],
  output logic              p_done  [NODES],
  output logic              p_err   [NODES],
  output logic [WORD_W-1:0] p_rdata [NODES],
  // observation of the bus, for monitoring
  output logic              bus_valid,
  output bus_cmd_e          bus_cmd,
  output logic [ID_W-1:0]   bus_src,
  output logic [ADDR_W-1:0] bus_addr,
  output logic [ID_W-1:0]   bus_target,
  output bus_resp_e         bus_resp,
  output logic              bus_mem_done
);

  logic              req      [NODES];
  logic              gnt      [NODES];
  bus_cmd_e          m_cmd    [NODES];
  logic [ADDR_W-1:0] m_addr   [NODES];
  logic [ID_W-1:0]   m_target [NODES];
  logic              m_wb     [NODES];
  logic [LINE_W-1:0] m_data   [NODES];
  bus_resp_e         n_kind   [NODES];
  logic [LINE_W-1:0] n_data   [NODES];

  logic              s_valid, s_wb, r_any, mem_busy, mem_done;
  bus_cmd_e          s_cmd;
  logic [ID_W-1:0]   s_src, s_target, r_id;
  logic [ADDR_W-1:0] s_addr;
  logic [LINE_W-1:0] s_data, r_data, mem_data;
  bus_resp_e         r_kind;

  for (genvar g = 0; g < NODES; g++) begin : g_node
    cbl_lock_cache #(
      .NODES(NODES), .NODE_ID(g), .ADDR_W(ADDR_W), .WORDS(WORDS),
      .WORD_W(WORD_W), .ENTRIES(ENTRIES)
    ) u_cache (
      .clk, .rst_n,
      .p_valid(p_valid[g]), .p_op(p_op[g]), .p_addr(p_addr[g]), .p_word(p_word[g]),
      .p_wdata(p_wdata[g]), .p_done(p_done[g]), .p_err(p_err[g]), .p_rdata(p_rdata[g]),
      .b_req(req[g]), .b_gnt(gnt[g]), .m_cmd(m_cmd[g]), .m_addr(m_addr[g]),
      .m_target(m_target[g]), .m_wb(m_wb[g]), .m_data(m_data[g]),
      .r_in_kind(r_kind), .r_in_id(r_id), .r_in_data(r_data),
      .mem_done, .mem_data,
      .s_valid, .s_cmd, .s_src, .s_addr, .s_target, .s_data,
      .r_kind(n_kind[g]), .r_data(n_data[g])
    );
  end

  cbl_bus #(.NODES(NODES), .ADDR_W(ADDR_W), .LINE_W(LINE_W)) u_bus (
    .clk, .rst_n,
    .req, .gnt, .m_cmd, .m_addr, .m_target, .m_wb, .m_data, .mem_busy,
    .s_valid, .s_cmd, .s_src, .s_addr, .s_target, .s_wb, .s_data,
    .n_kind, .n_data, .r_kind, .r_id, .r_data, .r_any
  );

  cbl_memory #(.ADDR_W(ADDR_W), .LINE_W(LINE_W), .MEM_CYCLES(MEM_CYCLES)) u_mem (
    .clk, .rst_n,
    .s_valid, .s_cmd, .s_addr, .s_wb, .s_data, .r_any,
    .mem_busy, .mem_done, .mem_data
  );

  assign bus_valid    = s_valid;
  assign bus_cmd      = s_cmd;
  assign bus_src      = s_src;
  assign bus_addr     = s_addr;
  assign bus_target   = s_target;
  assign bus_resp     = r_kind;
  assign bus_mem_done = mem_done;

endmodule
