// cbl_memory: shared main memory of the snoopy cache-based lock system.
//
// Memory is the default owner of every line. When a read-lock or write-lock
// request is broadcast and no cache answers, the lock is free and memory
// supplies the line (the hit(M) answer): mem_done pulses with the line
// MEM_CYCLES + 1 cycles after the request cycle. A wake that releases a write lock, and a
// plain write-back, carry the line with s_wb set and memory stores it. Each
// access keeps mem_busy high from the cycle after the request up to and
// including the mem_done cycle (MEM_CYCLES + 1 cycles), which holds the bus.
//
// The memory cycle of 4 processor cycles follows the evaluation setup; the
// number of lines (2**ADDR_W), the zero initial contents and the registered
// read on the last busy cycle are choices of this design.
module cbl_memory
  import cbl_pkg::*;
#(
  parameter int unsigned ADDR_W     = 10,
  parameter int unsigned LINE_W     = 128,
  parameter int unsigned MEM_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_valid,
  input  bus_cmd_e          s_cmd,
  input  logic [ADDR_W-1:0] s_addr,
  input  logic              s_wb,
  input  logic [LINE_W-1:0] s_data,
  input  logic              r_any,      // some cache answered this request
  output logic              mem_busy,
  output logic              mem_done,
  output logic [LINE_W-1:0] mem_data
);

  localparam int unsigned CW = $clog2(MEM_CYCLES + 1);

  logic [LINE_W-1:0] mem [2**ADDR_W];
  logic [CW-1:0]     left;
  logic              rd;
  logic [ADDR_W-1:0] rd_addr;

  initial for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;

  logic start_rd, start_wr;
  assign start_rd = s_valid && (s_cmd == BC_RLOCK || s_cmd == BC_WLOCK) && !r_any;
  assign start_wr = s_valid && s_wb;

  always_ff @(posedge clk) begin
    if (start_wr) mem[s_addr] <= s_data;
    if (rd && left == CW'(1)) mem_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left     <= '0;
      rd       <= 1'b0;
      rd_addr  <= '0;
      mem_done <= 1'b0;
    end else begin
      mem_done <= rd && left == CW'(1);
      if (start_rd || start_wr) begin
        left    <= CW'(MEM_CYCLES);
        rd      <= start_rd;
        rd_addr <= s_addr;
      end else if (left != '0) begin
        left <= left - 1'b1;
        if (left == CW'(1)) rd <= 1'b0;
      end
    end
  end

  // mem_busy also covers the cycle in which mem_done is seen
  assign mem_busy = (left != '0) || mem_done;

endmodule
