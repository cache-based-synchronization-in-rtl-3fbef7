// tb_cbl_memory: checks the shared memory of the lock system.
// A lock request nobody answers must return the line MEM_CYCLES + 1 cycles
// later with mem_done; an answered request must not touch memory; write-backs
// must be stored and read back; mem_busy must cover each access.
module tb_cbl_memory;
  import cbl_pkg::*;

  localparam int unsigned ADDR_W = 6;
  localparam int unsigned LINE_W = 128;
  localparam int unsigned MEMC   = 4;

  logic clk = 1'b0, rst_n;
  logic s_valid, s_wb, r_any, mem_busy, mem_done;
  bus_cmd_e s_cmd;
  logic [ADDR_W-1:0] s_addr;
  logic [LINE_W-1:0] s_data, mem_data;

  cbl_memory #(.ADDR_W(ADDR_W), .LINE_W(LINE_W), .MEM_CYCLES(MEMC)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [LINE_W-1:0] model [2**ADDR_W];

  // one bus cycle, then count cycles to mem_done
  task automatic access(input bus_cmd_e c, input int a, input logic wb,
                        input logic [LINE_W-1:0] d, input logic answered);
    int n;
    s_valid = 1; s_cmd = c; s_addr = ADDR_W'(a); s_wb = wb; s_data = d; r_any = answered;
    @(posedge clk); #1;
    s_valid = 0; s_cmd = BC_NONE; s_wb = 0; r_any = 0;
    n = 1;
    while (mem_busy && n < 20) begin
      if (mem_done) begin
        check(n == MEMC + 1, $sformatf("read latency %0d", n));
        check(mem_data == model[a], $sformatf("line %0d data %h expected %h", a, mem_data, model[a]));
      end
      check(c inside {BC_RLOCK, BC_WLOCK} || !mem_done, "no mem_done after a write");
      @(posedge clk); #1;
      n++;
    end
    if (answered) check(n == 1, "answered request leaves memory idle");
    else if (c inside {BC_RLOCK, BC_WLOCK}) check(n == MEMC + 2, $sformatf("busy for %0d", n));
    else if (wb) check(n == MEMC + 1, $sformatf("write busy for %0d", n));
    if (wb) model[a] = d;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) model[i] = '0;
    s_valid = 0; s_cmd = BC_NONE; s_addr = '0; s_wb = 0; s_data = '0; r_any = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    access(BC_RLOCK, 3, 0, '0, 0);
    for (int k = 0; k < 30; k++) begin
      int a;
      logic [LINE_W-1:0] d;
      a = $urandom_range(2**ADDR_W - 1);
      d = {$urandom, $urandom, $urandom, $urandom};
      case ($urandom_range(4))
        0: access(BC_WB, a, 1, d, 0);
        1: access(BC_WAKE, a, 1, d, 0);
        2: access(BC_RLOCK, a, 0, '0, 0);
        3: access(BC_WLOCK, a, 0, '0, 0);
        default: access(BC_RLOCK, a, 0, '0, 1);
      endcase
    end
    for (int a = 0; a < 8; a++) begin
      access((a % 2) ? BC_WAKE : BC_WB, a, 1, {4{$urandom}}, 0);
      access(BC_WAKE, a, 0, '1, 0);          // wake without write-back: no store
      access(BC_WLOCK, a, 0, '0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
