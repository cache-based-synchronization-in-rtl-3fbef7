// tb_cbl_bus: checks arbitration, broadcast and answer combination of the bus.
// Random request patterns are applied; a reference round-robin pointer
// predicts the winner each cycle. The broadcast must carry the winner's
// command, nothing may be granted while memory is busy, and the combined answer
// must name the single answering node and its data.
module tb_cbl_bus;
  import cbl_pkg::*;

  localparam int unsigned NODES  = 5;
  localparam int unsigned ADDR_W = 8;
  localparam int unsigned LINE_W = 16;
  localparam int unsigned ID_W   = 3;

  logic clk = 1'b0, rst_n;
  logic req [NODES], gnt [NODES], m_wb [NODES];
  bus_cmd_e m_cmd [NODES];
  logic [ADDR_W-1:0] m_addr [NODES];
  logic [ID_W-1:0] m_target [NODES];
  logic [LINE_W-1:0] m_data [NODES], n_data [NODES];
  bus_resp_e n_kind [NODES];
  logic mem_busy, s_valid, s_wb, r_any;
  bus_cmd_e s_cmd;
  logic [ID_W-1:0] s_src, s_target, r_id;
  logic [ADDR_W-1:0] s_addr;
  logic [LINE_W-1:0] s_data, r_data;
  bus_resp_e r_kind;

  cbl_bus #(.NODES(NODES), .ADDR_W(ADDR_W), .LINE_W(LINE_W)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int prio_ref;
  int grants [NODES];
  initial begin
    for (int i = 0; i < NODES; i++) begin
      req[i] = 0; m_cmd[i] = BC_NONE; m_addr[i] = '0; m_target[i] = '0; m_wb[i] = 0;
      m_data[i] = '0; n_kind[i] = BR_NONE; n_data[i] = '0; grants[i] = 0;
    end
    mem_busy = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prio_ref = 0;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      int exp_w, responder;
      mem_busy = ($urandom_range(9) == 0);
      for (int i = 0; i < NODES; i++) begin
        req[i]      = ($urandom_range(2) == 0);
        m_cmd[i]    = bus_cmd_e'($urandom_range(1, 5));
        m_addr[i]   = ADDR_W'($urandom);
        m_target[i] = ID_W'($urandom_range(NODES - 1));
        m_wb[i]     = $urandom_range(1);
        m_data[i]   = LINE_W'($urandom);
        n_kind[i]   = BR_NONE;
        n_data[i]   = LINE_W'($urandom);
      end
      responder = $urandom_range(NODES);          // NODES: nobody answers
      if (responder < NODES) n_kind[responder] = bus_resp_e'($urandom_range(1, 4));
      #1;
      exp_w = -1;
      if (!mem_busy)
        for (int k = 0; k < NODES; k++)
          if (exp_w < 0 && req[(prio_ref + k) % NODES]) exp_w = (prio_ref + k) % NODES;
      check(s_valid == (exp_w >= 0), "bus valid");
      for (int i = 0; i < NODES; i++) check(gnt[i] == (i == exp_w), $sformatf("grant %0d", i));
      if (exp_w >= 0) begin
        grants[exp_w]++;
        check(s_src == ID_W'(exp_w) && s_cmd == m_cmd[exp_w] && s_addr == m_addr[exp_w] &&
              s_target == m_target[exp_w] && s_data == m_data[exp_w] && s_wb == m_wb[exp_w],
              "broadcast carries the winner's command");
        prio_ref = (exp_w + 1) % NODES;
      end
      if (responder < NODES)
        check(r_any && r_kind == n_kind[responder] && r_id == ID_W'(responder) &&
              r_data == n_data[responder], "combined answer");
      else
        check(!r_any && r_kind == BR_NONE, "no answer");
      @(posedge clk); #1;
    end
    // all requesting: strict rotation
    for (int i = 0; i < NODES; i++) begin req[i] = 1; n_kind[i] = BR_NONE; end
    mem_busy = 0;
    for (int k = 0; k < 2 * NODES; k++) begin
      #1;
      check(gnt[prio_ref], $sformatf("rotation grants node %0d", prio_ref));
      prio_ref = (prio_ref + 1) % NODES;
      @(posedge clk); #1;
    end
    for (int i = 0; i < NODES; i++) check(grants[i] > 50, "every node served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
