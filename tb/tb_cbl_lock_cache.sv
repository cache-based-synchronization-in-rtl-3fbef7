// tb_cbl_lock_cache: checks one node's lock-cache controller (node 1 of 4)
// with the testbench playing the bus, the memory and the other nodes.
// Each protocol step is scripted: the command the node puts on the bus, the
// answer it gives to snooped requests (hit, wait, wait(T) or none), how it
// reacts to read-unlocks and wakes, when its processor's requests finish, and
// the data it returns and hands on. Expected values are written out by hand
// from the protocol rules.
module tb_cbl_lock_cache;
  import cbl_pkg::*;

  localparam int unsigned NODES   = 4;
  localparam int unsigned ADDR_W  = 8;
  localparam int unsigned WORD_W  = 32;
  localparam int unsigned LINE_W  = 128;
  localparam int unsigned ID_W    = 2;
  localparam int unsigned MEMC    = 4;

  logic clk = 1'b0, rst_n;
  logic p_valid, p_done, p_err;
  proc_op_e p_op;
  logic [ADDR_W-1:0] p_addr;
  logic [1:0] p_word;
  logic [WORD_W-1:0] p_wdata, p_rdata;
  logic b_req, b_gnt, m_wb, mem_done, s_valid;
  bus_cmd_e m_cmd, s_cmd;
  logic [ADDR_W-1:0] m_addr, s_addr;
  logic [ID_W-1:0] m_target, r_in_id, s_src, s_target;
  logic [LINE_W-1:0] m_data, r_in_data, mem_data, s_data, r_data;
  bus_resp_e r_in_kind, r_kind;

  cbl_lock_cache #(.NODES(NODES), .NODE_ID(1), .ADDR_W(ADDR_W), .WORDS(4),
                   .WORD_W(WORD_W), .ENTRIES(2)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // ---------------------------------------------------------- processor
  logic [WORD_W-1:0] rd;
  logic err;
  longint t_req, t_done;
  task automatic start(input proc_op_e o, input int a, input int w = 0, input logic [WORD_W-1:0] wd = '0);
    if (!clk) @(posedge clk);
    #1 p_valid = 1; p_op = o; p_addr = ADDR_W'(a); p_word = 2'(w); p_wdata = wd;
    t_req = cycle;
  endtask
  task automatic finish(input int max_cycles = 50);
    int n;
    n = 0;
    while (!p_done && n < max_cycles) begin @(negedge clk); n++; end
    check(p_done, "processor request finished");
    rd = p_rdata; err = p_err; t_done = cycle;
    @(posedge clk);
    #1 p_valid = 0; p_op = PR_NONE;
  endtask
  task automatic op(input proc_op_e o, input int a, input int w = 0, input logic [WORD_W-1:0] wd = '0);
    start(o, a, w, wd);
    @(negedge clk);
    finish();
  endtask

  // ---------------------------------------------------------- bus as seen by the node
  // wait for the node's bus request, grant it with the given answer,
  // and check the command it puts on the bus
  task automatic serve(input bus_cmd_e c, input int a, input bus_resp_e ans, input int id,
                       input logic [LINE_W-1:0] d, input int tgt = -1, input int wb = -1,
                       input logic [LINE_W-1:0] md = '0, input logic chk_md = 0);
    int n;
    n = 0;
    while (!b_req && n < 50) begin @(negedge clk); n++; end
    check(b_req, "node requests the bus");
    b_gnt = 1; r_in_kind = ans; r_in_id = ID_W'(id); r_in_data = d;
    #1;
    check(m_cmd == c, $sformatf("bus command %s expected %s", m_cmd.name(), c.name()));
    check(m_addr == ADDR_W'(a), "bus address");
    if (tgt >= 0) check(m_target == ID_W'(tgt), $sformatf("bus target %0d expected %0d", m_target, tgt));
    if (wb >= 0)  check(m_wb == wb[0], "write-back flag");
    if (chk_md)   check(m_data == md, $sformatf("bus data %h expected %h", m_data, md));
    @(posedge clk);
    #1 b_gnt = 0; r_in_kind = BR_NONE;
  endtask

  task automatic mem_reply(input logic [LINE_W-1:0] d);
    repeat (MEMC) @(posedge clk);
    #1 mem_done = 1; mem_data = d;
    @(posedge clk);
    #1 mem_done = 0;
  endtask

  // broadcast another node's command for one cycle; check this node's answer
  task automatic snoop(input bus_cmd_e c, input int src, input int a, input int tgt,
                       input logic [LINE_W-1:0] d, input bus_resp_e exp,
                       input logic [LINE_W-1:0] exp_d = '0);
    @(negedge clk);
    s_valid = 1; s_cmd = c; s_src = ID_W'(src); s_addr = ADDR_W'(a); s_target = ID_W'(tgt); s_data = d;
    #1;
    check(r_kind == exp, $sformatf("answer to %s from %0d: %s expected %s", c.name(), src, r_kind.name(), exp.name()));
    if (exp == BR_HIT) check(r_data == exp_d, "hit carries the line");
    @(posedge clk);
    #1 s_valid = 0; s_cmd = BC_NONE;
  endtask

  task automatic no_bus(input int n, input string what);
    repeat (n) begin @(negedge clk); check(!b_req, what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [LINE_W-1:0] D5 = 128'h0005_0003_0005_0002_0005_0001_0005_0000;
  localparam logic [LINE_W-1:0] E7 = 128'h0007_0003_0007_0002_0007_0001_0007_0000;
  localparam logic [LINE_W-1:0] F9 = 128'h0009_0003_0009_0002_0009_0001_0009_0000;
  localparam logic [LINE_W-1:0] GB = 128'h000b_0003_000b_0002_000b_0001_000b_0000;

  initial begin
    p_valid = 0; p_op = PR_NONE; p_addr = '0; p_word = '0; p_wdata = '0;
    b_gnt = 0; r_in_kind = BR_NONE; r_in_id = '0; r_in_data = '0; mem_done = 0; mem_data = '0;
    s_valid = 0; s_cmd = BC_NONE; s_src = '0; s_addr = '0; s_target = '0; s_data = '0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    // 1. read lock of a free line: memory supplies it (hit(M)) -> ROT
    start(PR_RLOCK, 5);
    serve(BC_RLOCK, 5, BR_NONE, 0, '0);
    mem_reply(D5);
    finish();
    check(!err, "read lock from memory");
    check(t_done - t_req == MEM_CYCLES_TOTAL(), $sformatf("lock latency %0d", t_done - t_req));
    op(PR_READ, 5, 1);
    check(!err && rd == D5[63:32], "read of the locked line");

    // 2. another reader shares: hit with the line; a writer takes the tail;
    //    a later reader gets no answer from this non-tail owner
    snoop(BC_RLOCK, 2, 5, 0, '0, BR_HIT, D5);
    snoop(BC_WLOCK, 3, 5, 0, '0, BR_WAITT);
    snoop(BC_RLOCK, 0, 5, 0, '0, BR_NONE);

    // 3. own unlock leaves one reader: no wake yet; its read-unlock empties
    //    the group and the owner wakes node 3 without write-back
    op(PR_UNLOCK, 5);
    check(!err, "read unlock by the owner");
    no_bus(4, "no wake while a reader remains");
    snoop(BC_RUNLOCK, 2, 5, 1, '0, BR_NONE);
    serve(BC_WAKE, 5, BR_NONE, 0, '0, 3, 0, D5, 1);
    no_bus(3, "line released");

    // 4. write lock behind a tail: wait(T) -> WOVT; a new reader is told wait(T);
    //    a wake for another node does nothing; the wake for node 1 grants it
    start(PR_WLOCK, 7);
    serve(BC_WLOCK, 7, BR_WAITT, 2, '0);
    repeat (5) begin @(negedge clk); check(!p_done, "writer waits"); end
    snoop(BC_RLOCK, 2, 7, 0, '0, BR_WAITT);
    snoop(BC_WAKE, 0, 7, 3, '1, BR_NONE);
    repeat (3) begin @(negedge clk); check(!p_done, "wake for another node ignored"); end
    snoop(BC_WAKE, 0, 7, 1, E7, BR_NONE);
    finish();
    check(!err, "write lock granted by wake");
    op(PR_WRITE, 7, 2, 32'hABCD_0123);
    check(!err, "write under the write lock");
    op(PR_READ, 7, 2);
    check(rd == 32'hABCD_0123, "write visible");
    op(PR_UNLOCK, 7);
    serve(BC_WAKE, 7, BR_NONE, 0, '0, 2, 1, {E7[127:96], 32'hABCD_0123, E7[63:0]}, 1);

    // 5. read lock answered by a read owner (hit): member; unlock goes to the leader
    start(PR_RLOCK, 9);
    serve(BC_RLOCK, 9, BR_HIT, 0, F9);
    finish();
    op(PR_READ, 9, 0);
    check(rd == F9[31:0], "member got the owner's line");
    snoop(BC_RLOCK, 3, 9, 0, '0, BR_NONE);
    op(PR_UNLOCK, 9);
    serve(BC_RUNLOCK, 9, BR_NONE, 0, '0, 0);

    // 6. read lock told to wait behind a waiting leader: woken with the group
    start(PR_RLOCK, 11);
    serve(BC_RLOCK, 11, BR_WAIT, 2, '0);
    snoop(BC_WAKE, 0, 11, 3, '1, BR_NONE);
    repeat (3) begin @(negedge clk); check(!p_done, "member waits for its leader"); end
    snoop(BC_WAKE, 0, 11, 2, GB, BR_NONE);
    finish();
    op(PR_READ, 11, 3);
    check(rd == GB[127:96], "member woken with the line");
    op(PR_UNLOCK, 11);
    serve(BC_RUNLOCK, 11, BR_NONE, 0, '0, 2);

    // 6b. read lock behind a writer: wait(T) -> waiting leader at the tail;
    //     a reader joins with wait, a writer takes the tail with wait(T); the
    //     group size counts the joined reader
    start(PR_RLOCK, 25);
    serve(BC_RLOCK, 25, BR_WAITT, 0, '0);
    snoop(BC_RLOCK, 2, 25, 0, '0, BR_WAIT);
    snoop(BC_WLOCK, 3, 25, 0, '0, BR_WAITT);
    snoop(BC_RLOCK, 0, 25, 0, '0, BR_NONE);
    snoop(BC_WAKE, 0, 25, 1, F9, BR_NONE);
    finish();
    op(PR_UNLOCK, 25);
    no_bus(3, "group member still reading");
    snoop(BC_RUNLOCK, 2, 25, 1, '0, BR_NONE);
    serve(BC_WAKE, 25, BR_NONE, 0, '0, 3, 0, F9, 1);

    // 7. errors; idle owner re-locks locally; write lock release with no waiter
    op(PR_READ, 5);
    check(err, "read of a line not held");
    start(PR_RLOCK, 13);
    serve(BC_RLOCK, 13, BR_NONE, 0, '0);
    mem_reply(D5);
    finish();
    op(PR_WRITE, 13, 0, 32'h1);
    check(err, "write under a read lock refused");
    op(PR_RLOCK, 13);
    check(err, "second lock of a held line refused");
    op(PR_UNLOCK, 13);
    no_bus(3, "last reader at the tail keeps the line");
    op(PR_WLOCK, 13);
    check(!err && t_done - t_req == 0, $sformatf("local re-lock in %0d cycles", t_done - t_req));
    op(PR_WRITE, 13, 0, 32'h77);
    op(PR_UNLOCK, 13);
    serve(BC_WB, 13, BR_NONE, 0, '0, -1, 1, {D5[127:32], 32'h77}, 1);

    // 8. idle owner drops its line when another node asks; the next lock goes
    //    to the bus again
    start(PR_RLOCK, 15);
    serve(BC_RLOCK, 15, BR_NONE, 0, '0);
    mem_reply(D5);
    finish();
    op(PR_UNLOCK, 15);
    snoop(BC_RLOCK, 2, 15, 0, '0, BR_NONE);
    start(PR_RLOCK, 15);
    serve(BC_RLOCK, 15, BR_NONE, 0, '0);
    mem_reply(GB);
    finish();
    op(PR_READ, 15, 0);
    check(rd == GB[31:0], "line re-fetched");
    op(PR_UNLOCK, 15);

    // 9. both entries idle owners (15, 20): a third line evicts one
    start(PR_RLOCK, 20);
    serve(BC_RLOCK, 20, BR_NONE, 0, '0);
    mem_reply(E7);
    finish();
    op(PR_UNLOCK, 20);
    start(PR_RLOCK, 21);
    serve(BC_RLOCK, 21, BR_NONE, 0, '0);
    mem_reply(F9);
    finish();
    check(!err, "lock with a full lock cache evicts an idle line");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle of p_done after the request cycle: accept, bus request, bus cycle,
  // MEM_CYCLES, mem_done, then p_done
  function automatic int MEM_CYCLES_TOTAL();
    return MEMC + 4;
  endfunction
endmodule
