// tb_cbl_snoopy_top: end-to-end test of the snoopy cache-based lock system at
// its default size (16 nodes).
//
// Part 1 replays the classic queue example on one line: nodes 1..6 ask, in
// order, for read, read, write, read, read, write locks. Nodes 1 and 2 must
// share the lock, the rest must wait in order; releases must hand the lock on
// group by group, the two-reader group waking in the same cycle, with the data
// written under the write lock arriving with the grant.
// Part 2 lets every node take random read/write locks on a few lines. Under a
// write lock a node increments word 0 and writes its id to word 1; under a read
// lock it checks word 0 against a reference model. A monitor checks mutual
// exclusion at every grant. At the end every line's counter is checked against
// the number of write locks taken on it, and every protocol mechanism (hit,
// hit(M), wait, wait(T), wake, read-unlock, write-back, group wake, local
// re-lock, silent drop of an idle owner) must have happened at least once.
module tb_cbl_snoopy_top;
  import cbl_pkg::*;

  localparam int unsigned NODES  = 16;
  localparam int unsigned ADDR_W = 10;
  localparam int unsigned WORD_W = 32;
  localparam int unsigned ID_W   = 4;
  localparam int unsigned NLINES = 3;
  localparam int unsigned ROUNDS = 200;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              p_valid [NODES];
  proc_op_e          p_op    [NODES];
  logic [ADDR_W-1:0] p_addr  [NODES];
  logic [1:0]        p_word  [NODES];
  logic [WORD_W-1:0] p_wdata [NODES];
  logic              p_done  [NODES];
  logic              p_err   [NODES];
  logic [WORD_W-1:0] p_rdata [NODES];
  logic              bus_valid, bus_mem_done;
  bus_cmd_e          bus_cmd;
  logic [ID_W-1:0]   bus_src, bus_target;
  logic [ADDR_W-1:0] bus_addr;
  bus_resp_e         bus_resp;

  cbl_snoopy_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_hit = 0, n_hitm = 0, n_wait = 0, n_waitt = 0, n_wake = 0, n_runlock = 0,
      n_wb = 0, n_group_wake = 0, n_relock = 0, n_drop = 0;
  always @(negedge clk) if (rst_n && bus_valid) begin
    if (bus_cmd inside {BC_RLOCK, BC_WLOCK}) begin
      case (bus_resp)
        BR_HIT:   n_hit++;
        BR_WAIT:  n_wait++;
        BR_WAITT: n_waitt++;
        default:  n_hitm++;
      endcase
    end
    if (bus_cmd == BC_WAKE)    n_wake++;
    if (bus_cmd == BC_RUNLOCK) n_runlock++;
    if (bus_cmd == BC_WB)      n_wb++;
  end
  // an idle owner at the tail dropping its line when another node asks
  for (genvar g = 0; g < NODES; g++) begin : g_drop
    always @(negedge clk) if (rst_n)
      for (int e = 0; e < 4; e++)
        if (dut.g_node[g].u_cache.st[e] == ST_OT && dut.g_node[g].u_cache.st_n[e] == ST_INVALID)
          n_drop++;
  end

  // ------------------------------------------------ processor driver
  task automatic op(input int n, input proc_op_e o, input int a, input int w = 0,
                    input logic [WORD_W-1:0] wd = '0, output logic [WORD_W-1:0] rd,
                    output logic err);
    #1 p_valid[n] = 1'b1; p_op[n] = o; p_addr[n] = ADDR_W'(a);
    p_word[n] = 2'(w); p_wdata[n] = wd;
    do @(negedge clk); while (!p_done[n]);
    rd = p_rdata[n]; err = p_err[n];
    @(posedge clk);
    #1 p_valid[n] = 1'b0; p_op[n] = PR_NONE;
  endtask

  // wait for a lock started with start_lock
  task automatic finish_lock(input int n);
    while (!p_done[n]) @(negedge clk);
    @(posedge clk);
    #1 p_valid[n] = 1'b0; p_op[n] = PR_NONE;
  endtask

  // start a lock request without waiting for it
  task automatic start_lock(input int n, input proc_op_e o, input int a);
    #1 p_valid[n] = 1'b1; p_op[n] = o; p_addr[n] = ADDR_W'(a);
  endtask

  // ------------------------------------------------ lock holder model
  int  holders_r [NLINES];
  bit  holder_w  [NLINES];
  int  wr_count  [NLINES];
  logic [WORD_W-1:0] ref_val [NLINES];

  // group-wake detection: several nodes finishing a read lock in one cycle
  int done_rl;
  always @(negedge clk) if (rst_n) begin
    done_rl = 0;
    for (int n = 0; n < NODES; n++) if (p_valid[n] && p_done[n] && p_op[n] == PR_RLOCK && !p_err[n]) done_rl++;
    if (done_rl > 1) n_group_wake++;
  end

  task automatic grant_check(input int l, input bit wr, input int n);
    if (wr) begin
      check(holders_r[l] == 0 && !holder_w[l], $sformatf("node %0d write lock on line %0d not exclusive", n, l));
      holder_w[l] = 1;
    end else begin
      check(!holder_w[l], $sformatf("node %0d read lock on line %0d while written", n, l));
      holders_r[l]++;
    end
  endtask

  task automatic worker(input int n);
    logic [WORD_W-1:0] rd;
    logic err;
    for (int r = 0; r < ROUNDS; r++) begin
      int l;
      bit wr;
      l  = $urandom_range(NLINES - 1);
      wr = ($urandom_range(99) < 30);
      repeat ($urandom_range(6)) @(posedge clk);
      op(n, wr ? PR_WLOCK : PR_RLOCK, 100 + l, 0, '0, rd, err);
      check(!err, $sformatf("node %0d lock error", n));
      grant_check(l, wr, n);
      op(n, PR_READ, 100 + l, 0, '0, rd, err);
      check(!err && rd == ref_val[l], $sformatf("node %0d line %0d word0 %0d expected %0d", n, l, rd, ref_val[l]));
      if (wr) begin
        op(n, PR_WRITE, 100 + l, 0, rd + 1, rd, err);
        check(!err, "write under write lock");
        op(n, PR_WRITE, 100 + l, 1, WORD_W'(n), rd, err);
        ref_val[l]++;
        wr_count[l]++;
      end
      repeat ($urandom_range(8)) @(posedge clk);
      if (wr) holder_w[l] = 0; else holders_r[l]--;
      op(n, PR_UNLOCK, 100 + l, 0, '0, rd, err);
      check(!err, $sformatf("node %0d unlock error wr=%0d", n, wr));
    end
  endtask

  // ------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ main
  localparam int A = 5;
  initial begin
    logic [WORD_W-1:0] rd;
    logic err;
    longint t0;
    for (int n = 0; n < NODES; n++) begin
      p_valid[n] = 0; p_op[n] = PR_NONE; p_addr[n] = '0; p_word[n] = '0; p_wdata[n] = '0;
    end
    for (int l = 0; l < NLINES; l++) begin
      holders_r[l] = 0; holder_w[l] = 0; wr_count[l] = 0; ref_val[l] = '0;
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // ---- part 1: P1 RL, P2 RL, P3 WL, P4 RL, P5 RL, P6 WL on line A
    t0 = cycle;
    op(1, PR_RLOCK, A, 0, '0, rd, err);
    // accept, bus request, bus cycle, MEM_CYCLES, mem_done, completion, return
    check(cycle - t0 == 4 + 5, $sformatf("uncontended lock latency %0d", cycle - t0));
    check(!err, "P1 read lock");
    op(2, PR_RLOCK, A, 0, '0, rd, err);
    check(!err, "P2 shares the read lock");
    start_lock(3, PR_WLOCK, A); wait (bus_valid && bus_src == 3); @(posedge clk);
    start_lock(4, PR_RLOCK, A); wait (bus_valid && bus_src == 4); @(posedge clk);
    start_lock(5, PR_RLOCK, A); wait (bus_valid && bus_src == 5); @(posedge clk);
    start_lock(6, PR_WLOCK, A); wait (bus_valid && bus_src == 6); @(posedge clk);
    repeat (20) @(posedge clk);
    check(dut.g_node[3].u_cache.st[0] == ST_WOV,  "P3 waits for the write lock");
    check(dut.g_node[4].u_cache.st[0] == ST_ROV,  "P4 leads the waiting read group");
    check(dut.g_node[5].u_cache.st[0] == ST_RV,   "P5 waits in P4's group");
    check(dut.g_node[6].u_cache.st[0] == ST_WOVT, "P6 is the tail");
    check(dut.g_node[1].u_cache.st[0] == ST_RO && dut.g_node[1].u_cache.cnt[0] == 2,
          "P1 owns the read lock with a group of 2");
    #1;
    op(1, PR_UNLOCK, A, 0, '0, rd, err);
    repeat (10) @(posedge clk);
    check(!p_done[3], "P3 still waits while P2 reads");
    op(2, PR_UNLOCK, A, 0, '0, rd, err);
    // P3 gets the lock
    finish_lock(3);
    check(p_done[4] == 0 && dut.g_node[4].u_cache.st[0] == ST_ROV, "P4 not woken by P2");
    op(3, PR_WRITE, A, 2, 32'hCAFE_0003, rd, err);
    check(!err, "P3 writes under its write lock");
    op(3, PR_UNLOCK, A, 0, '0, rd, err);
    // P4 and P5 wake in the same cycle
    while (!(p_done[4] || p_done[5])) @(negedge clk);
    check(p_done[4] && p_done[5], "P4 and P5 granted in the same cycle");
    @(posedge clk);
    #1 p_valid[4] = 0; p_valid[5] = 0;
    op(4, PR_READ, A, 2, '0, rd, err);
    check(rd == 32'hCAFE_0003, $sformatf("P4 sees P3's data %h", rd));
    op(5, PR_READ, A, 2, '0, rd, err);
    check(rd == 32'hCAFE_0003, $sformatf("P5 sees P3's data %h", rd));
    op(5, PR_WRITE, A, 2, 32'h1, rd, err);
    check(err, "write under a read lock is refused");
    check(!p_done[6], "P6 waits");
    op(5, PR_UNLOCK, A, 0, '0, rd, err);
    op(4, PR_UNLOCK, A, 0, '0, rd, err);
    finish_lock(6);
    op(6, PR_READ, A, 2, '0, rd, err);
    check(rd == 32'hCAFE_0003, "P6 gets the line");
    op(6, PR_WRITE, A, 3, 32'h0000_0606, rd, err);
    op(6, PR_UNLOCK, A, 0, '0, rd, err);
    repeat (10) @(posedge clk);
    // line written back: a fresh reader gets it from memory
    op(7, PR_RLOCK, A, 0, '0, rd, err);
    op(7, PR_READ, A, 3, '0, rd, err);
    check(rd == 32'h0000_0606, $sformatf("write-back reached memory %h", rd));
    op(7, PR_UNLOCK, A, 0, '0, rd, err);
    // idle owner at the tail re-takes its own lock without the bus
    t0 = cycle;
    op(7, PR_WLOCK, A, 0, '0, rd, err);
    check(cycle - t0 == 1 && !err, "local re-lock of an idle owned line");
    n_relock++;
    op(7, PR_UNLOCK, A, 0, '0, rd, err);
    op(8, PR_READ, A, 0, '0, rd, err);
    check(err, "read of a line not held is refused");
    repeat (10) @(posedge clk);

    // ---- part 2: random stress
    for (int n = 0; n < NODES; n++) begin
      automatic int nn = n;
      fork worker(nn); join_none
    end
    wait fork;
    repeat (20) @(posedge clk);
    for (int l = 0; l < NLINES; l++) begin
      op(0, PR_RLOCK, 100 + l, 0, '0, rd, err);
      op(0, PR_READ, 100 + l, 0, '0, rd, err);
      check(rd == WORD_W'(wr_count[l]), $sformatf("line %0d counter %0d, %0d write locks", l, rd, wr_count[l]));
      op(0, PR_UNLOCK, 100 + l, 0, '0, rd, err);
    end

    $display("mechanisms: hit=%0d hitM=%0d wait=%0d waitT=%0d wake=%0d runlock=%0d wb=%0d group_wake=%0d relock=%0d drop=%0d",
             n_hit, n_hitm, n_wait, n_waitt, n_wake, n_runlock, n_wb, n_group_wake, n_relock, n_drop);
    check(n_hit > 0, "hit happened");
    check(n_hitm > 0, "hit(M) happened");
    check(n_wait > 0, "wait happened");
    check(n_waitt > 0, "wait(T) happened");
    check(n_wake > 0, "wake happened");
    check(n_runlock > 0, "read-unlock happened");
    check(n_wb > 0, "write-back happened");
    check(n_group_wake > 0, "group wake happened");
    check(n_relock > 0, "local re-lock happened");
    check(n_drop > 0, "idle owner drop happened");
    $display("cycles=%0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
