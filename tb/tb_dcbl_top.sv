// tb_dcbl_top: end-to-end test of the directory-based cache lock system with
// 8 nodes.
//
// Part 1 builds a queue on one block: node 1 read lock, node 2 read lock (must
// share), node 3 write lock, node 4 read lock, node 5 write lock. Releases are
// then made from the middle (node 4), from the head and from the tail so that
// every list operation of the protocol is used; the data written under the
// write lock must reach the next holder.
// Part 2 lets every node take random read/write locks on a few blocks. Under a
// write lock a node increments word 0; under a read lock it checks word 0
// against a reference model; mutual exclusion is checked at every grant.
// Every message kind delivered by the network is counted, and each one of the
// protocol (grant, forward, share, wait, wake, tail unlock, tail change, prev
// change, next change, ack, refusal, write-back) must have occurred.
module tb_dcbl_top;
  import dcbl_pkg::*;
  import cbl_pkg::*;

  localparam int unsigned NODES  = 8;
  localparam int unsigned WORD_W = 32;
  localparam int unsigned NLINES = 3;
  localparam int unsigned ROUNDS = 150;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 p_valid [NODES];
  proc_op_e             p_op    [NODES];
  logic [DC_ADDR_W-1:0] p_addr  [NODES];
  logic [1:0]           p_word  [NODES];
  logic [WORD_W-1:0]    p_wdata [NODES];
  logic                 p_done  [NODES];
  logic                 p_err   [NODES];
  logic [WORD_W-1:0]    p_rdata [NODES];

  dcbl_top #(.NODES(NODES)) dut (.*);

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

  // ------------------------------------------------ message counters
  int n_kind [16];
  always @(negedge clk) if (rst_n)
    for (int e = 0; e <= NODES; e++)
      if (dut.rx_valid[e] && dut.rx_ready[e]) n_kind[dut.rx_msg[e].kind]++;

  // ------------------------------------------------ processor driver
  task automatic op(input int n, input proc_op_e o, input int a, input int w = 0,
                    input logic [WORD_W-1:0] wd = '0, output logic [WORD_W-1:0] rd,
                    output logic err);
    #1 p_valid[n] = 1'b1; p_op[n] = o; p_addr[n] = DC_ADDR_W'(a);
    p_word[n] = 2'(w); p_wdata[n] = wd;
    do @(negedge clk); while (!p_done[n]);
    rd = p_rdata[n]; err = p_err[n];
    @(posedge clk);
    #1 p_valid[n] = 1'b0; p_op[n] = PR_NONE;
  endtask

  task automatic start_lock(input int n, input proc_op_e o, input int a);
    #1 p_valid[n] = 1'b1; p_op[n] = o; p_addr[n] = DC_ADDR_W'(a);
  endtask

  task automatic finish_lock(input int n);
    while (!p_done[n]) @(negedge clk);
    check(!p_err[n], $sformatf("node %0d lock error", n));
    @(posedge clk);
    #1 p_valid[n] = 1'b0; p_op[n] = PR_NONE;
  endtask

  // ------------------------------------------------ lock holder model
  int  holders_r [NLINES];
  bit  holder_w  [NLINES];
  int  wr_count  [NLINES];
  logic [WORD_W-1:0] ref_val [NLINES];

  task automatic grant_check(input int l, input bit wr, input int n);
    if (wr) begin
      check(holders_r[l] == 0 && !holder_w[l], $sformatf("node %0d write lock on block %0d not exclusive", n, l));
      holder_w[l] = 1;
    end else begin
      check(!holder_w[l], $sformatf("node %0d read lock on block %0d while written", n, l));
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
      op(n, wr ? PR_WLOCK : PR_RLOCK, 200 + l, 0, '0, rd, err);
      check(!err, $sformatf("node %0d lock error", n));
      grant_check(l, wr, n);
      op(n, PR_READ, 200 + l, 0, '0, rd, err);
      check(!err && rd == ref_val[l], $sformatf("node %0d block %0d word0 %0d expected %0d", n, l, rd, ref_val[l]));
      if (wr) begin
        op(n, PR_WRITE, 200 + l, 0, rd + 1, rd, err);
        check(!err, "write under write lock");
        ref_val[l]++;
        wr_count[l]++;
      end
      repeat ($urandom_range(10)) @(posedge clk);
      if (wr) holder_w[l] = 0; else holders_r[l]--;
      op(n, PR_UNLOCK, 200 + l, 0, '0, rd, err);
      check(!err, $sformatf("node %0d unlock error wr=%0d", n, wr));
    end
  endtask

  // ------------------------------------------------ watchdog
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int A = 7;
  initial begin
    logic [WORD_W-1:0] rd;
    logic err;
    for (int k = 0; k < 16; k++) n_kind[k] = 0;
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

    // ---- part 1: queue 1:R 2:R 3:W 4:R 5:W, then 6:R
    op(1, PR_RLOCK, A, 0, '0, rd, err); check(!err, "node 1 read lock granted");
    op(2, PR_RLOCK, A, 0, '0, rd, err); check(!err, "node 2 shares the read lock");
    check(dut.g_node[2].u_node.prev == 1 && dut.g_node[1].u_node.next == 2, "queue links 1<-2");
    // tail deletion with a predecessor: memory moves the tail back to node 1
    op(2, PR_UNLOCK, A, 0, '0, rd, err); check(!err, "node 2 unlock at the tail");
    repeat (12) @(posedge clk);
    check(dut.u_dir.tail[A] == 1 && !dut.g_node[1].u_node.next_ok, "tail moved back to node 1");
    op(2, PR_RLOCK, A, 0, '0, rd, err); check(!err, "node 2 shares again");
    start_lock(3, PR_WLOCK, A); repeat (12) @(posedge clk);
    start_lock(4, PR_RLOCK, A); repeat (12) @(posedge clk);
    start_lock(5, PR_WLOCK, A); repeat (12) @(posedge clk);
    check(!p_done[3] && !p_done[4] && !p_done[5], "nodes 3..5 wait");
    check(dut.g_node[3].u_node.prev == 2 && dut.g_node[4].u_node.prev == 3 &&
          dut.g_node[5].u_node.prev == 4, "queue links 2<-3<-4<-5");
    check(dut.u_dir.tail[A] == 5, "directory tail is node 5");
    // middle deletion: node 2 leaves from between 1 and 3
    op(2, PR_UNLOCK, A, 0, '0, rd, err); check(!err, "node 2 unlock in the middle");
    repeat (12) @(posedge clk);
    check(dut.g_node[3].u_node.prev == 1 && dut.g_node[1].u_node.next == 3, "queue relinked 1<-3");
    check(!p_done[3], "node 3 still waits for node 1");
    // head release: node 1 wakes node 3
    op(1, PR_UNLOCK, A, 0, '0, rd, err); check(!err, "node 1 unlock at the head");
    finish_lock(3);
    op(3, PR_WRITE, A, 0, 32'hCAFE_0001, rd, err); check(!err, "node 3 writes");
    op(3, PR_UNLOCK, A, 0, '0, rd, err); check(!err, "node 3 unlock");
    finish_lock(4);
    op(4, PR_READ, A, 0, '0, rd, err); check(!err && rd == 32'hCAFE_0001, "data written by node 3 reaches node 4");
    check(!p_done[5], "writer 5 waits behind reader 4");
    start_lock(6, PR_RLOCK, A); repeat (12) @(posedge clk);
    check(!p_done[6], "reader 6 waits behind writer 5");
    op(4, PR_UNLOCK, A, 0, '0, rd, err); check(!err, "node 4 unlock");
    finish_lock(5);
    op(5, PR_WRITE, A, 1, 32'hCAFE_0002, rd, err);
    op(5, PR_UNLOCK, A, 0, '0, rd, err); check(!err, "node 5 unlock");
    finish_lock(6);
    op(6, PR_READ, A, 1, '0, rd, err); check(!err && rd == 32'hCAFE_0002, "data written by node 5 reaches node 6");
    op(6, PR_UNLOCK, A, 0, '0, rd, err); check(!err, "node 6 unlock (alone)");
    repeat (20) @(posedge clk);
    check(!dut.u_dir.tail_ok[A], "queue empty after all releases");
    check(dut.u_dir.mem[A][63:32] == 32'hCAFE_0002, "block written back to memory");

    // ---- part 2: random stress
    for (int n = 0; n < NODES; n++) begin
      fork
        automatic int nn = n;
        worker(nn);
      join_none
    end
    wait fork;
    repeat (50) @(posedge clk);
    for (int l = 0; l < NLINES; l++) begin
      op(0, PR_RLOCK, 200 + l, 0, '0, rd, err);
      op(0, PR_READ, 200 + l, 0, '0, rd, err);
      check(rd == WORD_W'(wr_count[l]), $sformatf("block %0d counter %0d expected %0d", l, rd, wr_count[l]));
      op(0, PR_UNLOCK, 200 + l, 0, '0, rd, err);
    end
    $display("messages: LOCK %0d GRANT %0d FWD %0d SHARE %0d WAIT %0d WAKE %0d UNL_TAIL %0d TAIL_CHG %0d PREV_CHG %0d NEXT_CHG %0d ACK %0d NACK %0d WB %0d",
             n_kind[MK_LOCK], n_kind[MK_GRANT], n_kind[MK_FWD], n_kind[MK_SHARE], n_kind[MK_WAIT],
             n_kind[MK_WAKE], n_kind[MK_UNL_TAIL], n_kind[MK_TAIL_CHG], n_kind[MK_PREV_CHG],
             n_kind[MK_NEXT_CHG], n_kind[MK_ACK], n_kind[MK_NACK], n_kind[MK_WB]);
    for (int k = 0; k <= 12; k++)
      check(n_kind[k] > 0, $sformatf("message kind %s never used", msg_kind_e'(k)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
