// tb_dcbl_node: checks one lock-line controller of the directory system.
// The testbench plays processor, memory and the other nodes: it drives
// processor operations and incoming messages and checks every message the
// node sends. Scripted cases: grant of a free block; sharing with a reader
// forwarded behind it; head release (WAKE); a write lock that waits and is
// woken (a WAKE from a node that is not its prev is refused); write-back then
// wake at a writer's release; middle deletion (PREV_CHG, ACK, NEXT_CHG); tail
// deletion with a refused first try; a tail change from memory; errors for
// accesses without the right lock.
module tb_dcbl_node;
  import dcbl_pkg::*;
  import cbl_pkg::*;

  localparam int unsigned NODES = 4;
  localparam logic [DC_ID_W-1:0] ME = 1, MEM = 4;

  logic clk = 1'b0, rst_n;
  logic p_valid, p_done, p_err;
  proc_op_e p_op;
  logic [DC_ADDR_W-1:0] p_addr;
  logic [1:0] p_word;
  logic [31:0] p_wdata, p_rdata;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  msg_t tx_msg, rx_msg;

  dcbl_node #(.NODES(NODES), .NODE_ID(1)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor operation; returns error flag and read data
  task automatic op(input proc_op_e o, input int a, input int w, input logic [31:0] wd,
                    output logic [31:0] rd, output logic err);
    int n = 0;
    #1 p_valid = 1; p_op = o; p_addr = DC_ADDR_W'(a); p_word = 2'(w); p_wdata = wd;
    do begin @(negedge clk); n++; end while (!p_done && n < 50);
    check(p_done, $sformatf("op %s finishes", o.name()));
    rd = p_rdata; err = p_err;
    @(posedge clk); #1 p_valid = 0; p_op = PR_NONE;
  endtask

  // a message arrives
  task automatic give(input msg_kind_e k, input int src, input int a, input logic ptr_ok = 0,
                      input int ptr = 0, input logic rw = 0, input logic [127:0] d = '0);
    if (!clk) @(posedge clk);
    #1 rx_valid = 1;
    rx_msg = '0; rx_msg.kind = k; rx_msg.src = DC_ID_W'(src); rx_msg.dst = ME;
    rx_msg.addr = DC_ADDR_W'(a); rx_msg.ptr_ok = ptr_ok; rx_msg.ptr = DC_ID_W'(ptr);
    rx_msg.rw = rw; rx_msg.data = d;
    do @(negedge clk); while (!rx_ready);
    @(posedge clk); #1 rx_valid = 0;
  endtask

  // the node must send this message (ptr checked when ptr_ok)
  task automatic expect_tx(input msg_kind_e k, input int dst, input logic ptr_ok = 0,
                           input int ptr = 0, output msg_t m);
    int n = 0;
    while (!tx_valid && n < 20) begin @(negedge clk); n++; end
    m = tx_msg;
    check(tx_valid && m.kind == k && m.dst == DC_ID_W'(dst) && m.src == ME &&
          m.ptr_ok == ptr_ok && (!ptr_ok || m.ptr == DC_ID_W'(ptr)),
          $sformatf("expected %s to %0d, got %s to %0d (valid %0d)", k.name(), dst, m.kind.name(), m.dst, tx_valid));
    #1 tx_ready = 1;
    @(posedge clk); #1 tx_ready = 0;
  endtask

  // lock completions are one-cycle p_done pulses: a monitor remembers them
  bit granted = 0;
  always @(negedge clk)
    if (p_valid && p_done && !p_err && p_op inside {PR_RLOCK, PR_WLOCK}) granted = 1;
  task automatic lock_done(input string what);
    int n = 0;
    while (!granted && n < 5) begin @(negedge clk); n++; end
    check(granted, what);
    granted = 0;
    @(posedge clk); #1 p_valid = 0; p_op = PR_NONE;
  endtask

  task automatic no_tx(input string what);
    repeat (3) @(negedge clk);
    check(!tx_valid, what);
  endtask

  logic [31:0] rd;
  logic err;
  msg_t m;
  logic [127:0] D = 128'h0004_0003_0002_0001_dead_beef_1234_5678;

  initial begin
    p_valid = 0; p_op = PR_NONE; p_addr = '0; p_word = '0; p_wdata = '0;
    tx_ready = 0; rx_valid = 0; rx_msg = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    op(PR_READ, 10, 0, 0, rd, err); check(err, "read without a lock is refused");
    // 1: free block, read lock, share with a forwarded reader, head release
    #1 p_valid = 1; p_op = PR_RLOCK; p_addr = 10;
    expect_tx(MK_LOCK, MEM, 0, 0, m); check(!m.rw, "read lock request");
    check(!granted, "no grant yet");
    give(MK_GRANT, MEM, 10, 0, 0, 0, D);
    lock_done("read lock granted");
    op(PR_READ, 10, 2, 0, rd, err); check(!err && rd == D[95:64], "read word 2");
    op(PR_WRITE, 10, 0, 5, rd, err); check(err, "write under a read lock is refused");
    give(MK_FWD, MEM, 10, 1, 2, 0);
    expect_tx(MK_SHARE, 2, 0, 0, m); check(m.data == D, "share carries the block");
    op(PR_UNLOCK, 10, 0, 0, rd, err); check(!err, "unlock accepted");
    expect_tx(MK_WAKE, 2, 0, 0, m);
    give(MK_ACK, 2, 10);
    check(dut.st == 0, "idle after head release");

    // 2: write lock waits behind node 2; a stranger's wake is refused
    #1 p_valid = 1; p_op = PR_WLOCK; p_addr = 20;
    expect_tx(MK_LOCK, MEM, 0, 0, m); check(m.rw, "write lock request");
    give(MK_WAIT, 2, 20);
    give(MK_WAKE, 0, 20, 0, 0, 0, D);
    expect_tx(MK_NACK, 0, 0, 0, m);
    check(!granted, "still waiting");
    give(MK_WAKE, 2, 20, 0, 0, 0, D);
    expect_tx(MK_ACK, 2, 0, 0, m);
    lock_done("write lock granted by wake");
    op(PR_WRITE, 20, 0, 32'h0bad_cafe, rd, err); check(!err, "write under the write lock");
    give(MK_FWD, MEM, 20, 1, 3, 0);
    expect_tx(MK_WAIT, 3, 0, 0, m);
    op(PR_UNLOCK, 20, 0, 0, rd, err);
    expect_tx(MK_WB, MEM, 0, 0, m); check(m.wb && m.data[31:0] == 32'h0bad_cafe, "write-back carries the new word");
    expect_tx(MK_WAKE, 3, 0, 0, m); check(m.data[31:0] == 32'h0bad_cafe, "wake carries the block");
    give(MK_ACK, 3, 20);

    // 3: middle deletion
    #1 p_valid = 1; p_op = PR_RLOCK; p_addr = 30;
    expect_tx(MK_LOCK, MEM, 0, 0, m);
    give(MK_SHARE, 2, 30, 0, 0, 0, D);
    lock_done("read lock shared");
    give(MK_FWD, MEM, 30, 1, 3, 1);
    expect_tx(MK_WAIT, 3, 0, 0, m);
    op(PR_UNLOCK, 30, 0, 0, rd, err);
    expect_tx(MK_PREV_CHG, 3, 1, 2, m);
    no_tx("nothing before the ack");
    give(MK_ACK, 3, 30);
    expect_tx(MK_NEXT_CHG, 2, 1, 3, m); check(m.rw, "next change tells the writer kind");

    // 4: tail deletion, refused once
    #1 p_valid = 1; p_op = PR_RLOCK; p_addr = 40;
    expect_tx(MK_LOCK, MEM, 0, 0, m);
    give(MK_SHARE, 2, 40, 0, 0, 0, D);
    lock_done("lock granted");
    op(PR_UNLOCK, 40, 0, 0, rd, err);
    expect_tx(MK_UNL_TAIL, MEM, 1, 2, m);
    give(MK_NACK, MEM, 40);
    expect_tx(MK_UNL_TAIL, MEM, 1, 2, m);
    give(MK_ACK, 2, 40);
    check(dut.st == 0, "idle after tail deletion");

    // 5: tail change from memory
    #1 p_valid = 1; p_op = PR_RLOCK; p_addr = 50;
    expect_tx(MK_LOCK, MEM, 0, 0, m);
    give(MK_GRANT, MEM, 50, 0, 0, 0, D);
    lock_done("lock granted");
    give(MK_FWD, MEM, 50, 1, 2, 0);
    expect_tx(MK_SHARE, 2, 0, 0, m);
    give(MK_TAIL_CHG, MEM, 50, 1, 2);
    expect_tx(MK_ACK, 2, 0, 0, m);
    op(PR_UNLOCK, 50, 0, 0, rd, err);
    expect_tx(MK_UNL_TAIL, MEM, 0, 0, m); check(!m.wb, "read lock writes nothing back");
    give(MK_ACK, MEM, 50);
    op(PR_UNLOCK, 50, 0, 0, rd, err); check(err, "unlock without a lock is refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
