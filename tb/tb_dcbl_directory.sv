// tb_dcbl_directory: checks the memory directory of the directory system.
// Messages are driven directly and every reply is checked: the first lock on a
// block is granted with the block's contents, later ones are forwarded to the
// current tail; a tail unlock from a node that is not the tail is refused; a
// tail unlock with a prev moves the tail back and tells prev; a tail unlock
// without a prev frees the block; write-backs are stored. Replies are held
// while the receiver is not ready. Random block contents are checked against a
// reference model.
module tb_dcbl_directory;
  import dcbl_pkg::*;

  localparam int unsigned NODES = 6;
  localparam logic [DC_ID_W-1:0] MEM = 6;

  logic clk = 1'b0, rst_n;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  msg_t tx_msg, rx_msg;

  dcbl_directory #(.NODES(NODES)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input msg_kind_e k, input int src, input int a, input logic rw = 0,
                      input logic ptr_ok = 0, input int ptr = 0, input logic wb = 0,
                      input logic [127:0] d = '0);
    if (!clk) @(posedge clk);
    #1 rx_valid = 1;
    rx_msg = '0; rx_msg.kind = k; rx_msg.src = DC_ID_W'(src); rx_msg.dst = MEM;
    rx_msg.addr = DC_ADDR_W'(a); rx_msg.rw = rw; rx_msg.ptr_ok = ptr_ok;
    rx_msg.ptr = DC_ID_W'(ptr); rx_msg.wb = wb; rx_msg.data = d;
    do @(negedge clk); while (!rx_ready);
    @(posedge clk); #1 rx_valid = 0;
  endtask

  // the directory must reply with this message, after `stall` cycles of not-ready
  task automatic reply(input msg_kind_e k, input int dst, input int a, input logic ptr_ok,
                       input int ptr, input int stall, output msg_t m);
    int n = 0;
    while (!tx_valid && n < 10) begin @(negedge clk); n++; end
    repeat (stall) @(negedge clk);          // reply must be held while not accepted
    m = tx_msg;
    check(tx_valid && m.kind == k && m.dst == DC_ID_W'(dst) && m.src == MEM &&
          m.addr == DC_ADDR_W'(a) && m.ptr_ok == ptr_ok && (!ptr_ok || m.ptr == DC_ID_W'(ptr)),
          $sformatf("expected %s to %0d, got %s to %0d ptr %0d (valid %0d)",
                    k.name(), dst, m.kind.name(), m.dst, m.ptr, tx_valid));
    #1 tx_ready = 1;
    @(posedge clk); #1 tx_ready = 0;
    @(negedge clk);
    check(!tx_valid, "one reply per request");
  endtask

  logic [127:0] model [16];
  msg_t m;

  initial begin
    tx_ready = 0; rx_valid = 0; rx_msg = '0;
    for (int i = 0; i < 16; i++) model[i] = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // queue on block 3: 0 (R), 1 (W), 2 (R)
    send(MK_LOCK, 0, 3);            reply(MK_GRANT, 0, 3, 0, 0, 0, m);
    check(m.data == '0, "initial block is zero");
    send(MK_LOCK, 1, 3, 1);         reply(MK_FWD, 0, 3, 1, 1, 2, m);
    check(m.rw, "forward names a write request");
    send(MK_LOCK, 2, 3);            reply(MK_FWD, 1, 3, 1, 2, 0, m);
    check(!m.rw, "forward names a read request");
    // 1 is not the tail: refused
    send(MK_UNL_TAIL, 1, 3, 0, 1, 0); reply(MK_NACK, 1, 3, 0, 0, 1, m);
    // 2 leaves the tail: tail back to 1, which is told
    send(MK_UNL_TAIL, 2, 3, 0, 1, 1); reply(MK_TAIL_CHG, 1, 3, 1, 2, 0, m);
    check(dut.tail[3] == 1, "tail moved to node 1");
    // writer 1 leaves as tail with prev 0, writing back
    send(MK_UNL_TAIL, 1, 3, 0, 1, 0, 1, 128'h55); reply(MK_TAIL_CHG, 0, 3, 1, 1, 0, m);
    model[3] = 128'h55;
    // 0 leaves alone: block free
    send(MK_UNL_TAIL, 0, 3, 0, 0, 0); reply(MK_ACK, 0, 3, 0, 0, 3, m);
    check(!dut.tail_ok[3], "block 3 unlocked");
    send(MK_LOCK, 4, 3);            reply(MK_GRANT, 4, 3, 0, 0, 0, m);
    check(m.data == 128'h55, "write-back seen by the next grant");
    send(MK_UNL_TAIL, 4, 3, 0, 0, 0); reply(MK_ACK, 4, 3, 0, 0, 0, m);

    // random write-backs and grants
    for (int k = 0; k < 40; k++) begin
      int a, src;
      logic [127:0] d;
      a = $urandom_range(15); src = $urandom_range(NODES - 1);
      d = {$urandom, $urandom, $urandom, $urandom};
      send(MK_LOCK, src, a, 1);     reply(MK_GRANT, src, a, 0, 0, $urandom_range(2), m);
      check(m.data == model[a], $sformatf("block %0d contents", a));
      if ($urandom_range(1)) begin
        send(MK_WB, src, a, 0, 0, 0, 1, d);
        model[a] = d;
        send(MK_UNL_TAIL, src, a);  reply(MK_ACK, src, a, 0, 0, 0, m);
      end else begin
        send(MK_UNL_TAIL, src, a, 0, 0, 0, 1, d); reply(MK_ACK, src, a, 0, 0, 0, m);
        model[a] = d;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
