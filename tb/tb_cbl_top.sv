// tb_cbl_top: end-to-end test of both lock systems at full size (16 nodes on
// the bus, 128 on the network), running at the same time.
//
// Every node of each system repeatedly takes a random read or write lock on
// one of a few shared blocks. Under a write lock it increments word 0; under a
// read lock it checks word 0 against a reference model. Mutual exclusion is
// checked at every grant, and at the end each block's counter must equal the
// number of write locks taken on it. Every mechanism is counted and must have
// occurred: on the bus, the hit, hit(M), wait and wait(T) answers to lock
// requests, wake, read-unlock and write-back; on the network, each message
// kind of the directory protocol.
module tb_cbl_top;
  import cbl_pkg::*;
  import dcbl_pkg::*;

  localparam int unsigned SN = 16, DN = 128, W = 32, NL = 3;
  localparam int unsigned S_ROUNDS = 60, D_ROUNDS = 12;

  logic clk = 1'b0, rst_n;
  logic s_p_valid [SN], s_p_done [SN], s_p_err [SN];
  proc_op_e s_p_op [SN];
  logic [9:0] s_p_addr [SN];
  logic [1:0] s_p_word [SN];
  logic [W-1:0] s_p_wdata [SN], s_p_rdata [SN];
  logic s_bus_valid, s_bus_mem_done;
  bus_cmd_e s_bus_cmd;
  logic [3:0] s_bus_src, s_bus_target;
  logic [9:0] s_bus_addr;
  bus_resp_e s_bus_resp;
  logic d_p_valid [DN], d_p_done [DN], d_p_err [DN];
  proc_op_e d_p_op [DN];
  logic [DC_ADDR_W-1:0] d_p_addr [DN];
  logic [1:0] d_p_word [DN];
  logic [W-1:0] d_p_wdata [DN], d_p_rdata [DN];

  cbl_top dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------- mechanism counters
  int n_bus [string];
  int n_msg [16];
  always @(negedge clk) if (rst_n) begin
    if (s_bus_valid) begin
      // no answer to a lock request: the memory supplies the block, hit(M)
      if (s_bus_cmd inside {BC_RLOCK, BC_WLOCK})
        n_bus[s_bus_resp == BR_NONE ? "HIT_M" : s_bus_resp.name()]++;
      else n_bus[s_bus_cmd.name()]++;
    end
    for (int e = 0; e <= DN; e++)
      if (dut.u_directory.rx_valid[e] && dut.u_directory.rx_ready[e])
        n_msg[dut.u_directory.rx_msg[e].kind]++;
  end

  // ---------------------------------------------------------- processor ops
  // sys 0: snoopy, sys 1: directory
  task automatic op(input bit sys, input int n, input proc_op_e o, input int a, input int w,
                    input logic [W-1:0] wd, output logic [W-1:0] rd, output logic err);
    #1;
    if (!sys) begin
      s_p_valid[n] = 1; s_p_op[n] = o; s_p_addr[n] = 10'(a); s_p_word[n] = 2'(w); s_p_wdata[n] = wd;
      do @(negedge clk); while (!s_p_done[n]);
      rd = s_p_rdata[n]; err = s_p_err[n];
      @(posedge clk); #1 s_p_valid[n] = 0; s_p_op[n] = PR_NONE;
    end else begin
      d_p_valid[n] = 1; d_p_op[n] = o; d_p_addr[n] = DC_ADDR_W'(a); d_p_word[n] = 2'(w); d_p_wdata[n] = wd;
      do @(negedge clk); while (!d_p_done[n]);
      rd = d_p_rdata[n]; err = d_p_err[n];
      @(posedge clk); #1 d_p_valid[n] = 0; d_p_op[n] = PR_NONE;
    end
  endtask

  // ---------------------------------------------------------- reference model
  int holders_r [2][NL], wr_count [2][NL];
  bit holder_w [2][NL];
  logic [W-1:0] ref_val [2][NL];

  task automatic worker(input bit sys, input int n, input int rounds);
    logic [W-1:0] rd;
    logic err;
    for (int r = 0; r < rounds; r++) begin
      int l;
      bit wr;
      l  = $urandom_range(NL - 1);
      wr = ($urandom_range(99) < 30);
      repeat ($urandom_range(6)) @(posedge clk);
      op(sys, n, wr ? PR_WLOCK : PR_RLOCK, 40 + l, 0, '0, rd, err);
      check(!err, $sformatf("sys %0d node %0d lock error", sys, n));
      if (wr) begin
        check(holders_r[sys][l] == 0 && !holder_w[sys][l], $sformatf("sys %0d node %0d write lock not exclusive", sys, n));
        holder_w[sys][l] = 1;
      end else begin
        check(!holder_w[sys][l], $sformatf("sys %0d node %0d read lock while written", sys, n));
        holders_r[sys][l]++;
      end
      op(sys, n, PR_READ, 40 + l, 0, '0, rd, err);
      check(!err && rd == ref_val[sys][l], $sformatf("sys %0d node %0d block %0d word0 %0d expected %0d",
                                                     sys, n, l, rd, ref_val[sys][l]));
      if (wr) begin
        op(sys, n, PR_WRITE, 40 + l, 0, rd + 1, rd, err);
        check(!err, "write under write lock");
        ref_val[sys][l]++;
        wr_count[sys][l]++;
      end
      repeat ($urandom_range(8)) @(posedge clk);
      if (wr) holder_w[sys][l] = 0; else holders_r[sys][l]--;
      op(sys, n, PR_UNLOCK, 40 + l, 0, '0, rd, err);
      check(!err, $sformatf("sys %0d node %0d unlock error", sys, n));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] rd;
    logic err;
    for (int k = 0; k < 16; k++) n_msg[k] = 0;
    for (int n = 0; n < SN; n++) begin
      s_p_valid[n] = 0; s_p_op[n] = PR_NONE; s_p_addr[n] = '0; s_p_word[n] = '0; s_p_wdata[n] = '0;
    end
    for (int n = 0; n < DN; n++) begin
      d_p_valid[n] = 0; d_p_op[n] = PR_NONE; d_p_addr[n] = '0; d_p_word[n] = '0; d_p_wdata[n] = '0;
    end
    for (int s = 0; s < 2; s++)
      for (int l = 0; l < NL; l++) begin
        holders_r[s][l] = 0; holder_w[s][l] = 0; wr_count[s][l] = 0; ref_val[s][l] = '0;
      end
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    // two readers, the later one (the tail) leaves first: the directory moves
    // the tail back to the earlier one
    op(1, 1, PR_RLOCK, 60, 0, '0, rd, err);
    op(1, 2, PR_RLOCK, 60, 0, '0, rd, err);
    op(1, 2, PR_UNLOCK, 60, 0, '0, rd, err);
    repeat (20) @(posedge clk);
    check(dut.u_directory.u_dir.tail[60] == 1, "tail moved back to node 1");
    op(1, 1, PR_UNLOCK, 60, 0, '0, rd, err);

    for (int n = 0; n < SN; n++) fork automatic int nn = n; worker(0, nn, S_ROUNDS); join_none
    for (int n = 0; n < DN; n++) fork automatic int nn = n; worker(1, nn, D_ROUNDS); join_none
    wait fork;
    repeat (50) @(posedge clk);
    for (int s = 0; s < 2; s++)
      for (int l = 0; l < NL; l++) begin
        op(s[0], 0, PR_RLOCK, 40 + l, 0, '0, rd, err);
        op(s[0], 0, PR_READ, 40 + l, 0, '0, rd, err);
        check(rd == W'(wr_count[s][l]), $sformatf("sys %0d block %0d counter %0d expected %0d", s, l, rd, wr_count[s][l]));
        op(s[0], 0, PR_UNLOCK, 40 + l, 0, '0, rd, err);
      end

    foreach (n_bus[k]) $display("bus %s: %0d", k, n_bus[k]);
    foreach (n_msg[k]) if (k <= 12) $display("net %s: %0d", msg_kind_e'(k), n_msg[k]);
    check(n_bus.exists("BR_HIT") && n_bus.exists("HIT_M") && n_bus.exists("BR_WAIT") &&
          n_bus.exists("BR_WAITT") && n_bus.exists("BC_WAKE") && n_bus.exists("BC_RUNLOCK") &&
          n_bus.exists("BC_WB"), "every bus mechanism occurred");
    for (int k = 0; k <= 12; k++)
      check(n_msg[k] > 0, $sformatf("message kind %s never used", msg_kind_e'(k)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
