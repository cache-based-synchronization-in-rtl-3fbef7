// tb_dcbl_network: checks the message interconnect of the directory system.
// Every endpoint sends random messages to random destinations, each carrying a
// sequence number per source/destination pair, while receivers are randomly
// not ready. Every message must arrive once, at its destination, and messages
// of each pair must arrive in the order sent. A final phase has all sources
// send to one destination, which must take one message per cycle.
module tb_dcbl_network;
  import dcbl_pkg::*;

  localparam int unsigned EP = 5;
  localparam int unsigned QD = 4;

  logic clk = 1'b0, rst_n;
  logic tx_valid [EP], tx_ready [EP], rx_valid [EP], rx_ready [EP];
  msg_t tx_msg [EP], rx_msg [EP];

  dcbl_network #(.EP(EP), .QD(QD)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent_seq [EP][EP];    // next sequence number per (src, dst)
  int recv_seq [EP][EP];
  int sent = 0, recv = 0, busy_cycles = 0;
  bit acc [EP], got [EP];
  int to_one = -1;          // >= 0: every source sends to this endpoint

  task automatic new_msg(input int s);
    int d;
    d = (to_one >= 0) ? to_one : $urandom_range(EP - 1);
    tx_msg[s] = '0;
    tx_msg[s].kind = msg_kind_e'($urandom_range(12));
    tx_msg[s].src = DC_ID_W'(s); tx_msg[s].dst = DC_ID_W'(d);
    tx_msg[s].data = 128'(sent_seq[s][d]);
    tx_msg[s].addr = DC_ADDR_W'($urandom);
  endtask

  task automatic run(input int cycles, input int p_send, input int p_ready);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int e = 0; e < EP; e++) begin
        acc[e] = tx_valid[e] && tx_ready[e];
        got[e] = rx_valid[e] && rx_ready[e];
        if (got[e]) begin
          int s;
          s = rx_msg[e].src;
          check(rx_msg[e].dst == DC_ID_W'(e), "delivered to its destination");
          check(rx_msg[e].data == 128'(recv_seq[s][e]),
                $sformatf("pair %0d->%0d order: got %0d expected %0d", s, e, rx_msg[e].data, recv_seq[s][e]));
          recv_seq[s][e]++;
          recv++;
        end
      end
      @(posedge clk); #1;
      for (int e = 0; e < EP; e++) begin
        if (acc[e]) begin
          sent_seq[e][tx_msg[e].dst]++;
          sent++;
          tx_valid[e] = 0;
        end
        if (!tx_valid[e] && $urandom_range(99) < p_send) begin
          new_msg(e);
          tx_valid[e] = 1;
        end
        rx_ready[e] = ($urandom_range(99) < p_ready);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < EP; s++) begin
      tx_valid[s] = 0; tx_msg[s] = '0; rx_ready[s] = 0;
      for (int d = 0; d < EP; d++) begin sent_seq[s][d] = 0; recv_seq[s][d] = 0; end
    end
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(3000, 60, 70);
    run(200, 0, 100);                       // drain
    check(sent > 1000 && sent == recv, $sformatf("sent %0d received %0d", sent, recv));
    // all to endpoint 2, always ready: one delivery per cycle
    to_one = 2;
    for (int s = 0; s < EP; s++) if (tx_valid[s]) tx_valid[s] = 0;
    begin
      int r0;
      r0 = recv;
      run(400, 100, 100);
      check(recv - r0 >= 390, $sformatf("one destination took %0d messages in 400 cycles", recv - r0));
    end
    to_one = -1;
    run(200, 0, 100);
    check(sent == recv, $sformatf("all delivered: sent %0d received %0d", sent, recv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
