// dcbl_network: message interconnect of the directory-based cache lock system.
//
// Endpoints 0..EP-1 (the nodes, then the memory) hand messages to the network
// (tx_valid/tx_ready) and receive them (rx_valid/rx_ready). Each source has a
// FIFO of QD messages; every cycle each destination that is ready receives the
// head message of one source FIFO addressed to it, chosen round robin. Because
// every source FIFO is served in order, messages between any source and
// destination arrive in the order they were sent, which is the only property
// the lock protocol needs from the network.
//
// The protocol assumes no particular network; the evaluation used a packet
// switched Omega network of 2x2 crossbars, which is not modelled here. This
// FIFO-per-source crossbar with round-robin delivery is this design's choice.
module dcbl_network
  import dcbl_pkg::*;
#(
  parameter int unsigned EP = 129,
  parameter int unsigned QD = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tx_valid [EP],
  output logic tx_ready [EP],
  input  msg_t tx_msg   [EP],
  output logic rx_valid [EP],
  input  logic rx_ready [EP],
  output msg_t rx_msg   [EP]
);

  localparam int unsigned PW = (QD > 1) ? $clog2(QD) : 1;

  msg_t            q     [EP][QD];
  logic [PW-1:0]   rdp   [EP];
  logic [PW-1:0]   wrp   [EP];
  logic [PW:0]     cnt   [EP];
  logic [DC_ID_W-1:0] prio [EP];     // per destination: first source to look at

  logic            pop   [EP];
  logic [DC_ID_W-1:0] from [EP];
  msg_t            head  [EP];
  logic            has   [EP];

  always_comb begin
    for (int s = 0; s < EP; s++) begin
      head[s]     = q[s][rdp[s]];
      has[s]      = (cnt[s] != '0);
      tx_ready[s] = (cnt[s] != (PW+1)'(QD));
    end
  end

  // per destination: pick one source whose head message is addressed to it
  always_comb begin
    for (int s = 0; s < EP; s++) pop[s] = 1'b0;
    for (int d = 0; d < EP; d++) begin
      rx_valid[d] = 1'b0;
      rx_msg[d]   = '0;
      from[d]     = '0;
      for (int k = 0; k < EP; k++) begin
        logic [DC_ID_W-1:0] s;
        s = DC_ID_W'((int'(prio[d]) + k) % EP);
        if (!rx_valid[d] && has[s] && head[s].dst == DC_ID_W'(d)) begin
          rx_valid[d] = 1'b1;
          rx_msg[d]   = head[s];
          from[d]     = s;
        end
      end
      if (rx_valid[d] && rx_ready[d]) pop[from[d]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < EP; s++) begin
        rdp[s] <= '0; wrp[s] <= '0; cnt[s] <= '0; prio[s] <= '0;
      end
    end else begin
      for (int s = 0; s < EP; s++) begin
        logic push;
        push = tx_valid[s] && tx_ready[s];
        if (push) begin
          q[s][wrp[s]] <= tx_msg[s];
          wrp[s] <= (wrp[s] == PW'(QD - 1)) ? '0 : wrp[s] + 1'b1;
        end
        if (pop[s]) rdp[s] <= (rdp[s] == PW'(QD - 1)) ? '0 : rdp[s] + 1'b1;
        cnt[s] <= cnt[s] + (PW+1)'(push) - (PW+1)'(pop[s]);
      end
      for (int d = 0; d < EP; d++)
        if (rx_valid[d] && rx_ready[d])
          prio[d] <= (from[d] == DC_ID_W'(EP - 1)) ? '0 : from[d] + 1'b1;
    end
  end

endmodule
