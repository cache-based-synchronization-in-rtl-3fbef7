// dcbl_directory: memory and central directory of the directory-based cache
// lock system.
//
// For every memory block the directory keeps the queue-tail pointer: the last
// node that asked for the block's lock, or nil when the block is unlocked.
// A lock request on an unlocked block makes the requester the tail and sends
// it the block (GRANT). Otherwise the request is forwarded to the current tail
// (FWD, naming the requester) and the requester becomes the tail. A tail's
// unlock (UNL_TAIL, naming its prev) is accepted only if the sender is still
// the tail; the tail then moves to prev, which is told (TAIL_CHG) and
// acknowledges the leaving node, or, with no prev, the block becomes unlocked
// and the leaving node gets the ACK directly. A refused unlock gets NACK. Write
// locks return the block with their release (UNL_TAIL with data, or WB).
//
// This follows the protocol's memory side; the single message port (one
// message handled per cycle, replies through a one-entry output register),
// zero initial contents and the missing memory access latency are choices of
// this design.
module dcbl_directory
  import dcbl_pkg::*;
#(
  parameter int unsigned NODES = 128
) (
  input  logic clk,
  input  logic rst_n,
  output logic tx_valid,
  input  logic tx_ready,
  output msg_t tx_msg,
  input  logic rx_valid,
  output logic rx_ready,
  input  msg_t rx_msg
);

  localparam logic [DC_ID_W-1:0] MEM_ID = DC_ID_W'(NODES);
  localparam int unsigned BLOCKS = 2**DC_ADDR_W;

  logic [DC_LINE_W-1:0] mem      [BLOCKS];
  logic                 tail_ok  [BLOCKS];
  logic [DC_ID_W-1:0]   tail     [BLOCKS];

  initial for (int i = 0; i < BLOCKS; i++) mem[i] = '0;

  logic tx_pend;
  msg_t txm;
  assign tx_valid = tx_pend;
  assign tx_msg   = txm;
  assign rx_ready = !tx_pend || tx_ready;

  logic unused_rx;                      // the network routed the message here already
  assign unused_rx = ^rx_msg.dst;

  function automatic msg_t mk(msg_kind_e k, logic [DC_ID_W-1:0] dst, logic [DC_ADDR_W-1:0] a);
    msg_t m;
    m = '0;
    m.kind = k; m.src = MEM_ID; m.dst = dst; m.addr = a;
    return m;
  endfunction

  logic [DC_ADDR_W-1:0] a;
  assign a = rx_msg.addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_pend <= 1'b0;
      txm     <= '0;
      for (int i = 0; i < BLOCKS; i++) begin
        tail_ok[i] <= 1'b0;
        tail[i]    <= '0;
      end
    end else begin
      if (tx_pend && tx_ready) tx_pend <= 1'b0;
      if (rx_valid && rx_ready) begin
        unique case (rx_msg.kind)
          MK_LOCK: begin
            tx_pend    <= 1'b1;
            tail_ok[a] <= 1'b1;
            tail[a]    <= rx_msg.src;
            if (!tail_ok[a]) begin
              txm      <= mk(MK_GRANT, rx_msg.src, a);
              txm.data <= mem[a];
            end else begin
              txm        <= mk(MK_FWD, tail[a], a);
              txm.ptr_ok <= 1'b1;
              txm.ptr    <= rx_msg.src;
              txm.rw     <= rx_msg.rw;
            end
          end
          MK_UNL_TAIL: begin
            tx_pend <= 1'b1;
            if (tail_ok[a] && tail[a] == rx_msg.src) begin
              if (rx_msg.wb) mem[a] <= rx_msg.data;
              if (rx_msg.ptr_ok) begin
                tail[a]    <= rx_msg.ptr;
                txm        <= mk(MK_TAIL_CHG, rx_msg.ptr, a);
                txm.ptr_ok <= 1'b1;
                txm.ptr    <= rx_msg.src;
              end else begin
                tail_ok[a] <= 1'b0;
                txm        <= mk(MK_ACK, rx_msg.src, a);
              end
            end else begin
              txm <= mk(MK_NACK, rx_msg.src, a);
            end
          end
          MK_WB: if (rx_msg.wb) mem[a] <= rx_msg.data;
          default: ;
        endcase
      end
    end
  end

endmodule
