// dcbl_node: one node's lock line for the directory-based cache lock system.
//
// The node's processor asks for a read lock, a write lock or an unlock of a
// memory block and may read and write words of the block while it holds the
// lock. Waiting nodes form a doubly linked list through their cache lines
// (prev/next pointers); the memory directory keeps only the queue tail. All
// coordination is by point-to-point messages (dcbl_pkg), which the network
// delivers in order between any pair of endpoints.
//
// Lock: the request goes to memory. A free block comes back with GRANT. Else
// memory forwards the request to the old tail, which links the requester as
// its next and answers SHARE (both read locks: share it, with the data) or
// WAIT. A node granted a read lock passes SHARE on to a reader that queued
// behind it meanwhile, so a lock release runs down the list until a writer.
// Unlock, by position in the list:
//  * head (no prev): WAKE to next, which drops its prev and takes the lock if
//    it was waiting (a writer first writes the block back to memory);
//  * middle: PREV_CHG to next, then on its ACK, NEXT_CHG to prev;
//  * tail: UNL_TAIL to memory, which checks the node is still the tail,
//    moves the tail to prev and tells prev (TAIL_CHG), which ACKs the node.
// While unlocking the node is "transient" and refuses (NACK) WAKE and PREV_CHG
// from its prev; a refused or overtaken unlock is retried from the pointers
// then current. NEXT_CHG and TAIL_CHG are always honoured.
//
// This follows the list algorithms of the protocol. Choices of this design:
// one lock line per node; the message set and encodings; a sender check (a
// WAKE or PREV_CHG is honoured only from the current prev), which keeps a
// stale retry from reaching a node that has left and rejoined the list; a
// node that is still a read holder while unlocking shares with a new reader.
//
// Interface and timing: processor handshake as in the snoopy version (p_valid
// held until p_done; unlock, read and write finish in the presenting cycle
// when no message is being handled; unlock is refused while a previous unlock
// is still in progress). Network: at most one message received (rx_valid, only
// when rx_ready) and one sent (tx_valid until tx_ready) per cycle.
module dcbl_node
  import dcbl_pkg::*;
  import cbl_pkg::proc_op_e;
  import cbl_pkg::PR_RLOCK;
  import cbl_pkg::PR_WLOCK;
  import cbl_pkg::PR_UNLOCK;
  import cbl_pkg::PR_READ;
  import cbl_pkg::PR_WRITE;
#(
  parameter int unsigned NODES   = 128,
  parameter int unsigned NODE_ID = 0,
  parameter int unsigned WORD_W  = 32,
  localparam int unsigned WORDS  = DC_LINE_W / WORD_W,
  localparam int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // processor
  input  logic                 p_valid,
  input  proc_op_e             p_op,
  input  logic [DC_ADDR_W-1:0] p_addr,
  input  logic [WSEL_W-1:0]    p_word,
  input  logic [WORD_W-1:0]    p_wdata,
  output logic                 p_done,
  output logic                 p_err,
  output logic [WORD_W-1:0]    p_rdata,
  // network
  output logic                 tx_valid,
  input  logic                 tx_ready,
  output msg_t                 tx_msg,
  input  logic                 rx_valid,
  output logic                 rx_ready,
  input  msg_t                 rx_msg
);

  localparam logic [DC_ID_W-1:0] MY_ID  = DC_ID_W'(NODE_ID);
  localparam logic [DC_ID_W-1:0] MEM_ID = DC_ID_W'(NODES);

  typedef enum logic [2:0] {
    N_IDLE, N_REQ, N_WAIT, N_HELD, N_UL_HEAD, N_UL_MID, N_UL_TAIL
  } node_state_e;

  node_state_e          st, st_n;
  logic                 rw, rw_n;              // my lock is a write lock
  logic [DC_ADDR_W-1:0] tag, tag_n;
  logic                 prev_ok, prev_ok_n, next_ok, next_ok_n;
  logic [DC_ID_W-1:0]   prev, prev_n, next, next_n;
  logic                 next_rw, next_rw_n;    // next's request is a write lock
  logic                 next_wt, next_wt_n;    // next was told to wait
  logic                 wake_after_wb, wake_after_wb_n;
  logic [DC_LINE_W-1:0] data, data_n;
  logic                 tx_pend, tx_pend_n;
  msg_t                 txm, txm_n;
  logic                 granted;               // a lock grant happened this cycle
  logic                 lock_busy, lock_busy_n; // a processor lock request is in progress

  assign tx_valid = tx_pend;
  assign tx_msg   = txm;
  assign rx_ready = !tx_pend;
  assign p_rdata  = data[p_word * WORD_W +: WORD_W];

  // fields a node does not need: the network routed the message here already,
  // and a node holds one block at a time
  logic unused_rx;
  assign unused_rx = ^{rx_msg.dst, rx_msg.addr, rx_msg.wb};

  function automatic msg_t mk(msg_kind_e k, logic [DC_ID_W-1:0] dst, logic [DC_ADDR_W-1:0] a);
    msg_t m;
    m = '0;
    m.kind = k; m.src = MY_ID; m.dst = dst; m.addr = a;
    return m;
  endfunction

  // first message of an unlock, chosen from the current list position
  node_state_e ul_st;
  msg_t        ul_msg;
  logic        ul_wab;    // writer at the head: write back, then wake
  always_comb begin
    ul_wab = 1'b0;
    if (next_ok && !prev_ok) begin
      ul_st = N_UL_HEAD;
      if (rw) begin
        ul_msg = mk(MK_WB, MEM_ID, tag);
        ul_msg.wb = 1'b1; ul_msg.data = data;
        ul_wab = 1'b1;
      end else begin
        ul_msg = mk(MK_WAKE, next, tag);
        ul_msg.data = data;
      end
    end else if (next_ok) begin
      ul_st  = N_UL_MID;
      ul_msg = mk(MK_PREV_CHG, next, tag);
      ul_msg.ptr_ok = 1'b1; ul_msg.ptr = prev;
    end else begin
      ul_st  = N_UL_TAIL;
      ul_msg = mk(MK_UNL_TAIL, MEM_ID, tag);
      ul_msg.ptr_ok = prev_ok; ul_msg.ptr = prev;
      ul_msg.wb = rw; ul_msg.data = data;
    end
  end

  always_comb begin
    st_n = st; rw_n = rw; tag_n = tag;
    prev_ok_n = prev_ok; prev_n = prev; next_ok_n = next_ok; next_n = next;
    next_rw_n = next_rw; next_wt_n = next_wt; wake_after_wb_n = wake_after_wb;
    data_n = data; tx_pend_n = tx_pend; txm_n = txm;
    p_done = 1'b0; p_err = 1'b0;
    granted = 1'b0;

    if (tx_pend && tx_ready) tx_pend_n = 1'b0;

    if (rx_valid && rx_ready) begin
      // ---------------------------------------------- message handling
      unique case (rx_msg.kind)
        MK_GRANT: if (st == N_REQ) begin
          st_n = N_HELD; prev_ok_n = 1'b0; data_n = rx_msg.data; granted = 1'b1;
        end
        MK_SHARE: if (st == N_REQ || (st == N_WAIT && !rw)) begin
          st_n = N_HELD; data_n = rx_msg.data; granted = 1'b1;
          if (st == N_REQ) begin prev_ok_n = 1'b1; prev_n = rx_msg.src; end
        end
        MK_WAIT: if (st == N_REQ) begin
          st_n = N_WAIT; prev_ok_n = 1'b1; prev_n = rx_msg.src;
        end
        MK_FWD: begin
          next_ok_n = 1'b1; next_n = rx_msg.ptr; next_rw_n = rx_msg.rw;
          tx_pend_n = 1'b1;
          if (!rw && !rx_msg.rw && st inside {N_HELD, N_UL_HEAD, N_UL_MID, N_UL_TAIL}) begin
            txm_n = mk(MK_SHARE, rx_msg.ptr, tag);
            txm_n.data = data;
            next_wt_n = 1'b0;
          end else begin
            txm_n = mk(MK_WAIT, rx_msg.ptr, tag);
            next_wt_n = 1'b1;
          end
        end
        MK_WAKE: begin
          tx_pend_n = 1'b1;
          if (prev_ok && rx_msg.src == prev && (st == N_WAIT || st == N_HELD)) begin
            prev_ok_n = 1'b0;
            if (st == N_WAIT) begin st_n = N_HELD; data_n = rx_msg.data; granted = 1'b1; end
            txm_n = mk(MK_ACK, rx_msg.src, tag);
          end else begin
            txm_n = mk(MK_NACK, rx_msg.src, tag);
          end
        end
        MK_PREV_CHG: begin
          tx_pend_n = 1'b1;
          if (prev_ok && rx_msg.src == prev && (st == N_WAIT || st == N_HELD)) begin
            prev_ok_n = rx_msg.ptr_ok; prev_n = rx_msg.ptr;
            txm_n = mk(MK_ACK, rx_msg.src, tag);
          end else begin
            txm_n = mk(MK_NACK, rx_msg.src, tag);
          end
        end
        MK_NEXT_CHG: begin
          next_ok_n = rx_msg.ptr_ok; next_n = rx_msg.ptr; next_rw_n = rx_msg.rw;
          next_wt_n = 1'b0;
        end
        MK_TAIL_CHG: begin
          next_ok_n = 1'b0; next_wt_n = 1'b0;
          tx_pend_n = 1'b1;
          txm_n = mk(MK_ACK, rx_msg.ptr, tag);
        end
        MK_ACK: unique case (st)
          N_UL_HEAD, N_UL_TAIL: begin
            st_n = N_IDLE; prev_ok_n = 1'b0; next_ok_n = 1'b0;
          end
          N_UL_MID: begin
            st_n = N_IDLE;
            tx_pend_n = 1'b1;
            txm_n = mk(MK_NEXT_CHG, prev, tag);
            txm_n.ptr_ok = 1'b1; txm_n.ptr = next; txm_n.rw = next_rw;
            prev_ok_n = 1'b0; next_ok_n = 1'b0;
          end
          default: ;
        endcase
        MK_NACK: if (st inside {N_UL_HEAD, N_UL_MID, N_UL_TAIL}) begin st_n = ul_st; txm_n = ul_msg; tx_pend_n = 1'b1; wake_after_wb_n = ul_wab; end
        default: ;
      endcase
      // a reader that gets the lock passes it on to a reader queued behind it
      if (granted && !rw && next_ok_n && next_wt_n && !next_rw_n && !tx_pend_n) begin
        tx_pend_n  = 1'b1;
        txm_n      = mk(MK_SHARE, next_n, tag);
        txm_n.data = data_n;
        next_wt_n  = 1'b0;
      end
    end else if (!tx_pend || tx_ready) begin
      // ---------------------------------------------- own actions
      if (wake_after_wb && st == N_UL_HEAD) begin
        wake_after_wb_n = 1'b0;
        tx_pend_n  = 1'b1;
        txm_n      = mk(MK_WAKE, next, tag);
        txm_n.data = data;
      end else if (st == N_HELD && !rw && next_ok && next_wt && !next_rw) begin
        // grant arrived while the reply to a queued reader was still going out
        next_wt_n  = 1'b0;
        tx_pend_n  = 1'b1;
        txm_n      = mk(MK_SHARE, next, tag);
        txm_n.data = data;
      end else if (p_valid) begin
        unique case (p_op)
          PR_RLOCK, PR_WLOCK: if (st == N_IDLE) begin
            st_n = N_REQ; rw_n = (p_op == PR_WLOCK); tag_n = p_addr;
            prev_ok_n = 1'b0; next_ok_n = 1'b0; next_wt_n = 1'b0;
            tx_pend_n = 1'b1;
            txm_n = mk(MK_LOCK, MEM_ID, p_addr);
            txm_n.rw = (p_op == PR_WLOCK);
          end else if (st == N_HELD && tag == p_addr) begin
            p_done = 1'b1; p_err = 1'b1;
          end
          PR_UNLOCK: if (st == N_HELD && tag == p_addr) begin
            p_done = 1'b1;
            begin st_n = ul_st; txm_n = ul_msg; tx_pend_n = 1'b1; wake_after_wb_n = ul_wab; end
          end else if (!(st inside {N_UL_HEAD, N_UL_MID, N_UL_TAIL})) begin
            p_done = 1'b1; p_err = 1'b1;
          end
          PR_READ: begin
            p_done = 1'b1;
            p_err  = !(st == N_HELD && tag == p_addr);
          end
          PR_WRITE: begin
            p_done = 1'b1;
            if (st == N_HELD && rw && tag == p_addr)
              data_n[p_word * WORD_W +: WORD_W] = p_wdata;
            else
              p_err = 1'b1;
          end
          default: ;
        endcase
      end
    end

    // lock requests finish once held (the cycle after the grant)
    if (p_valid && (p_op == PR_RLOCK || p_op == PR_WLOCK) && st == N_HELD && tag == p_addr &&
        rw == (p_op == PR_WLOCK) && lock_busy) begin
      p_done = 1'b1;
      p_err  = 1'b0;
    end
  end

  always_comb begin
    lock_busy_n = lock_busy;
    if (st == N_IDLE && st_n == N_REQ) lock_busy_n = 1'b1;
    if (p_done) lock_busy_n = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= N_IDLE; rw <= 1'b0; tag <= '0;
      prev_ok <= 1'b0; prev <= '0; next_ok <= 1'b0; next <= '0;
      next_rw <= 1'b0; next_wt <= 1'b0; wake_after_wb <= 1'b0;
      data <= '0; tx_pend <= 1'b0; txm <= '0; lock_busy <= 1'b0;
    end else begin
      st <= st_n; rw <= rw_n; tag <= tag_n;
      prev_ok <= prev_ok_n; prev <= prev_n; next_ok <= next_ok_n; next <= next_n;
      next_rw <= next_rw_n; next_wt <= next_wt_n; wake_after_wb <= wake_after_wb_n;
      data <= data_n; tx_pend <= tx_pend_n; txm <= txm_n; lock_busy <= lock_busy_n;
    end
  end

endmodule
