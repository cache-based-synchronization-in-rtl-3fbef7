// cbl_lock_cache: one node's cache controller for snoopy cache-based locks.
//
// The processor of a node asks its cache for a read lock (shared), a write lock
// (exclusive) or an unlock on a line address, and may read and write words of
// a line it holds. Acquiring a lock also brings the line's data, so
// synchronisation and data transfer happen in one bus transaction. Nodes that
// cannot get a lock are queued in first-come first-served order by a queue
// that lives in the caches themselves: every lock line has a directory entry
// with a state (13 states, see cbl_pkg), a next-node field and a count.
//
// Queue rules (as in the protocol): the cache at the end of the queue (a "T"
// state) answers every new request for the line. Consecutive readers form a
// peer group; its first member (leader) is owner and/or tail and keeps the
// group size in count, the other members point to the leader with next-node.
// A leader's next-node names the leader of the next group. Responses:
//   hit     - the tail is a read owner whose group holds the lock: join it
//   wait    - the tail is a waiting read leader: join its waiting group
//   wait(T) - the tail hands its tail role to the requester (new group)
//   none    - no cache answers, memory supplies the line (hit(M)): lock free
// A member's unlock is broadcast as read-unlock to its leader, which counts
// down. When the count reaches zero, or a writer unlocks, the owner sends wake
// with the line to the next leader; waiting members of that leader's group take
// the lock in the same cycle by matching next-node. A writer's release also
// writes the line back to memory.
//
// Choices of this design (the protocol leaves them open): the lock cache is a
// small fully associative array of ENTRIES lines; an unlocked owner at the tail
// with a zero count (OT) keeps the line, may re-take its own lock locally, and
// drops the line silently when another node asks, because memory then holds
// the latest data; a processor lock request on a line in O or OT with readers
// left waits until they leave; a write unlock whose owner is still the tail
// writes the line back with a separate write-back command.
//
// Interface and timing:
//  * Processor: p_valid/p_op/p_addr/p_word/p_wdata held until p_done (one
//    cycle). Unlock, read and write finish in the cycle they are presented
//    (unless a bus transaction on the same address is being snooped that
//    cycle). A lock finishes the cycle after the lock is held. p_err marks an
//    access to a line not held, or a lock on a line already held.
//  * Bus master: b_req until b_gnt; the command (m_*) is broadcast in the grant
//    cycle and the snoop answer (r_in_*) comes back in that cycle. With no
//    cache answer to a lock request, the line arrives with mem_done.
//  * Snooper: s_* is the broadcast; r_kind/r_data answer combinationally.
module cbl_lock_cache
  import cbl_pkg::*;
#(
  parameter int unsigned NODES   = 16,
  parameter int unsigned NODE_ID = 0,
  parameter int unsigned ADDR_W  = 10,
  parameter int unsigned WORDS   = 4,
  parameter int unsigned WORD_W  = 32,
  parameter int unsigned ENTRIES = 4,
  localparam int unsigned ID_W   = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int unsigned CNT_W  = $clog2(NODES + 1),
  localparam int unsigned LINE_W = WORDS * WORD_W,
  localparam int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              p_valid,
  input  proc_op_e          p_op,
  input  logic [ADDR_W-1:0] p_addr,
  input  logic [WSEL_W-1:0] p_word,
  input  logic [WORD_W-1:0] p_wdata,
  output logic              p_done,
  output logic              p_err,
  output logic [WORD_W-1:0] p_rdata,
  // bus master side
  output logic              b_req,
  input  logic              b_gnt,
  output bus_cmd_e          m_cmd,
  output logic [ADDR_W-1:0] m_addr,
  output logic [ID_W-1:0]   m_target,
  output logic              m_wb,
  output logic [LINE_W-1:0] m_data,
  input  bus_resp_e         r_in_kind,
  input  logic [ID_W-1:0]   r_in_id,
  input  logic [LINE_W-1:0] r_in_data,
  input  logic              mem_done,
  input  logic [LINE_W-1:0] mem_data,
  // snooped broadcast
  input  logic              s_valid,
  input  bus_cmd_e          s_cmd,
  input  logic [ID_W-1:0]   s_src,
  input  logic [ADDR_W-1:0] s_addr,
  input  logic [ID_W-1:0]   s_target,
  input  logic [LINE_W-1:0] s_data,
  // snoop answer
  output bus_resp_e         r_kind,
  output logic [LINE_W-1:0] r_data
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam logic [ID_W-1:0] MY_ID = ID_W'(NODE_ID);

  typedef enum logic [1:0] {B_IDLE, B_REL, B_LOCK, B_MEM} bus_fsm_e;

  // lock cache: tag, directory entry (state, next-node, count), release flag, data
  line_state_e       st     [ENTRIES];
  logic [ADDR_W-1:0] tag    [ENTRIES];
  logic [ID_W-1:0]   nxt    [ENTRIES];
  logic [CNT_W-1:0]  cnt    [ENTRIES];
  logic              pend   [ENTRIES];
  logic [LINE_W-1:0] data   [ENTRIES];

  line_state_e       st_n   [ENTRIES];
  logic [ADDR_W-1:0] tag_n  [ENTRIES];
  logic [ID_W-1:0]   nxt_n  [ENTRIES];
  logic [CNT_W-1:0]  cnt_n  [ENTRIES];
  logic              pend_n [ENTRIES];
  logic [LINE_W-1:0] data_n [ENTRIES];

  bus_fsm_e         bstate, bstate_n;
  logic             busy_lock, busy_lock_n;
  logic             lock_wr, lock_wr_n;      // pending lock is a write lock
  logic [IDX_W-1:0] lock_idx, lock_idx_n;
  logic [IDX_W-1:0] rel_idx, rel_idx_n;

  // ---------------------------------------------------------------- lookups
  logic             m_hit, free_ok, vict_ok, any_pend;
  logic [IDX_W-1:0] m_idx, free_idx, vict_idx, pend_idx;

  always_comb begin
    m_hit = 1'b0; m_idx = '0;
    free_ok = 1'b0; free_idx = '0;
    vict_ok = 1'b0; vict_idx = '0;
    any_pend = 1'b0; pend_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (st[i] != ST_INVALID && tag[i] == p_addr) begin
        m_hit = 1'b1; m_idx = IDX_W'(i);
      end
      if (st[i] == ST_INVALID) begin
        free_ok = 1'b1; free_idx = IDX_W'(i);
      end
      if (st[i] == ST_OT && cnt[i] == '0 && !pend[i]) begin
        vict_ok = 1'b1; vict_idx = IDX_W'(i);
      end
      if (pend[i]) begin
        any_pend = 1'b1; pend_idx = IDX_W'(i);
      end
    end
  end

  // a snooped transaction on the processor's address blocks processor updates
  logic snoop_other, p_conflict;
  assign snoop_other = s_valid && (s_src != MY_ID);
  assign p_conflict  = snoop_other && (s_addr == p_addr);

  // ---------------------------------------------------------- bus command
  always_comb begin
    b_req    = 1'b0;
    m_cmd    = BC_NONE;
    m_addr   = '0;
    m_target = '0;
    m_wb     = 1'b0;
    m_data   = '0;
    unique case (bstate)
      B_REL: begin
        b_req    = 1'b1;
        m_addr   = tag[rel_idx];
        m_target = nxt[rel_idx];
        m_data   = data[rel_idx];
        unique case (st[rel_idx])
          ST_R:    m_cmd = BC_RUNLOCK;          // to the group leader
          ST_O:    m_cmd = BC_WAKE;             // read group done: wake next
          ST_WO:   begin m_cmd = BC_WAKE; m_wb = 1'b1; end
          ST_WOT:  begin m_cmd = BC_WB;   m_wb = 1'b1; end
          default: m_cmd = BC_NONE;
        endcase
      end
      B_LOCK: begin
        b_req  = 1'b1;
        m_cmd  = lock_wr ? BC_WLOCK : BC_RLOCK;
        m_addr = tag[lock_idx];
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------- snoop answer
  always_comb begin
    r_kind = BR_NONE;
    r_data = '0;
    if (snoop_other && (s_cmd == BC_RLOCK || s_cmd == BC_WLOCK)) begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (st[i] != ST_INVALID && tag[i] == s_addr) begin
          r_data = data[i];
          unique case (st[i])
            ST_ROT:  r_kind = (s_cmd == BC_RLOCK) ? BR_HIT : BR_WAITT;
            ST_OT:   if (cnt[i] != '0) r_kind = (s_cmd == BC_RLOCK) ? BR_HIT : BR_WAITT;
            ST_ROVT: r_kind = (s_cmd == BC_RLOCK) ? BR_WAIT : BR_WAITT;
            ST_WOT, ST_WOVT: r_kind = BR_WAITT;
            default: ;
          endcase
        end
      end
    end
  end

  // ---------------------------------------------------------- next state
  always_comb begin
    st_n = st; tag_n = tag; nxt_n = nxt; cnt_n = cnt; pend_n = pend; data_n = data;
    bstate_n    = bstate;
    busy_lock_n = busy_lock;
    lock_wr_n   = lock_wr;
    lock_idx_n  = lock_idx;
    rel_idx_n   = rel_idx;
    p_done      = 1'b0;
    p_err       = 1'b0;
    p_rdata     = data[m_idx][p_word * WORD_W +: WORD_W];

    // -- own bus transactions
    unique case (bstate)
      B_IDLE: begin
        if (any_pend) begin
          bstate_n  = B_REL;
          rel_idx_n = pend_idx;
        end else if (busy_lock && st[lock_idx] == ST_INVALID) begin
          bstate_n = B_LOCK;
        end
      end
      B_REL: if (b_gnt) begin
        st_n[rel_idx]   = ST_INVALID;
        pend_n[rel_idx] = 1'b0;
        bstate_n        = B_IDLE;
      end
      B_LOCK: if (b_gnt) begin
        bstate_n = B_IDLE;
        unique case (r_in_kind)
          BR_HIT: begin                        // join the owner's peer group
            st_n[lock_idx]   = ST_R;
            nxt_n[lock_idx]  = r_in_id;
            data_n[lock_idx] = r_in_data;
          end
          BR_WAIT: begin                       // join a waiting peer group
            st_n[lock_idx]  = ST_RV;
            nxt_n[lock_idx] = r_in_id;
          end
          BR_WAITT: begin                      // become the waiting tail
            st_n[lock_idx] = lock_wr ? ST_WOVT : ST_ROVT;
            cnt_n[lock_idx] = CNT_W'(1);
          end
          default: begin                       // nobody answered: memory supplies
            st_n[lock_idx]  = lock_wr ? ST_WOT : ST_ROT;
            cnt_n[lock_idx] = CNT_W'(1);
            bstate_n        = B_MEM;
          end
        endcase
      end
      B_MEM: if (mem_done) begin
        data_n[lock_idx] = mem_data;
        bstate_n         = B_IDLE;
      end
      default: bstate_n = B_IDLE;
    endcase

    // -- processor requests
    if (busy_lock) begin
      if (bstate == B_IDLE && st[lock_idx] != ST_INVALID && !is_waiting(st[lock_idx])) begin
        p_done    = 1'b1;
        busy_lock_n = 1'b0;
      end
    end else if (p_valid && !p_conflict) begin
      unique case (p_op)
        PR_RLOCK, PR_WLOCK: begin
          if (m_hit) begin
            if (holds_read(st[m_idx]) && !pend[m_idx]) begin
              p_done = 1'b1;                   // already held by this node
              p_err  = 1'b1;
            end else if (st[m_idx] == ST_OT && cnt[m_idx] == '0 && !pend[m_idx]) begin
              // idle owner at the tail takes its own lock again
              p_done         = 1'b1;
              st_n[m_idx]    = (p_op == PR_WLOCK) ? ST_WOT : ST_ROT;
              cnt_n[m_idx]   = CNT_W'(1);
            end
            // otherwise wait until the line leaves this cache or goes idle
          end else if (free_ok || vict_ok) begin
            busy_lock_n = 1'b1;
            lock_wr_n   = (p_op == PR_WLOCK);
            lock_idx_n  = free_ok ? free_idx : vict_idx;
            st_n[lock_idx_n]  = ST_INVALID;
            tag_n[lock_idx_n] = p_addr;
          end
        end
        PR_UNLOCK: begin
          p_done = 1'b1;
          if (m_hit && !pend[m_idx]) begin
            unique case (st[m_idx])
              ST_R:  pend_n[m_idx] = 1'b1;
              ST_RO: begin
                st_n[m_idx]  = ST_O;
                cnt_n[m_idx] = cnt[m_idx] - 1'b1;
                if (cnt[m_idx] == CNT_W'(1)) pend_n[m_idx] = 1'b1;
              end
              ST_ROT: begin
                st_n[m_idx]  = ST_OT;
                cnt_n[m_idx] = cnt[m_idx] - 1'b1;
              end
              ST_WO, ST_WOT: pend_n[m_idx] = 1'b1;
              default: p_err = 1'b1;
            endcase
          end else begin
            p_err = 1'b1;
          end
        end
        PR_READ: begin
          p_done = 1'b1;
          p_err  = !(m_hit && holds_read(st[m_idx]) && !pend[m_idx]);
        end
        PR_WRITE: begin
          p_done = 1'b1;
          if (m_hit && holds_write(st[m_idx]) && !pend[m_idx])
            data_n[m_idx][p_word * WORD_W +: WORD_W] = p_wdata;
          else
            p_err = 1'b1;
        end
        default: ;
      endcase
    end

    // -- snooping (entries matching the snooped address)
    if (snoop_other) begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (st[i] != ST_INVALID && tag[i] == s_addr) begin
          unique case (s_cmd)
            BC_RLOCK: unique case (st[i])
              ST_ROT, ST_ROVT: cnt_n[i] = cnt[i] + 1'b1;
              ST_OT: if (cnt[i] != '0) cnt_n[i] = cnt[i] + 1'b1;
                     else st_n[i] = ST_INVALID;
              ST_WOT:  begin st_n[i] = ST_WO;  nxt_n[i] = s_src; end
              ST_WOVT: begin st_n[i] = ST_WOV; nxt_n[i] = s_src; end
              default: ;
            endcase
            BC_WLOCK: unique case (st[i])
              ST_ROT:  begin st_n[i] = ST_RO;  nxt_n[i] = s_src; end
              ST_ROVT: begin st_n[i] = ST_ROV; nxt_n[i] = s_src; end
              ST_OT: if (cnt[i] != '0) begin st_n[i] = ST_O; nxt_n[i] = s_src; end
                     else st_n[i] = ST_INVALID;
              ST_WOT:  begin st_n[i] = ST_WO;  nxt_n[i] = s_src; end
              ST_WOVT: begin st_n[i] = ST_WOV; nxt_n[i] = s_src; end
              default: ;
            endcase
            BC_RUNLOCK: if (s_target == MY_ID &&
                            st[i] inside {ST_RO, ST_ROT, ST_O, ST_OT}) begin
              cnt_n[i] = cnt[i] - 1'b1;
              if (st[i] == ST_O && cnt[i] == CNT_W'(1)) pend_n[i] = 1'b1;
            end
            BC_WAKE: begin
              if (s_target == MY_ID) begin
                unique case (st[i])
                  ST_WOV:  begin st_n[i] = ST_WO;  data_n[i] = s_data; end
                  ST_WOVT: begin st_n[i] = ST_WOT; data_n[i] = s_data; end
                  ST_ROV:  begin st_n[i] = ST_RO;  data_n[i] = s_data; end
                  ST_ROVT: begin st_n[i] = ST_ROT; data_n[i] = s_data; end
                  default: ;
                endcase
              end else if (st[i] == ST_RV && nxt[i] == s_target) begin
                st_n[i]   = ST_R;
                data_n[i] = s_data;
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        st[i]   <= ST_INVALID;
        tag[i]  <= '0;
        nxt[i]  <= '0;
        cnt[i]  <= '0;
        pend[i] <= 1'b0;
        data[i] <= '0;
      end
      bstate    <= B_IDLE;
      busy_lock <= 1'b0;
      lock_wr   <= 1'b0;
      lock_idx  <= '0;
      rel_idx   <= '0;
    end else begin
      st   <= st_n;
      tag  <= tag_n;
      nxt  <= nxt_n;
      cnt  <= cnt_n;
      pend <= pend_n;
      data <= data_n;
      bstate    <= bstate_n;
      busy_lock <= busy_lock_n;
      lock_wr   <= lock_wr_n;
      lock_idx  <= lock_idx_n;
      rel_idx   <= rel_idx_n;
    end
  end

  // a node never answers its own request; a write request never joins a group
  a_no_self_hit: assert property (@(posedge clk) disable iff (!rst_n)
    (bstate == B_LOCK && b_gnt) |-> (r_in_kind == BR_NONE || r_in_id != MY_ID));
  a_write_never_shares: assert property (@(posedge clk) disable iff (!rst_n)
    (bstate == B_LOCK && b_gnt && lock_wr) |-> (r_in_kind != BR_HIT && r_in_kind != BR_WAIT));

endmodule
