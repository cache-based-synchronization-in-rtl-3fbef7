// cbl_pkg: types shared by the snoopy cache-based lock (CBL) system.
//
// A lock is a cache line. Every node keeps, per lock line, a directory entry of
// three fields (state, next-node, count) next to the line's tag and data. The
// thirteen line states and the bus commands/responses follow the protocol's
// naming: R/W give the lock type, T marks the tail of the waiting queue, V a
// waiting line and O ownership. The numeric encodings, the processor request
// codes and the explicit write-back command are choices of this design.
package cbl_pkg;

  // Line states of the lock cache (13 states).
  typedef enum logic [3:0] {
    ST_INVALID = 4'd0,   // line invalid
    ST_WO      = 4'd1,   // write-lock owner
    ST_WOT     = 4'd2,   // write-lock owner at the tail
    ST_WOV     = 4'd3,   // waiting for a write lock
    ST_WOVT    = 4'd4,   // waiting for a write lock, at the tail
    ST_R       = 4'd5,   // read-lock holder (peer-group member)
    ST_RV      = 4'd6,   // waiting for a read lock (peer-group member)
    ST_RO      = 4'd7,   // read-lock owner (peer-group leader)
    ST_ROT     = 4'd8,   // read-lock owner at the tail
    ST_ROV     = 4'd9,   // waiting for read-lock ownership (leader)
    ST_ROVT    = 4'd10,  // waiting leader at the tail
    ST_O       = 4'd11,  // unlocked, still owner
    ST_OT      = 4'd12   // unlocked owner at the tail
  } line_state_e;

  // Commands placed on the bus by the granted node.
  typedef enum logic [2:0] {
    BC_NONE    = 3'd0,
    BC_RLOCK   = 3'd1,   // read-lock request
    BC_WLOCK   = 3'd2,   // write-lock request
    BC_RUNLOCK = 3'd3,   // read-unlock of a peer-group member, to its leader
    BC_WAKE    = 3'd4,   // lock handed to the leader named by target
    BC_WB      = 3'd5    // write-back of a released write lock with no waiter
  } bus_cmd_e;

  // Snoop responses to a lock request. hit(M) is the memory's response.
  typedef enum logic [2:0] {
    BR_NONE  = 3'd0,
    BR_HIT   = 3'd1,     // line supplied by the read-lock owner: join its peer group
    BR_HITM  = 3'd2,     // line supplied by main memory: lock was free
    BR_WAIT  = 3'd3,     // wait behind a waiting read leader (join its peer group)
    BR_WAITT = 3'd4      // wait, and take over the tail of the queue
  } bus_resp_e;

  // Processor requests to its lock cache.
  typedef enum logic [2:0] {
    PR_NONE   = 3'd0,
    PR_RLOCK  = 3'd1,
    PR_WLOCK  = 3'd2,
    PR_UNLOCK = 3'd3,
    PR_READ   = 3'd4,    // read one word of a line this node holds locked
    PR_WRITE  = 3'd5     // write one word of a line this node holds write-locked
  } proc_op_e;

  function automatic logic is_waiting(line_state_e s);
    return s inside {ST_WOV, ST_WOVT, ST_RV, ST_ROV, ST_ROVT};
  endfunction

  function automatic logic is_tail(line_state_e s);
    return s inside {ST_WOT, ST_WOVT, ST_ROT, ST_ROVT, ST_OT};
  endfunction

  function automatic logic holds_read(line_state_e s);
    return s inside {ST_R, ST_RO, ST_ROT, ST_WO, ST_WOT};
  endfunction

  function automatic logic holds_write(line_state_e s);
    return s inside {ST_WO, ST_WOT};
  endfunction

endpackage
