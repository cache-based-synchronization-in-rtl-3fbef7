// dcbl_pkg: message format of the directory-based cache lock (CBL) system.
//
// In the directory version there is no broadcast: lock queues are doubly
// linked lists of cache lines (prev/next pointers in the caches, queue-tail
// in the memory directory) kept consistent by point-to-point messages. The
// message kinds below are the steps of the list operations: adding a node at
// the tail, handing the lock on from the head, and deleting a node at the tail
// or in the middle, with acknowledgements. Field widths allow up to 255 nodes
// plus the memory; they are this design's choice, as are the encodings.
package dcbl_pkg;

  localparam int unsigned DC_ID_W   = 8;     // endpoint id: nodes 0..N-1, memory N
  localparam int unsigned DC_ADDR_W = 10;    // memory block address
  localparam int unsigned DC_LINE_W = 128;   // one block: 4 words of 32 bits

  typedef enum logic [3:0] {
    MK_LOCK      = 4'd0,   // node -> memory: lock request (rw)
    MK_GRANT     = 4'd1,   // memory -> node: lock was free, here is the block
    MK_FWD       = 4'd2,   // memory -> old tail: new requester ptr joins behind you
    MK_SHARE     = 4'd3,   // prev -> node: you share my read lock (with data)
    MK_WAIT      = 4'd4,   // prev -> node: wait behind me
    MK_WAKE      = 4'd5,   // head -> next: I left, you are head (with data)
    MK_UNL_TAIL  = 4'd6,   // tail -> memory: delete me, my prev is ptr (with data if wb)
    MK_TAIL_CHG  = 4'd7,   // memory -> prev: you are the tail now, ack ptr
    MK_PREV_CHG  = 4'd8,   // middle -> next: your prev is now ptr
    MK_NEXT_CHG  = 4'd9,   // middle -> prev: your next is now ptr
    MK_ACK       = 4'd10,  // request honoured
    MK_NACK      = 4'd11,  // request refused: retry
    MK_WB        = 4'd12   // writer -> memory: write the block back
  } msg_kind_e;

  typedef struct packed {
    msg_kind_e              kind;
    logic [DC_ID_W-1:0]     src;
    logic [DC_ID_W-1:0]     dst;
    logic [DC_ADDR_W-1:0]   addr;
    logic                   rw;       // 1: write lock
    logic                   ptr_ok;   // ptr names a node (0: nil)
    logic [DC_ID_W-1:0]     ptr;
    logic                   wb;       // data field carries a block to store
    logic [DC_LINE_W-1:0]   data;
  } msg_t;

endpackage
