// svp_pkg: types and constants shared by the blocks of the microthreaded
// (SVP) core.
//
// The core sizes follow the evaluated configuration: 1024 integer registers,
// 256 thread-table entries, 32 family-table entries, 1 kB 4-way instruction
// and data caches. Cache lines are 64 bytes (16 instruction words, the first
// of which carries the 2-bit annotations of the other 15). The encodings of
// register states, annotations and memory-tag kinds are this design's own.
package svp_pkg;

  // ---- sizes of the evaluated core --------------------------------------
  localparam int unsigned NREGS      = 1024;
  localparam int unsigned NTHREADS   = 256;
  localparam int unsigned NFAMILIES  = 32;
  localparam int unsigned CACHE_BYTES = 1024;
  localparam int unsigned CACHE_WAYS = 4;
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;
  localparam int unsigned NLINES     = CACHE_BYTES / LINE_BYTES;       // 16
  localparam int unsigned NSETS      = NLINES / CACHE_WAYS;            // 4
  localparam int unsigned MAX_BLOCK  = 16;  // register contexts per family

  localparam int unsigned RA_W   = $clog2(NREGS);      // 10
  localparam int unsigned TID_W  = $clog2(NTHREADS);   // 8
  localparam int unsigned FID_W  = $clog2(NFAMILIES);  // 5
  localparam int unsigned LINE_W = $clog2(NLINES);     // 4
  localparam int unsigned SLOT_W = $clog2(MAX_BLOCK);  // 4

  typedef logic [RA_W-1:0]   ra_t;
  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [FID_W-1:0]  fid_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [SLOT_W-1:0] slot_t;
  typedef logic [63:0]       word_t;
  typedef logic [63:0]       addr_t;

  // ---- register state bits ------------------------------------------------
  // EMPTY   : no value, nobody waiting
  // PENDING : a decoupled load will fill it, nobody waiting yet
  // WAITING : one or more threads are suspended on it
  // FULL    : holds a value
  typedef enum logic [1:0] {RS_EMPTY, RS_PENDING, RS_WAITING, RS_FULL} reg_state_e;

  // Contents of a register that is not FULL: the list of suspended threads
  // and the bookkeeping of an outstanding load (next register waiting on the
  // same D-cache line, byte offset inside the line and access size, and the family and
  // context slot of the thread that issued it, so that the load can be
  // counted off when it completes).
  typedef struct packed {
    logic [63-FID_W-SLOT_W-6-1-1-RA_W-2*TID_W:0] pad;
    fid_t       ld_fid;
    slot_t      ld_slot;
    logic [5:0] ld_off;    // byte offset in the line
    logic       ld_long;   // 4-byte load (sign-extended), else 8 bytes
    logic       ld_next_v;
    ra_t        ld_next;
    tid_t       wait_tail;
    tid_t       wait_head;
  } nf_reg_t;

  // Register-file write operations.
  typedef enum logic [1:0] {
    WR_DATA,     // write a value, state FULL, wake suspended threads
    WR_CLEAR,    // make EMPTY (new context, fresh channel)
    WR_SUSPEND,  // add a thread to the register's suspended list
    WR_LOAD      // record an outstanding load (D-cache miss)
  } wr_op_e;

  // ---- instruction annotations (2 bits per instruction) -------------------
  typedef enum logic [1:0] {AN_CONTINUE = 2'd0, AN_SWCH = 2'd1, AN_END = 2'd2, AN_RSVD = 2'd3} annot_e;

  // ---- memory interface ---------------------------------------------------
  // Tag: 2-bit request kind plus an index into the matching structure
  // (I-cache line, D-cache line, or the family whose write it is).
  typedef enum logic [1:0] {TAG_IREAD = 2'd0, TAG_DREAD = 2'd1, TAG_WRITE = 2'd2} tag_kind_e;
  localparam int unsigned TAGIX_W = (LINE_W > FID_W) ? LINE_W : FID_W;
  typedef struct packed {
    tag_kind_e            kind;
    logic [TAGIX_W-1:0]   index;
  } mem_tag_t;

  typedef struct packed {
    mem_tag_t tag;
    addr_t    addr;    // line address for reads, quadword address for writes
    word_t    wdata;   // write data (writes only)
  } mem_req_t;

  typedef struct packed {
    mem_tag_t              tag;
    logic [LINE_BITS-1:0]  data;   // whole line for reads, ignored for write acks
  } mem_rsp_t;

  // ---- thread table entry -------------------------------------------------
  typedef struct packed {
    addr_t pc;
    fid_t  fid;
    slot_t slot;    // register context slot inside the family's block
    logic  first;   // first thread of the family
    logic  last;    // last thread of the family
    line_t cline;   // I-cache line the thread is bound to
  } thread_t;

  // ---- per-family register window information ------------------------------
  typedef struct packed {
    logic [4:0] n_glob;   // number of globals
    logic [4:0] n_shrd;   // number of shareds (= number of dependents)
    logic [4:0] n_locl;   // number of locals
    ra_t        gbase;    // parent's global registers
    ra_t        pshbase;  // parent's shared registers
    ra_t        ctxbase;  // first register of the family's context block
    logic [SLOT_W:0] nblk;  // number of register contexts in the block
  } window_t;

  // ---- event pulses of the core (for observation and statistics) ---------
  typedef struct packed {
    logic issue;       // an instruction completed
    logic sw_swch;     // thread switch on a SWCH annotation
    logic sw_end;      // thread terminated on END
    logic sw_eol;      // thread switch at the end of its cache line
    logic sw_branch;   // thread switch after a branch
    logic suspend;     // thread suspended on a register that is not FULL
    logic wake;        // suspended threads moved to the Ready List
    logic ic_hit;      // I-cache check found the line
    logic ic_miss;     // I-cache check started a line read
    logic ic_join;     // I-cache check joined a line already in flight
    logic ic_fill;     // I-cache line arrived, its threads made active
    logic dc_hit;      // load hit
    logic dc_miss;     // load miss that started a line read
    logic dc_join;     // load miss joining a line already in flight
    logic store;       // store issued
    logic stall;       // pipeline held for a cycle (port busy, no line free)
    logic create;      // a thread was created
    logic freed;       // a thread context was released
    logic rd_hold;     // a context release waits for an outstanding read
    logic sync;        // a family completed
  } core_ev_t;

endpackage
