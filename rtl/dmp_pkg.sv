// dmp_pkg: types and constants shared by the deterministic multiprocessing
// memory system.
//
// The system runs in three phases (parallel, commit, serial). Each CPU's
// loads and stores go through an arbitrator into a private CAM buffer whose
// slots carry a three-bit tag: Exclusive/Shared, Read, Written. Arbitrators
// snoop each other over a shared-address bus (address, start, read/write) and
// answer with a two-bit code. The tag fields, the phase names and the
// A/B/C snoop answers follow the design description; the numeric encodings
// and the default widths are this implementation's choices.
package dmp_pkg;

  // Default sizes (see the README for where each comes from).
  localparam int unsigned NCPU_DEF  = 3;   // CPU0..CPU2 of the block diagram
  localparam int unsigned ADDR_W    = 16;  // main memory address width (bytes)
  localparam int unsigned DATA_W    = 8;   // 8-bit data path of a PicoBlaze-class core
  localparam int unsigned CNT_W_DEF = 16;  // instruction counter width

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Slot tag: E(1)/S(0), Read, Written.
  typedef struct packed {
    logic excl;
    logic rd;
    logic wr;
  } tag_t;

  typedef enum logic [1:0] {
    PH_PARALLEL = 2'd0,
    PH_COMMIT   = 2'd1,
    PH_SERIAL   = 2'd2
  } phase_e;

  // Answer of a friend arbitrator to a snoop (two bits per friend).
  typedef enum logic [1:0] {
    SN_INVALID = 2'b00,  // no snoop in progress
    SN_MISS    = 2'b01,  // A: address not held
    SN_OK      = 2'b10,  // B: held, the operation may continue
    SN_DEFER   = 2'b11   // C: held, the operation must wait for the commit
  } snoop_rsp_e;

  // Snoop bus driven by one arbitrator (N+2 bits: address, start, read/write).
  // In the commit phase a start on this bus announces a committed address.
  typedef struct packed {
    logic  start;
    logic  we;
    addr_t addr;
  } snoop_req_t;

  // Request from an arbitrator to the memory controller.
  typedef struct packed {
    logic  valid;
    logic  we;
    addr_t addr;
    data_t wdata;
  } mem_req_t;

  // Reply from the memory controller: done pulses once per accepted request.
  typedef struct packed {
    logic  done;
    data_t rdata;
  } mem_rsp_t;

  // One-cycle event pulses of an arbitrator, brought out for observation
  // and performance counting.
  typedef struct packed {
    logic local_hit;   // access served from the local CAM buffer
    logic fetch;       // miss with no holder: slot taken Exclusive
    logic shared;      // miss held by a friend that answered B: slot taken Shared
    logic conflict;    // communication detected: CPU halted until the commit
    logic overflow;    // CAM buffer full: CPU halted until the commit
    logic collide;     // waited a cycle for a same-address snoop
    logic commit_wr;   // one written slot flushed to main memory
    logic erased;      // own slot erased by a friend's commit notice
    logic bypass;      // serial-phase access straight to main memory
  } arb_ev_t;

  // Tag helper functions: the "valid tags" columns of the read/write tables.
  // Local hit on read: E/?/? or S/R/0.
  function automatic logic local_read_ok(tag_t t);
    return t.excl || (t.rd && !t.wr);
  endfunction
  // Local hit on write: E/?/? or S/0/W.
  function automatic logic local_write_ok(tag_t t);
    return t.excl || (!t.rd && t.wr);
  endfunction
  // Friend hit on read: E/R/0 or S/R/0.
  function automatic logic friend_read_ok(tag_t t);
    return t.rd && !t.wr;
  endfunction
  // Friend hit on write: E/0/W or S/0/W.
  function automatic logic friend_write_ok(tag_t t);
    return !t.rd && t.wr;
  endfunction

endpackage
