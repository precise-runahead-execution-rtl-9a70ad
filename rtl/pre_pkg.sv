// pre_pkg: types and sizes shared by the precise-runahead (PRE) blocks.
//
// The sizes follow the baseline core the design targets: a 4-wide core with a
// 192-entry ROB, 168 integer and 168 floating-point physical registers, a
// 64-entry register allocation table, a 256-entry stalling slice table, a
// 192-entry register deallocation queue and a 768-entry micro-op queue.
// The micro-op format is this design's own: the source gives no instruction
// set, so a micro-op carries only what renaming and slice tracking need
// (PC, up to two source registers, one destination register, a load flag)
// plus an opaque operation field for the back end.
package pre_pkg;

  localparam int PC_W        = 32;   // 4-byte instruction addresses (SST tags)
  localparam int W           = 4;    // rename/dispatch width
  localparam int NUM_AREGS   = 64;   // RAT entries: 0..31 integer, 32..63 fp
  localparam int AREG_W      = $clog2(NUM_AREGS);
  localparam int NUM_PREGS   = 168;  // physical registers per class
  localparam int PIDX_W      = $clog2(NUM_PREGS);
  localparam int PTAG_W      = PIDX_W + 1;  // {class, index}
  localparam int ARCH_PER_CLASS = NUM_AREGS / 2;
  localparam int SST_ENTRIES = 256;
  localparam int SST_WR      = 2;
  localparam int PRDQ_DEPTH  = 192;
  localparam int EMQ_DEPTH   = 768;
  localparam int RA_ID_W     = 8;    // runahead instruction id (> PRDQ_DEPTH values)
  localparam int OP_W        = 8;

  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [AREG_W-1:0]  areg_t;
  typedef logic [PTAG_W-1:0]  ptag_t;
  typedef logic [RA_ID_W-1:0] ra_id_t;

  // Decoded micro-op as delivered by the decoder.
  typedef struct packed {
    pc_t            pc;
    logic [OP_W-1:0] op;
    logic           is_load;
    logic [1:0]     src_valid;
    areg_t          src1;
    areg_t          src0;
    logic           dst_valid;
    areg_t          dst;
  } uop_t;

  // Entry of the extended micro-op queue: the micro-op and its SST lookup result.
  typedef struct packed {
    uop_t uop;
    logic in_slice;
  } emq_entry_t;

  // Renamed micro-op handed to dispatch.
  typedef struct packed {
    uop_t   uop;
    logic   in_slice;
    ptag_t  psrc1;
    ptag_t  psrc0;
    ptag_t  pdst;
    ptag_t  old_pdst;
    logic   runahead;   // executed speculatively, never enters the ROB
    ra_id_t ra_id;      // identifies it to the PRDQ when it finishes
  } ren_uop_t;

  // Class of an architectural register: 0 integer, 1 floating point.
  function automatic logic areg_class(areg_t r);
    return r[AREG_W-1];
  endfunction

endpackage
