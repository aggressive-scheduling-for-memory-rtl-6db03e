// lsu_pkg: types, constants and helper functions shared by the preload
// load/store unit.
//
// The unit handles x86-style loads and stores of 1, 2 or 4 bytes at any byte
// address in a 32-bit linear address space (the dependency comparators are
// 32 bits wide). Micro-operations are identified by a reorder-buffer tag.
// Data of a load is returned zero-extended in the low bytes of a 32-bit word,
// little-endian; store data is taken from the low bytes of its operand.
// The tag width (6 bits, a 64-entry reorder buffer) is this design's choice.
package lsu_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned TAG_W  = 6;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [TAG_W-1:0]  tag_t;

  // access size: 1, 2 or 4 bytes
  typedef enum logic [1:0] {
    SZ_BYTE  = 2'd0,
    SZ_WORD  = 2'd1,
    SZ_DWORD = 2'd2
  } size_e;

  // a source operand as held in the reservation station
  typedef struct packed {
    logic  rdy;   // value present
    tag_t  tag;   // producer tag while not ready
    data_t val;
  } operand_t;

  // a load/store micro-operation as dispatched in order (R-stage)
  typedef struct packed {
    logic       is_store;
    tag_t       tag;
    size_e      size;
    operand_t   base;
    operand_t   index;
    logic [1:0] scale;   // index is shifted left by scale (x1, x2, x4, x8)
    addr_t      disp;
    addr_t      seg;     // segment base of the selected segment
    operand_t   sdata;   // store data (marked ready for loads)
  } mop_t;

  // one slot of the result bus
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    data_t data;
  } rb_slot_t;

  // life of a UMAB entry
  typedef enum logic [2:0] {
    U_WAIT_ADDR    = 3'd0,  // registered, linear address not yet generated (unsolved)
    U_ADDR_RDY     = 3'd1,  // address known, waiting to be issued to the data cache
    U_ISSUED       = 3'd2,  // load in the data cache (I-stage)
    U_LOADED       = 3'd3,  // load data back from the cache, awaiting check (B-stage)
    U_WAIT_REISSUE = 3'd4,  // load partially overlaps an older store: wait for older stores
    U_DONE         = 3'd5   // load result delivered on the result bus
  } ustate_e;

  typedef struct packed {
    logic    valid;
    logic    is_store;
    tag_t    tag;
    size_e   size;
    ustate_e st;
    addr_t   addr;
    data_t   data;    // store data, or load data read from the cache
    logic    permit;  // store: retirement permission received from the reorder buffer
    logic    stale;   // load: an overlapping older store wrote the cache after this load read it
  } umab_entry_t;

  // outcome of the B-stage dependency check of one load
  typedef enum logic [2:0] {
    DC_NONE    = 3'd0,  // no conflict: cache data is the result
    DC_FORWARD = 3'd1,  // youngest overlapping older store covers the whole load: forward its data
    DC_PARTIAL = 3'd2,  // overlap that forwarding cannot satisfy: re-issue after older stores
    DC_WAIT    = 3'd3,  // an older store address is still unsolved: check later
    DC_STALE   = 3'd4   // cache data is stale: re-issue now
  } dc_outcome_e;

  // per-cycle event counts (performance monitoring)
  typedef struct packed {
    logic [3:0] preload;        // loads issued to the cache while an older store was unsolved
    logic [3:0] forward;        // results taken from a store by forwarding
    logic [3:0] reissue_partial;// loads sent to wait for re-issue (partial overlap)
    logic [3:0] reissue_stale;  // loads re-issued because their data went stale
    logic [3:0] rb_stall;       // resolved results refused by the result bus
    logic [3:0] rs_issue;       // micro-operations issued from the reservation station
    logic       disp_stall;     // dispatch held off because RS or UMAB was full
  } perf_t;

  function automatic logic [2:0] nbytes(size_e s);
    case (s)
      SZ_BYTE: nbytes = 3'd1;
      SZ_WORD: nbytes = 3'd2;
      default: nbytes = 3'd4;
    endcase
  endfunction

  // byte ranges [a, a+na) and [b, b+nb) share at least one byte
  function automatic logic overlaps(addr_t a, size_e sa, addr_t b, size_e sb);
    logic [ADDR_W:0] ae, be;
    ae = {1'b0, a} + {{ADDR_W-2{1'b0}}, nbytes(sa)};
    be = {1'b0, b} + {{ADDR_W-2{1'b0}}, nbytes(sb)};
    overlaps = ({1'b0, a} < be) && ({1'b0, b} < ae);
  endfunction

  // store range [s, s+ns) holds every byte of load range [l, l+nl)
  function automatic logic covers(addr_t s, size_e ss, addr_t l, size_e sl);
    logic [ADDR_W:0] se, le;
    se = {1'b0, s} + {{ADDR_W-2{1'b0}}, nbytes(ss)};
    le = {1'b0, l} + {{ADDR_W-2{1'b0}}, nbytes(sl)};
    covers = (s <= l) && (le <= se);
  endfunction

  // bytes of a covering store seen by a load: shift by the byte offset, keep the
  // load size. Only the low two address bits are needed (s_lo, l_lo): a covering
  // store starts at most 3 bytes below the load.
  function automatic data_t fwd_extract(logic [1:0] s_lo, data_t sdata, logic [1:0] l_lo, size_e sl);
    logic [1:0] off;
    data_t sh;
    off = l_lo - s_lo;
    sh  = sdata >> {off, 3'b000};
    case (sl)
      SZ_BYTE: fwd_extract = {24'd0, sh[7:0]};
      SZ_WORD: fwd_extract = {16'd0, sh[15:0]};
      default: fwd_extract = sh;
    endcase
  endfunction

  // keep the low bytes of a value according to the access size
  function automatic data_t size_mask(data_t d, size_e s);
    case (s)
      SZ_BYTE: size_mask = {24'd0, d[7:0]};
      SZ_WORD: size_mask = {16'd0, d[15:0]};
      default: size_mask = d;
    endcase
  endfunction

endpackage
