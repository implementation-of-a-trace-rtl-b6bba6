// etrace_pkg: types and constants shared by the E-trace branch-trace encoder.
//
// Holds the hart-to-encoder interface record (the subset of E-trace signals the
// encoder consumes: itype, cause, tval, priv, iaddr, iretire, ilastsize), the
// itype encoding of the E-trace standard, the control settings that the
// control-register block hands to the packaging logic, and the packet size
// limits. The 64-bit address width follows the 64-bit NOEL-V target; the field
// widths of cause, priv and iretire are this design's choice.
package etrace_pkg;

  // Architecture and interface widths
  parameter int XLEN      = 64;           // instruction address width (RV64)
  parameter int ADDR_W    = XLEN - 1;     // address field width: bit 0 is never sent
  parameter int ITYPE_W   = 4;            // itype width (16 codes)
  parameter int CAUSE_W   = 6;            // exception/interrupt cause field
  parameter int PRIV_W    = 3;            // privilege encoding (U, S/HS, M, D, VU, VS)
  parameter int IRETIRE_W = 3;            // halfwords retired per block (dual issue: up to 4)

  // Packet sizes
  parameter int PKT_MAX_BYTES = 31;                  // largest payload, fits the 5-bit length
  parameter int PKT_W         = PKT_MAX_BYTES * 8;   // raw payload width before compression
  parameter int OUT_MAX_BYTES = PKT_MAX_BYTES + 1;   // header byte + payload
  parameter int OUT_W         = OUT_MAX_BYTES * 8;
  parameter int LEN_W         = 6;                   // holds 0..32 bytes

  // Branch map capacity of a format 1 packet
  parameter int BMAP_W = 31;

  // Instruction block termination types (E-trace itype, 4-bit variant)
  typedef enum logic [ITYPE_W-1:0] {
    IT_NONE      = 4'd0,   // none of the named kinds
    IT_EXC       = 4'd1,   // exception after the last retired instruction
    IT_INT       = 4'd2,   // interrupt after the last retired instruction
    IT_ERET      = 4'd3,   // exception or interrupt return
    IT_NTBRANCH  = 4'd4,   // not-taken branch
    IT_TBRANCH   = 4'd5,   // taken branch
    IT_RSVD6     = 4'd6,
    IT_RSVD7     = 4'd7,
    IT_UCALL     = 4'd8,   // uninferable call
    IT_ICALL     = 4'd9,   // inferable call
    IT_UJUMP     = 4'd10,  // uninferable jump
    IT_IJUMP     = 4'd11,  // inferable jump
    IT_COSWAP    = 4'd12,  // co-routine swap
    IT_RETURN    = 4'd13,  // return
    IT_OUJUMP    = 4'd14,  // other uninferable jump
    IT_OIJUMP    = 4'd15   // other inferable jump
  } itype_e;

  // One retirement block from the hart-to-encoder interface
  typedef struct packed {
    itype_e               itype;
    logic [CAUSE_W-1:0]   cause;
    logic [XLEN-1:0]      tval;
    logic [PRIV_W-1:0]    priv;
    logic [XLEN-1:0]      iaddr;
    logic [IRETIRE_W-1:0] iretire;
    logic                 ilastsize;   // last instruction is 2^ilastsize halfwords
  } hart_if_t;

  // Settings from the control registers used by the packaging logic
  typedef enum logic [1:0] {
    SYNC_OFF     = 2'd0,
    SYNC_PACKETS = 2'd1,   // count emitted packets
    SYNC_CYCLES  = 2'd2,   // count hart clock cycles
    SYNC_HWORDS  = 2'd3    // count instruction halfwords (not implemented: acts as off)
  } syncmode_e;

  typedef struct packed {
    logic       tracing;     // active & enable & inst_tracing
    logic       full_addr;   // trTeInstNoAddrDiff: full address mode
    syncmode_e  syncmode;
    logic [3:0] syncmax;     // resync interval = 2^(syncmax+4)
  } te_cfg_t;

  // Packet format / subformat codes
  parameter logic [1:0] FMT_BRANCH  = 2'd1;
  parameter logic [1:0] FMT_ADDR    = 2'd2;
  parameter logic [1:0] FMT_SYNC    = 2'd3;
  parameter logic [1:0] SF_START    = 2'd0;
  parameter logic [1:0] SF_TRAP     = 2'd1;
  parameter logic [1:0] SF_SUPPORT  = 2'd3;

  function automatic logic is_exc(itype_e t);
    return (t == IT_EXC) || (t == IT_INT);
  endfunction

  function automatic logic is_branch(itype_e t);
    return (t == IT_NTBRANCH) || (t == IT_TBRANCH);
  endfunction

  // Uninferable discontinuities: the target must be reported
  function automatic logic is_updiscon(itype_e t);
    return (t == IT_ERET) || (t == IT_UCALL) || (t == IT_UJUMP) ||
           (t == IT_COSWAP) || (t == IT_RETURN) || (t == IT_OUJUMP);
  endfunction

  // Branch map field width for a given branch count (count 0 = full map)
  function automatic int unsigned bmap_width(int unsigned n);
    if (n == 0)       return 31;
    else if (n == 1)  return 1;
    else if (n <= 3)  return 3;
    else if (n <= 7)  return 7;
    else if (n <= 15) return 15;
    else              return 31;
  endfunction

endpackage
