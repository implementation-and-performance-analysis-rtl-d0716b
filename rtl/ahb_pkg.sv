// ahb_pkg: types and constants shared by the slave-side (SS) arbitrated
// AHB bus matrix.
//
// The 32-bit AHB address of every master carries, besides the offset inside
// the slave, the target slave number, the priority level the master asks for
// and the transfer length it wants to keep the slave for:
//
//   [31:29] S_Number   target slave
//   [28:26] P_Level    priority level (larger value = higher priority)
//   [25:22] T_Length   desired transfer length minus one (1..16 transfers)
//   [21:0]  Offset_Add byte offset inside the slave
//
// The field layout follows the address map of the arbitration scheme; the
// meaning "larger level wins" and the "minus one" coding of T_Length are
// choices of this design.  HTRANS, HBURST and HRESP use the AMBA 2 AHB
// encodings.
package ahb_pkg;

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned SNUM_W   = 3;
  localparam int unsigned PLEVEL_W = 3;
  localparam int unsigned TLEN_W   = 4;
  localparam int unsigned OFFSET_W = 22;
  // counter width: holds transfer lengths 1..16
  localparam int unsigned CNT_W    = 5;

  typedef struct packed {
    logic [SNUM_W-1:0]   s_number;
    logic [PLEVEL_W-1:0] p_level;
    logic [TLEN_W-1:0]   t_length;
    logic [OFFSET_W-1:0] offset;
  } ss_addr_t;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Address phase of one AHB transfer, as driven by a master.
  typedef struct packed {
    ss_addr_t   haddr;
    htrans_e    htrans;
    logic       hwrite;
    logic [2:0] hsize;
    hburst_e    hburst;
    logic       hmastlock;
  } ahb_req_t;

  // Priority policy: where the priority level of each master comes from.
  typedef enum logic [1:0] {
    POL_FIXED   = 2'd0,   // static level, master 0 highest
    POL_RR      = 2'd1,   // every master the same level: round robin
    POL_DYNAMIC = 2'd2    // level carried in P_Level of the address
  } arb_policy_e;

  // Length mode: how many transfers a granted master may make.
  typedef enum logic [1:0] {
    LEN_TRANSFER    = 2'd0,  // one transfer
    LEN_TRANSACTION = 2'd1,  // number of beats of HBURST
    LEN_DESIRED     = 2'd2   // T_Length field of the address, plus one
  } len_mode_e;

  // Arbitration scheme of one slave port (nine combinations).
  typedef struct packed {
    arb_policy_e policy;
    len_mode_e   len_mode;
  } arb_cfg_t;

  // One burst command for a master: target, priority level and desired
  // transfer length (carried in the address), start offset, burst type,
  // direction and lock.
  typedef struct packed {
    ss_addr_t addr;
    hburst_e  hburst;   // SINGLE, INCR4, INCR8 or INCR16
    logic     write;
    logic     lock;
  } ss_cmd_t;

  // Number of beats of a burst.  An undefined-length INCR burst gets the
  // largest allotment; the arbiter regains the slave earlier when the
  // master stops addressing it.
  function automatic logic [CNT_W-1:0] burst_beats(hburst_e b);
    case (b)
      HBURST_SINGLE:                return CNT_W'(1);
      HBURST_WRAP4,  HBURST_INCR4:  return CNT_W'(4);
      HBURST_WRAP8,  HBURST_INCR8:  return CNT_W'(8);
      default:                      return CNT_W'(16);
    endcase
  endfunction

  function automatic logic is_active(htrans_e t);
    return (t == HTRANS_NONSEQ) || (t == HTRANS_SEQ);
  endfunction

endpackage
