// rappid_pkg: sizes and shared types of the RAPPID instruction length
// decoder and steering unit.
//
// The array is 16 byte columns by 4 tag/crossbar rows, as in the design
// being modelled. Input bytes carry three marker bits (used, branch,
// target) next to the 8 data bits, giving the 11-bit input FIFO word. The
// crossbar channel is 62 bits wide: seven instruction bytes, a 3-bit length
// and three flags describing what kind of piece the transfer is. The split
// of the six non-data bits is this implementation's choice; the source only
// gives the 62-bit total and says the transfer carries length and prefix
// information.
package rappid_pkg;

  localparam int NCOL    = 16;  // byte columns (one per cache-line byte)
  localparam int NROW    = 4;   // tag unit / crossbar / output buffer rows
  localparam int MAXLEN  = 7;   // longest instruction handled in one piece
  localparam int MAXLONG = 11;  // longest instruction handled at all

  // One byte of a cache line as held in the input FIFO (11 bits).
  typedef struct packed {
    logic       u;     // byte is used
    logic       b;     // first byte of a predicted taken branch
    logic       t;     // first byte of a branch target
    logic [7:0] data;
  } if_byte_t;

  // One transfer on a crossbar channel into an output buffer (62 bits).
  typedef struct packed {
    logic [MAXLEN-1:0][7:0] bytes;     // bytes[0] is the first byte
    logic [2:0]             len;       // number of valid bytes, 1..7
    logic                   is_prefix; // a lone prefix byte
    logic                   long_head; // first four bytes of an 8..11 byte instruction
    logic                   long_tail; // remaining bytes of an 8..11 byte instruction
  } xb_entry_t;

  // State one column holds about its current byte, set by an upstream
  // column that was tagged on a prefix byte or on a long instruction.
  typedef struct packed {
    logic       valid;    // mode was set by an upstream column
    logic       tail;     // this byte starts the tail of a long instruction
    logic [2:0] tail_len; // length of that tail, 4..7
    logic       op16;     // operand-size prefix seen
    logic       ad16;     // address-size prefix seen
    logic       branch;   // the whole instruction is a predicted taken branch
  } col_mode_t;

  // Internal state of the decoding and steering unit that the debug logic
  // can freeze and scan out: eight signal groups, one freeze bit each
  // (group 0 is the first field).
  localparam int NDBG = 8;
  typedef struct packed {
    logic [NROW-1:0][NCOL-1:0] tag_arrived;  // 0: tag unit holds the tag
    logic [NROW-1:0][NCOL-1:0] fire;         // 1: tag unit fires (TagOut pulse)
    logic [NCOL-1:0]           inst_rdy;     // 2: column's instruction ready
    logic [NCOL-1:0]           byte_rdy;     // 3: column's byte latch full
    logic [NCOL-1:0]           preempt;      // 4: column receives a preempt
    logic [NCOL-1:0]           mode_valid;   // 5: prefix or long-tail mode held
    logic [NROW-1:0]           inject;       // 6: row's INJECT flag
    logic [NROW-1:0]           xb_push;      // 7: row's crossbar transfers
  } du_state_t;

  // The eleven IA32 prefix bytes.
  function automatic logic is_prefix_byte(input logic [7:0] b);
    case (b)
      8'h26, 8'h2E, 8'h36, 8'h3E, 8'h64, 8'h65,
      8'h66, 8'h67, 8'hF0, 8'hF2, 8'hF3: return 1'b1;
      default:                           return 1'b0;
    endcase
  endfunction

endpackage
