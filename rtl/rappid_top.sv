// rappid_top: the RAPPID instruction length decoder and steering unit - an
// input FIFO of cache lines feeding the length decoding and steering unit,
// whose four output buffers deliver the instructions.
//
// Lines of 16 bytes, each byte with its used, branch and target marks, are
// shifted in serially and stored in the input FIFO (up to 32 lines). With run
// high, each of the sixteen byte columns pulls its next byte as soon as it
// has consumed the last one. The unit cuts the byte stream into instructions
// and writes them, one per transfer, into output buffers 0,1,2,3,0,... in
// program order; a prefix byte and the two halves of an 8..11-byte instruction
// are separate transfers. With recirc high the FIFO replays the loaded lines
// endlessly, which is how the throughput of a short program is measured.
//
// With bist_en high the unit tests itself: a cellular automaton fills the
// FIFO with pseudo-random instruction lines, every output word is read at
// once and compressed into the 64-bit signature bist_sig; bist_two_op mixes
// in 0F opcodes. The source designed this self-test but did not put it on
// silicon.
//
// Interface: scan_en/scan_in/scan_out and load_line for loading, recirc and
// run for the FIFO mode, per row ob_valid/ob_data with ob_pop for the
// output, bist_en/bist_two_op/bist_sig for the self-test, and
// dbg_shift/dbg_in/dbg_out for the debug chain: eight freeze bits that make
// groups of internal state signals sticky, and a capture of that state to
// scan out. All of it is synchronous to clk with an active-low asynchronous
// reset. The source builds this as self-timed logic with no clock; here every
// handshake step takes one clock.
module rappid_top
  import rappid_pkg::*;
#(
  parameter int IF_DEPTH = 32,  // input FIFO lines
  parameter int OB_DEPTH = 4    // output buffer entries per row
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 scan_en,
  input  logic                 scan_in,
  output logic                 scan_out,
  input  logic                 load_line,
  input  logic                 recirc,
  input  logic                 run,
  output logic                 if_full,
  input  logic [NROW-1:0]      ob_pop,
  output logic [NROW-1:0]      ob_valid,
  output xb_entry_t [NROW-1:0] ob_data,
  // self-test
  input  logic                 bist_en,
  input  logic                 bist_two_op,
  output logic [63:0]          bist_sig,
  // debug freeze chain
  input  logic                 dbg_shift,
  input  logic                 dbg_in,
  output logic                 dbg_out
);

  logic [NCOL-1:0]     col_valid, col_pop;
  if_byte_t [NCOL-1:0] col_data, bist_line;
  logic                bist_load;
  logic [NROW-1:0]     pop;
  du_state_t           dbg_state;

  // In self-test the automaton refills the FIFO whenever it has room and
  // every output word is read at once and folded into the signature.
  assign bist_load = bist_en && !if_full;
  assign pop       = bist_en ? ob_valid : ob_pop;

  input_fifo #(.DEPTH(IF_DEPTH)) u_if (
    .clk, .rst_n, .scan_en, .scan_in, .scan_out, .load_line,
    .par_load(bist_load), .par_line(bist_line),
    .recirc(recirc && !bist_en), .run,
    .full(if_full), .col_pop, .col_valid, .col_data
  );

  decode_steer_unit #(.OB_DEPTH(OB_DEPTH), .SEQ_W($clog2(IF_DEPTH) + 1)) u_du (
    .clk, .rst_n,
    .if_valid(col_valid), .if_data(col_data), .if_pop(col_pop),
    .ob_pop(pop), .ob_valid, .ob_data, .dbg_state
  );

  debug_freeze u_dbg (.clk, .rst_n, .state(dbg_state), .dbg_shift, .dbg_in, .dbg_out);

  bist u_bist (
    .clk, .rst_n, .next(bist_load), .two_op(bist_two_op), .line(bist_line),
    .sig_valid(bist_en ? ob_valid : '0), .sig_data(ob_data), .signature(bist_sig)
  );

endmodule
