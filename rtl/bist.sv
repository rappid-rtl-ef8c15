// bist: built-in self-test for the decoder - a cellular automaton that
// produces instruction lines and a multiple-input signature register that
// compresses what comes out of the output buffers.
//
// The automaton has one cell per bit of a cache line (16 bytes x 11 bits)
// and steps once each time a line is taken (next). It is a hybrid of rules
// 90 and 150 with null boundaries: cell i becomes s[i-1] ^ s[i+1], and cells
// with even i also add their own value (rule 150). Each byte of a line takes
// its data from the low eight bits of its 11 cells and is marked used, with
// no branch or target marks, so any pattern is a legal instruction stream.
// With two_op set, a byte whose three upper cells are all zero is replaced
// by 8'h0F, so that two-byte (0F) opcodes, which the automaton alone rarely
// produces, appear in about one byte in eight.
//
// The signature register is 64 bits with feedback polynomial
// x^64 + x^4 + x^3 + x + 1. In a cycle where words are read from the output
// buffers (sig_valid[r]), each is folded in, row 0 first, together with its
// row number.
//
// The source describes the automaton, the two-opcode modification and the
// signature analyser only by function; rules, widths, seed and polynomial are
// this design's.
module bist
  import rappid_pkg::*;
#(
  parameter logic [NCOL*11-1:0] SEED = {11{16'hACE1}}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 next,        // step the automaton
  input  logic                 two_op,      // inject 0F opcodes
  output if_byte_t [NCOL-1:0]  line,        // current pattern line
  input  logic [NROW-1:0]      sig_valid,   // output words read this cycle
  input  xb_entry_t [NROW-1:0] sig_data,
  output logic [63:0]          signature
);

  localparam int N = NCOL * 11;
  localparam logic [63:0] POLY = 64'h0000_0000_0000_001B;

  logic [N-1:0] ca_q, ca_d;
  logic [63:0]  sig_q, sig_d;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ca_d[i] = ((i > 0) ? ca_q[i-1] : 1'b0) ^ ((i < N - 1) ? ca_q[i+1] : 1'b0)
              ^ ((i % 2 == 0) ? ca_q[i] : 1'b0);
    end
    for (int c = 0; c < NCOL; c++) begin
      line[c].u    = 1'b1;
      line[c].b    = 1'b0;
      line[c].t    = 1'b0;
      line[c].data = ca_q[c*11 +: 8];
      if (two_op && ca_q[c*11 + 8 +: 3] == 3'b000) line[c].data = 8'h0F;
    end
  end

  always_comb begin
    sig_d = sig_q;
    for (int r = 0; r < NROW; r++) begin
      if (sig_valid[r])
        sig_d = {sig_d[62:0], 1'b0} ^ (sig_d[63] ? POLY : 64'd0) ^ {r[1:0], sig_data[r]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ca_q  <= SEED;
      sig_q <= '0;
    end else begin
      if (next) ca_q <= ca_d;
      sig_q <= sig_d;
    end
  end

  assign signature = sig_q;

endmodule
