// byte_unit: one byte column of the decode and steer unit - byte latch,
// byte control, length decoder, instruction-ready control and ack
// generation.
//
// Byte control takes a byte from this column's input FIFO whenever the latch
// is empty or is being released, acknowledging (popping) the FIFO at once.
// A byte whose used bit is clear is dropped on arrival, so the column moves
// straight on to its byte of the next line. A used byte is held and
// byte_rdy is raised. The length decoder runs speculatively on the held
// byte and the next three bytes. Instruction-ready control raises inst_rdy
// when the effective length L is known and the next L-1 columns hold their
// bytes. When this column fires (its tag unit sends the tag on), ack
// generation releases the byte and sends preempt to the L-1 columns
// downstream, which release theirs in the same cycle.
//
// Prefixes and instructions longer than seven bytes are split with a
// request/acknowledge exchange between columns, as in the source. While
// this column holds the tag and its byte is a prefix, it asks the next
// column to take a mode (operand/address size, branch flag); once that
// column shows the mode (the acknowledge) this column goes out as a
// one-byte prefix piece. For a decoded length of 8..11 it asks the column
// four bytes on to act as the start of a tail of length L-4 (three bits),
// and after the acknowledge goes out as a four-byte head. The mode is
// carried in a register of the receiving column and cleared when that
// column's byte is released. A one-bit line parity, flipped on every FIFO
// pop, tells which line the held byte belongs to; it is this design's
// addition for matching branch targets.
//
// Timing: one clock per handshake step. A byte popped in cycle t is ready
// in t+1; a byte released in t can be replaced in the same edge.
module byte_unit
  import rappid_pkg::*;
#(
  parameter int SEQ_W = 6  // width of the line sequence number
) (
  input  logic            clk,
  input  logic            rst_n,
  // input FIFO column
  input  logic            if_valid,
  input  if_byte_t        if_byte,
  output logic            if_pop,
  // byte latch contents
  output logic            byte_rdy,
  output logic [7:0]      lat_data,
  output logic            lat_t,
  output logic [SEQ_W-1:0] seq,
  // neighbours downstream: nbr_*[k] is column c+1+k
  input  logic [2:0][7:0] nbr_data,
  input  logic [5:0]      nbr_rdy,
  // tag unit side
  input  logic            has_tag,      // a tag unit of this column holds the tag
  input  logic            fire,        // a tag unit of this column sent the tag on
  output logic            inst_rdy,
  output logic [MAXLEN-1:0] len_onehot,
  output logic            branch,      // piece ends a predicted taken branch
  output logic            pc_prefix,   // piece is a lone prefix byte
  output logic            pc_head,     // piece is the head of a long instruction
  output logic            pc_tail,     // piece is the tail of a long instruction
  // preempt: out[k] goes to column c+1+k, in[k] comes from column c-1-k
  output logic [5:0]      preempt_out,
  input  logic [5:0]      preempt_in,
  // prefix and long-instruction exchange
  output col_mode_t       pfx_req_out,  // to column c+1
  input  col_mode_t       pfx_req_in,   // from column c-1
  output col_mode_t       long_req_out, // to column c+4
  input  col_mode_t       long_req_in,  // from column c-4
  output logic            mode_valid,   // acknowledge seen by the requester
  input  logic            ack_pfx_in,   // mode_valid of column c+1
  input  logic            ack_long_in   // mode_valid of column c+4
);

  logic       valid_q;
  logic [7:0] data_q;
  logic       b_q, t_q;
  logic [SEQ_W-1:0] seq_q;
  col_mode_t  mode_q;

  logic [3:0] dec_len;
  logic       dec_prefix;
  logic [2:0] len;         // effective length, 1..7
  logic       need_pfx, need_long, span_ok, release_b;

  length_decoder u_ld (
    .b0(data_q), .b1(nbr_data[0]), .b2(nbr_data[1]), .b3(nbr_data[2]),
    .op16(mode_q.op16), .ad16(mode_q.ad16),
    .len(dec_len), .is_prefix(dec_prefix)
  );

  // ---- effective length and instruction-ready control ----
  always_comb begin
    need_pfx  = 1'b0;
    need_long = 1'b0;
    pc_prefix = 1'b0;
    pc_head   = 1'b0;
    pc_tail   = 1'b0;
    if (mode_q.valid && mode_q.tail) begin
      len     = mode_q.tail_len;
      pc_tail = 1'b1;
    end else if (dec_prefix) begin
      len       = 3'd1;
      need_pfx  = 1'b1;
      pc_prefix = 1'b1;
    end else if (dec_len > 4'd7) begin
      len       = 3'd4;
      need_long = 1'b1;
      pc_head   = 1'b1;
    end else begin
      len = dec_len[2:0];
    end

    span_ok = 1'b1;
    for (int k = 0; k < 6; k++)
      if (k + 1 < int'(len) && !nbr_rdy[k]) span_ok = 1'b0;

    inst_rdy = valid_q && span_ok && (!need_pfx || ack_pfx_in) && (!need_long || ack_long_in);

    len_onehot = '0;
    len_onehot[len - 3'd1] = 1'b1;

    branch = !need_pfx && !need_long && (b_q || mode_q.branch);

    // Requests are raised only while this column holds the tag and the
    // bytes the decision rests on are present.
    pfx_req_out        = '0;
    pfx_req_out.valid  = has_tag && valid_q && need_pfx && !ack_pfx_in;
    pfx_req_out.op16   = mode_q.op16 || (data_q == 8'h66);
    pfx_req_out.ad16   = mode_q.ad16 || (data_q == 8'h67);
    pfx_req_out.branch = mode_q.branch || b_q;

    long_req_out          = '0;
    long_req_out.valid    = has_tag && valid_q && need_long && span_ok && !ack_long_in;
    long_req_out.tail     = 1'b1;
    long_req_out.tail_len = 3'(dec_len - 4'd4);
    long_req_out.branch   = mode_q.branch || b_q;

  end

  always_comb begin
    for (int k = 0; k < 6; k++)
      preempt_out[k] = fire && (k + 1 < int'(len));
  end

  // ---- byte control ----
  assign release_b = fire || (|preempt_in);
  assign if_pop    = if_valid && (!valid_q || release_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      data_q  <= '0;
      b_q     <= 1'b0;
      t_q     <= 1'b0;
      seq_q   <= '0;
      mode_q  <= '0;
    end else begin
      if (release_b) valid_q <= 1'b0;
      if (if_pop) begin
        valid_q <= if_byte.u;  // unused bytes are dropped on arrival
        data_q  <= if_byte.data;
        b_q     <= if_byte.b;
        t_q     <= if_byte.t;
        seq_q   <= seq_q + 1'b1;
      end
      if (release_b) mode_q <= '0;
      if (pfx_req_in.valid)  mode_q <= pfx_req_in;
      if (long_req_in.valid) mode_q <= long_req_in;
    end
  end

  assign byte_rdy   = valid_q;
  assign lat_data   = data_q;
  assign lat_t      = t_q;
  assign seq        = seq_q;
  assign mode_valid = mode_q.valid;

  // A column is never released by two instructions at once.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({fire, preempt_in}));

endmodule
