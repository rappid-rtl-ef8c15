// decode_steer_unit: the length decoding and steering unit - sixteen byte
// columns, a 4x16 torus of tag units, and per row a crossbar and an output
// buffer.
//
// Every column decodes speculatively as if an instruction started at its
// byte. A single tag circulates in the torus: the tag unit that holds it
// fires once its column's instruction is ready and its row's output buffer
// has room, hands the aligned instruction to its row's crossbar, releases the
// instruction's bytes and passes the tag L columns on in the next row down
// (row 3 wraps to row 0, column 15 to column 0). Consecutive instructions
// therefore land in rows 0,1,2,3,0,... and reading the four output buffers
// round-robin gives program order.
//
// A predicted taken branch does not pass the tag by length: it sets the
// INJECT flag of the next row, and the tag unit of that row whose column
// holds a byte marked as target takes the tag and clears INJECT. INJECT also
// records the line sequence number the target must have (the line after the
// one holding the branch's last byte), so a target mark of a later line that
// a column has already fetched by skipping unused bytes is not taken; this
// check is this design's addition. Reset places the tag in row 0, column 0.
// dbg_state brings out eight groups of internal state signals for the debug
// freeze logic of the top, registered (one clock late).
//
// Timing: one instruction (or prefix, head or tail piece) per clock at most;
// a split adds one clock for the request/acknowledge, a branch one clock for
// INJECT.
module decode_steer_unit
  import rappid_pkg::*;
#(
  parameter int OB_DEPTH = 4,
  parameter int SEQ_W    = 6   // line sequence width, log2(input FIFO depth)+1
) (
  input  logic                clk,
  input  logic                rst_n,
  // input FIFO side, one channel per column
  input  logic [NCOL-1:0]     if_valid,
  input  if_byte_t [NCOL-1:0] if_data,
  output logic [NCOL-1:0]     if_pop,
  // output buffers, one per row
  input  logic [NROW-1:0]     ob_pop,
  output logic [NROW-1:0]     ob_valid,
  output xb_entry_t [NROW-1:0] ob_data,
  // internal state for the debug freeze logic
  output du_state_t           dbg_state
);

  // ---- column signals ----
  logic [NCOL-1:0]             byte_rdy, lat_t;
  logic [NCOL-1:0][SEQ_W-1:0]  seq;
  logic [NCOL-1:0][7:0]        lat_data;
  logic [NCOL-1:0]             col_has_tag, col_fire, inst_rdy, branch;
  logic [NCOL-1:0]             pc_prefix, pc_head, pc_tail, mode_valid;
  logic [NCOL-1:0][MAXLEN-1:0] len_onehot;
  logic [NCOL-1:0][5:0]        preempt_out;
  logic [NCOL-1:0]             preempted;
  col_mode_t [NCOL-1:0]        pfx_req, long_req;

  // ---- tag array signals ----
  logic [NROW-1:0][NCOL-1:0]             tag_arrived, fire, inject_out, inject_take;
  logic [NROW-1:0][NCOL-1:0][MAXLEN-1:0] tag_out;
  logic [NROW-1:0]                       inject_q;
  logic [NROW-1:0][SEQ_W-1:0]            inject_seq_q;
  logic [NROW-1:0]                       ob_full, xb_push;
  xb_entry_t [NROW-1:0]                  xb_entry;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    logic [2:0][7:0] nbr_data;
    logic [5:0]      nbr_rdy, preempt_in;
    for (genvar k = 0; k < 3; k++) begin : g_nd
      assign nbr_data[k] = lat_data[(c + 1 + k) % NCOL];
    end
    for (genvar k = 0; k < 6; k++) begin : g_nr
      assign nbr_rdy[k]    = byte_rdy[(c + 1 + k) % NCOL];
      assign preempt_in[k] = preempt_out[(c + NCOL - 1 - k) % NCOL][k];
    end

    always_comb begin
      col_has_tag[c] = 1'b0;
      col_fire[c]    = 1'b0;
      for (int r = 0; r < NROW; r++) begin
        col_has_tag[c] |= tag_arrived[r][c];
        col_fire[c]    |= fire[r][c];
      end
    end

    byte_unit #(.SEQ_W(SEQ_W)) u_bu (
      .clk, .rst_n,
      .if_valid(if_valid[c]), .if_byte(if_data[c]), .if_pop(if_pop[c]),
      .byte_rdy(byte_rdy[c]), .lat_data(lat_data[c]), 
      .lat_t(lat_t[c]), .seq(seq[c]),
      .nbr_data, .nbr_rdy,
      .has_tag(col_has_tag[c]), .fire(col_fire[c]),
      .inst_rdy(inst_rdy[c]), .len_onehot(len_onehot[c]), .branch(branch[c]),
      .pc_prefix(pc_prefix[c]), .pc_head(pc_head[c]), .pc_tail(pc_tail[c]),
      .preempt_out(preempt_out[c]), .preempt_in,
      .pfx_req_out(pfx_req[c]), .pfx_req_in(pfx_req[(c + NCOL - 1) % NCOL]),
      .long_req_out(long_req[c]), .long_req_in(long_req[(c + NCOL - 4) % NCOL]),
      .mode_valid(mode_valid[c]),
      .ack_pfx_in(mode_valid[(c + 1) % NCOL]), .ack_long_in(mode_valid[(c + 4) % NCOL])
    );
  end

  for (genvar r = 0; r < NROW; r++) begin : g_row
    for (genvar c = 0; c < NCOL; c++) begin : g_tu
      logic [MAXLEN-1:0] tag_in;
      for (genvar i = 0; i < MAXLEN; i++) begin : g_ti
        assign tag_in[i] = tag_out[(r + NROW - 1) % NROW][(c + NCOL - 1 - i) % NCOL][i];
      end
      assign inject_take[r][c] = inject_q[r] && byte_rdy[c] && lat_t[c] &&
                                 (seq[c] == inject_seq_q[r]);

      tag_unit #(.INIT_TAG(r == 0 && c == 0)) u_tu (
        .clk, .rst_n,
        .tag_in, .inject_take(inject_take[r][c]),
        .inst_rdy(inst_rdy[c]), .xb_rdy(!ob_full[r]),
        .len_onehot(len_onehot[c]), .branch(branch[c]),
        .tag_out(tag_out[r][c]), .inject_out(inject_out[r][c]),
        .fire(fire[r][c]), .tag_arrived(tag_arrived[r][c])
      );
    end

    crossbar u_xb (
      .fire(fire[r]), .len_onehot, .pc_prefix, .pc_head, .pc_tail,
      .lat_data, .push(xb_push[r]), .entry(xb_entry[r])
    );

    output_buffer #(.DEPTH(OB_DEPTH)) u_ob (
      .clk, .rst_n,
      .push(xb_push[r]), .din(xb_entry[r]), .full(ob_full[r]),
      .pop(ob_pop[r]), .valid(ob_valid[r]), .dout(ob_data[r])
    );
  end

  // ---- INJECT flag of each row ----
  // The branch's last byte is L-1 columns after its first; if that wraps
  // past column 15 it lies in the next line. The target is in the line
  // after the one holding the last byte.
  logic [NCOL-1:0] br_wrap;
  always_comb begin
    for (int c = 0; c < NCOL; c++) begin
      br_wrap[c] = 1'b0;
      for (int l = 0; l < MAXLEN; l++)
        if (len_onehot[c][l] && (c + l >= NCOL)) br_wrap[c] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inject_q     <= '0;
      inject_seq_q <= '0;
    end else begin
      for (int r = 0; r < NROW; r++) begin
        if (|inject_take[r]) inject_q[r] <= 1'b0;
        for (int c = 0; c < NCOL; c++) begin
          if (inject_out[(r + NROW - 1) % NROW][c]) begin
            inject_q[r]     <= 1'b1;
            inject_seq_q[r] <= seq[c] + SEQ_W'(br_wrap[c]) + 1'b1;
          end
        end
      end
    end
  end

  // Columns released by a preempt this clock: covered by a firing
  // instruction without being its first byte.
  always_comb begin
    preempted = '0;
    for (int j = 0; j < NCOL; j++)
      for (int k = 1; k < MAXLEN; k++)
        if (col_fire[j] && |(len_onehot[j] >> k)) preempted[(j + k) % NCOL] = 1'b1;
  end

  // Registered, so the debug tap adds no combinational path across the
  // array: the debug logic sees the state one clock late.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dbg_state <= '0;
    else        dbg_state <= '{tag_arrived: tag_arrived, fire: fire, inst_rdy: inst_rdy,
                               byte_rdy: byte_rdy, preempt: preempted, mode_valid: mode_valid,
                               inject: inject_q, xb_push: xb_push};
  end

  // Exactly one tag, held by a tag unit or pending in an INJECT flag.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot({tag_arrived, inject_q}));

endmodule
