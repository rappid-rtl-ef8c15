// crossbar: the crossbar switch of one row.
//
// At most one tag unit of a row fires in a cycle. The crossbar picks that
// column, takes the L bytes starting at it from the byte latches (wrapping
// from column 15 to column 0) and lines them up as bytes[0..L-1] of a
// 62-bit channel word, together with the length and the piece flags, for
// the row's output buffer. It is combinational: the transfer happens in the
// cycle the tag unit fires. The source gives the crossbar's function and the
// channel width; the mux structure and the field layout are this design's.
module crossbar
  import rappid_pkg::*;
(
  input  logic [NCOL-1:0]              fire,       // tag unit of column c fires
  input  logic [NCOL-1:0][MAXLEN-1:0]  len_onehot, // per-column one-hot length
  input  logic [NCOL-1:0]              pc_prefix,
  input  logic [NCOL-1:0]              pc_head,
  input  logic [NCOL-1:0]              pc_tail,
  input  logic [NCOL-1:0][7:0]         lat_data,   // byte latches of all columns
  output logic                         push,
  output xb_entry_t                    entry
);

  always_comb begin
    push  = |fire;
    entry = '0;
    for (int c = 0; c < NCOL; c++) begin
      if (fire[c]) begin
        for (int l = 0; l < MAXLEN; l++)
          if (len_onehot[c][l]) entry.len |= 3'(l + 1);
        for (int k = 0; k < MAXLEN; k++)
          if (len_onehot[c] >= (MAXLEN)'(1 << k))
            entry.bytes[k] |= lat_data[(c + k) % NCOL];
        entry.is_prefix |= pc_prefix[c];
        entry.long_head |= pc_head[c];
        entry.long_tail |= pc_tail[c];
      end
    end
  end

endmodule
