// output_buffer: the output buffer of one row.
//
// A first-in first-out queue of crossbar channel words. The crossbar writes
// with push; full is returned to the row's tag units as XBRdy (inverted), so
// a full buffer stalls the tag at the row. The consumer reads with pop while
// valid is high. Write and read may happen in the same cycle; a word written
// in cycle t can be read from t+1. The source names the buffers but gives no
// depth or interface: both are this design's choice.
module output_buffer
  import rappid_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  xb_entry_t din,
  output logic      full,
  input  logic      pop,
  output logic      valid,
  output xb_entry_t dout
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  xb_entry_t       mem [DEPTH];
  logic [AW-1:0]   wr_q, rd_q;
  logic [AW:0]     cnt_q;
  logic            do_push, do_pop;

  assign full    = (cnt_q == (AW+1)'(DEPTH));
  assign valid   = (cnt_q != '0);
  assign dout    = mem[rd_q];
  assign do_push = push && !full;
  assign do_pop  = pop && valid;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      if (do_pop)  rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);

endmodule
