// tag_unit: one tag unit of the 4x16 torus.
//
// The tag marks the column holding the first byte of the next instruction
// to steer. TagArrived is set by a pulse on any of the seven TagIn lines (or
// by the row's INJECT when this column holds a branch target) and held until
// the unit fires. The unit fires when TagArrived, InstRdy (the column's
// instruction is complete) and XBRdy (the row's crossbar can take it) are
// all true, in any order of arrival. Firing sends a one-cycle pulse on
// TagOut[L], where L is the column's one-hot length, to the unit L columns
// on in the next row, or for a predicted taken branch raises inject_out
// for the next row instead; the same cycle the instruction goes to the
// crossbar and the column releases its bytes.
//
// The gate structure follows the source's tag unit figure: an OR of the
// TagIn lines with a feedback AND forming TagArrived, an AND of InstRdy and
// XBRdy, and one AND per length line. The self-timed pulses of the source
// become single-cycle pulses here; the branch line is this design's
// rendering of the branch control the figure leaves out.
module tag_unit
  import rappid_pkg::*;
#(
  parameter bit INIT_TAG = 1'b0  // unit holds the tag after reset
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [MAXLEN-1:0] tag_in,      // tag_in[i] from the unit i+1 columns upstream, previous row
  input  logic              inject_take, // row INJECT meets this column's target byte
  input  logic              inst_rdy,
  input  logic              xb_rdy,
  input  logic [MAXLEN-1:0] len_onehot,
  input  logic              branch,
  output logic [MAXLEN-1:0] tag_out,     // tag_out[i] to the unit i+1 columns on, next row
  output logic              inject_out,
  output logic              fire,
  output logic              tag_arrived
);

  logic arrived_q;

  assign fire        = arrived_q && inst_rdy && xb_rdy;
  assign tag_out     = (fire && !branch) ? len_onehot : '0;
  assign inject_out  = fire && branch;
  assign tag_arrived = arrived_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) arrived_q <= INIT_TAG;
    else        arrived_q <= (|tag_in) || inject_take || (arrived_q && !fire);
  end

  // The pulsed protocol relies on a tag never reaching a unit that still
  // holds one, and on a single tag line pulsing at a time.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ((|tag_in) || inject_take) |-> !arrived_q);
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({tag_in, inject_take}));
  assert property (@(posedge clk) disable iff (!rst_n)
                   fire |-> $onehot(len_onehot));

endmodule
