// debug_freeze: freeze-and-scan debug register for the decoding and
// steering unit.
//
// A self-timed pulsed circuit cannot be stopped and inspected the way a
// clocked one can: by the time it stops, its pulses and self-resetting state
// signals have already gone back to rest. The debug feature keeps eight
// freeze bits in a scan chain. Each bit stops one internal state signal from
// resetting, so the signal keeps the fact that it was ever set. The frozen
// state is then scanned out.
//
// This module holds a capture register with one bit for every instance of
// the eight signal groups in du_state_t (200 bits), plus the eight freeze
// bits. It works as follows:
//  * While dbg_shift is low, the capture register follows the live state
//    every clock. A group whose freeze bit is set only ORs new values in, so
//    every instance that was high since the freeze keeps a 1.
//  * While dbg_shift is high, the whole chain {freeze, capture} moves one
//    bit per clock towards dbg_out, and dbg_in enters at the freeze end. A
//    full scan is 208 clocks. It reads the capture register, bit 0 of the
//    du_state_t packing (xb_push of row 0) first. It leaves the last eight
//    bits shifted in as the new freeze bits: the last one shifted in is
//    freeze bit 7.
//  * Reset clears everything.
// The decoding and steering unit registers the state it hands over, so the
// capture lags the live signals by one clock.
//
// The design being modelled freezes the signal itself: blocking its reset
// input stalls that part of the circuit. Here the frozen copy is a shadow of
// the live signal, so freezing never changes what the unit does. Which eight
// signals the original froze is not known. The eight groups, the separate
// debug scan port and the chain order are this design's choices.
module debug_freeze
  import rappid_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  du_state_t state,     // live internal state
  input  logic      dbg_shift, // shift the debug chain one bit
  input  logic      dbg_in,    // serial in (freeze end of the chain)
  output logic      dbg_out    // serial out (capture bit 0)
);

  localparam int NOBS = $bits(du_state_t);

  logic [NDBG-1:0] freeze;
  logic [NOBS-1:0] obs_q, hold;

  // One freeze bit per group, spread over that group's bits (group 0 is the
  // most significant field of the packed struct).
  assign hold = {{(NROW * NCOL){freeze[0]}}, {(NROW * NCOL){freeze[1]}},
                 {NCOL{freeze[2]}}, {NCOL{freeze[3]}}, {NCOL{freeze[4]}},
                 {NCOL{freeze[5]}}, {NROW{freeze[6]}}, {NROW{freeze[7]}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freeze <= '0;
      obs_q  <= '0;
    end else if (dbg_shift) begin
      {freeze, obs_q} <= {dbg_in, freeze, obs_q[NOBS-1:1]};
    end else begin
      obs_q <= (obs_q & hold) | state;
    end
  end

  assign dbg_out = obs_q[0];

endmodule
