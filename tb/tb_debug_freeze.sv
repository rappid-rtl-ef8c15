// tb_debug_freeze: checks the debug freeze chain against a model written
// here.
//
// A directed part does three things:
//  1. scans in freeze bits for groups 0 and 6 only;
//  2. drives single-clock pulses on every group;
//  3. scans the capture out and checks it: the frozen groups keep every
//     pulse, and the others show only the last clock's state.
// It also checks that the freeze bits come back out of the chain in the
// order they went in.
//
// A random part then mixes shifting and capturing with random state. Every
// clock it compares dbg_out with the model.
module tb_debug_freeze;
  import rappid_pkg::*;
  localparam int NOBS = $bits(du_state_t);
  localparam int NCH  = NOBS + NDBG;

  logic clk = 1'b0, rst_n = 1'b0, dbg_shift = 1'b0, dbg_in = 1'b0, dbg_out;
  du_state_t state = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  debug_freeze u_dut (.clk, .rst_n, .state, .dbg_shift, .dbg_in, .dbg_out);

  // model: freeze bits and capture, kept as one chain
  logic [NDBG-1:0] m_fz;
  logic [NOBS-1:0] m_obs;

  function automatic logic [NOBS-1:0] hold_mask(input logic [NDBG-1:0] fz);
    du_state_t h;
    h.tag_arrived = {(NROW * NCOL){fz[0]}};
    h.fire        = {(NROW * NCOL){fz[1]}};
    h.inst_rdy    = {NCOL{fz[2]}};
    h.byte_rdy    = {NCOL{fz[3]}};
    h.preempt     = {NCOL{fz[4]}};
    h.mode_valid  = {NCOL{fz[5]}};
    h.inject      = {NROW{fz[6]}};
    h.xb_push     = {NROW{fz[7]}};
    return h;
  endfunction

  // one clock: compare, then advance DUT and model together
  task automatic step();
    checks++;
    if (dbg_out !== m_obs[0]) begin
      failures++;
      if (failures < 10) $display("FAIL dbg_out=%0b expected %0b", dbg_out, m_obs[0]);
    end
    @(posedge clk);
    if (dbg_shift) {m_fz, m_obs} = {dbg_in, m_fz, m_obs[NOBS-1:1]};
    else           m_obs = (m_obs & hold_mask(m_fz)) | NOBS'(state);
    @(negedge clk);
  endtask

  function automatic du_state_t rand_state();
    logic [NOBS-1:0] v;
    for (int i = 0; i < NOBS; i += 32) v[i +: 32] = $urandom;
    return du_state_t'(v);
  endfunction

  logic [NCH-1:0] out_bits;
  du_state_t      acc, last, got;

  initial begin
    m_fz = '0; m_obs = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- directed: freeze groups 0 and 6 ----
    dbg_shift = 1'b1;
    for (int i = 0; i < NCH; i++) begin
      // the last eight bits shifted in are freeze bits 0..7
      dbg_in = (i == NOBS + 0) || (i == NOBS + 6);
      step();
    end
    dbg_shift = 1'b0; dbg_in = 1'b0;
    checks++;
    if (u_dut.freeze !== 8'b0100_0001) begin
      failures++;
      $display("FAIL freeze=%b", u_dut.freeze);
    end
    acc = '0;
    for (int i = 0; i < 30; i++) begin
      state = rand_state();
      acc = du_state_t'(NOBS'(acc) | NOBS'(state));
      last = state;
      step();
    end
    state = '0;
    // Scan out. Capture stops while shifting, so the capture register holds
    // what it had after the last pulse.
    dbg_shift = 1'b1;
    for (int i = 0; i < NCH; i++) begin
      dbg_in = (i < NDBG) ? 1'b0 : 1'b1;
      out_bits[i] = dbg_out;
      step();
    end
    dbg_shift = 1'b0;
    got = du_state_t'(out_bits[NOBS-1:0]);
    checks++;
    if (got.tag_arrived !== acc.tag_arrived || got.inject !== acc.inject) begin
      failures++;
      $display("FAIL frozen groups lost a pulse");
    end
    checks++;
    if (got.fire !== last.fire || got.inst_rdy !== last.inst_rdy ||
        got.byte_rdy !== last.byte_rdy || got.preempt !== last.preempt ||
        got.mode_valid !== last.mode_valid || got.xb_push !== last.xb_push) begin
      failures++;
      $display("FAIL unfrozen groups do not show the last state");
    end
    checks++;
    if (out_bits[NCH-1:NOBS] !== 8'b0100_0001) begin
      failures++;
      $display("FAIL freeze bits scanned out as %b", out_bits[NCH-1:NOBS]);
    end

    // ---- random: shifting and capture mixed ----
    for (int i = 0; i < 4000; i++) begin
      dbg_shift = ($urandom_range(0, 3) == 0);
      dbg_in    = 1'($urandom);
      state     = ($urandom_range(0, 1) == 0) ? rand_state() : '0;
      step();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
