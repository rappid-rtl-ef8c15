// tb_rappid_top: end-to-end test of the RAPPID top at its default sizes.
//
// Phase A streams a long random program (plain, prefixed, 8..11-byte and
// branch instructions, unused bytes around branch targets) through the
// serial load port while the unit runs, with a consumer that pauses in
// bursts so the output buffers fill and stall the tag. Every transfer is
// compared with the reference sequence from rappid_tb_pkg, reading the four
// output buffers round-robin. Phase B loads the single-line and multi-line
// programs of the throughput experiments (X0..X8, I0, C34, C223, a 1..5 and
// a 1..7 length mix, a power-test style line), replays them with the FIFO in
// cyclic mode and checks both the content and a rate of one instruction per
// clock. Phase C runs the self-test: the automaton's byte stream must come
// back out of the output buffers intact and the signature must match a
// model. A debug run freezes TagArrived while replaying sixteen 1-byte
// instructions and checks the scanned-out set of tag units the tag visited.
// Each mechanism of the design is counted and must occur.
module tb_rappid_top;
  import rappid_pkg::*;
  import rappid_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic scan_en = 1'b0, scan_in = 1'b0, load_line = 1'b0, recirc = 1'b0, run = 1'b0;
  logic scan_out, if_full;
  logic [NROW-1:0] ob_pop = '0, ob_valid;
  xb_entry_t [NROW-1:0] ob_data;
  logic bist_en = 1'b0, bist_two_op = 1'b0;
  logic dbg_shift = 1'b0, dbg_in = 1'b0, dbg_out;
  logic [63:0] bist_sig;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rappid_top u_dut (
    .clk, .rst_n, .scan_en, .scan_in, .scan_out, .load_line, .recirc, .run,
    .if_full, .ob_pop, .ob_valid, .ob_data, .bist_en, .bist_two_op, .bist_sig,
    .dbg_shift, .dbg_in, .dbg_out
  );

  // ---------------- mechanism counters ----------------
  int n_xb_stall, n_inject, n_pfx, n_long, n_unused, n_preempt, n_row_wrap;
  int n_starve, n_recirc_wrap, n_fires;
  bit trace = $test$plusargs("trace");
  always @(posedge clk) if (rst_n) begin
    if (u_dut.u_du.ob_full != '0)           n_xb_stall++;
    if (u_dut.u_du.inject_take != '0)       n_inject++;
    if (u_dut.u_du.fire[NROW-1] != '0)      n_row_wrap++;
    if (u_dut.u_du.fire != '0)              n_fires++;
    if (trace)
      for (int r = 0; r < NROW; r++)
        for (int c = 0; c < NCOL; c++) begin
          if (u_dut.u_du.fire[r][c])
            $display("%0t fire r%0d c%0d len=%b br=%0b rdy=%b inj=%b", $time, r, c,
                     u_dut.u_du.len_onehot[c], u_dut.u_du.branch[c], u_dut.u_du.byte_rdy,
                     u_dut.u_du.inject_q);
          if (u_dut.u_du.inject_take[r][c])
            $display("%0t take r%0d c%0d", $time, r, c);
        end
    for (int c = 0; c < NCOL; c++) begin
      if (u_dut.u_du.pfx_req[c].valid)      n_pfx++;
      if (u_dut.u_du.long_req[c].valid)     n_long++;
      if (u_dut.u_du.if_pop[c] && !u_dut.u_du.if_data[c].u) n_unused++;
      if (u_dut.u_du.preempt_out[c] != '0)  n_preempt++;
      if (u_dut.u_du.col_has_tag[c] && !u_dut.u_du.byte_rdy[c]) n_starve++;
    end
    if (recirc && u_dut.u_if.col_pop[0] && u_dut.u_if.col_valid[0] &&
        32'(u_dut.u_if.rd_q[0]) + 1 == 32'(u_dut.u_if.nload_q)) n_recirc_wrap++;
  end

  // ---------------- consumer ----------------
  prog_gen   gen;
  int        rr, got, accept_pct;
  bit        consume, cyclic;
  always @(negedge clk) begin
    ob_pop = '0;
    if (consume && ob_valid[rr] && ($urandom_range(0, 99) < accept_pct)) begin
      xb_entry_t e;
      e = gen.exp[cyclic ? (got % gen.exp.size()) : got];
      checks++;
      if (ob_data[rr] !== e) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH #%0d row %0d: got %s exp %s", got, rr, show(ob_data[rr]), show(e));
      end
      ob_pop[rr] = 1'b1;
      rr = (rr + 1) % NROW;
      got++;
    end
  end

  // ---------------- helpers ----------------
  task automatic do_reset();
    consume = 0; rr = 0; got = 0; cyclic = 0;
    run = 0; recirc = 0; scan_en = 0; load_line = 0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  task automatic load(input int line);
    logic [NCOL*11-1:0] bits;
    for (int c = 0; c < NCOL; c++) bits[c*11 +: 11] = gen.stream[line*NCOL + c];
    while (if_full) @(negedge clk);
    for (int i = 0; i < NCOL*11; i++) begin
      scan_en = 1; scan_in = bits[i];
      @(negedge clk);
    end
    scan_en = 0;
    // the scan register shifts out what was shifted in, bit 0 first
    checks++;
    if (u_dut.u_if.scan_q !== bits) begin
      failures++;
      $display("scan register holds %h, expected %h", u_dut.u_if.scan_q, bits);
    end
    load_line = 1;
    @(negedge clk);
    load_line = 0;
  endtask

  // Replay the program cyclically and measure transfers per clock.
  task automatic rate_test(input string name, input bit expect_full_rate);
    int t0, g0, span;
    do_reset();
    for (int l = 0; l < gen.nlines(); l++) load(l);
    recirc = 1; cyclic = 1; accept_pct = 100; consume = 1; run = 1;
    repeat (200) @(negedge clk);
    g0 = got; span = 640;
    repeat (span) @(negedge clk);
    $display("%-8s lines=%0d insns=%0d transfers/clock=%0.3f", name, gen.nlines(),
             gen.n_insn, real'(got - g0) / span);
    checks++;
    if (got - g0 < span * 9 / 10 || (expect_full_rate && got - g0 != span)) begin
      failures++;
      $display("%s: %0d transfers in %0d clocks", name, got - g0, span);
    end
  endtask

  // Fill one line from a list of template numbers.
  task automatic line_of(input int kinds[$]);
    logic [7:0] none[$];
    none = {};
    gen = new();
    foreach (kinds[i]) gen.insn(none, kinds[i], 1'b0);
    gen.finish();
  endtask

  // ---------------- debug freeze ----------------
  // X0 (sixteen 1-byte instructions) replayed with TagArrived frozen: the
  // tag visits exactly the sixteen tag units with column mod 4 == row, so
  // the scanned-out capture must hold those and no others. FIRE is not
  // frozen, so at most one fire bit is captured.
  localparam int NOBS = $bits(du_state_t);
  int n_dbg;
  task automatic debug_test();
    logic [NOBS+NDBG-1:0] out;
    du_state_t st;
    logic [NROW-1:0][NCOL-1:0] want;
    do_reset();
    load(0);
    dbg_shift = 1;
    for (int i = 0; i < NOBS + NDBG; i++) begin
      dbg_in = (i == NOBS);               // freeze bit 0: TagArrived
      @(negedge clk);
    end
    dbg_shift = 0; dbg_in = 0;
    recirc = 1; cyclic = 1; accept_pct = 100; consume = 1; run = 1;
    repeat (100) @(negedge clk);
    dbg_shift = 1;
    for (int i = 0; i < NOBS + NDBG; i++) begin
      out[i] = dbg_out;
      @(negedge clk);
    end
    dbg_shift = 0;
    st = du_state_t'(out[NOBS-1:0]);
    for (int r = 0; r < NROW; r++)
      for (int c = 0; c < NCOL; c++) want[r][c] = (c % NROW == r);
    n_dbg = $countones(st.tag_arrived);
    checks++;
    if (st.tag_arrived !== want || !$onehot0(st.fire) || out[NOBS +: NDBG] !== 8'h01) begin
      failures++;
      $display("debug capture: tag_arrived=%h fire=%h freeze=%b", st.tag_arrived, st.fire,
               out[NOBS +: NDBG]);
    end
  endtask

  // ---------------- self-test reference ----------------
  // Automaton and signature register modelled from the rules in the bist
  // block's description. Concatenating the bytes of the transfers in
  // program order must give back the automaton's byte stream.
  localparam int CAN = NCOL * 11;
  logic [CAN-1:0] ca_m;
  logic [7:0]     bytes_m[$];
  int             n_bist_words;

  function automatic logic [CAN-1:0] ca_step(input logic [CAN-1:0] s);
    logic [CAN-1:0] n;
    for (int i = 0; i < CAN; i++)
      n[i] = ((i == 0) ? 1'b0 : s[i-1]) ^ ((i == CAN - 1) ? 1'b0 : s[i+1]) ^ ((i % 2 == 0) && s[i]);
    return n;
  endfunction

  task automatic bist_phase();
    logic [63:0] sig;
    int rrb, nbytes;
    do_reset();
    ca_m = {11{16'hACE1}};
    bytes_m = {};
    sig = '0; rrb = 0; nbytes = 0; n_bist_words = 0;
    bist_en = 1; run = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bist_two_op = (cyc >= 1500);
      // the FIFO takes a pattern line in every cycle it has room
      if (!if_full) begin
        for (int c = 0; c < NCOL; c++) begin
          logic [7:0] d;
          d = ca_m[c*11 +: 8];
          if (bist_two_op && ca_m[c*11 + 8 +: 3] == 3'b000) d = 8'h0F;
          bytes_m.push_back(d);
        end
        ca_m = ca_step(ca_m);
      end
      checks++;
      if (bist_sig !== sig) begin
        failures++;
        if (failures < 10) $display("signature %h expected %h", bist_sig, sig);
      end
      for (int k = 0; k < NROW; k++) begin
        int r;
        r = (rrb + k) % NROW;
        if (ob_valid[r]) begin
          checks++;
          if (k != 0) begin failures++; $display("self-test word out of row order"); end
          sig = {sig[62:0], 1'b0} ^ (sig[63] ? 64'h1B : 64'h0) ^ {2'(r), ob_data[r]};
          for (int b = 0; b < int'(ob_data[r].len); b++) begin
            checks++;
            if (ob_data[r].bytes[b] !== bytes_m[nbytes]) begin
              failures++;
              if (failures < 10) $display("self-test byte %0d: %h expected %h", nbytes,
                                          ob_data[r].bytes[b], bytes_m[nbytes]);
            end
            nbytes++;
          end
          n_bist_words++;
        end
      end
      rrb = (rrb + int'($countones(ob_valid))) % NROW;
      @(negedge clk);
    end
    bist_en = 0; bist_two_op = 0;
    $display("self-test: %0d words, %0d bytes checked, signature %h", n_bist_words, nbytes, bist_sig);
    checks++;
    if (n_bist_words < 1000) begin failures++; $display("self-test produced too little"); end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int nl;
    int k_x0[$];
    logic [7:0] none[$];
    accept_pct = 100; consume = 0;
    n_xb_stall = 0; n_inject = 0; n_pfx = 0; n_long = 0; n_unused = 0;
    n_preempt = 0; n_row_wrap = 0; n_starve = 0; n_recirc_wrap = 0; n_fires = 0; n_dbg = 0;

    // ---- phase A: long random program, loaded while running ----
    gen = new();
    while (gen.stream.size() < 60 * NCOL) gen.rand_insn(15, 8);
    gen.finish();
    nl = gen.nlines();
    do_reset();
    for (int l = 0; l < 32; l++) load(l);
    run = 1; consume = 1;
    fork
      for (int l = 32; l < nl; l++) load(l);
      forever begin
        accept_pct = 0;               // always open with a pause: buffers fill
        repeat (60) @(negedge clk);
        accept_pct = ($urandom_range(0, 2) == 0) ? 0 : 90;
        repeat (40) @(negedge clk);
      end
    join_any
    disable fork;
    accept_pct = 90;
    while (got < gen.exp.size()) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (ob_valid != '0) begin
      failures++;
      $display("transfers left over after the program");
    end
    $display("phase A: %0d lines, %0d instructions (%0d prefixed, %0d long, %0d branches), %0d transfers",
             nl, gen.n_insn, gen.n_prefix, gen.n_long, gen.n_branch, got);

    // ---- phase B: throughput experiments, FIFO in cyclic mode ----
    for (int i = 0; i <= 8; i++) begin
      int k[$];
      k = {};
      repeat (i) k.push_back(4);          // length 2, decided by the first byte
      repeat (16 - 2*i) k.push_back(0);   // length 1
      line_of(k);
      rate_test($sformatf("X%0d", i), 1'b1);
    end
    line_of({6, 6, 6, 6, 6, 6, 6, 6});    // length 2 with ModR/M
    rate_test("I0", 1'b1);
    line_of({7, 7, 7, 7, 9});
    rate_test("C34", 1'b1);
    line_of({4, 4, 7, 7, 7, 7});
    rate_test("C223", 1'b1);
    line_of({16, 0, 0, 0, 0, 0, 0, 0, 0, 0});  // one instruction padded by length 1
    rate_test("Power1", 1'b1);
    gen = new();
    while (gen.stream.size() <= 14 * NCOL - 8) gen.insn(none, $urandom_range(0, 12), 1'b0);
    gen.finish();
    rate_test("Mix0", 1'b1);
    gen = new();
    while (gen.stream.size() <= 18 * NCOL - 8) gen.insn(none, $urandom_range(0, 17), 1'b0);
    gen.finish();
    rate_test("Mix1", 1'b0);

    // ---- debug freeze ----
    k_x0 = {};
    repeat (16) k_x0.push_back(0);
    line_of(k_x0);
    debug_test();

    // ---- phase C: self-test ----
    bist_phase();

    // ---- every mechanism must have happened ----
    $display("mechanisms: xb_stall=%0d inject=%0d prefix_split=%0d long_split=%0d unused_skip=%0d",
             n_xb_stall, n_inject, n_pfx, n_long, n_unused);
    $display("            preempt=%0d row3_to_row0=%0d byte_starve=%0d fifo_replay=%0d fires=%0d",
             n_preempt, n_row_wrap, n_starve, n_recirc_wrap, n_fires);
    $display("            debug_frozen_tag_units=%0d", n_dbg);
    checks++; if (n_xb_stall == 0)    begin failures++; $display("no output buffer stall"); end
    checks++; if (n_inject == 0)      begin failures++; $display("no branch INJECT"); end
    checks++; if (n_pfx == 0)         begin failures++; $display("no prefix split"); end
    checks++; if (n_long == 0)        begin failures++; $display("no long split"); end
    checks++; if (n_unused == 0)      begin failures++; $display("no unused byte"); end
    checks++; if (n_preempt == 0)     begin failures++; $display("no preempt"); end
    checks++; if (n_row_wrap == 0)    begin failures++; $display("no row wrap"); end
    checks++; if (n_starve == 0)      begin failures++; $display("no byte starvation"); end
    checks++; if (n_bist_words == 0)  begin failures++; $display("no self-test"); end
    checks++; if (n_recirc_wrap == 0) begin failures++; $display("no FIFO replay"); end
    checks++; if (n_dbg == 0)         begin failures++; $display("no debug freeze"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
