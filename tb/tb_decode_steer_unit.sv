// tb_decode_steer_unit: drives the decode and steer unit straight from
// per-column byte queues, without the input FIFO. Each column's byte is
// offered only some of the time, so the columns run out of step as they do
// behind the real FIFO, and the consumer of the output buffers stalls at
// random. Random programs with prefixes, 8..11-byte instructions and taken
// branches must come out transfer by transfer as the reference predicts,
// reading rows 0,1,2,3,0,... . A directed run checks the latency (byte
// offered to transfer visible: 2 clocks) and a rate of one transfer per
// clock with all bytes available.
module tb_decode_steer_unit;
  import rappid_pkg::*;
  import rappid_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCOL-1:0] if_valid, if_pop;
  if_byte_t [NCOL-1:0] if_data;
  logic [NROW-1:0] ob_pop = '0, ob_valid;
  xb_entry_t [NROW-1:0] ob_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  decode_steer_unit u_dut (.clk, .rst_n, .if_valid, .if_data, .if_pop, .ob_pop, .ob_valid,
                           .ob_data);

  prog_gen gen;
  int      ptr[NCOL];
  int      offer_pct, accept_pct, rr, got, n_stall;
  bit      active;

  // per-column byte sources
  always_comb begin
    for (int c = 0; c < NCOL; c++) begin
      int idx;
      idx = ptr[c] * NCOL + c;
      if_valid[c] = active && (idx < gen.stream.size()) && offer_ok[c];
      if_data[c]  = (idx < gen.stream.size()) ? gen.stream[idx] : '0;
    end
  end
  logic [NCOL-1:0] offer_ok;
  always @(negedge clk) for (int c = 0; c < NCOL; c++) offer_ok[c] <= ($urandom_range(0, 99) < offer_pct);
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCOL; c++) if (if_pop[c]) ptr[c]++;
    if (u_dut.ob_full != '0) n_stall++;
  end

  // consumer
  always @(negedge clk) begin
    ob_pop = '0;
    if (active && ob_valid[rr] && ($urandom_range(0, 99) < accept_pct)) begin
      checks++;
      if (got >= gen.exp.size() || ob_data[rr] !== gen.exp[got]) begin
        failures++;
        if (failures < 10) $display("MISMATCH #%0d row %0d: got %s", got, rr, show(ob_data[rr]));
      end
      ob_pop[rr] = 1'b1;
      rr = (rr + 1) % NROW;
      got++;
    end
  end

  task automatic start();
    active = 0; rr = 0; got = 0;
    for (int c = 0; c < NCOL; c++) ptr[c] = 0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    logic [7:0] none[$];
    none = {};
    n_stall = 0;
    offer_pct = 100; accept_pct = 100;
    gen = new();
    // ---- latency and rate: sixteen one-byte instructions per line ----
    for (int i = 0; i < 64; i++) gen.insn(none, 0, 1'b0);
    start();
    active = 1;
    @(negedge clk);  // bytes offered, popped at the next edge
    checks++;
    if (ob_valid != '0) begin failures++; $display("transfer too early"); end
    @(negedge clk);
    checks++;
    if (ob_valid[0] !== 1'b1) begin failures++; $display("first transfer not after 2 clocks"); end
    repeat (20) @(negedge clk);
    checks++;
    if (got < 20) begin failures++; $display("rate: %0d transfers in 21 clocks", got); end
    while (got < gen.exp.size()) @(negedge clk);

    // ---- random programs, columns out of step, consumer stalling ----
    for (int run = 0; run < 12; run++) begin
      gen = new();
      while (gen.stream.size() < 40 * NCOL) gen.rand_insn(20, 10);
      gen.finish();
      offer_pct  = (run % 3 == 0) ? 100 : 30 + 10 * (run % 4);
      accept_pct = (run % 2 == 0) ? 100 : 20;
      start();
      active = 1;
      fork
        while (got < gen.exp.size()) @(negedge clk);
        repeat (40000) @(negedge clk);
      join_any
      disable fork;
      repeat (10) @(negedge clk);
      checks++;
      if (got != gen.exp.size() || ob_valid != '0) begin
        failures++;
        $display("run %0d: %0d of %0d transfers", run, got, gen.exp.size());
      end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("output buffers never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
