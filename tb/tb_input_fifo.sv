// tb_input_fifo: loads random lines through the serial scan port and reads
// them back column by column with independent random pops, against one
// queue model per column. Checks that nothing is offered while run is low,
// that the FIFO reports full at 32 lines and refuses a 33rd, and that in
// cyclic mode each column replays the loaded lines in order, wrapping back
// to the first.
module tb_input_fifo;
  import rappid_pkg::*;
  localparam int DEPTH = 32;
  localparam int LW = NCOL * 11;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scan_en = 1'b0, scan_in = 1'b0, load_line = 1'b0, recirc = 1'b0, run = 1'b0;
  logic scan_out, full;
  logic par_load = 1'b0;
  if_byte_t [NCOL-1:0] par_line = '0;
  logic [NCOL-1:0] col_pop = '0, col_valid;
  if_byte_t [NCOL-1:0] col_data;
  if_byte_t model[NCOL][$];
  if_byte_t lines[$][NCOL];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_fifo u_dut (.clk, .rst_n, .scan_en, .scan_in, .scan_out, .load_line, .par_load, .par_line, .recirc, .run,
                    .full, .col_pop, .col_valid, .col_data);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic load_random();
    logic [LW-1:0] bits;
    if_byte_t l[NCOL];
    for (int i = 0; i < LW; i += 32) bits[i +: 32] = $urandom;
    for (int c = 0; c < NCOL; c++) l[c] = bits[c*11 +: 11];
    for (int i = 0; i < LW; i++) begin
      scan_en = 1'b1; scan_in = bits[i];
      @(negedge clk);
    end
    scan_en = 1'b0;
    chk(scan_out == bits[0], "scan_out shows the first bit shifted in");
    load_line = 1'b1;
    if (!full) begin
      lines.push_back(l);
      for (int c = 0; c < NCOL; c++) model[c].push_back(l[c]);
    end
    @(negedge clk);
    load_line = 1'b0;
  endtask

  task automatic do_reset();
    rst_n = 1'b0; run = 1'b0; recirc = 1'b0;
    for (int c = 0; c < NCOL; c++) model[c] = {};
    lines = {};
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    do_reset();
    // ---- normal mode: fill to the top ----
    for (int i = 0; i < DEPTH; i++) begin
      chk(!full, "not full before 32 lines");
      load_random();
    end
    chk(full, "full at 32 lines");
    load_random();  // refused
    chk(col_valid == '0, "nothing offered while run is low");
    run = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      #1;
      for (int c = 0; c < NCOL; c++) begin
        chk(col_valid[c] == (model[c].size() != 0), "valid follows the column's count");
        if (col_valid[c]) chk(col_data[c] == model[c][0], $sformatf("column %0d data", c));
        col_pop[c] = col_valid[c] && ($urandom_range(0, 3) == 0);
      end
      @(negedge clk);
      for (int c = 0; c < NCOL; c++) if (col_pop[c]) void'(model[c].pop_front());
      col_pop = '0;
      if (cyc % 300 == 299 && !full) load_random();
    end
    // ---- cyclic mode ----
    do_reset();
    repeat (3) load_random();
    repeat (2) begin
      if_byte_t l[NCOL];
      for (int c = 0; c < NCOL; c++) begin
        l[c] = 11'($urandom);
        par_line[c] = l[c];
      end
      par_load = 1'b1;
      lines.push_back(l);
      @(negedge clk);
      par_load = 1'b0;
    end
    recirc = 1'b1; run = 1'b1;
    for (int c = 0; c < NCOL; c++) begin
      int n;
      n = $urandom_range(5, 23);
      for (int k = 0; k < n; k++) begin
        #1;
        chk(col_valid[c] && col_data[c] == lines[k % 5][c], "cyclic replay order");
        col_pop[c] = 1'b1;
        @(negedge clk);
        col_pop[c] = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
