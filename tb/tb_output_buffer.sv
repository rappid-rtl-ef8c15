// tb_output_buffer: random pushes and pops against a queue model; checks the
// order and contents of what comes out, the full flag at the default depth
// and that a word written can be read the next cycle.
module tb_output_buffer;
  import rappid_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0, full, valid;
  xb_entry_t din, dout;
  xb_entry_t model[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  output_buffer u_dut (.clk, .rst_n, .push, .din, .full, .pop, .valid, .dout);

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int phase;
      phase = (i / 200) % 3;  // filling, draining, mixed
      checks++;
      if (full !== (model.size() == DEPTH) || valid !== (model.size() != 0)) begin
        failures++;
        $display("FAIL flags full=%0b valid=%0b with %0d stored", full, valid, model.size());
      end
      if (valid) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("FAIL data %h exp %h", dout, model[0]); end
      end
      push = !full && ($urandom_range(0, 99) < (phase == 0 ? 80 : phase == 1 ? 20 : 50));
      pop  = valid && ($urandom_range(0, 99) < (phase == 0 ? 20 : phase == 1 ? 80 : 50));
      din  = xb_entry_t'({$urandom, $urandom});
      @(negedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
      push = 1'b0; pop = 1'b0;
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
