// tb_tag_unit: checks the tag unit's three-event rendezvous. A tag arriving
// on any of the seven TagIn lines or through INJECT is held; the unit fires
// only in a cycle where it holds the tag, InstRdy and XBRdy are all high, in
// whatever order they came; firing pulses the TagOut line of the column's
// length for one cycle (or inject_out for a branch) and drops the tag. A
// second unit built with INIT_TAG holds the tag straight out of reset.
module tb_tag_unit;
  import rappid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [MAXLEN-1:0] tag_in = '0, len_onehot = 7'b0000001;
  logic inject_take = 1'b0, inst_rdy = 1'b0, xb_rdy = 1'b0, branch = 1'b0;
  logic [MAXLEN-1:0] tag_out, tag_out1;
  logic inject_out, fire, tag_arrived, inject_out1, fire1, tag_arrived1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tag_unit u_dut (.clk, .rst_n, .tag_in, .inject_take, .inst_rdy, .xb_rdy, .len_onehot,
                  .branch, .tag_out, .inject_out, .fire, .tag_arrived);
  tag_unit #(.INIT_TAG(1'b1)) u_init (.clk, .rst_n, .tag_in('0), .inject_take(1'b0),
                  .inst_rdy(1'b1), .xb_rdy(1'b1), .len_onehot(7'b0000100), .branch(1'b0),
                  .tag_out(tag_out1), .inject_out(inject_out1), .fire(fire1),
                  .tag_arrived(tag_arrived1));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Deliver a tag, then raise InstRdy and XBRdy in the given order with
  // random gaps, and check the unit fires exactly when the last arrives.
  task automatic rendezvous(input int order, input int line, input int len, input bit br);
    int gap;
    len_onehot = 7'(1 << (len - 1)); branch = br;
    for (int step = 0; step < 3; step++) begin
      int ev;
      ev = (order >> (2*step)) & 3;
      gap = $urandom_range(0, 3);
      repeat (gap) begin
        @(negedge clk);
        chk(!fire && tag_out == '0 && !inject_out, "no fire before all three events");
      end
      case (ev)
        0: begin
             if (line < 7) tag_in = 7'(1 << line); else inject_take = 1'b1;
             @(negedge clk);
             tag_in = '0; inject_take = 1'b0;
             chk(tag_arrived, "TagArrived set by the tag");
           end
        1: inst_rdy = 1'b1;
        default: xb_rdy = 1'b1;
      endcase
      if (step < 2) begin
        #1;
        chk(!fire, "no fire with two events");
      end
    end
    #1;
    chk(fire, "fire with all three events");
    chk(br ? (tag_out == '0 && inject_out) : (tag_out == 7'(1 << (len - 1)) && !inject_out),
        "TagOut line of the length, or INJECT for a branch");
    @(negedge clk);
    chk(!tag_arrived, "tag dropped after firing");
    #1;
    chk(!fire && tag_out == '0, "TagOut is a one-cycle pulse");
    inst_rdy = 1'b0; xb_rdy = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(tag_arrived1 && fire1 && tag_out1 == 7'b0000100, "INIT_TAG unit fires out of reset");
    chk(!tag_arrived, "plain unit starts without the tag");
    @(negedge clk);
    chk(!tag_arrived1 && tag_out1 == '0, "INIT_TAG unit passed its tag on");
    // all six orders of the three events, every tag line, both kinds
    for (int i = 0; i < 60; i++) begin
      int perms[6] = '{6'b100100, 6'b011000, 6'b100001, 6'b001001, 6'b010010, 6'b000110};
      rendezvous(perms[i % 6], i % 8, $urandom_range(1, 7), (i % 5) == 4);
    end
    // XBRdy falling holds the tag
    tag_in = 7'b0001000; @(negedge clk); tag_in = '0;
    inst_rdy = 1'b1;
    repeat (3) begin @(negedge clk); chk(tag_arrived && !fire, "held while XBRdy is low"); end
    xb_rdy = 1'b1; #1;
    chk(fire, "fires once XBRdy rises");
    @(negedge clk);
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
