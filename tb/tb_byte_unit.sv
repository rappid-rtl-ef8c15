// tb_byte_unit: directed tests of one byte column, with the testbench
// playing the input FIFO, the neighbouring columns and the tag units.
// Covered: latching and FIFO acknowledge, dropping of unused bytes, the
// line sequence count, instruction-ready waiting on the neighbours' bytes,
// release on firing and on preempt with the preempt fan-out, the prefix
// and long-instruction request/acknowledge exchange from both sides, and
// the branch flag.
module tb_byte_unit;
  import rappid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic if_valid = 1'b0, if_pop, byte_rdy, lat_t;
  if_byte_t if_byte = '0;
  logic [7:0] lat_data;
  logic [5:0] seq;
  logic [2:0][7:0] nbr_data = '0;
  logic [5:0] nbr_rdy = '0, preempt_in = '0, preempt_out;
  logic has_tag = 1'b0, fire = 1'b0, inst_rdy, branch, pc_prefix, pc_head, pc_tail;
  logic [MAXLEN-1:0] len_onehot;
  col_mode_t pfx_req_out, pfx_req_in = '0, long_req_out, long_req_in = '0;
  logic mode_valid, ack_pfx_in = 1'b0, ack_long_in = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  byte_unit u_dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic if_byte_t mk(input logic [7:0] d, input bit u = 1, input bit b = 0,
                                  input bit t = 0);
    if_byte_t x;
    x.u = u; x.b = b; x.t = t; x.data = d;
    return x;
  endfunction

  // Offer one byte and wait until the column has taken it.
  task automatic feed(input if_byte_t x);
    if_valid = 1'b1; if_byte = x;
    #1;
    while (!if_pop) begin @(negedge clk); #1; end
    @(negedge clk);
    if_valid = 1'b0;
  endtask

  task automatic fire_now();
    #1; fire = 1'b1;
    @(negedge clk);
    fire = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    chk(!byte_rdy && !inst_rdy && seq == 0, "empty after reset");

    // ---- a two-byte instruction ----
    nbr_data[0] = 8'hC0;
    feed(mk(8'h89));
    #1;
    chk(byte_rdy && lat_data == 8'h89 && seq == 1, "byte latched, sequence counted");
    chk(len_onehot == 7'b0000010, "length 2 for 89 C0");
    chk(!inst_rdy, "waits for the second byte");
    nbr_rdy[0] = 1'b1; #1;
    chk(inst_rdy, "ready once the next column holds its byte");
    chk(!if_pop, "no FIFO pop while the byte is held");
    if_valid = 1'b1; if_byte = mk(8'h90);
    #1; fire = 1'b1; #1;
    chk(preempt_out == 6'b000001, "preempt to the one byte downstream");
    chk(if_pop, "FIFO popped in the cycle the byte is released");
    @(negedge clk);
    fire = 1'b0; if_valid = 1'b0;
    #1;
    chk(byte_rdy && lat_data == 8'h90 && seq == 2, "next byte in the cycle after the release");
    chk(len_onehot == 7'b0000001 && inst_rdy, "one-byte instruction ready on its own");

    // ---- release by preempt ----
    preempt_in = 6'b000100; @(negedge clk); preempt_in = '0; #1;
    chk(!byte_rdy, "released by preempt from three columns upstream");

    // ---- unused byte dropped ----
    feed(mk(8'h66, 1'b0));
    #1;
    chk(!byte_rdy && seq == 3, "unused byte dropped but counted");

    // ---- a seven-byte instruction waits on six neighbours ----
    nbr_data = {8'h00, 8'h25, 8'h04};  // 8B 04 25 d32
    nbr_rdy = 6'b011111;
    feed(mk(8'h8B));
    #1;
    chk(len_onehot == 7'b1000000 && !inst_rdy, "length 7 waits for the sixth neighbour");
    nbr_rdy = 6'b111111; #1;
    chk(inst_rdy, "length 7 ready");
    fire_now(); #1;
    chk(!byte_rdy, "released by its own tag unit");

    // ---- prefix: request, acknowledge, one-byte prefix piece ----
    feed(mk(8'h66, 1'b1, 1'b1));
    #1;
    chk(!pfx_req_out.valid, "no request without the tag");
    has_tag = 1'b1; #1;
    chk(pfx_req_out.valid && pfx_req_out.op16 && !pfx_req_out.ad16 && pfx_req_out.branch,
        "prefix asks the next column to take op16 and the branch mark");
    chk(!inst_rdy && !branch, "prefix waits for the acknowledge");
    ack_pfx_in = 1'b1; #1;
    chk(!pfx_req_out.valid && inst_rdy && pc_prefix && len_onehot == 7'b0000001,
        "prefix goes out as a one-byte piece after the acknowledge");
    fire_now(); has_tag = 1'b0; ack_pfx_in = 1'b0;

    // ---- receiving a prefix mode: B8 decodes as mov ax,imm16 ----
    pfx_req_in = '0; pfx_req_in.valid = 1'b1; pfx_req_in.op16 = 1'b1; pfx_req_in.branch = 1'b1;
    @(negedge clk); pfx_req_in = '0;
    #1;
    chk(mode_valid, "mode taken and acknowledged");
    feed(mk(8'hB8));
    #1;
    chk(len_onehot == 7'b0000100 && branch && !pc_prefix, "op16 mode gives length 3, branch carried");
    fire_now(); #1;
    chk(!mode_valid, "mode cleared with the byte");

    // ---- long instruction: C7 05 d32 imm32 (10 bytes) ----
    nbr_data = {8'h11, 8'h22, 8'h05};
    feed(mk(8'hC7));
    has_tag = 1'b1; #1;
    chk(long_req_out.valid && long_req_out.tail && long_req_out.tail_len == 3'd6,
        "long instruction asks column +4 for a tail of 6");
    chk(!inst_rdy, "head waits for the acknowledge");
    ack_long_in = 1'b1; #1;
    chk(inst_rdy && pc_head && len_onehot == 7'b0001000 && !long_req_out.valid,
        "head goes out as four bytes");
    chk(preempt_out == 6'b000000, "no preempt before firing");
    fire = 1'b1; #1;
    chk(preempt_out == 6'b000111, "head releases the three bytes after it");
    @(negedge clk); fire = 1'b0; has_tag = 1'b0; ack_long_in = 1'b0;

    // ---- receiving a tail ----
    long_req_in = '0; long_req_in.valid = 1'b1; long_req_in.tail = 1'b1;
    long_req_in.tail_len = 3'd5;
    @(negedge clk); long_req_in = '0;
    feed(mk(8'h44));
    #1;
    chk(pc_tail && len_onehot == 7'b0010000 && inst_rdy && !branch, "tail of length 5");
    fire_now();

    // ---- branch and target marks ----
    feed(mk(8'hEB, 1'b1, 1'b1, 1'b1));
    #1;
    chk(branch && lat_t, "branch and target marks visible");
    fire_now();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
