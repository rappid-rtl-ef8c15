// tb_bist: checks the pattern lines of the cellular automaton over many
// steps, the 0F substitution of the two-opcode mode and the signature
// register, each against a model written here from the rules stated in the
// block's description.
module tb_bist;
  import rappid_pkg::*;
  localparam int N = NCOL * 11;
  localparam logic [N-1:0] SEED = {11{16'hACE1}};
  logic clk = 1'b0, rst_n = 1'b0, next = 1'b0, two_op = 1'b0;
  if_byte_t [NCOL-1:0] line;
  logic [NROW-1:0] sig_valid = '0;
  xb_entry_t [NROW-1:0] sig_data = '0;
  logic [63:0] signature;
  logic [N-1:0] ca;
  logic [63:0] sig;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist u_dut (.clk, .rst_n, .next, .two_op, .line, .sig_valid, .sig_data, .signature);

  function automatic logic [N-1:0] step(input logic [N-1:0] s);
    logic [N-1:0] n;
    for (int i = 0; i < N; i++) begin
      logic l, r;
      l = (i == 0) ? 1'b0 : s[i-1];
      r = (i == N - 1) ? 1'b0 : s[i+1];
      n[i] = (i % 2 == 0) ? (l ^ s[i] ^ r) : (l ^ r);
    end
    return n;
  endfunction

  function automatic logic [63:0] fold(input logic [63:0] s, input logic [63:0] d);
    logic fb;
    fb = s[63];
    s = s << 1;
    if (fb) s = s ^ 64'h1B;
    return s ^ d;
  endfunction

  initial begin
    ca = SEED; sig = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      two_op = (i >= 150);
      next = ($urandom_range(0, 1) == 1);
      for (int r = 0; r < NROW; r++) begin
        sig_valid[r] = ($urandom_range(0, 1) == 1);
        sig_data[r]  = xb_entry_t'({$urandom, $urandom});
      end
      #1;
      for (int c = 0; c < NCOL; c++) begin
        logic [7:0] d;
        d = ca[c*11 +: 8];
        if (two_op && ca[c*11 + 8 +: 3] == 3'b000) d = 8'h0F;
        checks++;
        if (line[c] !== {1'b1, 1'b0, 1'b0, d}) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d byte %0d: %h expected %h", i, c, line[c], d);
        end
      end
      checks++;
      if (signature !== sig) begin
        failures++;
        if (failures < 10) $display("FAIL signature %h expected %h", signature, sig);
      end
      for (int r = 0; r < NROW; r++) if (sig_valid[r]) sig = fold(sig, {2'(r), sig_data[r]});
      if (next) ca = step(ca);
      @(negedge clk);
    end
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
