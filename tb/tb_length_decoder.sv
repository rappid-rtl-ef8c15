// tb_length_decoder: checks the speculative length decoder against IA32
// encodings whose lengths were worked out by hand from the opcode, ModR/M,
// SIB, displacement and immediate sizes, with and without operand- and
// address-size overrides.
module tb_length_decoder;
  logic [7:0] b0, b1, b2, b3;
  logic       op16, ad16;
  logic [3:0] len;
  logic       is_prefix;
  int checks = 0, failures = 0;

  length_decoder u_dut (.b0, .b1, .b2, .b3, .op16, .ad16, .len, .is_prefix);

  task automatic t(input logic [7:0] x0, input logic [7:0] x1, input logic [7:0] x2,
                   input logic [7:0] x3, input bit o16, input bit a16,
                   input int exp_len, input bit exp_pfx = 1'b0);
    b0 = x0; b1 = x1; b2 = x2; b3 = x3; op16 = o16; ad16 = a16;
    #1;
    checks++;
    if (int'(len) != exp_len || is_prefix != exp_pfx) begin
      failures++;
      $display("FAIL %h %h %h %h op16=%0b ad16=%0b: len=%0d pfx=%0b, expected %0d %0b",
               x0, x1, x2, x3, o16, a16, len, is_prefix, exp_len, exp_pfx);
    end
  endtask

  initial begin
    t(8'h90, 8'h00, 8'h00, 8'h00, 0, 0, 1);   // nop
    t(8'h50, 8'h89, 8'h04, 8'h25, 0, 0, 1);   // push eax (neighbours ignored)
    t(8'h6A, 8'h00, 8'h00, 8'h00, 0, 0, 2);   // push imm8
    t(8'h70, 8'h05, 8'h00, 8'h00, 0, 0, 2);   // jo rel8
    t(8'h89, 8'hC0, 8'h00, 8'h00, 0, 0, 2);   // mov eax,eax
    t(8'h89, 8'h45, 8'h10, 8'h00, 0, 0, 3);   // [ebp+d8]
    t(8'h89, 8'h44, 8'h24, 8'h10, 0, 0, 4);   // [esp+d8]
    t(8'h89, 8'h04, 8'h25, 8'h00, 0, 0, 7);   // [d32] via SIB
    t(8'h89, 8'h04, 8'h24, 8'h00, 0, 0, 3);   // [esp]
    t(8'h89, 8'h05, 8'h00, 8'h00, 0, 0, 6);   // [d32]
    t(8'h89, 8'h85, 8'h00, 8'h00, 0, 0, 6);   // [ebp+d32]
    t(8'h89, 8'h84, 8'h24, 8'h00, 0, 0, 7);   // [esp+d32]
    t(8'h05, 8'h00, 8'h00, 8'h00, 0, 0, 5);   // add eax,imm32
    t(8'h05, 8'h00, 8'h00, 8'h00, 1, 0, 3);   // add ax,imm16
    t(8'h04, 8'h00, 8'h00, 8'h00, 0, 0, 2);   // add al,imm8
    t(8'h0F, 8'h84, 8'h00, 8'h00, 0, 0, 6);   // jz rel32
    t(8'h0F, 8'h84, 8'h00, 8'h00, 1, 0, 4);   // jz rel16
    t(8'h0F, 8'hAF, 8'hC1, 8'h00, 0, 0, 3);   // imul eax,ecx
    t(8'h0F, 8'hAF, 8'h05, 8'h00, 0, 0, 7);   // imul eax,[d32]
    t(8'h0F, 8'hBA, 8'hE0, 8'h00, 0, 0, 4);   // bt eax,imm8
    t(8'h0F, 8'hBA, 8'h84, 8'h24, 0, 0, 9);   // bt [esp+d32],imm8
    t(8'h0F, 8'hA2, 8'h00, 8'h00, 0, 0, 2);   // cpuid
    t(8'h0F, 8'hC8, 8'h00, 8'h00, 0, 0, 2);   // bswap
    t(8'h0F, 8'h31, 8'h00, 8'h00, 0, 0, 2);   // rdtsc
    t(8'hC7, 8'h05, 8'h00, 8'h00, 0, 0, 10);  // mov [d32],imm32
    t(8'hC7, 8'h05, 8'h00, 8'h00, 1, 0, 8);   // mov [d32],imm16
    t(8'hC7, 8'h05, 8'h00, 8'h00, 0, 1, 6);   // mov [di],imm32
    t(8'hC7, 8'h05, 8'h00, 8'h00, 1, 1, 4);   // mov [di],imm16
    t(8'hC7, 8'h84, 8'h24, 8'h00, 0, 0, 11);  // mov [esp+d32],imm32
    t(8'h81, 8'hC0, 8'h00, 8'h00, 0, 0, 6);   // add eax,imm32
    t(8'h83, 8'hC0, 8'h00, 8'h00, 0, 0, 3);   // add eax,imm8
    t(8'h69, 8'hC0, 8'h00, 8'h00, 0, 0, 6);   // imul eax,eax,imm32
    t(8'h6B, 8'hC0, 8'h00, 8'h00, 0, 0, 3);   // imul eax,eax,imm8
    t(8'hF6, 8'hC0, 8'h00, 8'h00, 0, 0, 3);   // test al,imm8
    t(8'hF6, 8'hC8, 8'h00, 8'h00, 0, 0, 3);   // test al,imm8 (/1)
    t(8'hF6, 8'hD0, 8'h00, 8'h00, 0, 0, 2);   // not al
    t(8'hF7, 8'hC0, 8'h00, 8'h00, 0, 0, 6);   // test eax,imm32
    t(8'hF7, 8'hD8, 8'h00, 8'h00, 0, 0, 2);   // neg eax
    t(8'hA1, 8'h00, 8'h00, 8'h00, 0, 0, 5);   // mov eax,[moffs32]
    t(8'hA1, 8'h00, 8'h00, 8'h00, 0, 1, 3);   // mov eax,[moffs16]
    t(8'h9A, 8'h00, 8'h00, 8'h00, 0, 0, 7);   // call far ptr16:32
    t(8'h9A, 8'h00, 8'h00, 8'h00, 1, 0, 5);   // call far ptr16:16
    t(8'hC8, 8'h00, 8'h00, 8'h00, 0, 0, 4);   // enter
    t(8'hC2, 8'h00, 8'h00, 8'h00, 0, 0, 3);   // ret imm16
    t(8'hCD, 8'h21, 8'h00, 8'h00, 0, 0, 2);   // int imm8
    t(8'hE8, 8'h00, 8'h00, 8'h00, 0, 0, 5);   // call rel32
    t(8'hEB, 8'h00, 8'h00, 8'h00, 0, 0, 2);   // jmp rel8
    t(8'hE4, 8'h00, 8'h00, 8'h00, 0, 0, 2);   // in al,imm8
    t(8'h8B, 8'h46, 8'h00, 8'h00, 0, 1, 3);   // mov ax,[bp+d8]
    t(8'h8B, 8'h06, 8'h00, 8'h00, 0, 1, 4);   // mov ax,[d16]
    t(8'h8B, 8'h86, 8'h00, 8'h00, 0, 1, 4);   // mov ax,[bp+d16]
    t(8'h8B, 8'h04, 8'h25, 8'h00, 0, 1, 2);   // mov ax,[si]: no SIB in 16-bit
    t(8'hD9, 8'h05, 8'h00, 8'h00, 0, 0, 6);   // fld [d32]
    t(8'hC0, 8'hE0, 8'h00, 8'h00, 0, 0, 3);   // shl al,imm8
    t(8'hD1, 8'hE0, 8'h00, 8'h00, 0, 0, 2);   // shl eax,1
    t(8'hB0, 8'h00, 8'h00, 8'h00, 0, 0, 2);   // mov al,imm8
    t(8'hB8, 8'h00, 8'h00, 8'h00, 0, 0, 5);   // mov eax,imm32
    t(8'hB8, 8'h00, 8'h00, 8'h00, 1, 0, 3);   // mov ax,imm16
    t(8'hFF, 8'h15, 8'h00, 8'h00, 0, 0, 6);   // call [d32]
    t(8'h8D, 8'h04, 8'h85, 8'h00, 0, 0, 7);   // lea eax,[eax*4+d32]
    t(8'h63, 8'hC0, 8'h00, 8'h00, 0, 0, 2);   // arpl
    t(8'hC6, 8'h45, 8'h00, 8'h00, 0, 0, 4);   // mov [ebp+d8],imm8
    t(8'h66, 8'hB8, 8'h00, 8'h00, 0, 0, 1, 1'b1);  // operand-size prefix
    t(8'h67, 8'h8B, 8'h00, 8'h00, 0, 0, 1, 1'b1);  // address-size prefix
    t(8'hF3, 8'hA4, 8'h00, 8'h00, 0, 0, 1, 1'b1);  // rep
    t(8'h2E, 8'h00, 8'h00, 8'h00, 0, 0, 1, 1'b1);  // cs:
    t(8'hF0, 8'h00, 8'h00, 8'h00, 0, 0, 1, 1'b1);  // lock
    t(8'hA4, 8'h00, 8'h00, 8'h00, 0, 0, 1);   // movsb
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
