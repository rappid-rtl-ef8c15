// rappid_tb_pkg: stimulus and reference model shared by the testbenches of
// the decode and steer unit and of the top.
//
// prog_gen builds a byte stream of 16-byte lines from instruction templates
// whose lengths are written out by hand here, independently of the RTL
// length decoder. It sets the used/branch/target marks the way a fetch unit
// would: after a predicted taken branch the rest of the line holding the
// branch's last byte is unused, the next line is unused up to the target,
// and the target's first byte carries the target mark. Next to the bytes it
// keeps the expected sequence of crossbar transfers: one per prefix byte,
// then the instruction, split into a 4-byte head and a tail when it is
// longer than seven bytes.
package rappid_tb_pkg;
  import rappid_pkg::*;

  class prog_gen;
    if_byte_t  stream[$];  // bytes, line after line
    xb_entry_t exp[$];     // expected transfers in program order
    bit        want_target;
    int        n_prefix, n_long, n_branch, n_insn;

    function new();
      want_target = 0;
      n_prefix = 0; n_long = 0; n_branch = 0; n_insn = 0;
    endfunction

    function automatic logic [7:0] rnd8();
      return 8'($urandom);
    endfunction

    // ModR/M with a register operand in reg and rm=000 (no SIB), mod as given.
    function automatic logic [7:0] modrm(input logic [1:0] md, input logic [2:0] rm);
      return {md, 3'($urandom_range(0, 7)), rm};
    endfunction

    // One instruction body (no prefix) of the given template number and its
    // length. Template lengths are the IA32 encodings' sizes in 32-bit mode,
    // or in 16-bit operand/address size where op16/ad16 say so.
    function automatic void body(input int kind, input bit op16, input bit ad16,
                                 output logic [7:0] q[$]);
      q = {};
      case (kind)
        0:  q = {8'h90};                                         // nop
        1:  q = {8'(8'h40 + $urandom_range(0, 15))};             // inc/dec r32
        2:  q = {8'(8'h50 + $urandom_range(0, 15))};             // push/pop r32
        3:  q = {8'hC3};                                         // ret
        4:  q = {8'h6A, rnd8()};                                 // push imm8
        5:  q = {8'(8'h70 + $urandom_range(0, 15)), rnd8()};     // jcc rel8
        6:  q = {8'h89, modrm(2'b11, 3'($urandom_range(0, 7)))}; // mov r,r
        7:  q = {8'h8B, modrm(2'b01, 3'b000), rnd8()};           // mov r,[eax+d8]     3
        8:  q = {8'h0F, 8'hAF, modrm(2'b11, 3'b001)};            // imul r,r           3
        9:  q = {8'h83, modrm(2'b01, 3'b011), rnd8(), rnd8()};   // add [ebx+d8],i8    4
        10: q = {8'h8B, 8'h44, 8'h24, rnd8()};                   // mov r,[esp+d8]     4
        11: q = {8'hB8, rnd8(), rnd8(), rnd8(), rnd8()};         // mov eax,imm32      5
        12: q = {8'hE8, rnd8(), rnd8(), rnd8(), rnd8()};         // call rel32         5
        13: q = {8'h81, modrm(2'b11, 3'b010), rnd8(), rnd8(), rnd8(), rnd8()};   // 6
        14: q = {8'h0F, 8'h84, rnd8(), rnd8(), rnd8(), rnd8()};  // jz rel32           6
        15: q = {8'h8B, 8'h05, rnd8(), rnd8(), rnd8(), rnd8()};  // mov r,[d32]        6
        16: q = {8'hC7, 8'h45, rnd8(), rnd8(), rnd8(), rnd8(), rnd8()};  // mov [ebp+d8],imm32 7
        17: q = {8'h8B, 8'h04, 8'h25, rnd8(), rnd8(), rnd8(), rnd8()};  // mov r,[d32] via SIB 7
        18: q = {8'hC7, 8'h44, 8'h24, rnd8(), rnd8(), rnd8(), rnd8(), rnd8()};  // 8
        19: q = {8'h0F, 8'hBA, 8'h84, 8'h24, rnd8(), rnd8(), rnd8(), rnd8(), rnd8()};  // 9
        20: q = {8'hC7, 8'h05, rnd8(), rnd8(), rnd8(), rnd8(), rnd8(), rnd8(), rnd8(), rnd8()};  // 10
        21: q = {8'h81, 8'h84, 8'h24, rnd8(), rnd8(), rnd8(), rnd8(),
                 rnd8(), rnd8(), rnd8(), rnd8()};                // add [esp+d32],imm32 11
        22: q = {8'hD9, modrm(2'b00, 3'b011)};                   // fld [ebx]          2
        23: q = {8'hF7, 8'hC1, rnd8(), rnd8(), rnd8(), rnd8()};  // test ecx,imm32     6
        24: q = {8'hF7, 8'hD9};                                  // neg ecx            2
        25: q = {8'hEB, rnd8()};                                 // jmp rel8           2
        // forms whose size depends on an override
        26: if (op16) q = {8'hB8, rnd8(), rnd8()};               // mov ax,imm16       3
            else      q = {8'hB8, rnd8(), rnd8(), rnd8(), rnd8()};
        27: q = {8'h8B, 8'h46, rnd8()};                          // [esi+d8] / [bp+d8]  3
        28: begin                                                 // mov [d32]/[di],imm
              q = {8'hC7, 8'h05};
              if (!ad16) repeat (4) q.push_back(rnd8());
              repeat (op16 ? 2 : 4) q.push_back(rnd8());
            end
        29: if (ad16) q = {8'hA1, rnd8(), rnd8()};               // mov ax,[moffs16]   3
            else      q = {8'hA1, rnd8(), rnd8(), rnd8(), rnd8()};
        default: q = {8'h90};
      endcase
    endfunction

    function automatic void put(input logic [7:0] d, input bit u, input bit b, input bit t);
      if_byte_t x;
      x.u = u; x.b = b; x.t = t; x.data = d;
      stream.push_back(x);
    endfunction

    function automatic void piece(input logic [7:0] q[$], input int from, input int n,
                                  input bit pfx, input bit head, input bit tail);
      xb_entry_t e;
      e = '0;
      e.len = 3'(n);
      for (int k = 0; k < n; k++) e.bytes[k] = q[from + k];
      e.is_prefix = pfx; e.long_head = head; e.long_tail = tail;
      exp.push_back(e);
    endfunction

    // Append one instruction: prefixes pfx (each 8'h66, 8'h67, 8'hF3, ...),
    // then a body of template kind; is_branch marks it a taken branch.
    function automatic void insn(input logic [7:0] pfx[$], input int kind, input bit is_branch);
      logic [7:0] q[$];
      bit op16, ad16;
      int first;
      op16 = 0; ad16 = 0;
      foreach (pfx[i]) begin
        if (pfx[i] == 8'h66) op16 = 1;
        if (pfx[i] == 8'h67) ad16 = 1;
      end
      body(kind, op16, ad16, q);
      first = 1;
      foreach (pfx[i]) begin
        logic [7:0] one[$];
        one = {pfx[i]};
        put(pfx[i], 1'b1, is_branch && first, want_target && first);
        first = 0;
        piece(one, 0, 1, 1'b1, 1'b0, 1'b0);
        n_prefix++;
      end
      foreach (q[i]) put(q[i], 1'b1, is_branch && first && (i == 0), want_target && first && (i == 0));
      want_target = 0;
      if (q.size() > MAXLEN) begin
        piece(q, 0, 4, 1'b0, 1'b1, 1'b0);
        piece(q, 4, q.size() - 4, 1'b0, 1'b0, 1'b1);
        n_long++;
      end else begin
        piece(q, 0, q.size(), 1'b0, 1'b0, 1'b0);
      end
      n_insn++;
      if (is_branch) begin
        int t;
        n_branch++;
        while (stream.size() % NCOL != 0) put(rnd8(), 1'b0, 1'b0, 1'b0);
        t = $urandom_range(0, NCOL - 1);
        for (int i = 0; i < t; i++) put(rnd8(), 1'b0, 1'b0, 1'b0);
        want_target = 1;
      end
    endfunction

    // A random instruction: plain, prefixed, long or branch.
    function automatic void rand_insn(input int p_pfx, input int p_branch);
      logic [7:0] pfx[$];
      int kind;
      pfx = {};
      if ($urandom_range(0, 99) < p_pfx) begin
        case ($urandom_range(0, 3))
          0: pfx = {8'h66};
          1: pfx = {8'h67};
          2: pfx = {8'hF3};
          default: pfx = {8'h66, 8'h67};
        endcase
        kind = $urandom_range(26, 29);
      end else begin
        kind = $urandom_range(0, 25);
      end
      insn(pfx, kind, $urandom_range(0, 99) < p_branch);
    endfunction

    // Close the stream with one-byte instructions up to a line boundary.
    function automatic void finish();
      logic [7:0] none[$];
      none = {};
      if (want_target) insn(none, 0, 1'b0);
      while (stream.size() % NCOL != 0) insn(none, 0, 1'b0);
    endfunction

    function automatic int nlines();
      return stream.size() / NCOL;
    endfunction
  endclass

  function automatic string show(input xb_entry_t e);
    return $sformatf("len=%0d pfx=%0b head=%0b tail=%0b bytes=%h",
                     e.len, e.is_prefix, e.long_head, e.long_tail, e.bytes);
  endfunction

endpackage
