// length_decoder: speculative IA32 instruction length decoder of one byte
// column.
//
// The decoder assumes an instruction (not a prefix) starts at b0 and works
// out its length from the opcode and, where the opcode needs them, the
// following three bytes b1..b3 (second opcode byte, ModR/M, SIB). It covers
// the one-byte opcode map and the 0F two-byte map of 32-bit protected mode,
// with operand-size (op16) and address-size (ad16) overrides coming from an
// upstream prefix. A prefix byte at b0 is reported on is_prefix; the length
// output is then 1. Lengths of 1..11 are produced; the column turns lengths
// above seven into a four-byte head and a tail.
//
// It is purely combinational. A byte beyond b0 is looked at only once the
// bytes before it have shown the instruction reaches that far, so when any
// byte of the instruction has not arrived yet the length may be wrong but
// always covers a byte that is not ready: the instruction-ready logic of the
// column therefore never accepts a length computed from stale bytes.
//
// The source decodes common opcodes in fast domino logic and rare ones in a
// slower PLA; here all opcodes decode in the same combinational block. The
// length is returned in binary; the column converts it to the seven one-hot
// length lines. The source takes fewer than 24 bits from the three
// neighbours; this decoder reads all of them.
module length_decoder
  import rappid_pkg::*;
(
  input  logic [7:0] b0,        // byte of this column (candidate opcode)
  input  logic [7:0] b1,        // next three bytes downstream
  input  logic [7:0] b2,
  input  logic [7:0] b3,
  input  logic       op16,      // 16-bit operand size in force
  input  logic       ad16,      // 16-bit addressing in force
  output logic [3:0] len,       // instruction length in bytes, 1..11
  output logic       is_prefix  // b0 is a prefix byte
);

  // Bytes taken by ModR/M, SIB and displacement, given the ModR/M byte and
  // the byte after it (the SIB candidate).
  function automatic logic [3:0] modrm_len(input logic [7:0] m, input logic [7:0] sib,
                                           input logic a16);
    logic [1:0] md;
    logic [2:0] rm;
    md = m[7:6];
    rm = m[2:0];
    if (md == 2'b11) return 4'd1;
    if (a16) begin
      case (md)
        2'b00:   return (rm == 3'b110) ? 4'd3 : 4'd1;
        2'b01:   return 4'd2;
        default: return 4'd3;
      endcase
    end
    case (md)
      2'b00: begin
        if (rm == 3'b100) return (sib[2:0] == 3'b101) ? 4'd6 : 4'd2;
        return (rm == 3'b101) ? 4'd5 : 4'd1;
      end
      2'b01:   return (rm == 3'b100) ? 4'd3 : 4'd2;
      default: return (rm == 3'b100) ? 4'd6 : 4'd5;
    endcase
  endfunction

  logic [3:0] z;      // full-size immediate
  logic [3:0] mlen1;  // ModR/M part when ModR/M is b1
  logic [3:0] mlen2;  // ModR/M part when ModR/M is b2 (0F map)
  logic [3:0] l1;     // one-byte map length
  logic [3:0] l2;     // 0F map length

  always_comb begin
    z     = op16 ? 4'd2 : 4'd4;
    mlen1 = modrm_len(b1, b2, ad16);
    mlen2 = modrm_len(b2, b3, ad16);

    // ---- one-byte opcode map ----
    l1 = 4'd1;
    if (b0 < 8'h40) begin
      case (b0[2:0])
        3'd0, 3'd1, 3'd2, 3'd3: l1 = 4'd1 + mlen1;  // ALU r/m forms
        3'd4:                   l1 = 4'd2;          // ALU AL,imm8
        3'd5:                   l1 = 4'd1 + z;      // ALU eAX,imm
        default:                l1 = 4'd1;          // push/pop seg, DAA.., prefixes
      endcase
    end else begin
      case (b0)
        8'h62, 8'h63:                 l1 = 4'd1 + mlen1;
        8'h68:                        l1 = 4'd1 + z;
        8'h69:                        l1 = 4'd1 + mlen1 + z;
        8'h6A:                        l1 = 4'd2;
        8'h6B:                        l1 = 4'd2 + mlen1;
        8'h80, 8'h82, 8'h83:          l1 = 4'd2 + mlen1;
        8'h81:                        l1 = 4'd1 + mlen1 + z;
        8'h9A, 8'hEA:                 l1 = 4'd3 + z;            // far pointer
        8'hA0, 8'hA1, 8'hA2, 8'hA3:   l1 = ad16 ? 4'd3 : 4'd5;  // moffs
        8'hA8:                        l1 = 4'd2;
        8'hA9:                        l1 = 4'd1 + z;
        8'hC0, 8'hC1, 8'hC6:          l1 = 4'd2 + mlen1;
        8'hC2, 8'hCA:                 l1 = 4'd3;
        8'hC4, 8'hC5:                 l1 = 4'd1 + mlen1;
        8'hC7:                        l1 = 4'd1 + mlen1 + z;
        8'hC8:                        l1 = 4'd4;
        8'hCD, 8'hD4, 8'hD5, 8'hEB:   l1 = 4'd2;
        8'hE8, 8'hE9:                 l1 = 4'd1 + z;
        8'hF6:                        l1 = 4'd1 + mlen1 + ((b1[5:4] == 2'b00) ? 4'd1 : 4'd0);
        8'hF7:                        l1 = 4'd1 + mlen1 + ((b1[5:4] == 2'b00) ? z : 4'd0);
        8'hFE, 8'hFF:                 l1 = 4'd1 + mlen1;
        default: begin
          if (b0 >= 8'h70 && b0 <= 8'h7F)      l1 = 4'd2;          // Jcc rel8
          else if (b0 >= 8'h84 && b0 <= 8'h8F) l1 = 4'd1 + mlen1;  // MOV, TEST, XCHG, LEA, POP
          else if (b0 >= 8'hB0 && b0 <= 8'hB7) l1 = 4'd2;          // MOV r8,imm8
          else if (b0 >= 8'hB8 && b0 <= 8'hBF) l1 = 4'd1 + z;      // MOV r,imm
          else if (b0 >= 8'hD0 && b0 <= 8'hD3) l1 = 4'd1 + mlen1;  // shifts
          else if (b0 >= 8'hD8 && b0 <= 8'hDF) l1 = 4'd1 + mlen1;  // x87
          else if (b0 >= 8'hE0 && b0 <= 8'hE7) l1 = 4'd2;          // LOOP, JCXZ, IN, OUT
          else                                 l1 = 4'd1;
        end
      endcase
    end

    // ---- 0F two-byte opcode map ----
    l2 = 4'd2 + mlen2;  // most 0F opcodes take a ModR/M byte
    case (b1)
      8'h05, 8'h06, 8'h07, 8'h08, 8'h09, 8'h0A, 8'h0B, 8'h0C, 8'h0E, 8'h0F,
      8'h77, 8'hA0, 8'hA1, 8'hA2, 8'hA8, 8'hA9, 8'hAA:
        l2 = 4'd2;
      8'h70, 8'h71, 8'h72, 8'h73, 8'hA4, 8'hAC, 8'hBA,
      8'hC2, 8'hC4, 8'hC5, 8'hC6:
        l2 = 4'd3 + mlen2;
      default: begin
        if (b1 >= 8'h30 && b1 <= 8'h3F)      l2 = 4'd2;      // MSR, TSC, SYSENTER..
        else if (b1 >= 8'h80 && b1 <= 8'h8F) l2 = 4'd2 + z;  // Jcc rel
        else if (b1 >= 8'hC8 && b1 <= 8'hCF) l2 = 4'd2;      // BSWAP
        else if (b1 >= 8'h24 && b1 <= 8'h27) l2 = 4'd2;      // unused
      end
    endcase

    is_prefix = is_prefix_byte(b0);
    if (is_prefix)         len = 4'd1;
    else if (b0 == 8'h0F)  len = l2;
    else                   len = l1;
  end

endmodule
