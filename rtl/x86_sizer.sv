// x86_sizer: combinational IA-32 instruction length decoder.
//
// Given the first SIZER_WIN (15) bytes of an instruction, it returns the
// instruction length in bytes. The length is found by a chain of checks on the
// prefix bytes, the first opcode byte (Op1), the second opcode byte after 0Fh
// (Op2), the ModR/M byte and the SIB byte, as the fetch unit's sizers are
// described; the tables of which opcodes carry a ModR/M byte and which carry an
// immediate are this design's own, written from the IA-32 opcode maps (32-bit
// code segment: default operand and address size 32; 66h selects 16-bit
// operands, 67h selects 16-bit addressing).
//
// Prefix scanning stops after MAX_PREFIX prefix bytes; the byte after them is
// taken as the opcode. Coverage: the one-byte map, the two-byte (0Fh) map of
// the integer, x87, MMX and SSE generations. Three-byte maps (0F38h/0F3Ah),
// 3DNow! and VEX are not sized specially (0F38h/0F3Ah are treated as a
// two-byte opcode with ModR/M). 0F 20-23h (MOV to/from CR/DR) are sized as
// ordinary ModR/M instructions.
//
// Interface: win[8*i +: 8] is byte i of the instruction (byte 0 first).
// len is the length; prefixes/has_modrm are exported for observation.
// Timing: purely combinational.
module x86_sizer
  import fetch_pkg::*;
#(
  parameter int unsigned MAX_PREFIX = 11
) (
  input  logic [8*SIZER_WIN-1:0] win,
  output logic [LEN_W-1:0]       len,
  output logic [3:0]             prefixes,
  output logic                   has_modrm
);

  function automatic logic is_prefix(input logic [7:0] b);
    case (b)
      8'h26, 8'h2E, 8'h36, 8'h3E, 8'h64, 8'h65,
      8'h66, 8'h67, 8'hF0, 8'hF2, 8'hF3: return 1'b1;
      default:                           return 1'b0;
    endcase
  endfunction

  logic [7:0] b [SIZER_WIN];
  always_comb
    for (int i = 0; i < SIZER_WIN; i++) b[i] = win[8*i +: 8];

  logic [3:0] npfx;
  logic       opsz16, adsz16;
  logic       two_byte;
  logic [7:0] op;
  logic [3:0] mpos;     // position of the ModR/M byte
  logic [7:0] modrm, sib;
  logic [1:0] md;
  logic [2:0] rm, reg_f;
  logic [2:0] imm;      // immediate bytes
  logic [2:0] disp;     // displacement bytes
  logic       sib_p;    // SIB present
  logic [2:0] zsz;      // size of a 16/32-bit operand

  always_comb begin
    // ---- prefix check chain ------------------------------------------------
    npfx   = '0;
    opsz16 = 1'b0;
    adsz16 = 1'b0;
    for (int i = 0; i < MAX_PREFIX; i++) begin
      if (npfx == 4'(i) && is_prefix(b[i])) begin
        npfx = 4'(i + 1);
        if (b[i] == 8'h66) opsz16 = 1'b1;
        if (b[i] == 8'h67) adsz16 = 1'b1;
      end
    end
    zsz = opsz16 ? 3'd2 : 3'd4;

    // ---- opcode (Op1, Op2) ---------------------------------------------------
    two_byte = (b[npfx] == 8'h0F);
    op       = two_byte ? b[npfx + 4'd1] : b[npfx];
    mpos     = npfx + (two_byte ? 4'd2 : 4'd1);
    modrm    = (mpos < 4'(SIZER_WIN)) ? b[mpos] : 8'h00;
    md       = modrm[7:6];
    reg_f    = modrm[5:3];
    rm       = modrm[2:0];

    has_modrm = 1'b0;
    imm       = 3'd0;
    if (!two_byte) begin
      // one-byte opcode map
      if (op < 8'h40) begin
        // ALU groups 00-3F: xx0..xx3 r/m forms, xx4 AL,ib, xx5 eAX,iz
        case (op[2:0])
          3'd0, 3'd1, 3'd2, 3'd3: has_modrm = 1'b1;
          3'd4:                   imm = 3'd1;
          3'd5:                   imm = zsz;
          default: ;
        endcase
      end else begin
        case (op)
          8'h62, 8'h63, 8'h69, 8'h6B,
          8'h84, 8'h85, 8'h86, 8'h87, 8'h88, 8'h89, 8'h8A, 8'h8B,
          8'h8C, 8'h8D, 8'h8E, 8'h8F,
          8'hC4, 8'hC5, 8'hD0, 8'hD1, 8'hD2, 8'hD3,
          8'hD8, 8'hD9, 8'hDA, 8'hDB, 8'hDC, 8'hDD, 8'hDE, 8'hDF,
          8'hFE, 8'hFF:                                  has_modrm = 1'b1;
          8'h80, 8'h82, 8'h83, 8'hC0, 8'hC1, 8'hC6: begin has_modrm = 1'b1; imm = 3'd1; end
          8'h81, 8'hC7:                             begin has_modrm = 1'b1; imm = zsz;  end
          8'hF6: begin has_modrm = 1'b1; imm = (reg_f[2:1] == 2'b00) ? 3'd1 : 3'd0; end
          8'hF7: begin has_modrm = 1'b1; imm = (reg_f[2:1] == 2'b00) ? zsz  : 3'd0; end
          8'h6A, 8'hA8, 8'hCD, 8'hD4, 8'hD5, 8'hEB,
          8'hE0, 8'hE1, 8'hE2, 8'hE3, 8'hE4, 8'hE5, 8'hE6, 8'hE7: imm = 3'd1;
          8'h68, 8'hA9, 8'hE8, 8'hE9:               imm = zsz;
          8'hC2, 8'hCA:                             imm = 3'd2;
          8'hC8:                                    imm = 3'd3;
          8'h9A, 8'hEA:                             imm = zsz + 3'd2;
          8'hA0, 8'hA1, 8'hA2, 8'hA3:               imm = adsz16 ? 3'd2 : 3'd4;
          default: begin
            if (op[7:4] == 4'h7)                    imm = 3'd1;   // Jcc rel8
            else if (op[7:3] == 5'b10110)           imm = 3'd1;   // MOV r8, ib
            else if (op[7:3] == 5'b10111)           imm = zsz;    // MOV r, iz
          end
        endcase
      end
    end else begin
      // two-byte opcode map (0F xx)
      has_modrm = 1'b1;
      case (op)
        8'h05, 8'h06, 8'h07, 8'h08, 8'h09, 8'h0B, 8'h0E, 8'h77,
        8'hA0, 8'hA1, 8'hA2, 8'hA8, 8'hA9, 8'hAA:       has_modrm = 1'b0;
        8'h70, 8'h71, 8'h72, 8'h73, 8'hA4, 8'hAC, 8'hBA,
        8'hC2, 8'hC4, 8'hC5, 8'hC6:                     imm = 3'd1;
        default: begin
          if (op[7:3] == 5'b00110)      has_modrm = 1'b0;              // 30-37
          else if (op[7:3] == 5'b11001) has_modrm = 1'b0;              // C8-CF BSWAP
          else if (op[7:4] == 4'h8) begin has_modrm = 1'b0; imm = zsz; end // Jcc rel
        end
      endcase
    end

    // ---- ModR/M and SIB ------------------------------------------------------
    disp  = 3'd0;
    sib_p = 1'b0;
    sib   = 8'h00;
    if (has_modrm) begin
      if (adsz16) begin
        case (md)
          2'b00: disp = (rm == 3'b110) ? 3'd2 : 3'd0;
          2'b01: disp = 3'd1;
          2'b10: disp = 3'd2;
          default: ;
        endcase
      end else begin
        sib_p = (md != 2'b11) && (rm == 3'b100);
        sib   = (sib_p && (mpos + 4'd1 < 4'(SIZER_WIN))) ? b[mpos + 4'd1] : 8'h00;
        case (md)
          2'b00: disp = ((rm == 3'b101) || (sib_p && sib[2:0] == 3'b101)) ? 3'd4 : 3'd0;
          2'b01: disp = 3'd1;
          2'b10: disp = 3'd4;
          default: ;
        endcase
      end
    end

    len = LEN_W'(mpos) + LEN_W'(has_modrm) + LEN_W'(sib_p) + LEN_W'(disp) + LEN_W'(imm);
    prefixes = npfx;
  end

endmodule
