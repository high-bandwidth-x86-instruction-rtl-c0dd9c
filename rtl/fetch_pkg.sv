// fetch_pkg: constants shared by the x86 fetch unit.
//
// The fetch unit identifies variable-length IA-32 instructions with an
// Instruction Pointer Table (IPT) and a length predictor. These constants fix
// the parts of the x86 encoding that every block agrees on: how many bytes a
// sizer looks at and how wide a length is. The window of 15 bytes is the
// architectural maximum instruction length; 11 prefixes plus two opcode bytes,
// ModR/M and SIB fill it exactly, which is the sizer's longest check path.
package fetch_pkg;

  // Bytes a sizer examines: up to 11 prefixes, 2 opcode bytes, ModR/M, SIB.
  localparam int unsigned SIZER_WIN = 15;

  // Width of a decoded length. The encoded length of a legal instruction is
  // at most 15, but prefixes + opcode + ModR/M + SIB + disp32 + imm32 can sum
  // to 23 for an over-long byte string, so 5 bits are kept.
  localparam int unsigned LEN_W = 5;

endpackage
