// spec_commit_unit: Speculation Commit Unit of the Instruction Identifier.
//
// When the Instruction Identifier meets an instruction whose length it does
// not know (the predicted instruction P), it predicts that length and places
// the speculative instruction S right behind it. This unit holds the two
// sizers that check both in the same cycle: one sizes P at O_p, the other
// sizes S at O_s = O_p + predicted length. If P's real length equals the
// prediction, S's pointer was right and S's own length is known as well, so
// the next sequential offset is the end of S; otherwise it is the end of P.
// This follows the published design; the split-line rule is this design's reading:
// an instruction is split-line when it starts in the current line and ends
// in the next one (the fetcher holds the current and the next line, so both
// sizers always see whole instructions).
//
// Interface: line holds 2*LINE_BYTES bytes, byte 0 being the first byte of
// the current line. Offsets are relative to that byte. p_off must lie in the
// current line. Timing: combinational.
module spec_commit_unit
  import fetch_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned MAX_PREFIX = 11,
  localparam int unsigned OFF_W     = $clog2(2 * LINE_BYTES) + 1
) (
  input  logic [8*2*LINE_BYTES-1:0] line,
  input  logic [OFF_W-1:0]          p_off,     // O_p
  input  logic [LEN_W-1:0]          pred_len,  // predicted length of P
  output logic [LEN_W-1:0]          len_p,     // real length of P
  output logic [LEN_W-1:0]          len_s,     // real length of S
  output logic [OFF_W-1:0]          s_off,     // O_s
  output logic [OFF_W-1:0]          p_end,     // offset after P
  output logic [OFF_W-1:0]          s_end,     // offset after S
  output logic                      correct,   // predicted length of P was right
  output logic                      split_p,   // P crosses into the next line
  output logic                      split_s,   // S crosses into the next line
  output logic                      s_in_line, // S starts inside the current line
  output logic [OFF_W-1:0]          next_off   // next sequential offset
);

  localparam int unsigned PAIR = 2 * LINE_BYTES;

  // SIZER_WIN bytes starting at offset o; bytes past the line pair read as 0.
  function automatic logic [8*SIZER_WIN-1:0] window(input logic [8*PAIR-1:0] l,
                                                    input logic [OFF_W-1:0]   o);
    logic [8*SIZER_WIN-1:0] w;
    for (int i = 0; i < SIZER_WIN; i++) begin
      if (int'(o) + i < PAIR) w[8*i +: 8] = l[8*(int'(o) + i) +: 8];
      else                    w[8*i +: 8] = 8'h00;
    end
    return w;
  endfunction

  logic [8*SIZER_WIN-1:0] win_p, win_s;
  logic [3:0]             pfx_p, pfx_s;
  logic                   mrm_p, mrm_s;

  assign s_off = p_off + OFF_W'(pred_len);
  assign win_p = window(line, p_off);
  assign win_s = window(line, s_off);

  x86_sizer #(.MAX_PREFIX(MAX_PREFIX)) u_sizer_p (
    .win(win_p), .len(len_p), .prefixes(pfx_p), .has_modrm(mrm_p));
  x86_sizer #(.MAX_PREFIX(MAX_PREFIX)) u_sizer_s (
    .win(win_s), .len(len_s), .prefixes(pfx_s), .has_modrm(mrm_s));

  assign p_end     = p_off + OFF_W'(len_p);
  assign s_end     = s_off + OFF_W'(len_s);
  assign correct   = (len_p == pred_len);
  assign split_p   = p_end > OFF_W'(LINE_BYTES);
  assign split_s   = s_end > OFF_W'(LINE_BYTES);
  assign s_in_line = s_off < OFF_W'(LINE_BYTES);
  assign next_off  = (correct && !split_p && s_in_line) ? s_end : p_end;

endmodule
