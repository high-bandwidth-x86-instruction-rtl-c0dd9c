// instruction_identifier: the Instruction Identifier of the x86 fetch unit.
//
// The fetcher gives it a PC and the instruction bytes around it; it answers in
// the same cycle with up to DEGREE instruction pointers (program order, the
// first one at the PC) and the next sequential fetch address (NSFA). It
// remembers the pointers it has worked out in the Instruction Pointer Table,
// so code that is fetched again gets a whole group of pointers from one table
// access instead of one sizing step per instruction. Where the table knows
// too little, one instruction length is predicted (fixed at PRED_LEN bytes)
// so that two sizers can check two instructions in parallel.
//
// Structure, as in the published design's block diagram: the IPT, the Instruction
// Identifier Controller and the Speculation Commit Unit. The IPT passes O_p
// (and, through the predicted length, O_s) to the commit unit, which returns
// the real lengths and the next sequential offset to the controller.
//
// Interface: line is the cache line holding pc followed by the next line
// (2*LINE_BYTES bytes, byte 0 at the line-aligned address). pc_valid marks a
// cycle in which the fetcher uses the answer; only then is the table written.
// Timing: combinational from pc/line to the outputs, one clock edge to update
// the table.
module instruction_identifier
  import fetch_pkg::*;
#(
  parameter int unsigned DEGREE     = 4,
  parameter int unsigned ENTRIES    = 64,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned PRED_LEN   = 3,
  parameter int unsigned MAX_PREFIX = 11
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          pc_valid,
  input  logic [ADDR_W-1:0]             pc,
  input  logic [8*2*LINE_BYTES-1:0]     line,
  output logic [DEGREE-1:0]             slot_valid,
  output logic [DEGREE-1:0][ADDR_W-1:0] slot_ptr,
  output logic [DEGREE-1:0]             slot_split,
  output logic [ADDR_W-1:0]             nsfa,
  output logic                          ev_hit,
  output logic                          ev_append,
  output logic                          ev_new,
  output logic                          ev_new_s,
  output logic                          ev_pred_ok,
  output logic                          ev_pred_bad,
  output logic                          ev_split,
  output logic                          ev_full
);

  localparam int unsigned OFF_W = $clog2(2 * LINE_BYTES) + 1;
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic                       hit, rd_ev, wa_en, wb_en;
  logic [IDX_W-1:0]           hit_idx, rd_idx, wa_idx, alloc_idx;
  logic [DEGREE-1:0]          hit_v, hit_s, rd_v, rd_s, wa_v, wa_s, wb_v, wb_s;
  logic [DEGREE:1][OFF_W-1:0] hit_off, rd_off, wa_off, wb_off;
  logic [ADDR_W-1:0]          rd_pc, wb_pc;

  logic [OFF_W-1:0]           p_off, s_off, p_end, s_end, next_off;
  logic [LEN_W-1:0]           pred_len;
  logic [LEN_W-1:0]           len_p, len_s;   // observed in simulation only
  logic                       correct, split_p, split_s, s_in_line;

  ipt #(
    .DEGREE(DEGREE), .ENTRIES(ENTRIES), .ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES)
  ) u_ipt (
    .clk, .rst_n, .pc,
    .hit, .hit_idx, .hit_v, .hit_s, .hit_off,
    .rd_idx, .rd_ev, .rd_pc, .rd_v, .rd_s, .rd_off,
    .wa_en, .wa_idx, .wa_v, .wa_s, .wa_off,
    .wb_en, .wb_pc, .wb_v, .wb_s, .wb_off, .alloc_idx
  );

  spec_commit_unit #(
    .LINE_BYTES(LINE_BYTES), .MAX_PREFIX(MAX_PREFIX)
  ) u_scu (
    .line, .p_off, .pred_len, .len_p, .len_s, .s_off, .p_end, .s_end,
    .correct, .split_p, .split_s, .s_in_line, .next_off
  );

  ii_controller #(
    .DEGREE(DEGREE), .ENTRIES(ENTRIES), .ADDR_W(ADDR_W),
    .LINE_BYTES(LINE_BYTES), .PRED_LEN(PRED_LEN)
  ) u_ctl (
    .clk, .rst_n, .pc_valid, .pc,
    .hit, .hit_idx, .hit_v, .hit_s, .hit_off,
    .rd_idx, .rd_ev, .rd_pc, .rd_v, .rd_s, .rd_off,
    .wa_en, .wa_idx, .wa_v, .wa_s, .wa_off,
    .wb_en, .wb_pc, .wb_v, .wb_s, .wb_off, .alloc_idx,
    .p_off, .pred_len, .s_off, .p_end, .s_end,
    .correct, .split_p, .split_s, .s_in_line, .next_off,
    .slot_valid, .slot_ptr, .slot_split, .nsfa,
    .ev_hit, .ev_append, .ev_new, .ev_new_s,
    .ev_pred_ok, .ev_pred_bad, .ev_split, .ev_full
  );

endmodule
