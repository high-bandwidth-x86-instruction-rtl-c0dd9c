// fetcher: fetch-PC sequencer and instruction aligner of the x86 fetch unit.
//
// Each cycle the fetcher reads the cache line holding its PC together with
// the next line, passes PC and bytes to the Instruction Identifier and gets
// back up to DEGREE instruction pointers and the next sequential fetch
// address (NSFA). For every pointer it cuts SIZER_WIN (15) bytes out of the
// line pair and hands them to a decoder slot with the instruction's address,
// length and split-line flag; a length is the distance to the next pointer,
// or to the NSFA for the last one.
//
// A taken branch ends its group: an instruction goes to a decoder only if no
// predicted-taken branch comes before it in the group. The branch predictor is
// outside; it names, for the current fetch, the address of the first branch
// it predicts taken (taken_pc) and its target. If that address is one of the
// group's pointers, the slots after it are dropped and the PC moves to
// taken_target at the next edge, with no lost cycle. Otherwise the PC moves
// to the NSFA. redirect_pc (a misprediction or a restart) overrides both and
// discards the group of that cycle.
//
// The fetcher, what passes between it and the identifier (PC, instruction
// line, instruction offsets, NSFA) and the rule that a taken branch is the
// last instruction of its group follow the published design; the line-pair buffer,
// the slot format, the branch and redirect ports and the back-pressure
// through dec_ready are this design's own.
//
// Interface: icache_addr is the line-aligned address; icache_bytes returns
// 2*LINE_BYTES bytes from there in the same cycle (byte 0 lowest). When
// dec_ready is low the PC holds, no slot is valid and the identifier is idle.
// Timing: PC register updated on the rising edge; slots are combinational.
module fetcher
  import fetch_pkg::*;
#(
  parameter int unsigned DEGREE     = 4,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter logic [ADDR_W-1:0] RESET_PC = '0
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // instruction cache
  output logic [ADDR_W-1:0]                   icache_addr,
  input  logic [8*2*LINE_BYTES-1:0]           icache_bytes,
  // Instruction Identifier
  output logic                                id_pc_valid,
  output logic [ADDR_W-1:0]                   id_pc,
  output logic [8*2*LINE_BYTES-1:0]           id_line,
  input  logic [DEGREE-1:0]                   id_slot_valid,
  input  logic [DEGREE-1:0][ADDR_W-1:0]       id_slot_ptr,
  input  logic [DEGREE-1:0]                   id_slot_split,
  input  logic [ADDR_W-1:0]                   id_nsfa,
  // predicted-taken branch in the current fetch (from a branch predictor)
  input  logic                                taken_valid,
  input  logic [ADDR_W-1:0]                   taken_pc,
  input  logic [ADDR_W-1:0]                   taken_target,
  // redirect from outside the fetch unit
  input  logic                                redirect_valid,
  input  logic [ADDR_W-1:0]                   redirect_pc,
  // decoders
  input  logic                                dec_ready,
  output logic [DEGREE-1:0]                   slot_valid,
  output logic [DEGREE-1:0][ADDR_W-1:0]       slot_pc,
  output logic [DEGREE-1:0][LEN_W-1:0]        slot_len,
  output logic [DEGREE-1:0]                   slot_split,
  output logic [DEGREE-1:0][8*SIZER_WIN-1:0]  slot_bytes,
  output logic                                taken_cut   // the group ends at taken_pc
);

  localparam int unsigned LB   = $clog2(LINE_BYTES);
  localparam int unsigned PAIR = 2 * LINE_BYTES;

  logic [ADDR_W-1:0] pc_q;
  logic [ADDR_W-1:0] line_base;

  assign line_base   = {pc_q[ADDR_W-1:LB], LB'(0)};
  assign icache_addr = line_base;
  assign id_pc       = pc_q;
  assign id_line     = icache_bytes;
  assign id_pc_valid = dec_ready;

  always_comb begin
    taken_cut = 1'b0;
    for (int j = 0; j < DEGREE; j++) begin
      logic [ADDR_W-1:0] rel, nxt;
      rel = id_slot_ptr[j] - line_base;
      nxt = (j + 1 < DEGREE && id_slot_valid[(j + 1) % DEGREE]) ? id_slot_ptr[(j + 1) % DEGREE]
                                                                 : id_nsfa;
      slot_valid[j] = id_slot_valid[j] && dec_ready && !redirect_valid && !taken_cut;
      if (slot_valid[j] && taken_valid && id_slot_ptr[j] == taken_pc) taken_cut = 1'b1;
      slot_pc[j]    = id_slot_ptr[j];
      slot_len[j]   = LEN_W'(nxt - id_slot_ptr[j]);
      slot_split[j] = id_slot_split[j];
      for (int i = 0; i < SIZER_WIN; i++)
        slot_bytes[j][8*i +: 8] = (int'(rel) + i < PAIR) ? icache_bytes[8*(int'(rel) + i) +: 8]
                                                          : 8'h00;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              pc_q <= RESET_PC;
    else if (redirect_valid) pc_q <= redirect_pc;
    else if (dec_ready)      pc_q <= taken_cut ? taken_target : id_nsfa;
  end

endmodule
