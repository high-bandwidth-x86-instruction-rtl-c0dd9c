// fetch_top: x86 instruction fetch unit built around an Instruction Pointer
// Table.
//
// Fetching several variable-length x86 instructions per cycle needs the start
// of every instruction in the group before the group can be cut out of the
// instruction line. This unit does not mark boundaries in the cache. Instead
// an Instruction Identifier, kept apart from the cache, remembers instruction
// pointers in a small table indexed by the fetch PC and predicts one unknown
// length at a time. The fetcher sends it the PC and the instruction line and
// gets back up to DEGREE instruction pointers and the next sequential fetch
// address.
//
// Blocks: fetcher (PC sequencing, line pair, cutting instructions into
// decoder slots) and instruction_identifier (IPT, controller, speculation
// commit unit with two x86 sizers). The instruction cache and the decoders
// are outside: the cache is read through icache_addr/icache_bytes and must
// answer in the same cycle; the decoders take the slot_* outputs when
// dec_ready is high. A branch predictor, also outside, may name a
// predicted-taken branch of the current fetch (taken_*): the group ends with
// that branch and fetch continues at its target in the next cycle.
//
// Parameters: DEGREE instructions per cycle (4), ENTRIES IPT entries (64, the
// size the published design recommends), LINE_BYTES cache line (32), PRED_LEN fixed
// predicted length (3, the published design's fixed_3 scheme). The degree and line
// size are this design's choice; the published design evaluates degrees 2 to 12 and
// lines of 16 to 2048 bytes.
//
// stat reports, one bit each per cycle: [0] IPT hit, [1] PC appended to the
// previous entry, [2] new entry, [3] new entry opened for S, [4] length
// predicted right, [5] length mispredicted, [6] split-line instruction,
// [7] hit with nothing left to predict, [8] group ended by a taken branch.
module fetch_top
  import fetch_pkg::*;
#(
  parameter int unsigned DEGREE     = 4,
  parameter int unsigned ENTRIES    = 64,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned PRED_LEN   = 3,
  parameter int unsigned MAX_PREFIX = 11,
  parameter logic [ADDR_W-1:0] RESET_PC = '0
) (
  input  logic                                clk,
  input  logic                                rst_n,
  output logic [ADDR_W-1:0]                   icache_addr,
  input  logic [8*2*LINE_BYTES-1:0]           icache_bytes,
  input  logic                                taken_valid,
  input  logic [ADDR_W-1:0]                   taken_pc,
  input  logic [ADDR_W-1:0]                   taken_target,
  input  logic                                redirect_valid,
  input  logic [ADDR_W-1:0]                   redirect_pc,
  input  logic                                dec_ready,
  output logic [DEGREE-1:0]                   slot_valid,
  output logic [DEGREE-1:0][ADDR_W-1:0]       slot_pc,
  output logic [DEGREE-1:0][LEN_W-1:0]        slot_len,
  output logic [DEGREE-1:0]                   slot_split,
  output logic [DEGREE-1:0][8*SIZER_WIN-1:0]  slot_bytes,
  output logic [8:0]                          stat
);

  logic                          id_pc_valid;
  logic [ADDR_W-1:0]             id_pc, id_nsfa;
  logic [8*2*LINE_BYTES-1:0]     id_line;
  logic [DEGREE-1:0]             id_slot_valid, id_slot_split;
  logic [DEGREE-1:0][ADDR_W-1:0] id_slot_ptr;

  fetcher #(
    .DEGREE(DEGREE), .ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES), .RESET_PC(RESET_PC)
  ) u_fetcher (
    .clk, .rst_n, .icache_addr, .icache_bytes,
    .id_pc_valid, .id_pc, .id_line, .id_slot_valid, .id_slot_ptr, .id_slot_split, .id_nsfa,
    .taken_valid, .taken_pc, .taken_target, .redirect_valid, .redirect_pc, .dec_ready,
    .slot_valid, .slot_pc, .slot_len, .slot_split, .slot_bytes, .taken_cut(stat[8])
  );

  instruction_identifier #(
    .DEGREE(DEGREE), .ENTRIES(ENTRIES), .ADDR_W(ADDR_W),
    .LINE_BYTES(LINE_BYTES), .PRED_LEN(PRED_LEN), .MAX_PREFIX(MAX_PREFIX)
  ) u_ii (
    .clk, .rst_n, .pc_valid(id_pc_valid), .pc(id_pc), .line(id_line),
    .slot_valid(id_slot_valid), .slot_ptr(id_slot_ptr), .slot_split(id_slot_split),
    .nsfa(id_nsfa),
    .ev_hit(stat[0]), .ev_append(stat[1]), .ev_new(stat[2]), .ev_new_s(stat[3]),
    .ev_pred_ok(stat[4]), .ev_pred_bad(stat[5]), .ev_split(stat[6]), .ev_full(stat[7])
  );

endmodule
