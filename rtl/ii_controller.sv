// ii_controller: Instruction Identifier Controller.
//
// Runs the five operations of the Instruction Identifier every cycle in which
// the fetcher presents a PC, following the flowchart of the published design:
//   access      the PC is looked up in the IPT; on a hit the known pointers of
//               the entry are handed to the fetcher at once.
//   prediction  the first instruction whose length is unknown (P) gets the
//               fixed predicted length PRED_LEN (the "fixed_3" scheme), which
//               places the speculative instruction S behind it.
//   commitment  the Speculation Commit Unit sizes P and S; P is always
//               committed, S only if P's length was predicted right, P is not
//               split-line and S starts in the same line.
//   placement   the committed lengths are recorded: into the hit entry, into
//               the entry used in the previous cycle when the PC is the NSFA
//               given then and that entry still has a free field, or into a
//               newly allocated entry (FIFO). When P fills the last field of
//               the entry it was appended to, S opens a new entry.
//   address generation  NSFA is the address after S, after P, or, when no
//               instruction is left to predict, after the last known pointer.
// The published flowchart sends the fetcher to the next cache line after a
// split-line instruction and starts a new entry. Here the fetcher holds the
// next line already, so NSFA after a split-line instruction is the address
// right after it (inside the next line), and the entry is closed: a field
// whose end offset reaches the end of the line closes the entry, so the next
// PC cannot be appended to it and is given an entry of its own. This reading,
// the single pass per cycle and the reset state are this design's choices.
//
// Interface: pc_valid/pc from the fetcher; slot_* are up to DEGREE
// instruction pointers in program order with their split-line flags; nsfa is
// the next sequential fetch address. ev_* pulse for one cycle to report which
// mechanism acted. Timing: outputs are combinational in pc and the IPT
// contents; the IPT writes and the remembered NSFA take effect at the next
// clock edge.
module ii_controller
  import fetch_pkg::*;
#(
  parameter int unsigned DEGREE     = 4,
  parameter int unsigned ENTRIES    = 64,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned PRED_LEN   = 3,
  localparam int unsigned OFF_W     = $clog2(2 * LINE_BYTES) + 1,
  localparam int unsigned IDX_W     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned LB        = $clog2(LINE_BYTES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          pc_valid,
  input  logic [ADDR_W-1:0]             pc,
  // IPT access
  input  logic                          hit,
  input  logic [IDX_W-1:0]              hit_idx,
  input  logic [DEGREE-1:0]             hit_v,
  input  logic [DEGREE-1:0]             hit_s,
  input  logic [DEGREE:1][OFF_W-1:0]    hit_off,
  output logic [IDX_W-1:0]              rd_idx,
  input  logic                          rd_ev,
  input  logic [ADDR_W-1:0]             rd_pc,
  input  logic [DEGREE-1:0]             rd_v,
  input  logic [DEGREE-1:0]             rd_s,
  input  logic [DEGREE:1][OFF_W-1:0]    rd_off,
  // IPT placement
  output logic                          wa_en,
  output logic [IDX_W-1:0]              wa_idx,
  output logic [DEGREE-1:0]             wa_v,
  output logic [DEGREE-1:0]             wa_s,
  output logic [DEGREE:1][OFF_W-1:0]    wa_off,
  output logic                          wb_en,
  output logic [ADDR_W-1:0]             wb_pc,
  output logic [DEGREE-1:0]             wb_v,
  output logic [DEGREE-1:0]             wb_s,
  output logic [DEGREE:1][OFF_W-1:0]    wb_off,
  input  logic [IDX_W-1:0]              alloc_idx,
  // Speculation Commit Unit
  output logic [OFF_W-1:0]              p_off,
  output logic [LEN_W-1:0]              pred_len,
  input  logic [OFF_W-1:0]              s_off,
  input  logic [OFF_W-1:0]              p_end,
  input  logic [OFF_W-1:0]              s_end,
  input  logic                          correct,
  input  logic                          split_p,
  input  logic                          split_s,
  input  logic                          s_in_line,
  input  logic [OFF_W-1:0]              next_off,
  // to the fetcher
  output logic [DEGREE-1:0]             slot_valid,
  output logic [DEGREE-1:0][ADDR_W-1:0] slot_ptr,
  output logic [DEGREE-1:0]             slot_split,
  output logic [ADDR_W-1:0]             nsfa,
  // mechanism reporting
  output logic                          ev_hit,       // PC found in the IPT
  output logic                          ev_append,    // miss, PC == NSFA, placed in last entry
  output logic                          ev_new,       // miss, new entry allocated for P
  output logic                          ev_new_s,     // entry filled by P, new entry for S
  output logic                          ev_pred_ok,   // P's length predicted right
  output logic                          ev_pred_bad,  // P's length mispredicted
  output logic                          ev_split,     // a split-line instruction committed
  output logic                          ev_full       // hit on an entry with nothing to predict
);

  localparam int unsigned CNT_W = $clog2(DEGREE + 1);

  // ---- state: the entry used and the NSFA given in the previous cycle ------
  logic [IDX_W-1:0]  last_idx;
  logic              last_ok;
  logic [ADDR_W-1:0] nsfa_q;
  logic              nsfa_ok;

  logic [ADDR_W-1:0] line_base;
  logic [OFF_W-1:0]  pc_off;

  // working entry
  logic                       is_hit, is_append;
  logic [DEGREE-1:0]          w_v, w_s;
  logic [DEGREE:1][OFF_W-1:0] w_off;
  logic [CNT_W-1:0]           c;          // instructions of known length
  logic [OFF_W-1:0]           c_off;      // offset of instruction c
  logic                       p_exists;
  logic                       s_room;
  logic                       take_s;
  logic                       s_new;      // S goes to a new entry
  logic [DEGREE-1:0]          n_v, n_s;
  logic [DEGREE:1][OFF_W-1:0] n_off;
  logic [CNT_W-1:0]           last_c;
  logic [OFF_W-1:0]           last_end;
  logic                       last_open;
  logic [OFF_W-1:0]           nsfa_off;

  // number of leading valid fields
  function automatic logic [CNT_W-1:0] known(input logic [DEGREE-1:0] v);
    logic [CNT_W-1:0] n;
    n = '0;
    for (int k = 0; k < DEGREE; k++)
      if (n == CNT_W'(k) && v[k]) n = CNT_W'(k + 1);
    return n;
  endfunction

  // offset of instruction k of an entry whose PC sits at offset o0
  function automatic logic [OFF_W-1:0] field_off(input logic [DEGREE:1][OFF_W-1:0] off,
                                                 input logic [OFF_W-1:0] o0,
                                                 input logic [CNT_W-1:0] k);
    logic [OFF_W-1:0] r;
    r = o0;
    for (int j = 1; j <= DEGREE; j++)
      if (k == CNT_W'(j)) r = off[j];
    return r;
  endfunction

  assign line_base = {pc[ADDR_W-1:LB], LB'(0)};
  assign pc_off    = OFF_W'(pc[LB-1:0]);
  assign pred_len  = LEN_W'(PRED_LEN);
  assign rd_idx    = last_idx;

  always_comb begin
    // entry used last cycle: can the PC continue it?
    last_c    = known(rd_v);
    last_end  = field_off(rd_off, OFF_W'(rd_pc[LB-1:0]), last_c);
    last_open = rd_ev && (last_c < CNT_W'(DEGREE)) && (last_end < OFF_W'(LINE_BYTES));

    is_hit    = hit;
    is_append = !hit && last_ok && nsfa_ok && (pc == nsfa_q) && last_open;

    // working entry: the hit entry, the last entry, or an empty new one
    if (is_hit) begin
      w_v = hit_v;  w_s = hit_s;  w_off = hit_off;
    end else if (is_append) begin
      w_v = rd_v;   w_s = rd_s;   w_off = rd_off;
    end else begin
      w_v = '0;     w_s = '0;     w_off = '0;
    end
    c        = known(w_v);
    c_off    = field_off(w_off, pc_off, c);
    // prediction is needed when the entry has a free field and the last
    // known instruction did not end the line
    p_exists = (c < CNT_W'(DEGREE)) && (c == '0 || c_off < OFF_W'(LINE_BYTES));
    p_off    = c_off;
    s_room   = (c + 1'b1) < CNT_W'(DEGREE);
    take_s   = p_exists && correct && !split_p && s_in_line && (s_room || !is_hit);
    s_new    = take_s && !s_room;

    // commitment: record P, then S
    n_v = w_v;  n_s = w_s;  n_off = w_off;
    for (int k = 0; k < DEGREE; k++) begin
      if (p_exists && c == CNT_W'(k)) begin
        n_v[k]       = 1'b1;
        n_s[k]       = split_p;
        n_off[k + 1] = p_end;
      end
      if (take_s && !s_new && c + 1'b1 == CNT_W'(k)) begin
        n_v[k]       = 1'b1;
        n_s[k]       = split_s;
        n_off[k + 1] = s_end;
      end
    end

    // placement
    wa_en  = pc_valid && p_exists && (is_hit || is_append);
    wa_idx = is_hit ? hit_idx : last_idx;
    wa_v   = n_v;
    wa_s   = n_s;
    wa_off = n_off;
    wb_en  = pc_valid && ((!is_hit && !is_append) || s_new);
    if (s_new) begin
      wb_pc  = line_base + ADDR_W'(s_off);
      wb_v   = DEGREE'(1);
      wb_s   = DEGREE'(split_s);
      wb_off = '0;
      wb_off[1] = s_end;
    end else begin
      wb_pc  = pc;
      wb_v   = n_v;
      wb_s   = n_s;
      wb_off = n_off;
    end

    // pointers to the fetcher
    slot_valid = '0;
    slot_ptr   = '0;
    slot_split = '0;
    for (int j = 0; j < DEGREE; j++) begin
      if (is_hit && CNT_W'(j) < c) begin
        slot_valid[j] = 1'b1;
        slot_ptr[j]   = line_base + ADDR_W'(field_off(w_off, pc_off, CNT_W'(j)));
        slot_split[j] = w_s[j];
      end
    end
    for (int j = 0; j < DEGREE; j++) begin
      if (p_exists && CNT_W'(j) == (is_hit ? c : '0)) begin
        slot_valid[j] = 1'b1;
        slot_ptr[j]   = line_base + ADDR_W'(c_off);
        slot_split[j] = split_p;
      end
      if (take_s && CNT_W'(j) == (is_hit ? c + 1'b1 : CNT_W'(1))) begin
        slot_valid[j] = 1'b1;
        slot_ptr[j]   = line_base + ADDR_W'(s_off);
        slot_split[j] = split_s;
      end
    end
    if (!pc_valid) slot_valid = '0;

    // address generation
    // the commit unit's next sequential offset, unless the hit entry has
    // no field left for S
    if (p_exists && (s_room || !is_hit)) nsfa_off = next_off;
    else if (p_exists)                   nsfa_off = p_end;
    else                                 nsfa_off = c_off;
    nsfa = line_base + ADDR_W'(nsfa_off);

    ev_hit      = pc_valid && is_hit;
    ev_append   = pc_valid && is_append;
    ev_new      = pc_valid && !is_hit && !is_append;
    ev_new_s    = pc_valid && s_new;
    ev_pred_ok  = pc_valid && p_exists && correct;
    ev_pred_bad = pc_valid && p_exists && !correct;
    ev_split    = pc_valid && p_exists && (split_p || (take_s && split_s));
    ev_full     = pc_valid && is_hit && !p_exists;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_idx <= '0;
      last_ok  <= 1'b0;
      nsfa_q   <= '0;
      nsfa_ok  <= 1'b0;
    end else if (pc_valid) begin
      nsfa_q  <= nsfa;
      nsfa_ok <= 1'b1;
      last_ok <= 1'b1;
      if (wb_en)       last_idx <= alloc_idx;
      else if (is_hit) last_idx <= hit_idx;
    end
  end

endmodule
