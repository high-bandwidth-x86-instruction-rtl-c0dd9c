// tb_ii_controller: directed test of the Instruction Identifier Controller
// with the table and the commit unit replaced by values driven from here.
// Each step gives the PC, what the table returns and what the sizers found,
// and compares the placement writes, the pointers and the NSFA with values
// worked out by hand from the flowchart rules:
//   1 miss, no NSFA yet          -> new entry with P and S
//   2 miss, PC == NSFA           -> P appended to that entry (mispredicted)
//   3 append fills the entry     -> S opens a new entry
//   4 hit on a full entry        -> all DEGREE pointers, nothing written
//   5 hit, split-line P          -> P recorded with its split bit
//   6 PC == NSFA, entry closed   -> new entry, not an append
//   7 fetcher idle               -> no write, no pointer
module tb_ii_controller;
  import fetch_pkg::*;
  localparam int DEGREE = 4, ENTRIES = 8, ADDR_W = 32, LINE = 32;
  localparam int OFF_W = $clog2(2 * LINE) + 1, IDX_W = $clog2(ENTRIES);

  logic clk = 0, rst_n = 0, pc_valid;
  logic [ADDR_W-1:0] pc, rd_pc, wb_pc, nsfa;
  logic hit, rd_ev, wa_en, wb_en;
  logic [IDX_W-1:0] hit_idx, rd_idx, wa_idx, alloc_idx;
  logic [DEGREE-1:0] hit_v, hit_s, rd_v, rd_s, wa_v, wa_s, wb_v, wb_s;
  logic [DEGREE:1][OFF_W-1:0] hit_off, rd_off, wa_off, wb_off;
  logic [OFF_W-1:0] p_off, s_off, p_end, s_end, next_off;
  logic [LEN_W-1:0] pred_len;
  logic correct, split_p, split_s, s_in_line;
  logic [DEGREE-1:0] slot_valid, slot_split;
  logic [DEGREE-1:0][ADDR_W-1:0] slot_ptr;
  logic ev_hit, ev_append, ev_new, ev_new_s, ev_pred_ok, ev_pred_bad, ev_split, ev_full;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ii_controller #(.DEGREE(DEGREE), .ENTRIES(ENTRIES), .ADDR_W(ADDR_W), .LINE_BYTES(LINE),
                  .PRED_LEN(3)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t pc=%h: %s", $time, pc, s);
    end
  endtask

  // sizer results for P at p_off with real length lp, S with real length ls
  task automatic sizers(input int lp, input int ls);
    #1;
    s_off    = p_off + OFF_W'(3);
    p_end    = p_off + OFF_W'(lp);
    s_end    = s_off + OFF_W'(ls);
    correct  = (lp == 3);
    split_p  = int'(p_end) > LINE;
    split_s  = int'(s_end) > LINE;
    s_in_line = int'(s_off) < LINE;
    next_off = (correct && !split_p && s_in_line) ? s_end : p_end;
    #1;
  endtask

  function automatic logic [DEGREE:1][OFF_W-1:0] offs(input int a, b, c, d);
    logic [DEGREE:1][OFF_W-1:0] o;
    o[1] = OFF_W'(a); o[2] = OFF_W'(b); o[3] = OFF_W'(c); o[4] = OFF_W'(d);
    return o;
  endfunction

  initial begin
    #100000;
    chk(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc_valid = 0; pc = 0; hit = 0; hit_idx = 0; hit_v = 0; hit_s = 0; hit_off = 0;
    rd_ev = 0; rd_pc = 0; rd_v = 0; rd_s = 0; rd_off = 0; alloc_idx = 5;
    s_off = 0; p_end = 0; s_end = 0; correct = 0; split_p = 0; split_s = 0; s_in_line = 0;
    next_off = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(pred_len == 3, "fixed_3 prediction");

    // 1: miss, no NSFA yet
    @(negedge clk);
    pc_valid = 1; pc = 32'h100; alloc_idx = 5;
    sizers(3, 4);
    chk(p_off == 0, "1 p_off");
    chk(ev_new && wb_en && !wa_en, "1 new entry");
    chk(wb_pc == 32'h100 && wb_v == 4'b0011 && wb_s == 0 && wb_off[1] == 3 && wb_off[2] == 7,
        "1 entry contents");
    chk(slot_valid == 4'b0011 && slot_ptr[0] == 32'h100 && slot_ptr[1] == 32'h103, "1 pointers");
    chk(nsfa == 32'h107 && ev_pred_ok, "1 nsfa");

    // 2: PC == NSFA, entry 5 has free fields: append, mispredicted (length 1)
    @(negedge clk);
    pc = 32'h107; alloc_idx = 6;
    rd_ev = 1; rd_pc = 32'h100; rd_v = 4'b0011; rd_s = 0; rd_off = offs(3, 7, 0, 0);
    #1 chk(rd_idx == 5, "2 last entry index");
    chk(p_off == 7, "2 p_off");
    sizers(1, 2);
    chk(ev_append && wa_en && !wb_en && wa_idx == 5, "2 append");
    chk(wa_v == 4'b0111 && wa_off[3] == 8 && wa_off[2] == 7, "2 entry contents");
    chk(slot_valid == 4'b0001 && slot_ptr[0] == 32'h107 && nsfa == 32'h108 && ev_pred_bad,
        "2 pointers");

    // 3: append fills the last field, S opens a new entry
    @(negedge clk);
    pc = 32'h108;
    rd_v = 4'b0111; rd_off = offs(3, 7, 8, 0);
    #1 chk(p_off == 8, "3 p_off");
    sizers(3, 2);
    chk(ev_append && ev_new_s && wa_en && wb_en && wa_idx == 5, "3 two writes");
    chk(wa_v == 4'b1111 && wa_off[4] == 11, "3 old entry full");
    chk(wb_pc == 32'h10B && wb_v == 4'b0001 && wb_off[1] == 13, "3 new entry for S");
    chk(slot_valid == 4'b0011 && slot_ptr[1] == 32'h10B && nsfa == 32'h10D, "3 pointers");

    // 4: hit on the full entry
    @(negedge clk);
    pc = 32'h100; hit = 1; hit_idx = 5; hit_v = 4'b1111; hit_s = 0; hit_off = offs(3, 7, 8, 11);
    #1 chk(rd_idx == 6, "4 last entry is the one opened for S");
    sizers(3, 3);
    chk(ev_hit && ev_full && !wa_en && !wb_en, "4 no write");
    chk(slot_valid == 4'b1111 && slot_ptr[0] == 32'h100 && slot_ptr[1] == 32'h103 &&
        slot_ptr[2] == 32'h107 && slot_ptr[3] == 32'h108 && nsfa == 32'h10B, "4 pointers");

    // 5: hit with one known instruction, P runs into the next line
    @(negedge clk);
    pc = 32'h11C; hit_idx = 2; hit_v = 4'b0001; hit_s = 0; hit_off = offs(31, 0, 0, 0);
    #1 chk(p_off == 31, "5 p_off");
    sizers(5, 1);
    chk(ev_hit && ev_split && wa_en && wa_idx == 2 && !wb_en, "5 update");
    chk(wa_v == 4'b0011 && wa_s == 4'b0010 && wa_off[2] == 36, "5 split bit recorded");
    chk(slot_valid == 4'b0011 && slot_split == 4'b0010 && slot_ptr[1] == 32'h11F, "5 pointers");
    chk(nsfa == 32'h124, "5 nsfa after the split-line instruction");

    // 6: PC == NSFA, but the entry is closed by the split-line instruction
    @(negedge clk);
    pc = 32'h124; hit = 0; alloc_idx = 7;
    rd_pc = 32'h11C; rd_v = 4'b0011; rd_s = 4'b0010; rd_off = offs(31, 36, 0, 0);
    #1 chk(rd_idx == 2, "6 last entry index");
    sizers(3, 3);
    chk(ev_new && !ev_append && wb_en && !wa_en && wb_pc == 32'h124, "6 new entry");

    // 7: fetcher idle
    @(negedge clk);
    pc_valid = 0;
    sizers(3, 3);
    chk(!wa_en && !wb_en && slot_valid == 0, "7 idle");
    @(negedge clk);
    pc_valid = 1;
    #1 chk(rd_idx == 7, "7 state held while idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
