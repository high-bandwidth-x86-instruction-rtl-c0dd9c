// tb_instruction_identifier: runs the Instruction Identifier on a random
// IA-32 program. It plays the fetcher: each cycle it presents the PC and the
// line pair, then follows the NSFA or jumps to a random instruction in a small
// hot region, so that the table both learns new code and is hit on code it
// has seen. Every answer is checked against the program: the first pointer is
// the PC, each further pointer is the start of the next instruction, the
// split-line flags match the line boundary and the NSFA is the end of the
// last instruction handed out. A directed part then checks exact group sizes
// on a line of 3-byte instructions: new entry (2 per cycle), append, a full
// entry hit (DEGREE per cycle) and a partial hit with prediction.
module tb_instruction_identifier;
  import fetch_pkg::*;

  localparam int DEGREE = 4, ENTRIES = 64, ADDR_W = 32, LINE = 32;
  localparam int MEM = 4096;

  logic clk = 0, rst_n = 0;
  logic pc_valid;
  logic [ADDR_W-1:0] pc, nsfa, mem_addr;
  logic [8*2*LINE-1:0] line, line_mem;
  logic [DEGREE-1:0] slot_valid, slot_split;
  logic [DEGREE-1:0][ADDR_W-1:0] slot_ptr;
  logic ev_hit, ev_append, ev_new, ev_new_s, ev_pred_ok, ev_pred_bad, ev_split, ev_full;
  logic directed;
  logic [8*2*LINE-1:0] dline;

  int checks = 0, failures = 0;
  int n_hit = 0, n_append = 0, n_new = 0, n_new_s = 0, n_ok = 0, n_bad = 0, n_split = 0,
      n_full = 0;

  always #5 clk = ~clk;

  code_mem #(.MEM_BYTES(MEM), .LINE_BYTES(LINE)) u_mem (.addr(mem_addr), .line(line_mem));
  assign mem_addr = {pc[ADDR_W-1:5], 5'b0};
  assign line = directed ? dline : line_mem;

  instruction_identifier #(.DEGREE(DEGREE), .ENTRIES(ENTRIES), .LINE_BYTES(LINE)) dut (
    .clk, .rst_n, .pc_valid, .pc, .line, .slot_valid, .slot_ptr, .slot_split, .nsfa,
    .ev_hit, .ev_append, .ev_new, .ev_new_s, .ev_pred_ok, .ev_pred_bad, .ev_split, .ev_full);

  task automatic fail(input string s);
    failures++;
    $display("FAIL t=%0t pc=%h: %s", $time, pc, s);
  endtask

  // check the answer for the current pc against the program
  task automatic check_group(output int n);
    int a, k;
    bit gap;
    a = int'(pc);
    n = 0;
    gap = 0;
    for (k = 0; k < DEGREE; k++) begin
      if (slot_valid[k]) begin
        checks++;
        if (gap) fail("slot after an empty slot");
        if (int'(slot_ptr[k]) != a) fail($sformatf("slot %0d ptr %h expected %h", k, slot_ptr[k], a));
        if (slot_split[k] != ((a % LINE) + u_mem.len_at[a] > LINE))
          fail($sformatf("slot %0d split flag", k));
        a += u_mem.len_at[a];
        n++;
      end else gap = 1;
    end
    checks++;
    if (n == 0) fail("no instruction");
    checks++;
    if (int'(nsfa) != a) fail($sformatf("nsfa %h expected %h", nsfa, a));
  endtask

  always @(posedge clk) if (rst_n && pc_valid) begin
    n_hit += int'(ev_hit);     n_append += int'(ev_append); n_new += int'(ev_new);
    n_new_s += int'(ev_new_s); n_ok += int'(ev_pred_ok);    n_bad += int'(ev_pred_bad);
    n_split += int'(ev_split); n_full += int'(ev_full);
  end

  initial begin
    #2000000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_group(input int exp_n, input int exp_nsfa, input string what);
    int n;
    n = $countones(slot_valid);
    checks++;
    if (n != exp_n || int'(nsfa) != exp_nsfa)
      fail($sformatf("%s: %0d instructions, nsfa %h; expected %0d, %h", what, n, nsfa, exp_n, exp_nsfa));
  endtask

  initial begin
    int n, hot_lo, visits, delivered;
    logic [ADDR_W-1:0] next_pc;
    directed = 0;
    pc_valid = 0;
    pc = '0;
    dline = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- directed: a line of 3-byte instructions (83 C0 ib) at 0x10000 ------
    directed = 1;
    for (int i = 0; i < 2 * LINE; i += 3) begin
      if (i < 2 * LINE) dline[8*i +: 8] = 8'h83;
      if (i + 1 < 2 * LINE) dline[8*(i+1) +: 8] = 8'hC0;
      if (i + 2 < 2 * LINE) dline[8*(i+2) +: 8] = 8'h01;
    end
    @(negedge clk); pc_valid = 1; pc = 32'h10000;
    #1 expect_group(2, 32'h10006, "new entry");
    checks++; if (!ev_new) fail("new entry not reported");
    @(negedge clk); pc = 32'h10006;
    #1 expect_group(2, 32'h1000C, "append fills entry");
    checks++; if (!ev_append) fail("append not reported");
    @(negedge clk); pc = 32'h1000C;
    #1 expect_group(2, 32'h10012, "new entry after full"); @(negedge clk); pc = 32'h10000;
    #1 expect_group(DEGREE, 32'h1000C, "hit on full entry");
    checks++; if (!ev_full || !ev_hit) fail("full hit not reported");
    @(negedge clk); pc = 32'h1000C;
    #1 expect_group(DEGREE, 32'h10018, "hit with prediction");
    @(negedge clk); pc_valid = 0;
    directed = 0;

    // ---- random program ------------------------------------------------------
    pc = 0;
    pc_valid = 1;
    delivered = 0;
    visits = 0;
    hot_lo = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      #1;
      check_group(n);
      next_pc = nsfa;   // the answer of this cycle, before the table learns
      delivered += n;
      visits++;
      @(negedge clk);
      if ($urandom_range(9) == 0 || int'(next_pc) >= u_mem.last_start) begin
        // jump into the hot region (a loop-like reuse of recent code)
        if (cyc % 3000 == 2999) hot_lo = (hot_lo + 640) % (MEM - 512);
        pc = ADDR_W'(u_mem.start_at_or_after(hot_lo + $urandom_range(300)));
      end else
        pc = next_pc;
    end
    $display("groups %0d, instructions %0d, %0.2f per group", visits, delivered,
             real'(delivered) / real'(visits));
    $display("hit %0d append %0d new %0d new_s %0d pred_ok %0d pred_bad %0d split %0d full %0d",
             n_hit, n_append, n_new, n_new_s, n_ok, n_bad, n_split, n_full);
    // every mechanism must have been exercised
    checks++; if (n_hit == 0)    fail("no hit");
    checks++; if (n_append == 0) fail("no append");
    checks++; if (n_new < ENTRIES) fail("FIFO never wrapped");
    checks++; if (n_new_s == 0)  fail("no new entry for S");
    checks++; if (n_ok == 0)     fail("no right prediction");
    checks++; if (n_bad == 0)    fail("no misprediction");
    checks++; if (n_split == 0)  fail("no split-line instruction");
    checks++; if (n_full == 0)   fail("no full-entry hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
