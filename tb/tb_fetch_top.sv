// tb_fetch_top: end-to-end test of the fetch unit at its default parameters
// (DEGREE 4, 64 IPT entries, 32-byte lines) on a random IA-32 program held in
// a perfect instruction cache model.
//
// The program is fetched in three phases: a hot loop (a predicted-taken
// branch at the loop's last instruction sends fetch back to the loop head,
// and now and then a redirect jumps into the middle of the loop), a sweep through the whole program (more new
// entries than the table holds, so FIFO replacement evicts the loop), and a
// second loop elsewhere. Decoder stalls are inserted at random. Every
// instruction handed to the decoders is checked, in order, against the
// program: address, length, split-line flag and bytes. The testbench counts
// how often each mechanism acted (hit, append, new entry, new entry for S,
// right and wrong prediction, split-line instruction, full-entry hit, group
// ended by a taken branch, redirect, stall, table wrap-around) and fails if one never did. It also
// checks that the first group after reset arrives in the first cycle, that no
// cycle delivers more than DEGREE instructions, and that the warm loop is
// fetched faster than a table-less identifier could (at most 2 per cycle: P
// and S).
module tb_fetch_top;
  import fetch_pkg::*;
  localparam int DEGREE = 4, ENTRIES = 64, ADDR_W = 32, LINE = 32, MEM = 8192;

  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] icache_addr, redirect_pc;
  logic [8*2*LINE-1:0] icache_bytes;
  logic redirect_valid, dec_ready, taken_valid;
  logic [ADDR_W-1:0] taken_pc, taken_target;
  logic [DEGREE-1:0] slot_valid, slot_split;
  logic [DEGREE-1:0][ADDR_W-1:0] slot_pc;
  logic [DEGREE-1:0][LEN_W-1:0] slot_len;
  logic [DEGREE-1:0][8*SIZER_WIN-1:0] slot_bytes;
  logic [8:0] stat;

  int checks = 0, failures = 0;
  int ev_cnt[9];
  int n_redirect = 0, n_stall = 0, n_full_group = 0;
  string ev_name[9] = '{"IPT hit", "append", "new entry", "new entry for S", "right prediction",
                        "misprediction", "split-line instruction", "full-entry hit",
                        "taken branch ends group"};

  always #5 clk = ~clk;

  code_mem #(.MEM_BYTES(MEM), .LINE_BYTES(LINE)) u_mem (.addr(icache_addr), .line(icache_bytes));
  fetch_top dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, s);
    end
  endtask

  initial begin
    #5000000;
    chk(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase: 0 = loop A, 1 = sweep, 2 = loop B
  int phase, exp_pc, loop_lo, loop_hi, loop_br, cyc_in_phase;
  int warm_cycles, warm_insns;
  bit first_cycle;

  function automatic int last_start_before(input int a);
    int r;
    r = a - 1;
    while (!u_mem.is_start[r]) r--;
    return r;
  endfunction

  task automatic run_cycle();
    int n, a;
    @(negedge clk);
    dec_ready = first_cycle || ($urandom_range(9) != 0);
    // leaving the loop region, or a random branch into the loop body
    redirect_valid = 0;
    if (phase != 1 && (int'(icache_addr) >= loop_hi || $urandom_range(40) == 0)) begin
      redirect_valid = 1;
      redirect_pc = ADDR_W'((int'(icache_addr) >= loop_hi || $urandom_range(1) == 0) ? loop_lo
                      : u_mem.start_at_or_after(loop_lo + $urandom_range(loop_hi - loop_lo - 40)));
    end
    // the loop branch is predicted taken while looping
    taken_valid = (phase != 1);
    taken_pc = ADDR_W'(loop_br);
    taken_target = ADDR_W'(loop_lo);
    if (phase == 1 && int'(icache_addr) >= MEM - 64) begin
      redirect_valid = 1;
      redirect_pc = ADDR_W'(loop_lo);
    end
    #1;
    n = 0;
    for (int k = 0; k < DEGREE; k++) begin
      if (slot_valid[k]) begin
        a = int'(slot_pc[k]);
        chk(a == exp_pc, $sformatf("slot %0d at %h, expected %h", k, a, exp_pc));
        chk(int'(slot_len[k]) == u_mem.len_at[exp_pc], $sformatf("length at %h", a));
        chk(slot_split[k] == ((exp_pc % LINE) + u_mem.len_at[exp_pc] > LINE), "split flag");
        for (int i = 0; i < u_mem.len_at[exp_pc]; i++)
          chk(slot_bytes[k][8*i +: 8] == u_mem.mem[exp_pc + i], "instruction bytes");
        exp_pc = (taken_valid && a == loop_br) ? loop_lo : exp_pc + u_mem.len_at[exp_pc];
        n++;
      end
    end
    chk(n <= DEGREE, "group size");
    if (first_cycle) chk(n > 0 && slot_pc[0] == 0, "first group in the first cycle after reset");
    first_cycle = 0;
    if (n == DEGREE) n_full_group++;
    if (dec_ready && !redirect_valid) chk(n > 0, "no instruction while running");
    if (!dec_ready || redirect_valid) chk(n == 0, "slots while stalled or redirected");
    for (int b = 0; b < 9; b++) ev_cnt[b] += int'(stat[b]);
    n_redirect += int'(redirect_valid);
    n_stall += int'(!dec_ready);
    if (phase != 1 && cyc_in_phase >= 1500 && dec_ready && !redirect_valid) begin
      warm_cycles++;
      warm_insns += n;
    end
    if (redirect_valid) exp_pc = int'(redirect_pc);
    cyc_in_phase++;
  endtask

  initial begin
    real rate;
    int guard;
    redirect_valid = 0; redirect_pc = 0; dec_ready = 1;
    for (int b = 0; b < 9; b++) ev_cnt[b] = 0;
    taken_valid = 0; taken_pc = 0; taken_target = 0;
    warm_cycles = 0; warm_insns = 0;
    exp_pc = 0;
    first_cycle = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // loop A: from the reset PC over about 300 bytes
    phase = 0; cyc_in_phase = 0; loop_lo = 0; loop_hi = 320;
    loop_br = last_start_before(loop_hi);
    repeat (3000) run_cycle();
    // sweep through the program
    phase = 1; cyc_in_phase = 0; loop_lo = u_mem.start_at_or_after(4096); loop_hi = 4096 + 384;
    loop_br = last_start_before(loop_hi);
    begin
      // sequential until the end of the program, then jump to loop B
      guard = 0;
      while (exp_pc < loop_lo - 0 && guard < 20000) begin
        if (exp_pc >= MEM - 200) break;
        run_cycle();
        guard++;
      end
      while (exp_pc != loop_lo && guard < 40000) begin run_cycle(); guard++; end
    end
    // loop B
    phase = 2; cyc_in_phase = 0;
    repeat (3000) run_cycle();

    rate = real'(warm_insns) / real'(warm_cycles);
    $display("warm loop: %0d instructions in %0d cycles, %0.2f per cycle", warm_insns, warm_cycles,
             rate);
    for (int b = 0; b < 9; b++) begin
      $display("%-24s %0d", ev_name[b], ev_cnt[b]);
      chk(ev_cnt[b] > 0, {"never happened: ", ev_name[b]});
    end
    $display("redirects %0d stalls %0d groups of %0d: %0d", n_redirect, n_stall, DEGREE, n_full_group);
    chk(n_redirect > 0, "no redirect");
    chk(n_stall > 0, "no stall");
    chk(n_full_group > 0, "no full group");
    chk(ev_cnt[2] + ev_cnt[3] > ENTRIES, "IPT never wrapped around");
    chk(rate > 2.0, "warm loop no faster than a table-less identifier");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
