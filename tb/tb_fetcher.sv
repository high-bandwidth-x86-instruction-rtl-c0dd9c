// tb_fetcher: checks the fetcher with an ideal identifier played by the
// testbench. For the PC the fetcher presents, the testbench answers with the
// next 1..DEGREE instruction starts of a random IA-32 program and the address
// after the last of them. It checks that the fetcher asks for the PC's line,
// cuts the right bytes, lengths and split flags into the slots, follows the
// NSFA, ends a group at a predicted-taken branch and moves to its target,
// takes redirects (dropping that cycle's group) and holds while the decoders
// are not ready.
module tb_fetcher;
  import fetch_pkg::*;
  localparam int DEGREE = 4, ADDR_W = 32, LINE = 32, MEM = 4096;

  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] icache_addr, id_pc, id_nsfa, redirect_pc;
  logic [8*2*LINE-1:0] icache_bytes, id_line;
  logic id_pc_valid, redirect_valid, dec_ready, taken_valid, taken_cut;
  logic [ADDR_W-1:0] taken_pc, taken_target;
  logic [DEGREE-1:0] id_slot_valid, id_slot_split, slot_valid, slot_split;
  logic [DEGREE-1:0][ADDR_W-1:0] id_slot_ptr, slot_pc;
  logic [DEGREE-1:0][LEN_W-1:0] slot_len;
  logic [DEGREE-1:0][8*SIZER_WIN-1:0] slot_bytes;
  int checks = 0, failures = 0, n_redirect = 0, n_stall = 0, n_insn = 0, n_taken = 0;

  always #5 clk = ~clk;

  code_mem #(.MEM_BYTES(MEM), .LINE_BYTES(LINE)) u_mem (.addr(icache_addr), .line(icache_bytes));
  fetcher #(.DEGREE(DEGREE), .ADDR_W(ADDR_W), .LINE_BYTES(LINE), .RESET_PC('0)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t pc=%h: %s", $time, id_pc, s);
    end
  endtask

  initial begin
    #1000000;
    chk(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, k, n, kt;
    logic [ADDR_W-1:0] exp_next;
    redirect_valid = 0; redirect_pc = 0; dec_ready = 1;
    taken_valid = 0; taken_pc = 0; taken_target = 0;
    id_slot_valid = 0; id_slot_ptr = 0; id_slot_split = 0; id_nsfa = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      chk(icache_addr == {id_pc[ADDR_W-1:5], 5'b0} && id_line == icache_bytes, "line request");
      // ideal identifier
      n = $urandom_range(1, DEGREE);
      a = int'(id_pc);
      id_slot_valid = 0; id_slot_ptr = 0; id_slot_split = 0;
      for (k = 0; k < n; k++) begin
        id_slot_valid[k] = 1;
        id_slot_ptr[k] = ADDR_W'(a);
        id_slot_split[k] = (a % LINE) + u_mem.len_at[a] > LINE;
        a += u_mem.len_at[a];
      end
      id_nsfa = ADDR_W'(a);
      dec_ready = ($urandom_range(7) != 0);
      redirect_valid = ($urandom_range(15) == 0) || a >= u_mem.last_start;
      redirect_pc = ADDR_W'(u_mem.start_at_or_after($urandom_range(MEM / 2)));
      // predicted-taken branch: one of the group's instructions, or an
      // address the group does not reach
      taken_valid = ($urandom_range(2) == 0);
      kt = $urandom_range(DEGREE);
      taken_pc = (kt < n) ? id_slot_ptr[kt] : ADDR_W'(a + 1);
      if (kt >= n) kt = DEGREE;
      if (!taken_valid) kt = DEGREE;
      taken_target = ADDR_W'(u_mem.start_at_or_after($urandom_range(MEM / 2)));
      if (kt < DEGREE) n = kt + 1;
      #1;
      chk(id_pc_valid == dec_ready, "identifier enabled only when decoders are ready");
      if (redirect_valid || !dec_ready) chk(slot_valid == 0, "no slot on redirect or stall");
      else begin
        chk(slot_valid == DEGREE'((1 << n) - 1), "slot valid");
        chk(taken_cut == (kt < DEGREE), "group cut at the taken branch");
        for (k = 0; k < n; k++) begin
          a = int'(slot_pc[k]);
          chk(int'(slot_len[k]) == u_mem.len_at[a] && slot_split[k] == id_slot_split[k],
              $sformatf("slot %0d length", k));
          for (int i = 0; i < u_mem.len_at[a]; i++)
            chk(slot_bytes[k][8*i +: 8] == u_mem.mem[a + i], $sformatf("slot %0d byte %0d", k, i));
          n_insn++;
        end
      end
      exp_next = redirect_valid ? redirect_pc
               : !dec_ready ? id_pc : (kt < DEGREE) ? taken_target : id_nsfa;
      n_taken += int'(kt < DEGREE && dec_ready && !redirect_valid);
      n_redirect += int'(redirect_valid);
      n_stall += int'(!dec_ready);
      @(posedge clk);
      #1 chk(id_pc == exp_next, "next PC");
    end
    chk(n_redirect > 0 && n_stall > 0 && n_taken > 0, "redirect, stall and taken branch all seen");
    $display("instructions %0d redirects %0d stalls %0d taken branches %0d", n_insn, n_redirect,
             n_stall, n_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
