// tb_fetch_rate_sweep: average fetch rate of the fetch unit for several IPT
// sizes, fetch degrees and cache line sizes.
//
// One synthetic IA-32 program is shared by all configurations. About one
// instruction in five is a taken branch (basic blocks of about five
// instructions) whose target is one of a fixed set of block heads spread over
// 6 KB of code, so the control flow is the same for every configuration and
// the IPT has to hold a working set. Branch prediction is taken as perfect:
// the testbench, acting as the branch predictor, names the first taken branch
// of each group on the taken_* inputs, so the group ends there and fetch
// continues at the target in the next cycle. Every instruction is checked
// against the program.
//
// Configurations (DEGREE, ENTRIES, LINE_BYTES): (4,8,32) (4,64,32)
// (4,256,32) (2,64,32) (8,64,32), and a line-size series at degree 8 with a
// table large enough to hold the working set: (8,256,16) (8,256,32)
// (8,256,64) (8,256,128).
// Checked trends: at 64 entries the rate grows with the degree; at degree 4,
// 64 entries fetch faster than 8, and 256 entries gain little over 64
// (saturation); longer lines never fetch slower, and 16-byte lines are
// clearly slower than 64-byte ones; no rate exceeds its degree.
module tb_fetch_rate_sweep;
  import fetch_pkg::*;
  import x86_gen_pkg::*;

  localparam int MEM = 16384, ADDR_W = 32, CYCLES = 20000, NCFG = 9;
  localparam int CFG_DEG  [NCFG] = '{4, 4, 4, 2, 8, 8, 8, 8, 8};
  localparam int CFG_ENT  [NCFG] = '{8, 64, 256, 64, 64, 256, 256, 256, 256};
  localparam int CFG_LINE [NCFG] = '{32, 32, 32, 32, 32, 16, 32, 64, 128};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  byte unsigned mem [MEM];
  int  len_at [MEM];
  int  target [MEM];      // taken-branch target, -1 if none
  int  heads [64];
  bit  ready = 0;
  int  checks = 0, failures = 0;
  real rate [NCFG];
  bit  done [NCFG];

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, s);
    end
  endtask

  initial begin
    int a, last;
    insn_t x;
    for (int i = 0; i < MEM; i++) begin mem[i] = 0; len_at[i] = 0; target[i] = -1; end
    a = 0;
    while (a + 16 < MEM) begin
      x = gen(2);
      len_at[a] = x.len;
      for (int i = 0; i < x.len; i++) mem[a + i] = x.b[i];
      last = a;
      a += x.len;
    end
    for (int h = 0; h < 64; h++) begin
      a = $urandom_range(6144);
      while (len_at[a] == 0) a++;
      heads[h] = a;
    end
    for (int i = 0; i < MEM; i++)
      if (len_at[i] != 0 && ($urandom_range(4) == 0 || i > 8000)) target[i] = heads[$urandom_range(63)];
    ready = 1;
  end

  initial begin
    #50000000;
    chk(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int D = CFG_DEG[g], E = CFG_ENT[g], LINE = CFG_LINE[g];
    logic [ADDR_W-1:0] icache_addr, redirect_pc;
    logic [8*2*LINE-1:0] icache_bytes;
    logic redirect_valid, dec_ready, taken_valid;
    logic [ADDR_W-1:0] taken_pc, taken_target;
    logic [D-1:0] slot_valid, slot_split;
    logic [D-1:0][ADDR_W-1:0] slot_pc;
    logic [D-1:0][LEN_W-1:0] slot_len;
    logic [D-1:0][8*SIZER_WIN-1:0] slot_bytes;
    logic [8:0] stat;

    always_comb
      for (int i = 0; i < 2 * LINE; i++)
        icache_bytes[8*i +: 8] = (int'(icache_addr) + i < MEM) ? mem[int'(icache_addr) + i] : 8'h00;

    fetch_top #(.DEGREE(D), .ENTRIES(E), .LINE_BYTES(LINE)) u_fetch (
      .clk, .rst_n, .icache_addr, .icache_bytes, .taken_valid, .taken_pc, .taken_target, .redirect_valid, .redirect_pc, .dec_ready,
      .slot_valid, .slot_pc, .slot_len, .slot_split, .slot_bytes, .stat);

    initial begin
      int exp_pc, n_insn, n_cyc, a;
      bit found;
      redirect_valid = 0; redirect_pc = 0; dec_ready = 1;
      taken_valid = 0; taken_pc = 0; taken_target = 0;
      done[g] = 0;
      exp_pc = 0; n_insn = 0; n_cyc = 0;
      wait (rst_n);
      for (int c = 0; c < CYCLES; c++) begin
        @(negedge clk);
        // perfect branch predictor: first taken branch among the pointers
        taken_valid = 0;
        redirect_valid = (exp_pc > MEM - 64);   // ran off the program: restart
        redirect_pc = ADDR_W'(heads[0]);
        #1;
        found = 0;
        for (int k = 0; k < D; k++)
          if (slot_valid[k] && !found && target[int'(slot_pc[k])] >= 0) begin
            found = 1;
            taken_valid = 1;
            taken_pc = slot_pc[k];
            taken_target = ADDR_W'(target[int'(slot_pc[k])]);
          end
        #1;
        if (redirect_valid) begin
          exp_pc = heads[0];
          continue;
        end
        n_cyc++;
        for (int k = 0; k < D; k++) begin
          if (slot_valid[k]) begin
            a = int'(slot_pc[k]);
            chk(a == exp_pc && int'(slot_len[k]) == len_at[a],
                $sformatf("config %0d: slot %0d at %h, expected %h", g, k, a, exp_pc));
            n_insn++;
            exp_pc = (target[a] >= 0) ? target[a] : a + len_at[a];
          end
        end
        chk(slot_valid[0], $sformatf("config %0d: empty group", g));
      end
      rate[g] = real'(n_insn) / real'(n_cyc);
      $display("degree %0d, %0d entries, %0d-byte lines: %0d instructions in %0d cycles, %0.2f per cycle",
               D, E, LINE, n_insn, n_cyc, rate[g]);
      chk(rate[g] <= real'(D), "rate above the degree");
      done[g] = 1;
    end
  end

  initial begin
    wait (ready);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int g = 0; g < NCFG; g++) wait (done[g]);
    chk(rate[3] < rate[1] && rate[1] < rate[4], "rate does not grow with the degree");
    chk(rate[0] < rate[1], "64 entries no faster than 8");
    chk(rate[2] < rate[1] * 1.15, "no saturation between 64 and 256 entries");
    for (int g = 6; g < NCFG; g++)
      chk(rate[g] >= rate[g-1] * 0.98, $sformatf("%0d-byte lines slower than %0d-byte lines",
                                                 CFG_LINE[g], CFG_LINE[g-1]));
    chk(rate[5] < rate[7] * 0.95, "16-byte lines not slower than 64-byte lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
