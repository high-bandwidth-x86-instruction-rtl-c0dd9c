// tb_x86_sizer: checks the x86 length decoder against generated instructions
// whose lengths are known from the way they were built, plus directed cases
// at the limits (11 prefixes, 15-byte instructions, SIB with disp32, 16-bit
// addressing, the F6/F7 immediate rule).
module tb_x86_sizer;
  import fetch_pkg::*;
  import x86_gen_pkg::*;

  logic [8*SIZER_WIN-1:0] win;
  logic [LEN_W-1:0]       len;
  logic [3:0]             prefixes;
  logic                   has_modrm;
  int checks = 0, failures = 0;

  x86_sizer dut (.win, .len, .prefixes, .has_modrm);

  task automatic check_bytes(input byte unsigned b[], input int exp, input string what);
    win = '0;
    for (int i = 0; i < b.size() && i < SIZER_WIN; i++) win[8*i +: 8] = b[i];
    // bytes after the instruction are random: the sizer must not look at them
    for (int i = b.size(); i < SIZER_WIN; i++) win[8*i +: 8] = 8'($urandom);
    #1;
    checks++;
    if (int'(len) != exp) begin
      failures++;
      $display("FAIL %s: len=%0d expected %0d (bytes %h)", what, len, exp, win);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    insn_t x;
    byte unsigned d[];
    // directed cases
    d = '{8'h90};                                   check_bytes(d, 1, "nop");
    d = '{8'h0F, 8'h05};                            check_bytes(d, 2, "syscall");
    d = '{8'h8B, 8'h04, 8'h25, 0, 0, 0, 0};         check_bytes(d, 7, "sib base=101 mod=00");
    d = '{8'h8B, 8'h05, 0, 0, 0, 0};                check_bytes(d, 6, "disp32 abs");
    d = '{8'h8B, 8'h44, 8'h24, 8'h08};              check_bytes(d, 4, "sib disp8");
    d = '{8'h67, 8'h8B, 8'h06, 0, 0};               check_bytes(d, 5, "addr16 disp16");
    d = '{8'h66, 8'h81, 8'hC0, 0, 0};               check_bytes(d, 5, "opsize imm16");
    d = '{8'hF6, 8'hC0, 8'h01};                     check_bytes(d, 3, "test r/m8, ib");
    d = '{8'hF6, 8'hD0};                            check_bytes(d, 2, "not r/m8");
    d = '{8'hC8, 0, 0, 0};                          check_bytes(d, 4, "enter");
    d = '{8'h9A, 0, 0, 0, 0, 0, 0};                 check_bytes(d, 7, "call far");
    d = '{8'h0F, 8'h84, 0, 0, 0, 0};                check_bytes(d, 6, "jcc rel32");
    d = '{8'h0F, 8'hBA, 8'hE0, 8'h03};              check_bytes(d, 4, "bt r/m, ib");
    d = new[15];
    for (int i = 0; i < 11; i++) d[i] = 8'h2E;
    d[11] = 8'h0F; d[12] = 8'hAF; d[13] = 8'h04; d[14] = 8'h24;
    check_bytes(d, 15, "11 prefixes, 0F AF, ModR/M, SIB");
    checks++;
    if (prefixes != 4'd11 || !has_modrm) begin
      failures++;
      $display("FAIL prefix count %0d modrm %0b", prefixes, has_modrm);
    end
    // random instructions
    for (int n = 0; n < 5000; n++) begin
      x = gen(4);
      d = new[x.len];
      for (int i = 0; i < x.len; i++) d[i] = x.b[i];
      check_bytes(d, x.len, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
