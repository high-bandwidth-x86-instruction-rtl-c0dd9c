// tb_spec_commit_unit: checks the Speculation Commit Unit on line pairs cut
// from a random IA-32 program. P is put on an instruction start in the first
// line and the predicted length is either P's real length (so S is a real
// instruction and its length is checked too) or a wrong one; the expected
// lengths, split-line flags and the next sequential offset come from the
// generated program.
module tb_spec_commit_unit;
  import fetch_pkg::*;
  localparam int LINE = 32, MEM = 4096, OFF_W = $clog2(2 * LINE) + 1;

  logic [31:0] addr;
  logic [8*2*LINE-1:0] line;
  logic [OFF_W-1:0] p_off, s_off, p_end, s_end, next_off;
  logic [LEN_W-1:0] pred_len, len_p, len_s;
  logic correct, split_p, split_s, s_in_line;
  int checks = 0, failures = 0, n_ok = 0, n_bad = 0, n_split = 0;

  code_mem #(.MEM_BYTES(MEM), .LINE_BYTES(LINE)) u_mem (.addr, .line);
  spec_commit_unit #(.LINE_BYTES(LINE)) dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL addr=%h p_off=%0d pred=%0d: %s", addr, p_off, pred_len, s);
  endtask

  initial begin
    #100000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, lp, ls, pe, se, so;
    #1;
    for (int n = 0; n < 4000; n++) begin
      a = u_mem.start_at_or_after($urandom_range(MEM - 200));
      addr = 32'(a - a % LINE);
      p_off = OFF_W'(a % LINE);
      lp = u_mem.len_at[a];
      pred_len = ($urandom_range(1) == 1) ? LEN_W'(lp) : LEN_W'($urandom_range(1, 15));
      #1;
      pe = a % LINE + lp;
      so = a % LINE + int'(pred_len);
      checks++;
      if (int'(len_p) != lp) fail($sformatf("len_p %0d expected %0d", len_p, lp));
      checks++;
      if (int'(s_off) != so || int'(p_end) != pe) fail("s_off/p_end");
      checks++;
      if (correct != (int'(pred_len) == lp)) fail("correct flag");
      checks++;
      if (split_p != (pe > LINE) || s_in_line != (so < LINE)) fail("split_p/s_in_line");
      if (correct) begin
        n_ok++;
        ls = u_mem.len_at[a + lp];
        se = so + ls;
        checks++;
        if (int'(len_s) != ls || int'(s_end) != se || split_s != (se > LINE))
          fail($sformatf("S: len %0d expected %0d", len_s, ls));
        checks++;
        if (int'(next_off) != ((pe <= LINE && so < LINE) ? se : pe)) fail("next_off");
      end else begin
        n_bad++;
        checks++;
        if (int'(next_off) != pe) fail("next_off after misprediction");
      end
      if (pe > LINE) n_split++;
    end
    checks++;
    if (n_ok == 0 || n_bad == 0 || n_split == 0) fail("a case was never reached");
    $display("right %0d wrong %0d split %0d", n_ok, n_bad, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
