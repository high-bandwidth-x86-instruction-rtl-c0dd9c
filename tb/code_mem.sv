// code_mem: testbench model of a perfect instruction cache holding a random
// IA-32 program.
//
// At time 0 it fills MEM_BYTES bytes with back-to-back instructions from
// x86_gen_pkg and records, for every byte address, whether an instruction
// starts there and its length. Reading is combinational: line returns the
// 2*LINE_BYTES bytes starting at the line-aligned address addr (zero past the
// end). Testbenches use is_start/len_at to work out the expected pointers.
module code_mem
  import x86_gen_pkg::*;
#(
  parameter int unsigned MEM_BYTES  = 4096,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned ADDR_W     = 32,
  parameter int          MAX_PFX    = 3
) (
  input  logic [ADDR_W-1:0]         addr,
  output logic [8*2*LINE_BYTES-1:0] line
);

  byte unsigned mem      [MEM_BYTES];
  bit           is_start [MEM_BYTES];
  int           len_at   [MEM_BYTES];
  int           n_insn;
  int           last_start;

  initial begin
    int a;
    insn_t x;
    a = 0;
    n_insn = 0;
    for (int i = 0; i < MEM_BYTES; i++) begin
      mem[i] = 8'h00;
      is_start[i] = 0;
      len_at[i] = 0;
    end
    while (a + 16 < MEM_BYTES) begin
      x = gen(MAX_PFX);
      is_start[a] = 1;
      len_at[a] = x.len;
      for (int i = 0; i < x.len; i++) mem[a + i] = x.b[i];
      last_start = a;
      a += x.len;
      n_insn++;
    end
  end

  always_comb
    for (int i = 0; i < 2 * LINE_BYTES; i++)
      line[8*i +: 8] = (int'(addr) + i < MEM_BYTES) ? mem[int'(addr) + i] : 8'h00;

  // nearest instruction start at or after a
  function automatic int start_at_or_after(input int a);
    int r;
    r = a;
    while (r < MEM_BYTES && !is_start[r]) r++;
    return r;
  endfunction

endmodule
