// x86_gen_pkg: random IA-32 instruction generator for the testbenches.
//
// gen() emits the bytes of one instruction (32-bit code segment) built from a
// set of encoding templates: optional prefixes, a one- or two-byte opcode, a
// ModR/M byte with SIB and displacement chosen at random, and an immediate.
// The length is the number of bytes it emitted, so it is known without any
// length-decoding table. 66h switches 16/32-bit immediates and 67h switches
// to 16-bit addressing, and the generator follows both.
package x86_gen_pkg;

  typedef struct {
    byte unsigned b[16];
    int           len;
  } insn_t;

  function automatic void put(ref insn_t x, input int v);
    x.b[x.len] = 8'(v);
    x.len++;
  endfunction

  function automatic void put_n(ref insn_t x, input int n);
    for (int i = 0; i < n; i++) put(x, $urandom);
  endfunction

  // ModR/M (+SIB, +displacement) with a given reg field
  function automatic void modrm(ref insn_t x, input bit a16, input int regf);
    int md, rm, sib;
    md = $urandom_range(3);
    rm = $urandom_range(7);
    put(x, (md << 6) | (regf << 3) | rm);
    if (a16) begin
      if (md == 0 && rm == 6) put_n(x, 2);
      else if (md == 1)       put_n(x, 1);
      else if (md == 2)       put_n(x, 2);
    end else begin
      if (md != 3 && rm == 4) begin
        sib = $urandom_range(255);
        put(x, sib);
        if (md == 0 && (sib & 7) == 5) put_n(x, 4);
      end
      if (md == 0 && rm == 5) put_n(x, 4);
      else if (md == 1)       put_n(x, 1);
      else if (md == 2)       put_n(x, 4);
    end
  endfunction

  // max_pfx: how many prefixes may be put in front
  function automatic insn_t gen(input int max_pfx);
    insn_t x;
    bit o16, a16;
    int np, t, z;
    int pfx[7] = '{'h66, 'h67, 'hF3, 'h2E, 'h3E, 'h64, 'hF0};
    int alu[16] = '{'h01, 'h03, 'h09, 'h0B, 'h21, 'h23, 'h29, 'h2B,
                              'h31, 'h33, 'h39, 'h3B, 'h89, 'h8B, 'h85, 'h8D};
    x.len = 0;
    o16 = 0;
    a16 = 0;
    np = ($urandom_range(3) == 0) ? $urandom_range(max_pfx) : 0;
    for (int i = 0; i < np; i++) begin
      int p;
      p = pfx[$urandom_range(6)];
      if (p == 'h66) o16 = 1;
      if (p == 'h67) a16 = 1;
      put(x, p);
    end
    z = o16 ? 2 : 4;
    t = $urandom_range(19);
    case (t)
      0:  put(x, 'h90);
      1:  put(x, 'h50 + $urandom_range(7));
      2:  put(x, 'hC3);
      3:  begin put(x, alu[$urandom_range(15)]); modrm(x, a16, $urandom_range(7)); end
      4:  begin put(x, 'hB8 + $urandom_range(7)); put_n(x, z); end
      5:  begin put(x, 'h83); modrm(x, a16, $urandom_range(7)); put_n(x, 1); end
      6:  begin put(x, 'h81); modrm(x, a16, $urandom_range(7)); put_n(x, z); end
      7:  begin put(x, 'h0F); put(x, 'h80 + $urandom_range(15)); put_n(x, z); end
      8:  begin put(x, 'h0F); put(x, 'hAF); modrm(x, a16, $urandom_range(7)); end
      9:  begin put(x, 'hE8); put_n(x, z); end
      10: begin put(x, ($urandom_range(1) != 0) ? 'hEB : 'h74); put_n(x, 1); end
      11: begin put(x, 'h6A); put_n(x, 1); end
      12: begin put(x, 'hF7); modrm(x, a16, 0); put_n(x, z); end
      13: begin put(x, 'hF7); modrm(x, a16, 2 + $urandom_range(5)); end
      14: begin put(x, 'hC7); modrm(x, a16, 0); put_n(x, z); end
      15: begin put(x, 'h04 + 8 * $urandom_range(7)); put_n(x, 1); end
      16: begin put(x, 'hA1); put_n(x, a16 ? 2 : 4); end
      17: begin put(x, 'h0F); put(x, 'hB6); modrm(x, a16, $urandom_range(7)); end
      18: begin put(x, 'hC1); modrm(x, a16, $urandom_range(7)); put_n(x, 1); end
      default: begin put(x, 'hD8 + $urandom_range(7)); modrm(x, a16, $urandom_range(7)); end
    endcase
    return x;
  endfunction

endpackage
