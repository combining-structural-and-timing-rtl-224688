// tb_isa_ref_pkg: arithmetic reference model of the inexact speculative adder,
// for testbenches only.
//
// isa_ref() works on integers rather than on the RTL's bit slices: each path
// sum is (a_i + b_i + carry) mod 2^BLOCK, the speculated carry is the carry
// out of the SPEC-bit window added with the guess as carry-in, and the
// compensation is applied as +1 / -1 on the path value (when the CORR-bit
// field is not saturated) or by OR-ing / AND-ing a mask into the preceding
// path. It also reports which mechanisms fired, so that testbenches can count
// coverage without looking inside the design.
package tb_isa_ref_pkg;

  typedef struct {
    longint unsigned value;    // {cout, sum}
    int              faults;
    int              corr_up;
    int              corr_down;
    int              bal_up;
    int              bal_down;
  } isa_ref_t;

  function automatic isa_ref_t isa_ref(longint unsigned a, longint unsigned b, bit cin,
                                       int w, int bl, int s, int c, int r, bit guess);
    isa_ref_t        o;
    int              nb;
    longint unsigned mask, t, wa, wb, f;
    longint unsigned raw  [64];
    longint unsigned res  [64];
    bit              cspec[64];
    bit              cout [64];
    nb = w / bl;
    mask = (64'd1 << bl) - 1;
    o = '{0, 0, 0, 0, 0, 0};
    for (int i = 0; i < nb; i++) begin
      if (i == 0)      cspec[i] = cin;
      else if (s == 0) cspec[i] = guess;
      else begin
        wa = (a >> (i * bl - s)) & ((64'd1 << s) - 1);
        wb = (b >> (i * bl - s)) & ((64'd1 << s) - 1);
        cspec[i] = bit'(((wa + wb + 64'(guess)) >> s) & 1);
      end
      t = ((a >> (i * bl)) & mask) + ((b >> (i * bl)) & mask) + 64'(cspec[i]);
      raw[i]  = t & mask;
      cout[i] = bit'(t >> bl);
      res[i]  = raw[i];
    end
    for (int i = 1; i < nb; i++) begin
      if (cout[i-1] != cspec[i]) begin
        bit fixed;
        fixed = 1'b0;
        o.faults++;
        if (c > 0) begin
          f = raw[i] & ((64'd1 << c) - 1);
          if (cout[i-1] && f != (64'd1 << c) - 1) begin
            res[i] = res[i] + 1; fixed = 1'b1; o.corr_up++;
          end else if (!cout[i-1] && f != 0) begin
            res[i] = res[i] - 1; fixed = 1'b1; o.corr_down++;
          end
        end
        if (!fixed && r > 0) begin
          f = ((64'd1 << r) - 1) << (bl - r);
          if (cout[i-1]) begin res[i-1] = res[i-1] | f;  o.bal_up++;   end
          else           begin res[i-1] = res[i-1] & ~f; o.bal_down++; end
        end
      end
    end
    o.value = 64'(cout[nb-1]) << w;
    for (int i = 0; i < nb; i++) o.value = o.value | (res[i] << (i * bl));
    return o;
  endfunction

endpackage
