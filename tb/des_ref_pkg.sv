// des_ref_pkg: a plain software model of DES and two-key Triple-DES for the
// testbenches. It follows the textbook description directly: all 16 round
// keys are computed up front (PC-1, cumulative left rotations, PC-2), the 16
// rounds run in a loop with explicit L/R exchange, and decryption uses the
// same keys in reverse order. It shares only the standard's tables with the
// RTL; the testbenches check the model itself against published
// known-answer vectors before trusting it.
package des_ref_pkg;
  import des_pkg::*;

  function automatic logic [63:0] des_ref(input logic [63:0] key,
                                          input logic [63:0] blk,
                                          input bit          decrypt);
    logic [47:0] ks [16];
    logic [27:0] c, d;
    logic [55:0] cd;
    logic [31:0] l, r, t;
    logic [63:0] x;
    cd = pc1(key);
    c = cd[55:28];
    d = cd[27:0];
    for (int i = 0; i < 16; i++) begin
      for (int s = 0; s < int'(SHIFT_T[i]); s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      ks[i] = pc2({c, d});
    end
    x = ip(blk);
    l = x[63:32];
    r = x[31:0];
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ f_func(r, decrypt ? ks[15-i] : ks[i]);
      l = t;
    end
    return fp({r, l});
  endfunction

  function automatic logic [63:0] tdes_ref(input logic [63:0] k1,
                                           input logic [63:0] k2,
                                           input logic [63:0] blk,
                                           input bit          decrypt);
    if (!decrypt) return des_ref(k1, des_ref(k2, des_ref(k1, blk, 0), 1), 0);
    else          return des_ref(k1, des_ref(k2, des_ref(k1, blk, 1), 0), 1);
  endfunction
endpackage
