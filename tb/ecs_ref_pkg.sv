// ecs_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: BCH encoding by long division, and the field
// sequence a frame must carry on the line.
package ecs_ref_pkg;

  // x^8 m(x) mod g(x), g = x^8+x^7+x^6+x^4+1, by polynomial long division
  function automatic logic [14:0] ref_bch_encode(logic [6:0] m);
    logic [14:0] r;
    r = {m, 8'h00};
    for (int i = 14; i >= 8; i--)
      if (r[i]) r = r ^ (15'h1D1 << (i - 8));
    return {m, r[7:0]};
  endfunction

  function automatic bit ref_is_codeword(logic [14:0] c);
    logic [14:0] r;
    r = c;
    for (int i = 14; i >= 8; i--)
      if (r[i]) r = r ^ (15'h1D1 << (i - 8));
    return r[7:0] == 8'h00;
  endfunction

  // Field values of one frame in line order: GF, SF0..3, NOI0..3, IDX0..3.
  // An absent field (Index of an all-zero segment) is -1.
  typedef int fields_t [13];

  function automatic fields_t ref_fields(logic [15:0] w);
    fields_t f;
    logic [15:0] g;
    logic [3:0]  n;
    int          ones, pos [2], np;
    g    = ($countones(w) > 8) ? ~w : w;
    f[0] = ($countones(w) > 8) ? 1 : 0;
    for (int k = 0; k < 4; k++) begin
      n = g[4*k +: 4];
      f[1+k] = ($countones(n) > 2) ? 1 : 0;
      if ($countones(n) > 2) n = ~n;
      ones   = $countones(n);
      f[5+k] = ones;
      np = 0;
      for (int b = 0; b < 4; b++) if (n[b]) begin pos[np] = b; np++; end
      if (ones == 0)      f[9+k] = -1;
      else if (ones == 1) f[9+k] = pos[0];
      else begin
        // pairs in order (0,1)(0,2)(0,3)(1,2)(1,3)(2,3)
        int code = 0;
        for (int a = 0; a < 4; a++)
          for (int b = a + 1; b < 4; b++) begin
            if (a == pos[0] && b == pos[1]) f[9+k] = code;
            code++;
          end
      end
    end
    return f;
  endfunction

endpackage
