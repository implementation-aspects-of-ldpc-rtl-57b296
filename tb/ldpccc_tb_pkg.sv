// ldpccc_tb_pkg: testbench-side models of the rate 1/2 LDPC convolutional
// code, written independently of the RTL. The code is given by the later
// check offsets of the information symbol (A1, A2) and of the parity
// symbol (B1, B2); both symbols are also in the check of their own time.
//   enc_step  one step of the partial syndrome state for information bit u
//   tail_coef the termination table: for every tail position n the MS-bit
//             word g_n such that feeding u_{L+n} = parity(p_L & g_n) to
//             the encoder returns it to the zero state after TAU steps.
//             It is found by Gaussian elimination over GF(2) on [B | A],
//             where A maps the starting state and B the tail bits to the
//             state after the tail. `rank` returns the rank of B.
package ldpccc_tb_pkg;

  class code_model #(int unsigned MS = 32, int unsigned TAU = 66,
                     int A1 = 11, int A2 = 32, int B1 = 7, int B2 = 25);

    static function bit [MS:1] enc_step(bit [MS:1] p, bit ub);
      bit v0, v1;
      bit [MS:1] q;
      v0 = ub;
      v1 = ub ^ p[1];
      for (int i = 1; i <= int'(MS); i++) begin
        bit h;
        h = ((i == A1 || i == A2) && v0) ^ ((i == B1 || i == B2) && v1);
        q[i] = ((i < int'(MS)) ? p[i+1] : 1'b0) ^ h;
      end
      return q;
    endfunction

    static function bit [MS:1] run_tail(bit [MS:1] p0, bit [TAU-1:0] ut);
      bit [MS:1] p;
      p = p0;
      for (int n = 0; n < int'(TAU); n++) p = enc_step(p, ut[n]);
      return p;
    endfunction

    static function void tail_coef(output bit [MS:1] g [TAU], output int rank);
      bit [TAU-1:0] brow [MS+1];
      bit [MS:1]    arow [MS+1];
      int           pivcol [MS+1];
      int           r;
      for (int i = 1; i <= int'(MS); i++) begin brow[i] = '0; arow[i] = '0; end
      for (int n = 0; n < int'(TAU); n++) begin
        bit [MS:1] s;
        bit [TAU-1:0] e;
        e = '0; e[n] = 1'b1;
        s = run_tail('0, e);
        for (int i = 1; i <= int'(MS); i++) brow[i][n] = s[i];
      end
      for (int c = 1; c <= int'(MS); c++) begin
        bit [MS:1] s, e;
        e = '0; e[c] = 1'b1;
        s = run_tail(e, '0);
        for (int i = 1; i <= int'(MS); i++) arow[i][c] = s[i];
      end
      r = 1;
      for (int c = 0; c < int'(TAU) && r <= int'(MS); c++) begin
        int pr;
        bit [TAU-1:0] tb;
        bit [MS:1] ta;
        pr = 0;
        for (int i = r; i <= int'(MS); i++) if (brow[i][c] && pr == 0) pr = i;
        if (pr == 0) continue;
        tb = brow[r]; brow[r] = brow[pr]; brow[pr] = tb;
        ta = arow[r]; arow[r] = arow[pr]; arow[pr] = ta;
        for (int i = 1; i <= int'(MS); i++)
          if (i != r && brow[i][c]) begin
            brow[i] ^= brow[r];
            arow[i] ^= arow[r];
          end
        pivcol[r] = c;
        r++;
      end
      rank = r - 1;
      for (int n = 0; n < int'(TAU); n++) g[n] = '0;
      for (int i = 1; i < r; i++) g[pivcol[i]] = arow[i];
    endfunction

  endclass

endpackage
