// pgdbf_ref_pkg: bit-exact behavioural reference of the PGDBF decoder, for
// testbenches only.
//
// The class builds the parity-check matrix on its own from the base-matrix
// rule (layer l of block column j sits in block row (j mod 12 + OFF[j/12][l])
// mod 12 with circulant shift l*j mod Z) and runs the decoding equations directly:
//   c_m  = XOR of the VNs in row m
//   E_n  = (v_n XOR y_n) + sum of the CNs in column n
//   v_n ^= (E_n == max E) & R_n,  R_n = R'[n mod S] (or 1 in GDBF iterations)
//   R'  rotates one place after each iteration.
// It follows the same cycle-level conventions as the RTL (IVRG load from the
// first CN values, LFSR fill after reset) so that results match exactly.
package pgdbf_ref_pkg;

  localparam int OFF [2][3] = '{'{0, 1, 3}, '{0, 5, 7}};

  class pgdbf_ref;
    int unsigned z, n_vn, m_cn, s_len, k_max, gdbf_iters;
    bit          use_lfsr;
    bit [31:0]   lfsr, threshold;
    int unsigned col_cn[][3];     // the 3 CNs of each VN, by layer
    int unsigned row_vn[][$];     // the VNs of each CN
    bit          rp[];            // R'
    // results of the last decode
    bit          v[];
    bit          ok;
    int unsigned iters;
    // event counts
    int unsigned n_blocked;       // VN at maximum energy held back by R_n = 0
    int unsigned n_forced;        // iterations run as plain GDBF

    function new(int unsigned z_i, int unsigned s_i, int unsigned k_i,
                 int unsigned g_i, bit lfsr_i, bit [31:0] seed, bit [31:0] th);
      z = z_i; s_len = s_i; k_max = k_i; gdbf_iters = g_i; use_lfsr = lfsr_i;
      n_vn = 24 * z; m_cn = 12 * z;
      lfsr = seed; threshold = th;
      col_cn = new[n_vn];
      row_vn = new[m_cn];
      rp = new[s_len];
      v = new[n_vn];
      foreach (rp[i]) rp[i] = 0;
      for (int j = 0; j < 24; j++)
        for (int l = 0; l < 3; l++) begin
          int rb, sh;
          rb = (j % 12 + OFF[j / 12][l]) % 12;
          sh = (l * j) % z;
          for (int a = 0; a < z; a++) begin
            int col, row;
            row = rb * z + a;
            col = j * z + (a + sh) % z;
            col_cn[col][l] = row;
            row_vn[row].push_back(col);
          end
        end
      if (use_lfsr)
        for (int i = 0; i < s_len; i++) begin
          bit b;
          b = lfsr < threshold;
          for (int q = s_len - 1; q > 0; q--) rp[q] = rp[q-1];
          rp[0] = b;
          lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
        end
    endfunction

    function automatic void checks(ref bit c[]);
      foreach (c[m]) begin
        c[m] = 0;
        foreach (row_vn[m][d]) c[m] ^= v[row_vn[m][d]];
      end
    endfunction

    function automatic bit all_zero(ref bit c[]);
      foreach (c[m]) if (c[m]) return 0;
      return 1;
    endfunction

    function automatic void decode(bit y[]);
      bit c[];
      int unsigned e[];
      int unsigned emax;
      bit last;
      c = new[m_cn];
      e = new[n_vn];
      foreach (v[i]) v[i] = y[i];
      iters = 0;
      ok = 0;
      checks(c);
      if (!use_lfsr) for (int i = 0; i < s_len; i++) rp[i] = !c[i];
      forever begin
        checks(c);
        if (all_zero(c)) begin ok = 1; return; end
        if (iters == k_max) return;
        emax = 0;
        foreach (e[i]) begin
          bit dif;
          dif = v[i] ^ y[i];
          e[i] = int'(dif) + int'(c[col_cn[i][0]]) + int'(c[col_cn[i][1]]) + int'(c[col_cn[i][2]]);
          if (e[i] > emax) emax = e[i];
        end
        if (iters < gdbf_iters) n_forced++;
        foreach (v[i]) begin
          bit rb;
          rb = (iters < gdbf_iters) ? 1'b1 : rp[i % s_len];
          if (e[i] == emax && !rb) n_blocked++;
          if (e[i] == emax && rb) v[i] = !v[i];
        end
        last = rp[s_len-1];
        for (int q = s_len - 1; q > 0; q--) rp[q] = rp[q-1];
        rp[0] = last;
        iters++;
      end
    endfunction
  endclass

endpackage
