// qc_code_pkg: testbench support for the dataflow decoder. The class qc_code
// builds a quasi-cyclic parity-check matrix of mb x nb circulants of size z:
// the first nb-mb block columns (information part) have weight 3 with random
// shifts, the last mb block columns form a dual diagonal of identity
// circulants, as in repeat-accumulate codes, so that encoding is a running
// XOR. Circulant k with shift s connects check node row*z + c to variable
// node col*z + ((c - s) mod z). The class also decodes with a plain
// floating-order description of the fixed-point min-sum schedule that the
// decoder implements (8-bit messages, 12-bit sums), used as the reference.
package qc_code_pkg;

  class qc_code;
    int z, mb, nb, e;
    int ent_row[$], ent_col[$], ent_shift[$];
    int col_list[$];               // entry indices in column-major order
    bit row_last[$], col_last[$];

    function new(int z_, int mb_, int nb_);
      z = z_; mb = mb_; nb = nb_;
    endfunction

    // build the base matrix
    function void build();
      int kb = nb - mb;
      int shifts[int][int];        // [row][col] -> shift, -1 absent
      for (int r = 0; r < mb; r++) begin
        for (int c = 0; c < nb; c++) shifts[r][c] = -1;
      end
      for (int c = 0; c < kb; c++) begin
        for (int w = 0; w < 3; w++) shifts[(c + w) % mb][c] = $urandom_range(z - 1);
      end
      for (int i = 0; i < mb; i++) begin
        shifts[i][kb + i] = 0;
        if (i + 1 < mb) shifts[i + 1][kb + i] = 0;
      end
      ent_row.delete(); ent_col.delete(); ent_shift.delete(); row_last.delete();
      for (int r = 0; r < mb; r++) begin
        for (int c = 0; c < nb; c++) begin
          if (shifts[r][c] >= 0) begin
            ent_row.push_back(r); ent_col.push_back(c); ent_shift.push_back(shifts[r][c]);
            row_last.push_back(1'b0);
          end
        end
        row_last[row_last.size() - 1] = 1'b1;
      end
      e = ent_row.size();
      col_list.delete(); col_last.delete();
      for (int c = 0; c < nb; c++) begin
        for (int k = 0; k < e; k++) begin
          if (ent_col[k] == c) begin
            col_list.push_back(k); col_last.push_back(1'b0);
          end
        end
        col_last[col_last.size() - 1] = 1'b1;
      end
    endfunction

    function int vn_of(int k, int c);
      return ent_col[k] * z + ((c - ent_shift[k] + z) % z);
    endfunction

    // random codeword: information bits random, parity by running XOR
    function void encode(ref bit cw[]);
      int kb = nb - mb;
      bit syn[];
      cw = new[nb * z];
      syn = new[mb * z];
      for (int i = 0; i < kb * z; i++) cw[i] = 1'($urandom_range(1));
      foreach (syn[i]) syn[i] = 0;
      for (int k = 0; k < e; k++) begin
        if (ent_col[k] < kb) begin
          for (int c = 0; c < z; c++) syn[ent_row[k] * z + c] ^= cw[vn_of(k, c)];
        end
      end
      for (int i = 0; i < mb; i++) begin
        for (int c = 0; c < z; c++) begin
          cw[(kb + i) * z + c] = syn[i * z + c] ^ ((i > 0) ? cw[(kb + i - 1) * z + c] : 1'b0);
        end
      end
    endfunction

    function bit check(const ref bit cw[]);
      bit syn[];
      syn = new[mb * z];
      foreach (syn[i]) syn[i] = 0;
      for (int k = 0; k < e; k++) begin
        for (int c = 0; c < z; c++) syn[ent_row[k] * z + c] ^= cw[vn_of(k, c)];
      end
      foreach (syn[i]) if (syn[i]) return 0;
      return 1;
    endfunction

    static function int sat(int v, int lim);
      if (v > lim) return lim;
      if (v < -lim) return -lim;
      return v;
    endfunction

    // reference min-sum decoder, same schedule and number formats as the RTL
    function void decode(const ref int llr[], input int iters, ref bit dec[]);
      int msg[];                        // [k*z + c] edge message, c = CN lane
      msg = new[e * z];
      dec = new[nb * z];
      for (int ph = 0; ph <= 2 * iters; ph++) begin
        if (ph % 2 == 1) begin          // CN phase
          for (int r = 0; r < mb; r++) begin
            for (int c = 0; c < z; c++) begin
              int ks[$];
              for (int k = 0; k < e; k++) if (ent_row[k] == r) ks.push_back(k);
              begin
                int m1, m2, i1, sg;
                int vals[$];
                m1 = 127; m2 = 127; i1 = -1; sg = 0;
                foreach (ks[q]) begin
                  int x, a;
                  x = sat(msg[ks[q] * z + c], 127);
                  vals.push_back(x);
                  a = (x < 0) ? -x : x;
                  if (x < 0) sg ^= 1;
                  if (a < m1) begin m2 = m1; m1 = a; i1 = q; end
                  else if (a < m2) m2 = a;
                end
                foreach (ks[q]) begin
                  int mg, s;
                  mg = (q == i1) ? m2 : m1;
                  s  = sg ^ ((vals[q] < 0) ? 1 : 0);
                  msg[ks[q] * z + c] = s ? -mg : mg;
                end
              end
            end
          end
        end else begin                  // VN phase (phase 0: CN messages are zero)
          for (int j = 0; j < nb; j++) begin
            for (int v = 0; v < z; v++) begin
              int sum;
              int ks[$];
              foreach (col_list[t]) if (ent_col[col_list[t]] == j) ks.push_back(col_list[t]);
              sum = llr[j * z + v];
              foreach (ks[q]) begin
                int c = (v + ent_shift[ks[q]]) % z;
                if (ph == 0) msg[ks[q] * z + c] = 0;
                sum = sat(sum + msg[ks[q] * z + c], 2047);
              end
              foreach (ks[q]) begin
                int c = (v + ent_shift[ks[q]]) % z;
                msg[ks[q] * z + c] = sat(sum - msg[ks[q] * z + c], 127);
              end
              dec[j * z + v] = (sum < 0);
            end
          end
        end
      end
    endfunction
  endclass

endpackage
