// tb_spgemm_ref: reference model and data preparation for FSpGEMM tests.
//
// spgemm_case generates a random sparse A (rows x kdim) and B (kdim x ncol),
// prepares the memory images the kernel reads (A in CSV order for a given
// PE count N, B as CSR row pointers and elements), and computes the expected
// C row by row with Gustavson's method in the same order as the hardware
// (nonzeros of a row of A by increasing column, each product and sum rounded
// to single precision), so the expected values are bit exact. It also
// counts the sparse vectors nv(A) the load module must form.
package tb_spgemm_ref;
  import fspgemm_pkg::*;
  import tb_fp_util::*;

  class spgemm_case;
    int rows, kdim, ncol;
    int          acol [][$];     // per row of A: sorted columns
    logic [31:0] aval [][$];
    int          bcol [][$];     // per row of B
    logic [31:0] bval [][$];
    csv_t        csv  [$];       // A in CSV order
    logic [31:0] bptr [$];       // CSR row pointers of B (kdim+1)
    bmem_t       bmem [$];       // CSR elements of B
    c_t          cref [$];       // expected C, row by row, columns ascending
    int          nv;

    function new(int rows_, int kdim_, int ncol_, int a_pct, int b_pct);
      rows = rows_; kdim = kdim_; ncol = ncol_;
      acol = new[rows]; aval = new[rows];
      bcol = new[kdim]; bval = new[kdim];
      for (int r = 0; r < rows; r++)
        for (int k = 0; k < kdim; k++)
          if ($urandom_range(0, 99) < a_pct) begin acol[r].push_back(k); aval[r].push_back(rnd_f32()); end
      for (int k = 0; k < kdim; k++)
        for (int c = 0; c < ncol; c++)
          if ($urandom_range(0, 99) < b_pct) begin bcol[k].push_back(c); bval[k].push_back(rnd_f32()); end
    endfunction

    // CSV order: per group of N rows, per column ascending, rows ascending
    function void make_csv(int n);
      csv.delete(); nv = 0;
      for (int g = 0; g * n < rows; g++)
        for (int k = 0; k < kdim; k++) begin
          bit any = 0;
          for (int r = g * n; r < (g + 1) * n && r < rows; r++)
            foreach (acol[r][j]) if (acol[r][j] == k) begin
              csv_t e;
              e.val = aval[r][j]; e.rowIdx = r; e.colIdx = k;
              e.eor = (j == acol[r].size() - 1);
              csv.push_back(e); any = 1;
            end
          if (any) nv++;
        end
      bptr.delete(); bmem.delete();
      for (int k = 0; k < kdim; k++) begin
        bptr.push_back(bmem.size());
        foreach (bcol[k][j]) begin
          bmem_t b; b.val = bval[k][j]; b.colIdx = bcol[k][j]; bmem.push_back(b);
        end
      end
      bptr.push_back(bmem.size());
    endfunction

    function void reference();
      cref.delete();
      for (int r = 0; r < rows; r++) begin
        int pc[$]; logic [31:0] pv[$];
        foreach (acol[r][j]) begin
          int nc[$]; logic [31:0] nvv[$];
          int k = acol[r][j];
          int p = 0, q = 0;
          while (p < pc.size() || q < bcol[k].size()) begin
            if (q >= bcol[k].size() || (p < pc.size() && pc[p] < bcol[k][q])) begin
              nc.push_back(pc[p]); nvv.push_back(pv[p]); p++;
            end else if (p >= pc.size() || pc[p] > bcol[k][q]) begin
              nc.push_back(bcol[k][q]); nvv.push_back(mul_f32(aval[r][j], bval[k][q])); q++;
            end else begin
              nc.push_back(pc[p]); nvv.push_back(add_f32(pv[p], mul_f32(aval[r][j], bval[k][q]))); p++; q++;
            end
          end
          pc = nc; pv = nvv;
        end
        foreach (pc[i]) begin
          c_t c; c.val = pv[i]; c.rowIdx = r; c.colIdx = pc[i]; cref.push_back(c);
        end
      end
    endfunction
  endclass

  // order-independent comparison key: (row, column, value)
  function automatic logic [95:0] ckey(c_t c);
    return {c.rowIdx, c.colIdx, c.val};
  endfunction
endpackage
