// tb_fschol_ref: software model of a Cholesky PE for the testbenches.
//
// fschol_model works through the same jobs as a PE, element by element,
// with every add, multiply, divide and square root rounded to single
// precision in the same order as the hardware, so its results can be
// compared bit for bit. For each job it produces the stimulus (job word,
// A vectors, pattern vectors) and the expected L vectors and inter-PE
// vectors. Each model keeps its own Mem_U and Q_F,PE contents; the inter-PE
// channels are fschol_chan objects shared by two models.
package tb_fschol_ref;
  import fschol_pkg::*;
  import tb_fp_util::*;

  class fschol_chan #(int VL = 4);
    typedef logic [VL-1:0][31:0] vec_t;
    vec_t q [$];
  endclass

  class fschol_model #(int VL = 4, int DMAX = 12, int UMAX = 8);
    typedef logic [VL-1:0][31:0] vec_t;
    typedef logic [31:0] mat_t [DMAX][DMAX];

    job_t          jobs [$];
    vec_t          qa [$];
    logic [VL-1:0] qp [$];
    vec_t          exp_ql [$];
    logic          exp_last [$];
    vec_t          exp_qf [$];
    vec_t          qfpe [$];
    logic [31:0]   memu [UMAX * UMAX];
    fschol_chan #(VL) f_out, f_in;

    function new(fschol_chan #(VL) f_out, fschol_chan #(VL) f_in);
      this.f_out = f_out;
      this.f_in  = f_in;
    endfunction

    static function int nv_of(int d);
      return (d + VL - 1) / VL;
    endfunction

    static function logic [31:0] neg(logic [31:0] x);
      return {~x[31], x[30:0]};
    endfunction

    static function logic [31:0] rnd_small();
      int v;
      v = $urandom_range(0, 2000);
      return to_f32((v - 1000) / 1000.0);
    endfunction

    task to_vecs(input mat_t f, input int d, ref vec_t q [$]);
      for (int r = 0; r < d; r++)
        for (int v = 0; v < nv_of(d); v++) begin
          vec_t x;
          for (int i = 0; i < VL; i++) x[i] = (v * VL + i < d) ? f[r][v*VL+i] : 32'h0;
          q.push_back(x);
        end
    endtask

    task from_vecs(output mat_t f, input int d, ref vec_t q [$]);
      for (int r = 0; r < d; r++)
        for (int v = 0; v < nv_of(d); v++) begin
          vec_t x = q.pop_front();
          for (int i = 0; i < VL; i++) if (v * VL + i < d) f[r][v*VL+i] = x[i];
        end
    endtask

    // one job; idx lists where the child's update matrix lands in F
    task run_job(int d, int t1, bit up, bit last_c, bit f_rd, bit f_wr, bit u_rd,
                 int idx [$]);
      mat_t f, ext;
      int cnt;
      jobs.push_back('{up: up, last_c: last_c, f_rd: f_rd, f_wr: f_wr, u_rd: u_rd,
                       d: DIM_W'(d), t1: DIM_W'(t1)});
      if (!up) begin
        for (int r = 0; r < d; r++)
          for (int c = r; c < d; c++) begin
            f[r][c] = (r == c) ? to_f32(16.0 + $urandom_range(0, 1000) / 100.0) : rnd_small();
            f[c][r] = f[r][c];
          end
        to_vecs(f, d, qa);
      end else if (f_rd) from_vecs(f, d, f_in.q);
      else from_vecs(f, d, qfpe);
      cnt = 0;
      for (int r = 0; r < d; r++)
        for (int v = 0; v < nv_of(d); v++) begin
          logic [VL-1:0] p;
          for (int i = 0; i < VL; i++) begin
            int c = v * VL + i;
            p[i] = u_rd && (c < d) && (r inside {idx}) && (c inside {idx});
            if (c < d) begin
              ext[r][c] = p[i] ? memu[cnt] : 32'h0;
              if (p[i]) cnt++;
            end
          end
          if (u_rd) qp.push_back(p);
        end
      for (int r = 0; r < d; r++)
        for (int c = 0; c < d; c++) f[r][c] = add_f32(f[r][c], ext[r][c]);
      if (!last_c) begin
        if (f_wr) begin to_vecs(f, d, exp_qf); to_vecs(f, d, f_out.q); end
        else to_vecs(f, d, qfpe);
        return;
      end
      for (int k = 0; k < t1; k++) begin
        logic [31:0] s, l [DMAX];
        s = sqrt_f32(f[k][k]);
        for (int c = 0; c < DMAX; c++) l[c] = (c >= k && c < d) ? div_f32(f[k][c], s) : 32'h0;
        for (int v = k / VL; v < nv_of(d); v++) begin
          vec_t x;
          for (int i = 0; i < VL; i++) x[i] = (v * VL + i < d) ? l[v*VL+i] : 32'h0;
          exp_ql.push_back(x);
          exp_last.push_back(k == t1 - 1 && v == nv_of(d) - 1);
        end
        for (int r = k + 1; r < d; r++)
          for (int c = k + 1; c < d; c++)
            f[r][c] = add_f32(f[r][c], neg(mul_f32(l[r], l[c])));
      end
      cnt = 0;
      for (int r = t1; r < d; r++)
        for (int c = t1; c < d; c++) memu[cnt++] = f[r][c];
    endtask
  endclass
endpackage
