// tb_fschol_pe: self-checking testbench for the Cholesky processing element.
//
// Runs a job sequence shaped like a small elimination tree on one PE (VL=4,
// N=2, M=1, so frontal matrices up to 12x12 and update matrices up to 8x8):
// leaf supernodes that are factorized at once, a parent that is partially
// updated into the PE's own FIFO, then into the inter-PE channel (looped
// back here), and finally factorized, plus a root that takes a parent's
// update matrix and a maximum-size leaf and parent. A software model works
// through the same jobs with every add, multiply, divide and square root
// rounded to single precision, so the L columns on Q_L and the partial
// frontal matrices on the inter-PE channel must match bit for bit. Streams
// are driven with random gaps and the sinks stall at random.
module tb_fschol_pe;
  import fschol_pkg::*;
  import tb_fp_util::*;

  localparam int VL = 4, N = 2, M = 1;
  localparam int DMAX = (N + M) * VL, UMAX = N * VL;
  typedef logic [VL-1:0][31:0] vec_t;
  typedef logic [31:0] mat_t [DMAX][DMAX];

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic job_valid, job_ready, qa_valid, qa_ready, qp_valid, qp_ready;
  logic qf_in_valid, qf_in_ready, qf_out_valid, qf_out_ready;
  logic ql_valid, ql_ready, ql_last, idle;
  job_t job;
  vec_t qa_data, qf_in_data, qf_out_data, ql_data;
  logic [VL-1:0] qp_data;

  fschol_pe #(.VL(VL), .N(N), .M(M)) dut (.clk, .rst_n,
    .job_valid, .job_ready, .job, .qa_valid, .qa_ready, .qa_data,
    .qp_valid, .qp_ready, .qp_data, .qf_in_valid, .qf_in_ready, .qf_in_data,
    .qf_out_valid, .qf_out_ready, .qf_out_data,
    .ql_valid, .ql_ready, .ql_data, .ql_last, .idle);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  job_t          jobs [$];
  vec_t          qa_q [$];
  logic [VL-1:0] qp_q [$];
  vec_t          exp_ql [$];
  logic          exp_last [$];
  vec_t          exp_qf [$];
  vec_t          m_qfpe [$], m_qf [$];
  logic [31:0]   m_memu [UMAX * UMAX];

  function automatic logic [31:0] neg(logic [31:0] x);
    return {~x[31], x[30:0]};
  endfunction

  function automatic int nv_of(int d);
    return (d + VL - 1) / VL;
  endfunction

  task automatic to_vecs(input mat_t f, input int d, ref vec_t q [$]);
    for (int r = 0; r < d; r++)
      for (int v = 0; v < nv_of(d); v++) begin
        vec_t x;
        for (int i = 0; i < VL; i++) x[i] = (v * VL + i < d) ? f[r][v*VL+i] : 32'h0;
        q.push_back(x);
      end
  endtask

  task automatic from_vecs(output mat_t f, input int d, ref vec_t q [$]);
    for (int r = 0; r < d; r++)
      for (int v = 0; v < nv_of(d); v++) begin
        vec_t x = q.pop_front();
        for (int i = 0; i < VL; i++) if (v * VL + i < d) f[r][v*VL+i] = x[i];
      end
  endtask

  function automatic logic [31:0] rnd_small();
    int v;
    v = $urandom_range(0, 2000);
    return to_f32((v - 1000) / 1000.0);
  endfunction

  // one job: F from A or a partial store, extend-add, store or factorize
  task automatic run_job(int d, int t1, bit up, bit last_c, bit f_rd, bit f_wr,
                         bit u_rd, int idx [$]);
    mat_t f, ext;
    job_t j;
    int cnt;
    j = '{up: up, last_c: last_c, f_rd: f_rd, f_wr: f_wr, u_rd: u_rd,
          d: DIM_W'(d), t1: DIM_W'(t1)};
    jobs.push_back(j);
    if (!up) begin
      for (int r = 0; r < d; r++)
        for (int c = r; c < d; c++) begin
          f[r][c] = (r == c) ? to_f32(16.0 + $urandom_range(0, 1000) / 100.0) : rnd_small();
          f[c][r] = f[r][c];
        end
      to_vecs(f, d, qa_q);
    end else if (f_rd) from_vecs(f, d, m_qf);
    else from_vecs(f, d, m_qfpe);
    // extension: pattern is the outer product of the index set
    cnt = 0;
    for (int r = 0; r < d; r++)
      for (int v = 0; v < nv_of(d); v++) begin
        logic [VL-1:0] p;
        for (int i = 0; i < VL; i++) begin
          int c = v * VL + i;
          p[i] = u_rd && (c < d) && (r inside {idx}) && (c inside {idx});
          if (c < d) begin
            ext[r][c] = p[i] ? m_memu[cnt] : 32'h0;
            if (p[i]) cnt++;
          end
        end
        if (u_rd) qp_q.push_back(p);
      end
    for (int r = 0; r < d; r++)
      for (int c = 0; c < d; c++) f[r][c] = add_f32(f[r][c], ext[r][c]);
    if (!last_c) begin
      if (f_wr) begin to_vecs(f, d, exp_qf); to_vecs(f, d, m_qf); end
      else to_vecs(f, d, m_qfpe);
      return;
    end
    for (int k = 0; k < t1; k++) begin
      logic [31:0] s, l [DMAX];
      s = sqrt_f32(f[k][k]);
      for (int c = 0; c < DMAX; c++) l[c] = (c >= k && c < d) ? div_f32(f[k][c], s) : 32'h0;
      for (int v = k / VL; v < nv_of(d); v++) begin
        vec_t x;
        for (int i = 0; i < VL; i++) x[i] = l[v*VL+i];
        exp_ql.push_back(x);
        exp_last.push_back(k == t1 - 1 && v == nv_of(d) - 1);
      end
      for (int r = k + 1; r < d; r++)
        for (int c = k + 1; c < d; c++)
          f[r][c] = add_f32(f[r][c], neg(mul_f32(l[r], l[c])));
    end
    cnt = 0;
    for (int r = t1; r < d; r++)
      for (int c = t1; c < d; c++) m_memu[cnt++] = f[r][c];
  endtask

  // ---------------- drivers and monitors ----------------
  int ql_seen = 0, qf_seen = 0;
  int none [$];
  vec_t loop_q [$];

  initial begin
    job_valid = 0; qa_valid = 0; qp_valid = 0; qf_in_valid = 0;
    ql_ready = 0; qf_out_ready = 0;
    job = '0; qa_data = '0; qp_data = '0; qf_in_data = '0;
    // the job sequence (none: no update matrix)
    run_job(5, 2, 0, 1, 0, 0, 0, none);
    run_job(6, 3, 0, 0, 0, 0, 1, {2, 4, 5});
    run_job(4, 1, 0, 1, 0, 0, 0, none);
    run_job(6, 3, 1, 0, 0, 1, 1, {1, 3, 5});
    run_job(9, 3, 0, 1, 0, 0, 0, none);
    run_job(6, 3, 1, 1, 1, 0, 1, {0, 1, 2, 3, 4, 5});
    run_job(7, 7, 0, 1, 0, 0, 1, {4, 5, 6});
    run_job(12, 4, 0, 1, 0, 0, 0, none);
    run_job(10, 10, 0, 1, 0, 0, 1, {0, 2, 3, 5, 6, 7, 8, 9});
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : drv_job
        foreach (jobs[n]) begin
          @(negedge clk);
          job_valid = 1; job = jobs[n];
          #1; while (!job_ready) begin @(negedge clk); #1; end
          @(negedge clk); job_valid = 0;
        end
      end
      begin : drv_a
        while (qa_q.size() > 0) begin
          @(negedge clk);
          if ($urandom_range(0, 3) == 0) begin qa_valid = 0; continue; end
          qa_valid = 1; qa_data = qa_q[0];
          #1; if (qa_ready) void'(qa_q.pop_front());
        end
        @(negedge clk); qa_valid = 0;
      end
      begin : drv_p
        while (qp_q.size() > 0) begin
          @(negedge clk);
          if ($urandom_range(0, 3) == 0 && !dut.u_ext.busy) begin qp_valid = 0; continue; end
          qp_valid = 1; qp_data = qp_q[0];
          #1; if (qp_ready) void'(qp_q.pop_front());
        end
        @(negedge clk); qp_valid = 0;
      end
      begin : sink_l
        while (exp_ql.size() > 0) begin
          @(negedge clk);
          ql_ready = ($urandom_range(0, 2) != 0);
          #1;
          if (ql_valid && ql_ready) begin
            vec_t e;
            logic el;
            e = exp_ql.pop_front();
            el = exp_last.pop_front();
            checks++; ql_seen++;
            if (ql_data !== e || ql_last !== el) begin
              failures++;
              if (failures < 30) $display("ql #%0d: got %h last %b, want %h last %b",
                                         ql_seen, ql_data, ql_last, e, el);
            end
          end
        end
      end
      begin : loop_f
        // the inter-PE channel, looped back through a queue
        while (exp_qf.size() > 0 || loop_q.size() > 0 || !idle || jobs.size() > 0) begin
          @(negedge clk);
          qf_out_ready = ($urandom_range(0, 2) != 0);
          qf_in_valid = (loop_q.size() > 0);
          if (qf_in_valid) qf_in_data = loop_q[0];
          #1;
          if (qf_in_valid && qf_in_ready) void'(loop_q.pop_front());
          if (qf_out_valid && qf_out_ready) begin
            vec_t e;
            e = exp_qf.pop_front();
            checks++; qf_seen++;
            if (qf_out_data !== e) begin
              failures++;
              if (failures < 30) $display("qf #%0d: got %h want %h", qf_seen, qf_out_data, e);
            end
            loop_q.push_back(qf_out_data);
          end
          if (exp_ql.size() == 0 && idle) jobs.delete();
        end
      end
    join
    repeat (5) @(posedge clk);
    checks++;
    if (!idle || qa_q.size() != 0 || qp_q.size() != 0) begin
      failures++;
      $display("PE not idle or streams not drained at the end");
    end
    // Mem_U still holds the last update matrix written (the 8x8 one)
    for (int i = 0; i < UMAX * UMAX; i++) begin
      checks++;
      if (dut.memu[i] !== m_memu[i]) begin
        failures++;
        if (failures < 40) $display("Mem_U[%0d]: got %h want %h", i, dut.memu[i], m_memu[i]);
      end
    end
    $display("L vectors %0d, inter-PE vectors %0d", ql_seen, qf_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
