// tb_sparse_accel_top: end-to-end test of all three engines at full size.
//
// The top is instantiated with every parameter at its default (two
// Cholesky PEs with VL=128, N=4, M=2; six SpGEMM cores of 16 PEs; sixteen
// tensor-core lanes with 128-set, 16-way caches) and one complete operation
// is run on each engine, all at the same time:
//  * Cholesky: a small elimination forest scheduled over both PEs, with a
//    frontal matrix passed between the PEs, one parked in a PE's own FIFO,
//    extend-add of update matrices and factorizations; every L vector is
//    compared bit for bit with a single-precision software model.
//  * SpGEMM: two cores each multiply their own random sparse A and B laid
//    out in behavioural memories; every C element is compared with a
//    software Gustavson product.
//  * Tensor core: lane 0 multiplies a row by a scalar and merges it with a
//    partial list in its merge sorter, its addition unit folds a list with
//    repeated indices, and its cache serves a request pattern with hits,
//    misses and LRU evictions from a behavioural HBM channel.
// Each mechanism is counted and must have happened at least once.
module tb_sparse_accel_top;
  import fspgemm_pkg::csv_t, fspgemm_pkg::bmem_t, fspgemm_pkg::c_t, fspgemm_pkg::IDX_W;
  import stc_pkg::rec_t, stc_pkg::VAL_W, stc_pkg::E, stc_pkg::KEY_MAX;
  import fschol_pkg::job_t;
  import tb_spgemm_ref::*;
  import tb_fschol_ref::*;

  localparam int VL = 128, SM = 6, SN = 16, AW = 31;
  typedef logic [VL-1:0][31:0] vec_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- ports of the top ----
  logic [1:0] chol_start, chol_busy, chol_job_rd_en, chol_a_rd_en, chol_p_rd_en;
  logic [1:0] chol_l_wr_en, chol_l_wr_ready;
  logic [1:0][31:0] chol_num_jobs, chol_job_base, chol_a_base, chol_p_base, chol_l_base;
  logic [1:0][31:0] chol_job_rd_addr, chol_a_rd_addr, chol_p_rd_addr, chol_l_wr_addr;
  logic [1:0][31:0] chol_l_vectors, chol_jobs_done;
  job_t [1:0] chol_job_rd_data;
  vec_t [1:0] chol_a_rd_data, chol_l_wr_data;
  logic [1:0][VL-1:0] chol_p_rd_data;

  logic [SM-1:0] spg_start, spg_busy, spg_a_rd_en, spg_p_rd_en, spg_b_rd_en, spg_c_wr_en;
  logic [SM-1:0][IDX_W-1:0] spg_a_nnz, spg_a_rd_addr, spg_p_rd_addr, spg_p_rd_data;
  logic [SM-1:0][IDX_W-1:0] spg_b_rd_addr, spg_c_wr_addr, spg_c_count, spg_stat_vectors, spg_stat_nnz;
  csv_t [SM-1:0] spg_a_rd_data;
  bmem_t [SM-1:0] spg_b_rd_data;
  c_t [SM-1:0] spg_c_wr_data;

  logic [SN-1:0][VAL_W-1:0] stc_mmu_x_val;
  logic [SN-1:0] stc_mmu_y_valid, stc_mmu_y_ready, stc_mmu_y_last;
  logic [SN-1:0] stc_mmu_z_valid, stc_mmu_z_ready, stc_mmu_z_last;
  logic [SN-1:0] stc_mmu_w_valid, stc_mmu_w_ready, stc_mmu_w_last;
  rec_t [SN-1:0][E-1:0] stc_mmu_y_rec, stc_mmu_z_rec, stc_mmu_w_rec;
  logic [SN-1:0][E-1:0] stc_mmu_w_mask;
  logic [SN-1:0] stc_au_in_valid, stc_au_in_ready, stc_au_in_last;
  logic [SN-1:0] stc_au_out_valid, stc_au_out_ready, stc_au_out_last;
  rec_t [SN-1:0] stc_au_in_rec, stc_au_out_rec;
  logic [SN-1:0] stc_c_req_valid, stc_c_req_ready, stc_c_resp_valid;
  logic [SN-1:0][AW-1:0] stc_c_req_addr;
  logic [SN-1:0][63:0] stc_c_resp_data, stc_hbm_resp_data;
  logic [SN-1:0][31:0] stc_c_hits, stc_c_misses;
  logic [SN-1:0] stc_hbm_req_valid, stc_hbm_req_ready, stc_hbm_resp_valid;
  logic [SN-1:0][AW-4:0] stc_hbm_req_addr;

  sparse_accel_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_chol_interpe = 0, n_chol_ownfifo = 0, n_chol_extend = 0;
  int n_spg_multi_qc = 0, n_stc_merge = 0, n_stc_accum = 0, n_stc_evict = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++) begin
      if (dut.u_chol.qf_w_valid[p] && dut.u_chol.qf_w_ready[p]) n_chol_interpe++;
    end
    if (dut.u_chol.g_pe[0].u_pe.qp_in_valid && dut.u_chol.g_pe[0].u_pe.qp_in_ready) n_chol_ownfifo++;
    if (dut.u_chol.g_pe[0].u_pe.xu_valid && dut.u_chol.g_pe[0].u_pe.xu_ready) n_chol_extend++;
    if (dut.u_chol.g_pe[1].u_pe.xu_valid && dut.u_chol.g_pe[1].u_pe.xu_ready) n_chol_extend++;
    if ($countones(dut.u_spgemm.g_core[0].u_core.sc_valid) > 1) n_spg_multi_qc++;
    if (stc_mmu_w_valid[0] && stc_mmu_w_ready[0]) n_stc_merge++;
  end

  // =============== Cholesky ===============
  fschol_chan #(VL) ch01 = new(), ch10 = new();
  fschol_model #(VL, 12, 8) mdl [2];
  int none [$];
  int nfact [2], wr_seen [2];

  for (genvar p = 0; p < 2; p++) begin : g_cmem
    always @(posedge clk) if (mdl[p] != null) begin
      if (chol_job_rd_en[p]) chol_job_rd_data[p] <= mdl[p].jobs[chol_job_rd_addr[p]];
      if (chol_a_rd_en[p])   chol_a_rd_data[p]   <= mdl[p].qa[chol_a_rd_addr[p]];
      if (chol_p_rd_en[p])   chol_p_rd_data[p]   <= mdl[p].qp[chol_p_rd_addr[p]];
    end
  end

  task automatic chol_sink(int q);
    while (mdl[q].exp_ql.size() > 0) begin
      @(negedge clk);
      chol_l_wr_ready[q] = ($urandom_range(0, 3) != 0);
      #1;
      if (chol_l_wr_en[q]) begin
        vec_t e;
        e = mdl[q].exp_ql.pop_front();
        checks++;
        if (chol_l_wr_data[q] !== e) begin
          failures++;
          if (failures < 10) $display("chol PE%0d L vector %0d differs", q, wr_seen[q]);
        end
        wr_seen[q]++;
      end
    end
  endtask

  task automatic chol_run();
    mdl[0] = new(ch01, ch10);
    mdl[1] = new(ch10, ch01);
    mdl[0].run_job(5, 2, 0, 1, 0, 0, 0, none);
    mdl[0].run_job(6, 3, 0, 0, 0, 1, 1, {2, 4, 5});
    mdl[0].run_job(6, 2, 0, 1, 0, 0, 0, none);
    mdl[0].run_job(9, 4, 0, 0, 0, 0, 1, {1, 2, 4, 6});
    mdl[0].run_job(5, 1, 0, 1, 0, 0, 0, none);
    mdl[0].run_job(9, 4, 1, 1, 0, 0, 1, {0, 3, 5, 8});
    mdl[1].run_job(4, 1, 0, 1, 0, 0, 0, none);
    mdl[1].run_job(6, 3, 1, 1, 1, 0, 1, {1, 3, 5});
    mdl[1].run_job(5, 5, 0, 1, 0, 0, 1, {2, 3, 4});
    for (int p = 0; p < 2; p++) begin
      nfact[p] = 0;
      foreach (mdl[p].jobs[j]) if (mdl[p].jobs[j].last_c) nfact[p]++;
      chol_num_jobs[p] = mdl[p].jobs.size();
    end
    @(negedge clk); chol_start = 2'b11;
    @(negedge clk); chol_start = 2'b00;
    fork
      chol_sink(0);
      chol_sink(1);
    join
    while (chol_busy != '0) @(posedge clk);
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (chol_jobs_done[p] != nfact[p] || chol_l_vectors[p] != wr_seen[p]) begin
        failures++;
        $display("chol PE%0d: %0d jobs, %0d vectors", p, chol_jobs_done[p], chol_l_vectors[p]);
      end
    end
  endtask

  // =============== SpGEMM ===============
  spgemm_case tc [SM];
  logic [95:0] got [SM][$];
  always @(posedge clk) begin
    for (int m = 0; m < SM; m++) if (tc[m] != null) begin
      if (spg_a_rd_en[m]) spg_a_rd_data[m] <= tc[m].csv[spg_a_rd_addr[m]];
      if (spg_p_rd_en[m]) spg_p_rd_data[m] <= tc[m].bptr[spg_p_rd_addr[m]];
      if (spg_b_rd_en[m]) spg_b_rd_data[m] <= tc[m].bmem[spg_b_rd_addr[m]];
      if (spg_c_wr_en[m]) got[m].push_back(ckey(spg_c_wr_data[m]));
    end
  end

  task automatic spg_run(int m, int rows, int kdim, int ncol, int apct, int bpct);
    logic [95:0] exp_q [$];
    tc[m] = new(rows, kdim, ncol, apct, bpct);
    tc[m].make_csv(SN);
    tc[m].reference();
    foreach (tc[m].cref[i]) exp_q.push_back(ckey(tc[m].cref[i]));
    @(negedge clk);
    spg_a_nnz[m] = tc[m].csv.size();
    spg_start[m] = 1;
    @(negedge clk);
    spg_start[m] = 0;
    while (spg_busy[m]) @(negedge clk);
    repeat (2) @(negedge clk);
    got[m].sort(); exp_q.sort();
    checks += 3;
    if (got[m] != exp_q) begin
      failures++; $display("spgemm core %0d: %0d C elements, expected %0d", m, got[m].size(), exp_q.size());
    end
    if (spg_stat_vectors[m] != tc[m].nv) begin failures++; $display("spgemm core %0d: vector count", m); end
    if (spg_c_count[m] != exp_q.size()) begin failures++; $display("spgemm core %0d: c_count", m); end
  endtask

  // =============== tensor core, lane 0 ===============
  function automatic logic [63:0] word_of(logic [AW-1:0] a);
    return {a, 1'b0, a} ^ 64'h5a5a_0000_1234_0000;
  endfunction

  for (genvar d = 0; d < SN; d++) begin : g_hbm
    initial begin
      stc_hbm_req_ready[d] = 0; stc_hbm_resp_valid[d] = 0; stc_hbm_resp_data[d] = '0;
      forever begin
        @(negedge clk);
        if (stc_hbm_req_valid[d]) begin
          logic [AW-4:0] line;
          stc_hbm_req_ready[d] = 1;
          line = stc_hbm_req_addr[d];
          @(negedge clk);
          stc_hbm_req_ready[d] = 0;
          repeat (3) @(negedge clk);
          for (int b = 0; b < 8; b++) begin
            stc_hbm_resp_valid[d] = 1;
            stc_hbm_resp_data[d]  = word_of({line, 3'(b)});
            @(negedge clk);
          end
          stc_hbm_resp_valid[d] = 0;
        end
      end
    end
  end

  task automatic stc_mmu_run();
    logic [127:0] ref_q [$], got_q [$];
    bit done = 0;
    // y: 12 records at even indices, z: 9 records at odd indices
    stc_mmu_x_val[0] = $realtobits(2.5);
    for (int i = 0; i < 12; i++) ref_q.push_back({32'd0, 32'(2 * i), $realtobits(2.5 * (i + 1))});
    for (int i = 0; i < 9; i++) ref_q.push_back({32'd0, 32'(2 * i + 1), $realtobits(100.0 + i)});
    ref_q.sort();
    fork
      begin
        for (int v = 0; v < 2; v++) begin
          stc_mmu_y_valid[0] <= 1; stc_mmu_y_last[0] <= (v == 1);
          for (int i = 0; i < E; i++)
            stc_mmu_y_rec[0][i] <= (v*E+i < 12) ? '{idx: 32'(2*(v*E+i)), val: $realtobits(real'(v*E+i+1))}
                                               : '{idx: KEY_MAX, val: '0};
          @(posedge clk); while (!stc_mmu_y_ready[0]) @(posedge clk);
        end
        stc_mmu_y_valid[0] <= 0;
      end
      begin
        for (int v = 0; v < 2; v++) begin
          stc_mmu_z_valid[0] <= 1; stc_mmu_z_last[0] <= (v == 1);
          for (int i = 0; i < E; i++)
            stc_mmu_z_rec[0][i] <= (v*E+i < 9) ? '{idx: 32'(2*(v*E+i)+1), val: $realtobits(100.0 + (v*E+i))}
                                              : '{idx: KEY_MAX, val: '0};
          @(posedge clk); while (!stc_mmu_z_ready[0]) @(posedge clk);
        end
        stc_mmu_z_valid[0] <= 0;
      end
      begin
        while (!done) begin
          stc_mmu_w_ready[0] <= 1;
          @(posedge clk);
          if (stc_mmu_w_valid[0] && stc_mmu_w_ready[0]) begin
            for (int i = 0; i < E; i++) if (stc_mmu_w_mask[0][i])
              got_q.push_back({32'd0, stc_mmu_w_rec[0][i].idx, stc_mmu_w_rec[0][i].val});
            if (stc_mmu_w_last[0]) done = 1;
          end
        end
      end
    join
    got_q.sort();
    checks++;
    if (got_q != ref_q) begin failures++; $display("stc mmu: %0d records, expected %0d", got_q.size(), ref_q.size()); end
  endtask

  task automatic stc_au_run();
    int unsigned ks [$] = '{1, 1, 2, 5, 5, 5, 9};
    int unsigned rk [$] = '{1, 2, 5, 9};
    real rv [$] = '{3.0, 3.0, 15.0, 7.0};
    int got_n = 0;
    bit bad = 0, done = 0;
    fork
      begin
        for (int i = 0; i <= ks.size(); i++) begin
          stc_au_in_valid[0] <= 1;
          stc_au_in_last[0]  <= (i == ks.size());
          stc_au_in_rec[0]   <= (i < ks.size()) ? '{idx: ks[i], val: $realtobits(real'(i + 1))}
                                                : '{idx: KEY_MAX, val: '0};
          @(posedge clk);
          while (!stc_au_in_ready[0]) @(posedge clk);
        end
        stc_au_in_valid[0] <= 0; stc_au_in_last[0] <= 0;
      end
      begin
        while (!done) begin
          stc_au_out_ready[0] <= 1;
          @(posedge clk);
          if (stc_au_out_valid[0] && stc_au_out_ready[0]) begin
            if (stc_au_out_rec[0].idx != KEY_MAX) begin
              if (got_n >= rk.size() || stc_au_out_rec[0].idx != rk[got_n] ||
                  stc_au_out_rec[0].val != $realtobits(rv[got_n])) bad = 1;
              got_n++;
            end
            if (stc_au_out_last[0]) done = 1;
          end
        end
      end
    join
    checks++;
    if (bad || got_n != rk.size()) begin failures++; $display("stc au: %0d outputs, mismatch %0d", got_n, bad); end
    n_stc_accum = ks.size() - got_n;
  endtask

  task automatic stc_access(logic [AW-1:0] a);
    @(negedge clk);
    stc_c_req_valid[0] = 1; stc_c_req_addr[0] = a;
    #1;
    while (!stc_c_req_ready[0]) begin @(negedge clk); #1; end
    @(negedge clk);
    stc_c_req_valid[0] = 0;
    while (!stc_c_resp_valid[0]) @(negedge clk);
    checks++;
    if (stc_c_resp_data[0] != word_of(a)) begin failures++; $display("stc cache: wrong data at %h", a); end
  endtask

  task automatic stc_cache_run();
    int m0;
    // seventeen lines of set 0 overflow its sixteen ways: line 0 is evicted
    for (int j = 0; j <= 16; j++) stc_access(AW'(j * 128 * 8));
    stc_access(AW'(16 * 128 * 8 + 5));          // hit
    m0 = stc_c_misses[0];
    stc_access(AW'(3));                          // line 0 again: a miss
    n_stc_evict = stc_c_misses[0] - m0;
    checks += 2;
    if (stc_c_misses[0] != 18) begin failures++; $display("stc cache: %0d misses", stc_c_misses[0]); end
    if (stc_c_hits[0] != 1) begin failures++; $display("stc cache: %0d hits", stc_c_hits[0]); end
  endtask

  initial begin
    chol_start = '0; chol_l_wr_ready = '0;
    for (int p = 0; p < 2; p++) begin
      chol_num_jobs[p] = 0; chol_job_base[p] = 0; chol_a_base[p] = 0; chol_p_base[p] = 0;
      chol_l_base[p] = 32'h1000 * p;
    end
    spg_start = '0; spg_a_nnz = '0;
    stc_mmu_x_val = '0; stc_mmu_y_valid = '0; stc_mmu_y_last = '0; stc_mmu_y_rec = '0;
    stc_mmu_z_valid = '0; stc_mmu_z_last = '0; stc_mmu_z_rec = '0; stc_mmu_w_ready = '0;
    stc_au_in_valid = '0; stc_au_in_last = '0; stc_au_in_rec = '0; stc_au_out_ready = '0;
    stc_c_req_valid = '0; stc_c_req_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      chol_run();
      spg_run(0, 40, 30, 40, 15, 15);
      spg_run(5, 24, 20, 30, 25, 20);
      begin stc_mmu_run(); stc_au_run(); end
      stc_cache_run();
    join
    // mechanisms
    checks += 10;
    if (n_chol_interpe == 0) begin failures++; $display("never: inter-PE frontal matrix"); end
    if (n_chol_ownfifo == 0) begin failures++; $display("never: frontal matrix parked in own FIFO"); end
    if (n_chol_extend == 0)  begin failures++; $display("never: matrix extension"); end
    if (chol_jobs_done[0] + chol_jobs_done[1] == 0) begin failures++; $display("never: factorize"); end
    if (spg_stat_nnz[0] <= spg_stat_vectors[0]) begin failures++; $display("never: B row reuse"); end
    if (n_spg_multi_qc == 0) begin failures++; $display("never: store arbitration"); end
    if (n_stc_merge == 0)    begin failures++; $display("never: merge sorter output"); end
    if (n_stc_accum == 0)    begin failures++; $display("never: addition unit accumulation"); end
    if (stc_c_hits[0] == 0)  begin failures++; $display("never: cache hit"); end
    if (n_stc_evict == 0)    begin failures++; $display("never: cache eviction"); end
    $display("mechanisms: inter-PE F %0d, own-FIFO F %0d, extension %0d, factorizations %0d,",
             n_chol_interpe, n_chol_ownfifo, n_chol_extend, chol_jobs_done[0] + chol_jobs_done[1]);
    $display("  B-row reuse %0d of %0d, store arbitration %0d, merges %0d, accumulations %0d,",
             spg_stat_nnz[0] - spg_stat_vectors[0], spg_stat_nnz[0], n_spg_multi_qc, n_stc_merge, n_stc_accum);
    $display("  cache hits %0d misses %0d evictions %0d", stc_c_hits[0], stc_c_misses[0], n_stc_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
