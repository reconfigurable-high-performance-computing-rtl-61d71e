// tb_fspgemm_load: self-checking testbench for the FSpGEMM load module.
//
// Prepares A in CSV order and B in CSR for N = 4 PEs, serves the module's
// read ports from one-cycle-latency memories and drains its QA/QB channels
// under random back-pressure. The expected traffic is derived from the CSV
// stream independently: for every sparse vector (same column, same group of
// N rows) each member PE must see its aType word followed by every element
// of the B row, and only member PEs may see them. Also checks the memory
// traffic of the reuse scheme: B rows are read once per vector (sum of row
// sizes over vectors) and the row-pointer port is read twice per vector.
module tb_fspgemm_load;
  import fspgemm_pkg::*;
  import tb_spgemm_ref::*;

  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic start, busy, a_rd_en, p_rd_en, b_rd_en;
  logic [IDX_W-1:0] a_nnz, a_rd_addr, p_rd_addr, b_rd_addr, p_rd_data, nvec, nnzs;
  csv_t a_rd_data; bmem_t b_rd_data;
  logic [N-1:0] qa_valid, qa_ready, qb_valid, qb_ready;
  a_t [N-1:0] qa_data; b_t [N-1:0] qb_data;

  fspgemm_load #(.N(N)) dut (.clk, .rst_n, .start, .a_nnz, .busy,
    .a_rd_en, .a_rd_addr, .a_rd_data, .p_rd_en, .p_rd_addr, .p_rd_data,
    .b_rd_en, .b_rd_addr, .b_rd_data, .qa_valid, .qa_ready, .qa_data,
    .qb_valid, .qb_ready, .qb_data, .stat_vectors(nvec), .stat_nnz(nnzs));

  spgemm_case tc;
  a_t got_a [N][$];
  b_t got_b [N][$];
  int n_bread, n_pread;

  always_ff @(posedge clk) begin
    if (a_rd_en) a_rd_data <= tc.csv[a_rd_addr];
    if (p_rd_en) p_rd_data <= tc.bptr[p_rd_addr];
    if (b_rd_en) b_rd_data <= tc.bmem[b_rd_addr];
    if (b_rd_en) n_bread++;
    if (p_rd_en) n_pread++;
    for (int n = 0; n < N; n++) begin
      if (qa_valid[n] && qa_ready[n]) got_a[n].push_back(qa_data[n]);
      if (qb_valid[n] && qb_ready[n]) got_b[n].push_back(qb_data[n]);
    end
    qa_ready <= N'($urandom);
    qb_ready <= N'($urandom) | N'($urandom);
  end

  task automatic run(int rows, int kdim, int ncol, int apct, int bpct);
    a_t exp_a [N][$];
    b_t exp_b [N][$];
    int exp_bread, nv;
    bit bad;
    tc = new(rows, kdim, ncol, apct, bpct);
    tc.make_csv(N);
    for (int n = 0; n < N; n++) begin got_a[n].delete(); got_b[n].delete(); end
    n_bread = 0; n_pread = 0; exp_bread = 0; nv = 0;
    // expected channel traffic, vector by vector
    for (int i = 0; i < tc.csv.size(); ) begin
      int j = i;
      int k = tc.csv[i].colIdx;
      int sz = tc.bcol[k].size();
      while (j < tc.csv.size() && tc.csv[j].colIdx == k &&
             tc.csv[j].rowIdx / N == tc.csv[i].rowIdx / N) j++;
      nv++;
      exp_bread += sz;
      for (int e = i; e < j; e++) begin
        int n = tc.csv[e].rowIdx % N;
        exp_a[n].push_back('{val: tc.csv[e].val, rowIdx: tc.csv[e].rowIdx, eor: tc.csv[e].eor});
        if (sz == 0) exp_b[n].push_back('{size: 0, val: 0, colIdx: 0});
        for (int q = 0; q < sz; q++)
          exp_b[n].push_back('{size: sz, val: tc.bval[k][q], colIdx: tc.bcol[k][q]});
      end
      i = j;
    end
    @(negedge clk);
    a_nnz = tc.csv.size(); start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    bad = 0;
    for (int n = 0; n < N; n++) if (got_a[n] != exp_a[n] || got_b[n] != exp_b[n]) begin
      bad = 1;
      $display("load: PE %0d got %0d a / %0d b words, expected %0d / %0d", n,
               got_a[n].size(), got_b[n].size(), exp_a[n].size(), exp_b[n].size());
    end
    checks++; if (bad) failures++;
    checks++;
    if (nvec != nv || nnzs != tc.csv.size()) begin
      failures++; $display("load: %0d vectors / %0d nnz, expected %0d / %0d", nvec, nnzs, nv, tc.csv.size());
    end
    checks++;
    if (n_bread != exp_bread || n_pread != 2 * nv) begin
      failures++; $display("load: %0d B reads / %0d pointer reads, expected %0d / %0d", n_bread, n_pread, exp_bread, 2*nv);
    end
  endtask

  initial begin
    start = 0; a_nnz = 0; qa_ready = '0; qb_ready = '0;
    tc = new(1, 1, 1, 0, 0);
    tc.make_csv(N);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(12, 10, 12, 30, 30);
    run(21, 16, 10, 25, 10);
    run(8, 5, 8, 70, 0);
    run(33, 20, 20, 20, 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
