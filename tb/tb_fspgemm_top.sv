// tb_fspgemm_top: test of the multi-core FSpGEMM array.
//
// Builds the array with M = 2 cores of N = 4 PEs and gives each core its own
// random sparse product (A in CSV order, B in CSR) in its own set of modelled
// memories (one-cycle read latency). Both cores are started in the same
// cycle and run concurrently. Every C element a core writes (row, column and
// value, bit exact) is compared with the reference Gustavson product of that
// core's matrices, and the per-core counters (CSV vectors, A nonzeros, C
// elements) are checked. A second round runs the cores with different sizes
// so that they finish at different times.
module tb_fspgemm_top;
  import fspgemm_pkg::*;
  import tb_spgemm_ref::*;

  localparam int unsigned M = 2, N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [M-1:0] start, busy, a_rd_en, p_rd_en, b_rd_en, c_wr_en;
  logic [M-1:0][IDX_W-1:0] a_nnz, a_rd_addr, p_rd_addr, b_rd_addr, c_wr_addr, c_count, nvec, nnzs;
  csv_t  [M-1:0] a_rd_data;
  logic  [M-1:0][IDX_W-1:0] p_rd_data;
  bmem_t [M-1:0] b_rd_data;
  c_t    [M-1:0] c_wr_data;

  fspgemm_top #(.M(M), .N(N), .BUF_DEPTH(128)) dut (.clk, .rst_n, .start, .a_nnz, .busy,
    .a_rd_en, .a_rd_addr, .a_rd_data, .p_rd_en, .p_rd_addr, .p_rd_data,
    .b_rd_en, .b_rd_addr, .b_rd_data, .c_wr_en, .c_wr_addr, .c_wr_data,
    .c_count, .stat_vectors(nvec), .stat_nnz(nnzs));

  spgemm_case tc[M];
  logic [95:0] got0 [$], got1 [$];

  always_ff @(posedge clk) begin
    for (int d = 0; d < M; d++) begin
      if (a_rd_en[d]) a_rd_data[d] <= tc[d].csv[a_rd_addr[d]];
      if (p_rd_en[d]) p_rd_data[d] <= tc[d].bptr[p_rd_addr[d]];
      if (b_rd_en[d]) b_rd_data[d] <= tc[d].bmem[b_rd_addr[d]];
    end
    if (c_wr_en[0]) got0.push_back(ckey(c_wr_data[0]));
    if (c_wr_en[1]) got1.push_back(ckey(c_wr_data[1]));
  end

  task automatic check_core(int d);
    logic [95:0] exp_q [$];
    logic [95:0] g [$];
    foreach (tc[d].cref[i]) exp_q.push_back(ckey(tc[d].cref[i]));
    if (d == 0) g = got0; else g = got1;
    g.sort(); exp_q.sort();
    checks++;
    if (g != exp_q) begin
      failures++;
      $display("core %0d: %0d C elements, expected %0d", d, g.size(), exp_q.size());
    end
    checks++;
    if (nvec[d] != tc[d].nv || nnzs[d] != tc[d].csv.size()) begin
      failures++; $display("core %0d: nv=%0d nnz=%0d, expected nv=%0d nnz=%0d", d, nvec[d], nnzs[d], tc[d].nv, tc[d].csv.size());
    end
    checks++;
    if (c_count[d] != exp_q.size()) begin failures++; $display("core %0d: c_count %0d", d, c_count[d]); end
  endtask

  task automatic run(int r0, int k0, int n0, int r1, int k1, int n1);
    tc[0] = new(r0, k0, n0, 20, 15); tc[0].make_csv(N); tc[0].reference();
    tc[1] = new(r1, k1, n1, 15, 20); tc[1].make_csv(N); tc[1].reference();
    got0.delete(); got1.delete();
    @(negedge clk);
    a_nnz[0] = tc[0].csv.size(); a_nnz[1] = tc[1].csv.size();
    start = '1;
    @(negedge clk);
    start = '0;
    while (busy != '0) @(negedge clk);
    repeat (2) @(negedge clk);
    check_core(0);
    check_core(1);
  endtask

  initial begin
    start = '0; a_nnz = '0;
    for (int d = 0; d < M; d++) begin
      tc[d] = new(1, 1, 1, 0, 0);
      tc[d].make_csv(N);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(12, 20, 30, 12, 20, 30);
    run(30, 25, 40, 8, 10, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
