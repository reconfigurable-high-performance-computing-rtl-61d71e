// tb_fspgemm_core: end-to-end test of one FSpGEMM core.
//
// Generates random sparse A and B, lays them out in memory (A in CSV order,
// B in CSR), models the three read memories with one-cycle latency and the
// C memory, runs the core and compares every written C element (row, column
// and value, bit exact) with the reference Gustavson product. Also checks
// that the load module formed exactly nv(A) sparse vectors (one B-row read
// each) for nnz(A) nonzeros, i.e. the reuse the CSV layout provides.
// Runs at N = 4 PEs to keep the matrices small, then at the default N.
module tb_fspgemm_core;
  import fspgemm_pkg::*;
  import tb_spgemm_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two DUTs: N=4 and default N
  logic start4, start16, busy4, busy16;
  logic [IDX_W-1:0] nnz;
  logic a_rd_en[2], p_rd_en[2], b_rd_en[2], c_wr_en[2];
  logic [IDX_W-1:0] a_rd_addr[2], p_rd_addr[2], b_rd_addr[2], c_wr_addr[2], c_count[2], nvec[2], nnzs[2];
  csv_t a_rd_data[2]; logic [IDX_W-1:0] p_rd_data[2]; bmem_t b_rd_data[2]; c_t c_wr_data[2];

  fspgemm_core #(.N(4), .BUF_DEPTH(128)) dut4 (.clk, .rst_n, .start(start4), .a_nnz(nnz), .busy(busy4),
    .a_rd_en(a_rd_en[0]), .a_rd_addr(a_rd_addr[0]), .a_rd_data(a_rd_data[0]),
    .p_rd_en(p_rd_en[0]), .p_rd_addr(p_rd_addr[0]), .p_rd_data(p_rd_data[0]),
    .b_rd_en(b_rd_en[0]), .b_rd_addr(b_rd_addr[0]), .b_rd_data(b_rd_data[0]),
    .c_wr_en(c_wr_en[0]), .c_wr_addr(c_wr_addr[0]), .c_wr_data(c_wr_data[0]), .c_count(c_count[0]),
    .stat_vectors(nvec[0]), .stat_nnz(nnzs[0]));
  fspgemm_core dut16 (.clk, .rst_n, .start(start16), .a_nnz(nnz), .busy(busy16),
    .a_rd_en(a_rd_en[1]), .a_rd_addr(a_rd_addr[1]), .a_rd_data(a_rd_data[1]),
    .p_rd_en(p_rd_en[1]), .p_rd_addr(p_rd_addr[1]), .p_rd_data(p_rd_data[1]),
    .b_rd_en(b_rd_en[1]), .b_rd_addr(b_rd_addr[1]), .b_rd_data(b_rd_data[1]),
    .c_wr_en(c_wr_en[1]), .c_wr_addr(c_wr_addr[1]), .c_wr_data(c_wr_data[1]), .c_count(c_count[1]),
    .stat_vectors(nvec[1]), .stat_nnz(nnzs[1]));

  spgemm_case tc;
  logic [95:0] got [$];

  // memories
  always_ff @(posedge clk) begin
    for (int d = 0; d < 2; d++) begin
      if (a_rd_en[d]) a_rd_data[d] <= tc.csv[a_rd_addr[d]];
      if (p_rd_en[d]) p_rd_data[d] <= tc.bptr[p_rd_addr[d]];
      if (b_rd_en[d]) b_rd_data[d] <= tc.bmem[b_rd_addr[d]];
      if (c_wr_en[d]) got.push_back(ckey(c_wr_data[d]));
    end
  end

  task automatic run(int d, int n, int rows, int kdim, int ncol, int apct, int bpct);
    logic [95:0] exp_q [$];
    tc = new(rows, kdim, ncol, apct, bpct);
    tc.make_csv(n);
    tc.reference();
    got.delete();
    foreach (tc.cref[i]) exp_q.push_back(ckey(tc.cref[i]));
    @(negedge clk);
    nnz = tc.csv.size();
    if (d == 0) start4 = 1; else start16 = 1;
    @(negedge clk);
    start4 = 0; start16 = 0;
    while ((d == 0) ? busy4 : busy16) @(negedge clk);
    repeat (2) @(negedge clk);
    got.sort(); exp_q.sort();
    checks++;
    if (got != exp_q) begin
      failures++;
      $display("core N=%0d %0dx%0d: %0d C elements, expected %0d", n, rows, kdim, got.size(), exp_q.size());
      foreach (got[i]) if (i < exp_q.size() && got[i] != exp_q[i]) begin
        $display("  first difference: %h vs %h", got[i], exp_q[i]); break;
      end
    end
    checks++;
    if (nvec[d] != tc.nv || nnzs[d] != tc.csv.size()) begin
      failures++; $display("core: nv=%0d nnz=%0d, expected nv=%0d nnz=%0d", nvec[d], nnzs[d], tc.nv, tc.csv.size());
    end
    checks++;
    if (c_count[d] != exp_q.size()) begin failures++; $display("core: c_count %0d", c_count[d]); end
  endtask

  initial begin
    start4 = 0; start16 = 0; nnz = 0;
    tc = new(1, 1, 1, 0, 0);
    tc.make_csv(4);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 4, 12, 20, 30, 20, 15);
    run(0, 4, 17, 40, 50, 10, 10);
    run(0, 4, 9, 6, 10, 60, 0);        // B empty: every B row has size 0
    run(0, 4, 30, 25, 40, 30, 20);
    run(1, 16, 40, 30, 40, 15, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
