// tb_fschol_top: end-to-end testbench of the two-PE Cholesky engine.
//
// A small elimination forest is scheduled on the two PEs (VL=4, N=2, M=1):
// PE0 factorizes a leaf and partially updates its parent, then sends that
// frontal matrix over the inter-PE channel; PE1 factorizes another child,
// takes the frontal matrix from the channel, finishes its update and
// factorizes it, then updates and factorizes the root from the resulting
// update matrix. PE0 also runs a parent whose partial frontal matrix waits
// in its own FIFO while a second child is factorized. Job lists, A and
// pattern vectors sit in behavioural memories behind the load modules'
// read ports (one cycle latency); the store modules' writes are compared
// bit for bit with the software model and stalled at random.
module tb_fschol_top;
  import fschol_pkg::*;
  import tb_fschol_ref::*;

  localparam int VL = 4, N = 2, M = 1;
  localparam int DMAX = (N + M) * VL, UMAX = N * VL;
  typedef logic [VL-1:0][31:0] vec_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] start, busy, job_rd_en, a_rd_en, p_rd_en, l_wr_en, l_wr_ready;
  logic [1:0][31:0] num_jobs, job_base, a_base, p_base, l_base;
  logic [1:0][31:0] job_rd_addr, a_rd_addr, p_rd_addr, l_wr_addr, l_vectors, jobs_done;
  job_t [1:0] job_rd_data;
  vec_t [1:0] a_rd_data, l_wr_data;
  logic [1:0][VL-1:0] p_rd_data;

  fschol_top #(.VL(VL), .N(N), .M(M)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fschol_chan #(VL) ch01 = new(), ch10 = new();
  fschol_model #(VL, DMAX, UMAX) mdl [2];
  int none [$];
  int nfact [2];

  // memories behind the read ports
  for (genvar p = 0; p < 2; p++) begin : g_mem
    always @(posedge clk) if (mdl[p] != null) begin
      if (job_rd_en[p]) job_rd_data[p] <= mdl[p].jobs[job_rd_addr[p]];
      if (a_rd_en[p])   a_rd_data[p]   <= mdl[p].qa[a_rd_addr[p]];
      if (p_rd_en[p])   p_rd_data[p]   <= mdl[p].qp[p_rd_addr[p]];
    end
  end

  int wr_seen [2];
  task automatic sink(int q);
    while (mdl[q].exp_ql.size() > 0) begin
      @(negedge clk);
      l_wr_ready[q] = ($urandom_range(0, 3) != 0);
      #1;
      if (l_wr_en[q]) begin
        vec_t e;
        e = mdl[q].exp_ql.pop_front();
        checks++;
        if (l_wr_data[q] !== e || l_wr_addr[q] !== 32'h100 * q + wr_seen[q]) begin
          failures++;
          if (failures < 10)
            $display("PE%0d L vector %0d: got %h @%h want %h", q, wr_seen[q],
                     l_wr_data[q], l_wr_addr[q], e);
        end
        wr_seen[q]++;
      end
    end
  endtask
  initial begin
    mdl[0] = new(ch01, ch10);
    mdl[1] = new(ch10, ch01);
    // PE0: leaf, partial update sent to PE1, leaf, partial into own FIFO,
    // leaf, final update and factorization
    mdl[0].run_job(5, 2, 0, 1, 0, 0, 0, none);
    mdl[0].run_job(6, 3, 0, 0, 0, 1, 1, {2, 4, 5});
    mdl[0].run_job(6, 2, 0, 1, 0, 0, 0, none);
    mdl[0].run_job(9, 4, 0, 0, 0, 0, 1, {1, 2, 4, 6});
    mdl[0].run_job(5, 1, 0, 1, 0, 0, 0, none);
    mdl[0].run_job(9, 4, 1, 1, 0, 0, 1, {0, 3, 5, 8});
    // PE1: leaf, update from the channel, factorize, root
    mdl[1].run_job(4, 1, 0, 1, 0, 0, 0, none);
    mdl[1].run_job(6, 3, 1, 1, 1, 0, 1, {1, 3, 5});
    mdl[1].run_job(5, 5, 0, 1, 0, 0, 1, {2, 3, 4});
    for (int p = 0; p < 2; p++) begin
      nfact[p] = 0;
      foreach (mdl[p].jobs[j]) if (mdl[p].jobs[j].last_c) nfact[p]++;
    end
    start = '0; l_wr_ready = '0;
    for (int p = 0; p < 2; p++) begin
      num_jobs[p] = mdl[p].jobs.size();
      job_base[p] = 0; a_base[p] = 0; p_base[p] = 0; l_base[p] = 32'h100 * p;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 2'b11;
    @(negedge clk); start = 2'b00;
    fork
      sink(0);
      sink(1);
    join
    // the last job may still be copying its update matrix into Mem_U
    while (busy != '0) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int p = 0; p < 2; p++) begin
      checks += 3;
      if (busy[p]) begin failures++; $display("PE%0d still busy", p); end
      if (jobs_done[p] != nfact[p]) begin
        failures++; $display("PE%0d jobs_done %0d want %0d", p, jobs_done[p], nfact[p]);
      end
      if (l_vectors[p] != wr_seen[p]) begin
        failures++; $display("PE%0d vector count %0d want %0d", p, l_vectors[p], wr_seen[p]);
      end
    end
    checks++;
    if (ch01.q.size() != 0 || ch10.q.size() != 0) failures++;
    $display("L vectors: PE0 %0d, PE1 %0d; factorizations %0d + %0d",
             wr_seen[0], wr_seen[1], jobs_done[0], jobs_done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
