// tb_fschol_load: self-checking testbench for the Cholesky load module.
//
// Four jobs with different job bits (fresh/updated frontal matrix, with and
// without an update matrix) and orders are placed in behavioural memories
// (one-cycle read latency) behind base addresses. The PE side takes the
// three streams with random stalls. Checks that each job word arrives in
// order, that A vectors come only for up = 0 jobs and pattern vectors only
// for u_rd = 1 jobs, d*ceil(d/VL) of each, read in order from their regions,
// and that busy falls at the end.
module tb_fschol_load;
  import fschol_pkg::*;
  localparam int VL = 4;
  typedef logic [VL-1:0][31:0] vec_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, job_rd_en, a_rd_en, p_rd_en;
  logic [31:0] num_jobs, job_base, a_base, p_base, job_rd_addr, a_rd_addr, p_rd_addr;
  job_t job_rd_data, qjob_data;
  vec_t a_rd_data, qa_data;
  logic [VL-1:0] p_rd_data, qp_data;
  logic qjob_valid, qjob_ready, qa_valid, qa_ready, qp_valid, qp_ready;

  fschol_load #(.VL(VL)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int JB = 40, AB = 100, PB = 300;
  job_t jmem [64];
  always @(posedge clk) begin
    if (job_rd_en) job_rd_data <= jmem[job_rd_addr];
    if (a_rd_en)   a_rd_data   <= {4{a_rd_addr}};
    if (p_rd_en)   p_rd_data   <= p_rd_addr[VL-1:0] ^ 4'h5;
  end

  job_t jobs [4];
  int exp_a [$], exp_p [$];
  int jobs_seen = 0;

  initial begin
    int a_next = AB, p_next = PB;
    jobs[0] = '{up: 0, last_c: 1, f_rd: 0, f_wr: 0, u_rd: 0, d: 5, t1: 2};
    jobs[1] = '{up: 0, last_c: 0, f_rd: 0, f_wr: 1, u_rd: 1, d: 6, t1: 3};
    jobs[2] = '{up: 1, last_c: 1, f_rd: 1, f_wr: 0, u_rd: 1, d: 9, t1: 3};
    jobs[3] = '{up: 1, last_c: 0, f_rd: 0, f_wr: 0, u_rd: 0, d: 3, t1: 1};
    foreach (jobs[j]) begin
      int n;
      n = jobs[j].d * ((jobs[j].d + VL - 1) / VL);
      jmem[JB + j] = jobs[j];
      if (!jobs[j].up) for (int i = 0; i < n; i++) exp_a.push_back(a_next++);
      if (jobs[j].u_rd) for (int i = 0; i < n; i++) exp_p.push_back(p_next++);
    end
    start = 0; num_jobs = 4; job_base = JB; a_base = AB; p_base = PB;
    qjob_ready = 0; qa_ready = 0; qp_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) begin
      qjob_ready = ($urandom_range(0, 2) != 0);
      qa_ready   = ($urandom_range(0, 2) != 0);
      qp_ready   = ($urandom_range(0, 2) != 0);
      #1;
      if (qjob_valid && qjob_ready) begin
        checks++;
        if (jobs_seen >= 4 || qjob_data !== jobs[jobs_seen]) begin
          failures++; $display("job %0d wrong: %p", jobs_seen, qjob_data);
        end
        jobs_seen++;
      end
      if (qa_valid && qa_ready) begin
        int e;
        e = (exp_a.size() > 0) ? exp_a.pop_front() : -1;
        checks++;
        if (qa_data !== {4{e}}) begin failures++; $display("A got %h want %0d", qa_data, e); end
      end
      if (qp_valid && qp_ready) begin
        int e;
        e = (exp_p.size() > 0) ? exp_p.pop_front() : -1;
        checks++;
        if (qp_data !== (e[VL-1:0] ^ 4'h5)) begin failures++; $display("P got %h want %0d", qp_data, e); end
      end
      @(negedge clk);
    end
    checks++;
    if (jobs_seen != 4 || exp_a.size() != 0 || exp_p.size() != 0) begin
      failures++;
      $display("left over: jobs %0d A %0d P %0d", jobs_seen, exp_a.size(), exp_p.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
