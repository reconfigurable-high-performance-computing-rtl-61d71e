// fschol_top: the sparse Cholesky factorization engine (two PEs).
//
// Two processing elements each get their own load and store module, joined
// by small FIFO channels (Q_job, Q_A, Q_P from the load module, Q_L to the
// store module). Between the PEs run the two inter-PE channels Q_F, one per
// direction, deep enough for a full frontal matrix ((N+M)*(N+M)*VL vectors),
// so a partially updated frontal matrix can move to the PE that updates it
// next. The host's schedule decides, through the job bits, which PE reads or
// writes them. The two-PE arrangement, the channel names and sizes follow
// the thesis; the depth (2) of the load/store channels is this design's
// choice.
//
// Interface: per PE (index 0 and 1): start, job list and region bases,
// busy, the three read ports of the load module, the L write port of the
// store module and its counters. Timing: see fschol_pe.
//
// Lint note: a sub-module checks its handshake with an assertion that is
// disabled while the asynchronous reset rst_n is low, so lint tools report
// rst_n here as used both asynchronously and synchronously (SYNCASYNCNET);
// this is expected and does not change the circuit.
module fschol_top
  import fschol_pkg::job_t;
#(
  parameter int unsigned VL = 128,
  parameter int unsigned N  = 4,
  parameter int unsigned M  = 2,
  localparam int unsigned WL = fschol_pkg::WL,
  localparam int unsigned P  = 2
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [P-1:0]                   start,
  input  logic [P-1:0][31:0]             num_jobs,
  input  logic [P-1:0][31:0]             job_base,
  input  logic [P-1:0][31:0]             a_base,
  input  logic [P-1:0][31:0]             p_base,
  input  logic [P-1:0][31:0]             l_base,
  output logic [P-1:0]                   busy,
  output logic [P-1:0]                   job_rd_en,
  output logic [P-1:0][31:0]             job_rd_addr,
  input  job_t [P-1:0]                   job_rd_data,
  output logic [P-1:0]                   a_rd_en,
  output logic [P-1:0][31:0]             a_rd_addr,
  input  logic [P-1:0][VL-1:0][WL-1:0]   a_rd_data,
  output logic [P-1:0]                   p_rd_en,
  output logic [P-1:0][31:0]             p_rd_addr,
  input  logic [P-1:0][VL-1:0]           p_rd_data,
  output logic [P-1:0]                   l_wr_en,
  input  logic [P-1:0]                   l_wr_ready,
  output logic [P-1:0][31:0]             l_wr_addr,
  output logic [P-1:0][VL-1:0][WL-1:0]   l_wr_data,
  output logic [P-1:0][31:0]             l_vectors,
  output logic [P-1:0][31:0]             jobs_done
);
  typedef logic [VL-1:0][WL-1:0] vec_t;
  localparam int unsigned QF_DEPTH = (N + M) * (N + M) * VL;

  // inter-PE channels: qf[p] carries F from PE p to PE 1-p
  logic [P-1:0] qf_w_valid, qf_w_ready, qf_r_valid, qf_r_ready;
  vec_t [P-1:0] qf_w_data, qf_r_data;

  for (genvar p = 0; p < P; p++) begin : g_pe
    logic lj_valid, lj_ready, pj_valid, pj_ready;
    job_t lj_data, pj_data;
    logic la_valid, la_ready, pa_valid, pa_ready;
    vec_t la_data, pa_data;
    logic lp_valid, lp_ready, pp_valid, pp_ready;
    logic [VL-1:0] lp_data, pp_data;
    logic el_valid, el_ready, sl_valid, sl_ready, pe_idle, ld_busy;
    logic [VL*WL:0] el_data, sl_data;
    vec_t el_vec;
    logic el_last;

    fschol_load #(.VL(VL)) u_load (
      .clk, .rst_n, .start(start[p]), .num_jobs(num_jobs[p]),
      .job_base(job_base[p]), .a_base(a_base[p]), .p_base(p_base[p]), .busy(ld_busy),
      .job_rd_en(job_rd_en[p]), .job_rd_addr(job_rd_addr[p]), .job_rd_data(job_rd_data[p]),
      .a_rd_en(a_rd_en[p]), .a_rd_addr(a_rd_addr[p]), .a_rd_data(a_rd_data[p]),
      .p_rd_en(p_rd_en[p]), .p_rd_addr(p_rd_addr[p]), .p_rd_data(p_rd_data[p]),
      .qjob_valid(lj_valid), .qjob_ready(lj_ready), .qjob_data(lj_data),
      .qa_valid(la_valid), .qa_ready(la_ready), .qa_data(la_data),
      .qp_valid(lp_valid), .qp_ready(lp_ready), .qp_data(lp_data)
    );

    sync_fifo #(.T(job_t), .DEPTH(2)) u_qjob (.clk, .rst_n,
      .in_valid(lj_valid), .in_ready(lj_ready), .in_data(lj_data),
      .out_valid(pj_valid), .out_ready(pj_ready), .out_data(pj_data));
    sync_fifo #(.T(vec_t), .DEPTH(2)) u_qa (.clk, .rst_n,
      .in_valid(la_valid), .in_ready(la_ready), .in_data(la_data),
      .out_valid(pa_valid), .out_ready(pa_ready), .out_data(pa_data));
    sync_fifo #(.T(logic [VL-1:0]), .DEPTH(2)) u_qp (.clk, .rst_n,
      .in_valid(lp_valid), .in_ready(lp_ready), .in_data(lp_data),
      .out_valid(pp_valid), .out_ready(pp_ready), .out_data(pp_data));

    fschol_pe #(.VL(VL), .N(N), .M(M)) u_pe (
      .clk, .rst_n,
      .job_valid(pj_valid), .job_ready(pj_ready), .job(pj_data),
      .qa_valid(pa_valid), .qa_ready(pa_ready), .qa_data(pa_data),
      .qp_valid(pp_valid), .qp_ready(pp_ready), .qp_data(pp_data),
      .qf_in_valid(qf_r_valid[1-p]), .qf_in_ready(qf_r_ready[1-p]), .qf_in_data(qf_r_data[1-p]),
      .qf_out_valid(qf_w_valid[p]), .qf_out_ready(qf_w_ready[p]), .qf_out_data(qf_w_data[p]),
      .ql_valid(el_valid), .ql_ready(el_ready), .ql_data(el_vec), .ql_last(el_last),
      .idle(pe_idle)
    );

    assign el_data = {el_last, el_vec};

    sync_fifo #(.T(logic [VL*WL:0]), .DEPTH(2)) u_ql (.clk, .rst_n,
      .in_valid(el_valid), .in_ready(el_ready), .in_data(el_data),
      .out_valid(sl_valid), .out_ready(sl_ready), .out_data(sl_data));

    fschol_store #(.VL(VL)) u_store (
      .clk, .rst_n, .start(start[p]), .l_base(l_base[p]),
      .ql_valid(sl_valid), .ql_ready(sl_ready),
      .ql_data(sl_data[VL*WL-1:0]), .ql_last(sl_data[VL*WL]),
      .wr_en(l_wr_en[p]), .wr_ready(l_wr_ready[p]), .wr_addr(l_wr_addr[p]),
      .wr_data(l_wr_data[p]), .vectors(l_vectors[p]), .jobs_done(jobs_done[p])
    );

    sync_fifo #(.T(vec_t), .DEPTH(QF_DEPTH)) u_qf (.clk, .rst_n,
      .in_valid(qf_w_valid[p]), .in_ready(qf_w_ready[p]), .in_data(qf_w_data[p]),
      .out_valid(qf_r_valid[p]), .out_ready(qf_r_ready[p]), .out_data(qf_r_data[p]));

    assign busy[p] = ld_busy || !pe_idle || pj_valid || sl_valid || el_valid;
  end
endmodule
