// sparse_accel_top: the sparse linear algebra accelerators side by side.
//
// The accelerators are independent designs: a two-PE supernodal multifrontal
// sparse Cholesky factorization engine (fschol_top), a row-wise sparse
// matrix times sparse matrix engine (fspgemm_top), and a sparse tensor
// contraction engine built from merge-based multiply units, addition units
// and per-lane caches (stc_top). Each keeps its own ports, prefixed chol_,
// spg_ and stc_, and shares
// only the clock and the active-low asynchronous reset. The off-chip memory
// channels of each engine are brought out as ports, because the memory
// itself is outside the design.
//
// Timing: each engine keeps its own timing, described in its file.
//
// Lint note: a sub-module checks its handshake with an assertion that is
// disabled while the asynchronous reset rst_n is low, so lint tools report
// rst_n here as used both asynchronously and synchronously (SYNCASYNCNET);
// this is expected and does not change the circuit.
module sparse_accel_top
  import fspgemm_pkg::csv_t, fspgemm_pkg::bmem_t, fspgemm_pkg::c_t;
  import stc_pkg::rec_t, stc_pkg::VAL_W, stc_pkg::E;
  import fschol_pkg::job_t;
#(
  parameter int unsigned CHOL_VL       = 128,
  parameter int unsigned CHOL_N        = 4,
  parameter int unsigned CHOL_M        = 2,
  parameter int unsigned SPG_M         = 6,
  parameter int unsigned SPG_N         = 16,
  parameter int unsigned SPG_BUF_DEPTH = 1024,
  parameter int unsigned STC_N         = 16,
  parameter int unsigned STC_SETS      = 128,
  parameter int unsigned STC_WAYS      = 16,
  parameter int unsigned STC_ADDR_W    = 31,
  localparam int unsigned IW = fspgemm_pkg::IDX_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // ---- sparse Cholesky factorization engine (two PEs) ----
  input  logic [1:0]                        chol_start,
  input  logic [1:0][31:0]                  chol_num_jobs,
  input  logic [1:0][31:0]                  chol_job_base,
  input  logic [1:0][31:0]                  chol_a_base,
  input  logic [1:0][31:0]                  chol_p_base,
  input  logic [1:0][31:0]                  chol_l_base,
  output logic [1:0]                        chol_busy,
  output logic [1:0]                        chol_job_rd_en,
  output logic [1:0][31:0]                  chol_job_rd_addr,
  input  job_t [1:0]                        chol_job_rd_data,
  output logic [1:0]                        chol_a_rd_en,
  output logic [1:0][31:0]                  chol_a_rd_addr,
  input  logic [1:0][CHOL_VL-1:0][31:0]     chol_a_rd_data,
  output logic [1:0]                        chol_p_rd_en,
  output logic [1:0][31:0]                  chol_p_rd_addr,
  input  logic [1:0][CHOL_VL-1:0]           chol_p_rd_data,
  output logic [1:0]                        chol_l_wr_en,
  input  logic [1:0]                        chol_l_wr_ready,
  output logic [1:0][31:0]                  chol_l_wr_addr,
  output logic [1:0][CHOL_VL-1:0][31:0]     chol_l_wr_data,
  output logic [1:0][31:0]                  chol_l_vectors,
  output logic [1:0][31:0]                  chol_jobs_done,
  // ---- sparse matrix times sparse matrix engine ----
  input  logic [SPG_M-1:0]                  spg_start,
  input  logic [SPG_M-1:0][IW-1:0]          spg_a_nnz,
  output logic [SPG_M-1:0]                  spg_busy,
  output logic [SPG_M-1:0]                  spg_a_rd_en,
  output logic [SPG_M-1:0][IW-1:0]          spg_a_rd_addr,
  input  csv_t [SPG_M-1:0]                  spg_a_rd_data,
  output logic [SPG_M-1:0]                  spg_p_rd_en,
  output logic [SPG_M-1:0][IW-1:0]          spg_p_rd_addr,
  input  logic [SPG_M-1:0][IW-1:0]          spg_p_rd_data,
  output logic [SPG_M-1:0]                  spg_b_rd_en,
  output logic [SPG_M-1:0][IW-1:0]          spg_b_rd_addr,
  input  bmem_t [SPG_M-1:0]                 spg_b_rd_data,
  output logic [SPG_M-1:0]                  spg_c_wr_en,
  output logic [SPG_M-1:0][IW-1:0]          spg_c_wr_addr,
  output c_t [SPG_M-1:0]                    spg_c_wr_data,
  output logic [SPG_M-1:0][IW-1:0]          spg_c_count,
  output logic [SPG_M-1:0][IW-1:0]          spg_stat_vectors,
  output logic [SPG_M-1:0][IW-1:0]          spg_stat_nnz,
  // ---- sparse tensor contraction engine ----
  input  logic [STC_N-1:0][VAL_W-1:0]       stc_mmu_x_val,
  input  logic [STC_N-1:0]                  stc_mmu_y_valid,
  output logic [STC_N-1:0]                  stc_mmu_y_ready,
  input  rec_t [STC_N-1:0][E-1:0]           stc_mmu_y_rec,
  input  logic [STC_N-1:0]                  stc_mmu_y_last,
  input  logic [STC_N-1:0]                  stc_mmu_z_valid,
  output logic [STC_N-1:0]                  stc_mmu_z_ready,
  input  rec_t [STC_N-1:0][E-1:0]           stc_mmu_z_rec,
  input  logic [STC_N-1:0]                  stc_mmu_z_last,
  output logic [STC_N-1:0]                  stc_mmu_w_valid,
  input  logic [STC_N-1:0]                  stc_mmu_w_ready,
  output rec_t [STC_N-1:0][E-1:0]           stc_mmu_w_rec,
  output logic [STC_N-1:0][E-1:0]           stc_mmu_w_mask,
  output logic [STC_N-1:0]                  stc_mmu_w_last,
  input  logic [STC_N-1:0]                  stc_au_in_valid,
  output logic [STC_N-1:0]                  stc_au_in_ready,
  input  rec_t [STC_N-1:0]                  stc_au_in_rec,
  input  logic [STC_N-1:0]                  stc_au_in_last,
  output logic [STC_N-1:0]                  stc_au_out_valid,
  input  logic [STC_N-1:0]                  stc_au_out_ready,
  output rec_t [STC_N-1:0]                  stc_au_out_rec,
  output logic [STC_N-1:0]                  stc_au_out_last,
  input  logic [STC_N-1:0]                  stc_c_req_valid,
  output logic [STC_N-1:0]                  stc_c_req_ready,
  input  logic [STC_N-1:0][STC_ADDR_W-1:0]  stc_c_req_addr,
  output logic [STC_N-1:0]                  stc_c_resp_valid,
  output logic [STC_N-1:0][63:0]            stc_c_resp_data,
  output logic [STC_N-1:0][31:0]            stc_c_hits,
  output logic [STC_N-1:0][31:0]            stc_c_misses,
  output logic [STC_N-1:0]                  stc_hbm_req_valid,
  input  logic [STC_N-1:0]                  stc_hbm_req_ready,
  output logic [STC_N-1:0][STC_ADDR_W-4:0]  stc_hbm_req_addr,
  input  logic [STC_N-1:0]                  stc_hbm_resp_valid,
  input  logic [STC_N-1:0][63:0]            stc_hbm_resp_data
);

  fschol_top #(.VL(CHOL_VL), .N(CHOL_N), .M(CHOL_M)) u_chol (
    .clk, .rst_n,
    .start(chol_start), .num_jobs(chol_num_jobs), .job_base(chol_job_base),
    .a_base(chol_a_base), .p_base(chol_p_base), .l_base(chol_l_base), .busy(chol_busy),
    .job_rd_en(chol_job_rd_en), .job_rd_addr(chol_job_rd_addr), .job_rd_data(chol_job_rd_data),
    .a_rd_en(chol_a_rd_en), .a_rd_addr(chol_a_rd_addr), .a_rd_data(chol_a_rd_data),
    .p_rd_en(chol_p_rd_en), .p_rd_addr(chol_p_rd_addr), .p_rd_data(chol_p_rd_data),
    .l_wr_en(chol_l_wr_en), .l_wr_ready(chol_l_wr_ready), .l_wr_addr(chol_l_wr_addr),
    .l_wr_data(chol_l_wr_data), .l_vectors(chol_l_vectors), .jobs_done(chol_jobs_done)
  );

  fspgemm_top #(.M(SPG_M), .N(SPG_N), .BUF_DEPTH(SPG_BUF_DEPTH)) u_spgemm (
    .clk, .rst_n,
    .start(spg_start), .a_nnz(spg_a_nnz), .busy(spg_busy),
    .a_rd_en(spg_a_rd_en), .a_rd_addr(spg_a_rd_addr), .a_rd_data(spg_a_rd_data),
    .p_rd_en(spg_p_rd_en), .p_rd_addr(spg_p_rd_addr), .p_rd_data(spg_p_rd_data),
    .b_rd_en(spg_b_rd_en), .b_rd_addr(spg_b_rd_addr), .b_rd_data(spg_b_rd_data),
    .c_wr_en(spg_c_wr_en), .c_wr_addr(spg_c_wr_addr), .c_wr_data(spg_c_wr_data),
    .c_count(spg_c_count), .stat_vectors(spg_stat_vectors), .stat_nnz(spg_stat_nnz)
  );

  stc_top #(.N(STC_N), .SETS(STC_SETS), .WAYS(STC_WAYS), .ADDR_W(STC_ADDR_W)) u_stc (
    .clk, .rst_n,
    .mmu_x_val(stc_mmu_x_val),
    .mmu_y_valid(stc_mmu_y_valid), .mmu_y_ready(stc_mmu_y_ready),
    .mmu_y_rec(stc_mmu_y_rec), .mmu_y_last(stc_mmu_y_last),
    .mmu_z_valid(stc_mmu_z_valid), .mmu_z_ready(stc_mmu_z_ready),
    .mmu_z_rec(stc_mmu_z_rec), .mmu_z_last(stc_mmu_z_last),
    .mmu_w_valid(stc_mmu_w_valid), .mmu_w_ready(stc_mmu_w_ready),
    .mmu_w_rec(stc_mmu_w_rec), .mmu_w_mask(stc_mmu_w_mask), .mmu_w_last(stc_mmu_w_last),
    .au_in_valid(stc_au_in_valid), .au_in_ready(stc_au_in_ready),
    .au_in_rec(stc_au_in_rec), .au_in_last(stc_au_in_last),
    .au_out_valid(stc_au_out_valid), .au_out_ready(stc_au_out_ready),
    .au_out_rec(stc_au_out_rec), .au_out_last(stc_au_out_last),
    .c_req_valid(stc_c_req_valid), .c_req_ready(stc_c_req_ready), .c_req_addr(stc_c_req_addr),
    .c_resp_valid(stc_c_resp_valid), .c_resp_data(stc_c_resp_data),
    .c_hits(stc_c_hits), .c_misses(stc_c_misses),
    .hbm_req_valid(stc_hbm_req_valid), .hbm_req_ready(stc_hbm_req_ready),
    .hbm_req_addr(stc_hbm_req_addr),
    .hbm_resp_valid(stc_hbm_resp_valid), .hbm_resp_data(stc_hbm_resp_data)
  );

endmodule
