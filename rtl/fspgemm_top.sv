// fspgemm_top: the FSpGEMM kernel, M cores of N PEs each.
//
// Computes C = A x B for sparse single-precision matrices. The rows of A are
// partitioned among the M cores; each core has its own memory channels for
// its CSV partition of A, for B (CSR row pointers and elements) and for its
// partition of C, so the cores run independently. Each core runs N rows of A
// at once, one per PE, and reads every row of B once per sparse vector
// instead of once per nonzero.
//
// The defaults M = 6 cores and N = 16 PEs are the thesis's main
// implementation. Per-core memory ports are brought out as arrays; the
// memories themselves are outside this design.
//
// Interface: start[m] / a_nnz[m] start core m; busy[m] reports it running.
//
// Lint note: a sub-module checks its handshake with an assertion that is
// disabled while the asynchronous reset rst_n is low, so lint tools report
// rst_n here as used both asynchronously and synchronously (SYNCASYNCNET);
// this is expected and does not change the circuit.
module fspgemm_top
  import fspgemm_pkg::*;
#(
  parameter int unsigned M         = 6,
  parameter int unsigned N         = 16,
  parameter int unsigned BUF_DEPTH = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [M-1:0]                start,
  input  logic [M-1:0][IDX_W-1:0]     a_nnz,
  output logic [M-1:0]                busy,
  output logic [M-1:0]                a_rd_en,
  output logic [M-1:0][IDX_W-1:0]     a_rd_addr,
  input  csv_t [M-1:0]                a_rd_data,
  output logic [M-1:0]                p_rd_en,
  output logic [M-1:0][IDX_W-1:0]     p_rd_addr,
  input  logic [M-1:0][IDX_W-1:0]     p_rd_data,
  output logic [M-1:0]                b_rd_en,
  output logic [M-1:0][IDX_W-1:0]     b_rd_addr,
  input  bmem_t [M-1:0]               b_rd_data,
  output logic [M-1:0]                c_wr_en,
  output logic [M-1:0][IDX_W-1:0]     c_wr_addr,
  output c_t [M-1:0]                  c_wr_data,
  output logic [M-1:0][IDX_W-1:0]     c_count,
  output logic [M-1:0][IDX_W-1:0]     stat_vectors,
  output logic [M-1:0][IDX_W-1:0]     stat_nnz
);
  for (genvar m = 0; m < M; m++) begin : g_core
    fspgemm_core #(.N(N), .BUF_DEPTH(BUF_DEPTH)) u_core (
      .clk, .rst_n, .start(start[m]), .a_nnz(a_nnz[m]), .busy(busy[m]),
      .a_rd_en(a_rd_en[m]), .a_rd_addr(a_rd_addr[m]), .a_rd_data(a_rd_data[m]),
      .p_rd_en(p_rd_en[m]), .p_rd_addr(p_rd_addr[m]), .p_rd_data(p_rd_data[m]),
      .b_rd_en(b_rd_en[m]), .b_rd_addr(b_rd_addr[m]), .b_rd_data(b_rd_data[m]),
      .c_wr_en(c_wr_en[m]), .c_wr_addr(c_wr_addr[m]), .c_wr_data(c_wr_data[m]),
      .c_count(c_count[m]), .stat_vectors(stat_vectors[m]), .stat_nnz(stat_nnz[m]));
  end
endmodule
