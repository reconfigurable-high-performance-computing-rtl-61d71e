// fspgemm_core: one FSpGEMM core (load module, N PEs, store module).
//
// A core multiplies its partition of A (rows held in CSV order in its own
// memory) with B. The load module feeds each PE through a private QA
// channel (aType) and QB channel (bType); each PE produces whole rows of C
// and hands their elements to the store module through its QC channel
// (cType). All channels are FIFOs, so the memory side and the compute side
// run decoupled.
//
// Follows the thesis's core structure. Channel depths (QA 2, QB 8, QC 8)
// are this design's choices; the thesis leaves them to the offline
// compiler.
//
// Interface: `start` with a_nnz starts the pass (the store count is cleared);
// `busy` is high until the load module is done, every channel is empty and
// every PE is idle; c_count is the number of C elements written.
// Memory: A (CSV), B row pointers and B elements are read through synchronous
// one-cycle-latency ports, C is written through c_wr_*.
//
// Lint note: a sub-module checks its handshake with an assertion that is
// disabled while the asynchronous reset rst_n is low, so lint tools report
// rst_n here as used both asynchronously and synchronously (SYNCASYNCNET);
// this is expected and does not change the circuit.
module fspgemm_core
  import fspgemm_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned BUF_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W-1:0]  a_nnz,
  output logic              busy,
  output logic              a_rd_en,
  output logic [IDX_W-1:0]  a_rd_addr,
  input  csv_t              a_rd_data,
  output logic              p_rd_en,
  output logic [IDX_W-1:0]  p_rd_addr,
  input  logic [IDX_W-1:0]  p_rd_data,
  output logic              b_rd_en,
  output logic [IDX_W-1:0]  b_rd_addr,
  input  bmem_t             b_rd_data,
  output logic              c_wr_en,
  output logic [IDX_W-1:0]  c_wr_addr,
  output c_t                c_wr_data,
  output logic [IDX_W-1:0]  c_count,
  output logic [IDX_W-1:0]  stat_vectors,
  output logic [IDX_W-1:0]  stat_nnz
);
  logic [N-1:0] la_valid, la_ready, lb_valid, lb_ready;
  a_t   [N-1:0] la_data;
  b_t   [N-1:0] lb_data;
  logic [N-1:0] pa_valid, pa_ready, pb_valid, pb_ready;
  a_t   [N-1:0] pa_data;
  b_t   [N-1:0] pb_data;
  logic [N-1:0] pc_valid, pc_ready, sc_valid, sc_ready, pe_idle;
  c_t   [N-1:0] pc_data, sc_data;
  logic         load_busy;

  fspgemm_load #(.N(N)) u_load (
    .clk, .rst_n, .start, .a_nnz, .busy(load_busy),
    .a_rd_en, .a_rd_addr, .a_rd_data, .p_rd_en, .p_rd_addr, .p_rd_data,
    .b_rd_en, .b_rd_addr, .b_rd_data,
    .qa_valid(la_valid), .qa_ready(la_ready), .qa_data(la_data),
    .qb_valid(lb_valid), .qb_ready(lb_ready), .qb_data(lb_data),
    .stat_vectors, .stat_nnz);

  for (genvar n = 0; n < N; n++) begin : g_pe
    sync_fifo #(.T(a_t), .DEPTH(2)) u_qa (
      .clk, .rst_n, .in_valid(la_valid[n]), .in_ready(la_ready[n]), .in_data(la_data[n]),
      .out_valid(pa_valid[n]), .out_ready(pa_ready[n]), .out_data(pa_data[n]));
    sync_fifo #(.T(b_t), .DEPTH(8)) u_qb (
      .clk, .rst_n, .in_valid(lb_valid[n]), .in_ready(lb_ready[n]), .in_data(lb_data[n]),
      .out_valid(pb_valid[n]), .out_ready(pb_ready[n]), .out_data(pb_data[n]));
    fspgemm_pe #(.BUF_DEPTH(BUF_DEPTH)) u_pe (
      .clk, .rst_n,
      .qa_valid(pa_valid[n]), .qa_ready(pa_ready[n]), .qa_data(pa_data[n]),
      .qb_valid(pb_valid[n]), .qb_ready(pb_ready[n]), .qb_data(pb_data[n]),
      .qc_valid(pc_valid[n]), .qc_ready(pc_ready[n]), .qc_data(pc_data[n]),
      .idle(pe_idle[n]));
    sync_fifo #(.T(c_t), .DEPTH(8)) u_qc (
      .clk, .rst_n, .in_valid(pc_valid[n]), .in_ready(pc_ready[n]), .in_data(pc_data[n]),
      .out_valid(sc_valid[n]), .out_ready(sc_ready[n]), .out_data(sc_data[n]));
  end

  fspgemm_store #(.N(N)) u_store (
    .clk, .rst_n, .clear(start && !busy),
    .qc_valid(sc_valid), .qc_ready(sc_ready), .qc_data(sc_data),
    .wr_en(c_wr_en), .wr_addr(c_wr_addr), .wr_data(c_wr_data), .count(c_count));

  assign busy = load_busy || (|pa_valid) || (|pb_valid) || (|sc_valid) || !(&pe_idle) || c_wr_en;
endmodule
