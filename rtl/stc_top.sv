// stc_top: Sparse Tensor Core, N lanes of MMU + AU + cache bank.
//
// The co-processor computes sparse matrix products row by row with
// Gustavson's method in two phases. Phase one: each multiply-and-merge unit
// (MMU) takes its partition of the first matrix; for each nonzero x it
// scales the matching row of the second matrix and merges it, by index, with
// the partial list built so far (z), producing a longer sorted partial list
// (w) in which equal indices are still separate. Phase two: the partial list
// of an output row is passed through an addition unit (AU), which adds
// records with equal index and emits the finished row.
//
// Each lane m owns HBM channel m through cache bank m, and the bank serves
// that lane's MMU and AU. The address generation that turns a matrix
// partition into cache requests, and the storage of partial lists between
// the phases, are not specified in detail; here the cache port of each bank
// and the MMU and AU streams are brought out per lane, so an external
// controller (or a testbench) sequences the phases. Lanes are independent.
//
// Defaults follow the thesis's evaluated configuration: 16 MMUs, 16 AUs,
// 16 banks of 128 sets x 16 ways x 64 B (2 MB), one 64-bit HBM channel per
// bank, 8-record merging and double-precision values.
//
// Interface: per-lane arrays of the stc_mmu, stc_au and stc_cache_bank
// ports, named with the prefixes mmu_, au_ and c_/hbm_.
//
// Lint note: a sub-module checks its handshake with an assertion that is
// disabled while the asynchronous reset rst_n is low, so lint tools report
// rst_n here as used both asynchronously and synchronously (SYNCASYNCNET);
// this is expected and does not change the circuit.
module stc_top
  import stc_pkg::rec_t, stc_pkg::VAL_W, stc_pkg::E;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned SETS   = 128,
  parameter int unsigned WAYS   = 16,
  parameter int unsigned ADDR_W = 31
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // multiply and merge units
  input  logic [N-1:0][VAL_W-1:0]    mmu_x_val,
  input  logic [N-1:0]               mmu_y_valid,
  output logic [N-1:0]               mmu_y_ready,
  input  rec_t [N-1:0][E-1:0]        mmu_y_rec,
  input  logic [N-1:0]               mmu_y_last,
  input  logic [N-1:0]               mmu_z_valid,
  output logic [N-1:0]               mmu_z_ready,
  input  rec_t [N-1:0][E-1:0]        mmu_z_rec,
  input  logic [N-1:0]               mmu_z_last,
  output logic [N-1:0]               mmu_w_valid,
  input  logic [N-1:0]               mmu_w_ready,
  output rec_t [N-1:0][E-1:0]        mmu_w_rec,
  output logic [N-1:0][E-1:0]        mmu_w_mask,
  output logic [N-1:0]               mmu_w_last,
  // addition units
  input  logic [N-1:0]               au_in_valid,
  output logic [N-1:0]               au_in_ready,
  input  rec_t [N-1:0]               au_in_rec,
  input  logic [N-1:0]               au_in_last,
  output logic [N-1:0]               au_out_valid,
  input  logic [N-1:0]               au_out_ready,
  output rec_t [N-1:0]               au_out_rec,
  output logic [N-1:0]               au_out_last,
  // cache banks, lane side
  input  logic [N-1:0]               c_req_valid,
  output logic [N-1:0]               c_req_ready,
  input  logic [N-1:0][ADDR_W-1:0]   c_req_addr,
  output logic [N-1:0]               c_resp_valid,
  output logic [N-1:0][63:0]         c_resp_data,
  output logic [N-1:0][31:0]         c_hits,
  output logic [N-1:0][31:0]         c_misses,
  // HBM channels
  output logic [N-1:0]               hbm_req_valid,
  input  logic [N-1:0]               hbm_req_ready,
  output logic [N-1:0][ADDR_W-4:0]   hbm_req_addr,
  input  logic [N-1:0]               hbm_resp_valid,
  input  logic [N-1:0][63:0]         hbm_resp_data
);
  for (genvar m = 0; m < N; m++) begin : g_lane
    stc_mmu u_mmu (
      .clk, .rst_n, .x_val(mmu_x_val[m]),
      .y_valid(mmu_y_valid[m]), .y_ready(mmu_y_ready[m]), .y_rec(mmu_y_rec[m]), .y_last(mmu_y_last[m]),
      .z_valid(mmu_z_valid[m]), .z_ready(mmu_z_ready[m]), .z_rec(mmu_z_rec[m]), .z_last(mmu_z_last[m]),
      .w_valid(mmu_w_valid[m]), .w_ready(mmu_w_ready[m]), .w_rec(mmu_w_rec[m]),
      .w_mask(mmu_w_mask[m]), .w_last(mmu_w_last[m]));

    stc_au u_au (
      .clk, .rst_n,
      .in_valid(au_in_valid[m]), .in_ready(au_in_ready[m]), .in_rec(au_in_rec[m]), .in_last(au_in_last[m]),
      .out_valid(au_out_valid[m]), .out_ready(au_out_ready[m]), .out_rec(au_out_rec[m]),
      .out_last(au_out_last[m]));

    stc_cache_bank #(.SETS(SETS), .WAYS(WAYS), .ADDR_W(ADDR_W)) u_bank (
      .clk, .rst_n,
      .req_valid(c_req_valid[m]), .req_ready(c_req_ready[m]), .req_addr(c_req_addr[m]),
      .resp_valid(c_resp_valid[m]), .resp_data(c_resp_data[m]),
      .mem_req_valid(hbm_req_valid[m]), .mem_req_ready(hbm_req_ready[m]), .mem_req_addr(hbm_req_addr[m]),
      .mem_resp_valid(hbm_resp_valid[m]), .mem_resp_data(hbm_resp_data[m]),
      .hits(c_hits[m]), .misses(c_misses[m]));
  end
endmodule
