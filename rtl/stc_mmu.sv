// stc_mmu: Multiply and Merge Unit of the Sparse Tensor Core.
//
// One step of row-wise Gustavson multiplication: a row of B, delivered as
// E-record vectors y (index = column, value), is scaled by a scalar x (the
// matching nonzero of A) in an array of E double-precision multipliers, and
// the scaled row y' is merged by index with a stream of partial results z by
// an E-record hardware merge sorter. The output w is the sorted union of y'
// and z (records with equal index are not added here; that is the job of the
// addition unit).
//
// x is sampled with every y vector, so it must be held for the whole row.
// Records whose index is the sentinel KEY_MAX are padding: they are not
// multiplied and pass through as padding.
//
// Follows the thesis's MMU (8 multipliers feeding an 8-record merge
// sorter); putting the multipliers directly in front of the sorter's input
// FIFO, with no pipeline register, is this design's choice.
//
// Interface: valid/ready streams y (with x) and z, each with `last` on its
// final vector; output w with a per-record mask and `last`. Timing: E records
// per cycle, see hms.
//
// Lint note: a sub-module checks its handshake with an assertion that is
// disabled while the asynchronous reset rst_n is low, so lint tools report
// rst_n here as used both asynchronously and synchronously (SYNCASYNCNET);
// this is expected and does not change the circuit.
module stc_mmu
  import stc_pkg::rec_t, stc_pkg::VAL_W, stc_pkg::KEY_MAX;
#(
  parameter int unsigned E          = stc_pkg::E,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [VAL_W-1:0]  x_val,
  input  logic              y_valid,
  output logic              y_ready,
  input  rec_t [E-1:0]      y_rec,
  input  logic              y_last,
  input  logic              z_valid,
  output logic              z_ready,
  input  rec_t [E-1:0]      z_rec,
  input  logic              z_last,
  output logic              w_valid,
  input  logic              w_ready,
  output rec_t [E-1:0]      w_rec,
  output logic [E-1:0]      w_mask,
  output logic              w_last
);
  rec_t [E-1:0]       yh;
  logic [VAL_W-1:0]   prod [E];

  for (genvar i = 0; i < E; i++) begin : g_mul
    fp_mul #(.EW(11), .MW(52)) u_mul (.a(x_val), .b(y_rec[i].val), .y(prod[i]));
    assign yh[i].idx = y_rec[i].idx;
    assign yh[i].val = (y_rec[i].idx == KEY_MAX) ? '0 : prod[i];
  end

  hms #(.E(E), .FIFO_DEPTH(FIFO_DEPTH)) u_hms (
    .clk, .rst_n,
    .a_valid(y_valid), .a_ready(y_ready), .a_rec(yh), .a_last(y_last),
    .b_valid(z_valid), .b_ready(z_ready), .b_rec(z_rec), .b_last(z_last),
    .out_valid(w_valid), .out_ready(w_ready), .out_rec(w_rec), .out_mask(w_mask),
    .out_last(w_last));
endmodule
