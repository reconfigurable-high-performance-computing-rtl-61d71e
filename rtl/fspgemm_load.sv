// fspgemm_load: FSpGEMM load module (CSV reader and B-row broadcaster).
//
// Streams the nonzeros of A, stored in CSV (compressed sparse vector) order,
// and groups them into sparse vectors: consecutive nonzeros with the same
// column index k inside one group of N consecutive rows. Row r belongs to
// PE (r mod N). When the next nonzero starts a new vector (its column index
// or row group differs), the finished vector is issued: each PE that holds
// a nonzero of it gets its aType word (value, row index, end-of-row flag)
// on its QA channel, the row pointers of B(k,:) are read (CSR), and the
// row's elements are read once and broadcast on the QB channels of exactly
// those PEs. Reading each B row once per vector rather than once per nonzero
// is the data-reuse scheme; the module counts vectors and nonzeros so that
// the memory-access reduction 1 - nv/nnz can be observed.
//
// Follows the thesis's load module (vector detection by comparing column
// indices of consecutive nonzeros, one B-row read per vector, bType.size).
// This design's choices: the row-group test added to the column test, the
// end-of-row flag stored with each CSV element by the host, synchronous
// memory ports with one-cycle read latency, and the strictly sequential
// order collect -> send A -> read pointers -> broadcast B.
//
// Interface: `start` with a_nnz begins a pass over A; `busy` stays high
// until the last B row has been broadcast. Timing: one CSV element per cycle
// while collecting, four cycles of overhead per vector, then one B element
// per cycle while every receiving QB channel has room.
module fspgemm_load
  import fspgemm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W-1:0]  a_nnz,
  output logic              busy,
  // A in CSV format
  output logic              a_rd_en,
  output logic [IDX_W-1:0]  a_rd_addr,
  input  csv_t              a_rd_data,
  // B row pointers (CSR)
  output logic              p_rd_en,
  output logic [IDX_W-1:0]  p_rd_addr,
  input  logic [IDX_W-1:0]  p_rd_data,
  // B elements (CSR)
  output logic              b_rd_en,
  output logic [IDX_W-1:0]  b_rd_addr,
  input  bmem_t             b_rd_data,
  // channels to the PEs
  output logic [N-1:0]      qa_valid,
  input  logic [N-1:0]      qa_ready,
  output a_t   [N-1:0]      qa_data,
  output logic [N-1:0]      qb_valid,
  input  logic [N-1:0]      qb_ready,
  output b_t   [N-1:0]      qb_data,
  // statistics
  output logic [IDX_W-1:0]  stat_vectors,
  output logic [IDX_W-1:0]  stat_nnz
);
  typedef enum logic [2:0] {S_IDLE, S_COLLECT, S_SEND_A, S_PTR0, S_PTR1, S_PTR2, S_SEND_B} state_t;
  state_t state;

  logic               ar_start, ar_valid, ar_ready, ar_done;
  csv_t               ar_data;
  logic               br_start, br_valid, br_ready;
  bmem_t              br_data;

  logic [N-1:0]       vmask;
  a_t   [N-1:0]       va;
  logic [IDX_W-1:0]   vcol, vgrp, row_beg, row_size, sent;
  logic               all_qa, all_qb, same_vec, add_elem, bcast, br_done;

  mem_reader #(.T(csv_t), .AW(IDX_W)) u_areader (
    .clk, .rst_n, .start(ar_start), .base('0), .count(a_nnz),
    .rd_en(a_rd_en), .rd_addr(a_rd_addr), .rd_data(a_rd_data),
    .out_valid(ar_valid), .out_ready(ar_ready), .out_data(ar_data), .done(ar_done));

  mem_reader #(.T(bmem_t), .AW(IDX_W)) u_breader (
    .clk, .rst_n, .start(br_start), .base(row_beg), .count(p_rd_data - row_beg),
    .rd_en(b_rd_en), .rd_addr(b_rd_addr), .rd_data(b_rd_data),
    .out_valid(br_valid), .out_ready(br_ready), .out_data(br_data), .done(br_done));

  assign ar_start = (state == S_IDLE) && start;
  assign same_vec = (vmask == '0) ||
                    (ar_data.colIdx == vcol && (ar_data.rowIdx / N) == vgrp);
  assign add_elem = (state == S_COLLECT) && ar_valid && same_vec;
  assign ar_ready = add_elem;
  assign all_qa   = &(qa_ready | ~vmask);
  assign all_qb   = &(qb_ready | ~vmask);
  assign br_start = (state == S_PTR2);
  assign bcast    = (state == S_SEND_B) && all_qb && (row_size == '0 || br_valid);
  assign br_ready = bcast && (row_size != '0);
  assign busy     = (state != S_IDLE) || !br_done;

  assign p_rd_en   = (state == S_PTR0) || (state == S_PTR1);
  assign p_rd_addr = (state == S_PTR0) ? vcol : vcol + 1'b1;

  always_comb begin
    for (int n = 0; n < N; n++) begin
      qa_valid[n] = (state == S_SEND_A) && vmask[n] && all_qa;
      qa_data[n]  = va[n];
      qb_valid[n] = bcast && vmask[n];
      qb_data[n]  = '{size: row_size,
                      val: (row_size == '0) ? '0 : br_data.val,
                      colIdx: (row_size == '0) ? '0 : br_data.colIdx};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      vmask <= '0; va <= '0; vcol <= '0; vgrp <= '0;
      row_beg <= '0; row_size <= '0; sent <= '0;
      stat_vectors <= '0; stat_nnz <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state        <= S_COLLECT;
          stat_vectors <= '0;
          stat_nnz     <= '0;
        end
        S_COLLECT: begin
          if (add_elem) begin
            vmask[ar_data.rowIdx % N] <= 1'b1;
            va[ar_data.rowIdx % N]    <= '{val: ar_data.val, rowIdx: ar_data.rowIdx, eor: ar_data.eor};
            vcol     <= ar_data.colIdx;
            vgrp     <= ar_data.rowIdx / N;
            stat_nnz <= stat_nnz + 1'b1;
          end else if ((ar_valid || ar_done) && vmask != '0) begin
            state        <= S_SEND_A;
            stat_vectors <= stat_vectors + 1'b1;
          end else if (ar_done) begin
            state <= S_IDLE;
          end
        end
        S_SEND_A: if (all_qa) state <= S_PTR0;
        S_PTR0:   state <= S_PTR1;
        S_PTR1: begin
          row_beg <= p_rd_data;
          state   <= S_PTR2;
        end
        S_PTR2: begin
          row_size <= p_rd_data - row_beg;
          sent     <= '0;
          state    <= S_SEND_B;
        end
        default: begin  // S_SEND_B
          if (bcast) begin
            sent <= sent + 1'b1;
            if (row_size == '0 || sent + 1'b1 == row_size) begin
              vmask <= '0;
              state <= S_COLLECT;
            end
          end
        end
      endcase
    end
  end
endmodule
