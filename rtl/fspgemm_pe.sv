// fspgemm_pe: FSpGEMM processing element (sort-and-accumulate unit plus
// double buffer).
//
// Computes one row of C = A x B at a time with Gustavson's method. For every
// nonzero a = A(i,k) it receives (QA) and the row B(k,:) it receives (QB), it
// runs one fused loop that merges the scaled row a*B(k,:) with the partial
// row held in the active buffer, ordered by column index: the smaller
// column index is emitted, and equal indices are added. One element of the
// new partial row is produced per cycle. The new row is written into the
// other buffer and the buffer selector toggles (double buffering), except
// when a carries eor (end of the row of A): then the row is final, its
// elements are sent to QC as (value, row, column) and the buffers are
// cleared for the next row.
//
// Follows the thesis's fused sort-and-accumulate loop and double buffer.
// This design's choices: the multiply and add are single-cycle
// combinational single-precision units (no pipeline), the buffers are read
// asynchronously, their depth BUF_DEPTH bounds the nonzeros of one output
// row (not given by the thesis), and an empty B row arrives as one beat
// with size 0.
//
// Interface: valid/ready streams qa (a_t), qb (b_t), qc (c_t); `idle` is high
// when no job is in progress. Timing: a job takes max(1, bufCntr + size -
// matches) cycles plus one cycle to start and one to finish.
//
// Lint note: the handshake assertion below is disabled while the asynchronous
// reset rst_n is low (disable iff), so lint tools see rst_n used both
// asynchronously and in clocked logic and report SYNCASYNCNET; that is
// expected and does not change the circuit.
module fspgemm_pe
  import fspgemm_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic qa_valid,
  output logic qa_ready,
  input  a_t   qa_data,
  input  logic qb_valid,
  output logic qb_ready,
  input  b_t   qb_data,
  output logic qc_valid,
  input  logic qc_ready,
  output c_t   qc_data,
  output logic idle
);
  localparam int unsigned AW = $clog2(BUF_DEPTH + 1);
  localparam int unsigned IW = $clog2(BUF_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;

  pel_t            bufm [2][BUF_DEPTH];
  logic            buf_sel;
  logic [AW-1:0]   buf_cntr, buf_ptr, c_cntr;
  logic [IDX_W-1:0] b_ptr, b_size;
  a_t              a_reg;

  pel_t  bel;
  logic  have_buf, have_b, take_buf, take_b, emit, can_emit;
  f32_t  c_temp, c_sum, c_val;
  logic [IDX_W-1:0] c_col;

  assign bel      = bufm[buf_sel][buf_ptr[IW-1:0]];
  assign have_buf = (buf_ptr < buf_cntr);
  assign have_b   = (b_ptr < b_size);

  fp_mul #(.EW(8), .MW(23)) u_mul (.a(a_reg.val), .b(qb_data.val), .y(c_temp));
  fp_add #(.EW(8), .MW(23)) u_add (.a(bel.val),   .b(c_temp),      .y(c_sum));

  // fused sort-and-accumulate step
  always_comb begin
    take_buf = 1'b0;
    take_b   = 1'b0;
    c_val    = bel.val;
    c_col    = bel.colIdx;
    if (have_buf && have_b) begin
      if (bel.colIdx < qb_data.colIdx) begin
        take_buf = 1'b1;
      end else if (bel.colIdx > qb_data.colIdx) begin
        take_b = 1'b1;
        c_val  = c_temp;
        c_col  = qb_data.colIdx;
      end else begin
        take_buf = 1'b1;
        take_b   = 1'b1;
        c_val    = c_sum;
      end
    end else if (have_buf) begin
      take_buf = 1'b1;
    end else if (have_b) begin
      take_b = 1'b1;
      c_val  = c_temp;
      c_col  = qb_data.colIdx;
    end
  end

  assign can_emit = (state == S_RUN) && (have_buf || have_b) &&
                    (!have_b || qb_valid) && (!a_reg.eor || qc_ready);
  assign emit     = can_emit;

  assign qa_ready = (state == S_IDLE) && qb_valid;
  // QB beats are consumed one per element; a size-0 row's single beat is
  // consumed when the job starts
  assign qb_ready = (state == S_IDLE) ? (qa_valid && qb_data.size == '0)
                                      : (emit && take_b);
  assign qc_valid = emit && a_reg.eor;
  assign qc_data  = '{val: c_val, rowIdx: a_reg.rowIdx, colIdx: c_col};
  assign idle     = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (emit && !a_reg.eor) bufm[~buf_sel][c_cntr[IW-1:0]] <= '{val: c_val, colIdx: c_col};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      buf_sel  <= 1'b0;
      buf_cntr <= '0;
      buf_ptr  <= '0;
      c_cntr   <= '0;
      b_ptr    <= '0;
      b_size   <= '0;
      a_reg    <= '0;
    end else begin
      case (state)
        S_IDLE: if (qa_valid && qb_valid) begin
          a_reg   <= qa_data;
          b_size  <= qb_data.size;
          b_ptr   <= '0;
          buf_ptr <= '0;
          c_cntr  <= '0;
          state   <= S_RUN;
        end
        S_RUN: begin
          if (emit) begin
            if (take_buf) buf_ptr <= buf_ptr + 1'b1;
            if (take_b)   b_ptr   <= b_ptr + 1'b1;
            c_cntr <= c_cntr + 1'b1;
          end
          if (!have_buf && !have_b) state <= S_DONE;
        end
        default: begin  // S_DONE: swap buffers or finish the row
          if (a_reg.eor) begin
            buf_cntr <= '0;
          end else begin
            buf_cntr <= c_cntr;
            buf_sel  <= ~buf_sel;
          end
          state <= S_IDLE;
        end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (emit && !a_reg.eor) |-> c_cntr < AW'(BUF_DEPTH))
    else $error("fspgemm_pe: partial row exceeds BUF_DEPTH");
endmodule
