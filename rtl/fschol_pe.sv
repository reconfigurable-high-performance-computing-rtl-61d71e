// fschol_pe: processing element of the sparse Cholesky factorization engine.
//
// A PE runs jobs handed to it on Q_job. Each job is one update(S, C) of a
// supernode's frontal matrix F_S, optionally followed by factorize(S):
//
//  * Update. F_S is streamed row by row in vectors of VL lanes (a row of d
//    elements is ceil(d/VL) vectors, zero-padded). V_F comes from Q_A (job
//    not yet updated, up = 0), from the inter-PE channel Q_F (f_rd = 1) or
//    from the PE's own FIFO Q_F,PE. V_U comes from Q_U (u_rd = 1), filled by
//    the matrix extension unit from Mem_U and the pattern stream Q_P, or is
//    zero. VL adders form V_F + V_U. Without last_c the sum goes to Q_F
//    (f_wr = 1) or Q_F,PE and the job ends; with last_c it is written into
//    the frontal RAM and the PE factorizes.
//  * Factorize. For each of the t+1 supernode columns k: the sqrt unit
//    takes sqrt(F[k][k]); VL dividers divide row k (equal to column k, F is
//    symmetric) by it, giving column k of L, which goes to Q_L and into a
//    row register; then, row by row below k, VL multipliers form the outer
//    product l_ik * l_k and VL subtractors take it from F. After the last
//    column the trailing (d-t-1) x (d-t-1) block is the update matrix U_S
//    and is copied, one word per cycle, into Mem_U for the parent's update.
//
// What follows the thesis: the job bits and their meaning, the queues
// Q_A, Q_P, Q_U, Q_F, Q_F,PE, Q_L and Mem_U with the sizes of its storage
// table, VL-wide single-precision units, and the extension algorithm. This
// design's choices: the job also carries d and t+1; F_S of the job being
// factorized is held in a frontal RAM of (N+M)*VL rows of N+M vectors; all
// t+1 columns are eliminated one after the other (a right-looking dense
// partial Cholesky), so every column's outer product is subtracted, not only
// the last one's; Mem_U is filled one word per cycle; Q_U is QU_DEPTH deep.
//
// Interface: valid/ready streams job_*, qa_*, qp_* (pattern bits), qf_in_*
// and qf_out_* (the inter-PE channel, both directions), ql_* (L columns,
// ql_last on the final vector of a job). idle is high between jobs.
// Timing: update moves one vector per cycle (when the extension supplies
// Q_U, one per VL cycles); factorize takes, per column k, one cycle for the
// root, ceil(d/VL) - k/VL cycles for the division and about (d-k-1) vectors
// for the subtraction; storing U_S takes (d-t-1)^2 cycles.
//
// Lint note: the handshake assertion below is disabled while the asynchronous
// reset rst_n is low (disable iff), so lint tools see rst_n used both
// asynchronously and in clocked logic and report SYNCASYNCNET; that is
// expected and does not change the circuit.
module fschol_pe
  import fschol_pkg::job_t, fschol_pkg::DIM_W;
#(
  parameter int unsigned VL       = 128,
  parameter int unsigned N        = 4,
  parameter int unsigned M        = 2,
  parameter int unsigned QU_DEPTH = 4,
  localparam int unsigned WL      = fschol_pkg::WL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    job_valid,
  output logic                    job_ready,
  input  job_t                    job,
  input  logic                    qa_valid,
  output logic                    qa_ready,
  input  logic [VL-1:0][WL-1:0]   qa_data,
  input  logic                    qp_valid,
  output logic                    qp_ready,
  input  logic [VL-1:0]           qp_data,
  input  logic                    qf_in_valid,
  output logic                    qf_in_ready,
  input  logic [VL-1:0][WL-1:0]   qf_in_data,
  output logic                    qf_out_valid,
  input  logic                    qf_out_ready,
  output logic [VL-1:0][WL-1:0]   qf_out_data,
  output logic                    ql_valid,
  input  logic                    ql_ready,
  output logic [VL-1:0][WL-1:0]   ql_data,
  output logic                    ql_last,
  output logic                    idle
);
  localparam int unsigned NV       = N + M;              // vectors per row
  localparam int unsigned DMAX     = NV * VL;            // frontal order
  localparam int unsigned QF_DEPTH = NV * NV * VL;       // Q_F,PE depth
  localparam int unsigned UMAX     = N * VL;             // update order
  localparam int unsigned UADDR_W  = $clog2(UMAX * UMAX);
  localparam int unsigned FADDR_W  = $clog2(DMAX * NV);
  localparam int unsigned LW       = (VL > 1) ? $clog2(VL) : 1;
  localparam int unsigned VW       = $clog2(NV);
  localparam logic [DIM_W-1:0] VLD  = DIM_W'(VL);
  localparam logic [DIM_W-1:0] NVD  = DIM_W'(NV);

  typedef logic [VL-1:0][WL-1:0] vec_t;

  typedef enum logic [2:0] {S_IDLE, S_UPD, S_SQRT, S_DIV, S_SUB, S_USTORE} state_t;
  state_t state;

  job_t             jb;
  logic [DIM_W-1:0] nvec, row, vec, k, urow, ucol;
  logic [UADDR_W-1:0] uaddr;
  logic [WL-1:0]    s_reg;
  vec_t             lrow [NV];

  // ---------------- storage ----------------
  vec_t             fram [DMAX * NV];   // frontal matrix of the job
  logic [WL-1:0]    memu [UMAX * UMAX]; // Mem_U
  logic [FADDR_W-1:0] f_addr;
  vec_t             f_rd;
  logic             f_we;
  vec_t             f_wd;
  logic             u_we;
  logic [WL-1:0]    u_wd;

  assign f_rd = fram[f_addr];

  always_ff @(posedge clk) begin
    if (f_we) fram[f_addr] <= f_wd;
    if (u_we) memu[uaddr]  <= u_wd;
  end

  // ---------------- matrix extension and Q_U ----------------
  logic               ext_start;
  logic [DIM_W-1:0]   job_nvec;
  assign job_nvec = (job.d + VLD - 1'b1) / VLD;
  logic [UADDR_W-1:0] ext_addr;
  logic               xu_valid, xu_ready, qu_valid, qu_ready;
  vec_t               xu_data, qu_data;

  fschol_extend #(.VL(VL), .WL(WL), .UADDR_W(UADDR_W)) u_ext (
    .clk, .rst_n, .start(ext_start),
    .num(32'(job.d) * 32'(job_nvec)),
    .p_valid(qp_valid), .p_ready(qp_ready), .p_data(qp_data),
    .u_rd_addr(ext_addr), .u_rd_data(memu[ext_addr]),
    .qu_valid(xu_valid), .qu_ready(xu_ready), .qu_data(xu_data)
  );

  sync_fifo #(.T(vec_t), .DEPTH(QU_DEPTH)) u_qu (
    .clk, .rst_n,
    .in_valid(xu_valid), .in_ready(xu_ready), .in_data(xu_data),
    .out_valid(qu_valid), .out_ready(qu_ready), .out_data(qu_data)
  );

  // ---------------- Q_F,PE ----------------
  logic qp_in_valid, qp_in_ready, qp_out_valid, qp_out_ready;
  vec_t qp_out_data;

  // ---------------- vector addition (update) ----------------
  vec_t vf, vu, vsum;
  logic vf_valid, vu_valid, sink_ready, fire;

  always_comb begin
    if (!jb.up)     begin vf = qa_data;     vf_valid = qa_valid;     end
    else if (jb.f_rd) begin vf = qf_in_data; vf_valid = qf_in_valid; end
    else            begin vf = qp_out_data; vf_valid = qp_out_valid; end
    vu       = jb.u_rd ? qu_data : '0;
    vu_valid = jb.u_rd ? qu_valid : 1'b1;
    sink_ready = jb.last_c ? 1'b1 : (jb.f_wr ? qf_out_ready : qp_in_ready);
  end

  assign fire         = (state == S_UPD) && vf_valid && vu_valid && sink_ready;
  assign qa_ready     = fire && !jb.up;
  assign qf_in_ready  = fire && jb.up && jb.f_rd;
  assign qp_out_ready = fire && jb.up && !jb.f_rd;
  assign qu_ready     = fire && jb.u_rd;
  assign qf_out_valid = (state == S_UPD) && vf_valid && vu_valid && !jb.last_c && jb.f_wr;
  assign qp_in_valid  = (state == S_UPD) && vf_valid && vu_valid && !jb.last_c && !jb.f_wr;
  assign qf_out_data  = vsum;

  sync_fifo #(.T(vec_t), .DEPTH(QF_DEPTH)) u_qfpe (
    .clk, .rst_n,
    .in_valid(qp_in_valid), .in_ready(qp_in_ready), .in_data(vsum),
    .out_valid(qp_out_valid), .out_ready(qp_out_ready), .out_data(qp_out_data)
  );

  // ---------------- factorize datapath ----------------
  logic [WL-1:0] diag, root, lik;
  vec_t          quot, prod, diff, lmask;

  assign diag = f_rd[LW'(k % VLD)];
  assign lik  = lrow[VW'(row / VLD)][LW'(row % VLD)];

  fp_sqrt #(.EW(8), .MW(23)) u_sqrt (.a(diag), .y(root));

  vec_t f_wd_sub;
  for (genvar i = 0; i < VL; i++) begin : g_lane
    logic [DIM_W-1:0] col;
    assign col = vec * VLD + DIM_W'(i);
    fp_add #(.EW(8), .MW(23)) u_add (.a(vf[i]), .b(vu[i]), .y(vsum[i]));
    fp_div #(.EW(8), .MW(23)) u_div (.a(f_rd[i]), .b(s_reg), .y(quot[i]));
    fp_mul #(.EW(8), .MW(23)) u_mul (.a(lik), .b(lrow[VW'(vec)][i]), .y(prod[i]));
    fp_add #(.EW(8), .MW(23)) u_sub (.a(f_rd[i]), .b({~prod[i][WL-1], prod[i][WL-2:0]}),
                                     .y(diff[i]));
    // column k of L: lanes left of the diagonal or past the order are zero
    assign lmask[i] = (col >= k && col < jb.d) ? quot[i] : '0;
    // the subtraction touches only columns right of k
    assign f_wd_sub[i] = (col > k && col < jb.d) ? diff[i] : f_rd[i];
  end


  // ---------------- control ----------------
  logic last_vec, last_row;
  assign last_vec = (vec == nvec - 1'b1);
  assign last_row = (row == jb.d - 1'b1);

  assign job_ready = (state == S_IDLE);
  assign idle      = (state == S_IDLE);
  assign ext_start = job_valid && job_ready && job.u_rd;
  assign ql_valid  = (state == S_DIV);
  assign ql_data   = lmask;
  assign ql_last   = (state == S_DIV) && last_vec && (k == jb.t1 - 1'b1);

  always_comb begin
    f_addr = FADDR_W'(row * NVD + vec);
    f_we   = 1'b0;
    f_wd   = vsum;
    u_we   = 1'b0;
    u_wd   = f_rd[LW'((jb.t1 + ucol) % VLD)];
    unique case (state)
      S_UPD: begin
        f_we = fire && jb.last_c;
      end
      S_SQRT: f_addr = FADDR_W'(k * NVD + k / VLD);
      S_DIV:  f_addr = FADDR_W'(k * NVD + vec);
      S_SUB: begin
        f_we = 1'b1;
        f_wd = f_wd_sub;
      end
      S_USTORE: begin
        f_addr = FADDR_W'((jb.t1 + urow) * NVD + (jb.t1 + ucol) / VLD);
        u_we   = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      jb    <= '0;
      nvec  <= '0;
      row   <= '0;
      vec   <= '0;
      k     <= '0;
      urow  <= '0;
      ucol  <= '0;
      uaddr <= '0;
      s_reg <= '0;
      for (int v = 0; v < NV; v++) lrow[v] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (job_valid) begin
          jb    <= job;
          nvec  <= job_nvec;
          row   <= '0;
          vec   <= '0;
          state <= S_UPD;
        end
        S_UPD: if (fire) begin
          if (last_vec) begin
            vec <= '0;
            row <= row + 1'b1;
            if (last_row) begin
              k     <= '0;
              state <= jb.last_c ? S_SQRT : S_IDLE;
            end
          end else begin
            vec <= vec + 1'b1;
          end
        end
        S_SQRT: begin
          s_reg <= root;
          vec   <= k / VLD;
          for (int v = 0; v < NV; v++) lrow[v] <= '0;
          state <= S_DIV;
        end
        S_DIV: if (ql_ready) begin
          lrow[VW'(vec)] <= lmask;
          if (last_vec) begin
            if (k + 1'b1 < jb.d) begin
              row   <= k + 1'b1;
              vec   <= (k + 1'b1) / VLD;
              state <= S_SUB;
            end else begin
              state <= S_IDLE;
            end
          end else begin
            vec <= vec + 1'b1;
          end
        end
        S_SUB: begin
          if (last_vec) begin
            vec <= (k + 1'b1) / VLD;
            row <= row + 1'b1;
            if (last_row) begin
              k <= k + 1'b1;
              if (k + 1'b1 < jb.t1) begin
                state <= S_SQRT;
              end else begin
                urow  <= '0;
                ucol  <= '0;
                uaddr <= '0;
                state <= S_USTORE;
              end
            end
          end else begin
            vec <= vec + 1'b1;
          end
        end
        S_USTORE: begin
          uaddr <= uaddr + 1'b1;
          if (ucol == jb.d - jb.t1 - 1'b1) begin
            ucol <= '0;
            urow <= urow + 1'b1;
            if (urow == jb.d - jb.t1 - 1'b1) state <= S_IDLE;
          end else begin
            ucol <= ucol + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a job must fit the buffers and name at least one supernode column
  property p_job_fits;
    @(posedge clk) disable iff (!rst_n)
      (job_valid && job_ready) |->
        (job.d <= DIM_W'(DMAX) && job.t1 != '0 && job.t1 <= job.d &&
         (job.d - job.t1) <= DIM_W'(UMAX));
  endproperty
  assert property (p_job_fits);
endmodule
