// fschol_load: load module of one Cholesky processing element.
//
// Walks the job list the host scheduled for its PE. For each job it reads
// the job descriptor from memory and sends it on Q_job; then, if the
// frontal matrix is not yet initialised (up = 0), it streams the d x d
// matrix A part (d rows of ceil(d/VL) vectors) from memory onto Q_A, and if
// the job adds an update matrix (u_rd = 1) it streams the pattern matrix P
// (same shape, one bit per element) onto Q_P. The two streams run in
// parallel, each through a small read-ahead buffer, and the next job starts
// when both have been consumed. The job list, the A vectors and the pattern
// vectors each sit in their own contiguous region, consumed in order: this
// memory layout is this design's choice; the thesis says what the load
// module sends, not how memory is organised.
//
// Interface: start (with num_jobs and the three base addresses) runs the
// list; busy is high until the last stream is consumed. Three read ports
// (job, A, P), each returning data one cycle after rd_en. qjob_*, qa_*, qp_*
// are valid/ready streams to the PE.
// Timing: two cycles per job descriptor, then one vector per cycle on each
// stream when the PE keeps up.
module fschol_load
  import fschol_pkg::job_t, fschol_pkg::DIM_W;
#(
  parameter int unsigned VL = 128,
  localparam int unsigned WL = fschol_pkg::WL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [31:0]             num_jobs,
  input  logic [31:0]             job_base,
  input  logic [31:0]             a_base,
  input  logic [31:0]             p_base,
  output logic                    busy,
  output logic                    job_rd_en,
  output logic [31:0]             job_rd_addr,
  input  job_t                    job_rd_data,
  output logic                    a_rd_en,
  output logic [31:0]             a_rd_addr,
  input  logic [VL-1:0][WL-1:0]   a_rd_data,
  output logic                    p_rd_en,
  output logic [31:0]             p_rd_addr,
  input  logic [VL-1:0]           p_rd_data,
  output logic                    qjob_valid,
  input  logic                    qjob_ready,
  output job_t                    qjob_data,
  output logic                    qa_valid,
  input  logic                    qa_ready,
  output logic [VL-1:0][WL-1:0]   qa_data,
  output logic                    qp_valid,
  input  logic                    qp_ready,
  output logic [VL-1:0]           qp_data
);
  localparam logic [DIM_W-1:0] VLD = DIM_W'(VL);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_CAPTURE, S_SEND, S_STREAM} state_t;
  state_t state;

  logic [31:0] jidx, njobs, a_ptr, p_ptr, nvecs;
  logic        a_start, p_start, a_done, p_done;
  logic [DIM_W-1:0] jnvec;

  assign jnvec       = (qjob_data.d + VLD - 1'b1) / VLD;
  assign nvecs       = 32'(qjob_data.d) * 32'(jnvec);
  assign job_rd_en   = (state == S_READ);
  assign job_rd_addr = job_base + jidx;
  assign qjob_valid  = (state == S_SEND);
  assign busy        = (state != S_IDLE);
  assign a_start     = (state == S_SEND) && qjob_ready && !qjob_data.up;
  assign p_start     = (state == S_SEND) && qjob_ready && qjob_data.u_rd;

  mem_reader #(.T(logic [VL-1:0][WL-1:0]), .AW(32), .DEPTH(4)) u_a (
    .clk, .rst_n, .start(a_start), .base(a_ptr), .count(nvecs),
    .rd_en(a_rd_en), .rd_addr(a_rd_addr), .rd_data(a_rd_data),
    .out_valid(qa_valid), .out_ready(qa_ready), .out_data(qa_data), .done(a_done)
  );

  mem_reader #(.T(logic [VL-1:0]), .AW(32), .DEPTH(4)) u_p (
    .clk, .rst_n, .start(p_start), .base(p_ptr), .count(nvecs),
    .rd_en(p_rd_en), .rd_addr(p_rd_addr), .rd_data(p_rd_data),
    .out_valid(qp_valid), .out_ready(qp_ready), .out_data(qp_data), .done(p_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      jidx      <= '0;
      njobs     <= '0;
      a_ptr     <= '0;
      p_ptr     <= '0;
      qjob_data <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          jidx  <= '0;
          njobs <= num_jobs;
          a_ptr <= a_base;
          p_ptr <= p_base;
          state <= (num_jobs == '0) ? S_IDLE : S_READ;
        end
        S_READ:    state <= S_CAPTURE;
        S_CAPTURE: begin
          qjob_data <= job_rd_data;
          state     <= S_SEND;
        end
        S_SEND: if (qjob_ready) begin
          if (!qjob_data.up)  a_ptr <= a_ptr + nvecs;
          if (qjob_data.u_rd) p_ptr <= p_ptr + nvecs;
          state <= S_STREAM;
        end
        S_STREAM: if (a_done && p_done) begin
          jidx  <= jidx + 1'b1;
          state <= (jidx + 1'b1 == njobs) ? S_IDLE : S_READ;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
