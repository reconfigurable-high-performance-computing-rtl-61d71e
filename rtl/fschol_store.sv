// fschol_store: store module of one Cholesky processing element.
//
// Takes the columns of the factor L from Q_L as soon as each vector is ready
// and writes them to memory one after the other from a base address, so a
// job's t+1 columns land in order (column k as the vectors that cover rows
// k and below). It counts the vectors written and the jobs completed (the
// vector flagged last closes a job). The contiguous output layout and the
// counters are this design's choice.
//
// Interface: start (with l_base) restarts the address and the counters;
// ql_* is the valid/ready stream from the PE; wr_en/wr_addr/wr_data is the
// memory write port, stalled by wr_ready.
// Timing: one vector per cycle while wr_ready is high.
module fschol_store #(
  parameter int unsigned VL = 128,
  localparam int unsigned WL = fschol_pkg::WL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [31:0]             l_base,
  input  logic                    ql_valid,
  output logic                    ql_ready,
  input  logic [VL-1:0][WL-1:0]   ql_data,
  input  logic                    ql_last,
  output logic                    wr_en,
  input  logic                    wr_ready,
  output logic [31:0]             wr_addr,
  output logic [VL-1:0][WL-1:0]   wr_data,
  output logic [31:0]             vectors,
  output logic [31:0]             jobs_done
);
  logic [31:0] base;

  assign ql_ready = wr_ready && !start;
  assign wr_en    = ql_valid && ql_ready;
  assign wr_addr  = base + vectors;
  assign wr_data  = ql_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base      <= '0;
      vectors   <= '0;
      jobs_done <= '0;
    end else if (start) begin
      base      <= l_base;
      vectors   <= '0;
      jobs_done <= '0;
    end else if (wr_en) begin
      vectors <= vectors + 1'b1;
      if (ql_last) jobs_done <= jobs_done + 1'b1;
    end
  end
endmodule
