// fschol_extend: matrix extension for the extend-add of an update matrix.
//
// The update matrix U of the last factorized child sits in Mem_U, row after
// row. The pattern matrix P, which has the shape of the parent's frontal
// matrix, arrives from Q_P one VL-lane vector at a time; a true element
// marks where the next element of U belongs. The unit keeps an index
// counter into Mem_U and walks the lanes of each pattern vector one per
// cycle: a true lane takes Mem_U[counter] and advances the counter, a false
// lane stays zero. After VL lanes the extended vector is offered on Q_U.
// This per-lane loop follows the thesis's description; reading Mem_U
// combinationally (one word per cycle) is this design's choice.
//
// Interface: start clears the index counter (pulse once per job that adds
// an update matrix) and loads num, the number of pattern vectors of that
// job; the unit stops after num vectors, so it never runs ahead into the
// next job's pattern before Mem_U holds that job's update matrix. p_* is the pattern stream, u_rd_* the Mem_U read port,
// qu_* the extended vectors (valid/ready).
// Timing: VL cycles per pattern vector, plus one cycle to hand the vector on.
//
// Lint note: the handshake assertion below is disabled while the asynchronous
// reset rst_n is low (disable iff), so lint tools see rst_n used both
// asynchronously and in clocked logic and report SYNCASYNCNET; that is
// expected and does not change the circuit.
module fschol_extend #(
  parameter int unsigned VL     = 128,
  parameter int unsigned WL     = 32,
  parameter int unsigned UADDR_W = 18
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [31:0]                 num,
  input  logic                        p_valid,
  output logic                        p_ready,
  input  logic [VL-1:0]               p_data,
  output logic [UADDR_W-1:0]          u_rd_addr,
  input  logic [WL-1:0]               u_rd_data,
  output logic                        qu_valid,
  input  logic                        qu_ready,
  output logic [VL-1:0][WL-1:0]       qu_data
);
  localparam int unsigned LW = (VL > 1) ? $clog2(VL) : 1;

  logic [UADDR_W-1:0] cnt;
  logic [LW-1:0]      lane;
  logic               busy;
  logic [31:0]        left;

  assign u_rd_addr = cnt;
  assign p_ready   = busy && (lane == LW'(VL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      lane     <= '0;
      busy     <= 1'b0;
      left     <= '0;
      qu_valid <= 1'b0;
      qu_data  <= '0;
    end else begin
      if (qu_valid && qu_ready) qu_valid <= 1'b0;
      if (start) begin
        cnt  <= '0;
        lane <= '0;
        busy <= 1'b0;
        left <= num;
      end else if (!busy) begin
        // start a new vector once the previous one has been handed on
        if (left != '0 && p_valid && (!qu_valid || qu_ready)) begin
          busy    <= 1'b1;
          lane    <= '0;
          left    <= left - 1'b1;
        end
      end else begin
        if (p_data[lane]) begin
          qu_data[lane] <= u_rd_data;
          cnt           <= cnt + 1'b1;
        end else begin
          qu_data[lane] <= '0;
        end
        if (lane == LW'(VL - 1)) begin
          busy     <= 1'b0;
          qu_valid <= 1'b1;
        end else begin
          lane <= lane + 1'b1;
        end
      end
    end
  end

  // the pattern vector must stay put while its lanes are walked
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (busy && !p_ready) |-> p_valid;
  endproperty
  assert property (p_hold);
endmodule
