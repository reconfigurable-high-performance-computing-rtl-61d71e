// fspgemm_store: FSpGEMM store module.
//
// Drains the QC channels of the N PEs of a core and writes every result
// element (value, row index, column index) to memory, one element per cycle,
// at consecutive addresses. The PEs finish rows at different times, so the
// channels are served round robin: the search for a ready channel starts just
// after the one served last.
//
// Follows the thesis's store module (reads results from the PEs' QC
// channels and writes them to memory). The round-robin arbitration, the
// coordinate (COO) output layout and the write port are this design's
// choices.
//
// Interface: valid/ready QC inputs; write port wr_en/wr_addr/wr_data;
// `clear` restarts the address and count at zero; `count` is the number of
// elements written. Timing: one element per cycle.
module fspgemm_store
  import fspgemm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [N-1:0]      qc_valid,
  output logic [N-1:0]      qc_ready,
  input  c_t   [N-1:0]      qc_data,
  output logic              wr_en,
  output logic [IDX_W-1:0]  wr_addr,
  output c_t                wr_data,
  output logic [IDX_W-1:0]  count
);
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1;

  logic [NW-1:0] rr, pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = rr;
    for (int k = 0; k < N; k++) begin
      logic [NW-1:0] n;
      n = NW'((int'(rr) + k) % N);
      if (!any && qc_valid[n]) begin
        any  = 1'b1;
        pick = n;
      end
    end
    qc_ready = '0;
    if (any) qc_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr      <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      count   <= '0;
    end else begin
      wr_en <= any;
      if (any) begin
        wr_data <= qc_data[pick];
        wr_addr <= count;
        count   <= count + 1'b1;
        rr      <= (pick == NW'(N - 1)) ? '0 : pick + 1'b1;
      end
      if (clear) count <= '0;
    end
  end
endmodule
