// stc_au: Addition Unit of the Sparse Tensor Core.
//
// Reduces a sorted stream of records to one record per distinct index: a
// comparator checks each incoming index against the index held in the
// accumulator register and a double-precision adder adds the value when
// they match. Because the stream is already sorted, comparing neighbours is
// enough to combine every group of equal indices. When the index changes
// the accumulated record is emitted.
//
// Follows the thesis's AU (one comparator, one adder). The record-serial
// input (one record per cycle), the handling of the end of a list and the
// sentinel records are this design's choices: records with index KEY_MAX
// are padding and are dropped; after the record marked `in_last` one flush
// cycle emits the held record with out_last. A list with no real record
// ends with a single KEY_MAX record carrying out_last.
//
// Interface: valid/ready input and output streams of stc_pkg::rec_t.
// Timing: one input record per cycle, plus one cycle per list for the flush;
// the output is registered.
module stc_au
  import stc_pkg::rec_t, stc_pkg::KEY_MAX;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  rec_t  in_rec,
  input  logic  in_last,
  output logic  out_valid,
  input  logic  out_ready,
  output rec_t  out_rec,
  output logic  out_last
);
  rec_t acc;
  logic acc_valid, flush_pend, out_free, same;
  logic [63:0] sum;

  fp_add #(.EW(11), .MW(52)) u_add (.a(acc.val), .b(in_rec.val), .y(sum));

  assign out_free = !out_valid || out_ready;
  assign in_ready = !flush_pend && out_free;
  assign same     = acc_valid && (in_rec.idx == acc.idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      acc_valid  <= 1'b0;
      flush_pend <= 1'b0;
      out_valid  <= 1'b0;
      out_rec    <= '0;
      out_last   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (in_rec.idx != KEY_MAX) begin
          if (same) begin
            acc.val <= sum;
          end else begin
            if (acc_valid) begin
              out_valid <= 1'b1;
              out_rec   <= acc;
              out_last  <= 1'b0;
            end
            acc       <= in_rec;
            acc_valid <= 1'b1;
          end
        end
        if (in_last) flush_pend <= 1'b1;
      end else if (flush_pend && out_free) begin
        out_valid  <= 1'b1;
        out_last   <= 1'b1;
        out_rec    <= acc_valid ? acc : '{idx: KEY_MAX, val: '0};
        acc_valid  <= 1'b0;
        flush_pend <= 1'b0;
      end
    end
  end
endmodule
