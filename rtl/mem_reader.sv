// mem_reader: sequential burst reader with a small prefetch FIFO.
//
// Reads `count` consecutive words starting at `base` through a simple
// synchronous memory port (read data valid one cycle after rd_en) and
// presents them as a valid/ready stream. A read is issued only when the
// FIFO has room for it and for the read already in flight, so the stream
// runs at one word per cycle when the consumer keeps up. Used by the FSpGEMM
// load module for the CSV stream of A and for the rows of B.
//
// Interface: `start` (accepted when `done` is high) loads base and count;
// `done` is high when every word has been read and consumed.
module mem_reader #(
  parameter type         T     = logic [31:0],
  parameter int unsigned AW    = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] count,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  T              rd_data,
  output logic          out_valid,
  input  logic          out_ready,
  output T              out_data,
  output logic          done
);
  localparam int unsigned PW = $clog2(DEPTH);

  T                fifo [DEPTH];
  logic [PW-1:0]   wp, rp;
  logic [PW:0]     cnt;
  logic [AW-1:0]   addr, remain;
  logic            inflight, pop;

  assign rd_en     = (remain != '0) && ((PW+1)'(inflight) + cnt < (PW+1)'(DEPTH));
  assign rd_addr   = addr;
  assign out_valid = (cnt != '0);
  assign out_data  = fifo[rp];
  assign pop       = out_valid && out_ready;
  assign done      = (remain == '0) && !inflight && (cnt == '0);

  always_ff @(posedge clk) begin
    if (inflight) fifo[wp] <= rd_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
      addr <= '0; remain <= '0; inflight <= 1'b0;
    end else begin
      inflight <= rd_en;
      if (start && done) begin
        addr   <= base;
        remain <= count;
      end else if (rd_en) begin
        addr   <= addr + 1'b1;
        remain <= remain - 1'b1;
      end
      if (inflight) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)      rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(inflight) - (PW+1)'(pop);
    end
  end
endmodule
