// hms: E-record Hardware Merge Sorter (selector + merge logic with feedback).
//
// Merges two ascending lists of records, A and B, into one ascending list at
// E records per clock. Each list arrives as E-record vectors (each vector
// sorted, the list sorted across vectors) into its own input FIFO. Every
// step the selector compares the first key of the two FIFO heads and takes
// the whole E-record vector from the side with the smaller key. The merge
// logic is a bitonic merger over 2E records, log2(2E) = 1 + log2(E) stages of
// compare-exchange: the E feedback registers (sorted) and the selected vector
// (reversed) are merged; the E smallest records leave as the output vector,
// the E largest are stored back in the feedback registers.
//
// List ends: a list is padded to whole vectors with the sentinel key
// KEY_MAX, and its final vector carries `last`. Once a side has delivered its
// final vector it reads as an endless run of KEY_MAX. When both sides are
// done, one extra flush step pushes out the feedback registers, with
// out_last set. The feedback registers start at the lowest key, so the first
// step's output holds no list records and is not emitted. Output records
// carrying KEY_MAX are padding: out_mask marks the real ones.
//
// Following the merge-sorter model with two FIFOs, a selector and a merge
// logic; the thesis's worked example feeds back E-1 records per step but
// also sorts 2E records, and this design keeps E feedback records, which is
// what keeps every output vector correct. The FIFO depth is this design's
// choice.
//
// Interface: valid/ready on a, b and out. Timing: one merge step per cycle
// when both sides have data and the output is free; a merge of nA and nB
// vectors produces nA+nB output vectors, the last one nA+nB+1 steps after the
// first step, so the sustained rate is E records per cycle. Output is
// registered.
//
// Lint note: the handshake assertion below is disabled while the asynchronous
// reset rst_n is low (disable iff), so lint tools see rst_n used both
// asynchronously and in clocked logic and report SYNCASYNCNET; that is
// expected and does not change the circuit.
module hms
  import stc_pkg::rec_t, stc_pkg::IDX_W, stc_pkg::KEY_MAX;
#(
  parameter int unsigned E          = stc_pkg::E,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              a_valid,
  output logic              a_ready,
  input  rec_t [E-1:0]      a_rec,
  input  logic              a_last,
  input  logic              b_valid,
  output logic              b_ready,
  input  rec_t [E-1:0]      b_rec,
  input  logic              b_last,
  output logic              out_valid,
  input  logic              out_ready,
  output rec_t [E-1:0]      out_rec,
  output logic [E-1:0]      out_mask,
  output logic              out_last
);
  typedef struct packed {
    rec_t [E-1:0] r;
    logic         last;
  } hv_t;

  hv_t  fa_in, fb_in, fa_out, fb_out;
  logic fa_valid, fb_valid, fa_pop, fb_pop;

  assign fa_in = '{r: a_rec, last: a_last};
  assign fb_in = '{r: b_rec, last: b_last};

  sync_fifo #(.T(hv_t), .DEPTH(FIFO_DEPTH)) u_fifo_a (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(fa_in),
    .out_valid(fa_valid), .out_ready(fa_pop), .out_data(fa_out));
  sync_fifo #(.T(hv_t), .DEPTH(FIFO_DEPTH)) u_fifo_b (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(fb_in),
    .out_valid(fb_valid), .out_ready(fb_pop), .out_data(fb_out));

  rec_t [E-1:0] fb_reg;          // feedback registers, ascending
  logic         ex_a, ex_b;      // side has delivered its final vector
  logic         primed;          // a first step has been taken

  logic [IDX_W-1:0] head_a, head_b;
  logic             avail_a, avail_b, flush, sel_a, can_step, fire;
  rec_t [E-1:0]     sel_vec;
  rec_t [2*E-1:0]   net;

  assign head_a  = ex_a ? KEY_MAX : fa_out.r[0].idx;
  assign head_b  = ex_b ? KEY_MAX : fb_out.r[0].idx;
  assign avail_a = ex_a || fa_valid;
  assign avail_b = ex_b || fb_valid;
  assign flush   = ex_a && ex_b;
  assign sel_a   = !ex_a && (ex_b || head_a <= head_b);
  assign can_step = avail_a && avail_b && (!flush || primed);
  assign fire    = can_step && (!out_valid || out_ready);
  assign fa_pop  = fire && !flush && sel_a;
  assign fb_pop  = fire && !flush && !sel_a;

  // selector and bitonic merge network
  always_comb begin
    for (int i = 0; i < E; i++) begin
      sel_vec[i].idx = KEY_MAX;
      sel_vec[i].val = '0;
    end
    if (!flush) sel_vec = sel_a ? fa_out.r : fb_out.r;
    for (int i = 0; i < E; i++) begin
      net[i]         = fb_reg[i];
      net[2*E-1-i]   = sel_vec[i];
    end
    for (int j = E; j > 0; j = j / 2) begin
      for (int i = 0; i < 2 * E; i++) begin
        if ((i ^ j) > i && net[i].idx > net[i ^ j].idx)
          {net[i], net[i ^ j]} = {net[i ^ j], net[i]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_reg    <= '0;
      ex_a      <= 1'b0;
      ex_b      <= 1'b0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_rec   <= '0;
      out_mask  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= primed;
        out_last  <= flush;
        for (int i = 0; i < E; i++) begin
          out_rec[i]  <= net[i];
          out_mask[i] <= (net[i].idx != KEY_MAX);
        end
        if (flush) begin
          fb_reg <= '0;
          ex_a   <= 1'b0;
          ex_b   <= 1'b0;
          primed <= 1'b0;
        end else begin
          for (int i = 0; i < E; i++) fb_reg[i] <= net[E + i];
          primed <= 1'b1;
          if (fa_pop && fa_out.last) ex_a <= 1'b1;
          if (fb_pop && fb_out.last) ex_b <= 1'b1;
        end
      end
    end
  end

  // the merge must never drop records: output keys leave in ascending order
  logic [IDX_W-1:0] last_key;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_key <= '0;
    else if (out_valid && out_ready) last_key <= out_last ? '0 : out_rec[E-1].idx;
  end
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid |-> out_rec[0].idx >= last_key)
    else $error("hms: output not in ascending order");
endmodule
