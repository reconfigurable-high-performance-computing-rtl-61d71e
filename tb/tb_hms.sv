// tb_hms: self-checking testbench for the E-record merge sorter.
//
// Test 1 replays the worked example of a 4-record merge: lists
// {0,2,...,14} and {1,3,5,7} must come out as 0..8,10,12,14 in order.
// Tests 2..N merge random sorted lists at E=8 with random gaps on the inputs
// and random back-pressure on the output, then compare the output with a
// reference made by sorting the two input lists together (key order must be
// ascending, and the multiset of (key, value) pairs must match). With no
// gaps and no back-pressure the output must arrive at full rate: nA+nB
// vectors on nA+nB consecutive cycles.
module tb_hms;
  import stc_pkg::*;

  localparam int unsigned EB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- DUT at E=4 (worked example) ----
  logic a4_valid, a4_ready, a4_last, b4_valid, b4_ready, b4_last;
  rec_t [3:0] a4_rec, b4_rec, o4_rec;
  logic o4_valid, o4_last; logic [3:0] o4_mask;
  hms #(.E(4)) dut4 (.clk, .rst_n,
    .a_valid(a4_valid), .a_ready(a4_ready), .a_rec(a4_rec), .a_last(a4_last),
    .b_valid(b4_valid), .b_ready(b4_ready), .b_rec(b4_rec), .b_last(b4_last),
    .out_valid(o4_valid), .out_ready(1'b1), .out_rec(o4_rec), .out_mask(o4_mask),
    .out_last(o4_last));

  // ---- DUT at E=8 ----
  logic a_valid, a_ready, a_last, b_valid, b_ready, b_last, o_valid, o_ready, o_last;
  rec_t [EB-1:0] a_rec, b_rec, o_rec;
  logic [EB-1:0] o_mask;
  hms dut (.clk, .rst_n,
    .a_valid, .a_ready, .a_rec, .a_last, .b_valid, .b_ready, .b_rec, .b_last,
    .out_valid(o_valid), .out_ready(o_ready), .out_rec(o_rec), .out_mask(o_mask),
    .out_last(o_last));

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rec_t mk(int unsigned k, longint unsigned v);
    rec_t r; r.idx = k; r.val = v; return r;
  endfunction

  // ---------------------------------------------------------------
  task automatic example4();
    int unsigned la[8] = '{0, 2, 4, 6, 8, 10, 12, 14};
    int unsigned lb[4] = '{1, 3, 5, 7};
    int unsigned expq[$];
    int unsigned got[$];
    int n;
    foreach (la[i]) expq.push_back(la[i]);
    foreach (lb[i]) expq.push_back(lb[i]);
    expq.sort();
    fork
      begin
        for (int v = 0; v < 2; v++) begin
          a4_valid <= 1; a4_last <= (v == 1);
          for (int i = 0; i < 4; i++) a4_rec[i] <= mk(la[4*v+i], 64'(la[4*v+i]));
          @(posedge clk); while (!a4_ready) @(posedge clk);
        end
        a4_valid <= 0;
      end
      begin
        b4_valid <= 1; b4_last <= 1;
        for (int i = 0; i < 4; i++) b4_rec[i] <= mk(lb[i], 64'(lb[i]));
        @(posedge clk); while (!b4_ready) @(posedge clk);
        b4_valid <= 0;
      end
      begin
        n = 0;
        do begin
          @(posedge clk);
          if (o4_valid) begin
            n++;
            for (int i = 0; i < 4; i++) if (o4_mask[i]) got.push_back(o4_rec[i].idx);
          end
        end while (!(o4_valid && o4_last));
      end
    join
    checks++;
    if (got.size() != expq.size()) begin
      failures++; $display("example: %0d records, expected %0d", got.size(), expq.size());
    end else foreach (got[i]) if (got[i] != expq[i]) begin
      failures++; $display("example: record %0d key %0d expected %0d", i, got[i], expq[i]); break;
    end
    checks++;
    if (n != 3) begin failures++; $display("example: %0d output vectors, expected 3", n); end
  endtask

  // ---------------------------------------------------------------
  task automatic random_merge(int na, int nb, bit stress);
    logic [95:0] ref_q[$], got_q[$];
    int unsigned ka[$], kb[$];
    int unsigned k;
    int nva, nvb, nout, first_cyc, last_cyc, cyc;
    int unsigned prev;
    bit order_ok;
    k = 0;
    for (int i = 0; i < na; i++) begin k += $urandom_range(0, 3); ka.push_back(k); end
    k = 0;
    for (int i = 0; i < nb; i++) begin k += $urandom_range(0, 3); kb.push_back(k); end
    foreach (ka[i]) ref_q.push_back({ka[i], 64'(i) | 64'h1000_0000_0000});
    foreach (kb[i]) ref_q.push_back({kb[i], 64'(i) | 64'h2000_0000_0000});
    ref_q.sort();
    nva = (na + EB - 1) / EB; if (nva == 0) nva = 1;
    nvb = (nb + EB - 1) / EB; if (nvb == 0) nvb = 1;
    nout = 0; cyc = 0; first_cyc = -1; last_cyc = -1; order_ok = 1; prev = 0;
    fork
      begin
        for (int v = 0; v < nva; v++) begin
          if (stress) while ($urandom_range(0, 2) == 0) begin a_valid <= 0; @(posedge clk); end
          a_valid <= 1; a_last <= (v == nva - 1);
          for (int i = 0; i < EB; i++)
            a_rec[i] <= (v*EB+i < na) ? mk(ka[v*EB+i], 64'(v*EB+i) | 64'h1000_0000_0000)
                                      : mk(KEY_MAX, 0);
          @(posedge clk); while (!a_ready) @(posedge clk);
        end
        a_valid <= 0;
      end
      begin
        for (int v = 0; v < nvb; v++) begin
          if (stress) while ($urandom_range(0, 2) == 0) begin b_valid <= 0; @(posedge clk); end
          b_valid <= 1; b_last <= (v == nvb - 1);
          for (int i = 0; i < EB; i++)
            b_rec[i] <= (v*EB+i < nb) ? mk(kb[v*EB+i], 64'(v*EB+i) | 64'h2000_0000_0000)
                                      : mk(KEY_MAX, 0);
          @(posedge clk); while (!b_ready) @(posedge clk);
        end
        b_valid <= 0;
      end
      begin
        bit done = 0;
        while (!done) begin
          o_ready <= stress ? ($urandom_range(0, 3) != 0) : 1'b1;
          @(posedge clk);
          cyc++;
          if (o_valid && o_ready) begin
            nout++;
            if (first_cyc < 0) first_cyc = cyc;
            last_cyc = cyc;
            for (int i = 0; i < EB; i++) if (o_mask[i]) begin
              if (o_rec[i].idx < prev) order_ok = 0;
              prev = o_rec[i].idx;
              got_q.push_back({o_rec[i].idx, o_rec[i].val});
            end
            if (o_last) done = 1;
          end
        end
      end
    join
    got_q.sort();
    checks++;
    if (!order_ok) begin failures++; $display("merge %0d+%0d: keys out of order", na, nb); end
    checks++;
    if (got_q != ref_q) begin
      failures++; $display("merge %0d+%0d: got %0d records, expected %0d", na, nb,
                           got_q.size(), ref_q.size());
    end
    checks++;
    if (nout != nva + nvb) begin
      failures++; $display("merge %0d+%0d: %0d output vectors, expected %0d", na, nb, nout, nva+nvb);
    end
    if (!stress) begin
      checks++;
      if (last_cyc - first_cyc != nva + nvb - 1) begin
        failures++; $display("merge %0d+%0d: output took %0d cycles, expected %0d", na, nb,
                             last_cyc - first_cyc + 1, nva + nvb);
      end
    end
  endtask

  initial begin
    a4_valid = 0; b4_valid = 0; a_valid = 0; b_valid = 0; o_ready = 1;
    a4_last = 0; b4_last = 0; a_last = 0; b_last = 0;
    a4_rec = '0; b4_rec = '0; a_rec = '0; b_rec = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    example4();
    random_merge(40, 24, 0);
    random_merge(8, 8, 0);
    random_merge(1, 0, 0);
    random_merge(0, 13, 0);
    for (int t = 0; t < 30; t++)
      random_merge($urandom_range(0, 70), $urandom_range(0, 70), t % 2 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
