// tb_stc_au: self-checking testbench for the addition unit.
//
// Streams sorted lists with runs of equal indices (and some KEY_MAX padding)
// into the AU under random input gaps and output back-pressure. The
// reference adds equal-index values in arrival order with the simulator's
// double arithmetic, which is the order the AU uses, so results must match
// bit for bit. Also checks that each list ends with exactly one out_last and
// that with no gaps the unit takes one record per cycle.
module tb_stc_au;
  import stc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  rec_t in_rec, out_rec;

  stc_au dut (.clk, .rst_n, .in_valid, .in_ready, .in_rec, .in_last,
              .out_valid, .out_ready, .out_rec, .out_last);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_list(int n, bit stress);
    int unsigned ks[$];
    real vs[$];
    int unsigned rk[$];
    real rv[$];
    int unsigned k;
    int got, cyc_in;
    bit bad;
    k = $urandom_range(0, 3);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 2) == 0) k += $urandom_range(1, 5);
      ks.push_back(k);
      vs.push_back(real'($urandom_range(0, 1000000)) / 13.0 - 30000.0);
    end
    foreach (ks[i]) begin
      if (rk.size() > 0 && rk[rk.size()-1] == ks[i]) rv[rv.size()-1] = rv[rv.size()-1] + vs[i];
      else begin rk.push_back(ks[i]); rv.push_back(vs[i]); end
    end
    got = 0; bad = 0; cyc_in = 0;
    fork
      begin
        for (int i = 0; i < n + 1; i++) begin
          if (stress) while ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
          in_valid <= 1;
          in_last  <= (i == n);
          if (i < n) begin in_rec.idx <= ks[i]; in_rec.val <= $realtobits(vs[i]); end
          else begin in_rec.idx <= KEY_MAX; in_rec.val <= '0; end
          @(posedge clk); cyc_in++;
          while (!in_ready) begin @(posedge clk); cyc_in++; end
        end
        in_valid <= 0; in_last <= 0;
      end
      begin
        bit done = 0;
        while (!done) begin
          out_ready <= stress ? ($urandom_range(0, 2) != 0) : 1'b1;
          @(posedge clk);
          if (out_valid && out_ready) begin
            if (out_rec.idx != KEY_MAX) begin
              if (got >= rk.size() || out_rec.idx != rk[got] || out_rec.val != $realtobits(rv[got]))
                bad = 1;
              got++;
            end
            if (out_last) done = 1;
          end
        end
      end
    join
    checks++;
    if (bad || got != rk.size()) begin
      failures++; $display("au list of %0d: %0d outputs, expected %0d, mismatch=%0d", n, got, rk.size(), bad);
    end
    if (!stress) begin
      checks++;
      if (cyc_in != n + 1) begin failures++; $display("au: input took %0d cycles for %0d records", cyc_in, n+1); end
    end
  endtask

  initial begin
    in_valid = 0; in_last = 0; out_ready = 1; in_rec = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    one_list(0, 0);
    one_list(1, 0);
    one_list(30, 0);
    for (int t = 0; t < 40; t++) one_list($urandom_range(0, 50), t % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
