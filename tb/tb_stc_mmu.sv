// tb_stc_mmu: self-checking testbench for the multiply-and-merge unit.
//
// Each test draws a scalar x, a sorted row y and a sorted partial list z of
// random length, streams them in as 8-record vectors padded with KEY_MAX,
// and compares the merged output with a reference: the union of
// {(y.idx, x*y.val)} and z sorted by index, products computed with the
// simulator's double arithmetic. Key order and the exact multiset of
// (index, value) pairs are checked, and the output vector count must be the
// sum of the input vector counts.
module tb_stc_mmu;
  import stc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] x_val;
  logic y_valid, y_ready, y_last, z_valid, z_ready, z_last, w_valid, w_ready, w_last;
  rec_t [E-1:0] y_rec, z_rec, w_rec;
  logic [E-1:0] w_mask;

  stc_mmu dut (.clk, .rst_n, .x_val, .y_valid, .y_ready, .y_rec, .y_last,
               .z_valid, .z_ready, .z_rec, .z_last, .w_valid, .w_ready, .w_rec,
               .w_mask, .w_last);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rec_t mk(int unsigned k, logic [63:0] v);
    rec_t r; r.idx = k; r.val = v; return r;
  endfunction

  task automatic one_test(int ny, int nz);
    real xr;
    int unsigned ky[$], kz[$];
    real vy[$], vz[$];
    logic [127:0] ref_q[$], got_q[$];
    int unsigned k, prev;
    int nvy, nvz, nout;
    bit order_ok;
    xr = real'($urandom_range(1, 2000)) / 64.0 - 15.0;
    k = 0;
    for (int i = 0; i < ny; i++) begin
      k += $urandom_range(1, 4); ky.push_back(k);
      vy.push_back(real'($urandom_range(0, 100000)) / 7.0 - 5000.0);
    end
    k = 0;
    for (int i = 0; i < nz; i++) begin
      k += $urandom_range(0, 4); kz.push_back(k);
      vz.push_back(real'($urandom_range(0, 100000)) / 3.0);
    end
    foreach (ky[i]) ref_q.push_back({32'd0, ky[i], $realtobits(xr * vy[i])});
    foreach (kz[i]) ref_q.push_back({32'd0, kz[i], $realtobits(vz[i])});
    ref_q.sort();
    nvy = (ny + E - 1) / E; if (nvy == 0) nvy = 1;
    nvz = (nz + E - 1) / E; if (nvz == 0) nvz = 1;
    nout = 0; order_ok = 1; prev = 0;
    x_val = $realtobits(xr);
    fork
      begin
      for (int v = 0; v < nvy; v++) begin
        y_valid <= 1; y_last <= (v == nvy - 1);
        for (int i = 0; i < E; i++)
          y_rec[i] <= (v*E+i < ny) ? mk(ky[v*E+i], $realtobits(vy[v*E+i])) : mk(KEY_MAX, 0);
        @(posedge clk); while (!y_ready) @(posedge clk);
      end
      y_valid <= 0;
      end
      begin
      for (int v = 0; v < nvz; v++) begin
        z_valid <= 1; z_last <= (v == nvz - 1);
        for (int i = 0; i < E; i++)
          z_rec[i] <= (v*E+i < nz) ? mk(kz[v*E+i], $realtobits(vz[v*E+i])) : mk(KEY_MAX, 0);
        @(posedge clk); while (!z_ready) @(posedge clk);
      end
      z_valid <= 0;
      end
      begin
        bit done = 0;
        while (!done) begin
          w_ready <= ($urandom_range(0, 4) != 0);
          @(posedge clk);
          if (w_valid && w_ready) begin
            nout++;
            for (int i = 0; i < E; i++) if (w_mask[i]) begin
              if (w_rec[i].idx < prev) order_ok = 0;
              prev = w_rec[i].idx;
              got_q.push_back({32'd0, w_rec[i].idx, w_rec[i].val});
            end
            if (w_last) done = 1;
          end
        end
      end
    join
    got_q.sort();
    checks++;
    if (!order_ok) begin failures++; $display("mmu %0d/%0d: out of order", ny, nz); end
    checks++;
    if (got_q != ref_q) begin
      failures++;
      $display("mmu %0d/%0d: output differs (%0d vs %0d records)", ny, nz, got_q.size(), ref_q.size());
      foreach (got_q[i]) if (i < ref_q.size() && got_q[i] != ref_q[i]) begin
        $display("  first difference at %0d: got %h expected %h", i, got_q[i], ref_q[i]); break;
      end
    end
    checks++;
    if (nout != nvy + nvz) begin failures++; $display("mmu: %0d vectors, expected %0d", nout, nvy+nvz); end
  endtask

  initial begin
    y_valid = 0; z_valid = 0; w_ready = 1; y_last = 0; z_last = 0;
    y_rec = '0; z_rec = '0; x_val = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    one_test(8, 0);
    one_test(5, 17);
    for (int t = 0; t < 40; t++) one_test($urandom_range(0, 60), $urandom_range(0, 60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
