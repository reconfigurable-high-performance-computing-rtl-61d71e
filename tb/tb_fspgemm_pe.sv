// tb_fspgemm_pe: self-checking testbench for the FSpGEMM processing element.
//
// Builds random rows of A (random column set and values) and a random sparse
// B (some rows empty), then feeds the PE exactly as the load module does: for
// each nonzero a = A(i,k), one QA word and the beats of row B(k,:). The
// reference is a software Gustavson merge in the same order, with every
// product and sum rounded to single precision, so the values must match bit
// for bit. Checks each output row's column order, values, row index and
// length, and that the PE keeps pace: each job takes at most its merged
// length plus 3 cycles when the channels never starve.
module tb_fspgemm_pe;
  import fspgemm_pkg::*;
  import tb_fp_util::*;

  localparam int NB = 40;     // rows of B
  localparam int NCOL = 64;   // columns of B

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic qa_valid, qa_ready, qb_valid, qb_ready, qc_valid, qc_ready, idle;
  a_t qa_data; b_t qb_data; c_t qc_data;

  fspgemm_pe #(.BUF_DEPTH(64)) dut (.clk, .rst_n, .qa_valid, .qa_ready, .qa_data,
    .qb_valid, .qb_ready, .qb_data, .qc_valid, .qc_ready, .qc_data, .idle);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sparse B: per row, sorted column list and values
  int          bcol [NB][$];
  logic [31:0] bval [NB][$];

  task automatic make_b();
    for (int r = 0; r < NB; r++) begin
      bcol[r].delete(); bval[r].delete();
      if (r % 7 == 3) continue;              // empty rows
      for (int c = 0; c < NCOL; c++)
        if ($urandom_range(0, 9) == 0) begin bcol[r].push_back(c); bval[r].push_back(rnd_f32()); end
    end
  endtask

  task automatic one_row(int row, int nnz, bit stress);
    int ks[$];
    logic [31:0] as[$];
    int pc[$]; logic [31:0] pv[$];       // reference partial row
    int gc[$]; logic [31:0] gv[$];
    bit bad;
    int worst;
    // choose distinct k, in increasing order (CSV order)
    for (int k = 0; k < NB; k++) if ($urandom_range(0, NB - 1) < nnz) ks.push_back(k);
    if (ks.size() == 0) ks.push_back($urandom_range(0, NB - 1));
    foreach (ks[i]) as.push_back(rnd_f32());
    // reference: sequential merges
    foreach (ks[j]) begin
      int nc[$]; logic [31:0] nv[$];
      int p = 0, q = 0;
      int k = ks[j];
      while (p < pc.size() || q < bcol[k].size()) begin
        if (q >= bcol[k].size() || (p < pc.size() && pc[p] < bcol[k][q])) begin
          nc.push_back(pc[p]); nv.push_back(pv[p]); p++;
        end else if (p >= pc.size() || pc[p] > bcol[k][q]) begin
          nc.push_back(bcol[k][q]); nv.push_back(mul_f32(as[j], bval[k][q])); q++;
        end else begin
          nc.push_back(pc[p]); nv.push_back(add_f32(pv[p], mul_f32(as[j], bval[k][q]))); p++; q++;
        end
      end
      pc = nc; pv = nv;
    end
    worst = 0;
    fork
      begin
        foreach (ks[j]) begin
          int k = ks[j];
          int sz = bcol[k].size();
          @(negedge clk);
          qa_valid = 1;
          qa_data  = '{val: as[j], rowIdx: row, eor: (j == ks.size() - 1)};
          for (int e = 0; e < (sz == 0 ? 1 : sz); e++) begin
            if (stress) while ($urandom_range(0, 3) == 0) begin
              qb_valid = 0; qb_data = '{size: $urandom, val: rnd_f32(), colIdx: $urandom_range(0, NCOL)};
              @(negedge clk);
            end
            qb_valid = 1;
            qb_data  = '{size: sz, val: (sz == 0 ? 32'd0 : bval[k][e]), colIdx: (sz == 0 ? 0 : bcol[k][e])};
            #1;
            while (!qb_ready) begin
              @(negedge clk); #1;
            end
            @(posedge clk);
                        @(negedge clk);
            qa_valid = 0;
          end
          qb_valid = 0;
        end
      end
      begin
        bit done = 0;
        int cyc = 0;
        while (!done) begin
          qc_ready <= stress ? ($urandom_range(0, 3) != 0) : 1'b1;
          @(posedge clk);
          cyc++;
          if (qc_valid && qc_ready) begin
            gc.push_back(qc_data.colIdx); gv.push_back(qc_data.val);
            if (qc_data.rowIdx != row) bad = 1;
          end
          if (cyc > 20 && idle && !qa_valid && !qb_valid) done = 1;
        end
      end
    join
    checks++;
    if (bad || gc != pc || gv != pv) begin
      failures++;
      $display("row %0d (%0d nnz): got %0d elements, expected %0d", row, ks.size(), gc.size(), pc.size());
      foreach (gc[i]) if (i < pc.size() && (gc[i] != pc[i] || gv[i] != pv[i])) begin
        $display("  first difference at %0d: (%0d,%h) vs (%0d,%h)", i, gc[i], gv[i], pc[i], pv[i]); break;
      end
    end
  endtask

  // rate check: one job whose buffer and B row are ready, count cycles
  task automatic rate_check();
    int cyc;
    int sz;
    sz = 20;
    @(negedge clk);
    qc_ready = 1;
    qa_valid = 1; qa_data = '{val: 32'h3f800000, rowIdx: 5, eor: 1'b1};
    qb_valid = 1;
    cyc = 0;
    for (int e = 0; e < sz; e++) begin
      qb_data = '{size: sz, val: 32'h40000000, colIdx: e};
      #1;
      while (!qb_ready) begin @(negedge clk); cyc++; #1; end
      @(negedge clk); cyc++;
      qa_valid = 0;
    end
    qb_valid = 0;
    while (!idle) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > sz + 3) begin failures++; $display("rate: %0d-element job took %0d cycles", sz, cyc); end
  endtask

  initial begin
    qa_valid = 0; qb_valid = 0; qc_ready = 1; qa_data = '0; qb_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    make_b();
    for (int t = 0; t < 40; t++) one_row(t, $urandom_range(1, 8), t % 2);
    rate_check();
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
