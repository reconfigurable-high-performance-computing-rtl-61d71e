// tb_stc_top: two-phase SpGEMM on the lanes of the Sparse Tensor Core.
//
// Builds the core with N = 2 lanes and small cache banks (8 sets x 2 ways)
// and runs both lanes at the same time. Each lane first multiplies a row y
// by a scalar x and merges it with a partial-result list z in its MMU
// (phase one); the unreduced, sorted records it emits are then fed to the
// same lane's AU, which adds records with equal index (phase two). The
// records of both phases are compared bit for bit with values worked out
// here in double precision. Each lane also reads through its cache bank
// against a modelled HBM channel (fixed latency, eight-beat line refill):
// three lines of one set force an LRU eviction, a re-read hits, and the
// evicted line misses again; returned words and hit/miss counters are
// checked per lane.
module tb_stc_top;
  import stc_pkg::rec_t, stc_pkg::VAL_W, stc_pkg::E, stc_pkg::KEY_MAX;

  localparam int unsigned N = 2, SETS = 8, WAYS = 2, AW = 31;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0][VAL_W-1:0] x_val;
  logic [N-1:0] y_valid, y_ready, y_last, z_valid, z_ready, z_last, w_valid, w_ready, w_last;
  rec_t [N-1:0][E-1:0] y_rec, z_rec, w_rec;
  logic [N-1:0][E-1:0] w_mask;
  logic [N-1:0] a_in_valid, a_in_ready, a_in_last, a_out_valid, a_out_ready, a_out_last;
  rec_t [N-1:0] a_in_rec, a_out_rec;
  logic [N-1:0] c_req_valid, c_req_ready, c_resp_valid;
  logic [N-1:0][AW-1:0] c_req_addr;
  logic [N-1:0][63:0] c_resp_data, hbm_resp_data;
  logic [N-1:0][31:0] c_hits, c_misses;
  logic [N-1:0] hbm_req_valid, hbm_req_ready, hbm_resp_valid;
  logic [N-1:0][AW-4:0] hbm_req_addr;

  stc_top #(.N(N), .SETS(SETS), .WAYS(WAYS), .ADDR_W(AW)) dut (.clk, .rst_n,
    .mmu_x_val(x_val), .mmu_y_valid(y_valid), .mmu_y_ready(y_ready), .mmu_y_rec(y_rec), .mmu_y_last(y_last),
    .mmu_z_valid(z_valid), .mmu_z_ready(z_ready), .mmu_z_rec(z_rec), .mmu_z_last(z_last),
    .mmu_w_valid(w_valid), .mmu_w_ready(w_ready), .mmu_w_rec(w_rec), .mmu_w_mask(w_mask), .mmu_w_last(w_last),
    .au_in_valid(a_in_valid), .au_in_ready(a_in_ready), .au_in_rec(a_in_rec), .au_in_last(a_in_last),
    .au_out_valid(a_out_valid), .au_out_ready(a_out_ready), .au_out_rec(a_out_rec), .au_out_last(a_out_last),
    .c_req_valid, .c_req_ready, .c_req_addr, .c_resp_valid, .c_resp_data, .c_hits, .c_misses,
    .hbm_req_valid, .hbm_req_ready, .hbm_req_addr, .hbm_resp_valid, .hbm_resp_data);

  // memory contents differ per lane, so a crossed wire shows
  function automatic logic [63:0] word_of(int lane, logic [AW-1:0] a);
    return 64'({a, 1'b0, a}) ^ 64'h5a5a_0000_1234_0000 ^ (64'(lane + 1) << 40);
  endfunction

  for (genvar d = 0; d < N; d++) begin : g_hbm
    initial begin
      hbm_req_ready[d] = 0; hbm_resp_valid[d] = 0; hbm_resp_data[d] = '0;
      forever begin
        @(negedge clk);
        if (hbm_req_valid[d]) begin
          logic [AW-4:0] line;
          hbm_req_ready[d] = 1;
          line = hbm_req_addr[d];
          @(negedge clk);
          hbm_req_ready[d] = 0;
          repeat (3 + d) @(negedge clk);
          for (int b = 0; b < 8; b++) begin
            hbm_resp_valid[d] = 1;
            hbm_resp_data[d]  = word_of(d, {line, 3'(b)});
            @(negedge clk);
          end
          hbm_resp_valid[d] = 0;
        end
      end
    end
  end

  // lane L: y has 12 records at indices 3i, z has 10 at indices 2i+L
  // (some equal to a y index, at most one from each side)
  function automatic real yv(int i); return real'(i + 1); endfunction
  function automatic real zv(int i); return 100.0 + real'(i); endfunction

  task automatic feed_y(int L);
    for (int v = 0; v < 2; v++) begin
      @(negedge clk);
      y_valid[L] = 1; y_last[L] = (v == 1);
      for (int i = 0; i < E; i++) begin
        int k;
        k = v*E + i;
        y_rec[L][i] = (k < 12) ? '{idx: 32'(3*k), val: $realtobits(yv(k))} : '{idx: KEY_MAX, val: '0};
      end
      #1; while (!y_ready[L]) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk); y_valid[L] = 0; y_last[L] = 0;
  endtask

  task automatic feed_z(int L);
    for (int v = 0; v < 2; v++) begin
      @(negedge clk);
      z_valid[L] = 1; z_last[L] = (v == 1);
      for (int i = 0; i < E; i++) begin
        int k;
        k = v*E + i;
        z_rec[L][i] = (k < 10) ? '{idx: 32'(2*k + L), val: $realtobits(zv(k))} : '{idx: KEY_MAX, val: '0};
      end
      #1; while (!z_ready[L]) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk); z_valid[L] = 0; z_last[L] = 0;
  endtask

  rec_t wq0 [$], wq1 [$];

  task automatic drain_w(int L);
    bit done;
    done = 0;
    while (!done) begin
      @(negedge clk);
      w_ready[L] = ($urandom_range(0, 3) != 0);
      #1;
      if (w_valid[L] && w_ready[L]) begin
        for (int i = 0; i < E; i++) if (w_mask[L][i]) begin
          if (L == 0) wq0.push_back(w_rec[L][i]); else wq1.push_back(w_rec[L][i]);
        end
        if (w_last[L]) done = 1;
      end
      @(posedge clk);
    end
    @(negedge clk); w_ready[L] = 0;
  endtask

  task automatic lane_mmu(int L);
    fork
      feed_y(L);
      feed_z(L);
      drain_w(L);
    join
  endtask

  // expected MMU output (sorted by index) and AU output (summed)
  task automatic check_lane(int L);
    logic [31:0] ek [$];
    real ev [$];
    logic [31:0] sk [$];
    real sv [$];
    rec_t wq [$];
    int yi, zi;
    bit bad;
    if (L == 0) wq = wq0; else wq = wq1;
    yi = 0; zi = 0;
    while (yi < 12 || zi < 10) begin
      if (zi >= 10 || (yi < 12 && 3*yi <= 2*zi + L)) begin
        ek.push_back(32'(3*yi)); ev.push_back($bitstoreal(x_val[L]) * yv(yi)); yi++;
      end else begin
        ek.push_back(32'(2*zi + L)); ev.push_back(zv(zi)); zi++;
      end
    end
    // MMU: same multiset of records, ascending by index
    checks++;
    bad = (wq.size() != ek.size());
    for (int i = 0; i < wq.size() && !bad; i++) begin
      if (wq[i].idx != ek[i]) bad = 1;
      if (i > 0 && wq[i].idx < wq[i-1].idx) bad = 1;
    end
    if (!bad) begin
      // values per index (one or two records per index)
      for (int i = 0; i < wq.size(); i++) begin
        bit found;
        found = 0;
        for (int j = 0; j < ek.size(); j++)
          if (ek[j] == wq[i].idx && $realtobits(ev[j]) == wq[i].val) found = 1;
        if (!found) bad = 1;
      end
    end
    if (bad) begin failures++; $display("lane %0d MMU: %0d records, expected %0d", L, wq.size(), ek.size()); end
    foreach (ek[i]) begin
      if (sk.size() > 0 && sk[sk.size()-1] == ek[i]) sv[sv.size()-1] = sv[sv.size()-1] + ev[i];
      else begin sk.push_back(ek[i]); sv.push_back(ev[i]); end
    end
    if (L == 0) begin sk0 = sk; sv0 = sv; end else begin sk1 = sk; sv1 = sv; end
  endtask

  logic [31:0] sk0 [$], sk1 [$];
  real sv0 [$], sv1 [$];
  int n_merged [N];

  task automatic lane_au(int L);
    rec_t wq [$];
    int got_n;
    bit bad, done;
    logic [31:0] sk [$];
    real sv [$];
    if (L == 0) begin wq = wq0; sk = sk0; sv = sv0; end else begin wq = wq1; sk = sk1; sv = sv1; end
    got_n = 0; bad = 0; done = 0;
    fork
      begin
        for (int i = 0; i <= wq.size(); i++) begin
          @(negedge clk);
          a_in_valid[L] = 1;
          a_in_last[L]  = (i == wq.size());
          a_in_rec[L]   = (i < wq.size()) ? wq[i] : '{idx: KEY_MAX, val: '0};
          #1; while (!a_in_ready[L]) begin @(negedge clk); #1; end
          @(posedge clk);
        end
        @(negedge clk); a_in_valid[L] = 0; a_in_last[L] = 0;
      end
      begin
        while (!done) begin
          @(negedge clk);
          a_out_ready[L] = ($urandom_range(0, 2) != 0);
          #1;
          if (a_out_valid[L] && a_out_ready[L]) begin
            if (a_out_rec[L].idx != KEY_MAX) begin
              if (got_n >= sk.size() || a_out_rec[L].idx != sk[got_n] ||
                  a_out_rec[L].val != $realtobits(sv[got_n])) bad = 1;
              got_n++;
            end
            if (a_out_last[L]) done = 1;
          end
          @(posedge clk);
        end
        @(negedge clk); a_out_ready[L] = 0;
      end
    join
    checks++;
    if (bad || got_n != sk.size()) begin failures++; $display("lane %0d AU: %0d outputs, expected %0d", L, got_n, sk.size()); end
    n_merged[L] = wq.size() - got_n;
  endtask

  task automatic access(int L, logic [AW-1:0] a);
    @(negedge clk);
    c_req_valid[L] = 1; c_req_addr[L] = a;
    #1;
    while (!c_req_ready[L]) begin @(negedge clk); #1; end
    @(negedge clk);
    c_req_valid[L] = 0;
    while (!c_resp_valid[L]) @(negedge clk);
    checks++;
    if (c_resp_data[L] != word_of(L, a)) begin failures++; $display("lane %0d cache: wrong data at %h", L, a); end
  endtask

  task automatic lane_cache(int L);
    for (int j = 0; j < 3; j++) access(L, AW'(j * SETS * 8 + L));   // set 0: the third evicts line 0
    access(L, AW'(SETS * 8 + 5));                                  // line 1: hit
    access(L, AW'(2));                                             // line 0: miss again
    checks++;
    if (c_misses[L] != 4 || c_hits[L] != 1) begin
      failures++; $display("lane %0d cache: %0d misses %0d hits, expected 4 and 1", L, c_misses[L], c_hits[L]);
    end
  endtask

  task automatic lane(int L);
    lane_mmu(L);
    check_lane(L);
    lane_au(L);
    lane_cache(L);
  endtask

  initial begin
    y_valid = '0; y_last = '0; z_valid = '0; z_last = '0; w_ready = '0;
    y_rec = '0; z_rec = '0;
    a_in_valid = '0; a_in_last = '0; a_in_rec = '0; a_out_ready = '0;
    c_req_valid = '0; c_req_addr = '0;
    x_val[0] = $realtobits(2.5);
    x_val[1] = $realtobits(-0.75);
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      lane(0);
      lane(1);
    join
    checks++;
    if (n_merged[0] == 0 || n_merged[1] == 0) begin failures++; $display("no accumulation happened"); end
    $display("accumulated records: lane0 %0d lane1 %0d", n_merged[0], n_merged[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
