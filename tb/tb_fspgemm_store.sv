// tb_fspgemm_store: self-checking testbench for the FSpGEMM store module.
//
// Four QC channels offer random result elements at random times. Every
// element must be written exactly once, to consecutive addresses starting at
// zero, one per cycle; `count` must match; and the round-robin arbiter must
// serve a channel that stays valid within N cycles (no starvation).
module tb_fspgemm_store;
  import fspgemm_pkg::*;

  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clear, wr_en;
  logic [N-1:0] qc_valid, qc_ready;
  c_t [N-1:0] qc_data;
  logic [IDX_W-1:0] wr_addr, count;
  c_t wr_data;

  fspgemm_store #(.N(N)) dut (.clk, .rst_n, .clear, .qc_valid, .qc_ready, .qc_data,
                              .wr_en, .wr_addr, .wr_data, .count);

  logic [95:0] sent [$], got [$];
  int next_addr, wait_cyc [N], worst_wait;
  int serial;
  logic [N-1:0] taken;

  always_ff @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      got.push_back({wr_data.rowIdx, wr_data.colIdx, wr_data.val});
      if (wr_addr != next_addr) begin failures++; $display("store: address %0d, expected %0d", wr_addr, next_addr); end
      next_addr++;
    end
    for (int n = 0; n < N; n++) begin
      if (qc_valid[n] && qc_ready[n]) begin
        sent.push_back({qc_data[n].rowIdx, qc_data[n].colIdx, qc_data[n].val});
        wait_cyc[n] = 0;
        taken[n] <= 1'b1;
      end else if (qc_valid[n]) begin
        wait_cyc[n]++;
        if (wait_cyc[n] > worst_wait) worst_wait = wait_cyc[n];
      end
    end
  end

  initial begin
    clear = 0; taken = '0; qc_valid = '0; qc_data = '0; next_addr = 0; worst_wait = 0; serial = 0;
    foreach (wait_cyc[n]) wait_cyc[n] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        // keep an offered element stable until it is taken
        if (!qc_valid[n] || taken[n]) begin
          taken[n] = 1'b0;
          qc_valid[n] = ($urandom_range(0, 2) != 0);
          qc_data[n]  = '{val: $urandom, rowIdx: n, colIdx: serial};
          serial++;
        end
      end
    end
    @(negedge clk); qc_valid = '0;
    repeat (4) @(negedge clk);
    got.sort(); sent.sort();
    checks++;
    if (got != sent) begin failures++; $display("store: %0d written, %0d offered", got.size(), sent.size()); end
    checks++;
    if (count != got.size()) begin failures++; $display("store: count %0d", count); end
    checks++;
    if (worst_wait > N - 1) begin failures++; $display("store: a channel waited %0d cycles", worst_wait); end
    checks++;
    if (got.size() < 1000) begin failures++; $display("store: too few elements %0d", got.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
