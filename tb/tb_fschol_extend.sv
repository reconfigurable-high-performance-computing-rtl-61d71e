// tb_fschol_extend: self-checking testbench for the matrix extension unit.
//
// Fills a behavioural Mem_U with distinct words and streams random pattern
// vectors (VL=8). The expected extended vectors are built in software by
// walking the pattern bits with an index counter. Checks every vector, that
// the counter restarts on start, that the unit stops after num vectors
// (the next pattern stays unconsumed until the next start), and the rate:
// with pattern and sink always ready a vector leaves every VL+1 cycles.
module tb_fschol_extend;
  localparam int VL = 8, WL = 32, UADDR_W = 8;
  typedef logic [VL-1:0][WL-1:0] vec_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, p_valid, p_ready, qu_valid, qu_ready;
  logic [31:0] num;
  logic [VL-1:0] p_data;
  logic [UADDR_W-1:0] u_rd_addr;
  vec_t qu_data;
  logic [WL-1:0] memu [1 << UADDR_W];

  fschol_extend #(.VL(VL), .WL(WL), .UADDR_W(UADDR_W)) dut (.clk, .rst_n, .start, .num,
    .p_valid, .p_ready, .p_data, .u_rd_addr, .u_rd_data(memu[u_rd_addr]),
    .qu_valid, .qu_ready, .qu_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [VL-1:0] pats [$];
  vec_t exp_q [$];

  task automatic make(int n);
    int cnt = 0;
    for (int v = 0; v < n; v++) begin
      logic [VL-1:0] p;
      vec_t e;
      p = VL'($urandom);
      for (int i = 0; i < VL; i++) begin
        e[i] = '0;
        if (p[i]) begin e[i] = memu[cnt]; cnt++; end
      end
      pats.push_back(p);
      exp_q.push_back(e);
    end
  endtask

  // one run of n vectors; fast = no random gaps or stalls
  task automatic run(int n, bit fast);
    int got = 0, t_first = 0, t_last = 0, cyc = 0;
    make(n);
    @(negedge clk); start = 1; num = n;
    @(negedge clk); start = 0;
    while (got < n) begin
      cyc++;
      p_valid = pats.size() > 0 && (fast || dut.busy || $urandom_range(0, 2) != 0);
      p_data  = (pats.size() > 0) ? pats[0] : '0;
      qu_ready = fast || ($urandom_range(0, 2) != 0);
      #1;
      if (p_valid && p_ready) void'(pats.pop_front());
      if (qu_valid && qu_ready) begin
        vec_t e;
        e = exp_q.pop_front();
        checks++;
        if (qu_data !== e) begin
          failures++;
          $display("vector %0d: got %h want %h", got, qu_data, e);
        end
        if (got == 0) t_first = cyc;
        t_last = cyc;
        got++;
      end
      @(negedge clk);
    end
    if (fast) begin
      checks++;
      if (t_last - t_first != (n - 1) * (VL + 1)) begin
        failures++;
        $display("rate: %0d cycles for %0d vectors", t_last - t_first, n);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << UADDR_W); i++) memu[i] = 32'hA000_0000 + i;
    start = 0; num = 0; p_valid = 0; p_data = '0; qu_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(6, 1);
    run(10, 0);
    // after num vectors the unit must leave the next pattern alone
    pats.push_back('1);
    p_valid = 1; p_data = '1; qu_ready = 1;
    repeat (2 * VL) @(negedge clk);
    checks++;
    if (qu_valid || dut.busy) begin failures++; $display("ran past num"); end
    pats.delete();
    p_valid = 0;
    run(4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
