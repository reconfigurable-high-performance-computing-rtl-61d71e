// tb_fschol_store: self-checking testbench for the Cholesky store module.
//
// Streams L vectors (VL=4) with a last flag closing each job into the store
// module while the memory write port stalls at random. Checks every write's
// address (base plus running count) and data, the vector and job counters,
// and that start moves the base and clears the counters.
module tb_fschol_store;
  localparam int VL = 4;
  typedef logic [VL-1:0][31:0] vec_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, ql_valid, ql_ready, ql_last, wr_en, wr_ready;
  logic [31:0] l_base, wr_addr, vectors, jobs_done;
  vec_t ql_data, wr_data;

  fschol_store #(.VL(VL)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int base, int n);
    int sent = 0, jobs = 0;
    @(negedge clk); start = 1; l_base = base;
    @(negedge clk); start = 0;
    while (sent < n) begin
      ql_valid = ($urandom_range(0, 3) != 0);
      ql_data  = {VL{32'(base + sent)}};
      ql_last  = (sent % 5 == 4) || (sent == n - 1);
      wr_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (ql_valid && ql_ready) begin
        checks++;
        if (!wr_en || wr_addr !== 32'(base + sent) || wr_data !== ql_data) begin
          failures++;
          $display("write %0d: en %b addr %h data %h", sent, wr_en, wr_addr, wr_data);
        end
        if (ql_last) jobs++;
        sent++;
      end else begin
        checks++;
        if (wr_en) begin failures++; $display("write without a vector"); end
      end
      @(negedge clk);
    end
    ql_valid = 0;
    @(negedge clk);
    checks += 2;
    if (vectors != n) begin failures++; $display("vectors %0d want %0d", vectors, n); end
    if (jobs_done != jobs) begin failures++; $display("jobs %0d want %0d", jobs_done, jobs); end
  endtask

  initial begin
    start = 0; l_base = 0; ql_valid = 0; ql_data = '0; ql_last = 0; wr_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h1000, 23);
    run(32'h80, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
