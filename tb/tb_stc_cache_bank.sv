// tb_stc_cache_bank: self-checking testbench for one cache bank.
//
// A behavioural HBM channel answers line requests after a random latency
// with eight 64-bit beats whose data is a fixed function of the address.
// A reduced bank (8 sets x 4 ways) is driven with random word addresses
// over 64 lines, so lines are evicted often; a software model of a
// set-associative LRU cache predicts every hit and miss, and every returned
// word is checked against the address function. Hit latency (2 cycles) and
// the miss count are checked. A bank at the default size (128 sets x 16
// ways) then streams over a region larger than one set's capacity and is
// checked the same way.
module tb_stc_cache_bank;
  localparam int AW = 31;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] word_of(logic [AW-1:0] a);
    return {a, 1'b0, a} ^ 64'h5a5a_0000_1234_0000;
  endfunction

  // two banks sharing the stimulus signals, selected by `which`
  logic req_valid [2], req_ready [2], resp_valid [2];
  logic [AW-1:0] req_addr;
  logic [63:0] resp_data [2];
  logic mem_req_valid [2], mem_req_ready [2], mem_resp_valid [2];
  logic [AW-4:0] mem_req_addr [2];
  logic [63:0] mem_resp_data [2];
  logic [31:0] hits [2], misses [2];

  stc_cache_bank #(.SETS(8), .WAYS(4)) bank_s (.clk, .rst_n,
    .req_valid(req_valid[0]), .req_ready(req_ready[0]), .req_addr,
    .resp_valid(resp_valid[0]), .resp_data(resp_data[0]),
    .mem_req_valid(mem_req_valid[0]), .mem_req_ready(mem_req_ready[0]), .mem_req_addr(mem_req_addr[0]),
    .mem_resp_valid(mem_resp_valid[0]), .mem_resp_data(mem_resp_data[0]),
    .hits(hits[0]), .misses(misses[0]));
  stc_cache_bank bank_f (.clk, .rst_n,
    .req_valid(req_valid[1]), .req_ready(req_ready[1]), .req_addr,
    .resp_valid(resp_valid[1]), .resp_data(resp_data[1]),
    .mem_req_valid(mem_req_valid[1]), .mem_req_ready(mem_req_ready[1]), .mem_req_addr(mem_req_addr[1]),
    .mem_resp_valid(mem_resp_valid[1]), .mem_resp_data(mem_resp_data[1]),
    .hits(hits[1]), .misses(misses[1]));

  // behavioural HBM channels
  for (genvar d = 0; d < 2; d++) begin : g_hbm
    initial begin
      mem_req_ready[d] = 0; mem_resp_valid[d] = 0; mem_resp_data[d] = '0;
      forever begin
        @(negedge clk);
        if (mem_req_valid[d]) begin
          logic [AW-4:0] line;
          mem_req_ready[d] = 1;
          line = mem_req_addr[d];
          @(negedge clk);
          mem_req_ready[d] = 0;
          repeat ($urandom_range(2, 8)) @(negedge clk);
          for (int b = 0; b < 8; b++) begin
            mem_resp_valid[d] = 1;
            mem_resp_data[d]  = word_of({line, 3'(b)});
            @(negedge clk);
            mem_resp_valid[d] = 0;
            if ($urandom_range(0, 3) == 0) @(negedge clk);
          end
        end
      end
    end
  end

  // software LRU model
  typedef logic [AW-4:0] line_t;
  line_t lru [int][$];      // per set: most recent first

  function automatic bit model_access(line_t line, int sets, int ways);
    int s = int'(line) % sets;
    bit h = 0;
    if (!lru.exists(s)) lru[s] = {};
    foreach (lru[s][i]) if (lru[s][i] == line) begin h = 1; lru[s].delete(i); break; end
    lru[s].push_front(line);
    if (lru[s].size() > ways) void'(lru[s].pop_back());
    return h;
  endfunction

  task automatic access(int d, logic [AW-1:0] a, int sets, int ways, ref int exp_miss);
    bit h;
    int lat;
    h = model_access(a[AW-1:3], sets, ways);
    if (!h) exp_miss++;
    @(negedge clk);
    req_valid[d] = 1; req_addr = a;
    #1;
    while (!req_ready[d]) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid[d] = 0;
    lat = 1;
    while (!resp_valid[d]) begin @(negedge clk); lat++; end
    checks++;
    if (resp_data[d] != word_of(a)) begin
      failures++; $display("bank %0d addr %h: data %h expected %h", d, a, resp_data[d], word_of(a));
    end
    if (h) begin
      checks++;
      if (lat != 2) begin failures++; $display("bank %0d: hit took %0d cycles", d, lat); end
    end
  endtask

  initial begin
    int em;
    req_valid[0] = 0; req_valid[1] = 0; req_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    em = 0;
    lru.delete();
    for (int i = 0; i < 1500; i++)
      access(0, {$urandom_range(0, 63), 3'($urandom)} + AW'(32'h100000), 8, 4, em);
    checks++;
    if (misses[0] != em || hits[0] != 1500 - em) begin
      failures++; $display("small bank: %0d misses / %0d hits, model %0d misses", misses[0], hits[0], em);
    end
    checks++;
    if (em < 100 || em > 1400) begin failures++; $display("small bank: weak test, %0d misses", em); end
    em = 0;
    lru.delete();
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 18 * 128 * 8; i += 3)
        access(1, AW'(i), 128, 16, em);
    checks++;
    if (misses[1] != em) begin failures++; $display("full bank: %0d misses, model %0d", misses[1], em); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
