// stc_cache_bank: one bank of the Sparse Tensor Core's banked cache.
//
// A read-only, set-associative cache in front of one HBM channel. The
// defaults give the thesis's configuration per bank: 128 sets x 16 ways
// of 64-byte lines (16 banks of 128 KiB make the 2 MB cache), with least
// recently used replacement. A line is filled from the channel as eight
// 64-bit beats, matching the channel's 8-byte data width.
//
// How it works: a request's word address is split into tag, set and word
// offset. The cycle after a request is accepted, all WAYS tags of the set are
// compared. On a hit the word is returned and the set's LRU ages are updated
// (the used way becomes age 0, younger ways age by one). On a miss an
// invalid way, else the way of greatest age, is refilled: a line request
// goes to the channel, the beats are written as they arrive, and the
// requested word is returned when the line is complete.
//
// This design's choices, where the thesis gives only size and policy:
// read-only operation, one outstanding miss (blocking), age-counter LRU,
// 64-bit word requests, and the channel's request/response handshake.
//
// Interface: req_valid/req_ready/req_addr (word address) in, resp_valid with
// resp_data out (one cycle after a hit is looked up, after the fill on a
// miss); mem_req_valid/mem_req_ready/mem_req_addr (line address) to the
// channel and mem_resp_valid/mem_resp_data beats back; hit and miss
// counters. Timing: hit 2 cycles from request to response; miss 2 cycles
// plus the channel's latency plus 8 beats.
module stc_cache_bank #(
  parameter int unsigned SETS   = 128,
  parameter int unsigned WAYS   = 16,
  parameter int unsigned LINE_W = 8,     // 64-bit words per 64-byte line
  parameter int unsigned ADDR_W = 31     // word address bits (16 GiB)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              resp_valid,
  output logic [63:0]       resp_data,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [ADDR_W-4:0] mem_req_addr,
  input  logic              mem_resp_valid,
  input  logic [63:0]       mem_resp_data,
  output logic [31:0]       hits,
  output logic [31:0]       misses
);
  localparam int unsigned OW  = $clog2(LINE_W);
  localparam int unsigned SW  = $clog2(SETS);
  localparam int unsigned WW  = $clog2(WAYS);
  localparam int unsigned TW  = ADDR_W - OW - SW;

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_MISS, S_FILL} state_t;
  state_t state;

  logic [TW-1:0]   tag_mem  [SETS][WAYS];
  logic            vld_mem  [SETS][WAYS];
  logic [WW-1:0]   age_mem  [SETS][WAYS];
  logic [63:0]     data_mem [SETS][WAYS][LINE_W];

  logic [ADDR_W-1:0] addr_q;
  logic [TW-1:0]     tag_q;
  logic [SW-1:0]     set_q;
  logic [OW-1:0]     off_q;
  logic              hit;
  logic [WW-1:0]     hit_way, victim, way_q;
  logic [OW-1:0]     beat;

  assign tag_q = addr_q[ADDR_W-1 -: TW];
  assign set_q = addr_q[OW +: SW];
  assign off_q = addr_q[OW-1:0];

  // tag compare and victim choice
  always_comb begin
    logic [WW:0] best_age;
    logic        have_invalid;
    hit          = 1'b0;
    hit_way      = '0;
    victim       = '0;
    best_age     = '0;
    have_invalid = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (vld_mem[set_q][w] && tag_mem[set_q][w] == tag_q) begin
        hit     = 1'b1;
        hit_way = WW'(w);
      end
      if (!vld_mem[set_q][w]) begin
        if (!have_invalid) victim = WW'(w);
        have_invalid = 1'b1;
      end else if (!have_invalid && {1'b0, age_mem[set_q][w]} >= best_age) begin
        best_age = {1'b0, age_mem[set_q][w]};
        victim   = WW'(w);
      end
    end
  end

  assign req_ready     = (state == S_IDLE);
  assign mem_req_valid = (state == S_MISS);
  assign mem_req_addr  = addr_q[ADDR_W-1:OW];

  // LRU update for way u of set s: u becomes youngest
  task automatic touch(input logic [SW-1:0] s, input logic [WW-1:0] u);
    for (int w = 0; w < WAYS; w++) begin
      if (WW'(w) == u)                                  age_mem[s][w] <= '0;
      else if (age_mem[s][w] < age_mem[s][u] && age_mem[s][w] != '1) age_mem[s][w] <= age_mem[s][w] + 1'b1;
    end
  endtask

  always_ff @(posedge clk) begin
    if (state == S_FILL && mem_resp_valid) data_mem[set_q][way_q][beat] <= mem_resp_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      addr_q     <= '0;
      way_q      <= '0;
      beat       <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      hits       <= '0;
      misses     <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          vld_mem[s][w] <= 1'b0;
          tag_mem[s][w] <= '0;
          age_mem[s][w] <= WW'(w);
        end
    end else begin
      resp_valid <= 1'b0;
      case (state)
        S_IDLE: if (req_valid) begin
          addr_q <= req_addr;
          state  <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) begin
            resp_valid <= 1'b1;
            resp_data  <= data_mem[set_q][hit_way][off_q];
            hits       <= hits + 1'b1;
            touch(set_q, hit_way);
            state      <= S_IDLE;
          end else begin
            way_q  <= victim;
            misses <= misses + 1'b1;
            state  <= S_MISS;
          end
        end
        S_MISS: if (mem_req_ready) begin
          beat  <= '0;
          state <= S_FILL;
        end
        default: begin  // S_FILL
          if (mem_resp_valid) begin
            if (beat == off_q) resp_data <= mem_resp_data;
            beat <= beat + 1'b1;
            if (beat == OW'(LINE_W - 1)) begin
              tag_mem[set_q][way_q] <= tag_q;
              vld_mem[set_q][way_q] <= 1'b1;
              touch(set_q, way_q);
              resp_valid <= 1'b1;
              state      <= S_IDLE;
            end
          end
        end
      endcase
    end
  end
endmodule
