// tb_dta_llc_thrash: the cache at its default size under a cyclic access pattern that is
// larger than the cache, the case where plain LRU replacement fails.
//
// Every set is visited with 20 distinct lines in a fixed cyclic order (20 lines per
// 16-way set, 1.25 MiB in all), for several rounds. Under LRU (always insert at MRU) every
// access misses once the cache is full. The decision tree should notice that MRU insertion
// loses against middle insertion (round 1) and that LRU-end insertion wins round 2, so the
// followers keep most of their lines resident and hit on them. The test runs the same
// stream through a plain-LRU model kept in this file and checks that the cache hits more
// often than the model, that followers end up inserting at the LRU end, that every request
// gets exactly one response two cycles after acceptance, and that the MRU leaders (which
// follow plain LRU) never hit once the first round is over.
module tb_dta_llc_thrash;
  import dta_pkg::*;
  localparam int SETS = 1024, WAYS = 16, LINES = 20, ROUNDS = 6;

  logic        clk = 0, rst_n = 0;
  logic        req_valid, req_ready;
  logic [63:0] req_addr;
  logic        resp_valid, resp_hit, resp_evict, sw, sw_ev;
  logic [3:0]  resp_way;
  ins_pos_e    resp_ins;
  set_type_e   resp_type;
  logic [63:0] resp_evict_addr;
  logic [9:0]  c1, c2;

  dta_llc dut (
    .clk(clk), .rst_n(rst_n),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_addr_i(req_addr),
    .resp_valid_o(resp_valid), .resp_hit_o(resp_hit), .resp_way_o(resp_way),
    .resp_ins_pos_o(resp_ins), .resp_set_type_o(resp_type), .resp_evict_o(resp_evict),
    .resp_evict_addr_o(resp_evict_addr), .count1_o(c1), .count2_o(c2), .switched_o(sw),
    .switch_event_o(sw_ev)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  longint accept_q [$];
  int dut_hits = 0, lru_hits = 0, responses = 0, mru_ldr_late_hits = 0;
  int last_round_follower_lru = 0, last_round_follower_fills = 0;
  int round_now = 0;

  // plain-LRU model: per set the resident tags in recency order (front = LRU)
  longint lru_list [SETS][$];

  function automatic bit lru_access(int s, longint t);
    foreach (lru_list[s][i]) begin
      if (lru_list[s][i] == t) begin
        lru_list[s].delete(i);
        lru_list[s].push_back(t);
        return 1;
      end
    end
    if (lru_list[s].size() == WAYS) void'(lru_list[s].pop_front());
    lru_list[s].push_back(t);
    return 0;
  endfunction

  always @(negedge clk) begin
    cycle++;
    if (rst_n && resp_valid) begin
      responses++;
      checks++;
      if (accept_q.size() == 0 || cycle - accept_q.pop_front() != 2) begin
        failures++;
        $display("FAIL response latency or response without request");
      end
      if (resp_hit) dut_hits++;
      if (resp_hit && resp_type == SET_LDR_MRU && round_now >= 2) mru_ldr_late_hits++;
      if (!resp_hit && resp_type == SET_FOLLOWER && round_now == ROUNDS - 1) begin
        last_round_follower_fills++;
        if (resp_ins == INS_LRU) last_round_follower_lru++;
      end
    end
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned a;
    req_valid = 0; req_addr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (!req_ready) begin @(posedge clk); #1; end
    for (int r = 0; r < ROUNDS; r++) begin
      round_now = r;
      for (int l = 0; l < LINES; l++) begin
        for (int s = 0; s < SETS; s++) begin
          a = (longint'(l + 1) << 16) | (longint'(s) << 6);
          req_addr  = a;
          req_valid = 1;
          @(negedge clk);
          while (!req_ready) @(negedge clk);
          #1;
          accept_q.push_back(cycle);
          if (lru_access(s, longint'(l + 1))) lru_hits++;
          @(posedge clk);
          #1;
        end
      end
    end
    req_valid = 0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    $display("accesses=%0d cache hits=%0d plain-LRU hits=%0d follower fills at LRU end in last round=%0d/%0d c1=%0d c2=%0d",
             SETS * LINES * ROUNDS, dut_hits, lru_hits, last_round_follower_lru,
             last_round_follower_fills, c1, c2);
    checks++;
    if (responses != SETS * LINES * ROUNDS) begin
      failures++;
      $display("FAIL %0d responses for %0d requests", responses, SETS * LINES * ROUNDS);
    end
    checks++;
    if (lru_hits != 0) begin
      failures++;
      $display("FAIL the plain-LRU model should never hit on this pattern");
    end
    checks++;
    if (dut_hits <= lru_hits) begin
      failures++;
      $display("FAIL the cache does not beat plain LRU");
    end
    checks++;
    if (last_round_follower_fills == 0 || last_round_follower_lru != last_round_follower_fills) begin
      failures++;
      $display("FAIL followers do not insert at the LRU end in the last round");
    end
    checks++;
    if (mru_ldr_late_hits != 0) begin
      failures++;
      $display("FAIL MRU leaders (plain LRU) hit on a thrashing pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
