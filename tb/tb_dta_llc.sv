// tb_dta_llc: end-to-end test of the last-level-cache tag store at its default size
// (1 MiB, 16 ways, 64-byte lines, 1024 sets, 64-bit addresses).
//
// A request stream is generated in phases. Each phase aims its accesses at chosen kinds of
// sets (followers, middle, MRU or adaptive leaders) and mixes re-used addresses (hits) with
// never-seen ones (misses), so that the dueling counters are pushed through every branch of
// the decision tree. Every response is compared with a reference model kept in this file:
// per set an ordered recency list, valid bits and tags, and an integer model of the two
// counters and the switched bit. Checked per access: hit/miss, way, insertion choice, set
// role, eviction and evicted address, counters, and the two-cycle latency. Also checked:
// ready stays low exactly NUM_SETS cycles after reset while the rows are cleared.
// Mechanisms counted (each must occur): hits, misses into empty ways, evictions,
// follower fills at the LRU end, the middle, MRU by round 1, MRU by the switched bit,
// switches of the adaptive leaders, and requests accepted in the response cycle.
module tb_dta_llc;
  import dta_pkg::*;
  localparam int SETS = 1024, WAYS = 16, HALF = SETS / 2, CMAX = SETS - 1;

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
  longint cycle = 0;   // counts negative edges; inputs and outputs are sampled there

  // ---------------- reference model ----------------
  bit      m_valid [SETS][WAYS];
  longint  m_tag   [SETS][WAYS];
  int      m_stack [SETS][WAYS];    // m_stack[s][p] = way at stack position p (0 = LRU)
  int      m_c1, m_c2, m_sw;

  typedef struct {
    bit        hit;
    int        way;
    ins_pos_e  ins;
    set_type_e st;
    bit        evict;
    longint    evict_addr;
    int        c1, c2, sw;
    longint    accept_cycle;
  } exp_t;

  exp_t exp_q [$];

  int n_hit = 0, n_fill_empty = 0, n_evict = 0, n_f_lru = 0, n_f_mid = 0, n_f_mru1 = 0,
      n_f_mru_sw = 0, n_switch = 0, n_b2b = 0, n_switch_pulse = 0;

  function automatic set_type_e role(int s);
    case (s % 32)
      0: return SET_LDR_MID;
      1: return SET_LDR_MRU;
      2: return SET_LDR_ADPT;
      default: return SET_FOLLOWER;
    endcase
  endfunction

  function automatic ins_pos_e model_pos(set_type_e t);
    case (t)
      SET_LDR_MID:  return INS_MIDDLE;
      SET_LDR_MRU:  return INS_MRU;
      SET_LDR_ADPT: return (m_sw != 0) ? INS_MRU : INS_LRU;
      default: begin
        if (m_c1 < HALF) return INS_MRU;
        if (m_sw == 0)   return (m_c2 >= HALF) ? INS_MIDDLE : INS_LRU;
        return INS_MRU;
      end
    endcase
  endfunction

  function automatic void move_to(int s, int way, int pos);
    int lst [$];
    for (int p = 0; p < WAYS; p++) if (m_stack[s][p] != way) lst.push_back(m_stack[s][p]);
    lst.insert(pos, way);
    for (int p = 0; p < WAYS; p++) m_stack[s][p] = lst[p];
  endfunction

  function automatic exp_t model_access(longint unsigned addr);
    exp_t e;
    int s = int'((addr >> 6) % 64'(SETS));
    longint t = longint'(addr >> 16);
    int pos;
    e.st  = role(s);
    e.hit = 0;
    e.ins = INS_MRU;
    e.evict = 0;
    e.evict_addr = 0;
    for (int w = 0; w < WAYS; w++)
      if (m_valid[s][w] && m_tag[s][w] == t) begin e.hit = 1; e.way = w; end
    if (e.hit) begin
      move_to(s, e.way, WAYS - 1);
      n_hit++;
    end else begin
      e.way = -1;
      for (int w = WAYS - 1; w >= 0; w--) if (!m_valid[s][w]) e.way = w;
      if (e.way < 0) e.way = m_stack[s][0];
      e.evict = m_valid[s][e.way];
      e.evict_addr = (m_tag[s][e.way] << 16) | (longint'(s) << 6);
      if (e.evict) n_evict++; else n_fill_empty++;
      e.ins = model_pos(e.st);
      if (e.st == SET_FOLLOWER) begin
        if (m_c1 < HALF) n_f_mru1++;
        else if (m_sw == 0 && e.ins == INS_MIDDLE) n_f_mid++;
        else if (m_sw == 0) n_f_lru++;
        else n_f_mru_sw++;
      end
      pos = (e.ins == INS_LRU) ? 0 : (e.ins == INS_MIDDLE) ? 7 : WAYS - 1;
      move_to(s, e.way, pos);
      m_valid[s][e.way] = 1;
      m_tag[s][e.way] = t;
      case (e.st)
        SET_LDR_MRU: if (m_c1 < CMAX) m_c1++;
        SET_LDR_MID: begin if (m_c1 > 0) m_c1--; if (m_c2 > 0) m_c2--; end
        SET_LDR_ADPT: begin
          if (m_c2 == CMAX) begin m_sw = 1 - m_sw; m_c2 = HALF; n_switch++; end
          else m_c2++;
        end
        default: ;
      endcase
    end
    e.c1 = m_c1; e.c2 = m_c2; e.sw = m_sw;
    return e;
  endfunction

  // ---------------- response checker ----------------
  always @(negedge clk) begin
    cycle++;
    if (sw_ev) n_switch_pulse++;
    if (rst_n && resp_valid) begin
      exp_t e;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL response without request");
      end else begin
        e = exp_q.pop_front();
        checks++;
        if (cycle - e.accept_cycle != 2) begin
          failures++;
          $display("FAIL latency %0d cycles", cycle - e.accept_cycle);
        end
        checks++;
        if (resp_hit != e.hit || int'(resp_way) != e.way || resp_type != e.st ||
            resp_evict != e.evict || (!e.hit && resp_ins != e.ins) ||
            (e.evict && resp_evict_addr != 64'(e.evict_addr))) begin
          failures++;
          $display("FAIL resp hit=%0d/%0d way=%0d/%0d type=%0d/%0d ins=%0d/%0d evict=%0d/%0d ea=%h/%h",
                   resp_hit, e.hit, resp_way, e.way, resp_type, e.st, resp_ins, e.ins,
                   resp_evict, e.evict, resp_evict_addr, e.evict_addr);
        end
        checks++;
        if (int'(c1) != e.c1 || int'(c2) != e.c2 || int'(sw) != e.sw) begin
          failures++;
          $display("FAIL counters c1=%0d/%0d c2=%0d/%0d sw=%0d/%0d", c1, e.c1, c2, e.c2, sw, e.sw);
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  longint unsigned next_tag = 1;
  longint unsigned pool [64];
  int              pool_n = 0;

  function automatic longint unsigned gen_addr(int wf, int wmid, int wmru, int wad, int reuse_pct);
    int r, ofs, s;
    longint unsigned a;
    if (pool_n > 0 && int'($urandom_range(99, 0)) < reuse_pct)
      return pool[$urandom_range(pool_n - 1, 0)] | 64'($urandom_range(63, 0));
    r = int'($urandom_range(wf + wmid + wmru + wad - 1, 0));
    if (r < wf)                    ofs = int'($urandom_range(31, 3));
    else if (r < wf + wmid)        ofs = 0;
    else if (r < wf + wmid + wmru) ofs = 1;
    else                           ofs = 2;
    s = 32 * int'($urandom_range(31, 0)) + ofs;
    a = (next_tag << 16) | (longint'(s) << 6);
    next_tag++;
    pool[pool_n % 64] = a;
    if (pool_n < 64) pool_n++;
    return a;
  endfunction

  task automatic phase(int n, int wf, int wmid, int wmru, int wad, int reuse_pct);
    for (int i = 0; i < n; i++) begin
      req_addr  = gen_addr(wf, wmid, wmru, wad, reuse_pct);
      req_valid = 1;
      // ready only changes at a rising edge: its value at the falling edge is the one the
      // cache sees at the next rising edge
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      #1;
      if (resp_valid) n_b2b++;
      exp_q.push_back(model_access(req_addr));
      exp_q[$].accept_cycle = cycle;
      @(posedge clk);
      #1;
      if ($urandom_range(3, 0) == 0) begin
        req_valid = 0;
        repeat ($urandom_range(3, 1)) @(posedge clk);
        #1;
      end
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_cycles;
    req_valid = 0; req_addr = 0;
    m_c1 = HALF; m_c2 = HALF; m_sw = 0;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        m_valid[s][w] = 0; m_tag[s][w] = 0; m_stack[s][w] = w;
      end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait_cycles = 0;
    while (!req_ready) begin @(posedge clk); #1; wait_cycles++; end
    checks++;
    if (wait_cycles != SETS) begin
      failures++;
      $display("FAIL rows cleared in %0d cycles, expected %0d", wait_cycles, SETS);
    end
    phase(3000,  4, 1, 1, 1, 40);   // fill the cache, followers insert at the middle
    phase(4000,  1, 4, 1, 1, 20);   // middle leaders miss: count1 falls -> MRU
    phase(6000,  1, 1, 5, 1, 20);   // MRU leaders miss: count1 rises
    phase(4000,  1, 5, 1, 1, 20);   // count2 falls -> LRU
    phase(12000, 1, 1, 2, 6, 10);   // adaptive leaders lose -> switched
    phase(6000,  1, 1, 5, 4, 20);
    phase(4000,  3, 2, 2, 2, 40);   // mixed
    @(posedge clk); req_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d responses missing", exp_q.size());
    end
    $display("hits=%0d fills_empty=%0d evictions=%0d follower fills: LRU=%0d middle=%0d MRU(round1)=%0d MRU(switched)=%0d switches=%0d/%0d back_to_back=%0d",
             n_hit, n_fill_empty, n_evict, n_f_lru, n_f_mid, n_f_mru1, n_f_mru_sw, n_switch,
             n_switch_pulse, n_b2b);
    checks++;
    if (n_hit == 0 || n_fill_empty == 0 || n_evict == 0 || n_f_lru == 0 || n_f_mid == 0 ||
        n_f_mru1 == 0 || n_f_mru_sw == 0 || n_switch == 0 || n_b2b == 0 ||
        n_switch_pulse != n_switch) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
