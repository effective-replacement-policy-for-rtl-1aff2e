// tb_dta_insert_policy: self-checking test of the two-level set-dueling policy.
//
// Misses of randomly chosen set types are fed in phases with different biases, so that the
// counters wander over their whole range. After every clock the insertion position for all
// four set types and both counters are compared with an integer model of the decision tree.
// The test counts how often each branch of the follower decision was taken and how often
// the adaptive leaders switched position; a branch that never occurs is a failure.
module tb_dta_insert_policy;
  import dta_pkg::*;
  localparam int unsigned NUM_SETS = 1024;
  localparam int HALF = NUM_SETS / 2;
  localparam int CMAX = NUM_SETS - 1;

  logic clk = 0, rst_n = 0;
  set_type_e q_type, m_type;
  ins_pos_e  pos;
  logic      miss;
  logic [9:0] c1, c2;
  logic      sw, sw_ev;
  int checks = 0, failures = 0;
  int m_c1, m_c2, m_sw;
  int n_mru_r1 = 0, n_mid = 0, n_lru = 0, n_mru_sw = 0, n_toggle = 0;

  dta_insert_policy #(.NUM_SETS(NUM_SETS)) dut (
    .clk(clk), .rst_n(rst_n), .set_type_i(q_type), .ins_pos_o(pos),
    .miss_i(miss), .miss_set_type_i(m_type),
    .count1_o(c1), .count2_o(c2), .switched_o(sw), .switch_event_o(sw_ev)
  );

  always #5 clk = ~clk;

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

  task automatic model_miss(set_type_e t);
    case (t)
      SET_LDR_MRU: if (m_c1 < CMAX) m_c1++;
      SET_LDR_MID: begin
        if (m_c1 > 0) m_c1--;
        if (m_c2 > 0) m_c2--;
      end
      SET_LDR_ADPT: begin
        if (m_c2 == CMAX) begin m_sw = 1 - m_sw; m_c2 = HALF; n_toggle++; end
        else m_c2++;
      end
      default: ;
    endcase
  endtask

  task automatic check_all();
    ins_pos_e e;
    for (int t = 0; t < 4; t++) begin
      q_type = set_type_e'(t);
      #1;
      e = model_pos(q_type);
      checks++;
      if (pos != e) begin
        failures++;
        $display("FAIL type %0d pos %0d expected %0d (c1=%0d c2=%0d sw=%0d)",
                 t, pos, e, m_c1, m_c2, m_sw);
      end
      if (t == 0) begin
        if (m_c1 < HALF) n_mru_r1++;
        else if (m_sw == 0 && m_c2 >= HALF) n_mid++;
        else if (m_sw == 0) n_lru++;
        else n_mru_sw++;
      end
    end
    checks++;
    if (int'(c1) != m_c1 || int'(c2) != m_c2 || int'(sw) != m_sw) begin
      failures++;
      $display("FAIL state c1=%0d/%0d c2=%0d/%0d sw=%0d/%0d", c1, m_c1, c2, m_c2, sw, m_sw);
    end
  endtask

  // one phase: N misses, type drawn with weights (follower, mid, mru, adaptive)
  task automatic phase(int n, int wf, int wmid, int wmru, int wad);
    int r;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      r = int'($urandom_range(wf + wmid + wmru + wad - 1, 0));
      if (r < wf)                     m_type = SET_FOLLOWER;
      else if (r < wf + wmid)         m_type = SET_LDR_MID;
      else if (r < wf + wmid + wmru)  m_type = SET_LDR_MRU;
      else                            m_type = SET_LDR_ADPT;
      miss = ($urandom_range(7, 0) != 0);
      #1;
      checks++;
      if (sw_ev != (miss && m_type == SET_LDR_ADPT && m_c2 == CMAX)) begin
        failures++;
        $display("FAIL switch event flag");
      end
      @(posedge clk);
      if (miss) model_miss(m_type);
      @(negedge clk);
      miss = 0;
      check_all();
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    miss = 0; m_type = SET_FOLLOWER; q_type = SET_FOLLOWER;
    m_c1 = HALF; m_c2 = HALF; m_sw = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();                       // after reset: middle for followers
    phase(1500, 1, 4, 1, 1);           // middle leaders miss most: count1 low -> MRU
    phase(3000, 1, 1, 5, 1);           // MRU leaders miss most: count1 high
    phase(3000, 1, 5, 1, 1);           // count2 falls -> LRU
    phase(6000, 1, 1, 1, 6);           // adaptive leaders lose -> switched toggles
    phase(6000, 1, 1, 2, 6);
    phase(3000, 1, 1, 5, 4);           // count1 and count2 high -> middle / switched MRU
    phase(4000, 3, 2, 2, 2);           // balanced
    $display("follower branches: MRU(round 1)=%0d middle=%0d LRU=%0d MRU(switched)=%0d toggles=%0d",
             n_mru_r1, n_mid, n_lru, n_mru_sw, n_toggle);
    checks++;
    if (n_mru_r1 == 0 || n_mid == 0 || n_lru == 0 || n_mru_sw == 0 || n_toggle < 2) begin
      failures++;
      $display("FAIL a branch of the decision tree was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
