// dta_insert_policy: reduced decision-tree insertion policy with two-level set dueling.
//
// The policy decides where a block that misses in the cache enters its set's recency stack.
// It is a decision tree of two set duels:
//   round 1, counter count1: middle insertion (setType1 leaders) against MRU insertion
//            (setType2 leaders, i.e. classic LRU). A miss in an MRU leader raises count1,
//            a miss in a middle leader lowers it. count1 < NUM_SETS/2 means MRU wins.
//   round 2, counter count2: the middle leaders against the adaptive leaders (setType3).
//            A miss in an adaptive leader raises count2, a miss in a middle leader lowers
//            it. count2 >= NUM_SETS/2 means middle wins, otherwise the adaptive leaders'
//            position (LRU) wins.
//   switched: one bit recording the position the adaptive leaders use: 0 = LRU end,
//            1 = MRU end.
// Follower sets (setType0) take, as the decision tree prescribes:
//   count1 <  NUM_SETS/2                    -> MRU
//   count1 >= NUM_SETS/2, switched == 0     -> middle if count2 >= NUM_SETS/2, else LRU
//   count1 >= NUM_SETS/2, switched == 1     -> MRU
// The tree, the leader roles, the counters and their NUM_SETS/2 thresholds follow the
// described scheme. This design's own choices: both counters are saturating, CNT_W =
// log2(NUM_SETS) bits wide and reset to NUM_SETS/2; a middle-leader miss moves both
// counters; and switched toggles (with count2 returning to NUM_SETS/2) when an adaptive
// leader misses while count2 is already saturated at its top, i.e. when the adaptive
// leaders' current position has clearly lost against middle insertion.
// Interface: set_type_i/ins_pos_o is a combinational query on the current state; a pulse on
// miss_i with miss_set_type_i updates the counters at the next clock edge.
module dta_insert_policy
  import dta_pkg::*;
#(
  parameter int unsigned NUM_SETS = 1024,
  parameter int unsigned CNT_W    = (NUM_SETS > 2) ? $clog2(NUM_SETS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // insertion-position query
  input  set_type_e        set_type_i,
  output ins_pos_e         ins_pos_o,
  // counter update, one per miss
  input  logic             miss_i,
  input  set_type_e        miss_set_type_i,
  // state, for observation
  output logic [CNT_W-1:0] count1_o,
  output logic [CNT_W-1:0] count2_o,
  output logic             switched_o,
  output logic             switch_event_o
);

  localparam logic [CNT_W-1:0] HALF = CNT_W'(NUM_SETS / 2);
  localparam logic [CNT_W-1:0] CMAX = '1;

  logic [CNT_W-1:0] count1_q, count2_q;
  logic             switched_q;
  ins_pos_e         follower_pos;
  logic             toggle;

  // Algorithm of the follower sets.
  always_comb begin
    if (count1_q < HALF)          follower_pos = INS_MRU;
    else if (!switched_q)         follower_pos = (count2_q >= HALF) ? INS_MIDDLE : INS_LRU;
    else                          follower_pos = INS_MRU;
  end

  always_comb begin
    unique case (set_type_i)
      SET_LDR_MID:  ins_pos_o = INS_MIDDLE;
      SET_LDR_MRU:  ins_pos_o = INS_MRU;
      SET_LDR_ADPT: ins_pos_o = switched_q ? INS_MRU : INS_LRU;
      default:      ins_pos_o = follower_pos;
    endcase
  end

  assign toggle = miss_i && (miss_set_type_i == SET_LDR_ADPT) && (count2_q == CMAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count1_q   <= HALF;
      count2_q   <= HALF;
      switched_q <= 1'b0;
    end else if (miss_i) begin
      unique case (miss_set_type_i)
        SET_LDR_MRU: if (count1_q != CMAX) count1_q <= count1_q + CNT_W'(1);
        SET_LDR_MID: begin
          if (count1_q != '0) count1_q <= count1_q - CNT_W'(1);
          if (count2_q != '0) count2_q <= count2_q - CNT_W'(1);
        end
        SET_LDR_ADPT: begin
          if (toggle) begin
            switched_q <= ~switched_q;
            count2_q   <= HALF;
          end else begin
            count2_q   <= count2_q + CNT_W'(1);
          end
        end
        default: ;
      endcase
    end
  end

  assign count1_o       = count1_q;
  assign count2_o       = count2_q;
  assign switched_o     = switched_q;
  assign switch_event_o = toggle;

endmodule
