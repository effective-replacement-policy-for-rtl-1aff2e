// dta_llc: last-level-cache tag store with a reduced decision-tree insertion policy.
//
// In a last-level cache most blocks are never reused, because the L1 and L2 caches above it
// already absorb the temporal locality. Always inserting a new block at the MRU end of the
// recency stack (plain LRU) then lets dead blocks linger. This cache instead inserts a
// missing block at one of three stack positions - LRU end, middle, or MRU end - chosen at
// run time by a two-level set-dueling decision tree (dta_insert_policy). Hits always
// promote the block to the MRU end, and the victim is the block at the LRU end.
//
// Organisation (defaults): 1 MiB, 16 ways, 64-byte lines -> 1024 sets, 64-bit byte
// addresses split into tag | set index | line offset. The middle position is stack rank 7
// (rank 0 = LRU end, rank 15 = MRU end). A set_ram row holds valid, tag and rank of the
// 16 ways of a set. Only the tags and the replacement state are modelled; the response tells
// a data array (not part of this block) which way hit or was filled and which block left.
//
// Operation:
//   * after reset the controller spends NUM_SETS cycles clearing the rows (all ways
//     invalid, ranks 0..WAYS-1); req_ready_o stays low meanwhile.
//   * a request (req_valid_i && req_ready_o) reads its set's row. In the next cycle the tags
//     are compared; on a hit the way moves to MRU, on a miss the victim way gets the new tag
//     and is moved to the insertion position, and the dueling counters see the miss of a
//     leader set. The row is written back and the response registered.
//   * resp_valid_o is high for one cycle, two cycles after the request was accepted; a new
//     request can be accepted in that same cycle (one request every two cycles).
// The insertion positions, the decision tree, the set types and the 1 MiB / 16-way size
// follow the described scheme; the line size, address width, the two-cycle timing, the
// handshake and the row clearing are this design's choices.
module dta_llc
  import dta_pkg::*;
#(
  parameter int unsigned ADDR_W        = 64,
  parameter int unsigned CACHE_BYTES   = 1024 * 1024,
  parameter int unsigned LINE_BYTES    = 64,
  parameter int unsigned WAYS          = 16,
  parameter int unsigned MIDDLE_POS    = 7,
  parameter int unsigned LEADER_STRIDE = 32,
  parameter int unsigned NUM_SETS      = CACHE_BYTES / (LINE_BYTES * WAYS),
  parameter int unsigned IDX_W         = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1,
  parameter int unsigned OFS_W         = (LINE_BYTES > 1) ? $clog2(LINE_BYTES) : 1,
  parameter int unsigned TAG_W         = ADDR_W - IDX_W - OFS_W,
  parameter int unsigned RANK_W        = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int unsigned CNT_W         = (NUM_SETS > 2) ? $clog2(NUM_SETS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // request: one block address per access
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic [ADDR_W-1:0] req_addr_i,
  // response
  output logic              resp_valid_o,
  output logic              resp_hit_o,
  output logic [RANK_W-1:0] resp_way_o,         // way that hit or was filled
  output ins_pos_e          resp_ins_pos_o,     // insertion choice used on a miss
  output set_type_e         resp_set_type_o,    // role of the accessed set
  output logic              resp_evict_o,       // a valid block was replaced
  output logic [ADDR_W-1:0] resp_evict_addr_o,  // its line address
  // policy state, for observation
  output logic [CNT_W-1:0]  count1_o,
  output logic [CNT_W-1:0]  count2_o,
  output logic              switched_o,
  output logic              switch_event_o      // pulse: adaptive leaders change position
);

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [RANK_W-1:0] rank;
  } way_t;

  typedef way_t [WAYS-1:0] row_t;

  localparam int unsigned ROW_W = $bits(row_t);

  typedef enum logic [1:0] {ST_INIT, ST_IDLE, ST_LOOKUP} state_e;

  state_e            state_q;
  logic [IDX_W-1:0]  init_idx_q;
  logic [ADDR_W-1:OFS_W] line_q;
  logic [IDX_W-1:0]  idx_q;
  logic [TAG_W-1:0]  tag_q;

  row_t              rd_row, wr_row;
  logic              ram_rd_en, ram_wr_en;
  logic [IDX_W-1:0]  ram_wr_addr;
  logic [ROW_W-1:0]  ram_rd_data;

  logic [WAYS-1:0][RANK_W-1:0] ranks_cur, ranks_new;
  logic [WAYS-1:0]             valid_cur;
  logic                        hit;
  logic [RANK_W-1:0]           hit_way, victim_way, move_way, move_pos;
  set_type_e                   set_type;
  ins_pos_e                    ins_pos;
  logic                        miss_upd;

  initial begin
    assert (MIDDLE_POS > 0 && MIDDLE_POS < WAYS - 1)
      else $error("MIDDLE_POS must lie strictly inside the stack");
    assert (TAG_W > 0) else $error("address too narrow for this organisation");
  end

  assign req_ready_o = (state_q == ST_IDLE);
  assign ram_rd_en   = req_valid_i && req_ready_o;

  set_ram #(.DEPTH(NUM_SETS), .WIDTH(ROW_W)) u_set_ram (
    .clk       (clk),
    .rd_en_i   (ram_rd_en),
    .rd_addr_i (req_addr_i[OFS_W +: IDX_W]),
    .rd_data_o (ram_rd_data),
    .wr_en_i   (ram_wr_en),
    .wr_addr_i (ram_wr_addr),
    .wr_data_i (wr_row)
  );

  assign rd_row = row_t'(ram_rd_data);

  // tag compare
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      ranks_cur[w] = rd_row[w].rank;
      valid_cur[w] = rd_row[w].valid;
      if (rd_row[w].valid && rd_row[w].tag == tag_q) begin
        hit     = 1'b1;
        hit_way = RANK_W'(w);
      end
    end
  end

  set_type_decoder #(.NUM_SETS(NUM_SETS), .LEADER_STRIDE(LEADER_STRIDE)) u_set_type (
    .set_idx_i  (idx_q),
    .set_type_o (set_type)
  );

  assign miss_upd = (state_q == ST_LOOKUP) && !hit;

  dta_insert_policy #(.NUM_SETS(NUM_SETS), .CNT_W(CNT_W)) u_policy (
    .clk             (clk),
    .rst_n           (rst_n),
    .set_type_i      (set_type),
    .ins_pos_o       (ins_pos),
    .miss_i          (miss_upd),
    .miss_set_type_i (set_type),
    .count1_o        (count1_o),
    .count2_o        (count2_o),
    .switched_o      (switched_o),
    .switch_event_o  (switch_event_o)
  );

  assign move_way = hit ? hit_way : victim_way;
  assign move_pos = hit ? RANK_W'(WAYS - 1) : RANK_W'(ins_stack_pos(ins_pos, WAYS, MIDDLE_POS));

  lru_stack_update #(.WAYS(WAYS), .RANK_W(RANK_W)) u_stack (
    .ranks_i      (ranks_cur),
    .valid_i      (valid_cur),
    .move_way_i   (move_way),
    .move_pos_i   (move_pos),
    .ranks_o      (ranks_new),
    .victim_way_o (victim_way)
  );

  // row write: clearing after reset, or the updated set after a lookup
  always_comb begin
    ram_wr_en   = 1'b0;
    ram_wr_addr = idx_q;
    wr_row      = rd_row;
    if (state_q == ST_INIT) begin
      ram_wr_en   = 1'b1;
      ram_wr_addr = init_idx_q;
      for (int unsigned w = 0; w < WAYS; w++) begin
        wr_row[w].valid = 1'b0;
        wr_row[w].tag   = '0;
        wr_row[w].rank  = RANK_W'(w);
      end
    end else if (state_q == ST_LOOKUP) begin
      ram_wr_en = 1'b1;
      for (int unsigned w = 0; w < WAYS; w++) wr_row[w].rank = ranks_new[w];
      if (!hit) begin
        wr_row[victim_way].valid = 1'b1;
        wr_row[victim_way].tag   = tag_q;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q           <= ST_INIT;
      init_idx_q        <= '0;
      line_q            <= '0;
      resp_valid_o      <= 1'b0;
      resp_hit_o        <= 1'b0;
      resp_way_o        <= '0;
      resp_ins_pos_o    <= INS_MRU;
      resp_set_type_o   <= SET_FOLLOWER;
      resp_evict_o      <= 1'b0;
      resp_evict_addr_o <= '0;
    end else begin
      resp_valid_o <= 1'b0;
      unique case (state_q)
        ST_INIT: begin
          init_idx_q <= init_idx_q + IDX_W'(1);
          if (init_idx_q == IDX_W'(NUM_SETS - 1)) state_q <= ST_IDLE;
        end
        ST_IDLE: begin
          if (req_valid_i) begin
            line_q  <= req_addr_i[ADDR_W-1:OFS_W];
            state_q <= ST_LOOKUP;
          end
        end
        ST_LOOKUP: begin
          resp_valid_o      <= 1'b1;
          resp_hit_o        <= hit;
          resp_way_o        <= move_way;
          resp_ins_pos_o    <= ins_pos;
          resp_set_type_o   <= set_type;
          resp_evict_o      <= !hit && rd_row[victim_way].valid;
          resp_evict_addr_o <= {rd_row[victim_way].tag, idx_q, OFS_W'(0)};
          state_q           <= ST_IDLE;
        end
        default: state_q <= ST_INIT;
      endcase
    end
  end

  assign idx_q = line_q[OFS_W +: IDX_W];
  assign tag_q = line_q[ADDR_W-1 -: TAG_W];

  // The ranks of a set are a permutation of 0..WAYS-1.
  function automatic logic ranks_are_permutation(logic [WAYS-1:0][RANK_W-1:0] r);
    logic [WAYS-1:0] seen;
    seen = '0;
    for (int unsigned w = 0; w < WAYS; w++) seen[r[w]] = 1'b1;
    return &seen;
  endfunction

  // Protocol and state checks, sampled at the clock edge:
  //  * valid/ready: a request that was not accepted stays and keeps its address;
  //  * the ranks of the set being looked up are a permutation of 0..WAYS-1.
  logic              held_q;
  logic [ADDR_W-1:0] held_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q      <= 1'b0;
      held_addr_q <= '0;
    end else begin
      if (held_q)
        assert (req_valid_i && req_addr_i == held_addr_q)
          else $error("request dropped or changed while not accepted");
      if (state_q == ST_LOOKUP)
        assert (ranks_are_permutation(ranks_cur))
          else $error("recency stack of set %0d is not a permutation", idx_q);
      held_q      <= req_valid_i && !req_ready_o && state_q != ST_INIT;
      held_addr_q <= req_addr_i;
    end
  end

endmodule
