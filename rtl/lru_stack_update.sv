// lru_stack_update: recency-stack arithmetic of one cache set (purely combinational).
//
// Every way of a set holds a stack position ("rank") from 0 (LRU end) to WAYS-1 (MRU end);
// the ranks of a set are always a permutation of 0..WAYS-1. One operation serves both uses
// of the stack:
//   * move way `move_way_i` to rank `move_pos_i`. Ways whose rank lies between the old and
//     the new rank shift by one toward the vacated rank, so the ranks stay a permutation.
//     A hit moves the way to WAYS-1 (MRU promotion, as in LRU). A fill moves the victim way
//     to the insertion position chosen by the policy (LRU end, middle or MRU end).
//   * the victim of a miss: the lowest-numbered invalid way if there is one, otherwise the
//     way at rank 0, the LRU end of the stack.
// Interface: ranks_i/valid_i are the set's current state, ranks_o the state after the move.
// Timing: no clock; the caller registers ranks_o.
// The stack, its LRU/MRU ends and insertion into an arbitrary stack position follow the
// described policy; preferring invalid ways as victims is this design's choice.
module lru_stack_update #(
  parameter int unsigned WAYS   = 16,
  parameter int unsigned RANK_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0][RANK_W-1:0] ranks_i,
  input  logic [WAYS-1:0]             valid_i,
  input  logic [RANK_W-1:0]           move_way_i,
  input  logic [RANK_W-1:0]           move_pos_i,
  output logic [WAYS-1:0][RANK_W-1:0] ranks_o,
  output logic [RANK_W-1:0]           victim_way_o
);

  logic [RANK_W-1:0] old_rank;

  assign old_rank = ranks_i[move_way_i];

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      ranks_o[w] = ranks_i[w];
      if (RANK_W'(w) == move_way_i) begin
        ranks_o[w] = move_pos_i;
      end else if (old_rank < move_pos_i) begin
        // moving up: ranks in (old, new] slide down by one
        if (ranks_i[w] > old_rank && ranks_i[w] <= move_pos_i)
          ranks_o[w] = ranks_i[w] - RANK_W'(1);
      end else if (old_rank > move_pos_i) begin
        // moving down: ranks in [new, old) slide up by one
        if (ranks_i[w] >= move_pos_i && ranks_i[w] < old_rank)
          ranks_o[w] = ranks_i[w] + RANK_W'(1);
      end
    end
  end

  always_comb begin
    logic found;
    found        = 1'b0;
    victim_way_o = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!found && !valid_i[w]) begin
        victim_way_o = RANK_W'(w);
        found        = 1'b1;
      end
    end
    if (!found) begin
      for (int unsigned w = 0; w < WAYS; w++) begin
        if (ranks_i[w] == '0) victim_way_o = RANK_W'(w);
      end
    end
  end

endmodule
