// dta_pkg: types and constants shared by the last-level-cache replacement blocks.
//
// The cache keeps, per set, a recency stack ("LRU stack") with one position per way:
// position 0 is the LRU end, position WAYS-1 the MRU end. A missing block is inserted at one
// of three stack positions chosen by a two-level set-dueling decision tree: the LRU end,
// the middle, or the MRU end. Sets are split into followers and three kinds of leader sets.
// The three positions and the four set types follow the reduced decision tree this design
// implements; the encodings are this design's own choice.
package dta_pkg;

  // Where a newly filled block enters the recency stack.
  typedef enum logic [1:0] {
    INS_LRU    = 2'd0,   // stack position 0
    INS_MIDDLE = 2'd1,   // stack position MIDDLE_POS
    INS_MRU    = 2'd2    // stack position WAYS-1
  } ins_pos_e;

  // Role of a set in the set-dueling scheme.
  typedef enum logic [1:0] {
    SET_FOLLOWER = 2'd0, // setType0: uses the winning policy
    SET_LDR_MID  = 2'd1, // setType1: leader, always inserts at the middle
    SET_LDR_MRU  = 2'd2, // setType2: leader, always inserts at MRU (classic LRU policy)
    SET_LDR_ADPT = 2'd3  // setType3: leader, inserts at LRU or MRU as tracked by "switched"
  } set_type_e;

  // Maps an insertion choice to a stack position of a WAYS-way set.
  function automatic int unsigned ins_stack_pos(ins_pos_e p, int unsigned ways,
                                                int unsigned middle_pos);
    case (p)
      INS_LRU:    return 0;
      INS_MIDDLE: return middle_pos;
      default:    return ways - 1;
    endcase
  endfunction

endpackage
