// set_type_decoder: assigns each cache set its role in the set-dueling scheme.
//
// The replacement policy needs three groups of leader sets, each with a fixed insertion
// behaviour (middle, MRU, adaptive), and treats all other sets as followers that use the
// winning policy. Leaders are picked by the low index bits: within every block of
// LEADER_STRIDE consecutive sets, offset 0 is a middle leader, offset 1 an MRU leader and
// offset 2 an adaptive leader. With 1024 sets and a stride of 32 that gives 32 leaders of each
// kind. The four set types come from the described policy; the selection rule and the stride
// are this design's choice.
// Interface: set_idx_i in, set_type_o out. Timing: combinational.
module set_type_decoder
  import dta_pkg::*;
#(
  parameter int unsigned NUM_SETS      = 1024,
  parameter int unsigned LEADER_STRIDE = 32,
  parameter int unsigned IDX_W         = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1
) (
  input  logic [IDX_W-1:0] set_idx_i,
  output set_type_e        set_type_o
);

  localparam int unsigned OFS_W = (LEADER_STRIDE > 1) ? $clog2(LEADER_STRIDE) : 1;

  logic [OFS_W-1:0] ofs;

  initial begin
    assert (LEADER_STRIDE >= 4 && (LEADER_STRIDE & (LEADER_STRIDE - 1)) == 0)
      else $error("LEADER_STRIDE must be a power of two of at least 4");
    assert (NUM_SETS >= LEADER_STRIDE)
      else $error("NUM_SETS must be at least LEADER_STRIDE");
  end

  assign ofs = OFS_W'(set_idx_i);

  always_comb begin
    unique case (ofs)
      OFS_W'(0): set_type_o = SET_LDR_MID;
      OFS_W'(1): set_type_o = SET_LDR_MRU;
      OFS_W'(2): set_type_o = SET_LDR_ADPT;
      default:   set_type_o = SET_FOLLOWER;
    endcase
  end

endmodule
