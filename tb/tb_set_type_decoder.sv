// tb_set_type_decoder: checks the role of every set of a 1024-set cache against the rule
// "offset 0/1/2 within each block of 32 sets is a middle/MRU/adaptive leader, the rest
// follow", and that each kind of leader occurs 32 times.
module tb_set_type_decoder;
  import dta_pkg::*;
  logic [9:0] idx;
  set_type_e  st;
  int checks = 0, failures = 0;
  int cnt [4];

  set_type_decoder dut (.set_idx_i(idx), .set_type_o(st));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_type_e exp;
    cnt = '{default: 0};
    for (int s = 0; s < 1024; s++) begin
      idx = 10'(s);
      #1;
      case (s % 32)
        0:       exp = SET_LDR_MID;
        1:       exp = SET_LDR_MRU;
        2:       exp = SET_LDR_ADPT;
        default: exp = SET_FOLLOWER;
      endcase
      cnt[int'(st)]++;
      checks++;
      if (st != exp) begin
        failures++;
        $display("FAIL set %0d type %0d expected %0d", s, st, exp);
      end
    end
    checks++;
    if (cnt[1] != 32 || cnt[2] != 32 || cnt[3] != 32 || cnt[0] != 1024 - 96) begin
      failures++;
      $display("FAIL leader counts %0d %0d %0d %0d", cnt[0], cnt[1], cnt[2], cnt[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
