// tb_lru_stack_update: self-checking test of the recency-stack arithmetic.
//
// Random permutations of ranks, random valid masks and random moves are applied; the
// expected result comes from an ordered-list model (stack[pos] = way): the moved way is
// taken out of the list and put back at its new position, and ranks are read off the list.
// The victim is checked against "first invalid way, else the way at the LRU end".
// Directed cases cover a hit promotion to MRU and fills at the LRU end, middle (7) and MRU.
module tb_lru_stack_update;
  localparam int unsigned WAYS = 16;
  localparam int unsigned RW   = 4;

  logic [WAYS-1:0][RW-1:0] ranks_i, ranks_o;
  logic [WAYS-1:0]         valid_i;
  logic [RW-1:0]           move_way, move_pos, victim;
  int checks = 0, failures = 0;

  lru_stack_update #(.WAYS(WAYS)) dut (
    .ranks_i(ranks_i), .valid_i(valid_i), .move_way_i(move_way), .move_pos_i(move_pos),
    .ranks_o(ranks_o), .victim_way_o(victim)
  );

  int stack [WAYS];

  task automatic random_perm();
    int tmp, j;
    for (int i = 0; i < WAYS; i++) stack[i] = i;
    for (int i = WAYS - 1; i > 0; i--) begin
      j = int'($urandom_range(i, 0));
      tmp = stack[i]; stack[i] = stack[j]; stack[j] = tmp;
    end
    for (int p = 0; p < WAYS; p++) ranks_i[stack[p]] = RW'(p);
  endtask

  task automatic check_case(int way, int pos);
    int lst [$];
    int exp_rank [WAYS];
    int exp_victim;
    move_way = RW'(way);
    move_pos = RW'(pos);
    #1;
    for (int p = 0; p < WAYS; p++) if (stack[p] != way) lst.push_back(stack[p]);
    lst.insert(pos, way);
    for (int p = 0; p < WAYS; p++) exp_rank[lst[p]] = p;
    for (int w = 0; w < WAYS; w++) begin
      checks++;
      if (int'(ranks_o[w]) != exp_rank[w]) begin
        failures++;
        $display("FAIL move way %0d to %0d: way %0d rank %0d expected %0d",
                 way, pos, w, ranks_o[w], exp_rank[w]);
      end
    end
    exp_victim = stack[0];
    for (int w = WAYS - 1; w >= 0; w--) if (!valid_i[w]) exp_victim = w;
    checks++;
    if (int'(victim) != exp_victim) begin
      failures++;
      $display("FAIL victim %0d expected %0d", victim, exp_victim);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: all valid, identity ranks, the four moves of the policy
    for (int p = 0; p < WAYS; p++) begin stack[p] = p; ranks_i[p] = RW'(p); end
    valid_i = '1;
    check_case(3, WAYS - 1);   // hit promotion
    check_case(0, 0);          // fill at LRU end (victim stays)
    check_case(0, 7);          // fill at middle
    check_case(0, WAYS - 1);   // fill at MRU end
    // random
    for (int n = 0; n < 3000; n++) begin
      random_perm();
      valid_i = ($urandom_range(3, 0) == 0) ? WAYS'($urandom) : '1;
      check_case(int'($urandom_range(WAYS - 1, 0)), int'($urandom_range(WAYS - 1, 0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
