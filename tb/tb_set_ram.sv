// tb_set_ram: random writes and synchronous reads of the set memory, compared with a
// shadow array; checks the one-cycle read latency and that a read colliding with a write
// to the same row returns the old row.
module tb_set_ram;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned WIDTH = 96;
  logic clk = 0;
  logic rd_en, wr_en;
  logic [5:0] rd_addr, wr_addr;
  logic [WIDTH-1:0] rd_data, wr_data;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] expect_q;
  logic             pend;
  int checks = 0, failures = 0;

  set_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0; pend = 0;
    // fill every row
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(a); wr_data = {$urandom, $urandom, $urandom};
      shadow[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("FAIL read %h expected %h", rd_data, expect_q);
        end
      end
      rd_en   = $urandom_range(1, 0) == 1;
      rd_addr = 6'($urandom);
      wr_en   = $urandom_range(1, 0) == 1;
      wr_addr = ($urandom_range(3, 0) == 0) ? rd_addr : 6'($urandom);
      wr_data = {$urandom, $urandom, $urandom};
      pend     = rd_en;
      expect_q = shadow[rd_addr];          // old contents, even on a collision
      @(posedge clk);
      if (wr_en) shadow[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
