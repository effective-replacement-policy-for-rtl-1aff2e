// set_ram: set-indexed state memory of the cache, one row per set.
//
// A row holds everything the replacement logic needs about one set: for each way a valid
// bit, the tag and the recency-stack rank. It is a simple dual-port memory with one
// synchronous read port and one write port that writes a whole row, as an SRAM macro would;
// it has no reset, so the cache controller clears it row by row after reset. A read and a
// write of the same row in the same cycle return the old row.
// Interface: rd_en_i/rd_addr_i -> rd_data_o one clock later; wr_en_i/wr_addr_i/wr_data_i
// write at the clock edge. The document gives only the cache's organisation (sets and ways);
// the row layout and the port structure are this design's choice.
module set_ram #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned WIDTH  = 848,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rd_en_i,
  input  logic [ADDR_W-1:0] rd_addr_i,
  output logic [WIDTH-1:0]  rd_data_o,
  input  logic              wr_en_i,
  input  logic [ADDR_W-1:0] wr_addr_i,
  input  logic [WIDTH-1:0]  wr_data_i
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en_i) rd_data_o <= mem[rd_addr_i];
    if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
  end

endmodule
