// memory_controller: connects the GPDRC's read requests to an external
// synchronous bitstream storage with a fixed read latency.
//
// A request (req, addr) is registered and driven to the storage as
// (mem_en, mem_addr). The storage returns the word STORAGE_LAT clocks after
// it sampled mem_en; the controller delays a valid flag by the same amount,
// registers the word and returns it as (rvalid, rdata). Fully pipelined: one
// request per clock, latency STORAGE_LAT + 2 clocks. The document only names
// the block and asks for a universal address/data/valid transfer; the fixed
// latency pipeline is this design's.
module memory_controller #(
  parameter int unsigned ADDR_W      = 24,
  parameter int unsigned STORAGE_LAT = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic [ADDR_W-1:0] addr,
  output logic              rvalid,
  output logic [31:0]       rdata,
  output logic              mem_en,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic [31:0]       mem_rdata
);
  logic [STORAGE_LAT-1:0] vpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_en   <= 1'b0;
      mem_addr <= '0;
      vpipe    <= '0;
      rvalid   <= 1'b0;
      rdata    <= '0;
    end else begin
      mem_en   <= req;
      if (req) mem_addr <= addr;
      vpipe    <= STORAGE_LAT'({vpipe, mem_en});
      rvalid   <= vpipe[STORAGE_LAT-1];
      if (vpipe[STORAGE_LAT-1]) rdata <= mem_rdata;
    end
  end
endmodule
