// address_counter: walks the bitstream storage addresses of one PRB.
//
// A one-cycle `start` loads base and clears the counters. While words
// remain, the counter issues one read per cycle (rd_req, rd_addr) as long as
// the words already requested but not yet returned, plus the words in the
// FIFO, leave room in the FIFO (credit-based flow control). Returned words
// (rd_ret) decrement the outstanding count. busy stays high until all
// PRB_WORDS words have been requested and returned. Peak rate: one word per
// clock. The word count per PRB and the credit scheme are this design's.
module address_counter #(
  parameter int unsigned ADDR_W     = 24,
  parameter int unsigned PRB_WORDS  = 1280,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned CNT_W     = $clog2(PRB_WORDS + 1),
  localparam int unsigned LVL_W     = $clog2(FIFO_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [LVL_W-1:0]  fifo_level,
  input  logic              rd_ret,
  output logic              rd_req,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              busy
);
  logic [CNT_W-1:0] issued, returned;
  logic [LVL_W:0]   inflight;

  always_comb begin
    inflight = (LVL_W+1)'(issued - returned);
    rd_req   = busy && (issued != CNT_W'(PRB_WORDS)) &&
               ((inflight + (LVL_W+1)'(fifo_level)) < (LVL_W+1)'(FIFO_DEPTH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      issued   <= '0;
      returned <= '0;
      rd_addr  <= '0;
    end else if (start) begin
      busy     <= 1'b1;
      issued   <= '0;
      returned <= '0;
      rd_addr  <= base;
    end else if (busy) begin
      if (rd_req) begin
        issued  <= issued + 1'b1;
        rd_addr <= rd_addr + 1'b1;
      end
      if (rd_ret) returned <= returned + 1'b1;
      if ((returned + CNT_W'(rd_ret)) == CNT_W'(PRB_WORDS)) busy <= 1'b0;
    end
  end
endmodule
