// bitstream_fifo: synchronous first-in first-out buffer between the
// bitstream fetch path and the ICAP wrapper.
//
// Show-ahead: dout is the oldest word while !empty; `pop` removes it. A push
// and a pop in the same cycle are both served. level counts the stored words
// and feeds the address counter's flow control. Pushing when full or popping
// when empty is a protocol error (assertions). Depth is this design's choice.
module bitstream_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LVL_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [W-1:0]     din,
  input  logic             pop,
  output logic [W-1:0]     dout,
  output logic             empty,
  output logic             full,
  output logic [LVL_W-1:0] level
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_comb begin
    empty = (level == '0);
    full  = (level == LVL_W'(DEPTH));
    dout  = mem[rp];
  end

  always_ff @(posedge clk) if (push) mem[wp] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + LVL_W'(push) - LVL_W'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
