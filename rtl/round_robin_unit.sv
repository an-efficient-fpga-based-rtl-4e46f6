// round_robin_unit: picks the next FT architecture with pending errors.
//
// req[a] is set when FT architecture a has a non-zero entry in the actual
// error register. The unit searches cyclically from the architecture after
// the one served last, so a repeatedly failing architecture cannot starve
// the others. grant/valid are combinational; `advance` (one cycle, at the
// end of a mitigation cycle) records adv_ft as the one served last.
// Round-robin order is the document's; the search start is this design's.
module round_robin_unit #(
  parameter int unsigned FT_COUNT = 32,
  localparam int unsigned FT_W    = (FT_COUNT > 1) ? $clog2(FT_COUNT) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [FT_COUNT-1:0] req,
  input  logic                advance,
  input  logic [FT_W-1:0]     adv_ft,
  output logic [FT_W-1:0]     grant,
  output logic                valid
);
  logic [FT_W-1:0] last;

  always_comb begin
    grant = '0;
    valid = 1'b0;
    for (int i = int'(FT_COUNT); i >= 1; i--)
      if (req[(int'(last) + i) % int'(FT_COUNT)]) begin
        grant = FT_W'((int'(last) + i) % int'(FT_COUNT));
        valid = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                last <= FT_W'(FT_COUNT - 1);
    else if (advance)          last <= adv_ft;
endmodule
