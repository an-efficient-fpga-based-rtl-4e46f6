// actual_error_reg: error vectors waiting for, or under, mitigation.
//
// When `load` is high the captured vectors are ORed in. When `clr` is high
// the entry of FT architecture clr_ft is cleared (its mitigation cycle has
// ended); a clear and a load in the same cycle apply the clear first.
// Registered, one cycle latency.
module actual_error_reg #(
  parameter int unsigned FT_COUNT  = 32,
  parameter int unsigned PRM_COUNT = 5,
  localparam int unsigned FT_W     = (FT_COUNT > 1) ? $clog2(FT_COUNT) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 load,
  input  logic [FT_COUNT-1:0][PRM_COUNT-1:0]   load_vec,
  input  logic                                 clr,
  input  logic [FT_W-1:0]                      clr_ft,
  output logic [FT_COUNT-1:0][PRM_COUNT-1:0]   actual
);
  logic [FT_COUNT-1:0][PRM_COUNT-1:0] nxt;

  always_comb
    for (int a = 0; a < int'(FT_COUNT); a++)
      nxt[a] = ((clr && clr_ft == FT_W'(a)) ? '0 : actual[a]) | (load ? load_vec[a] : '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) actual <= '0;
    else        actual <= nxt;
endmodule
