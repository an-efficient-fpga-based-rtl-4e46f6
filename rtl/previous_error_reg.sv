// previous_error_reg: for each FT architecture, the PRM that its previous
// mitigation cycle repaired (one bit per PRM).
//
// Written by the controller at the end of a decision: with the bit of the
// PRM it repairs after a transient fault, with zero after a change of
// generation.
// A PRM whose bit is set here and again in the next cycle of the same FT
// architecture is judged permanently faulty. Registered write, read is the
// registered array.
module previous_error_reg #(
  parameter int unsigned FT_COUNT  = 32,
  parameter int unsigned PRM_COUNT = 5,
  localparam int unsigned FT_W     = (FT_COUNT > 1) ? $clog2(FT_COUNT) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 we,
  input  logic [FT_W-1:0]                      wr_ft,
  input  logic [PRM_COUNT-1:0]                 wr_vec,
  output logic [FT_COUNT-1:0][PRM_COUNT-1:0]   previous
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  previous <= '0;
    else if (we) previous[wr_ft] <= wr_vec;
endmodule
