// input_capture_reg: sticky capture of the PRM error vectors of all FT
// architectures at the GPDRC input.
//
// Each cycle the error vectors of the FT architectures that are not masked
// (under reconfiguration, waiting for synchronisation, or unrepairable) are
// ORed into the register, so a one-cycle error pulse is never lost while the
// controller is busy. cap_next is the register's next value; when `take` is
// high it is handed to the actual error register and the register clears.
// One cycle from input to cap_next's registered copy. The sticky OR is this
// design's reading of "Input register errors are stored in the error
// register while a GPDRC reconfiguration cycle runs".
module input_capture_reg #(
  parameter int unsigned FT_COUNT  = 32,
  parameter int unsigned PRM_COUNT = 5
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [FT_COUNT-1:0][PRM_COUNT-1:0]   err_in,
  input  logic [FT_COUNT-1:0]                  mask,
  input  logic                                 take,
  output logic [FT_COUNT-1:0][PRM_COUNT-1:0]   cap_next
);
  logic [FT_COUNT-1:0][PRM_COUNT-1:0] cap;

  always_comb
    for (int a = 0; a < int'(FT_COUNT); a++)
      cap_next[a] = cap[a] | (mask[a] ? '0 : err_in[a]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    cap <= '0;
    else if (take) cap <= '0;
    else           cap <= cap_next;
endmodule
