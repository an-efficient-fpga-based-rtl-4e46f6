// error_encoder: priority encoder from a PRM error vector to the index of
// the faulty PRM (lowest set bit). valid is low for an all-zero vector.
// Combinational. The priority order is this design's choice.
module error_encoder #(
  parameter int unsigned PRM_COUNT = 5,
  localparam int unsigned IDX_W    = (PRM_COUNT > 1) ? $clog2(PRM_COUNT) : 1
) (
  input  logic [PRM_COUNT-1:0] vec,
  output logic [IDX_W-1:0]     idx,
  output logic                 valid
);
  always_comb begin
    idx   = '0;
    valid = 1'b0;
    for (int k = int'(PRM_COUNT) - 1; k >= 0; k--)
      if (vec[k]) begin
        idx   = IDX_W'(k);
        valid = 1'b1;
      end
  end
endmodule
