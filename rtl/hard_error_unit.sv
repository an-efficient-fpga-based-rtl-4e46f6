// hard_error_unit: decides whether a localised PRM fault is permanent.
//
// A fault is called permanent (hard) when the same PRM of the same FT
// architecture is flagged in the current mitigation cycle and was flagged in
// the previous one, i.e. it is detected twice in a row (the document: a flaw
// may be designated permanent "if it is identified twice"). prm_hard refers
// to the PRM at index idx, hard_vec to every PRM. Combinational.
module hard_error_unit #(
  parameter int unsigned PRM_COUNT = 5,
  localparam int unsigned IDX_W    = (PRM_COUNT > 1) ? $clog2(PRM_COUNT) : 1
) (
  input  logic [PRM_COUNT-1:0] act_vec,
  input  logic [PRM_COUNT-1:0] prev_vec,
  input  logic [IDX_W-1:0]     idx,
  output logic [PRM_COUNT-1:0] hard_vec,
  output logic                 prm_hard,
  output logic                 hard
);
  always_comb begin
    hard_vec = act_vec & prev_vec;
    prm_hard = hard_vec[idx];
    hard     = |hard_vec;
  end
endmodule
