// prm_voter: the generation-0 PRM_VOTER, a TMR voter built as a duplex so
// that faults of the voter itself are detected.
//
// Two identical tmr_voter copies (A and B) vote over the three functional
// units. A comparator per unit ("amp" in the structure) checks that both
// copies raise the same FUi_err flag; any mismatch, or a mismatch of the two
// voted words, raises err_voter. errN is raised when both copies flag unit N.
// out is taken from copy A. Combinational.
//
// seu_b models an upset in the configuration memory of copy B: it inverts
// copy B's flags and voted word, which is how the fault-injection test
// platform reaches the voter PRM. The comparison of the voted words and the
// two-input AND for errN are this design's reading of the structure.
module prm_voter #(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] fu1,
  input  logic [DATA_W-1:0] fu2,
  input  logic [DATA_W-1:0] fu3,
  input  logic              seu_b,
  output logic [DATA_W-1:0] out,
  output logic [2:0]        err,        // err1..err3 -> bit 0..2
  output logic              err_voter
);
  logic [DATA_W-1:0] out_a, out_b_raw, out_b;
  logic [2:0]        fe_a, fe_b_raw, fe_b, amp;

  tmr_voter #(.DATA_W(DATA_W)) u_voter_a (.fu1, .fu2, .fu3, .out(out_a),     .fu_err(fe_a));
  tmr_voter #(.DATA_W(DATA_W)) u_voter_b (.fu1, .fu2, .fu3, .out(out_b_raw), .fu_err(fe_b_raw));

  always_comb begin
    out_b     = seu_b ? ~out_b_raw : out_b_raw;
    fe_b      = seu_b ? ~fe_b_raw  : fe_b_raw;
    amp       = fe_a ^ fe_b;
    err_voter = (|amp) | (out_a != out_b);
    err       = fe_a & fe_b;
    out       = out_a;
  end
endmodule
