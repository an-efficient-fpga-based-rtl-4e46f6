// duplex_checker: detection logic of the generation-1 architecture, a duplex
// of two functional units with a CHECKER unit.
//
// Two comparators check FU1 and FU2 against the CHECKER word. If both
// disagree the checker is the faulty one (err_ch). If only FU1 disagrees,
// err1 is raised and the error-controlled multiplexer switches the output to
// FU2; if only FU2 disagrees err2 is raised. err_voter and err_route are
// constant zero in this generation. Combinational.
//
// The structure (two comparators, three AND gates, output multiplexer steered
// by err1) follows the document; the inversion of err_ch at the err1/err2
// gates is this design's reading, since otherwise err1 would copy err_ch.
module duplex_checker #(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] fu1,
  input  logic [DATA_W-1:0] chk,      // CHECKER unit word
  input  logic [DATA_W-1:0] fu2,
  output logic [DATA_W-1:0] out,
  output logic              err1,
  output logic              err_ch,
  output logic              err2
);
  logic cmp1, cmp2;
  always_comb begin
    cmp1   = (fu1 != chk);
    cmp2   = (fu2 != chk);
    err_ch = cmp1 & cmp2;
    err1   = cmp1 & ~err_ch;
    err2   = cmp2 & ~err_ch;
    out    = err1 ? fu2 : fu1;
  end
endmodule
