// tmr_voter: bitwise two-out-of-three majority voter of a triple modular
// redundant (TMR) stage, with one disagreement flag per functional unit.
//
// out is the bitwise majority of fu1..fu3. fu_err[i] is set when unit i's
// word differs from the voted word, so a single faulty unit is both masked
// and localised. Purely combinational. The voter and its FU_err outputs are
// those of the generation-0 architecture; computing the flags as "differs
// from the majority" is this design's choice.
module tmr_voter #(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] fu1,
  input  logic [DATA_W-1:0] fu2,
  input  logic [DATA_W-1:0] fu3,
  output logic [DATA_W-1:0] out,
  output logic [2:0]        fu_err
);
  always_comb begin
    out       = (fu1 & fu2) | (fu1 & fu3) | (fu2 & fu3);
    fu_err[0] = (fu1 != out);
    fu_err[1] = (fu2 != out);
    fu_err[2] = (fu3 != out);
  end
endmodule
