// tb_config_luts: for every architecture, PRR and the five configuration
// codes of generations 0 and 1, the PRM type, PRB start address and frame
// address offset are compared with values written out by hand from the
// layout rules (generation 0: PRR1 voter, PRR2..4 FU; generation 1: FU,
// CHECKER, FU in the assigned PRRs; slots FU 0, VOTER 1, CHECKER 2, route
// 3 + dropped PRR).
module tb_config_luts;
  import gpdrc_pkg::*;
  localparam int FT = 4, N = 100;
  logic [1:0] ft;
  logic [2:0] prr;
  logic [4:0] code;
  prm_type_e  t;
  logic [15:0] addr;
  logic [31:0] off;
  int checks = 0, failures = 0;

  config_luts #(.FT_COUNT(FT), .PRM_COUNT(5), .ADDR_W(16), .PRB_WORDS(N), .FAR_BASE(32'h0040_0000),
                .FT_FAR_STRIDE(32'h1000), .PRR_FAR_STRIDE(32'h100)) dut (
    .ft, .prr, .code, .prm_type(t), .prb_addr(addr), .far_offset(off));

  // expected types, one string per code: type of PRR0..PRR4
  // R route, V voter, F FU, C checker, - empty
  localparam logic [4:0] CODES[5] = '{5'b11111, 5'b11101, 5'b11011, 5'b10111, 5'b01111};
  localparam string      TYPES[5] = '{"RVFFF", "R-FCF", "RF-CF", "RFC-F", "RFCF-"};
  localparam int         RSLOT[5] = '{3, 4, 5, 6, 7};

  initial begin
    for (int c = 0; c < 5; c++)
      for (int a = 0; a < FT; a++)
        for (int k = 0; k < 5; k++) begin
          prm_type_e et;
          int es;
          logic [31:0] eoff;
          byte ch;
          code = CODES[c]; ft = 2'(a); prr = 3'(k); #1;
          ch = TYPES[c][k];
          case (ch)
            "R": begin et = PRM_ROUTE; es = RSLOT[c]; end
            "V": begin et = PRM_VOTER; es = 1; end
            "C": begin et = PRM_CHECKER; es = 2; end
            "F": begin et = PRM_FU; es = 0; end
            default: begin et = PRM_EMPTY; es = 0; end
          endcase
          eoff = 32'(a) * 32'h1000 + 32'(k) * 32'h100 - ((k == 0) ? 32'h0 : 32'h100);
          checks++;
          if (t !== et || (et != PRM_EMPTY && addr !== 16'(es * N)) || off !== eoff) begin
            failures++; $display("FAIL code %b ft %0d prr %0d: %s %0d %h", code, a, k, t.name(), addr, off);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
