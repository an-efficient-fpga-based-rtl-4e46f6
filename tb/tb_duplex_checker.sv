// tb_duplex_checker: generation-1 detection. A wrong FU1 must raise err1
// and switch the output to FU2; a wrong FU2 raises err2; a wrong checker
// raises err_ch only; the output is always the correct word.
module tb_duplex_checker;
  localparam int W = 12;
  logic [W-1:0] f1, ch, f2, out;
  logic e1, ech, e2;
  int checks = 0, failures = 0;

  duplex_checker #(.DATA_W(W)) dut (.fu1(f1), .chk(ch), .fu2(f2), .out, .err1(e1), .err_ch(ech), .err2(e2));

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [W-1:0] v, d;
      int u;
      v = W'($urandom); d = W'($urandom) | 12'h001; u = i % 4;
      f1 = v; ch = v; f2 = v;
      if (u == 1) f1 = v ^ d;
      if (u == 2) ch = v ^ d;
      if (u == 3) f2 = v ^ d;
      #1; checks++;
      if (out !== v || e1 !== (u == 1) || ech !== (u == 2) || e2 !== (u == 3)) begin
        failures++; $display("FAIL case %0d: out=%h e1=%b ech=%b e2=%b", u, out, e1, ech, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
