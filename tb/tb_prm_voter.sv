// tb_prm_voter: generation-0 voter PRM. With a healthy voter, a single
// faulty unit must be masked and flagged on errN only; with an upset in the
// second voter copy, err_voter must rise and the output stay correct.
module tb_prm_voter;
  localparam int W = 8;
  logic [W-1:0] a, b, c, out;
  logic [2:0]   err;
  logic         seu, ev;
  int checks = 0, failures = 0;

  prm_voter #(.DATA_W(W)) dut (.fu1(a), .fu2(b), .fu3(c), .seu_b(seu), .out, .err, .err_voter(ev));

  task automatic chk(input logic [W-1:0] eo, input logic [2:0] ee, input logic eev, input string s);
    #1; checks++;
    if (out !== eo || err !== ee || ev !== eev) begin
      failures++; $display("FAIL %s: out=%h err=%b ev=%b", s, out, err, ev);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] v, d;
      int u;
      v = W'($urandom); d = W'($urandom) | 8'h01; u = i % 4;
      seu = 1'b0;
      a = v; b = v; c = v;
      if (u == 1) a = v ^ d;
      if (u == 2) b = v ^ d;
      if (u == 3) c = v ^ d;
      chk(v, (u == 0) ? 3'b000 : 3'(1 << (u - 1)), 1'b0, "single unit fault");
      seu = 1'b1;
      chk(v, (u == 0) ? 3'b000 : 3'(1 << (u - 1)) & 3'b000, 1'b1, "voter copy upset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
