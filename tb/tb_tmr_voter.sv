// tb_tmr_voter: random and directed words; the majority and the per-unit
// disagreement flags are recomputed bit by bit in the testbench.
module tb_tmr_voter;
  localparam int W = 16;
  logic [W-1:0] a, b, c, out;
  logic [2:0]   fe;
  int checks = 0, failures = 0;

  tmr_voter #(.DATA_W(W)) dut (.fu1(a), .fu2(b), .fu3(c), .out, .fu_err(fe));

  task automatic apply(input logic [W-1:0] x, y, z);
    logic [W-1:0] m;
    a = x; b = y; c = z; #1;
    for (int i = 0; i < W; i++) m[i] = (int'(x[i]) + int'(y[i]) + int'(z[i])) >= 2;
    checks++;
    if (out !== m || fe !== {z != m, y != m, x != m}) begin
      failures++;
      $display("FAIL %h %h %h -> %h %b", x, y, z, out, fe);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply(16'h1234, 16'h1234, 16'hFFFF);   // unit 3 wrong
    apply(16'h00FF, 16'h0F0F, 16'h0F0F);   // unit 1 wrong
    apply(16'hAAAA, 16'h5555, 16'hAAAA);   // unit 2 wrong
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      case (i % 4)
        0: apply(v, v, v);
        1: apply(v ^ W'($urandom), v, v);
        2: apply(v, v ^ W'(1 << (i % W)), v);
        default: apply(W'($urandom), W'($urandom), W'($urandom));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
