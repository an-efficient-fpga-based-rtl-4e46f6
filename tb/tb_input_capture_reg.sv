// tb_input_capture_reg: random one-cycle error pulses and masks; a
// testbench shadow register accumulates unmasked pulses and is compared
// with cap_next every cycle; `take` empties both.
module tb_input_capture_reg;
  localparam int FT = 4, P = 5;
  logic clk = 0, rst_n = 0, take;
  logic [FT-1:0][P-1:0] err_in, cap_next, shadow;
  logic [FT-1:0] mask;
  int checks = 0, failures = 0;

  input_capture_reg #(.FT_COUNT(FT), .PRM_COUNT(P)) dut (.clk, .rst_n, .err_in, .mask, .take, .cap_next);
  always #5 clk = ~clk;

  initial begin
    err_in = '0; mask = '0; take = 0; shadow = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      err_in = ($urandom % 4 == 0) ? (FT*P)'($urandom) : '0;
      mask   = FT'($urandom);
      take   = ($urandom % 8 == 0);
      #1;
      for (int a = 0; a < FT; a++) if (!mask[a]) shadow[a] |= err_in[a];
      checks++;
      if (cap_next !== shadow) begin failures++; $display("FAIL cycle %0d", i); end
      if (take) shadow = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
