// tb_actual_error_reg: random loads (OR) and per-architecture clears,
// compared with a shadow copy after every clock.
module tb_actual_error_reg;
  localparam int FT = 4, P = 5;
  logic clk = 0, rst_n = 0, load, clr;
  logic [1:0] clr_ft;
  logic [FT-1:0][P-1:0] load_vec, actual, shadow;
  int checks = 0, failures = 0;

  actual_error_reg #(.FT_COUNT(FT), .PRM_COUNT(P)) dut (.clk, .rst_n, .load, .load_vec, .clr, .clr_ft, .actual);
  always #5 clk = ~clk;

  initial begin
    load = 0; clr = 0; clr_ft = 0; load_vec = '0; shadow = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      load = $urandom % 2; load_vec = (FT*P)'($urandom) & (FT*P)'($urandom);
      clr = ($urandom % 3 == 0); clr_ft = 2'($urandom);
      if (clr) shadow[clr_ft] = '0;
      if (load) shadow |= load_vec;
      @(posedge clk); #1; checks++;
      if (actual !== shadow) begin failures++; $display("FAIL cycle %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
