// tb_previous_error_reg: random writes to random entries, compared with a
// shadow array after every clock.
module tb_previous_error_reg;
  localparam int FT = 8, P = 5;
  logic clk = 0, rst_n = 0, we;
  logic [2:0] wr_ft;
  logic [P-1:0] wr_vec;
  logic [FT-1:0][P-1:0] previous, shadow;
  int checks = 0, failures = 0;

  previous_error_reg #(.FT_COUNT(FT), .PRM_COUNT(P)) dut (.clk, .rst_n, .we, .wr_ft, .wr_vec, .previous);
  always #5 clk = ~clk;

  initial begin
    we = 0; wr_ft = 0; wr_vec = 0; shadow = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    #1; checks++; if (previous !== '0) failures++;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = $urandom % 2; wr_ft = 3'($urandom); wr_vec = P'($urandom);
      if (we) shadow[wr_ft] = wr_vec;
      @(posedge clk); #1; checks++;
      if (previous !== shadow) begin failures++; $display("FAIL cycle %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
