// tb_round_robin_unit: random request sets; the grant must be the first
// requester after the last served architecture, cyclically. With all
// requests held, serving in turn must visit every architecture in order.
module tb_round_robin_unit;
  localparam int FT = 6;
  logic clk = 0, rst_n = 0, advance, valid;
  logic [FT-1:0] req;
  logic [2:0] grant, adv_ft;
  int last = FT - 1;
  int checks = 0, failures = 0;

  round_robin_unit #(.FT_COUNT(FT)) dut (.clk, .rst_n, .req, .advance, .adv_ft, .grant, .valid);
  always #5 clk = ~clk;

  initial begin
    advance = 0; adv_ft = 0; req = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // all requesting: 0,1,2,...,5,0
    req = '1;
    for (int i = 0; i < 2 * FT; i++) begin
      @(negedge clk); #1; checks++;
      if (!valid || grant !== 3'(i % FT)) begin failures++; $display("FAIL order %0d got %0d", i, grant); end
      advance = 1; adv_ft = grant; last = int'(grant);
      @(negedge clk); advance = 0;
    end
    for (int i = 0; i < 300; i++) begin
      int e;
      @(negedge clk);
      req = FT'($urandom);
      #1;
      e = -1;
      for (int j = 1; j <= FT; j++) if (e < 0 && req[(last + j) % FT]) e = (last + j) % FT;
      checks++;
      if (valid !== (e >= 0) || (e >= 0 && grant !== 3'(e))) begin failures++; $display("FAIL req %b last %0d grant %0d", req, last, grant); end
      if (valid && $urandom % 2) begin advance = 1; adv_ft = grant; last = int'(grant); end
      @(negedge clk); advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
