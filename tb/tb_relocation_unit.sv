// tb_relocation_unit: a word stream with several FAR write headers, random
// gaps and a restart; words after a header must come out with the offset
// added, all others unchanged, one cycle later.
module tb_relocation_unit;
  logic clk = 0, rst_n = 0, restart, in_valid, out_valid, relocated;
  logic [31:0] offset, in_data, out_data;
  logic [31:0] expq[$];
  int checks = 0, failures = 0, nrel = 0;

  relocation_unit dut (.clk, .rst_n, .restart, .offset, .in_valid, .in_data, .out_valid, .out_data, .relocated);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (expq.size() == 0 || out_data !== expq[0]) begin failures++; $display("FAIL %h", out_data); end
      if (expq.size() != 0) void'(expq.pop_front());
    end
    if (relocated) nrel++;
  end

  initial begin
    logic prev_hdr;
    restart = 0; in_valid = 0; in_data = 0; offset = 32'h0000_1300;
    repeat (2) @(posedge clk); rst_n = 1;
    prev_hdr = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i == 200) begin restart = 1; in_valid = 0; prev_hdr = 0; offset = 32'h0000_0200; @(negedge clk); restart = 0; end
      in_valid = ($urandom % 4 != 0);
      in_data  = ($urandom % 10 == 0) ? gpdrc_pkg::CFG_FAR_WRITE : $urandom;
      if (in_valid) begin
        expq.push_back(prev_hdr ? in_data + offset : in_data);
        prev_hdr = (in_data == gpdrc_pkg::CFG_FAR_WRITE);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0 || nrel == 0) begin failures++; $display("FAIL leftover %0d / relocations %0d", expq.size(), nrel); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
