// tb_icap_wrapper: a model FIFO with random fill; every word must reach the
// ICAP port in order, once, in the clock after it was popped, with csib = rdwrb = 0 and each byte bit-reversed.
module tb_icap_wrapper;
  logic clk = 0, rst_n = 0, fifo_empty, fifo_pop, csib, rdwrb, idle;
  logic [31:0] fifo_dout, icap_i;
  logic [31:0] q[$];
  int checks = 0, failures = 0;

  icap_wrapper dut (.clk, .rst_n, .fifo_empty, .fifo_dout, .fifo_pop, .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i, .idle);
  always #5 clk = ~clk;
  assign fifo_empty = (q.size() == 0);
  assign fifo_dout  = fifo_empty ? 32'h0 : q[0];

  function automatic logic [31:0] rev(input logic [31:0] w);
    return {<<8{ {<<{w}} }};
  endfunction

  // The model FIFO changes only at the falling edge, so the word the
  // wrapper popped at the rising edge is still q[0] here.
  always @(negedge clk) if (rst_n) begin
    if (!csib) begin
      checks++;
      if (rdwrb !== 1'b0 || q.size() == 0 || icap_i !== rev(q[0])) begin
        failures++; $display("FAIL icap %h", icap_i);
      end
      if (q.size() != 0) void'(q.pop_front());
    end
    if ($urandom % 2 == 0) q.push_back($urandom);
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (500) @(posedge clk);
    checks++;
    if (rev(32'h0102_0380) !== 32'h8040_C001) begin failures++; $display("FAIL reference swap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
