// tb_bitstream_fifo: random push/pop traffic that respects full/empty,
// checked against a queue; level, empty and full are checked every cycle,
// and the FIFO is filled to full once.
module tb_bitstream_fifo;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, push, pop, empty, full;
  logic [31:0] din, dout;
  logic [3:0] level;
  logic [31:0] q[$];
  int checks = 0, failures = 0, saw_full = 0;

  bitstream_fifo #(.W(32), .DEPTH(D)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .level);
  always #5 clk = ~clk;

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (level !== 4'(q.size()) || empty !== (q.size() == 0) || full !== (q.size() == D)) begin
        failures++; $display("FAIL level %0d vs %0d", level, q.size());
      end
      if (full) saw_full++;
      pop  = !empty && ($urandom % ((i < 1000) ? 3 : 1) == 0);
      push = (!full || pop) && ($urandom % 2 == 0);
      din  = $urandom;
      if (pop) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL data %h vs %h", dout, q[0]); end
        void'(q.pop_front());
      end
      if (push) q.push_back(din);
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
