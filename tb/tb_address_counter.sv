// tb_address_counter: fetches two PRBs through a 3-cycle read pipeline into
// a model FIFO that is drained at a random rate. Checks: consecutive
// addresses from base, exactly PRB_WORDS reads, never more words requested
// than the FIFO can take, busy until the last word returns, and one read per
// clock when the FIFO is drained every cycle.
module tb_address_counter;
  localparam int AW = 16, N = 40, D = 8;
  logic clk = 0, rst_n = 0, start, rd_ret, rd_req, busy;
  logic [AW-1:0] base, rd_addr;
  logic [3:0] fifo_level;
  logic [2:0] pipe;
  int fifo = 0, nreq, checks = 0, failures = 0;
  logic [AW-1:0] exp_addr;
  longint t0, t1;
  logic drain_all;

  address_counter #(.ADDR_W(AW), .PRB_WORDS(N), .FIFO_DEPTH(D)) dut (.clk, .rst_n, .start, .base,
    .fifo_level, .rd_ret, .rd_req, .rd_addr, .busy);
  always #5 clk = ~clk;
  assign rd_ret = pipe[2];
  assign fifo_level = 4'(fifo);

  always @(posedge clk) begin
    int pop;
    if (!rst_n) pipe <= '0;
    else begin
      pipe <= {pipe[1:0], rd_req};
      pop = (fifo > 0 && (drain_all || $urandom % 3 == 0)) ? 1 : 0;
      fifo <= fifo + int'(rd_ret) - pop;
      if (fifo + int'(rd_ret) > D) begin failures++; $display("FAIL FIFO overflow"); end
      if (rd_req) begin
        checks++;
        if (rd_addr !== exp_addr) begin failures++; $display("FAIL addr %h vs %h", rd_addr, exp_addr); end
        exp_addr <= exp_addr + 1'b1;
        nreq++;
      end
    end
  end

  task automatic run(input logic [AW-1:0] b, input logic all);
    drain_all = all;
    @(negedge clk); base = b; exp_addr = b; nreq = 0; start = 1;
    @(negedge clk); start = 0; t0 = $time;
    while (busy) @(negedge clk);
    t1 = $time;
    checks++;
    if (nreq != N) begin failures++; $display("FAIL %0d reads", nreq); end
    checks++;
    if (pipe != 0) begin failures++; $display("FAIL busy dropped with reads in flight"); end
  endtask

  initial begin
    start = 0; base = 0; fifo = 0; drain_all = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(16'h0100, 1'b0);
    run(16'h2000, 1'b1);
    checks++;
    if ((t1 - t0) / 10 > N + 5) begin failures++; $display("FAIL rate: %0d cycles for %0d words", (t1 - t0) / 10, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
