// tb_memory_controller: random read requests against a storage model with a
// 2-cycle latency; every returned word must match its address, in order,
// with latency STORAGE_LAT + 2 and one word per clock under back-to-back
// requests.
module tb_memory_controller;
  localparam int AW = 12, LAT = 2;
  logic clk = 0, rst_n = 0, req, rvalid, mem_en;
  logic [AW-1:0] addr, mem_addr;
  logic [31:0] rdata, mem_rdata, p0, p1;
  int exp_a[$];
  longint exp_t[$], cyc = 0;
  int checks = 0, failures = 0;

  memory_controller #(.ADDR_W(AW), .STORAGE_LAT(LAT)) dut (.clk, .rst_n, .req, .addr, .rvalid, .rdata,
    .mem_en, .mem_addr, .mem_rdata);
  always #5 clk = ~clk;
  // storage: word = address * 3 + 7, LAT cycles after the enable is sampled
  always @(posedge clk) begin
    if (mem_en) p0 <= 32'(mem_addr) * 3 + 7;
    p1 <= p0;
  end
  assign mem_rdata = p1;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (rvalid) begin
      checks++;
      if (exp_a.size() == 0 || rdata !== 32'(exp_a[0]) * 3 + 7 || cyc - exp_t[0] != LAT + 2) begin
        failures++; $display("FAIL data %h at %0d", rdata, cyc);
      end
      if (exp_a.size() != 0) begin void'(exp_a.pop_front()); void'(exp_t.pop_front()); end
    end
  end

  initial begin
    req = 0; addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      req = (i < 100) ? 1'b1 : ($urandom % 2 == 0);
      addr = AW'($urandom);
      if (req) begin exp_a.push_back(int'(addr)); exp_t.push_back(cyc); end
    end
    @(negedge clk); req = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (exp_a.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_a.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
