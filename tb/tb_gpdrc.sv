// tb_gpdrc: the controller on its own, two FT architectures, 16-word PRBs,
// a storage model answering two clocks after each request.
//  1. an error pulse on FT1/PRR3 -> one FU PRB written to ICAP, frame
//     address relocated to FT1/PRR3, rec_done[1] until sync_done;
//     an error arriving while rec_done is high is ignored;
//  2. the same PRM fails again -> hard; code 10111; route PRB of that
//     code, then FU, CHECKER, FU PRBs for PRR1, PRR2, PRR4;
//  3. another permanent fault in generation 1 -> fatal, nothing written.
module tb_gpdrc;
  import gpdrc_pkg::*;
  localparam int FT = 2, N = 16;
  localparam logic [31:0] FB = 32'h0040_0000, FS = 32'h1000, PS = 32'h100;
  logic clk = 0, rst_n = 0;
  logic [FT-1:0][4:0] ft_err, code;
  logic [FT-1:0] sync_done, rec_done, fatal_vec;
  logic hard, fatal, busy, permanent, relocated, rd_req, rd_valid, csib, rdwrb;
  logic [0:0] arch_index;
  logic [2:0] prm_error_index;
  prm_type_e job_type;
  logic [23:0] rd_addr;
  logic [31:0] rd_data, icap_i;
  logic [23:0] a1, a2;
  logic v1, v2;
  int checks = 0, failures = 0;
  int words = 0;
  int got_slot[$], got_prr[$], got_ft[$];
  logic [31:0] prev_w;

  gpdrc #(.FT_COUNT(FT), .PRM_COUNT(5), .PRB_WORDS(N), .FIFO_DEPTH(8)) dut (.clk, .rst_n, .ft_err,
    .sync_done, .rec_done, .code, .hard, .fatal, .fatal_vec, .arch_index, .prm_error_index, .busy,
    .permanent, .job_type, .relocated, .rd_req, .rd_addr, .rd_valid, .rd_data, .icap_csib(csib),
    .icap_rdwrb(rdwrb), .icap_i);
  always #5 clk = ~clk;

  // storage: word 3 of each PRB is its stored frame address, word 4 its slot
  function automatic logic [31:0] word_at(input int a);
    int s, i;
    s = a / N; i = a % N;
    if (i == 2) return CFG_FAR_WRITE;
    if (i == 3) return FB + ((s >= 3) ? 32'h0 : PS);
    if (i == 4) return 32'hC0DE_0000 | 32'(s);
    return 32'h1000_0000 | 32'(a);
  endfunction
  always @(posedge clk) begin
    v1 <= rd_req; a1 <= rd_addr; v2 <= v1; a2 <= a1;
  end
  assign rd_valid = v2;
  assign rd_data  = word_at(int'(a2));

  always @(posedge clk) if (rst_n && !csib) begin
    logic [31:0] w;
    w = {<<8{ {<<{icap_i}} }};
    if (words % N == 4) got_slot.push_back(int'(w[7:0]));
    if (words % N == 3) begin
      got_ft.push_back(int'((w - FB) / FS));
      got_prr.push_back(int'(((w - FB) % FS) / PS));
    end
    words++;
  end

  task automatic pulse(input int a, input logic [4:0] v);
    @(negedge clk); ft_err[a] = v; @(negedge clk); ft_err[a] = 0;
  endtask

  task automatic finish_repair(input int a);
    int n = 0;
    while (!rec_done[a] && n < 2000) begin @(negedge clk); n++; end
    checks++; if (!rec_done[a]) begin failures++; $display("FAIL no rec_done"); end
    pulse(a, 5'b00010);                       // ignored: not yet synchronised
    repeat (5) @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL error accepted while unsynchronised"); end
    sync_done[a] = 1; @(negedge clk); sync_done[a] = 0;
    repeat (3) @(negedge clk);
    checks++; if (rec_done[a] || busy) begin failures++; $display("FAIL rec_done after sync_done"); end
  endtask

  task automatic expect_prbs(input string what, input int ft_e, input int prr_e[], input int slot_e[]);
    checks++;
    if (got_slot.size() != slot_e.size() || words != N * slot_e.size()) begin
      failures++; $display("FAIL %s: %0d PRBs, %0d words", what, got_slot.size(), words);
    end else
      for (int i = 0; i < slot_e.size(); i++) begin
        checks++;
        if (got_slot[i] != slot_e[i] || got_prr[i] != prr_e[i] || got_ft[i] != ft_e) begin
          failures++; $display("FAIL %s PRB %0d: slot %0d PRR %0d FT %0d", what, i, got_slot[i], got_prr[i], got_ft[i]);
        end
      end
    got_slot.delete(); got_prr.delete(); got_ft.delete(); words = 0;
  endtask

  initial begin
    ft_err = '0; sync_done = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1
    pulse(1, 5'b01000);
    finish_repair(1);
    expect_prbs("transient", 1, '{3}, '{0});
    checks++; if (hard || code[1] != 5'b11111) begin failures++; $display("FAIL transient verdict"); end
    // 2
    pulse(1, 5'b01000);
    finish_repair(1);
    checks++; if (!hard || code[1] != 5'b10111) begin failures++; $display("FAIL code %b hard %b", code[1], hard); end
    expect_prbs("permanent", 1, '{0, 1, 2, 4}, '{6, 0, 2, 0});
    // 3
    pulse(1, 5'b10000);
    finish_repair(1);
    pulse(1, 5'b10000);
    repeat (20) @(negedge clk);
    checks++; if (!fatal || !fatal_vec[1] || fatal_vec[0]) begin failures++; $display("FAIL fatal %b", fatal_vec); end
    expect_prbs("transient in generation 1", 1, '{4}, '{0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
