// tb_gpdrc_table1: the controller at the size of the reference's resource
// evaluation, 32 FT architectures of 6 PRMs each (192 error lines), with
// 16-word PRBs and a storage model answering two clocks after each request.
// It shows that the same RTL serves a larger PRM count by parameters alone.
// The placement of a 6-PRM architecture follows the package's rule (all
// assigned: PRR1 = VOTER, others FU; later: FU, CHECKER, FU, FU in ascending
// PRR order). That rule is this design's choice, since the reference
// describes no 6-PRM architecture in detail.
//  1. error pulses on FT0/PRR2 and FT31/PRR5 in the same cycle -> both served
//     in round-robin order: one FU PRB each, frame addresses relocated to
//     FT0/PRR2 and FT31/PRR5;
//  2. FT31/PRR5 fails again -> hard; code 011111; route PRB of that code
//     (slot 8) into PRR0, then FU, CHECKER, FU, FU for PRR1..PRR4;
//  3. a transient then permanent fault in generation 1 -> CHECKER PRB, then
//     fatal with nothing written.
module tb_gpdrc_table1;
  import gpdrc_pkg::*;
  localparam int FT = 32, P = 6, N = 16;
  localparam logic [31:0] FB = 32'h0040_0000, FS = 32'h1000, PS = 32'h100;
  logic clk = 0, rst_n = 0;
  logic [FT-1:0][P-1:0] ft_err, code;
  logic [FT-1:0] sync_done, rec_done, fatal_vec;
  logic hard, fatal, busy, permanent, relocated, rd_req, rd_valid, csib, rdwrb;
  logic [4:0] arch_index;
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

  gpdrc #(.FT_COUNT(FT), .PRM_COUNT(P), .PRB_WORDS(N), .FIFO_DEPTH(8)) dut (.clk, .rst_n, .ft_err,
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

  task automatic pulse(input int a, input logic [P-1:0] v);
    @(negedge clk); ft_err[a] = v; @(negedge clk); ft_err[a] = 0;
  endtask

  task automatic finish_repair(input int a);
    int n = 0;
    while (!rec_done[a] && n < 2000) begin @(negedge clk); n++; end
    checks++; if (!rec_done[a]) begin failures++; $display("FAIL no rec_done"); end
    pulse(a, 6'b000010);                       // ignored: not yet synchronised
    repeat (5) @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL error accepted while unsynchronised"); end
    sync_done[a] = 1; @(negedge clk); sync_done[a] = 0;
    repeat (3) @(negedge clk);
    checks++; if (rec_done[a] || busy) begin failures++; $display("FAIL rec_done after sync_done"); end
  endtask

  task automatic expect_prbs2(input string what, input int ft_e[], input int prr_e[], input int slot_e[]);
    checks++;
    if (got_slot.size() != slot_e.size() || words != N * slot_e.size()) begin
      failures++; $display("FAIL %s: %0d PRBs, %0d words", what, got_slot.size(), words);
    end else
      for (int i = 0; i < slot_e.size(); i++) begin
        checks++;
        if (got_slot[i] != slot_e[i] || got_prr[i] != prr_e[i] || got_ft[i] != ft_e[i]) begin
          failures++; $display("FAIL %s PRB %0d: slot %0d PRR %0d FT %0d", what, i, got_slot[i], got_prr[i], got_ft[i]);
        end
      end
    got_slot.delete(); got_prr.delete(); got_ft.delete(); words = 0;
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
    // 1: two architectures at once
    @(negedge clk); ft_err[0] = 6'b000100; ft_err[31] = 6'b100000;
    @(negedge clk); ft_err[0] = '0; ft_err[31] = '0;
    begin
      int n;
      n = 0;
      while (!rec_done[0] && !rec_done[31] && n < 2000) begin @(negedge clk); n++; end
    end
    checks++; if (!(rec_done[0] ^ rec_done[31])) begin failures++; $display("FAIL first of two not served"); end
    if (rec_done[0]) begin
      sync_done[0] = 1; @(negedge clk); sync_done[0] = 0;
      finish_repair(31);
      expect_prbs2("two architectures", '{0, 31}, '{2, 5}, '{0, 0});
    end else begin
      sync_done[31] = 1; @(negedge clk); sync_done[31] = 0;
      finish_repair(0);
      expect_prbs2("two architectures", '{31, 0}, '{5, 2}, '{0, 0});
    end
    checks++; if (hard || code[31] != 6'b111111 || code[0] != 6'b111111) begin failures++; $display("FAIL transient verdict"); end
    // 2: permanent
    pulse(31, 6'b100000);
    finish_repair(31);
    checks++; if (!hard || code[31] != 6'b011111) begin failures++; $display("FAIL code %b hard %b", code[31], hard); end
    expect_prbs("permanent", 31, '{0, 1, 2, 3, 4}, '{8, 0, 2, 0, 0});
    // 3: generation 1 is the last one
    pulse(31, 6'b000100);
    finish_repair(31);
    pulse(31, 6'b000100);
    repeat (20) @(negedge clk);
    checks++; if (!fatal || !fatal_vec[31] || fatal_vec[30:0] != '0) begin failures++; $display("FAIL fatal %b", fatal_vec); end
    expect_prbs("transient in generation 1", 31, '{2}, '{2});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
