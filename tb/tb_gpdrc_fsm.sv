// tb_gpdrc_fsm: the sequencer with a modelled datapath (the address
// counter is busy for 6 cycles after each start). Four decisions:
//  transient on PRR2 -> one job on PRR2, previous entry written;
//  permanent on PRR2 in generation 0 -> new code 11011, jobs on PRR 0,1,3,4;
//  permanent in generation 1 -> fatal, no job;
//  permanent on two PRRs at once in generation 0 -> too few PRMs, fatal.
module tb_gpdrc_fsm;
  logic clk = 0, rst_n = 0;
  logic rr_valid, prm_hard, ac_busy, take, act_clr, rr_advance, prev_we, begin_cmd, finish_cmd;
  logic fatal_cmd, set_code_cmd, ac_start, busy, hard_q, perm_q;
  logic [1:0] rr_grant, ft_q;
  logic [4:0] act_vec, code_cur, prev_vec, new_code;
  logic [2:0] enc_idx, job_idx, idx_q;
  int busy_cnt = 0, checks = 0, failures = 0;
  int jobs[$];
  int n_fin, n_fatal, n_set, n_prev;
  logic [4:0] last_code, last_prev;

  gpdrc_fsm #(.FT_COUNT(4), .PRM_COUNT(5)) dut (.clk, .rst_n, .rr_valid, .rr_grant, .act_vec,
    .enc_idx, .prm_hard, .code_cur, .ac_busy, .reloc_valid(1'b0), .fifo_empty(1'b1),
    .icap_idle(1'b1), .take, .act_clr, .rr_advance, .prev_we, .prev_vec, .begin_cmd, .finish_cmd,
    .fatal_cmd, .set_code_cmd, .new_code, .ac_start, .busy, .ft_q, .job_idx, .idx_q, .hard_q,
    .perm_q);
  always #5 clk = ~clk;
  assign ac_busy = (busy_cnt != 0);

  always @(posedge clk) begin
    if (ac_start) begin busy_cnt <= 6; jobs.push_back(int'(job_idx)); end
    else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (finish_cmd) n_fin++;
    if (fatal_cmd) n_fatal++;
    if (set_code_cmd) begin n_set++; last_code = new_code; end
    if (prev_we) begin n_prev++; last_prev = prev_vec; end
  end

  task automatic decide(input logic [4:0] vec, input int idx, input logic h, input logic [4:0] code);
    jobs.delete(); n_fin = 0; n_fatal = 0; n_set = 0; n_prev = 0;
    @(negedge clk);
    checks++; if (!take) begin failures++; $display("FAIL not idle"); end
    rr_valid = 1; rr_grant = 2'd1; act_vec = vec; enc_idx = 3'(idx); prm_hard = h; code_cur = code;
    @(negedge clk); rr_valid = 0;
    while (busy) begin
      @(negedge clk);
      if (set_code_cmd === 1'b0 && n_set != 0) code_cur = last_code;
    end
  endtask

  initial begin
    rr_valid = 0; rr_grant = 0; act_vec = 0; enc_idx = 0; prm_hard = 0; code_cur = 5'b11111;
    repeat (2) @(posedge clk); rst_n = 1;
    decide(5'b00100, 2, 0, 5'b11111);
    checks++;
    if (jobs.size() != 1 || jobs[0] != 2 || n_fin != 1 || n_prev != 1 || last_prev != 5'b00100 || hard_q) begin
      failures++; $display("FAIL transient: %0d jobs fin %0d prev %b", jobs.size(), n_fin, last_prev);
    end
    decide(5'b00100, 2, 1, 5'b11111);
    checks++;
    if (jobs.size() != 4 || jobs[0] != 0 || jobs[1] != 1 || jobs[2] != 3 || jobs[3] != 4 ||
        n_set != 1 || last_code != 5'b11011 || n_fin != 1 || last_prev != 5'b00000 || !hard_q) begin
      failures++; $display("FAIL permanent: %0d jobs code %b", jobs.size(), last_code);
    end
    decide(5'b00110, 1, 0, 5'b11111);
    checks++;
    if (jobs.size() != 1 || jobs[0] != 1 || last_prev != 5'b00010) begin
      failures++; $display("FAIL two flagged PRMs: prev %b", last_prev);
    end
    decide(5'b01000, 3, 1, 5'b11011);
    checks++;
    if (jobs.size() != 0 || n_fatal != 1 || n_fin != 0 || n_set != 0) begin
      failures++; $display("FAIL final generation: jobs %0d fatal %0d", jobs.size(), n_fatal);
    end
    decide(5'b01100, 2, 1, 5'b11111);
    checks++;
    if (jobs.size() != 0 || n_fatal != 1 || n_set != 0) begin
      failures++; $display("FAIL too few PRMs: jobs %0d fatal %0d", jobs.size(), n_fatal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
