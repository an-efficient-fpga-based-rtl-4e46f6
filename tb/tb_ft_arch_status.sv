// tb_ft_arch_status: per-architecture state sequence NORMAL -> BUSY ->
// SYNC (rec_done) -> NORMAL on sync_done, code writes, and the sticky FATAL
// state; checked against a shadow model with random commands.
module tb_ft_arch_status;
  localparam int FT = 4, P = 5;
  logic clk = 0, rst_n = 0, b, f, fa, sc, fatal;
  logic [1:0] ft;
  logic [P-1:0] nc;
  logic [FT-1:0] sync_done, mask, rec_done, fatal_vec;
  logic [FT-1:0][P-1:0] code, s_code;
  int s_st[FT];   // 0 normal 1 busy 2 sync 3 fatal
  int checks = 0, failures = 0;

  ft_arch_status #(.FT_COUNT(FT), .PRM_COUNT(P)) dut (.clk, .rst_n, .cmd_ft(ft), .begin_cmd(b),
    .finish_cmd(f), .fatal_cmd(fa), .set_code_cmd(sc), .new_code(nc), .sync_done, .code, .mask,
    .rec_done, .fatal_vec, .fatal);
  always #5 clk = ~clk;

  initial begin
    b = 0; f = 0; fa = 0; sc = 0; ft = 0; nc = 0; sync_done = 0;
    for (int a = 0; a < FT; a++) begin s_st[a] = 0; s_code[a] = '1; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      ft = 2'($urandom); nc = P'($urandom);
      b = 0; f = 0; fa = 0; sc = 0;
      case ($urandom % 6)
        0: b = 1;
        1: f = 1;
        2: if ($urandom % 8 == 0) fa = 1;
        3: sc = 1;
        default: ;
      endcase
      sync_done = FT'($urandom);
      for (int a = 0; a < FT; a++) begin
        if (a == int'(ft) && fa) s_st[a] = 3;
        else if (a == int'(ft) && b) s_st[a] = 1;
        else if (a == int'(ft) && f) s_st[a] = 2;
        else if (s_st[a] == 2 && sync_done[a]) s_st[a] = 0;
        if (a == int'(ft) && sc) s_code[a] = nc;
      end
      @(posedge clk); #1;
      for (int a = 0; a < FT; a++) begin
        checks++;
        if (mask[a] !== (s_st[a] != 0) || rec_done[a] !== (s_st[a] == 2) ||
            fatal_vec[a] !== (s_st[a] == 3) || code[a] !== s_code[a]) begin
          failures++; $display("FAIL cycle %0d arch %0d", i, a);
        end
      end
      checks++;
      if (fatal !== (|fatal_vec)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
