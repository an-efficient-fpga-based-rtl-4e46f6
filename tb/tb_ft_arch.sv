// tb_ft_arch: one FT architecture under the five configurations of
// generations 0 and 1. For each, every stateful PRR in turn gets a wrong
// word: the output must stay correct and the error vector must flag exactly
// that PRR. A voter upset flags PRR1 in generation 0. Finally a transient
// repair handshake: rec_end -> the flagged PRR is loaded -> sync_done.
module tb_ft_arch;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, seu, rec_end, enable, local_rst, sync_done;
  logic [4:0] code, usd, prm_err, stateful, load;
  logic [4:1][W-1:0] prr_out;
  logic [W-1:0] out;
  int checks = 0, failures = 0;
  localparam logic [4:0] CODES[5] = '{5'b11111, 5'b11101, 5'b11011, 5'b10111, 5'b01111};

  ft_arch #(.DATA_W(W)) dut (.clk, .rst_n, .cfg_code(code), .prr_out, .voter_seu(seu), .rec_end,
    .unit_sync_done(usd), .out, .prm_err, .stateful, .enable, .load, .local_rst, .sync_done);
  always #5 clk = ~clk;

  initial begin
    code = 5'b11111; seu = 0; rec_end = 0; usd = 0; prr_out = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 5; c++) begin
      logic [4:0] st;
      code = CODES[c];
      st = (c == 0) ? 5'b11100 : (CODES[c] & 5'b11110);
      #1; checks++;
      if (stateful !== st) begin failures++; $display("FAIL stateful %b for code %b", stateful, code); end
      for (int k = 0; k <= 4; k++) begin
        logic [W-1:0] v;
        v = W'($urandom);
        for (int j = 1; j <= 4; j++) prr_out[j] = v;
        if (k >= 1 && st[k]) prr_out[k] = ~v;
        #1; checks++;
        if (out !== v || prm_err !== ((k >= 1 && st[k]) ? 5'(1 << k) : 5'b0)) begin
          failures++; $display("FAIL code %b bad PRR %0d: out %h/%h err %b", code, k, out, v, prm_err);
        end
      end
    end
    // voter upset
    code = 5'b11111; seu = 1; #1; checks++;
    if (prm_err !== 5'b00010) begin failures++; $display("FAIL voter upset err %b", prm_err); end
    seu = 0;
    // transient repair of PRR4 (after a reset: the errors of the loop above
    // would otherwise also be recorded for synchronisation)
    rst_n = 0; @(negedge clk); rst_n = 1;
    @(negedge clk); prr_out[4] = ~prr_out[3];
    @(negedge clk); prr_out[4] = prr_out[3]; rec_end = 1;
    @(negedge clk); checks++;
    if (enable !== 0 || load !== 5'b10000) begin failures++; $display("FAIL copy: en %b load %b", enable, load); end
    usd = 5'b10000;
    @(negedge clk); usd = 0; checks++;
    if (sync_done !== 1) begin failures++; $display("FAIL no sync_done"); end
    rec_end = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
