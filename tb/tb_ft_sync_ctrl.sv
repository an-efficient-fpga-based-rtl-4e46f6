// tb_ft_sync_ctrl: directed handshakes.
//  1. errors pass through while running;
//  2. transient repair of a stateful PRR: after rec_end the units are
//     frozen, only that PRR is loaded, the copy lasts until its
//     unit_sync_done, then sync_done pulses once, errors stay hidden
//     until rec_end falls;
//  3. voter-only repair: no load, sync_done at once;
//  4. changed configuration code: a one-cycle local reset, no load.
module tb_ft_sync_ctrl;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, rec_end, enable, local_rst, sync_done;
  logic [N-1:0] cfg_code, stateful, err_in, usd, err_out, load;
  int checks = 0, failures = 0;

  ft_sync_ctrl #(.NPRR(N)) dut (.clk, .rst_n, .cfg_code, .stateful, .err_in, .rec_end,
    .unit_sync_done(usd), .err_out, .enable, .load, .local_rst, .sync_done);
  always #5 clk = ~clk;

  task automatic expect_(input logic en, input logic [N-1:0] ld, input logic lr, input logic sd,
                         input logic [N-1:0] eo, input string s);
    #1; checks++;
    if (enable !== en || load !== ld || local_rst !== lr || sync_done !== sd || err_out !== eo) begin
      failures++;
      $display("FAIL %s: en=%b load=%b lrst=%b sd=%b eo=%b", s, enable, load, local_rst, sync_done, err_out);
    end
  endtask

  initial begin
    cfg_code = 5'b11111; stateful = 5'b11100; err_in = 0; usd = 0; rec_end = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // 1
    @(negedge clk); err_in = 5'b01000; expect_(1, 0, 0, 0, 5'b01000, "pass-through");
    @(negedge clk); err_in = 5'b00000; expect_(1, 0, 0, 0, 0, "pass-through idle");
    // 2: the controller takes over, the error persists until rewritten
    @(negedge clk); err_in = 5'b01000; rec_end = 1; expect_(1, 0, 0, 0, 0, "hidden at rec_end");
    @(negedge clk); err_in = 5'b01000; expect_(0, 5'b01000, 0, 0, 0, "copy starts");
    @(negedge clk); expect_(0, 5'b01000, 0, 0, 0, "copy waits");
    usd = 5'b01000;
    @(negedge clk); usd = 0; expect_(1, 0, 0, 1, 0, "sync done");
    @(negedge clk); expect_(1, 0, 0, 0, 0, "hidden until rec_end falls");
    rec_end = 0; err_in = 0;
    @(negedge clk); expect_(1, 0, 0, 0, 0, "running again");
    // 3: voter PRR1 upset
    err_in = 5'b00010; @(negedge clk); err_in = 0; rec_end = 1;
    @(negedge clk); expect_(1, 0, 0, 1, 0, "voter repair needs no copy");
    @(negedge clk); rec_end = 0; @(negedge clk);
    // 4: generation change
    err_in = 5'b00100; @(negedge clk); err_in = 0; cfg_code = 5'b11011; stateful = 5'b11010; rec_end = 1;
    @(negedge clk); expect_(0, 0, 1, 0, 0, "local reset");
    @(negedge clk); expect_(1, 0, 0, 1, 0, "done after reset");
    @(negedge clk); rec_end = 0; @(negedge clk);
    err_in = 5'b10000; expect_(1, 0, 0, 0, 5'b10000, "running in new generation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
