// tb_ft_arch_widths: the FT architecture at every functional-unit output
// width evaluated for the design's hardware overhead: 2, 4, 8, 16, 32 and 64
// bits.
//
// One ft_arch per width, generated side by side. For each instance and each
// configuration (generation 0 TMR and the four generation-1 duplex-with-
// checker codes), random unit words are applied with no fault and with one
// faulty PRR at a time. The faulty word differs from the good one in a
// single random bit, the hardest case for the comparators. Checked: the
// protected output equals the good word, and the PRM error vector names
// exactly the faulty PRR. A voter upset must be reported as a PRR1 error.
// The widths are those of the overhead evaluation. The single-bit fault
// pattern and the repeat count are this testbench's choices.
module tb_ft_arch_widths;
  localparam int NW = 6;
  localparam int WIDTHS[NW] = '{2, 4, 8, 16, 32, 64};
  localparam logic [4:0] CODES[5] = '{5'b11111, 5'b11101, 5'b11011, 5'b10111, 5'b01111};
  localparam int ROUNDS = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, finished = 0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int W = WIDTHS[g];
    logic [4:0]        code, prm_err, stateful, load;
    logic              seu, enable, local_rst, sync_done;
    logic [4:1][W-1:0] prr_out;
    logic [W-1:0]      out;

    ft_arch #(.DATA_W(W)) dut (.clk, .rst_n, .cfg_code(code), .prr_out, .voter_seu(seu),
      .rec_end(1'b0), .unit_sync_done(5'b0), .out, .prm_err, .stateful, .enable, .load,
      .local_rst, .sync_done);

    initial begin
      code = CODES[0]; seu = 1'b0; prr_out = '0;
      wait (rst_n);
      @(negedge clk);
      for (int c = 0; c < 5; c++) begin
        logic [4:0] st;
        code = CODES[c];
        // PRRs whose fault the architecture localises: the FUs in TMR, all
        // assigned PRRs in the duplex with checker
        st = (c == 0) ? 5'b11100 : (CODES[c] & 5'b11110);
        for (int r = 0; r < ROUNDS; r++)
          for (int k = 0; k <= 4; k++) begin
            logic [W-1:0] v, flip;
            v    = W'({$urandom, $urandom});
            flip = W'(1) << ($urandom % W);
            for (int j = 1; j <= 4; j++) prr_out[j] = v;
            if (k >= 1 && st[k]) prr_out[k] = v ^ flip;
            @(negedge clk);
            checks++;
            if (out !== v || prm_err !== ((k >= 1 && st[k]) ? 5'(1 << k) : 5'b0)) begin
              failures++;
              $display("FAIL W=%0d code %b faulty PRR %0d: out %h (expected %h) err %b",
                       W, code, k, out, v, prm_err);
            end
          end
      end
      code = CODES[0];
      for (int j = 1; j <= 4; j++) prr_out[j] = '0;
      seu = 1'b1;
      @(negedge clk);
      checks++;
      if (prm_err !== 5'b00010) begin
        failures++;
        $display("FAIL W=%0d voter upset: err %b", W, prm_err);
      end
      seu = 1'b0;
      finished++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (finished == NW);
    $display("widths 2..64 bits: %0d checks", checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
