// tb_hard_error_unit: all combinations of current and previous 5-bit error
// vectors and PRM index; hard iff the PRM failed in both cycles.
module tb_hard_error_unit;
  logic [4:0] act, prev, hv;
  logic [2:0] idx;
  logic       ph, h;
  int checks = 0, failures = 0;

  hard_error_unit #(.PRM_COUNT(5)) dut (.act_vec(act), .prev_vec(prev), .idx, .hard_vec(hv), .prm_hard(ph), .hard(h));

  initial begin
    for (int a = 0; a < 32; a++)
      for (int p = 0; p < 32; p++)
        for (int i = 0; i < 5; i++) begin
          act = 5'(a); prev = 5'(p); idx = 3'(i); #1; checks++;
          if (ph !== (act[i] && prev[i]) || h !== ((a & p) != 0) || hv !== 5'(a & p)) begin
            failures++; $display("FAIL %b %b %0d", act, prev, i);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
