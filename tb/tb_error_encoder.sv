// tb_error_encoder: every 5-bit vector; expected index = lowest set bit.
module tb_error_encoder;
  logic [4:0] vec;
  logic [2:0] idx;
  logic       valid;
  int checks = 0, failures = 0;

  error_encoder #(.PRM_COUNT(5)) dut (.vec, .idx, .valid);

  initial begin
    for (int v = 0; v < 32; v++) begin
      int e;
      e = -1;
      for (int k = 4; k >= 0; k--) if (v[k]) e = k;
      vec = 5'(v); #1; checks++;
      if (valid !== (e >= 0) || (e >= 0 && idx !== 3'(e))) begin
        failures++; $display("FAIL %b -> %0d/%b", vec, idx, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
