// tb_reconfig_time: time to repair one PRM against the size of its partial
// bitstream, for PRMs of 1 to 5 times the smallest size (5, 10, 15, 20 and
// 25 kB, i.e. 1280 to 6400 32-bit words).
//
// One ft_system_top per size, generated side by side with two FT
// architectures each and its own bitstream storage model. In each, a
// transient fault is put on the functional unit in PRR3 of architecture 1.
// The testbench measures the clocks from the fault to rec_done and watches
// the ICAP port. A simple fabric model clears the fault once a whole PRB has
// been written, and the units answer a state-copy request on the next clock.
// Checked per size:
//  * exactly PRB_WORDS words reach ICAP, on consecutive clocks (one word per
//    clock, the controller's peak rate);
//  * the frame address was relocated to the faulty PRR;
//  * the architecture is synchronised afterwards and stays in generation 0;
//  * the fixed overhead (repair clocks minus PRB_WORDS) is the same for every
//    size and below 60 clocks, so repair time grows only with bitstream size.
// The printed times assume the 100 MHz ICAP clock. The sizes follow the
// reference's reconfiguration-time measurement; the storage latency (one
// clock) and the fabric model are this testbench's choices.
module tb_reconfig_time;
  import gpdrc_pkg::*;
  localparam int NS = 5;
  localparam int unsigned BASE_WORDS = 1280;        // 5 kB
  localparam int WATCHDOG = NS * int'(BASE_WORDS) * 4 + 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, finished = 0;
  longint cyc;
  longint overhead[NS];
  always #5 clk = ~clk;
  initial cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  for (genvar g = 0; g < NS; g++) begin : g_size
    localparam int unsigned P = BASE_WORDS * (g + 1);
    logic [1:0][4:1][31:0] prr_out;
    logic [1:0][4:0]       unit_sync_done, fu_load, cfg_code;
    logic [1:0]            fu_enable, fu_local_rst, rec_done, fatal_vec;
    logic [1:0][31:0]      ft_out;
    logic                  hard, fatal, busy, permanent, relocated, mem_en;
    logic [0:0]            arch_index;
    logic [2:0]            prm_error_index;
    prm_type_e             job_type;
    logic [23:0]           mem_addr;
    logic [31:0]           mem_rdata, icap_i;
    logic                  icap_csib, icap_rdwrb;
    logic                  fault;
    int unsigned           words;
    longint                t_first, t_last;
    logic                  seen_reloc;

    ft_system_top #(.FT_COUNT(2), .PRB_WORDS(P)) dut (
      .clk, .rst_n, .prr_out, .unit_sync_done, .voter_seu(2'b00), .ft_out, .fu_enable,
      .fu_load, .fu_local_rst, .cfg_code, .rec_done, .hard, .fatal, .fatal_vec, .arch_index,
      .prm_error_index, .busy, .permanent, .job_type, .relocated, .mem_en, .mem_addr,
      .mem_rdata, .icap_csib, .icap_rdwrb, .icap_i);

    bitstream_storage_model #(.ADDR_W(24), .PRB_WORDS(P)) u_mem (
      .clk, .en(mem_en), .addr(mem_addr), .rdata(mem_rdata));

    // units: every unit shows the same word, the faulty one flips bit 0
    always_comb
      for (int a = 0; a < 2; a++)
        for (int k = 1; k <= 4; k++)
          prr_out[a][k] = 32'h0123_4567 ^ 32'((a == 1 && k == 3) && fault);

    // fabric: count ICAP writes; a complete PRB clears the fault
    always @(posedge clk) begin
      unit_sync_done <= fu_load;
      if (relocated) seen_reloc <= 1'b1;
      if (rst_n && !icap_csib && !icap_rdwrb) begin
        if (words == 0) t_first <= cyc;
        t_last <= cyc;
        words  <= words + 1;
        if (words + 1 == P) fault <= 1'b0;
      end
    end

    initial begin
      longint t0, t_rec;
      fault = 1'b0; words = 0; seen_reloc = 1'b0; unit_sync_done = '0;
      wait (rst_n);
      repeat (20) @(posedge clk);
      @(negedge clk);
      fault = 1'b1;
      t0 = cyc;
      while (!rec_done[1] && cyc - t0 < 64'(P) * 3 + 1000) @(posedge clk);
      t_rec = cyc;
      check(rec_done[1], $sformatf("%0d words: no rec_done", P));
      while (rec_done[1] && cyc - t_rec < 100) @(posedge clk);
      repeat (20) @(posedge clk);
      check(words == P, $sformatf("%0d words: %0d words written to ICAP", P, words));
      check(t_last - t_first + 1 == longint'(P),
            $sformatf("%0d words: written over %0d clocks", P, t_last - t_first + 1));
      check(seen_reloc, $sformatf("%0d words: frame address not relocated", P));
      check(!fault && !busy && !rec_done[1] && cfg_code[1] == 5'b11111 && !fatal,
            $sformatf("%0d words: not back to normal operation", P));
      check(ft_out[1] == 32'h0123_4567, $sformatf("%0d words: wrong output", P));
      overhead[g] = (t_rec - t0) - longint'(P);
      $display("  PRB of %0d kB (%0d words): repaired in %0d clocks = %0.2f us at 100 MHz",
               P * 4 / 1024, P, t_rec - t0, real'(t_rec - t0) / 100.0);
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished == NS);
    for (int g = 0; g < NS; g++) begin
      check(overhead[g] == overhead[0], $sformatf("overhead %0d clocks at size %0d, %0d at size 1",
                                                 overhead[g], g + 1, overhead[0]));
      check(overhead[g] > 0 && overhead[g] < 60, $sformatf("overhead %0d clocks", overhead[g]));
    end
    $display("fixed overhead per repair: %0d clocks", overhead[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
