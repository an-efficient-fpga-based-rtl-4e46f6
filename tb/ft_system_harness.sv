// ft_system_harness: stimulus, models and checks for ft_system_top, shared by
// the reduced-size and the full-size end-to-end testbenches.
//
// Models (behavioural): the functional units in every PRR (an accumulator
// state register per unit, state += din while enabled, with the state-copy
// ring used for synchronisation), the FPGA fabric behind ICAP (it decodes
// the written PRBs into "PRR (a,k) loaded with PRB slot s" events, clears a
// transient upset there and leaves the reconfigured unit with a scrambled
// state), and the bitstream storage. Injected faults: transient (cleared by
// rewriting the PRR), permanent (stays), voter upset (cleared by rewriting
// the voter PRR).
//
// Scenario on FT architectures 0..3:
//   1. transient FU fault, FT0 PRR3            -> one FU PRB, state copy
//   2. two transient faults at once, FT1/FT2   -> both served round-robin
//   3. voter upset, FT3                        -> VOTER PRB into PRR1
//  3b. FU fault in FT2 captured while FT0 is served, then a voter upset in
//      FT2: both PRMs are repaired as transient, FT2 stays in generation 0
//   4. permanent FU fault, FT1 PRR2            -> transient try, then
//      generation 1 (code 11011): route PRB + 3 PRBs, local reset
//   5. transient CHECKER fault, FT1 PRR3       -> CHECKER PRB
//   6. permanent FU fault, FT1 PRR4 (gen 1)    -> unrepairable, fatal
// Checked: every ICAP word stream (sync, relocated frame addresses,
// payload, PRB type against the configuration, no idle cycle inside a PRB),
// the protected outputs against a reference every cycle outside the windows
// where the document allows wrong outputs, configuration codes, fatal flags,
// repair latency, and that each mechanism occurred.
module ft_system_harness
  import gpdrc_pkg::*;
#(
  parameter int unsigned FT_COUNT    = 32,
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned PRB_WORDS   = 1280,
  parameter int unsigned ADDR_W      = 24,
  parameter int unsigned STORAGE_LAT = 1,
  localparam int unsigned FT_W       = (FT_COUNT > 1) ? $clog2(FT_COUNT) : 1
) (
  output logic                                  clk,
  output logic                                  rst_n,
  output logic [FT_COUNT-1:0][4:1][DATA_W-1:0]  prr_out,
  output logic [FT_COUNT-1:0][4:0]              unit_sync_done,
  output logic [FT_COUNT-1:0]                   voter_seu,
  input  logic [FT_COUNT-1:0][DATA_W-1:0]       ft_out,
  input  logic [FT_COUNT-1:0]                   fu_enable,
  input  logic [FT_COUNT-1:0][4:0]              fu_load,
  input  logic [FT_COUNT-1:0]                   fu_local_rst,
  input  logic [FT_COUNT-1:0][4:0]              cfg_code,
  input  logic [FT_COUNT-1:0]                   rec_done,
  input  logic                                  hard,
  input  logic                                  fatal,
  input  logic [FT_COUNT-1:0]                   fatal_vec,
  input  logic [FT_W-1:0]                       arch_index,
  input  logic                                  busy,
  input  logic                                  permanent,
  input  logic                                  relocated,
  input  logic                                  mem_en,
  input  logic [ADDR_W-1:0]                     mem_addr,
  output logic [31:0]                           mem_rdata,
  input  logic                                  icap_csib,
  input  logic                                  icap_rdwrb,
  input  logic [31:0]                           icap_i
);
  localparam logic [31:0] FAR_BASE = 32'h0040_0000;
  localparam logic [31:0] FT_STR   = 32'h0000_1000;
  localparam logic [31:0] PRR_STR  = 32'h0000_0100;
  localparam int unsigned NT       = (FT_COUNT < 4) ? FT_COUNT : 4;  // architectures exercised
  localparam int unsigned MID      = PRB_WORDS / 2;
  localparam longint      WATCHDOG = 64'(PRB_WORDS) * 80 + 40000;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // mechanism counters
  int n_transient = 0, n_permanent = 0, n_fatal = 0, n_voter = 0, n_checker = 0;
  int n_copy = 0, n_local_rst = 0, n_reloc = 0, n_hidden = 0, n_queued = 0, n_prb = 0;
  int n_multi = 0;

  logic [DATA_W-1:0] st   [FT_COUNT][5];
  logic [DATA_W-1:0] ref_q[FT_COUNT];
  logic [DATA_W-1:0] din  [FT_COUNT];
  logic              tfault[FT_COUNT][5];
  logic              pfault[FT_COUNT][5];
  logic [4:0]        sync_q[FT_COUNT];
  logic              seu_q [FT_COUNT];

  // ICAP parser state
  int unsigned pos = 0;
  int unsigned p_ft, p_prr, p_slot;
  logic [31:0] p_far;
  longint      p_start;
  logic        p_ok;

  bitstream_storage_model #(.ADDR_W(ADDR_W), .PRB_WORDS(PRB_WORDS), .LAT(STORAGE_LAT),
                            .FAR_BASE(FAR_BASE), .PRR_FAR_STRIDE(PRR_STR)) u_mem (
    .clk, .en(mem_en), .addr(mem_addr), .rdata(mem_rdata));

  initial begin clk = 1'b0; forever #5 clk = ~clk; end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic logic [31:0] unswap(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++) r[8*b + i] = w[8*b + 7 - i];
    return r;
  endfunction

  function automatic int pred(input int a, input int k);
    int p = -1, last = -1;
    for (int j = 1; j <= 4; j++) begin
      prm_type_e t;
      t = prr_type(cfg_code_t'(cfg_code[a]), j, 5);
      if (t == PRM_FU || t == PRM_CHECKER) begin
        if (j < k) p = j;
        last = j;
      end
    end
    return (p < 0) ? last : p;
  endfunction

  always_comb
    for (int a = 0; a < int'(FT_COUNT); a++) begin
      for (int k = 1; k <= 4; k++)
        prr_out[a][k] = st[a][k] ^ DATA_W'(tfault[a][k] | pfault[a][k]);
      unit_sync_done[a] = sync_q[a];
      voter_seu[a]      = seu_q[a];
    end

  // Functional units, fabric and reference
  always @(posedge clk) begin
    logic [31:0] w;
    cyc <= cyc + 1;
    if (!rst_n) begin
      for (int a = 0; a < int'(FT_COUNT); a++) begin
        for (int k = 0; k < 5; k++) st[a][k] <= '0;
        ref_q[a]  <= '0;
        sync_q[a] <= '0;
        din[a]    <= DATA_W'($urandom);
      end
    end else begin
      for (int a = 0; a < int'(FT_COUNT); a++) begin
        din[a] <= DATA_W'($urandom);
        sync_q[a] <= '0;
        if (fu_local_rst[a]) begin
          ref_q[a] <= '0;
          n_local_rst++;
        end else if (fu_enable[a]) ref_q[a] <= ref_q[a] + din[a];
        for (int k = 1; k <= 4; k++) begin
          if (fu_local_rst[a])    st[a][k] <= '0;
          else if (fu_load[a][k]) begin
            st[a][k]     <= st[a][pred(a, k)];
            sync_q[a][k] <= 1'b1;
            n_copy++;
          end else if (fu_enable[a]) st[a][k] <= st[a][k] + din[a];
        end
      end
      // ICAP word stream
      if (!icap_csib && !icap_rdwrb) begin
        w = unswap(icap_i);
        if (pos == 0) begin p_start = cyc; p_ok = (w == 32'hFFFF_FFFF); end
        else if (pos == 1) p_ok &= (w == CFG_SYNC_WORD);
        else if (pos == 2 || pos == MID) p_ok &= (w == CFG_FAR_WRITE);
        else if (pos == 3) begin
          p_far = w;
          p_ft  = int'((w - FAR_BASE) / FT_STR);
          p_prr = int'(((w - FAR_BASE) % FT_STR) / PRR_STR);
        end
        else if (pos == 4) begin p_slot = int'(w[7:0]); p_ok &= (w[31:16] == 16'hC0DE); end
        else if (pos == MID + 1) p_ok &= (w == p_far + 32'd1);
        else p_ok &= (w == {4'hD, 4'(p_slot), 24'(pos)});
        if (pos == PRB_WORDS - 1) begin
          int exp_slot;
          n_prb++;
          check(p_ok, "PRB stream corrupted");
          check(cyc - p_start == longint'(PRB_WORDS - 1), "idle cycle inside a PRB");
          check(p_ft < FT_COUNT && p_prr <= 4, "frame address outside the dynamic area");
          if (p_ft < FT_COUNT && p_prr <= 4) begin
            exp_slot = (p_prr == 0) ? int'(route_slot(cfg_code_t'(cfg_code[p_ft]), 5))
                                    : int'(type_slot(prr_type(cfg_code_t'(cfg_code[p_ft]), p_prr, 5)));
            check(p_slot == exp_slot, $sformatf("PRR %0d/%0d got PRB slot %0d, expected %0d",
                                                p_ft, p_prr, p_slot, exp_slot));
            if (p_ft != 0 || (p_prr != 1 && p_prr != 0)) n_reloc++;
            if (p_slot == 1) n_voter++;
            if (p_slot == 2) n_checker++;
            tfault[p_ft][p_prr] <= 1'b0;
            if (p_prr == 1) seu_q[p_ft] <= 1'b0;
            if (p_prr != 0) st[p_ft][p_prr] <= DATA_W'(32'h5A5A_0BAD) ^ DATA_W'(cyc);
          end
          pos = 0;
        end else pos++;
      end
    end
  end

  // Protected outputs: compared every cycle except during a generation change
  // (from the decision until the local reset has been acknowledged).
  always @(posedge clk) if (rst_n) begin
    for (int a = 0; a < int'(NT); a++) begin
      logic skip;
      skip = rec_done[a] && (cfg_code[a] != 5'b11111) && permanent;
      if (busy && permanent && arch_index == FT_W'(a)) skip = 1'b1;
      if (rec_done[a] && cfg_code[a] != 5'b11111) skip = 1'b1;
      if (!skip) check(ft_out[a] == ref_q[a], $sformatf("FT%0d output %h, expected %h", a, ft_out[a], ref_q[a]));
      if (rec_done[a])
        for (int k = 1; k <= 4; k++)
          if (cfg_code[a][k] && prr_out[a][k] != ref_q[a] && !(k == 1 && cfg_code[a] == 5'b11111))
            n_hidden++;
    end
  end

  // count architectures that were pending together (round-robin queueing)
  logic [FT_COUNT-1:0] rec_q;
  always @(posedge clk) rec_q <= rec_done;

  task automatic wait_idle(input int max_cycles);
    int n = 0;
    // the controller is idle and no architecture waits for synchronisation
    while ((busy || |rec_done) && n < max_cycles) begin @(posedge clk); n++; end
    repeat (4) @(posedge clk);
    while ((busy || |rec_done) && n < max_cycles) begin @(posedge clk); n++; end
  endtask

  task automatic run_repair(input int a, input int k, input logic perm, input string what);
    longint t0;
    t0 = cyc;
    if (perm) pfault[a][k] = 1'b1; else tfault[a][k] = 1'b1;
    // wait for the controller to start, then for quiet
    while (!busy && cyc - t0 < 200) @(posedge clk);
    check(busy, {what, ": controller never started"});
    wait_idle(30 * int'(PRB_WORDS) + 2000);
    $display("  %s done at cycle %0d (code FT%0d = %b)", what, cyc, a, cfg_code[a]);
  endtask

  initial begin : scenario
    longint t0, lat;
    for (int a = 0; a < int'(FT_COUNT); a++) begin
      seu_q[a] = 1'b0;
      for (int k = 0; k < 5; k++) begin tfault[a][k] = 1'b0; pfault[a][k] = 1'b0; end
    end
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    check(!busy && !fatal && cfg_code[0] == 5'b11111, "reset state");

    // 1. transient fault in an FU; measure repair latency
    t0 = cyc;
    run_repair(0, 3, 1'b0, "transient FU fault FT0/PRR3");
    lat = cyc - t0;
    check(lat < longint'(PRB_WORDS) + 60, $sformatf("transient repair took %0d cycles", lat));
    n_transient++;
    check(cfg_code[0] == 5'b11111, "transient repair keeps generation 0");

    // 2. two architectures at once
    tfault[1][4] = 1'b1;
    tfault[2][2] = 1'b1;
    begin
      int served = 0;
      t0 = cyc;
      while (served < 2 && cyc - t0 < 8 * PRB_WORDS + 2000) begin
        @(posedge clk);
        for (int a = 1; a <= 2; a++) if (rec_done[a] && !rec_q[a]) served++;
      end
      check(served == 2, "both pending architectures served");
      if (served == 2) n_queued++;
      wait_idle(4 * int'(PRB_WORDS) + 500);
      check(!tfault[1][4] && !tfault[2][2], "both transient faults cleared");
      n_transient += 2;
    end

    // 3. voter upset
    if (NT > 3) begin
      seu_q[3] = 1'b1;
      t0 = cyc;
      while (!busy && cyc - t0 < 200) @(posedge clk);
      wait_idle(4 * int'(PRB_WORDS) + 500);
      check(!seu_q[3], "voter PRM rewritten");
    end

    // 3b. two PRMs of one architecture flagged together: an FU fault in FT2
    // is captured while the controller serves FT0, then FT2's voter is
    // upset. Both are transient: FT2 must stay in generation 0.
    if (NT > 2) begin
      tfault[0][2] = 1'b1;
      t0 = cyc;
      while (!busy && cyc - t0 < 200) @(posedge clk);
      tfault[2][3] = 1'b1;
      repeat (3) @(posedge clk);
      seu_q[2] = 1'b1;
      wait_idle(12 * int'(PRB_WORDS) + 2000);
      check(!tfault[0][2] && !tfault[2][3] && !seu_q[2], "both PRMs of FT2 rewritten");
      check(cfg_code[2] == 5'b11111 && !fatal_vec[2],
            $sformatf("FT2 code %b after two transient faults, expected 11111", cfg_code[2]));
      if (!tfault[2][3] && !seu_q[2] && cfg_code[2] == 5'b11111) n_multi++;
      n_transient += 3;
      $display("  two PRMs flagged in FT2 done at cycle %0d (code FT2 = %b)", cyc, cfg_code[2]);
    end

    // 4. permanent FU fault in FT1 PRR2: a transient try, then generation 1
    run_repair(1, 2, 1'b1, "permanent FU fault FT1/PRR2");
    check(cfg_code[1] == 5'b11011, $sformatf("FT1 code %b, expected 11011", cfg_code[1]));
    if (cfg_code[1] == 5'b11011) n_permanent++;
    check(!fatal, "no fatal after first permanent fault");
    repeat (50) @(posedge clk);

    // 5. transient fault in the CHECKER (PRR3 under code 11011)
    run_repair(1, 3, 1'b0, "transient CHECKER fault FT1/PRR3");
    check(cfg_code[1] == 5'b11011, "checker repair keeps generation 1");

    // 6. permanent fault in generation 1: unrepairable
    pfault[1][4] = 1'b1;
    t0 = cyc;
    while (!fatal_vec[1] && cyc - t0 < 8 * PRB_WORDS + 2000) @(posedge clk);
    check(fatal_vec[1] && fatal, "unrepairable state reported");
    if (fatal_vec[1]) n_fatal++;
    check(hard, "last verdict was a hard fault");
    repeat (100) @(posedge clk);
    check(!busy, "controller idle after fatal");

    // every mechanism must have happened
    check(n_transient >= 3, "transient repairs");
    check(n_permanent >= 1, "generation change");
    check(n_fatal >= 1, "unrepairable report");
    check(n_voter >= 1, "voter PRM repair");
    check(n_checker >= 1, "checker PRM written");
    check(n_copy >= 1, "state copy over the ring");
    check(n_local_rst >= 1, "local reset after generation change");
    check(n_reloc >= 1, "relocated PRBs");
    check(n_hidden >= 1, "errors of unsynchronised units hidden");
    check(n_queued >= 1, "round-robin service of two architectures");
    check(n_multi >= 1, "two PRMs of one architecture repaired as transient");
    $display("mechanisms: transient=%0d permanent=%0d fatal=%0d voter=%0d checker=%0d copy=%0d local_rst=%0d relocated=%0d hidden=%0d queued=%0d multi=%0d prbs=%0d",
             n_transient, n_permanent, n_fatal, n_voter, n_checker, n_copy, n_local_rst,
             n_reloc, n_hidden, n_queued, n_multi, n_prb);
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
