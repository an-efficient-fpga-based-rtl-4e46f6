// gpdrc_fsm: sequencer of the controller's fault mitigation flow.
//
//  IDLE    captured errors move to the actual error register; when an FT
//          architecture has pending errors, the round-robin grant, the
//          encoded PRM index and the hard/transient verdict are latched
//          (step 0: localise the faulty PRM).
//  DECIDE  transient: remember the faulty PRM in the previous error register
//          and reconfigure it alone (A1, A2). Only the repaired PRM is
//          remembered: another PRM flagged in the same vector was not yet
//          repaired, so its next detection counts as its first.
//          permanent: if the architecture already runs a later generation,
//          or dropping the faulty PRRs leaves fewer than three, report it as
//          unrepairable (FATAL). Otherwise the new code is the current code
//          AND the negated error vector (B1), the previous entry is cleared
//          and the PRM_ROUTE PRB of the new configuration is loaded first
//          (B2), then every assigned PRR in ascending order (B3, B4).
//  START   starts the address counter for the current PRR (job_idx).
//  WAIT    waits until the PRB has been fetched, relocated, buffered and
//          written to ICAP.
//  NEXT    permanent path: moves to the next assigned PRR.
//  FINISH  rec_done is raised for the architecture (its synchronisation,
//          A3 / local reset, is done outside the controller), its actual
//          error entry is cleared and the round-robin pointer advances.
// Commands to the other units are single-cycle. The states and their order
// follow the document's flow chart; the cycle-level split is this design's.
module gpdrc_fsm
  import gpdrc_pkg::*;
#(
  parameter int unsigned FT_COUNT  = 32,
  parameter int unsigned PRM_COUNT = 5,
  localparam int unsigned FT_W     = (FT_COUNT > 1) ? $clog2(FT_COUNT) : 1,
  localparam int unsigned IDX_W    = (PRM_COUNT > 1) ? $clog2(PRM_COUNT) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // selection and classification
  input  logic                 rr_valid,
  input  logic [FT_W-1:0]      rr_grant,
  input  logic [PRM_COUNT-1:0] act_vec,
  input  logic [IDX_W-1:0]     enc_idx,
  input  logic                 prm_hard,
  input  logic [PRM_COUNT-1:0] code_cur,    // configuration code of ft_q
  // datapath status
  input  logic                 ac_busy,
  input  logic                 reloc_valid,
  input  logic                 fifo_empty,
  input  logic                 icap_idle,
  // register / unit commands
  output logic                 take,
  output logic                 act_clr,
  output logic                 rr_advance,
  output logic                 prev_we,
  output logic [PRM_COUNT-1:0] prev_vec,
  output logic                 begin_cmd,
  output logic                 finish_cmd,
  output logic                 fatal_cmd,
  output logic                 set_code_cmd,
  output logic [PRM_COUNT-1:0] new_code,
  output logic                 ac_start,
  output logic                 busy,
  // current job
  output logic [FT_W-1:0]      ft_q,
  output logic [IDX_W-1:0]     job_idx,
  output logic [IDX_W-1:0]     idx_q,
  output logic                 hard_q,
  output logic                 perm_q
);
  typedef enum logic [2:0] {S_IDLE, S_DECIDE, S_START, S_WAIT, S_NEXT, S_FINISH, S_FATAL} state_e;
  state_e               state;
  logic [PRM_COUNT-1:0] vec_q;
  logic                 final_gen, too_few, has_next;
  logic [IDX_W-1:0]     next_idx;

  always_comb begin
    new_code  = (code_cur & ~vec_q) | PRM_COUNT'(1);
    final_gen = assigned_count(cfg_code_t'(code_cur), PRM_COUNT) < PRM_COUNT - 1;
    too_few   = assigned_count(cfg_code_t'(new_code), PRM_COUNT) < MIN_FT_PRMS;
    has_next  = 1'b0;
    next_idx  = job_idx;
    for (int k = int'(PRM_COUNT) - 1; k >= 1; k--)
      if (k > int'(job_idx) && code_cur[k]) begin
        has_next = 1'b1;
        next_idx = IDX_W'(k);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ft_q    <= '0;
      vec_q   <= '0;
      idx_q   <= '0;
      hard_q  <= 1'b0;
      perm_q  <= 1'b0;
      job_idx <= '0;
    end else begin
      case (state)
        S_IDLE: if (rr_valid) begin
          ft_q   <= rr_grant;
          vec_q  <= act_vec;
          idx_q  <= enc_idx;
          hard_q <= prm_hard;
          state  <= S_DECIDE;
        end
        S_DECIDE: begin
          if (!hard_q) begin
            job_idx <= idx_q;
            perm_q  <= 1'b0;
            state   <= S_START;
          end else if (final_gen || too_few) begin
            state   <= S_FATAL;
          end else begin
            job_idx <= '0;
            perm_q  <= 1'b1;
            state   <= S_START;
          end
        end
        S_START: state <= S_WAIT;
        S_WAIT: if (!ac_busy && !reloc_valid && fifo_empty && icap_idle)
                  state <= perm_q ? S_NEXT : S_FINISH;
        S_NEXT: begin
          if (has_next) begin
            job_idx <= next_idx;
            state   <= S_START;
          end else begin
            state   <= S_FINISH;
          end
        end
        S_FINISH, S_FATAL: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    take         = (state == S_IDLE);
    busy         = (state != S_IDLE);
    begin_cmd    = (state == S_DECIDE);
    set_code_cmd = (state == S_DECIDE) && hard_q && !final_gen && !too_few;
    prev_we      = (state == S_DECIDE) && !(hard_q && (final_gen || too_few));
    prev_vec     = hard_q ? '0 : (PRM_COUNT'(1) << idx_q);
    fatal_cmd    = (state == S_FATAL);
    finish_cmd   = (state == S_FINISH);
    act_clr      = (state == S_FINISH) || (state == S_FATAL);
    rr_advance   = act_clr;
    ac_start     = (state == S_START);
  end
endmodule
