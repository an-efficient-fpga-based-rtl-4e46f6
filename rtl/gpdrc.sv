// gpdrc: generic partial dynamic reconfiguration controller.
//
// A hardware-only controller that keeps FT_COUNT fault-tolerant (FT)
// architectures of PRM_COUNT partially reconfigurable modules (PRMs) alive.
// Each architecture reports a PRM error vector (bit k = PRM in PRR k). The
// controller captures the vectors, picks a faulty architecture round-robin,
// localises the faulty PRM and classifies the fault:
//  * transient (first detection): the golden PRB of the PRM's type is read
//    from external bitstream storage, its frame addresses are relocated to
//    the faulty PRR, and it is streamed to ICAP;
//  * permanent (detected again in the next cycle of that architecture): the
//    next-generation configuration without the faulty PRR is chosen, its
//    PRM_ROUTE PRB is written to PRR0, then the PRB of every assigned PRR;
//  * permanent in the last generation, or too few PRMs left: fatal.
// After the PRBs are written rec_done[a] rises and the architecture's errors
// stay ignored until it answers sync_done[a] (synchronisation is left to the
// architecture, as the document intends).
//
// Bitstream path: address_counter -> (req/addr) memory controller ->
// (rvalid/rdata) relocation_unit -> bitstream_fifo -> icap_wrapper -> ICAP,
// one 32-bit word per clock at best. Status outputs: hard (verdict of the
// last decision), fatal, arch_index and prm_error_index (the architecture
// and PRM being handled), code (configuration code of every architecture).
// Structure and unit names follow the document; widths, encodings and the
// cycle-level protocol are this design's.
module gpdrc
  import gpdrc_pkg::*;
#(
  parameter int unsigned FT_COUNT       = 32,
  parameter int unsigned PRM_COUNT      = 5,
  parameter int unsigned ADDR_W         = 24,
  parameter int unsigned PRB_WORDS      = 1280,
  parameter int unsigned FIFO_DEPTH     = 16,
  parameter logic [31:0] FAR_BASE       = 32'h0040_0000,
  parameter logic [31:0] FT_FAR_STRIDE  = 32'h0000_1000,
  parameter logic [31:0] PRR_FAR_STRIDE = 32'h0000_0100,
  localparam int unsigned FT_W          = (FT_COUNT > 1) ? $clog2(FT_COUNT) : 1,
  localparam int unsigned IDX_W         = (PRM_COUNT > 1) ? $clog2(PRM_COUNT) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // FT architectures
  input  logic [FT_COUNT-1:0][PRM_COUNT-1:0] ft_err,
  input  logic [FT_COUNT-1:0]                sync_done,
  output logic [FT_COUNT-1:0]                rec_done,
  output logic [FT_COUNT-1:0][PRM_COUNT-1:0] code,
  // status
  output logic                               hard,
  output logic                               fatal,
  output logic [FT_COUNT-1:0]                fatal_vec,
  output logic [FT_W-1:0]                    arch_index,
  output logic [IDX_W-1:0]                   prm_error_index,
  output logic                               busy,
  output logic                               permanent,    // current cycle rebuilds the architecture
  output prm_type_e                          job_type,     // PRM type being written
  output logic                               relocated,    // pulse: a frame address was rewritten
  // memory controller
  output logic                               rd_req,
  output logic [ADDR_W-1:0]                  rd_addr,
  input  logic                               rd_valid,
  input  logic [31:0]                        rd_data,
  // ICAP
  output logic                               icap_csib,
  output logic                               icap_rdwrb,
  output logic [31:0]                        icap_i
);
  localparam int unsigned LVL_W = $clog2(FIFO_DEPTH + 1);

  logic [FT_COUNT-1:0][PRM_COUNT-1:0] cap_next, actual, previous;
  logic [FT_COUNT-1:0]                st_mask, cap_mask, req;
  logic take, act_clr, rr_adv, prev_we, begin_cmd, finish_cmd, fatal_cmd, set_code_cmd;
  logic ac_start, ac_busy, rr_valid, enc_valid, prm_hard, hard_q;
  logic [PRM_COUNT-1:0] prev_vec, new_code;
  logic [FT_W-1:0]      rr_grant, ft_q;
  logic [IDX_W-1:0]     enc_idx, job_idx, idx_q;
  logic [ADDR_W-1:0]    job_addr;
  logic [31:0]          job_offset, reloc_data, fifo_dout;
  logic                 reloc_valid, fifo_empty, fifo_full, fifo_pop, icap_idle;
  logic [LVL_W-1:0]     fifo_level;

  always_comb begin
    cap_mask = st_mask;
    if (busy) cap_mask[ft_q] = 1'b1;
    for (int a = 0; a < int'(FT_COUNT); a++) req[a] = |actual[a];
  end

  input_capture_reg #(.FT_COUNT(FT_COUNT), .PRM_COUNT(PRM_COUNT)) u_icr (
    .clk, .rst_n, .err_in(ft_err), .mask(cap_mask), .take, .cap_next);

  actual_error_reg #(.FT_COUNT(FT_COUNT), .PRM_COUNT(PRM_COUNT)) u_aer (
    .clk, .rst_n, .load(take), .load_vec(cap_next), .clr(act_clr), .clr_ft(ft_q), .actual);

  previous_error_reg #(.FT_COUNT(FT_COUNT), .PRM_COUNT(PRM_COUNT)) u_per (
    .clk, .rst_n, .we(prev_we), .wr_ft(ft_q), .wr_vec(prev_vec), .previous);

  round_robin_unit #(.FT_COUNT(FT_COUNT)) u_rr (
    .clk, .rst_n, .req, .advance(rr_adv), .adv_ft(ft_q), .grant(rr_grant), .valid(rr_valid));

  error_encoder #(.PRM_COUNT(PRM_COUNT)) u_enc (
    .vec(actual[rr_grant]), .idx(enc_idx), .valid(enc_valid));

  hard_error_unit #(.PRM_COUNT(PRM_COUNT)) u_hard (
    .act_vec(actual[rr_grant]), .prev_vec(previous[rr_grant]), .idx(enc_idx),
    .hard_vec(), .prm_hard, .hard());

  gpdrc_fsm #(.FT_COUNT(FT_COUNT), .PRM_COUNT(PRM_COUNT)) u_fsm (
    .clk, .rst_n, .rr_valid(rr_valid && enc_valid), .rr_grant, .act_vec(actual[rr_grant]),
    .enc_idx, .prm_hard, .code_cur(code[ft_q]), .ac_busy, .reloc_valid, .fifo_empty,
    .icap_idle, .take, .act_clr, .rr_advance(rr_adv), .prev_we, .prev_vec, .begin_cmd,
    .finish_cmd, .fatal_cmd, .set_code_cmd, .new_code, .ac_start, .busy, .ft_q, .job_idx,
    .idx_q, .hard_q, .perm_q(permanent));

  ft_arch_status #(.FT_COUNT(FT_COUNT), .PRM_COUNT(PRM_COUNT)) u_status (
    .clk, .rst_n, .cmd_ft(ft_q), .begin_cmd, .finish_cmd, .fatal_cmd, .set_code_cmd,
    .new_code, .sync_done, .code, .mask(st_mask), .rec_done, .fatal_vec, .fatal);

  config_luts #(.FT_COUNT(FT_COUNT), .PRM_COUNT(PRM_COUNT), .ADDR_W(ADDR_W),
                .PRB_WORDS(PRB_WORDS), .FAR_BASE(FAR_BASE), .FT_FAR_STRIDE(FT_FAR_STRIDE),
                .PRR_FAR_STRIDE(PRR_FAR_STRIDE)) u_luts (
    .ft(ft_q), .prr(job_idx), .code(code[ft_q]), .prm_type(job_type), .prb_addr(job_addr),
    .far_offset(job_offset));

  address_counter #(.ADDR_W(ADDR_W), .PRB_WORDS(PRB_WORDS), .FIFO_DEPTH(FIFO_DEPTH)) u_ac (
    .clk, .rst_n, .start(ac_start), .base(job_addr), .fifo_level, .rd_ret(rd_valid),
    .rd_req, .rd_addr, .busy(ac_busy));

  relocation_unit u_reloc (
    .clk, .rst_n, .restart(ac_start), .offset(job_offset), .in_valid(rd_valid),
    .in_data(rd_data), .out_valid(reloc_valid), .out_data(reloc_data), .relocated);

  bitstream_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(reloc_valid), .din(reloc_data), .pop(fifo_pop), .dout(fifo_dout),
    .empty(fifo_empty), .full(fifo_full), .level(fifo_level));

  icap_wrapper u_icap (
    .clk, .rst_n, .fifo_empty, .fifo_dout, .fifo_pop, .icap_csib, .icap_rdwrb, .icap_i,
    .idle(icap_idle));

  assign hard            = hard_q;
  assign arch_index      = ft_q;
  assign prm_error_index = idx_q;

  // The FIFO can only overflow if the credit scheme is broken.
  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n) reloc_valid |-> !fifo_full);
endmodule
