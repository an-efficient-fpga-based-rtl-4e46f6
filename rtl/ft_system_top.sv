// ft_system_top: an FPGA system protected by fault-tolerant (FT)
// architectures and repaired by dynamic partial reconfiguration.
//
// The dynamic area holds FT_COUNT FT architectures (ft_arch), each spread
// over five partially reconfigurable regions PRR0..PRR4. The static area
// holds the generic partial dynamic reconfiguration controller (gpdrc) and
// the memory controller that reads golden partial bitstreams from external
// storage. Each architecture sends its 5-bit PRM error vector to the
// controller (5*FT_COUNT lines in all); the controller rewrites faulty
// regions through ICAP and raises rec_done[a] when a repair is written; the
// architecture synchronises its units and answers sync_done.
//
// The functional units placed in the PRRs compute the protected function,
// which this design does not define: their words enter on prr_out, and the
// synchronisation controls for them (fu_enable, fu_load, fu_local_rst) leave
// as ports together with the configuration code of every architecture. ICAP
// and the bitstream storage are outside as well. Clock: one domain, clk;
// reset: asynchronous, active low. The overall structure follows the
// document; port encodings are this design's.
module ft_system_top
  import gpdrc_pkg::*;
#(
  parameter int unsigned FT_COUNT    = 32,
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned PRB_WORDS   = 1280,
  parameter int unsigned ADDR_W      = 24,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned STORAGE_LAT = 1,
  localparam int unsigned PRM_COUNT  = 5,
  localparam int unsigned FT_W       = (FT_COUNT > 1) ? $clog2(FT_COUNT) : 1,
  localparam int unsigned IDX_W      = $clog2(PRM_COUNT)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // functional units in PRR1..PRR4 of every FT architecture
  input  logic [FT_COUNT-1:0][4:1][DATA_W-1:0]  prr_out,
  input  logic [FT_COUNT-1:0][4:0]              unit_sync_done,
  input  logic [FT_COUNT-1:0]                   voter_seu,
  output logic [FT_COUNT-1:0][DATA_W-1:0]       ft_out,
  output logic [FT_COUNT-1:0]                   fu_enable,
  output logic [FT_COUNT-1:0][4:0]              fu_load,
  output logic [FT_COUNT-1:0]                   fu_local_rst,
  output logic [FT_COUNT-1:0][4:0]              cfg_code,
  // controller status
  output logic [FT_COUNT-1:0]                   rec_done,
  output logic                                  hard,
  output logic                                  fatal,
  output logic [FT_COUNT-1:0]                   fatal_vec,
  output logic [FT_W-1:0]                       arch_index,
  output logic [IDX_W-1:0]                      prm_error_index,
  output logic                                  busy,
  output logic                                  permanent,
  output prm_type_e                             job_type,
  output logic                                  relocated,
  // bitstream storage
  output logic                                  mem_en,
  output logic [ADDR_W-1:0]                     mem_addr,
  input  logic [31:0]                           mem_rdata,
  // ICAP
  output logic                                  icap_csib,
  output logic                                  icap_rdwrb,
  output logic [31:0]                           icap_i
);
  logic [FT_COUNT-1:0][PRM_COUNT-1:0] prm_err;
  logic [FT_COUNT-1:0]                sync_done;
  logic                               rd_req, rd_valid;
  logic [ADDR_W-1:0]                  rd_addr;
  logic [31:0]                        rd_data;

  for (genvar a = 0; a < int'(FT_COUNT); a++) begin : g_ft
    ft_arch #(.DATA_W(DATA_W)) u_ft (
      .clk, .rst_n, .cfg_code(cfg_code[a]), .prr_out(prr_out[a]), .voter_seu(voter_seu[a]),
      .rec_end(rec_done[a]), .unit_sync_done(unit_sync_done[a]), .out(ft_out[a]),
      .prm_err(prm_err[a]), .stateful(), .enable(fu_enable[a]), .load(fu_load[a]),
      .local_rst(fu_local_rst[a]), .sync_done(sync_done[a]));
  end

  gpdrc #(.FT_COUNT(FT_COUNT), .PRM_COUNT(PRM_COUNT), .ADDR_W(ADDR_W), .PRB_WORDS(PRB_WORDS),
          .FIFO_DEPTH(FIFO_DEPTH)) u_gpdrc (
    .clk, .rst_n, .ft_err(prm_err), .sync_done, .rec_done, .code(cfg_code), .hard, .fatal,
    .fatal_vec, .arch_index, .prm_error_index, .busy, .permanent, .job_type, .relocated,
    .rd_req, .rd_addr, .rd_valid, .rd_data, .icap_csib, .icap_rdwrb, .icap_i);

  memory_controller #(.ADDR_W(ADDR_W), .STORAGE_LAT(STORAGE_LAT)) u_memctl (
    .clk, .rst_n, .req(rd_req), .addr(rd_addr), .rvalid(rd_valid), .rdata(rd_data),
    .mem_en, .mem_addr, .mem_rdata);
endmodule
