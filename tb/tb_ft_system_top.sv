// tb_ft_system_top: end-to-end test of ft_system_top, reduced size: four FT architectures and 32-word partial bitstreams, so the whole scenario runs in a few thousand cycles.
// Stimulus, models and checks are in ft_system_harness: transient, voter,
// checker and permanent faults are injected into the FT architectures and
// the repair through ICAP, the state-copy synchronisation, the change to
// generation 1 and the final unrepairable report are checked.
module tb_ft_system_top;
  import gpdrc_pkg::*;
  localparam int unsigned FT_COUNT = 4;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned ADDR_W   = 24;

  logic                                  clk, rst_n;
  logic [FT_COUNT-1:0][4:1][DATA_W-1:0]  prr_out;
  logic [FT_COUNT-1:0][4:0]              unit_sync_done, fu_load, cfg_code;
  logic [FT_COUNT-1:0]                   voter_seu, fu_enable, fu_local_rst, rec_done, fatal_vec;
  logic [FT_COUNT-1:0][DATA_W-1:0]       ft_out;
  logic                                  hard, fatal, busy, permanent, relocated, mem_en;
  logic [$clog2(FT_COUNT)-1:0]           arch_index;
  logic [2:0]                            prm_error_index;
  prm_type_e                             job_type;
  logic [ADDR_W-1:0]                     mem_addr;
  logic [31:0]                           mem_rdata, icap_i;
  logic                                  icap_csib, icap_rdwrb;

  ft_system_top #(.FT_COUNT(4), .PRB_WORDS(32)) dut (.*);

  ft_system_harness #(.FT_COUNT(4), .PRB_WORDS(32)) h (
    .clk, .rst_n, .prr_out, .unit_sync_done, .voter_seu, .ft_out, .fu_enable, .fu_load,
    .fu_local_rst, .cfg_code, .rec_done, .hard, .fatal, .fatal_vec, .arch_index, .busy,
    .permanent, .relocated, .mem_en, .mem_addr, .mem_rdata, .icap_csib, .icap_rdwrb, .icap_i);
endmodule
