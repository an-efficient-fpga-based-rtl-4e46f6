// config_luts: the controller's look-up tables and the multiplexers around
// them, resolving one PRM to reconfigure.
//
// For FT architecture ft, PRR index prr and configuration code code:
//  * PRM type LUT: the PRM type held by that PRR (gpdrc_pkg::prr_type);
//  * PRM type address LUT: start of the golden PRB of that type;
//  * PRM router address LUT: start of the PRM_ROUTE PRB of the configuration,
//    chosen when prr == 0 (the "=0" select of the structure);
//  * frame address LUT: frame address of the target PRR, returned as the
//    offset to add to the frame address of the stored PRB, which was built
//    for PRR1 (PRR0 for routing PRBs) of FT architecture 0.
// Every table is a function of the parameters (see gpdrc_pkg), so nothing is
// stored. Combinational. Only one PRB per PRM type is kept, plus one routing
// PRB per configuration, as the document prescribes; the layout is this
// design's choice.
module config_luts
  import gpdrc_pkg::*;
#(
  parameter int unsigned FT_COUNT       = 32,
  parameter int unsigned PRM_COUNT      = 5,
  parameter int unsigned ADDR_W         = 24,
  parameter int unsigned PRB_WORDS      = 1280,
  parameter logic [31:0] FAR_BASE       = 32'h0040_0000,
  parameter logic [31:0] FT_FAR_STRIDE  = 32'h0000_1000,
  parameter logic [31:0] PRR_FAR_STRIDE = 32'h0000_0100,
  localparam int unsigned FT_W          = (FT_COUNT > 1) ? $clog2(FT_COUNT) : 1,
  localparam int unsigned IDX_W         = (PRM_COUNT > 1) ? $clog2(PRM_COUNT) : 1
) (
  input  logic [FT_W-1:0]      ft,
  input  logic [IDX_W-1:0]     prr,
  input  logic [PRM_COUNT-1:0] code,
  output prm_type_e            prm_type,
  output logic [ADDR_W-1:0]    prb_addr,
  output logic [31:0]          far_offset
);
  logic [31:0] far_target, far_stored;
  int unsigned slot;

  always_comb begin
    prm_type   = prr_type(cfg_code_t'(code), int'(prr), PRM_COUNT);
    slot       = (prr == '0) ? route_slot(cfg_code_t'(code), PRM_COUNT) : type_slot(prm_type);
    prb_addr   = ADDR_W'(slot * PRB_WORDS);
    far_target = FAR_BASE + 32'(ft) * FT_FAR_STRIDE + 32'(prr) * PRR_FAR_STRIDE;
    far_stored = FAR_BASE + ((prr == '0) ? 32'd0 : PRR_FAR_STRIDE);
    far_offset = far_target - far_stored;
  end
endmodule
