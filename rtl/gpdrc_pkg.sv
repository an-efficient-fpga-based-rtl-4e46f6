// gpdrc_pkg: types, constants and configuration functions shared by the
// fault-tolerant (FT) architectures and the generic partial dynamic
// reconfiguration controller (GPDRC).
//
// A configuration code has one bit per partially reconfigurable region (PRR):
// bit k set means PRR k holds a module (PRM) in the current configuration.
// PRR0 always holds PRM_ROUTE, so bit 0 is always set. Generation 0 assigns
// every PRR; each later generation drops the PRR(s) found permanently faulty.
// The code of the next generation is the current code with the faulty PRRs
// cleared (bitwise negation of the error vector), as the design prescribes.
//
// Which PRM type sits in which PRR, the storage layout of the golden partial
// bitstreams (PRBs) and the frame-address layout are this design's own
// choices, written here as functions so that every LUT is computed rather
// than stored as a table:
//   generation 0 (all PRRs assigned): PRR1 = VOTER, other PRRs = FU
//   later generations: assigned PRRs in ascending order = FU, CHECKER, FU, ...
//   PRB slot s starts at word s*PRB_WORDS: slot 0 = FU, 1 = VOTER,
//   2 = CHECKER, 3 = PRM_ROUTE of generation 0, 3+k = PRM_ROUTE of the
//   configuration that dropped PRR k.
//   frame address of (FT a, PRR k) = FAR_BASE + a*FT_FAR_STRIDE + k*PRR_FAR_STRIDE.
//   Typed PRBs are built for PRR1 of FT 0, route PRBs for PRR0 of FT 0.
package gpdrc_pkg;

  localparam int unsigned MAX_PRM = 16;          // widest configuration code supported
  typedef logic [MAX_PRM-1:0] cfg_code_t;

  typedef enum logic [2:0] {
    PRM_EMPTY   = 3'd0,
    PRM_ROUTE   = 3'd1,
    PRM_FU      = 3'd2,
    PRM_VOTER   = 3'd3,
    PRM_CHECKER = 3'd4
  } prm_type_e;

  // Xilinx configuration packet words (7-series configuration guide).
  localparam logic [31:0] CFG_SYNC_WORD = 32'hAA99_5566;
  localparam logic [31:0] CFG_FAR_WRITE = 32'h3000_2001;  // type-1 write, FAR, 1 word

  // Smallest number of non-route PRMs that still forms an FT architecture
  // (duplex with checker: FU, CHECKER, FU).
  localparam int unsigned MIN_FT_PRMS = 3;

  function automatic cfg_code_t gen0_code(input int unsigned n_prm);
    cfg_code_t c = '0;
    for (int k = 0; k < int'(n_prm); k++) c[k] = 1'b1;
    return c;
  endfunction

  function automatic int unsigned assigned_count(input cfg_code_t code, input int unsigned n_prm);
    int unsigned n = 0;
    for (int k = 1; k < int'(n_prm); k++) n += int'(code[k]);
    return n;
  endfunction

  // PRM type held by PRR `prr` under configuration `code`.
  function automatic prm_type_e prr_type(input cfg_code_t code, input int unsigned prr,
                                         input int unsigned n_prm);
    int unsigned rank = 0;
    prm_type_e t = PRM_EMPTY;
    if (prr == 0) return PRM_ROUTE;
    if (prr >= n_prm || !code[prr]) return PRM_EMPTY;
    if (assigned_count(code, n_prm) == n_prm - 1)
      return (prr == 1) ? PRM_VOTER : PRM_FU;
    for (int k = 1; k < int'(prr); k++) rank += int'(code[k]);
    t = (rank == 1) ? PRM_CHECKER : PRM_FU;
    return t;
  endfunction

  // PRB slot of a typed PRM.
  function automatic int unsigned type_slot(input prm_type_e t);
    case (t)
      PRM_VOTER:   return 1;
      PRM_CHECKER: return 2;
      default:     return 0;
    endcase
  endfunction

  // PRB slot of the PRM_ROUTE bitstream of configuration `code`.
  function automatic int unsigned route_slot(input cfg_code_t code, input int unsigned n_prm);
    for (int k = 1; k < int'(n_prm); k++)
      if (!code[k]) return 3 + k;
    return 3;
  endfunction

endpackage
