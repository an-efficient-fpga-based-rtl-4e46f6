// ft_arch: one fault-tolerant (FT) architecture in the dynamic area, built
// from five partially reconfigurable regions PRR0..PRR4.
//
// PRR0 holds PRM_ROUTE, which routes the unit inputs and outputs; PRR1..PRR4
// hold the other PRMs as given by the configuration code (see gpdrc_pkg):
//  * generation 0 (code 11111): TMR, PRR1 = PRM_VOTER, PRR2..4 = FU1..FU3,
//    checked by the duplicated voter (prm_voter);
//  * generation 1 (one PRR dropped): duplex with checker, the remaining PRRs
//    in ascending order hold FU1, CHECKER, FU2 (duplex_checker).
// The functional units themselves are outside this module: their words enter
// on prr_out[k]. The module returns the voted/selected output and the PRM
// error vector indexed by PRR (bit 0, err_route, is always 0 because
// PRM_ROUTE has no detection logic). ft_sync_ctrl hides errors and drives the
// state-copy ring after each reconfiguration. A code with fewer than three
// assigned PRRs is unrepairable: the output then follows the first assigned
// PRR and no errors are reported. Combinational apart from ft_sync_ctrl.
// The PRR-to-role mapping is this design's choice; the two generations and
// their detection logic follow the document.
module ft_arch
  import gpdrc_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [4:0]           cfg_code,
  input  logic [4:1][DATA_W-1:0] prr_out,
  input  logic                 voter_seu,        // upset in the voter PRM (copy B)
  input  logic                 rec_end,
  input  logic [4:0]           unit_sync_done,
  output logic [DATA_W-1:0]    out,
  output logic [4:0]           prm_err,          // to the GPDRC, PRR-indexed
  output logic [4:0]           stateful,         // PRRs holding FU / CHECKER
  output logic                 enable,
  output logic [4:0]           load,
  output logic                 local_rst,
  output logic                 sync_done
);
  localparam int unsigned NPRR = 5;

  logic [2:0]        r_idx [3];      // PRRs of the three roles
  logic [2:0]        v_idx;          // voter PRR (generation 0)
  logic              gen0, gen1;
  logic [DATA_W-1:0] v_out, d_out;
  logic [2:0]        v_err;
  logic              v_err_voter, d_err1, d_err_ch, d_err2;
  logic [4:0]        raw_err;
  cfg_code_t         code_w;

  int unsigned n;
  prm_type_e   t;

  always_comb begin
    code_w = cfg_code_t'(cfg_code);
    n      = 0;
    t      = PRM_EMPTY;
    v_idx  = 3'd1;
    stateful = '0;
    for (int r = 0; r < 3; r++) r_idx[r] = 3'd1;
    for (int k = 1; k < int'(NPRR); k++) begin
      t = prr_type(code_w, k, NPRR);
      if (t == PRM_VOTER) v_idx = 3'(k);
      if (t == PRM_FU || t == PRM_CHECKER) begin
        stateful[k] = 1'b1;
        if (n < 3) r_idx[n] = 3'(k);
        n++;
      end
    end
    gen0 = (assigned_count(code_w, NPRR) == NPRR - 1);
    gen1 = (assigned_count(code_w, NPRR) == NPRR - 2);
  end

  prm_voter #(.DATA_W(DATA_W)) u_prm_voter (
    .fu1(prr_out[r_idx[0]]), .fu2(prr_out[r_idx[1]]), .fu3(prr_out[r_idx[2]]),
    .seu_b(voter_seu), .out(v_out), .err(v_err), .err_voter(v_err_voter));

  duplex_checker #(.DATA_W(DATA_W)) u_duplex (
    .fu1(prr_out[r_idx[0]]), .chk(prr_out[r_idx[1]]), .fu2(prr_out[r_idx[2]]),
    .out(d_out), .err1(d_err1), .err_ch(d_err_ch), .err2(d_err2));

  always_comb begin
    raw_err = '0;
    if (gen0) begin
      out                 = v_out;
      raw_err[r_idx[0]]   = v_err[0];
      raw_err[r_idx[1]]   = v_err[1];
      raw_err[r_idx[2]]   = v_err[2];
      raw_err[v_idx]      = v_err_voter;
    end else if (gen1) begin
      out                 = d_out;
      raw_err[r_idx[0]]   = d_err1;
      raw_err[r_idx[1]]   = d_err_ch;
      raw_err[r_idx[2]]   = d_err2;
    end else begin
      out                 = prr_out[r_idx[0]];
    end
    raw_err[0] = 1'b0;                       // err_route
  end

  ft_sync_ctrl #(.NPRR(NPRR)) u_sync (
    .clk, .rst_n, .cfg_code, .stateful, .err_in(raw_err), .rec_end, .unit_sync_done,
    .err_out(prm_err), .enable, .load, .local_rst, .sync_done);
endmodule
