// ft_sync_ctrl: synchronisation of an FT architecture after partial
// reconfiguration (the voter-side control of the state-copy ring).
//
// While running, the controller records which PRRs reported an error since
// the last synchronisation. When the GPDRC raises rec_end (all PRBs written):
//  * if the configuration code is unchanged (transient repair), it drops
//    `enable` to freeze every unit, so each unit exposes its state register
//    on its ring link, and raises load[k] for the recorded stateful units,
//    which copy the state of their ring predecessor. When a loaded unit
//    answers with unit_sync_done[k], the controller ends the copy;
//  * if the code changed (new generation, every PRM rewritten), there is no
//    intact unit to copy from, so it pulses local_rst for all units.
// It then pulses sync_done for one cycle and waits for rec_end to fall.
// err_out passes err_in only in the RUN state: errors of a unit that is not
// yet synchronised are hidden, as the document requires. A voter-only repair
// (no stateful unit recorded) finishes at once.
// Timing: rec_end -> COPY (1 cycle) -> unit_sync_done -> sync_done pulse.
// The ring itself is formed by the units; the state encoding is this
// design's own choice, as is the local reset after a generation change.
module ft_sync_ctrl #(
  parameter int unsigned NPRR = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NPRR-1:0] cfg_code,
  input  logic [NPRR-1:0] stateful,        // PRRs holding FU or CHECKER units
  input  logic [NPRR-1:0] err_in,
  input  logic            rec_end,
  input  logic [NPRR-1:0] unit_sync_done,
  output logic [NPRR-1:0] err_out,
  output logic            enable,
  output logic [NPRR-1:0] load,
  output logic            local_rst,
  output logic            sync_done
);
  typedef enum logic [2:0] {S_RUN, S_COPY, S_RESET, S_DONE, S_WAIT_LOW} state_e;
  state_e          state;
  logic [NPRR-1:0] seen, load_q, code_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_RUN;
      seen   <= '0;
      load_q <= '0;
      code_q <= '1;
    end else begin
      case (state)
        S_RUN: begin
          seen <= seen | err_in;
          if (rec_end) begin
            if (cfg_code != code_q) begin
              state <= S_RESET;
            end else if (|((seen | err_in) & stateful)) begin
              load_q <= (seen | err_in) & stateful;
              state  <= S_COPY;
            end else begin
              state <= S_DONE;
            end
          end
        end
        S_COPY:  if (|(unit_sync_done & load_q)) state <= S_DONE;
        S_RESET: state <= S_DONE;
        S_DONE: begin
          seen   <= '0;
          load_q <= '0;
          code_q <= cfg_code;
          state  <= S_WAIT_LOW;
        end
        S_WAIT_LOW: if (!rec_end) state <= S_RUN;
        default: state <= S_RUN;
      endcase
    end
  end

  always_comb begin
    err_out   = (state == S_RUN && !rec_end) ? err_in : '0;
    enable    = !(state == S_COPY || state == S_RESET);
    load      = (state == S_COPY) ? load_q : '0;
    local_rst = (state == S_RESET);
    sync_done = (state == S_DONE);
  end
endmodule
