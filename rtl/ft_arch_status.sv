// ft_arch_status: state of every FT architecture as the controller sees it.
//
// Per architecture it keeps the configuration code (reset: generation 0,
// all PRRs assigned) and a small state:
//   NORMAL   errors are captured;
//   BUSY     a mitigation cycle runs (begin_cmd): errors are ignored;
//   SYNC     all PRBs are written (finish_cmd): rec_done is high and errors
//            stay ignored until the architecture answers with sync_done;
//   FATAL    unrepairable (fatal_cmd): errors are ignored for good.
// mask[a] is high in every state but NORMAL. set_code_cmd writes a new code.
// Commands address architecture cmd_ft and act at the next clock edge.
// rec_done / sync_done follow the document; encoding the handshake as
// "rec_done level until sync_done" is this design's choice.
module ft_arch_status #(
  parameter int unsigned FT_COUNT  = 32,
  parameter int unsigned PRM_COUNT = 5,
  localparam int unsigned FT_W     = (FT_COUNT > 1) ? $clog2(FT_COUNT) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [FT_W-1:0]                    cmd_ft,
  input  logic                               begin_cmd,
  input  logic                               finish_cmd,
  input  logic                               fatal_cmd,
  input  logic                               set_code_cmd,
  input  logic [PRM_COUNT-1:0]               new_code,
  input  logic [FT_COUNT-1:0]                sync_done,
  output logic [FT_COUNT-1:0][PRM_COUNT-1:0] code,
  output logic [FT_COUNT-1:0]                mask,
  output logic [FT_COUNT-1:0]                rec_done,
  output logic [FT_COUNT-1:0]                fatal_vec,
  output logic                               fatal
);
  typedef enum logic [1:0] {A_NORMAL, A_BUSY, A_SYNC, A_FATAL} arch_state_e;
  arch_state_e st [FT_COUNT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < int'(FT_COUNT); a++) begin
        st[a]   <= A_NORMAL;
        code[a] <= '1;
      end
    end else begin
      for (int a = 0; a < int'(FT_COUNT); a++) begin
        if (cmd_ft == FT_W'(a) && fatal_cmd)         st[a] <= A_FATAL;
        else if (cmd_ft == FT_W'(a) && begin_cmd)    st[a] <= A_BUSY;
        else if (cmd_ft == FT_W'(a) && finish_cmd)   st[a] <= A_SYNC;
        else if (st[a] == A_SYNC && sync_done[a])    st[a] <= A_NORMAL;
        if (cmd_ft == FT_W'(a) && set_code_cmd)      code[a] <= new_code;
      end
    end
  end

  always_comb begin
    for (int a = 0; a < int'(FT_COUNT); a++) begin
      mask[a]      = (st[a] != A_NORMAL);
      rec_done[a]  = (st[a] == A_SYNC);
      fatal_vec[a] = (st[a] == A_FATAL);
    end
    fatal = |fatal_vec;
  end
endmodule
