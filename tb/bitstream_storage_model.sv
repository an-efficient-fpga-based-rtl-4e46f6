// bitstream_storage_model: behavioural model of the external memory that
// holds the golden partial bitstreams (PRBs). Not synthesizable intent; it
// computes each word from its address instead of storing a table.
//
// PRB slot s occupies words s*PRB_WORDS .. s*PRB_WORDS+PRB_WORDS-1
// (slot 0 FU, 1 VOTER, 2 CHECKER, 3.. PRM_ROUTE per configuration). Word
// layout inside a PRB at offset i (M = PRB_WORDS/2):
//   0 dummy 0xFFFFFFFF, 1 sync word, 2 FAR write header, 3 frame address of
//   the build location (PRR1 of FT 0, PRR0 for slots >= 3), 4 marker
//   0xC0DE00ss, M FAR write header, M+1 that frame address + 1,
//   other words 0xD?_iiiiii with ? = slot.
// Synchronous read with LAT clocks of latency (en sampled at a clock edge,
// data valid LAT edges later).
module bitstream_storage_model #(
  parameter int unsigned ADDR_W         = 24,
  parameter int unsigned PRB_WORDS      = 1280,
  parameter int unsigned LAT            = 1,
  parameter logic [31:0] FAR_BASE       = 32'h0040_0000,
  parameter logic [31:0] PRR_FAR_STRIDE = 32'h0000_0100
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [31:0]       rdata
);
  logic [31:0] pipe [LAT];

  function automatic logic [31:0] word_at(input int unsigned a);
    int unsigned s, i, m;
    logic [31:0] far;
    s   = a / PRB_WORDS;
    i   = a % PRB_WORDS;
    m   = PRB_WORDS / 2;
    far = FAR_BASE + ((s >= 3) ? 32'd0 : PRR_FAR_STRIDE);
    if (i == 0)          return 32'hFFFF_FFFF;
    if (i == 1)          return gpdrc_pkg::CFG_SYNC_WORD;
    if (i == 2 || i == m) return gpdrc_pkg::CFG_FAR_WRITE;
    if (i == 3)          return far;
    if (i == m + 1)      return far + 32'd1;
    if (i == 4)          return 32'hC0DE_0000 | 32'(s);
    return {4'hD, 4'(s), 24'(i)};
  endfunction

  always_ff @(posedge clk) begin
    if (en) pipe[0] <= word_at(int'(addr));
    for (int k = 1; k < int'(LAT); k++) pipe[k] <= pipe[k-1];
  end
  assign rdata = pipe[LAT-1];
endmodule
