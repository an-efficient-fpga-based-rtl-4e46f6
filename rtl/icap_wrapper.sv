// icap_wrapper: writes FIFO words into the FPGA's internal configuration
// access port (ICAP).
//
// Whenever the FIFO holds a word, the wrapper pops it and presents it on the
// ICAP write port for one clock: icap_csib = 0 (selected), icap_rdwrb = 0
// (write), icap_i = the word with the bits of each byte reversed, as the
// 7-series ICAPE2 port expects. One word per clock, i.e. 400 MB/s at the
// 100 MHz ICAP limit the document names. idle is high when no word is in the
// output register. The bit swapping is device knowledge, not the document's.
module icap_wrapper (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fifo_empty,
  input  logic [31:0] fifo_dout,
  output logic        fifo_pop,
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  output logic        idle
);
  function automatic logic [31:0] swap_bits(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++) r[8*b + i] = w[8*b + 7 - i];
    return r;
  endfunction

  assign fifo_pop = !fifo_empty;
  assign idle     = icap_csib;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icap_csib  <= 1'b1;
      icap_rdwrb <= 1'b1;
      icap_i     <= '0;
    end else begin
      icap_csib  <= !fifo_pop;
      icap_rdwrb <= !fifo_pop;
      if (fifo_pop) icap_i <= swap_bits(fifo_dout);
    end
  end
endmodule
