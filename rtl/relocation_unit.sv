// relocation_unit: moves a partial bitstream to another PRR on the fly.
//
// Stored PRBs carry the frame address of the PRR they were built for. The
// unit watches the word stream; after a type-1 write header to the frame
// address register (CFG_FAR_WRITE) the next word is a frame address, and
// `offset` (target frame address minus stored one) is added to it. All
// other words pass unchanged. `restart` clears the header tracking at the
// start of each PRB. One register stage: out_* follow in_* by one cycle.
// Frame-address rewriting is the document's method; the packet words are
// those of Xilinx 7-series devices.
module relocation_unit
  import gpdrc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,
  input  logic [31:0] offset,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        relocated     // pulse: a frame address was rewritten
);
  logic far_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      far_next  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      relocated <= 1'b0;
    end else begin
      out_valid <= in_valid;
      relocated <= 1'b0;
      if (restart) far_next <= 1'b0;
      else if (in_valid) begin
        if (far_next) begin
          out_data  <= in_data + offset;
          relocated <= 1'b1;
        end else begin
          out_data  <= in_data;
        end
        far_next <= (in_data == CFG_FAR_WRITE);
      end
    end
  end
endmodule
