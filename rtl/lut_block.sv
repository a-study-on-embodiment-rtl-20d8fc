// lut_block: RAM-configured logic block of the reconfigurable frame.
//
// A look-up table of 2^N entries of W bits. Configuration bits are written
// into it one entry per cycle (`cfg_we`, `cfg_addr`, `cfg_data`), and the
// output is the entry addressed by the N-bit input, read without a clock, so
// the block computes any function of its inputs that the configuration
// defines. Only the table is rewritten to change the function, without
// re-synthesising anything. The LUT-with-configuration-RAM structure follows
// the document; the write port is this design's. The table is not reset: it
// must be configured before its output is used.
module lut_block #(
  parameter int unsigned N = 6,
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         cfg_we,
  input  logic [N-1:0] cfg_addr,
  input  logic [W-1:0] cfg_data,
  input  logic [N-1:0] in,
  output logic [W-1:0] out
);
  logic [W-1:0] table_q [1 << N];

  always_ff @(posedge clk) begin
    if (cfg_we) table_q[cfg_addr] <= cfg_data;
  end

  assign out = table_q[in];
endmodule
