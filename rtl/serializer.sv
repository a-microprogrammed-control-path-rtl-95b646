// serializer - parallel-load, LSB-first shift register.
//
// Converts a word written by the CPU into a bit stream. load copies din into
// the register; shift moves it one place towards bit 0, filling the top with
// 0. bit_o is always bit 0, so the first bit presented is din[0], matching
// the rightmost-bit-first order of SVF bit strings. load has priority over
// shift. Both take effect on the rising clock edge; bit_o is a register
// output. The coprocessor uses three of these: TDI data (X), expected response
// (Y) and compare mask (Z). The published design names serializers as a data
// path element; their width and bit order are this implementation's choice.
module serializer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic         bit_o
);
  logic [W-1:0] sreg;

  always_ff @(posedge clk) begin
    if (rst)        sreg <= '0;
    else if (load)  sreg <= din;
    else if (shift) sreg <= {1'b0, sreg[W-1:1]};
  end

  assign bit_o = sreg[0];
endmodule
