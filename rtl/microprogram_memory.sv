// microprogram_memory - horizontal microcode store of the control path.
//
// 2**UADDR_W words of type tc_pkg::uword_t (new address, one-hot
// micro-operation, control bits). The contents are the function
// tc_pkg::microcode(), i.e. the Moore ASMD charts of the six test commands
// written one state per word. The read is synchronous, as in an FPGA block
// RAM: the word at addr appears on dout after the rising edge when en is
// high; with en low dout holds, which is how the control path stalls. rst
// loads the IDLE word (address 0) into the output register, the block RAM's
// output reset value. The registered read is what breaks the loop
// memory -> Encoder -> Mux -> Adder -> memory of the published architecture;
// the read style is this implementation's choice.
module microprogram_memory
  import tc_pkg::*;
#(
  parameter int unsigned AW = UADDR_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output uword_t        dout
);
  uword_t rom [2**AW];

  always_comb begin
    for (int i = 0; i < 2**AW; i++) rom[i] = microcode(UADDR_W'(i));
  end

  always_ff @(posedge clk) begin
    if (rst)     dout <= rom[0];
    else if (en) dout <= rom[addr];
  end
endmodule
