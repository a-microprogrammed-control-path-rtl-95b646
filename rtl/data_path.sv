// data_path - counters, serializers and comparator of the test coprocessor.
//
// Every register here is driven by one control bit of the current
// microprogram word (see tc_pkg::ctrl_t); the data path has no sequencing of
// its own. Its elements follow the ASMD charts of the SHF, SHFCP and MTCK
// commands:
//   iword_cntr  number of full DATA_W-bit words of N (N / DATA_W); iwL, iwD
//   rbits_latch bits in the last, partial word (N mod DATA_W); rbL
//   cbits_cntr  bits / TCK pulses left in the current word or MTCK run;
//               loaded from the FSL word (cbL), with DATA_W (cbM) or from
//               rbits_latch (cbR), decremented by cbD
//   serializers TDI data X (sL), expected response Y (eL), mask Z (mL); all
//               three shift together on sS; b_TDI is bit 0 of the X serializer
//   comparator  on cC, if the mask bit is 1 and b_TDO differs from the
//               expected bit, sets the sticky cmp_fail flag; fC clears it
// The conditions returned to the control path are cbits_cntr = 1,
// rbits_latch = 0 and "last word": (iword_cntr = 1 and rbits_latch = 0) or
// iword_cntr = 0. All updates happen on the rising clock edge; conditions and
// outputs come straight from registers. The split of N into iword_cntr and
// rbits_latch, the three-serializer comparator and the sticky flag are this
// implementation's reading of the published charts. The bTMS and bTCK bits of
// ctrl go straight to the board pins at the top level and are unused here.
module data_path
  import tc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  ctrl_t             ctrl,
  input  logic [DATA_W-1:0] fsl_data,
  input  logic              b_tdo,
  output logic              b_tdi,
  output cond_t             cond,
  output logic              cmp_fail
);
  localparam int unsigned IW_W = DATA_W - RBITS_W;

  logic [IW_W-1:0]    iword_cntr;
  logic [RBITS_W-1:0] rbits_latch;
  logic [DATA_W-1:0]  cbits_cntr;
  logic               exp_bit, mask_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      iword_cntr  <= '0;
      rbits_latch <= '0;
      cbits_cntr  <= '0;
      cmp_fail    <= 1'b0;
    end else begin
      if (ctrl.iwL)      iword_cntr <= fsl_data[DATA_W-1:RBITS_W];
      else if (ctrl.iwD) iword_cntr <= iword_cntr - 1'b1;

      if (ctrl.rbL) rbits_latch <= fsl_data[RBITS_W-1:0];

      if (ctrl.cbL)      cbits_cntr <= fsl_data;
      else if (ctrl.cbM) cbits_cntr <= DATA_W'(DATA_W);
      else if (ctrl.cbR) cbits_cntr <= DATA_W'(rbits_latch);
      else if (ctrl.cbD) cbits_cntr <= cbits_cntr - 1'b1;

      if (ctrl.fC)
        cmp_fail <= 1'b0;
      else if (ctrl.cC && mask_bit && (b_tdo != exp_bit))
        cmp_fail <= 1'b1;
    end
  end

  serializer #(.W(DATA_W)) u_ser_tdi (
    .clk, .rst, .load(ctrl.sL), .shift(ctrl.sS), .din(fsl_data), .bit_o(b_tdi)
  );
  serializer #(.W(DATA_W)) u_ser_exp (
    .clk, .rst, .load(ctrl.eL), .shift(ctrl.sS), .din(fsl_data), .bit_o(exp_bit)
  );
  serializer #(.W(DATA_W)) u_ser_mask (
    .clk, .rst, .load(ctrl.mL), .shift(ctrl.sS), .din(fsl_data), .bit_o(mask_bit)
  );

  assign cond.cb1   = (cbits_cntr == DATA_W'(1));
  assign cond.rb0   = (rbits_latch == '0);
  assign cond.lastw = ((iword_cntr == IW_W'(1)) && cond.rb0) || (iword_cntr == '0);
endmodule
