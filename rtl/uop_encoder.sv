// uop_encoder - the Encoder of the microprogrammed control path.
//
// Purely combinational. From the one-hot micro-operation of the current
// microprogram word and the data path conditions it decides:
//   load       the Mux select: 1 takes the word's new address (JUMP, DISPATCH,
//              END, or a "branch if" whose condition holds), 0 takes the
//              next sequential offset held in ASMD_State_reg (CONTINUE, or a
//              branch not taken)
//   bank_load  Bank_reg takes the command base of the opcode (DISPATCH)
//   bank_reset Bank_reg returns to 0, the common IDLE code (END)
//   fsl_read   pops the FSL FIFO when the word consumes an FSL word
//   stall      the word needs an FSL word but the FIFO is empty: the control
//              path then holds its state and suppresses data path strobes
// fifo_req is the OR of the word's FIFO-consuming control bits, supplied by
// the control path. CONTINUE, JUMP and "branch if" follow the published
// micro-operation set; DISPATCH, END and the stall are this implementation's
// way of driving the Encoder's Load/Reset and FSL_S_Read outputs. The CONTINUE
// bit needs no logic (Load = 0 is the default), so lint reports it unused.
module uop_encoder
  import tc_pkg::*;
(
  input  uop_t  uop,
  input  cond_t cond,
  input  logic  fsl_exists,
  input  logic  fifo_req,
  output logic  load,
  output logic  bank_load,
  output logic  bank_reset,
  output logic  fsl_read,
  output logic  stall
);
  always_comb begin
    load = uop.jump | uop.dispatch | uop.fin
         | (uop.bifn_exists & ~fsl_exists)
         | (uop.bif_lastw   &  cond.lastw)
         | (uop.bif_rb0     &  cond.rb0)
         | (uop.bifn_cb1    & ~cond.cb1);
    stall      = fifo_req & ~fsl_exists;
    fsl_read   = fifo_req &  fsl_exists;
    bank_load  = uop.dispatch & ~stall;
    bank_reset = uop.fin & ~stall;
  end
endmodule
