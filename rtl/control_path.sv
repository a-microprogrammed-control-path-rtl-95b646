// control_path - microprogrammed Moore control path of the test coprocessor.
//
// Structure (improved Moore architecture): Bank_reg holds the microprogram
// base address of the command being executed (0 = the common IDLE/DISPATCH
// code). ASMD_State_reg holds the next sequential offset (current offset + 1,
// through the +1 incrementer). The Mux selects that offset (CONTINUE, branch
// not taken) or the word's new address (JUMP, branch taken, DISPATCH, END),
// and the Adder adds the bank base to form the memory address. So each
// command occupies only as many words as its chart has states, and all
// addresses inside the microcode are offsets.
//
// One microprogram word executes per clock cycle; control bits come from the
// memory's output register, so b_TMS/b_TCK and every data path strobe are
// Moore outputs that change only on the rising edge. When a word needs an FSL
// word and the FIFO is empty the Encoder raises stall: the memory, Bank_reg
// and ASMD_State_reg hold, data path strobes are suppressed, and b_TMS/b_TCK
// keep their levels, so the word is executed once the data arrives.
//
// The Adder takes the value Bank_reg is about to hold (its D input), so the
// first word of a command is fetched in the same cycle as Bank_reg is
// loaded, and END reaches address 0 directly. The opcode-to-base table, that
// bypass, and the stall are this implementation's choices. Only the opcode
// bits of fsl_data are read here; the rest of the word goes to the data path.
module control_path
  import tc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // FSL slave side
  input  logic [DATA_W-1:0] fsl_data,
  input  logic              fsl_exists,
  output logic              fsl_read,
  // data path
  input  cond_t             cond,
  output ctrl_t             ctrl,
  // status
  output logic [UADDR_W-1:0] uaddr,   // address fetched this cycle
  output logic              stall,
  output logic              busy      // a command is being executed
);
  logic [UADDR_W-1:0] bank_q, bank_d;
  logic [NADDR_W-1:0] state_q;   // ASMD_State_reg
  logic [NADDR_W-1:0] mux_out;
  uword_t             uw;
  logic               load, bank_load, bank_reset, fifo_req, mem_en;

  assign fifo_req = uw.uop.dispatch | uw.ctrl.iwL | uw.ctrl.rbL | uw.ctrl.cbL
                  | uw.ctrl.sL | uw.ctrl.eL | uw.ctrl.mL;

  uop_encoder u_enc (
    .uop(uw.uop), .cond, .fsl_exists, .fifo_req,
    .load, .bank_load, .bank_reset, .fsl_read, .stall
  );

  // Mux, Bank_reg next value and Adder
  assign mux_out = load ? uw.new_addr : state_q;
  always_comb begin
    if (bank_reset)     bank_d = '0;
    else if (bank_load) bank_d = cmd_base(fsl_data[OPC_W-1:0]);
    else                bank_d = bank_q;
  end
  assign uaddr  = bank_d + UADDR_W'(mux_out);
  assign mem_en = ~stall;

  always_ff @(posedge clk) begin
    if (rst) begin
      bank_q  <= '0;
      state_q <= NADDR_W'(1);
    end else if (!stall) begin
      bank_q  <= bank_d;
      state_q <= mux_out + 1'b1;
    end
  end

  microprogram_memory u_mem (
    .clk, .rst, .en(mem_en), .addr(uaddr), .dout(uw)
  );

  // Control outputs: strobes are suppressed while stalled, pin levels kept.
  always_comb begin
    ctrl = uw.ctrl;
    if (stall) begin
      ctrl      = C_NONE;
      ctrl.bTMS = uw.ctrl.bTMS;
      ctrl.bTCK = uw.ctrl.bTCK;
    end
  end

  assign busy = (bank_q != '0);

  // The micro-operation field is one-hot.
  assert property (@(posedge clk) disable iff (rst) $onehot(uw.uop))
    else $error("control_path: micro-operation field not one-hot");
endmodule
