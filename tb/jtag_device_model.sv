// jtag_device_model - behavioural model of one IEEE 1149.1 device on a board,
// used as the unit under test in the coprocessor testbenches. Not
// synthesizable design; a plain simulation model.
//
// It has the 16-state TAP controller, a 4-bit instruction register (Capture-IR
// loads 4'b0001), a BR_LEN-bit boundary register selected by EXTEST (4'b0000)
// and a 1-bit bypass register for every other instruction. TDI and TMS are
// sampled on the rising edge of tck; TDO changes on the falling edge and shows
// the LSB of the selected register in Shift-IR/Shift-DR. Capture-DR loads
// pins_in into the boundary register; Update-DR copies it to pins_out while
// EXTEST is active (the output cells). tck_in_rti counts TCK rising edges
// spent in Run-Test/Idle.
module jtag_device_model #(
  parameter int unsigned BR_LEN = 8
) (
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  output logic              tdo,
  input  logic [BR_LEN-1:0] pins_in,
  output logic [BR_LEN-1:0] pins_out,
  output logic [3:0]        state_o,
  output int unsigned       tck_in_rti
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_e;

  tap_e              st = TLR;
  logic [3:0]        ir = 4'b1111, ir_sh = 4'b0;
  logic [BR_LEN-1:0] br = '0;
  logic              byp = 1'b0;

  initial begin
    tdo = 1'b0;
    pins_out = '0;
    tck_in_rti = 0;
  end

  function automatic tap_e next(tap_e s, logic m);
    case (s)
      TLR:    return m ? TLR    : RTI;
      RTI:    return m ? SEL_DR : RTI;
      SEL_DR: return m ? SEL_IR : CAP_DR;
      CAP_DR: return m ? EX1_DR : SH_DR;
      SH_DR:  return m ? EX1_DR : SH_DR;
      EX1_DR: return m ? UPD_DR : PAU_DR;
      PAU_DR: return m ? EX2_DR : PAU_DR;
      EX2_DR: return m ? UPD_DR : SH_DR;
      UPD_DR: return m ? SEL_DR : RTI;
      SEL_IR: return m ? TLR    : CAP_IR;
      CAP_IR: return m ? EX1_IR : SH_IR;
      SH_IR:  return m ? EX1_IR : SH_IR;
      EX1_IR: return m ? UPD_IR : PAU_IR;
      PAU_IR: return m ? EX2_IR : PAU_IR;
      EX2_IR: return m ? UPD_IR : SH_IR;
      UPD_IR: return m ? SEL_DR : RTI;
      default: return TLR;
    endcase
  endfunction

  wire extest = (ir == 4'b0000);

  always @(posedge tck) begin
    case (st)
      TLR:    ir <= 4'b1111;
      RTI:    tck_in_rti <= tck_in_rti + 1;
      CAP_IR: ir_sh <= 4'b0001;
      SH_IR:  ir_sh <= {tdi, ir_sh[3:1]};
      UPD_IR: ir <= ir_sh;
      CAP_DR: if (extest) br <= pins_in; else byp <= 1'b0;
      SH_DR:  if (extest) br <= {tdi, br[BR_LEN-1:1]}; else byp <= tdi;
      UPD_DR: if (extest) pins_out <= br;
      default: ;
    endcase
    st <= next(st, tms);
  end

  always @(negedge tck) begin
    if (st == SH_IR)      tdo <= ir_sh[0];
    else if (st == SH_DR) tdo <= extest ? br[0] : byp;
  end

  assign state_o = st;
endmodule
