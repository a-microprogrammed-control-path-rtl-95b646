// tc_pkg - shared types, constants and microcode of the IEEE 1149.1 test
// coprocessor.
//
// The coprocessor is driven by a horizontal microprogram. Every microprogram
// word has three fields, left to right: a "new address" (an offset inside the
// current command's microcode, used by JUMP and by the branch micro-ops), a
// one-hot micro-operation, and the control bits that drive the data path and
// the two TAP pins b_TMS and b_TCK. The field order, the one-hot micro-op field
// (CONTINUE, JUMP plus one bit per "branch if"), the ten control bits named in
// the MTCK template (iwL iwD rbL cbL cbD cbM sL sS bTMS bTCK) and the MTCK
// microcode itself follow the published design. The extra micro-ops DISPATCH
// and END (loading / resetting Bank_reg), the extra control bits cbR, eL, mL,
// cC and fC, the opcode values, the memory layout and the microcode of RESET,
// TMS0, TMS1, SHF and SHFCP are this implementation's own choices.
//
// Microcode layout (absolute addresses, 44 of 64 positions used):
//   0  IDLE      wait for a command word in the FSL FIFO (common)
//   1  DISPATCH  read opcode, load Bank_reg with the command base (common)
//   2  RESET     5 words: 32 TCK pulses with TMS=1, clears the compare flag
//   7  TMS0      2 words: TMS=0 and one TCK pulse
//   9  TMS1      2 words: TMS=1 and one TCK pulse
//  11  MTCK      5 words: TMS=0 and N TCK pulses
//  16  SHF       13 words: shift N bits of X, TMS=1 on the last bit
//  29  SHFCP     15 words: as SHF, plus compare TDO with Y where Z is 1
package tc_pkg;

  // Width of a CPU word (X in the ASMD charts) and of the FSL data bus.
  localparam int unsigned DATA_W  = 32;
  // log2(DATA_W): the low bits of N give the bits of the last partial word.
  localparam int unsigned RBITS_W = 5;
  // New-address field: enough for the longest command (15 states).
  localparam int unsigned NADDR_W = 4;
  // Microprogram memory address width (64 positions).
  localparam int unsigned UADDR_W = 6;
  // Opcode field in the low bits of a command word.
  localparam int unsigned OPC_W   = 3;

  typedef enum logic [OPC_W-1:0] {
    OP_RESET = 3'd0,
    OP_TMS0  = 3'd1,
    OP_TMS1  = 3'd2,
    OP_MTCK  = 3'd3,
    OP_SHF   = 3'd4,
    OP_SHFCP = 3'd5
  } opcode_e;

  // One-hot micro-operation field.
  typedef struct packed {
    logic cont;         // CONTINUE: next sequential word
    logic jump;         // JUMP to new address
    logic bifn_exists;  // BRANCH IF /FSL_S_Exists
    logic bif_lastw;    // BRANCH IF last word (Cond_B)
    logic bif_rb0;      // BRANCH IF rbits_latch = 0 (Cond_C)
    logic bifn_cb1;     // BRANCH IF /(cbits_cntr = 1) (/Cond_A, /Cond_D)
    logic dispatch;     // load Bank_reg from the opcode, jump to new address
    logic fin;          // reset Bank_reg, jump to new address (END)
  } uop_t;

  // Control bits: the first ten are the MTCK template's columns.
  typedef struct packed {
    logic iwL;   // iword_cntr <= N / DATA_W            (reads FSL)
    logic iwD;   // iword_cntr <= iword_cntr - 1
    logic rbL;   // rbits_latch <= N mod DATA_W          (reads FSL)
    logic cbL;   // cbits_cntr <= FSL_S_Data              (reads FSL)
    logic cbD;   // cbits_cntr <= cbits_cntr - 1
    logic cbM;   // cbits_cntr <= DATA_W ("X")
    logic sL;    // TDI serializer <= FSL_S_Data          (reads FSL)
    logic sS;    // shift all serializers by one bit
    logic bTMS;  // board TMS level
    logic bTCK;  // board TCK level
    logic cbR;   // cbits_cntr <= rbits_latch
    logic eL;    // expected-response serializer <= FSL_S_Data (reads FSL)
    logic mL;    // mask serializer <= FSL_S_Data             (reads FSL)
    logic cC;    // compare b_TDO with expected bit where mask bit is 1
    logic fC;    // clear the compare-failure flag
  } ctrl_t;

  typedef struct packed {
    logic [NADDR_W-1:0] new_addr;
    uop_t               uop;
    ctrl_t              ctrl;
  } uword_t;

  // Conditions reported by the data path.
  typedef struct packed {
    logic cb1;    // cbits_cntr = 1
    logic lastw;  // (iword_cntr = 1 and rbits_latch = 0) or iword_cntr = 0
    logic rb0;    // rbits_latch = 0
  } cond_t;

  localparam uop_t U_NONE = '0;
  localparam ctrl_t C_NONE = '0;

  // Command base addresses.
  localparam logic [UADDR_W-1:0] BASE_RESET = 6'd2;
  localparam logic [UADDR_W-1:0] BASE_TMS0  = 6'd7;
  localparam logic [UADDR_W-1:0] BASE_TMS1  = 6'd9;
  localparam logic [UADDR_W-1:0] BASE_MTCK  = 6'd11;
  localparam logic [UADDR_W-1:0] BASE_SHF   = 6'd16;
  localparam logic [UADDR_W-1:0] BASE_SHFCP = 6'd29;
  localparam int unsigned        UCODE_USED = 44;

  // Opcode to microcode base address; unknown opcodes map to 0 (IDLE), so the
  // word is consumed and ignored.
  function automatic logic [UADDR_W-1:0] cmd_base(logic [OPC_W-1:0] opc);
    case (opc)
      OP_RESET: return BASE_RESET;
      OP_TMS0:  return BASE_TMS0;
      OP_TMS1:  return BASE_TMS1;
      OP_MTCK:  return BASE_MTCK;
      OP_SHF:   return BASE_SHF;
      OP_SHFCP: return BASE_SHFCP;
      default:  return '0;
    endcase
  endfunction

  // Micro-op constructors.
  function automatic uop_t u_cont();
    uop_t u = U_NONE; u.cont = 1'b1; return u;
  endfunction
  function automatic uop_t u_jump();
    uop_t u = U_NONE; u.jump = 1'b1; return u;
  endfunction
  function automatic uop_t u_fin();
    uop_t u = U_NONE; u.fin = 1'b1; return u;
  endfunction
  function automatic uop_t u_bifn_cb1();
    uop_t u = U_NONE; u.bifn_cb1 = 1'b1; return u;
  endfunction
  function automatic uop_t u_bif_lastw();
    uop_t u = U_NONE; u.bif_lastw = 1'b1; return u;
  endfunction
  function automatic uop_t u_bif_rb0();
    uop_t u = U_NONE; u.bif_rb0 = 1'b1; return u;
  endfunction

  function automatic uword_t mk(logic [NADDR_W-1:0] na, uop_t u, ctrl_t c);
    uword_t w;
    w.new_addr = na;
    w.uop      = u;
    w.ctrl     = c;
    return w;
  endfunction

  // Control bit sets used below.
  function automatic ctrl_t c_tms_tck(logic tms, logic tck);
    ctrl_t c = C_NONE; c.bTMS = tms; c.bTCK = tck; return c;
  endfunction

  // Microcode of the shift commands. cmp selects SHFCP (three FSL words per
  // chunk: X, Y, Z, and a comparison on every TCK pulse) over SHF.
  // off is the offset inside the command.
  function automatic uword_t shift_word(logic cmp, int unsigned off);
    ctrl_t c = C_NONE;
    int unsigned o;   // offset in the SHF numbering
    // SHFCP inserts two load states (Y, Z) after the X load: remap.
    if (cmp) begin
      if (off <= 1)      o = off;
      else if (off == 2) o = 100;   // load Y
      else if (off == 3) o = 101;   // load Z, then decide (Cond_B)
      else               o = off - 2;
    end else begin
      o = off;
    end
    case (o)
      // LOADN: iword_cntr and rbits_latch from N
      0: begin c.iwL = 1'b1; c.rbL = 1'b1; return mk('0, u_cont(), c); end
      // ASMD state 2: serializer <= X; decide Cond_B (SHF only)
      1: begin
        c.sL = 1'b1;
        if (cmp) return mk('0, u_cont(), c);
        return mk(4'(6), u_bif_lastw(), c);
      end
      100: begin c.eL = 1'b1; return mk('0, u_cont(), c); end
      101: begin c.mL = 1'b1; return mk(4'(8), u_bif_lastw(), c); end
      // ASMD state 10: not the last word, cbits_cntr <= X
      2: begin c.cbM = 1'b1; c.iwD = 1'b1; return mk('0, u_cont(), c); end
      // full-word loop head: more than one bit left?
      3: return mk(4'(cmp ? 7 : 5), u_bifn_cb1(), c);
      // last bit of a non-last word: TMS stays 0, back to the next load
      4: begin
        c.bTCK = 1'b1; c.sS = 1'b1; c.cC = cmp;
        return mk(4'd1, u_jump(), c);
      end
      // one more bit of a non-last word
      5: begin
        c.cbD = 1'b1; c.bTCK = 1'b1; c.sS = 1'b1; c.cC = cmp;
        return mk(4'(cmp ? 5 : 3), u_jump(), c);
      end
      // ASMD state 3: Cond_C (rbits_latch = 0)?
      6: return mk(4'(cmp ? 10 : 8), u_bif_rb0(), c);
      // ASMD state 4: cbits_cntr <= rbits_latch
      7: begin c.cbR = 1'b1; return mk(4'(cmp ? 11 : 9), u_jump(), c); end
      // ASMD state 8: cbits_cntr <= X
      8: begin c.cbM = 1'b1; return mk('0, u_cont(), c); end
      // ASMD state 5: Cond_D (cbits_cntr = 1)?
      9: return mk(4'(cmp ? 14 : 12), u_bifn_cb1(), c);
      // ASMD state 6: b_TMS <= 1
      10: begin c.bTMS = 1'b1; return mk('0, u_cont(), c); end
      // ASMD state 7: b_TMS, b_TCK (last bit), then END
      11: begin
        c.bTMS = 1'b1; c.bTCK = 1'b1; c.cC = cmp;
        return mk('0, u_fin(), c);
      end
      // ASMD state 9: decrement cbits_cntr, TCK pulse, serialize one more bit
      12: begin
        c.cbD = 1'b1; c.bTCK = 1'b1; c.sS = 1'b1; c.cC = cmp;
        return mk(4'(cmp ? 11 : 9), u_jump(), c);
      end
      default: return mk('0, u_fin(), C_NONE);
    endcase
  endfunction

  // Contents of the microprogram memory, by absolute address.
  function automatic uword_t microcode(logic [UADDR_W-1:0] a);
    ctrl_t c = C_NONE;
    uop_t  u = U_NONE;
    int unsigned ai = int'(a);
    // common positions
    if (ai == 0) begin
      u.bifn_exists = 1'b1;
      return mk('0, u, C_NONE);              // IDLE: wait for a command
    end
    if (ai == 1) begin
      u.dispatch = 1'b1;
      return mk('0, u, C_NONE);              // DISPATCH to offset 0
    end
    // RESET: like MTCK with TMS held at 1 and a count of X
    if (ai >= int'(BASE_RESET) && ai < int'(BASE_TMS0)) begin
      case (ai - int'(BASE_RESET))
        0: begin c.cbM = 1'b1; c.fC = 1'b1; c.bTMS = 1'b1; return mk('0, u_cont(), c); end
        1: return mk(4'd3, u_bifn_cb1(), c_tms_tck(1'b1, 1'b0));
        2: return mk(4'd4, u_jump(), c_tms_tck(1'b1, 1'b1));
        3: begin c = c_tms_tck(1'b1, 1'b1); c.cbD = 1'b1; return mk(4'd1, u_jump(), c); end
        default: return mk('0, u_fin(), c_tms_tck(1'b1, 1'b0));
      endcase
    end
    if (ai >= int'(BASE_TMS0) && ai < int'(BASE_TMS1)) begin
      if (ai == int'(BASE_TMS0)) return mk('0, u_cont(), C_NONE);
      return mk('0, u_fin(), c_tms_tck(1'b0, 1'b1));
    end
    if (ai >= int'(BASE_TMS1) && ai < int'(BASE_MTCK)) begin
      if (ai == int'(BASE_TMS1)) return mk('0, u_cont(), c_tms_tck(1'b1, 1'b0));
      return mk('0, u_fin(), c_tms_tck(1'b1, 1'b1));
    end
    // MTCK: the published four-position template plus its END position
    if (ai >= int'(BASE_MTCK) && ai < int'(BASE_SHF)) begin
      case (ai - int'(BASE_MTCK))
        0: begin c.cbL = 1'b1; return mk('0, u_cont(), c); end
        1: return mk(4'd3, u_bifn_cb1(), C_NONE);
        2: return mk(4'd4, u_jump(), c_tms_tck(1'b0, 1'b1));
        3: begin c.cbD = 1'b1; c.bTCK = 1'b1; return mk(4'd1, u_jump(), c); end
        default: return mk('0, u_fin(), C_NONE);
      endcase
    end
    if (ai >= int'(BASE_SHF) && ai < int'(BASE_SHFCP))
      return shift_word(1'b0, ai - int'(BASE_SHF));
    if (ai >= int'(BASE_SHFCP) && ai < int'(UCODE_USED))
      return shift_word(1'b1, ai - int'(BASE_SHFCP));
    // unused positions return to IDLE
    return mk('0, u_fin(), C_NONE);
  endfunction

endpackage
