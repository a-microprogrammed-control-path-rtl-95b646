// test_coprocessor - embedded IEEE 1149.1 test coprocessor (top level).
//
// The CPU writes test commands as 32-bit words into a FIFO (the Fast Simplex
// Link, FSL). A microprogrammed control path reads them, looks up each
// command's microcode, and steps through it one ASMD state per clock cycle,
// driving the board TAP pins b_TMS and b_TCK and the strobes of a small data
// path (counters, serializers, comparator) that feeds b_TDI and checks b_TDO.
//
// Command stream (each item one FSL word, opcode in bits 2:0):
//   RESET                    32 TCK pulses with TMS=1 (Test-Logic-Reset),
//                            clears cmp_fail
//   TMS0 / TMS1              one TCK pulse with TMS=0 / 1
//   MTCK, N                  N TCK pulses with TMS=0 (N >= 1)
//   SHF, N, X0, X1, ...      shift N bits (N >= 1), LSB of X0 first; TMS=1
//                            on the last bit (leaves Shift-xR for Exit1-xR)
//   SHFCP, N, X0,Y0,Z0, ...  as SHF, and compare b_TDO with Y where Z is 1;
//                            a mismatch sets the sticky cmp_fail
// Each TCK pulse is one system clock high followed by at least one low, with
// TMS and TDI changing only while TCK is low or as it falls. b_TDO is sampled
// at the end of the clock cycle in which b_TCK is high.
//
// Ports: fsl_m_* are the CPU's FSL master signals; b_* are the board TAP
// pins; cmp_fail is the comparison result; busy is high while a command runs;
// stall and uaddr show the sequencer for observation.
// Parameter FIFO_DEPTH is the FSL depth (5 words in the published setup).
//
// The partition into FSL FIFO, microprogrammed control path and data path,
// the command set (RESET, TMS0, TMS1, MTCK, SHF, SHFCP) and the FIFO size
// follow the published design; the command word format, the opcode values,
// the sticky cmp_fail result and the status ports are this design's own.
module test_coprocessor
  import tc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 5
) (
  input  logic              clk,
  input  logic              rst,
  // FSL from the CPU
  input  logic [DATA_W-1:0] fsl_m_data,
  input  logic              fsl_m_write,
  output logic              fsl_m_full,
  // board TAP
  output logic              b_tms,
  output logic              b_tck,
  output logic              b_tdi,
  input  logic              b_tdo,
  // status
  output logic              cmp_fail,
  output logic              busy,
  output logic              stall,    // waiting for an FSL word
  output logic [UADDR_W-1:0] uaddr    // microprogram address being fetched
);
  logic [DATA_W-1:0]  s_data;
  logic               s_exists, s_read;
  ctrl_t              ctrl;
  cond_t              cond;

  fsl_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .m_data(fsl_m_data), .m_write(fsl_m_write), .m_full(fsl_m_full),
    .s_data, .s_read, .s_exists
  );

  control_path u_cp (
    .clk, .rst,
    .fsl_data(s_data), .fsl_exists(s_exists), .fsl_read(s_read),
    .cond, .ctrl, .uaddr, .stall, .busy
  );

  data_path u_dp (
    .clk, .rst, .ctrl, .fsl_data(s_data),
    .b_tdo, .b_tdi, .cond, .cmp_fail
  );

  assign b_tms = ctrl.bTMS;
  assign b_tck = ctrl.bTCK;

  // The coprocessor never pops an empty FIFO.
  assert property (@(posedge clk) disable iff (rst) s_read |-> s_exists)
    else $error("test_coprocessor: FSL read while empty");
endmodule
