// tb_microprogram_memory - self-checking test of the microcode store.
// Checks the MTCK words against the published template (positions 0..3 plus
// END: CONT / BIF /A to 3 / JUMP to END / JUMP to 1 and the control bits
// iwL..bTCK of each row), the common IDLE and DISPATCH words, that every word
// has a one-hot micro-op and that every new address stays inside its
// command, plus the synchronous read: one-cycle latency, hold when en is low
// and the IDLE word after reset.
module tb_microprogram_memory;
  import tc_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [UADDR_W-1:0] addr = '0;
  uword_t dout;
  int checks = 0, failures = 0;

  microprogram_memory dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic read(int a, output uword_t w);
    @(negedge clk); addr = UADDR_W'(a); en = 1;
    @(negedge clk); en = 0; w = dout;
  endtask

  // Template rows, columns iwL iwD rbL cbL cbD cbM sL sS bTMS bTCK.
  localparam logic [9:0] MTCK_CTRL [4] = '{10'b0001000000, 10'b0000000000,
                                           10'b0000000001, 10'b0000100001};
  localparam int unsigned BASES [8] = '{0, 2, 7, 9, 11, 16, 29, 44};

  initial begin
    uword_t w;
    @(negedge clk);
    check(dout.uop.bifn_exists, 1, "reset value is IDLE");
    rst = 0;
    read(1, w);
    check(w.uop.dispatch, 1, "DISPATCH word");
    // hold with en low
    @(negedge clk); addr = 6'd11;
    @(negedge clk); check(dout.uop.dispatch, 1, "hold while en low");
    // MTCK template
    for (int p = 0; p < 4; p++) begin
      read(11 + p, w);
      check(w.ctrl[14:5], MTCK_CTRL[p], $sformatf("MTCK %0d control bits", p));
      check(w.ctrl[4:0], 0, $sformatf("MTCK %0d extra bits", p));
    end
    read(11, w); check(w.uop.cont, 1, "MTCK 0 CONT");
    read(12, w); check(w.uop.bifn_cb1, 1, "MTCK 1 BIF /A");  check(w.new_addr, 3, "MTCK 1 to 3");
    read(13, w); check(w.uop.jump, 1, "MTCK 2 JUMP");        check(w.new_addr, 4, "MTCK 2 to END");
    read(14, w); check(w.uop.jump, 1, "MTCK 3 JUMP");        check(w.new_addr, 1, "MTCK 3 to 1");
    read(15, w); check(w.uop.fin, 1, "MTCK END");
    // every word: one-hot micro-op; branch targets inside the command
    for (int k = 0; k < 7; k++) begin
      for (int a = BASES[k]; a < BASES[k+1]; a++) begin
        read(a, w);
        check($onehot(w.uop), 1, $sformatf("one-hot at %0d", a));
        if (!w.uop.cont && !w.uop.fin && !w.uop.dispatch)
          check(BASES[k] + w.new_addr < BASES[k+1], 1, $sformatf("target inside at %0d", a));
      end
    end
    // unused positions return to IDLE
    read(50, w); check(w.uop.fin, 1, "unused word is END");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
