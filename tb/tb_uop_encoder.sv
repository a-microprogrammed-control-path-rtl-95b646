// tb_uop_encoder - exhaustive self-checking test of the micro-operation
// encoder: every one-hot micro-operation against every combination of the
// three data path conditions, FSL_S_Exists and the FIFO request. The expected
// Load / Bank_reg / FSL read / stall values are written out per micro-op
// from the branch rules, not computed by the same expression as the design.
module tb_uop_encoder;
  import tc_pkg::*;
  uop_t  uop;
  cond_t cond;
  logic  fsl_exists, fifo_req;
  logic  load, bank_load, bank_reset, fsl_read, stall;
  int checks = 0, failures = 0;

  uop_encoder dut (.*);

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (uop %b cond %b ex %0b req %0b)",
               what, got, exp, uop, cond, fsl_exists, fifo_req);
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin
      for (int c = 0; c < 32; c++) begin
        logic exp_load, exp_stall;
        uop = uop_t'(8'b1000_0000 >> k);
        {cond, fsl_exists, fifo_req} = 5'(c);
        #1;
        case (k)
          0: exp_load = 1'b0;              // CONTINUE
          1: exp_load = 1'b1;              // JUMP
          2: exp_load = !fsl_exists;       // BRANCH IF /Exists
          3: exp_load = cond.lastw;        // BRANCH IF last word
          4: exp_load = cond.rb0;          // BRANCH IF rbits = 0
          5: exp_load = !cond.cb1;         // BRANCH IF /(cbits = 1)
          6: exp_load = 1'b1;              // DISPATCH
          default: exp_load = 1'b1;        // END
        endcase
        exp_stall = fifo_req && !fsl_exists;
        check(load, exp_load, "load");
        check(stall, exp_stall, "stall");
        check(fsl_read, fifo_req && fsl_exists, "fsl_read");
        check(bank_load, (k == 6) && !exp_stall, "bank_load");
        check(bank_reset, (k == 7) && !exp_stall, "bank_reset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
