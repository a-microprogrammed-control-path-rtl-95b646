// tb_data_path - self-checking test of the scan data path, driven directly
// with control bits. Checks: the last-word and rbits = 0 conditions after
// loading N and after decrementing iword_cntr (expected values from N / 32
// and N mod 32 computed here); cbits_cntr = 1 after the right number of
// decrements from each of its three load sources; the TDI bit stream; and
// the comparator (sticky failure only where the mask is 1, cleared by fC).
module tb_data_path;
  import tc_pkg::*;
  logic clk = 0, rst = 1;
  ctrl_t ctrl = C_NONE;
  logic [DATA_W-1:0] fsl_data = '0;
  logic b_tdo = 0, b_tdi, cmp_fail;
  cond_t cond;
  int checks = 0, failures = 0;

  data_path dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic step(ctrl_t c, logic [DATA_W-1:0] d = '0);
    @(negedge clk); ctrl = c; fsl_data = d;
    @(negedge clk); ctrl = C_NONE;
  endtask

  // count decrements until cbits_cntr = 1
  task automatic count_to_one(int expected, string what);
    ctrl_t c = C_NONE;
    int n = 0;
    c.cbD = 1'b1;
    while (!cond.cb1 && n < 100) begin step(c); n++; end
    checks++;
    if (n != expected) begin
      failures++;
      $display("FAIL %s: %0d decrements, expected %0d", what, n, expected);
    end
  endtask

  initial begin
    ctrl_t c;
    int unsigned nvals [8] = '{1, 8, 31, 32, 33, 40, 64, 100};
    repeat (2) @(negedge clk);
    rst = 0;
    // N split into word count and remainder
    foreach (nvals[i]) begin
      automatic int unsigned n = nvals[i];
      automatic int unsigned iw = n / 32, rb = n % 32;
      c = C_NONE; c.iwL = 1; c.rbL = 1;
      step(c, n);
      check(cond.rb0, rb == 0, $sformatf("rb0 N=%0d", n));
      check(cond.lastw, (iw == 1 && rb == 0) || iw == 0, $sformatf("lastw N=%0d", n));
      c = C_NONE; c.iwD = 1;
      if (iw > 0) begin
        step(c);
        iw--;
        check(cond.lastw, (iw == 1 && rb == 0) || iw == 0, $sformatf("lastw N=%0d after iwD", n));
      end
      // cbits from rbits_latch
      if (rb > 0) begin
        c = C_NONE; c.cbR = 1; step(c);
        count_to_one(rb - 1, $sformatf("cbR N=%0d", n));
      end
    end
    c = C_NONE; c.cbM = 1; step(c);
    count_to_one(31, "cbM");
    c = C_NONE; c.cbL = 1; step(c, 7);
    count_to_one(6, "cbL 7");
    c = C_NONE; c.cbL = 1; step(c, 1);
    check(cond.cb1, 1, "cbL 1");
    // TDI serializer
    begin
      automatic logic [31:0] x = $urandom();
      c = C_NONE; c.sL = 1; step(c, x);
      for (int b = 0; b < 32; b++) begin
        check(b_tdi, x[b], $sformatf("tdi bit %0d", b));
        c = C_NONE; c.sS = 1; step(c);
      end
    end
    // comparator: several random Y / Z / TDO triples
    for (int t = 0; t < 12; t++) begin
      automatic logic [31:0] y = $urandom(), z = $urandom();
      automatic logic [31:0] tdo = y;
      logic exp_fail;
      if (t % 3 == 1) tdo[$urandom_range(0, 31)] ^= 1'b1;  // one wrong bit
      if (t % 3 == 2) tdo = tdo ^ ~z;                       // wrong only where masked off
      exp_fail = |((tdo ^ y) & z);
      c = C_NONE; c.fC = 1; step(c);
      check(cmp_fail, 1'b0, "cleared by fC");
      c = C_NONE; c.eL = 1; step(c, y);
      c = C_NONE; c.mL = 1; step(c, z);
      for (int b = 0; b < 32; b++) begin
        @(negedge clk); ctrl = C_NONE; ctrl.cC = 1; ctrl.sS = 1; b_tdo = tdo[b];
        @(negedge clk); ctrl = C_NONE;
      end
      check(cmp_fail, exp_fail, $sformatf("compare %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
