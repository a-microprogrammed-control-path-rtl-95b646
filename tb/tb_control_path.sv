// tb_control_path - self-checking test of the microprogram sequencer. The
// control path runs together with the data path (which only supplies the
// conditions); a queue plays the FSL FIFO. Checks:
//  - MTCK 5 walks the published four-state chart: the fetched addresses are
//    0,1 then 11, (12,14) x4, 12,13,15, back to 0: one state per clock, 12
//    cycles from the first MTCK word to the return to IDLE, 5 TCK pulses
//    with TMS = 0;
//  - TMS0 / TMS1 give one TCK pulse with TMS set one clock before TCK rises;
//  - RESET gives 32 TCK pulses with TMS = 1;
//  - SHF 5 walks the Moore SHF chart 2-3-4-5-9-5-9-5-9-5-9-5-6-7 (14 states);
//  - a missing FSL word stalls the sequencer with no TCK activity, and the
//    command finishes correctly once the word arrives.
module tb_control_path;
  import tc_pkg::*;
  logic clk = 0, rst = 1;
  logic [DATA_W-1:0] fsl_data;
  logic fsl_exists, fsl_read, stall, busy, b_tdi;
  cond_t cond;
  ctrl_t ctrl;
  logic [UADDR_W-1:0] uaddr;
  logic cmp_fail;
  int checks = 0, failures = 0;

  logic [DATA_W-1:0] q [$];
  logic hold = 0;          // hide the queue to force a stall
  int addr_trace [$];
  int tck_pulses = 0, tms_at_rise [$], stall_cycles = 0, tck_during_stall = 0;
  logic tck_d = 0, tms_d = 0;

  control_path dut (.*);
  data_path u_dp (.clk, .rst, .ctrl, .fsl_data, .b_tdo(1'b0), .b_tdi, .cond, .cmp_fail);

  assign fsl_exists = (q.size() != 0) && !hold;
  assign fsl_data   = (q.size() != 0) ? q[0] : '0;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst) begin
      if (fsl_read) void'(q.pop_front());
      if (!stall) addr_trace.push_back(int'(uaddr));
      else begin
        stall_cycles++;
        if (ctrl.bTCK != tck_d) tck_during_stall++;
      end
      if (ctrl.bTCK && !tck_d) begin
        tck_pulses++;
        tms_at_rise.push_back(int'(ctrl.bTMS));
        // TMS must have been stable for the cycle before TCK rises
        checks++;
        if (ctrl.bTMS != tms_d) begin
          failures++;
          $display("FAIL TMS changed together with TCK rising");
        end
      end
      tck_d <= ctrl.bTCK;
      tms_d <= ctrl.bTMS;
    end
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(logic [DATA_W-1:0] words [$]);
    addr_trace.delete();
    tms_at_rise.delete();
    tck_pulses = 0;
    foreach (words[i]) q.push_back(words[i]);
    begin
      int n = 0;
      logic started;
      @(posedge clk);
      while (!busy && n < 100) begin @(posedge clk); n++; end
      started = busy;
      while (busy && n < 500) begin @(posedge clk); n++; end
      checks++;
      if (!started || busy) begin
        failures++;
        $display("FAIL command did not start and finish within %0d cycles", n);
        q.delete();
      end
    end
    repeat (2) @(posedge clk);
  endtask

  function automatic int at(int i);
    return (i >= 0 && i < addr_trace.size()) ? addr_trace[i] : -1;
  endfunction

  function automatic int count_val(int v, int arr [$]);
    int n = 0;
    foreach (arr[i]) if (arr[i] == v) n++;
    return n;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);

    // MTCK 5
    run('{32'(OP_MTCK), 32'd5});
    begin
      int exp [$] = '{11, 12,14, 12,14, 12,14, 12,14, 12,13, 15, 0};
      int first = -1;
      foreach (addr_trace[i]) if (addr_trace[i] == 11 && first < 0) first = i;
      check(first >= 1, 1, "MTCK started");
      if (first >= 1) for (int i = 0; i < exp.size(); i++)
        check(at(first + i), exp[i], $sformatf("MTCK fetch %0d", i));
      if (first >= 1) check(at(first - 1), 1, "DISPATCH before MTCK");
      check(tck_pulses, 5, "MTCK pulses");
      check(count_val(1, tms_at_rise), 0, "MTCK TMS=0");
    end

    // TMS1, TMS0
    run('{32'(OP_TMS1)});
    check(tck_pulses, 1, "TMS1 pulses");
    if (tms_at_rise.size() > 0) check(tms_at_rise[0], 1, "TMS1 level");
    run('{32'(OP_TMS0)});
    check(tck_pulses, 1, "TMS0 pulses");
    if (tms_at_rise.size() > 0) check(tms_at_rise[0], 0, "TMS0 level");

    // RESET
    run('{32'(OP_RESET)});
    check(tck_pulses, 32, "RESET pulses");
    check(count_val(1, tms_at_rise), 32, "RESET TMS=1");

    // SHF 5: one word, partial
    run('{32'(OP_SHF), 32'd5, 32'h15});
    begin
      // SHF chart states 2,3,4,5,9,5,9,5,9,5,9,5,6,7 at base 16
      int exp [$] = '{17, 22, 23, 25, 28, 25, 28, 25, 28, 25, 28, 25, 26, 27};
      int first = -1;
      foreach (addr_trace[i]) if (addr_trace[i] == 17 && first < 0) first = i;
      check(first >= 0 && first + exp.size() <= addr_trace.size(), 1, "SHF trace long enough");
      if (first >= 0 && first + exp.size() <= addr_trace.size()) for (int i = 0; i < exp.size(); i++)
        check(at(first + i), exp[i], $sformatf("SHF fetch %0d", i));
      check(tck_pulses, 5, "SHF pulses");
      if (tms_at_rise.size() == 5) check(tms_at_rise[4], 1, "SHF TMS=1 on last bit");
      check(count_val(1, tms_at_rise), 1, "SHF TMS=1 only once");
    end

    // stall: the MTCK count arrives 10 cycles late
    stall_cycles = 0;
    tck_during_stall = 0;
    hold = 0;
    fork
      run('{32'(OP_MTCK), 32'd3});
      begin
        for (int i = 0; i < 100 && q.size() != 1; i++) @(posedge clk);  // opcode consumed
        hold = 1;
        repeat (10) @(posedge clk);
        hold = 0;
      end
    join
    check(stall_cycles >= 9, 1, "stalled while FIFO empty");
    check(tck_during_stall, 0, "no TCK edge while stalled");
    check(tck_pulses, 3, "MTCK 3 pulses after stall");

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
