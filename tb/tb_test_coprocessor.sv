// tb_test_coprocessor - end-to-end test of the test coprocessor at its
// default size (5-word FSL FIFO, 32-bit words), driving a board of two
// IEEE 1149.1 devices in one scan chain (TDI -> dev1 -> dev2 -> TDO), each
// with a 4-bit IR and an 8-bit boundary register. Two of dev1's output cells
// drive two of dev2's input cells; an optional short circuit makes both nets
// carry their wired-AND.
//
// A CPU model writes command words, with random gaps (which make the
// coprocessor wait for data) or back to back (which fill the FIFO). Checked:
//  - RESET brings both TAPs to Test-Logic-Reset from elsewhere and clears
//    cmp_fail; TMS0 / TMS1 walk the TAPs through the expected states;
//  - MTCK N gives N TCK pulses in Run-Test/Idle;
//  - the short-circuit test sequence: EXTEST in both IRs, drive 1/0 on the
//    two nets, then shift-and-compare the captured values: passes without the
//    short, sets cmp_fail with it;
//  - SHF of 8, 16, 40, 64 and 70 bits: N TCK pulses, the last with TMS = 1
//    (TAP ends in Exit1-DR), and the boundary registers hold the last 16
//    bits shifted;
//  - SHFCP of 40, 64 and 70 bits through the 16-bit chain: the TDO stream
//    is the TDI stream delayed by 16 bits, so matching Y passes and one
//    flipped Y bit under the mask fails.
// Every mechanism (stall on an empty FIFO, FIFO full, each opcode, the
// not-last-word loop, full and partial last words, compare pass and fail) is
// counted and must occur.
module tb_test_coprocessor;
  import tc_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] fsl_m_data = '0;
  logic fsl_m_write = 0, fsl_m_full;
  logic b_tms, b_tck, b_tdi, b_tdo, cmp_fail, busy, stall;
  logic [UADDR_W-1:0] uaddr;
  int checks = 0, failures = 0;

  test_coprocessor dut (.*);

  // board: two devices in one chain
  logic tdo1, short_on = 0;
  logic [7:0] d1_out, d2_out, d2_in;
  logic [3:0] st1, st2;
  int unsigned rti1, rti2;
  logic net_a, net_b;
  assign net_a = short_on ? (d1_out[3] & d1_out[2]) : d1_out[3];
  assign net_b = short_on ? (d1_out[3] & d1_out[2]) : d1_out[2];
  assign d2_in = {net_b, 2'b00, net_a, 4'b0000};

  jtag_device_model #(.BR_LEN(8)) dev1 (
    .tck(b_tck), .tms(b_tms), .tdi(b_tdi), .tdo(tdo1),
    .pins_in(8'h00), .pins_out(d1_out), .state_o(st1), .tck_in_rti(rti1));
  jtag_device_model #(.BR_LEN(8)) dev2 (
    .tck(b_tck), .tms(b_tms), .tdi(tdo1), .tdo(b_tdo),
    .pins_in(d2_in), .pins_out(d2_out), .state_o(st2), .tck_in_rti(rti2));

  localparam logic [3:0] S_TLR = 4'd0, S_RTI = 4'd1, S_SH_DR = 4'd4,
                         S_EX1_DR = 4'd5, S_SH_IR = 4'd11, S_EX1_IR = 4'd12;

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_full = 0, n_notlast = 0, n_full_last = 0, n_part_last = 0;
  int n_cmp_pass = 0, n_cmp_fail = 0, n_tlr = 0;
  int n_op [6] = '{0, 0, 0, 0, 0, 0};
  int tck_count = 0, prev_fetch = 0;
  logic tck_d = 0;

  always @(posedge clk) if (!rst) begin
    if (stall) n_stall++;
    if (fsl_m_full) n_full++;
    if (!stall && prev_fetch == 1) begin
      case (uaddr)
        BASE_RESET: n_op[0]++;
        BASE_TMS0:  n_op[1]++;
        BASE_TMS1:  n_op[2]++;
        BASE_MTCK:  n_op[3]++;
        BASE_SHF:   n_op[4]++;
        BASE_SHFCP: n_op[5]++;
        default: ;
      endcase
    end
    if (!stall) prev_fetch <= int'(uaddr);
    if (!stall && (uaddr == BASE_SHF + 2 || uaddr == BASE_SHFCP + 4)) n_notlast++;
    if (!stall && (uaddr == BASE_SHF + 8 || uaddr == BASE_SHFCP + 10)) n_full_last++;
    if (!stall && (uaddr == BASE_SHF + 7 || uaddr == BASE_SHFCP + 9)) n_part_last++;
    if (b_tck && !tck_d) tck_count++;
    tck_d <= b_tck;
  end

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- CPU model ----------------
  int gap_max = 3;
  task automatic put(logic [31:0] w);
    repeat ($urandom_range(0, gap_max)) @(negedge clk);
    @(negedge clk);
    while (fsl_m_full) @(negedge clk);
    fsl_m_data = w;
    fsl_m_write = 1;
    @(negedge clk);
    fsl_m_write = 0;
  endtask

  // done when the sequencer has sat in IDLE (address 0) for 4 cycles: with a
  // word in the FIFO it would have moved on to DISPATCH
  task automatic wait_done();
    int idle = 0;
    while (idle < 4) begin
      @(posedge clk);
      idle = (uaddr == '0 && !busy && !stall) ? idle + 1 : 0;
    end
  endtask

  task automatic op(opcode_e o);
    put(32'(o));
  endtask

  task automatic tms_seq(string s);   // e.g. "1100"
    foreach (s[i]) op(s[i] == "1" ? OP_TMS1 : OP_TMS0);
  endtask

  // SHF / SHFCP of n bits from bit arrays
  task automatic shf(int n, logic [127:0] x);
    op(OP_SHF);
    put(32'(n));
    for (int w = 0; w < (n + 31) / 32; w++) put(x[w*32 +: 32]);
  endtask

  task automatic shfcp(int n, logic [127:0] x, logic [127:0] y, logic [127:0] z);
    op(OP_SHFCP);
    put(32'(n));
    for (int w = 0; w < (n + 31) / 32; w++) begin
      put(x[w*32 +: 32]);
      put(y[w*32 +: 32]);
      put(z[w*32 +: 32]);
    end
  endtask

  task automatic to_rti_reset();
    op(OP_RESET);
    op(OP_TMS0);
    wait_done();
  endtask

  // SIR 8 TDI(00): EXTEST in both devices, back to Run-Test/Idle
  task automatic set_extest();
    tms_seq("1100");
    shf(8, 128'h00);
    tms_seq("10");
    wait_done();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);

    // ---- RESET / TMS navigation ----
    tms_seq("0110");                // RTI, Select-DR, Select-IR, Capture-IR
    wait_done();
    check(st1, 4'd10, "dev1 in Capture-IR");
    check(st2, 4'd10, "dev2 in Capture-IR");
    op(OP_RESET);
    wait_done();
    check(st1, S_TLR, "RESET -> Test-Logic-Reset dev1");
    check(st2, S_TLR, "RESET -> Test-Logic-Reset dev2");
    if (st1 == S_TLR && st2 == S_TLR) n_tlr++;
    op(OP_TMS0);
    wait_done();
    check(st1, S_RTI, "TMS0 -> Run-Test/Idle");

    // ---- MTCK ----
    begin
      automatic int unsigned r0 = rti1;
      automatic int t0 = tck_count;
      op(OP_MTCK);
      put(32'd20);
      wait_done();
      check(rti1 - r0, 20, "MTCK 20 pulses in Run-Test/Idle");
      check(tck_count - t0, 20, "MTCK 20 TCK pulses");
    end

    // ---- short-circuit test of the example program ----
    for (int sc = 0; sc < 2; sc++) begin
      short_on = (sc == 1);
      to_rti_reset();
      set_extest();
      check(dev1.ir, 4'h0, "dev1 IR = EXTEST");
      check(dev2.ir, 4'h0, "dev2 IR = EXTEST");
      // SDR 16 TDI(0800)
      tms_seq("100");
      shf(16, 128'h0800);
      tms_seq("10");
      wait_done();
      check(d1_out[3:2], 2'b10, "dev1 drives 1 / 0");
      // SDR 16 TDI(0800) TDO(0010) MASK(0090)
      tms_seq("100");
      shfcp(16, 128'h0800, 128'h0010, 128'h0090);
      tms_seq("10");
      wait_done();
      check(cmp_fail, short_on, short_on ? "short detected" : "no short, no failure");
      if (cmp_fail) n_cmp_fail++; else n_cmp_pass++;
    end
    short_on = 0;
    to_rti_reset();
    check(cmp_fail, 0, "RESET clears cmp_fail");

    // ---- SHF of several lengths through the 16-bit EXTEST chain ----
    set_extest();
    begin
      int lens [5] = '{8, 16, 40, 64, 70};
      for (int k = 0; k < 5; k++) begin
        automatic int n = lens[k];
        automatic logic [127:0] x = {$urandom(), $urandom(), $urandom(), $urandom()};
        automatic int t0;
        automatic logic [15:0] last16;
        tms_seq("100");
        wait_done();
        check(st1, S_SH_DR, "in Shift-DR");
        t0 = tck_count;
        gap_max = (k % 2) ? 0 : 6;
        shf(n, x);
        wait_done();
        check(tck_count - t0, n, $sformatf("SHF %0d TCK pulses", n));
        check(st1, S_EX1_DR, $sformatf("SHF %0d ends in Exit1-DR", n));
        if (n >= 16) begin
          last16 = x[n-16 +: 16];
          check({dev1.br, dev2.br}, last16, $sformatf("SHF %0d chain contents", n));
        end
        tms_seq("10");
        wait_done();
      end
    end

    // ---- SHFCP of several lengths: TDO is TDI delayed by 16 bits ----
    begin
      int lens [3] = '{40, 64, 70};
      for (int k = 0; k < 6; k++) begin
        automatic int n = lens[k % 3];
        automatic logic [127:0] x = {$urandom(), $urandom(), $urandom(), $urandom()};
        automatic logic [127:0] y = x << 16;
        automatic logic [127:0] z = '0;
        automatic logic bad = (k >= 3);
        automatic int t0;
        for (int b = 16; b < n; b++) z[b] = 1'b1;
        if (bad) y[$urandom_range(16, n - 1)] ^= 1'b1;
        to_rti_reset();
        set_extest();
        tms_seq("100");
        wait_done();
        t0 = tck_count;
        gap_max = (k % 2) ? 0 : 4;
        shfcp(n, x, y, z);
        wait_done();
        check(tck_count - t0, n, $sformatf("SHFCP %0d TCK pulses", n));
        check(cmp_fail, bad, $sformatf("SHFCP %0d %s", n, bad ? "detects flipped bit" : "matches"));
        if (cmp_fail) n_cmp_fail++; else n_cmp_pass++;
      end
    end
    gap_max = 3;

    // ---- mechanism coverage ----
    begin
      string names [12] = '{"stall", "fifo_full", "not_last_word", "full_last_word",
                            "partial_last_word", "compare_pass", "compare_fail", "reset_to_tlr",
                            "op_reset", "op_tms0_tms1", "op_mtck", "op_shf_shfcp"};
      int counts [12];
      counts = '{n_stall, n_full, n_notlast, n_full_last, n_part_last, n_cmp_pass,
                 n_cmp_fail, n_tlr, n_op[0], n_op[1] * n_op[2], n_op[3], n_op[4] * n_op[5]};
      for (int i = 0; i < 12; i++) begin
        $display("mechanism %-18s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[i]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
