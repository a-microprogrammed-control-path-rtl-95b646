// tb_fsl_fifo - self-checking test of the FSL FIFO at its default size of
// 5 x 32 bits. Random writes and reads are compared against a queue model:
// data order, s_exists, m_full after exactly DEPTH words, and writes while
// full / reads while empty being ignored.
module tb_fsl_fifo;
  localparam int unsigned W = 32, DEPTH = 5;
  logic clk = 0, rst = 1;
  logic [W-1:0] m_data = '0, s_data;
  logic m_write = 0, m_full, s_read = 0, s_exists;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int full_seen = 0, empty_reads = 0;

  fsl_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    // fill to full, one more write must be ignored
    for (int i = 0; i <= DEPTH; i++) begin
      @(negedge clk);
      check(W'(m_full), W'(model.size() == DEPTH), "m_full while filling");
      m_data = $urandom(); m_write = 1;
      if (model.size() < DEPTH) model.push_back(m_data);
      @(negedge clk); m_write = 0;
    end
    check(W'(m_full), 1, "m_full after DEPTH writes");
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(W'(s_exists), W'(model.size() != 0), "s_exists");
      check(W'(m_full), W'(model.size() == DEPTH), "m_full");
      if (model.size() != 0) check(s_data, model[0], "s_data");
      if (m_full) full_seen++;
      m_write = ($urandom_range(0, 99) < 50);
      s_read  = ($urandom_range(0, 99) < 50);
      m_data  = $urandom();
      if (s_read && model.size() == 0) empty_reads++;
      @(posedge clk);
      begin
        automatic int pre = model.size();
        if (s_read && pre != 0) void'(model.pop_front());
        if (m_write && pre < DEPTH) model.push_back(m_data);
      end
    end
    checks++;
    if (full_seen == 0 || empty_reads == 0) begin
      failures++;
      $display("FAIL coverage full=%0d empty_reads=%0d", full_seen, empty_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
