// tb_serializer - self-checking test of the serializer: random words are
// loaded and shifted out; every bit on bit_o must equal the word's bits LSB
// first, load must win over shift, and the register must fill with zeros.
module tb_serializer;
  localparam int unsigned W = 32;
  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic [W-1:0] din = '0;
  logic bit_o;
  int checks = 0, failures = 0;

  serializer #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 20; t++) begin
      automatic logic [W-1:0] w = $urandom();
      @(posedge clk); din <= w; load <= 1; shift <= (t % 2 == 0);
      @(posedge clk); load <= 0; shift <= 0;
      for (int b = 0; b < W; b++) begin
        @(negedge clk); check(bit_o, w[b], $sformatf("word %0d bit %0d", t, b));
        @(posedge clk); shift <= 1;
        @(posedge clk); shift <= 0;
      end
      @(negedge clk); check(bit_o, 1'b0, "zero fill");
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
