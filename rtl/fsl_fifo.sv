// fsl_fifo - the Fast Simplex Link FIFO from the CPU to the coprocessor.
//
// A synchronous first-in first-out buffer, DEPTH words of W bits (5 x 32 in
// the published configuration). The CPU side writes with m_write while m_full
// is low; the coprocessor side sees the oldest word on s_data whenever
// s_exists is high and removes it with s_read. Writes while full and reads
// while empty are ignored. A write and a read in the same cycle are both
// accepted. s_data, s_exists and m_full come straight from registers, so a written
// word is visible one cycle after the write. The FSL control bit that travels
// with each word is not carried: command words are recognised by position in
// the command stream.
module fsl_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 5
) (
  input  logic         clk,
  input  logic         rst,
  // CPU (master) side
  input  logic [W-1:0] m_data,
  input  logic         m_write,
  output logic         m_full,
  // coprocessor (slave) side
  output logic [W-1:0] s_data,
  input  logic         s_read,
  output logic         s_exists
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wptr, rptr;
  logic [CW-1:0] count;
  logic          do_wr, do_rd;

  assign do_wr = m_write && (count != CW'(DEPTH));
  assign do_rd = s_read && (count != '0);

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= m_data;
  end

  assign s_data   = mem[rptr];
  assign s_exists = (count != '0);
  assign m_full   = (count == CW'(DEPTH));

  assert property (@(posedge clk) disable iff (rst) count <= CW'(DEPTH))
    else $error("fsl_fifo: occupancy above depth");
endmodule
