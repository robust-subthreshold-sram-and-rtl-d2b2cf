// write_ctrl: write control pulse generator of the ultra-low power FIFO.
//
// At a rising CLK_W edge with the chip enabled (cen = 0) and a write requested
// (wen = 0, both active low), a flip-flop raises WRITE for exactly one CLK_W
// cycle. The write wordline pulse is
//   wr = WRITE & ~CLK_W (second half of the WRITE cycle)
// as in the reference design. The first half leaves the pointer and the
// adaptive power control time to settle before the word is switched on and
// written.
// Design choice: the input word d is captured into din_q at the same edge as
// WRITE, so the write driver sees stable data for the whole WRITE cycle even
// when the source already presents the next word. While cen is high WRITE is
// cleared asynchronously.
//
// Timing: WEN/D sampled at edge k -> write during cycle k, wr in its second
// half; the word is stored when wr falls at edge k+1.
module write_ctrl #(
  parameter int unsigned WIDTH = ulp_fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk_w,
  input  logic             cen,    // chip enable, active low
  input  logic             wen,    // write enable, active low
  input  logic [WIDTH-1:0] d,      // input word
  output logic             write,  // one CLK_W cycle per accepted write
  output logic             wr,     // second half of write
  output logic [WIDTH-1:0] din_q   // data held for the write drivers
);
  always_ff @(posedge clk_w or posedge cen) begin
    if (cen) begin
      write <= 1'b0;
      din_q <= '0;
    end else begin
      write <= ~wen;
      if (!wen) din_q <= d;
    end
  end

  assign wr = write & ~clk_w;
endmodule
