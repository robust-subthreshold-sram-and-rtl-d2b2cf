// read_ctrl: read control pulse generator of the ultra-low power FIFO.
//
// At a rising CLK_R edge with the chip enabled (cen = 0) and a read requested
// (ren = 0, both active low), a flip-flop raises READ for exactly one CLK_R
// cycle. Two half-cycle pulses are then formed by gating READ with the clock:
//   rd = READ & CLK_R   (first half of the READ cycle, drives the read wordline
//                        and opens the sense-amplifier latch)
//   r2 = READ & ~CLK_R  (second half, tells the adaptive power control that the
//                        word has been consumed so its supply can be cut)
// This clock-gated pulse scheme is the one of the reference design.
// Design choice: while cen is high the READ flip-flop is cleared
// asynchronously, so a disabled chip issues no read.
//
// Timing: REN sampled at edge k -> read, rd during the first half of cycle k,
// r2 during its second half. Back-to-back requests keep READ high.
module read_ctrl (
  input  logic clk_r,
  input  logic cen,    // chip enable, active low
  input  logic ren,    // read enable, active low
  output logic read,   // one CLK_R cycle per accepted read
  output logic rd,     // first half of read
  output logic r2      // second half of read
);
  always_ff @(posedge clk_r or posedge cen) begin
    if (cen) read <= 1'b0;
    else     read <= ~ren;
  end

  assign rd = read & clk_r;
  assign r2 = read & ~clk_r;
endmodule
