// ulp_fifo_pkg: sizes shared by the ultra-low power FIFO modules.
//
// The FIFO is organised as FIFO_WORDS words of FIFO_WIDTH bits (256 x 16, a
// 4 kb block running at 0.5 V with a 5 MHz read clock and a 200 kHz write
// clock in the reference implementation). The system-level study that chose
// this block found 512 x 16 to be the best fit for the sensor node; 256 x 16
// is the basic block that was built, and is the default here.
package ulp_fifo_pkg;
  localparam int unsigned FIFO_WORDS = 256;
  localparam int unsigned FIFO_WIDTH = 16;
endpackage
