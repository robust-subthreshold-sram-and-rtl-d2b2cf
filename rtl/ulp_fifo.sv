// ulp_fifo: robust ultra-low power asynchronous FIFO memory (256 x 16).
//
// A dual-port FIFO whose read and write sides run on independent clocks
// (CLK_R, CLK_W; 5 MHz and 200 kHz in the sensor node it was made for). Its
// leakage is cut by switching off every word that holds no data: because a
// FIFO is read in the order it was written, the controller knows each word's
// state from the accesses alone and needs no extra bookkeeping.
//   read_ctrl / write_ctrl : turn CEN/REN and CEN/WEN into a one-cycle
//                            READ/WRITE and half-cycle RD, R2 and WR pulses.
//   logic_pointer (x2)     : one-hot circular shift registers replace counters
//                            and decoders; AND with RD/WR gives the wordlines.
//   adaptive_power_ctrl    : per-word supply control, on at write, off after
//                            read, all off while the chip is disabled.
//   fifo_array             : 7T cells with complementary power gating, write
//                            drivers, read bitlines and latching sense amps.
// Command truth table (all controls active low): CEN = 1 disables the chip
// (all words lose their data and, a choice of this design, both pointers
// return to word 0); CEN = 0 with REN = 0 reads at a rising CLK_R edge; with
// WEN = 0 writes at a rising CLK_W edge; both may happen together.
// The FIFO has no full or empty flag, as in the reference design: the system
// that fills it (a sensor) and empties it (a baseband processor) keeps count.
// Reading an empty word returns zeros; writing a full FIFO overwrites the
// oldest word.
//
// Timing: REN sampled at CLK_R edge k -> Q shows the word from the first half
// of cycle k and holds it from the falling edge of CLK_R until the next read.
// WEN and D sampled at CLK_W edge k -> the word is written in the second half
// of cycle k. One read and one write per cycle of their clocks.
module ulp_fifo #(
  parameter int unsigned WORDS = ulp_fifo_pkg::FIFO_WORDS,
  parameter int unsigned WIDTH = ulp_fifo_pkg::FIFO_WIDTH
) (
  input  logic             cen,    // chip enable, active low
  input  logic             clk_r,  // read clock
  input  logic             ren,    // read enable, active low
  input  logic             clk_w,  // write clock
  input  logic             wen,    // write enable, active low
  input  logic [WIDTH-1:0] d,      // input data
  output logic [WIDTH-1:0] q       // output data
);
  logic             read, rd, r2;
  logic             write, wr;
  logic [WIDTH-1:0] din_q;
  logic [WORDS-1:0] rptr, wptr, wl_r, wl_w;
  logic [WORDS-1:0] ctrl_cell, ctrl_read;

  read_ctrl u_read_ctrl (
    .clk_r (clk_r), .cen (cen), .ren (ren),
    .read  (read),  .rd  (rd),  .r2  (r2)
  );

  write_ctrl #(.WIDTH(WIDTH)) u_write_ctrl (
    .clk_w (clk_w), .cen (cen), .wen (wen), .d (d),
    .write (write), .wr  (wr),  .din_q (din_q)
  );

  logic_pointer #(.WORDS(WORDS)) u_read_ptr (
    .clk (clk_r), .cen (cen), .shift (read), .pulse (rd),
    .ptr (rptr),  .wl  (wl_r)
  );

  logic_pointer #(.WORDS(WORDS)) u_write_ptr (
    .clk (clk_w), .cen (cen), .shift (write), .pulse (wr),
    .ptr (wptr),  .wl  (wl_w)
  );

  adaptive_power_ctrl #(.WORDS(WORDS)) u_power_ctrl (
    .cen       (cen),
    .wl_w      (wl_w),
    .wl_r      (wl_r),
    .rptr      (rptr),
    .r2        (r2),
    .ctrl_cell (ctrl_cell),
    .ctrl_read (ctrl_read)
  );

  fifo_array #(.WORDS(WORDS), .WIDTH(WIDTH)) u_array (
    .wl_w      (wl_w),
    .wl_r      (wl_r),
    .ctrl_cell (ctrl_cell),
    .ctrl_read (ctrl_read),
    .din       (din_q),
    .rd        (rd),
    .q         (q)
  );
endmodule
