// adaptive_power_ctrl: self-adaptive power control of the FIFO array.
//
// Because data leave a FIFO in the order they arrive, the state of every word
// (holding data or empty) follows from the accesses alone: a word fills when
// it is written and empties when it is read. For each word this block keeps
//   CTRL_CELL = 1 : word empty, its virtual supply V_VDD is pulled to GND
//   CTRL_CELL = 0 : word holds data, V_VDD is connected to VDD
// with the update rule of the reference design, highest priority first:
//   CEN high            -> CTRL_CELL = 1   (chip disabled, every word off)
//   write wordline WLw  -> CTRL_CELL = 0   (write: switch the word on)
//   R2 and read pointer -> CTRL_CELL = 1   (second half of a read: word consumed)
//   otherwise           -> hold
// Because a word is switched on only by its own write pulse, it is unpowered
// during the first half of every write to it; this doubles as the write assist
// of the single-ended 7T cell (no stored state to overpower).
// CTRL_CELL is therefore a set/reset latch per word, set and cleared by
// pulses from the two clock domains; no clock of either domain can store it,
// so it is written as a level-sensitive latch on purpose.
// CTRL_READ = 1 pulls the foot of the word's read buffers (V_GND) to GND so
// the word can discharge its read bitlines; it is high only while the word's
// read wordline WLr is high (first half of a read). Otherwise V_GND sits at
// VDD, which removes the voltage across the read buffers and their leakage
// onto the precharged read bitlines.
//
// Interface: vectors of WORDS bits, bit i belonging to word i. Timing: purely
// level-sensitive, follows WLw, WLr and R2 within the same half cycle.
module adaptive_power_ctrl #(
  parameter int unsigned WORDS = ulp_fifo_pkg::FIFO_WORDS
) (
  input  logic             cen,        // chip enable, active low
  input  logic [WORDS-1:0] wl_w,       // write wordlines (write pointer AND WR)
  input  logic [WORDS-1:0] wl_r,       // read wordlines (read pointer AND RD)
  input  logic [WORDS-1:0] rptr,       // read pointer register outputs
  input  logic             r2,         // second half of a read cycle
  output logic [WORDS-1:0] ctrl_cell,  // 1: word supply off (empty word)
  output logic [WORDS-1:0] ctrl_read   // 1: read-buffer foot at GND (word being read)
);
  for (genvar i = 0; i < WORDS; i++) begin : g_word
    always_latch begin
      if (cen)                ctrl_cell[i] = 1'b1;
      else if (wl_w[i])       ctrl_cell[i] = 1'b0;
      else if (r2 && rptr[i]) ctrl_cell[i] = 1'b1;
    end
  end

  assign ctrl_read = wl_r;
endmodule
