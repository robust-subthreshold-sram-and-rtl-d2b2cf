// fifo_array: power-gated 7T-cell storage array of the ultra-low power FIFO,
// with its write drivers, read bitlines and sense amplifiers.
//
// WORDS words of WIDTH dual-Vt 7T cells. Every word has complementary power
// gating on two virtual rails:
//   V_VDD (cell supply)     : VDD when CTRL_CELL = 0 (PMOS header on),
//                             GND when CTRL_CELL = 1 (NMOS pull-down on), so an
//                             empty word has no voltage across its cells.
//   V_GND (read-buffer foot): GND when CTRL_READ = 1 (word being read),
//                             VDD otherwise, so idle read buffers see no
//                             voltage from the precharged read bitline.
// Neither rail is ever left floating. Each column has one single-ended write
// bitline, driven by a write driver from din without precharge, and one read
// bitline precharged to VDD that any selected cell storing 1 discharges (a
// wired OR over the words). The column's sense amplifier converts the bitline
// to a full-swing bit and holds it in a latch: transparent while the read
// pulse rd is high, holding the word once rd falls. A read bitline carries at
// most WORDS = 256 cells to bound the read failure rate.
//
// Interface: one-hot wordline vectors wl_w and wl_r (at most one bit high),
// per-word ctrl_cell and ctrl_read, write data din, sense enable rd, output q.
// Timing: a word is written while its wl_w bit is high and keeps the last
// value; q shows the selected word while rd is high and holds it afterwards.
// The polarity of the sensing (a discharged bitline reads as 1) is a choice of
// this model; an empty, powered-down word reads as all zeros.
module fifo_array #(
  parameter int unsigned WORDS = ulp_fifo_pkg::FIFO_WORDS,
  parameter int unsigned WIDTH = ulp_fifo_pkg::FIFO_WIDTH
) (
  input  logic [WORDS-1:0] wl_w,       // write wordlines
  input  logic [WORDS-1:0] wl_r,       // read wordlines
  input  logic [WORDS-1:0] ctrl_cell,  // 1: word supply off
  input  logic [WORDS-1:0] ctrl_read,  // 1: read-buffer foot at GND
  input  logic [WIDTH-1:0] din,        // write data (write drivers)
  input  logic             rd,         // sense-amplifier enable (read pulse)
  output logic [WIDTH-1:0] q           // latched read data
);
  logic [WORDS-1:0] v_vdd;                 // per-word cell supply
  logic [WORDS-1:0] v_gnd;                 // per-word read-buffer foot
  logic [WIDTH-1:0] pd [WORDS];            // per-cell read bitline discharge
  logic [WIDTH-1:0] rbl_pd;                // per-column read bitline discharged

  // Complementary power gating switches.
  assign v_vdd = ~ctrl_cell;
  assign v_gnd = ~ctrl_read;

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      sram7t_cell u_cell (
        .v_vdd  (v_vdd[w]),
        .v_gnd  (v_gnd[w]),
        .wwl    (wl_w[w]),
        .wbl    (din[b]),
        .rwl    (wl_r[w]),
        .rbl_pd (pd[w][b])
      );
    end
  end

  // Precharged read bitlines: any cell on the column may discharge them.
  always_comb begin
    rbl_pd = '0;
    for (int w = 0; w < WORDS; w++) rbl_pd |= pd[w];
  end

  // Sense amplifiers with output latches.
  always_latch begin
    if (rd) q = rbl_pd;
  end
endmodule
