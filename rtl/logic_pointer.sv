// logic_pointer: shift-register address pointer of the ultra-low power FIFO.
//
// Instead of a binary counter and a decoder, the word address is a WORDS-bit
// circular shift register holding a single 1 (one-hot). At each rising clock
// edge with shift = 1 (READ for the read pointer, WRITE for the write pointer)
// the 1 moves to the next word, wrapping from the last word to word 0. Each
// register output is ANDed with the half-cycle pulse (RD or WR) to drive the
// word's wordline, so exactly one wordline is high, and only during the pulse.
// The same module serves as read pointer (clk = CLK_R, shift = READ,
// pulse = RD) and as write pointer (clk = CLK_W, shift = WRITE, pulse = WR).
// The reference design builds the registers from low-energy master-slave
// flip-flops; here they are ordinary flip-flops.
// Design choice: cen high (chip disabled) returns the pointer to word 0
// asynchronously; the reference design gives no reset for the pointers.
//
// Timing: the pointer shifts at the edge that ends a READ/WRITE cycle, so
// during that cycle ptr names the word being accessed.
module logic_pointer #(
  parameter int unsigned WORDS = ulp_fifo_pkg::FIFO_WORDS
) (
  input  logic             clk,
  input  logic             cen,    // chip enable, active low; high = pointer to word 0
  input  logic             shift,  // READ or WRITE
  input  logic             pulse,  // RD or WR
  output logic [WORDS-1:0] ptr,    // one-hot register outputs
  output logic [WORDS-1:0] wl      // wordlines: ptr AND pulse
);
  always_ff @(posedge clk or posedge cen) begin
    if (cen)        ptr <= WORDS'(1);
    else if (shift) ptr <= {ptr[WORDS-2:0], ptr[WORDS-1]};
  end

  assign wl = ptr & {WORDS{pulse}};

  // The pointer must hold exactly one 1 whenever the chip is enabled.
  a_onehot: assert property (@(posedge clk) disable iff (cen) $onehot(ptr))
    else $error("logic_pointer: pointer is not one-hot");
endmodule
