// subthreshold_memory_top: the two memory designs side by side.
//
// 1. The 256 x 16 ultra-low power asynchronous FIFO (ulp_fifo), with the pins
//    of its symbol: CEN, CLK_R, REN, CLK_W, WEN, D[15:0] and Q[15:0].
// 2. One fully differential single-port 10T cell with auto-compensation
//    (ac10t_cell), the single-port subthreshold cell proposed alongside it,
//    brought out with its wordlines, VGND and bitlines.
// The two do not interact; they share this top only so both are elaborated
// and simulated together.
module subthreshold_memory_top #(
  parameter int unsigned WORDS = ulp_fifo_pkg::FIFO_WORDS,
  parameter int unsigned WIDTH = ulp_fifo_pkg::FIFO_WIDTH
) (
  // FIFO
  input  logic             cen,
  input  logic             clk_r,
  input  logic             ren,
  input  logic             clk_w,
  input  logic             wen,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  // single-port 10T auto-compensation cell
  input  logic             ac_wl1,
  input  logic             ac_wl2,
  input  logic             ac_vgnd,
  input  logic             ac_bl,
  input  logic             ac_br,
  output logic             ac_bl_pd,
  output logic             ac_br_pd
);
  ulp_fifo #(.WORDS(WORDS), .WIDTH(WIDTH)) u_fifo (
    .cen (cen), .clk_r (clk_r), .ren (ren), .clk_w (clk_w), .wen (wen),
    .d   (d),   .q     (q)
  );

  ac10t_cell u_ac_cell (
    .wl1   (ac_wl1),   .wl2   (ac_wl2), .vgnd (ac_vgnd),
    .bl    (ac_bl),    .br    (ac_br),
    .bl_pd (ac_bl_pd), .br_pd (ac_br_pd)
  );
endmodule
