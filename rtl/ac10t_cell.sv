// ac10t_cell: behavioural model of the fully differential single-port 10T
// subthreshold SRAM cell with auto-compensation.
//
// This is a behavioural model of a custom transistor-level cell. The cell is a
// cross-coupled inverter pair (storage nodes VL and VR = not VL), two access
// transistors per side (AL1/AL2, AR1/AR2) and one read/auto-compensation
// transistor per side (RL, RR) whose source is the shared VGND. Its three
// modes, selected by WL1, WL2 and VGND:
//   hold  : WL1 = 1, WL2 = 0, VGND = GND. AL1-RL and AR1-RR form a feedback
//           path that holds the 0 node (auto-compensation); it raises the
//           noise margin, which a logic model cannot show: the data are kept.
//   read  : WL1 = 0, WL2 = 1, VGND = GND. The storage nodes are isolated from
//           the bitlines; the side whose node stores 1 turns its R transistor
//           on and discharges its precharged bitline (VR = 1 discharges BR),
//           giving a differential read.
//   write : WL1 = 1, WL2 = 1, VGND = VDD (write assist: the cell loses its
//           retention so the bitlines overwrite it without wordline boosting).
//           VL takes the level of BL and VR that of BR.
// Bitlines are split into the level driven by the write drivers (bl, br) and
// the discharge made by the cell (bl_pd, br_pd), since the model has no
// bidirectional analog nets.
// Choices of this model: any other combination of the three controls holds
// the data and discharges nothing; a write with bl = br (no differential
// data) leaves the cell unchanged; the power-up content is undefined.
module ac10t_cell (
  input  logic wl1,    // wordline of AL1/AR1
  input  logic wl2,    // wordline of AL2/AR2
  input  logic vgnd,   // source of RL/RR (1 = VDD, write assist; 0 = GND)
  input  logic bl,     // left bitline level driven for a write
  input  logic br,     // right bitline level driven for a write
  output logic bl_pd,  // left bitline discharged by the cell
  output logic br_pd   // right bitline discharged by the cell
);
  typedef enum logic [1:0] {HOLD, READ, WRITE, OTHER} mode_e;

  mode_e mode;
  logic  vl;

  always_comb begin
    unique case ({wl1, wl2, vgnd})
      3'b100:  mode = HOLD;
      3'b010:  mode = READ;
      3'b111:  mode = WRITE;
      default: mode = OTHER;
    endcase
  end

  always_latch begin
    if (mode == WRITE && bl != br) vl = bl;
  end

  assign bl_pd = (mode == READ) &  vl;
  assign br_pd = (mode == READ) & ~vl;
endmodule
