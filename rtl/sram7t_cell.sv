// sram7t_cell: behavioural model of the dual-Vt 7T dual-port SRAM cell.
//
// This is a behavioural model of a custom transistor-level cell, not logic to
// be synthesised as such. The cell has a separate single-ended write port
// (write wordline WWL, write bitline WBL) and a single-ended read port made of
// a two-transistor read buffer between the read bitline RBL and the buffer
// foot V_GND; its cross-coupled inverters are supplied from the word's
// virtual supply V_VDD. Only one transistor (the write-side pull-up) is low-Vt,
// the other six are high-Vt; that only affects stability and leakage, which
// this model does not represent.
// Modelled behaviour (voltage levels as logic levels, VDD = 1):
//   v_vdd = 0        : the cell has no supply and loses its data (both storage
//                      nodes fall to GND, modelled as stored 0)
//   wwl = 1          : the stored bit follows wbl (transparent while wwl is high)
//   otherwise        : hold
//   rbl_pd           : the read buffer discharges the precharged read bitline
//                      when rwl = 1, the foot v_gnd is at GND and the cell
//                      stores 1.
// The polarity (a stored 1 discharges RBL) is a choice of this model.
module sram7t_cell (
  input  logic v_vdd,   // virtual supply of the storage latch (1 = VDD, 0 = GND)
  input  logic v_gnd,   // read-buffer foot (1 = boosted to VDD, 0 = GND)
  input  logic wwl,     // write wordline
  input  logic wbl,     // write bitline
  input  logic rwl,     // read wordline
  output logic rbl_pd   // read bitline pulled down
);
  logic q;

  always_latch begin
    if (!v_vdd)   q = 1'b0;
    else if (wwl) q = wbl;
  end

  assign rbl_pd = rwl & ~v_gnd & q;
endmodule
