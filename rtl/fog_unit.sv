// FoG unit: the programmed logical operation that combines the latched F and
// G values of a cell into the one-bit S-CNN result of a ramp step.
//
// The operation is any two-input Boolean function, given as a 4-bit truth
// table tt broadcast from the active program bank: y = tt[{f, g}]. The exact
// encoding of the "composition logic function" is this design's choice; the
// program banks are described as holding it next to the F and G tables.
// Purely combinational.
module fog_unit (
  input  logic       f,
  input  logic       g,
  input  logic [3:0] tt,
  output logic       y
);
  always_comb y = tt[{f, g}];
endmodule
