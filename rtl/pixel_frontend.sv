// Behavioural model of the analog pixel front end (not synthesizable silicon:
// the real part is a PIN photodiode, a sample-and-hold and an analog
// comparator on the top tier).
//
// Analog quantities are modelled as unsigned 16-bit codes. pd_reset charges
// the photodiode to VRST; each clock with pd_integrate high discharges it by
// the photocurrent code light (clamped at 0), as a diode integrating
// photocurrent on its own capacitance would. pd_sample holds the voltage.
// The comparator output cmp is high while the external analog ramp vramp is
// greater than the held voltage; the cell latches the digital ramp when cmp
// goes high (single-slope A/D conversion). Brighter pixels discharge further
// and so convert to smaller codes.
//
// Timing: vpd and vhold change on clock edges; cmp is combinational in vramp.
// The voltages are not reset: a pd_reset and a pd_sample precede any use.
module pixel_frontend #(
  parameter logic [15:0] VRST = 16'hFFFF
) (
  input  logic        clk,
  input  logic        pd_reset,
  input  logic        pd_integrate,
  input  logic        pd_sample,
  input  logic [7:0]  light,
  input  logic [15:0] vramp,
  output logic        cmp
);
  logic [15:0] vpd;    // photodiode voltage
  logic [15:0] vhold;  // sample-and-hold voltage

  always_ff @(posedge clk) begin
    if (pd_reset)          vpd <= VRST;
    else if (pd_integrate) vpd <= (vpd > 16'(light)) ? vpd - 16'(light) : 16'd0;
    if (pd_sample)         vhold <= vpd;
  end

  assign cmp = (vramp > vhold);
endmodule
