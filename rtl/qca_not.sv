// QCA inverter.
//
// In QCA a NOT is made by letting a line of cells approach another line at a
// 45-degree offset, so the polarization flips. Logically y = ~a. Combinational:
// the inverters used in this library sit on the inputs of a reversible gate
// and their delay is counted in that gate's clock sequence.
module qca_not (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
