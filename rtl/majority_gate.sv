// Three-input majority voter, the basic QCA gate.
//
// m = a.b + b.c + a.c: the output takes the value held by at least two of the
// three inputs. Fixing one input to 0 gives a two-input AND, fixing it to 1 a
// two-input OR. Purely combinational; in a QCA layout its settling happens
// inside the clock sequence of the reversible gate that contains it, so the
// register that marks that clock sequence lives in rev_majority_gate1.
module majority_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic m
);

  always_comb m = (a & b) | (b & c) | (a & c);

endmodule
