// Two-input reversible AND gate.
//
// A reversible majority gate 1 whose input A is a fixed cell at logic 0, so
// its output X is b AND c. The other two outputs are garbage: garbage[1] is
// Y (= b OR c), garbage[0] is Z. Output and garbage are registered, one clock
// sequence after the inputs. Using A = 0 (rather than 1) for both the AND and
// the OR gate is this design's choice; either constant gives both functions.
module rev_and2
  import qca_rev_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       b,
  input  logic       c,
  output logic       y,
  output logic [1:0] garbage
);

  logic x_o, y_o, z_o;

  rev_majority_gate1 u_rmg (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (RMG_AND_ON_X_CONST),
    .b    (b),
    .c    (c),
    .x    (x_o),
    .y    (y_o),
    .z    (z_o)
  );

  assign y       = x_o;
  assign garbage = {y_o, z_o};

endmodule
