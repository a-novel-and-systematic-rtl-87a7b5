// Reversible majority gate 1.
//
// Three majority gates share the inputs A, B, C:
//   X = M(A, B, C)      Y = M(~A, B, C)      Z = M(A, ~B, C)
// The map (A,B,C) -> (X,Y,Z) is one-to-one, so the gate is reversible. With A
// held constant, X and Y give the AND and the OR of B and C (A = 0: X = AND,
// Y = OR; A = 1: the other way round). Z carries no useful function and is a
// garbage output whenever the gate is used as a two-input gate.
//
// Timing: inputs are taken at one clock edge and X, Y, Z appear registered
// one cycle later, the one clock sequence (four clock zones) of the QCA
// layout. The equations and the one-sequence latency follow the published
// gate; the asynchronous reset is this model's own addition.
module rev_majority_gate1 (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic x,
  output logic y,
  output logic z
);

  logic a_n, b_n;
  logic mx, my, mz;

  qca_not u_not_a (.a(a), .y(a_n));
  qca_not u_not_b (.a(b), .y(b_n));

  majority_gate u_maj_x (.a(a),   .b(b),   .c(c), .m(mx));
  majority_gate u_maj_y (.a(a_n), .b(b),   .c(c), .m(my));
  majority_gate u_maj_z (.a(a),   .b(b_n), .c(c), .m(mz));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= 1'b0;
      y <= 1'b0;
      z <= 1'b0;
    end else begin
      x <= mx;
      y <= my;
      z <= mz;
    end
  end

endmodule
