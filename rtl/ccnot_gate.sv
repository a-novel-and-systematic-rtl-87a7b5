// Reversible CCNOT (Toffoli) gate: P = A, Q = B, R = (A AND B) XOR C.
//
// A reversible AND gate forms A.B; C is carried one clock sequence along a
// wire to meet it; a reversible XOR stage (two reversible AND gates and a
// reversible OR gate, as in the CNOT gate) forms R. Four reversible majority
// gates: four fixed ancilla cells and eight garbage outputs. The gate levels
// take three clock sequences; the layout's total latency is five, and the
// remaining two are modelled as clocked wires on the outputs. P, Q, R and all
// garbage appear LATENCY cycles after the inputs; fully pipelined.
// Garbage order: {AND(A,B) garbage, XOR garbage}.
module ccnot_gate
  import qca_rev_pkg::*;
#(
  parameter int unsigned LATENCY   = CCNOT_LATENCY,
  parameter int unsigned N_GARBAGE = CCNOT_GARBAGE,
  parameter int unsigned N_ANCILLA = CCNOT_ANCILLA
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 a,
  input  logic                 b,
  input  logic                 c,
  output logic                 p,
  output logic                 q,
  output logic                 r,
  output logic [N_GARBAGE-1:0] garbage
);

  localparam int unsigned CORE_LATENCY = 3;

  logic       ab, c_d, r_o;
  logic [1:0] g_and, g_and_d;
  logic [5:0] g_x;

  rev_and2 u_and (.clk(clk), .rst_n(rst_n), .b(a), .c(b), .y(ab), .garbage(g_and));

  qca_delay #(.WIDTH(1), .DEPTH(1)) u_cwire (
    .clk(clk), .rst_n(rst_n), .d(c), .q(c_d)
  );

  rev_xor2 u_xor (.clk(clk), .rst_n(rst_n), .a(ab), .b(c_d), .y(r_o), .garbage(g_x));

  qca_delay #(.WIDTH(2), .DEPTH(2)) u_gwire (
    .clk(clk), .rst_n(rst_n), .d(g_and), .q(g_and_d)
  );

  qca_delay #(.WIDTH(2), .DEPTH(LATENCY)) u_abwire (
    .clk(clk), .rst_n(rst_n), .d({a, b}), .q({p, q})
  );
  qca_delay #(.WIDTH(9), .DEPTH(LATENCY - CORE_LATENCY)) u_owire (
    .clk(clk), .rst_n(rst_n), .d({r_o, g_and_d, g_x}), .q({r, garbage})
  );

  initial begin
    assert (N_GARBAGE == 8 && N_ANCILLA == 4)
      else $error("ccnot_gate: four reversible majority gates give 4 ancillae and 8 garbage outputs");
    assert (LATENCY >= CORE_LATENCY)
      else $error("ccnot_gate: LATENCY below the three gate levels");
  end

endmodule
