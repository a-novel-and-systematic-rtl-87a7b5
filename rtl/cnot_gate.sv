// Reversible CNOT (Feynman) gate: P = A, Q = A XOR B.
//
// The XOR is built as (A AND ~B) OR (~A AND B) from two reversible AND gates
// and one reversible OR gate (three reversible majority gates, hence three
// fixed ancilla cells and six garbage outputs). Those take two clock
// sequences; the layout's total latency is three, and the extra sequence is
// modelled as a clocked wire on the outputs. P is A carried along a wire of
// the same length. P, Q and all garbage bits appear LATENCY cycles after A, B
// are applied; a new input pair can be applied every cycle.
// The structure and the counts follow the published gate; where in the
// layout the third clock sequence is spent is this model's choice.
module cnot_gate
  import qca_rev_pkg::*;
#(
  parameter int unsigned LATENCY   = CNOT_LATENCY,
  parameter int unsigned N_GARBAGE = CNOT_GARBAGE,
  parameter int unsigned N_ANCILLA = CNOT_ANCILLA
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 a,
  input  logic                 b,
  output logic                 p,
  output logic                 q,
  output logic [N_GARBAGE-1:0] garbage
);

  localparam int unsigned XOR_LATENCY = 2;

  logic       x_o;
  logic [5:0] g_x;

  rev_xor2 u_xor (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .y(x_o), .garbage(g_x));

  qca_delay #(.WIDTH(1), .DEPTH(LATENCY)) u_pwire (
    .clk(clk), .rst_n(rst_n), .d(a), .q(p)
  );
  qca_delay #(.WIDTH(7), .DEPTH(LATENCY - XOR_LATENCY)) u_owire (
    .clk(clk), .rst_n(rst_n), .d({x_o, g_x}), .q({q, garbage})
  );

  initial begin
    assert (N_GARBAGE == 6 && N_ANCILLA == 3)
      else $error("cnot_gate: three reversible majority gates give 3 ancillae and 6 garbage outputs");
    assert (LATENCY >= XOR_LATENCY)
      else $error("cnot_gate: LATENCY below the two gate levels");
  end

endmodule
