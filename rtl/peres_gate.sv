// Reversible Peres gate: P = A, Q = A XOR B, R = (A AND B) XOR C.
//
// A CNOT gate (for Q) and a CCNOT gate (for P and R) work side by side on the
// same inputs: seven reversible majority gates, seven fixed ancilla cells and
// fourteen garbage outputs. The CNOT takes three clock sequences and the
// CCNOT five, so Q and the CNOT garbage run two more sequences along clocked
// wires; all outputs appear LATENCY = 5 cycles after the inputs, fully
// pipelined. A and B fan out to both sub-gates; the CNOT's copy of A and the
// CCNOT's copy of B are not needed and are left open.
// Garbage order: {CNOT garbage, CCNOT garbage}.
module peres_gate
  import qca_rev_pkg::*;
#(
  parameter int unsigned LATENCY   = PERES_LATENCY,
  parameter int unsigned N_GARBAGE = PERES_GARBAGE,
  parameter int unsigned N_ANCILLA = PERES_ANCILLA
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

  logic       q_cnot;
  logic [5:0] g_cnot;
  logic [7:0] g_ccnot;
  logic [5:0] g_cnot_d;

  cnot_gate u_cnot (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b),
    .p(), .q(q_cnot), .garbage(g_cnot)
  );

  ccnot_gate #(.LATENCY(LATENCY)) u_ccnot (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c),
    .p(p), .q(), .r(r), .garbage(g_ccnot)
  );

  qca_delay #(.WIDTH(7), .DEPTH(LATENCY - CNOT_LATENCY)) u_qwire (
    .clk(clk), .rst_n(rst_n), .d({q_cnot, g_cnot}), .q({q, g_cnot_d})
  );

  assign garbage = {g_cnot_d, g_ccnot};

  initial begin
    assert (N_GARBAGE == 14 && N_ANCILLA == 7)
      else $error("peres_gate: seven reversible majority gates give 7 ancillae and 14 garbage outputs");
    assert (LATENCY >= CNOT_LATENCY)
      else $error("peres_gate: LATENCY below the CNOT latency");
  end

endmodule
