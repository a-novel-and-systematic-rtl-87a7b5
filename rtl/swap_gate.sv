// Reversible SWAP gate: P = B, Q = A, from three cascaded CNOT gates.
//
//   stage 1: CNOT(control A,  target B)  -> (A,   A^B)
//   stage 2: CNOT(control A^B, target A) -> (A^B, B)
//   stage 3: CNOT(control B,  target A^B)-> (B,   A)
// Nine reversible majority gates: nine fixed ancilla cells and eighteen
// garbage outputs. Each CNOT takes three clock sequences, so P and Q appear
// nine cycles after A and B. Garbage of the first two stages is carried along
// clocked wires to appear with P and Q: garbage = {stage1, stage2, stage3}.
// The cascade order is the standard three-CNOT swap.
module swap_gate
  import qca_rev_pkg::*;
#(
  parameter int unsigned LATENCY   = SWAP_LATENCY,
  parameter int unsigned N_GARBAGE = SWAP_GARBAGE,
  parameter int unsigned N_ANCILLA = SWAP_ANCILLA
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 a,
  input  logic                 b,
  output logic                 p,
  output logic                 q,
  output logic [N_GARBAGE-1:0] garbage
);

  localparam int unsigned STAGE = CNOT_LATENCY;

  logic       p1, q1, p2, q2;
  logic [5:0] g1, g2, g3, g1_d, g2_d;

  cnot_gate u_cnot1 (.clk(clk), .rst_n(rst_n), .a(a),  .b(b),  .p(p1), .q(q1), .garbage(g1));
  cnot_gate u_cnot2 (.clk(clk), .rst_n(rst_n), .a(q1), .b(p1), .p(p2), .q(q2), .garbage(g2));
  cnot_gate u_cnot3 (.clk(clk), .rst_n(rst_n), .a(q2), .b(p2), .p(p),  .q(q),  .garbage(g3));

  qca_delay #(.WIDTH(6), .DEPTH(2 * STAGE)) u_g1wire (
    .clk(clk), .rst_n(rst_n), .d(g1), .q(g1_d)
  );
  qca_delay #(.WIDTH(6), .DEPTH(STAGE)) u_g2wire (
    .clk(clk), .rst_n(rst_n), .d(g2), .q(g2_d)
  );

  assign garbage = {g1_d, g2_d, g3};

  initial begin
    assert (LATENCY == 3 * STAGE && N_GARBAGE == 18 && N_ANCILLA == 9)
      else $error("swap_gate: three CNOT gates give latency 9, 9 ancillae, 18 garbage outputs");
  end

endmodule
