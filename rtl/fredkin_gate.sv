// Reversible Fredkin (controlled swap) gate: P = A, and B, C swapped when A = 1.
//   Q = ~A.B + A.C        R = ~A.C + A.B
// Four reversible AND gates form the four products (A complemented by a QCA
// inverter) and two reversible OR gates combine them: six reversible majority
// gates, six fixed ancilla cells and twelve garbage outputs. The gate levels
// take two clock sequences; the layout's total latency is five, and the
// remaining three are modelled as clocked wires on the outputs. P, Q, R and
// garbage appear LATENCY cycles after the inputs; fully pipelined.
// Swapping on A = 1 is the usual convention for a positive control.
// Garbage order: {four AND gates' garbage, two OR gates' garbage}.
module fredkin_gate
  import qca_rev_pkg::*;
#(
  parameter int unsigned LATENCY   = FREDKIN_LATENCY,
  parameter int unsigned N_GARBAGE = FREDKIN_GARBAGE,
  parameter int unsigned N_ANCILLA = FREDKIN_ANCILLA
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

  localparam int unsigned CORE_LATENCY = 2;

  logic       a_n;
  logic       nab, ac, nac, abp, q_o, r_o;
  logic [1:0] g0, g1, g2, g3, g4, g5;
  logic [7:0] g_and_d;

  qca_not u_not_a (.a(a), .y(a_n));

  rev_and2 u_and_nab (.clk(clk), .rst_n(rst_n), .b(a_n), .c(b), .y(nab), .garbage(g0));
  rev_and2 u_and_ac  (.clk(clk), .rst_n(rst_n), .b(a),   .c(c), .y(ac),  .garbage(g1));
  rev_and2 u_and_nac (.clk(clk), .rst_n(rst_n), .b(a_n), .c(c), .y(nac), .garbage(g2));
  rev_and2 u_and_ab  (.clk(clk), .rst_n(rst_n), .b(a),   .c(b), .y(abp), .garbage(g3));

  rev_or2 u_or_q (.clk(clk), .rst_n(rst_n), .b(nab), .c(ac),  .y(q_o), .garbage(g4));
  rev_or2 u_or_r (.clk(clk), .rst_n(rst_n), .b(nac), .c(abp), .y(r_o), .garbage(g5));

  qca_delay #(.WIDTH(8), .DEPTH(1)) u_gwire (
    .clk(clk), .rst_n(rst_n), .d({g0, g1, g2, g3}), .q(g_and_d)
  );

  qca_delay #(.WIDTH(1), .DEPTH(LATENCY)) u_pwire (
    .clk(clk), .rst_n(rst_n), .d(a), .q(p)
  );
  qca_delay #(.WIDTH(14), .DEPTH(LATENCY - CORE_LATENCY)) u_owire (
    .clk(clk), .rst_n(rst_n), .d({q_o, r_o, g_and_d, g4, g5}), .q({q, r, garbage})
  );

  initial begin
    assert (N_GARBAGE == 12 && N_ANCILLA == 6)
      else $error("fredkin_gate: six reversible majority gates give 6 ancillae and 12 garbage outputs");
    assert (LATENCY >= CORE_LATENCY)
      else $error("fredkin_gate: LATENCY below the two gate levels");
  end

endmodule
