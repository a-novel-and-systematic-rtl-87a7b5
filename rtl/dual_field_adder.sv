// One-bit reversible dual-field adder.
//
// Adds A, B and the carry in C. With FSEL = 1 it is a full adder (addition in
// a prime field GF(p) needs the carry); with FSEL = 0 the carry out is forced
// to 0 and SUM is the bitwise modulo-2 sum (addition in GF(2^m)). Such a cell
// is the building block of unified GF(p)/GF(2^m) multipliers.
//
// Structure: two Peres gates in cascade and one reversible AND gate.
//   Peres 1 (A, B, 0)          -> A^B, A.B
//   Peres 2 (A^B, C, A.B)      -> SUM = A^B^C, carry = (A^B).C ^ A.B
//   reversible AND (carry, FSEL) -> COUT
// C runs five clock sequences along a wire to meet Peres 1's outputs, FSEL
// ten to meet the carry, and SUM one to meet COUT, so SUM and COUT appear
// LATENCY = 5 + 5 + 1 = 11 cycles after the inputs. Fully pipelined. Fifteen
// reversible majority gates: fifteen fixed ancilla cells and thirty garbage
// outputs, all carried to appear with SUM and COUT.
// Garbage order: {Peres 1, Peres 2, AND}. Because Peres 1's third input is
// the constant 0, a few of Peres 1's garbage bits are constant as well. The constant 0 on Peres 1's third
// input and the choice of which Peres outputs feed Peres 2 are this design's
// reading of "two cascaded Peres gates and a reversible AND".
module dual_field_adder
  import qca_rev_pkg::*;
#(
  parameter int unsigned LATENCY   = DFA_LATENCY,
  parameter int unsigned N_GARBAGE = DFA_GARBAGE,
  parameter int unsigned N_ANCILLA = DFA_ANCILLA
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 a,
  input  logic                 b,
  input  logic                 c,
  input  logic                 fsel,
  output logic                 sum,
  output logic                 cout,
  output logic [N_GARBAGE-1:0] garbage
);

  logic        axb, ab, c_d, sum_o, carry, fsel_d;
  logic [13:0] g_p1, g_p2, g_p1_d, g_p2_d;
  logic [1:0]  g_and;

  peres_gate u_peres1 (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(1'b0),
    .p(), .q(axb), .r(ab), .garbage(g_p1)
  );

  qca_delay #(.WIDTH(1), .DEPTH(PERES_LATENCY)) u_cwire (
    .clk(clk), .rst_n(rst_n), .d(c), .q(c_d)
  );

  peres_gate u_peres2 (
    .clk(clk), .rst_n(rst_n), .a(axb), .b(c_d), .c(ab),
    .p(), .q(sum_o), .r(carry), .garbage(g_p2)
  );

  qca_delay #(.WIDTH(1), .DEPTH(2 * PERES_LATENCY)) u_fwire (
    .clk(clk), .rst_n(rst_n), .d(fsel), .q(fsel_d)
  );

  rev_and2 u_and_fsel (
    .clk(clk), .rst_n(rst_n), .b(carry), .c(fsel_d), .y(cout), .garbage(g_and)
  );

  qca_delay #(.WIDTH(14), .DEPTH(PERES_LATENCY + RMG_LATENCY)) u_g1wire (
    .clk(clk), .rst_n(rst_n), .d(g_p1), .q(g_p1_d)
  );
  qca_delay #(.WIDTH(15), .DEPTH(RMG_LATENCY)) u_g2wire (
    .clk(clk), .rst_n(rst_n), .d({sum_o, g_p2}), .q({sum, g_p2_d})
  );

  assign garbage = {g_p1_d, g_p2_d, g_and};

  initial begin
    assert (LATENCY == 2 * PERES_LATENCY + RMG_LATENCY && N_GARBAGE == 30 && N_ANCILLA == 15)
      else $error("dual_field_adder: two Peres gates and one AND give latency 11, 15 ancillae, 30 garbage outputs");
  end

endmodule
