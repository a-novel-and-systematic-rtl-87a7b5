// Two-input XOR from reversible majority gates: y = (a AND ~b) OR (~a AND b).
//
// Two reversible AND gates on complemented inputs feed one reversible OR, so
// the output arrives two clock sequences after the inputs. The four garbage
// outputs of the AND gates are delayed one sequence so that all six garbage
// bits appear together with y: garbage = {AND1 garbage, AND2 garbage, OR
// garbage}. This is the XOR stage shared by the CNOT and CCNOT gates.
module rev_xor2 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a,
  input  logic       b,
  output logic       y,
  output logic [5:0] garbage
);

  logic a_n, b_n;
  logic t0, t1;
  logic [1:0] g_and0, g_and1, g_or;
  logic [3:0] g_and_d;

  qca_not u_not_a (.a(a), .y(a_n));
  qca_not u_not_b (.a(b), .y(b_n));

  rev_and2 u_and0 (.clk(clk), .rst_n(rst_n), .b(a),   .c(b_n), .y(t0), .garbage(g_and0));
  rev_and2 u_and1 (.clk(clk), .rst_n(rst_n), .b(a_n), .c(b),   .y(t1), .garbage(g_and1));
  rev_or2  u_or   (.clk(clk), .rst_n(rst_n), .b(t0),  .c(t1),  .y(y),  .garbage(g_or));

  qca_delay #(.WIDTH(4), .DEPTH(1)) u_gdly (
    .clk(clk), .rst_n(rst_n), .d({g_and0, g_and1}), .q(g_and_d)
  );

  assign garbage = {g_and_d, g_or};

endmodule
