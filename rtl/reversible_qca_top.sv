// Top level of the majority-based reversible gate library.
//
// Three independent circuits stand side by side, each with its own ports and
// sharing only the clock and reset:
//   - the one-bit dual-field adder, which is built from two Peres gates (each
//     a CNOT and a CCNOT gate) and a reversible AND gate, and so contains
//     every lower-level gate of the library;
//   - a Fredkin (controlled swap) gate;
//   - a SWAP gate made of three CNOT gates.
// One clock cycle is one QCA clock sequence. Latencies: adder 11, Fredkin 5,
// SWAP 9 cycles; each accepts new inputs every cycle. Garbage outputs are
// brought out so that every reversible gate keeps as many outputs as inputs.
module reversible_qca_top
  import qca_rev_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // dual-field adder
  input  logic                       dfa_a,
  input  logic                       dfa_b,
  input  logic                       dfa_c,
  input  logic                       dfa_fsel,
  output logic                       dfa_sum,
  output logic                       dfa_cout,
  output logic [DFA_GARBAGE-1:0]     dfa_garbage,
  // Fredkin gate
  input  logic                       fred_a,
  input  logic                       fred_b,
  input  logic                       fred_c,
  output logic                       fred_p,
  output logic                       fred_q,
  output logic                       fred_r,
  output logic [FREDKIN_GARBAGE-1:0] fred_garbage,
  // SWAP gate
  input  logic                       swap_a,
  input  logic                       swap_b,
  output logic                       swap_p,
  output logic                       swap_q,
  output logic [SWAP_GARBAGE-1:0]    swap_garbage
);

  dual_field_adder u_dfa (
    .clk(clk), .rst_n(rst_n),
    .a(dfa_a), .b(dfa_b), .c(dfa_c), .fsel(dfa_fsel),
    .sum(dfa_sum), .cout(dfa_cout), .garbage(dfa_garbage)
  );

  fredkin_gate u_fredkin (
    .clk(clk), .rst_n(rst_n),
    .a(fred_a), .b(fred_b), .c(fred_c),
    .p(fred_p), .q(fred_q), .r(fred_r), .garbage(fred_garbage)
  );

  swap_gate u_swap (
    .clk(clk), .rst_n(rst_n),
    .a(swap_a), .b(swap_b),
    .p(swap_p), .q(swap_q), .garbage(swap_garbage)
  );

endmodule
