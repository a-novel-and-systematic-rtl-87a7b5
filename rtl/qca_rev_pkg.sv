// Shared constants of the majority-based reversible gate library.
//
// One clock cycle of every module in this library stands for one QCA clock
// sequence: the four 90-degree-shifted clock zones through which a value
// travels in one reversible majority gate. The latencies, ancilla counts and
// garbage counts below are the figures of the published QCA layouts; the
// modules are built so that their structure reproduces them, and the
// testbenches check them.
package qca_rev_pkg;

  // Latency of one reversible majority gate: one clock sequence.
  localparam int unsigned RMG_LATENCY    = 1;

  // Latencies in clock sequences, per gate.
  localparam int unsigned CNOT_LATENCY    = 3;
  localparam int unsigned CCNOT_LATENCY   = 5;
  localparam int unsigned FREDKIN_LATENCY = 5;
  localparam int unsigned SWAP_LATENCY    = 9;
  localparam int unsigned PERES_LATENCY   = 5;
  localparam int unsigned DFA_LATENCY     = 11;

  // Fixed (ancilla) inputs: one per reversible majority gate used as a
  // two-input AND or OR.
  localparam int unsigned CNOT_ANCILLA    = 3;
  localparam int unsigned CCNOT_ANCILLA   = 4;
  localparam int unsigned FREDKIN_ANCILLA = 6;
  localparam int unsigned SWAP_ANCILLA    = 9;
  localparam int unsigned PERES_ANCILLA   = 7;
  localparam int unsigned DFA_ANCILLA     = 15;

  // Garbage outputs: two per reversible majority gate.
  localparam int unsigned CNOT_GARBAGE    = 6;
  localparam int unsigned CCNOT_GARBAGE   = 8;
  localparam int unsigned FREDKIN_GARBAGE = 12;
  localparam int unsigned SWAP_GARBAGE    = 18;
  localparam int unsigned PERES_GARBAGE   = 14;
  localparam int unsigned DFA_GARBAGE     = 30;

  // Value of the fixed input A that turns reversible majority gate 1 into a
  // two-input gate with AND on X and OR on Y.
  localparam logic RMG_AND_ON_X_CONST = 1'b0;

endpackage
