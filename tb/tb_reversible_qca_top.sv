// End-to-end testbench for reversible_qca_top at its default parameters.
//
// Drives the dual-field adder, the Fredkin gate and the SWAP gate at the same
// time with an independent vector for each on every clock: first every input
// combination, then random vectors. Each output is compared, exactly as many
// cycles later as the circuit's latency (11, 5 and 9), with a reference
// computed here: a full adder whose carry is masked by FSEL, a controlled
// swap, and a plain swap. Counts how often each mode actually occurred (carry
// produced in GF(p) mode, carry suppressed in GF(2^m) mode, Fredkin swap and
// pass-through with differing targets, SWAP with differing inputs) and fails
// if any never did. Also checks reset and the garbage bus widths.
module tb_reversible_qca_top;
  import qca_rev_pkg::*;

  localparam int NVEC = 16 + 1000;
  localparam int LMAX = DFA_LATENCY;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic dfa_a, dfa_b, dfa_c, dfa_fsel, dfa_sum, dfa_cout;
  logic fred_a, fred_b, fred_c, fred_p, fred_q, fred_r;
  logic swap_a, swap_b, swap_p, swap_q;
  logic [DFA_GARBAGE-1:0]     dfa_garbage;
  logic [FREDKIN_GARBAGE-1:0] fred_garbage;
  logic [SWAP_GARBAGE-1:0]    swap_garbage;

  int checks = 0;
  int failures = 0;
  int n_gfp_carry = 0, n_gf2_masked = 0, n_fred_swap = 0, n_fred_pass = 0, n_swap_diff = 0;

  logic [3:0] dfa_in  [NVEC];
  logic [2:0] fred_in [NVEC];
  logic [1:0] swap_in [NVEC];

  reversible_qca_top dut (
    .clk(clk), .rst_n(rst_n),
    .dfa_a(dfa_a), .dfa_b(dfa_b), .dfa_c(dfa_c), .dfa_fsel(dfa_fsel),
    .dfa_sum(dfa_sum), .dfa_cout(dfa_cout), .dfa_garbage(dfa_garbage),
    .fred_a(fred_a), .fred_b(fred_b), .fred_c(fred_c),
    .fred_p(fred_p), .fred_q(fred_q), .fred_r(fred_r), .fred_garbage(fred_garbage),
    .swap_a(swap_a), .swap_b(swap_b),
    .swap_p(swap_p), .swap_q(swap_q), .swap_garbage(swap_garbage)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [2:0] got, logic [2:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b at %0t", what, got, want, $time);
    end
  endtask

  initial begin : watchdog
    repeat (NVEC + LMAX + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [3:0] d;
    logic [2:0] f;
    logic [1:0] s;
    logic       carry;
    {dfa_a, dfa_b, dfa_c, dfa_fsel} = '0;
    {fred_a, fred_b, fred_c} = '0;
    {swap_a, swap_b} = '0;

    checks++;
    if ($bits(dfa_garbage) != 30 || $bits(fred_garbage) != 12 || $bits(swap_garbage) != 18) begin
      failures++;
      $display("FAIL garbage widths");
    end
    repeat (3) @(negedge clk);
    expect_eq("reset", {dfa_sum, dfa_cout, fred_p}, 3'b000);
    rst_n = 1'b1;

    for (int t = 0; t < NVEC + LMAX; t++) begin
      @(negedge clk);
      if (t >= DFA_LATENCY && t - DFA_LATENCY < NVEC) begin
        d = dfa_in[t - DFA_LATENCY];
        carry = (32'(d[3]) + 32'(d[2]) + 32'(d[1])) >= 2;
        expect_eq("dfa", {1'b0, dfa_sum, dfa_cout}, {1'b0, d[3] ^ d[2] ^ d[1], carry & d[0]});
        if (d[0] && carry) n_gfp_carry++;
        if (!d[0] && carry) n_gf2_masked++;
      end
      if (t >= FREDKIN_LATENCY && t - FREDKIN_LATENCY < NVEC) begin
        f = fred_in[t - FREDKIN_LATENCY];
        expect_eq("fredkin", {fred_p, fred_q, fred_r},
                  f[2] ? {f[2], f[0], f[1]} : f);
        if (f[1] != f[0]) begin
          if (f[2]) n_fred_swap++;
          else      n_fred_pass++;
        end
      end
      if (t >= SWAP_LATENCY && t - SWAP_LATENCY < NVEC) begin
        s = swap_in[t - SWAP_LATENCY];
        expect_eq("swap", {1'b0, swap_p, swap_q}, {1'b0, s[0], s[1]});
        if (s[1] != s[0]) n_swap_diff++;
      end
      if (t < NVEC) begin
        d = (t < 16) ? 4'(t) : 4'($urandom);
        f = (t < 8)  ? 3'(t) : 3'($urandom);
        s = (t < 4)  ? 2'(t) : 2'($urandom);
        {dfa_a, dfa_b, dfa_c, dfa_fsel} = d;
        {fred_a, fred_b, fred_c} = f;
        {swap_a, swap_b} = s;
        dfa_in[t]  = d;
        fred_in[t] = f;
        swap_in[t] = s;
      end
    end

    $display("modes: gfp_carry=%0d gf2_masked=%0d fredkin_swap=%0d fredkin_pass=%0d swap_diff=%0d",
             n_gfp_carry, n_gf2_masked, n_fred_swap, n_fred_pass, n_swap_diff);
    checks++;
    if (n_gfp_carry == 0 || n_gf2_masked == 0 || n_fred_swap == 0 || n_fred_pass == 0 || n_swap_diff == 0) begin
      failures++;
      $display("FAIL a mode never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
