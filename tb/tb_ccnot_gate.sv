// Self-checking testbench for ccnot_gate: Toffoli gate.
//
// Streams every input combination, then 400 random vectors, one per clock,
// and compares each output with a reference computed here from the inputs
// applied exactly 5 cycles earlier, which checks the latency as well as the
// function. After the stream it returns the inputs to zero, applies a single
// vector and counts the cycles until the outputs respond. The garbage width is
// checked against the gate's published garbage count.
module tb_ccnot_gate;
  import qca_rev_pkg::*;
  localparam int unsigned LAT = 5;
  localparam int unsigned GW  = 8;
  localparam int unsigned NIN  = 3;
  localparam int unsigned NOUT = 3;
  localparam int unsigned NVEC = (1 << NIN) + 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a, b, c;
  logic p, q, r;
  logic [GW-1:0] garbage;
  int checks = 0;
  int failures = 0;
  logic [NOUT-1:0] exp_hist [NVEC];


  ccnot_gate dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c), .p(p), .q(q), .r(r), .garbage(garbage));

  always #5 clk = ~clk;

  function automatic logic [NOUT-1:0] reference(logic [NIN-1:0] v);
    logic a_v = v[2];
    logic b_v = v[1];
    logic c_v = v[0];
    return {a_v, b_v, (a_v & b_v) ^ c_v};
  endfunction

  task automatic check(string what, logic [NOUT-1:0] got, logic [NOUT-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b at %0t", what, got, want, $time);
    end
  endtask

  initial begin : watchdog
    repeat (NVEC + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [NIN-1:0] v;
    int unsigned lat_seen;
    {a, b, c} = '0;
    checks++;
    if ($bits(garbage) != GW) begin
      failures++;
      $display("FAIL garbage width %0d", $bits(garbage));
    end
    repeat (3) @(negedge clk);
    check("reset", {p, q, r}, '0);
    rst_n = 1'b1;
    for (int t = 0; t < int'(NVEC) + int'(LAT); t++) begin
      @(negedge clk);
      if (t >= int'(LAT)) begin
        check("outputs", {p, q, r}, exp_hist[t - int'(LAT)]);
      end
      if (t < int'(NVEC)) begin
        v = (t < (1 << NIN)) ? NIN'(t) : NIN'($urandom);
        {a, b, c} = v;
        exp_hist[t] = reference(v);
      end else begin
        {a, b, c} = '0;
      end
    end
    // latency: settle at zero, apply one all-ones vector, count cycles
    repeat (LAT + 2) @(negedge clk);
    check("idle", {p, q, r}, reference('0));
    {a, b, c} = '1;
    lat_seen = 0;
    while ({p, q, r} === reference('0) && lat_seen < LAT + 5) begin
      @(negedge clk);
      lat_seen++;
    end
    checks++;
    if (lat_seen != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat_seen, LAT);
    end
    check("all-ones", {p, q, r}, reference('1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
