// Self-checking testbench for rev_or2: two-input reversible OR.
//
// Streams every input combination, then 400 random vectors, one per clock,
// and compares each output with a reference computed here from the inputs
// applied exactly 1 cycles earlier, which checks the latency as well as the
// function. After the stream it returns the inputs to zero, applies a single
// vector and counts the cycles until the outputs respond. The garbage width is
// checked against the gate's published garbage count.
module tb_rev_or2;
  import qca_rev_pkg::*;
  localparam int unsigned LAT = 1;
  localparam int unsigned GW  = 2;
  localparam int unsigned NIN  = 2;
  localparam int unsigned NOUT = 1;
  localparam int unsigned NVEC = (1 << NIN) + 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic b, c;
  logic y;
  logic [GW-1:0] garbage;
  int checks = 0;
  int failures = 0;
  logic [NOUT-1:0] exp_hist [NVEC];
  logic [GW-1:0] gexp_hist [NVEC];


  rev_or2 dut (.clk(clk), .rst_n(rst_n), .b(b), .c(c), .y(y), .garbage(garbage));

  always #5 clk = ~clk;

  function automatic logic [NOUT-1:0] reference(logic [NIN-1:0] v);
    logic b_v = v[1];
    logic c_v = v[0];
    return {b_v | c_v};
  endfunction
  function automatic logic [GW-1:0] greference(logic [NIN-1:0] v);
    logic b_v = v[1];
    logic c_v = v[0];
    return {b_v & c_v, ~b_v & c_v};
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
    {b, c} = '0;
    checks++;
    if ($bits(garbage) != GW) begin
      failures++;
      $display("FAIL garbage width %0d", $bits(garbage));
    end
    repeat (3) @(negedge clk);
    check("reset", {y}, '0);
    rst_n = 1'b1;
    for (int t = 0; t < int'(NVEC) + int'(LAT); t++) begin
      @(negedge clk);
      if (t >= int'(LAT)) begin
        check("outputs", {y}, exp_hist[t - int'(LAT)]);
        checks++;
        if (garbage !== gexp_hist[t - int'(LAT)]) begin
          failures++;
          $display("FAIL garbage: got %b want %b", garbage, gexp_hist[t - int'(LAT)]);
        end
      end
      if (t < int'(NVEC)) begin
        v = (t < (1 << NIN)) ? NIN'(t) : NIN'($urandom);
        {b, c} = v;
        exp_hist[t] = reference(v);
        gexp_hist[t] = greference(v);
      end else begin
        {b, c} = '0;
      end
    end
    // latency: settle at zero, apply one all-ones vector, count cycles
    repeat (LAT + 2) @(negedge clk);
    check("idle", {y}, reference('0));
    {b, c} = '1;
    lat_seen = 0;
    while ({y} === reference('0) && lat_seen < LAT + 5) begin
      @(negedge clk);
      lat_seen++;
    end
    checks++;
    if (lat_seen != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat_seen, LAT);
    end
    check("all-ones", {y}, reference('1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
