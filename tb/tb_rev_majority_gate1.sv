// Self-checking testbench for rev_majority_gate1.
//
// The reference is the gate's published truth table, written as the 3-bit
// code {X,Y,Z} for each input {A,B,C}: 0,3,2,6,1,5,4,7. The testbench streams
// all eight inputs and then random ones, one per clock, and checks each output
// one cycle later (the one-clock-sequence latency). It also checks that the
// eight codes are all different, i.e. that the gate is reversible, and that
// with A = 0 the gate gives AND on X and OR on Y, and with A = 1 the reverse.
module tb_rev_majority_gate1;
  localparam int NVEC = 8 + 200;
  localparam logic [2:0] TABLE [8] = '{3'd0, 3'd3, 3'd2, 3'd6, 3'd1, 3'd5, 3'd4, 3'd7};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a, b, c, x, y, z;
  int checks = 0;
  int failures = 0;
  logic [2:0] in_hist [NVEC];
  logic [7:0] seen;

  rev_majority_gate1 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c), .x(x), .y(y), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [2:0] v, w;
    seen = '0;
    {a, b, c} = '0;
    repeat (3) @(negedge clk);
    checks++;
    if ({x, y, z} !== 3'b000) begin
      failures++;
      $display("FAIL reset");
    end
    rst_n = 1'b1;
    for (int t = 0; t <= NVEC; t++) begin
      @(negedge clk);
      if (t >= 1) begin
        w = in_hist[t-1];
        checks++;
        if ({x, y, z} !== TABLE[w]) begin
          failures++;
          $display("FAIL in %b: got %b want %b", w, {x, y, z}, TABLE[w]);
        end
        if (t <= 8) seen[{x, y, z}] = 1'b1;
        checks++;
        if (w[2] == 1'b0 && (x !== (w[1] & w[0]) || y !== (w[1] | w[0]))) begin
          failures++;
          $display("FAIL A=0 should give X=AND, Y=OR");
        end
        if (w[2] == 1'b1 && (x !== (w[1] | w[0]) || y !== (w[1] & w[0]))) begin
          failures++;
          $display("FAIL A=1 should give X=OR, Y=AND");
        end
      end
      if (t < NVEC) begin
        v = (t < 8) ? 3'(t) : 3'($urandom);
        {a, b, c} = v;
        in_hist[t] = v;
      end
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL mapping not one-to-one: codes seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
