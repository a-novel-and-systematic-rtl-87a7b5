// Self-checking testbench for majority_gate: all eight input combinations are
// compared with the majority truth table written out as a constant, and the
// AND and OR behaviour with one input fixed is checked as well.
module tb_majority_gate;
  logic a, b, c, m;
  int checks = 0;
  int failures = 0;
  // Truth table M(A,B,C), indexed by {A,B,C}.
  localparam logic [7:0] TRUTH = 8'b1110_1000;

  majority_gate dut (.a(a), .b(b), .c(c), .m(m));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (m !== TRUTH[i]) begin
        failures++;
        $display("FAIL M(%b,%b,%b) = %b", a, b, c, m);
      end
      // one input fixed at 0 gives AND of the other two, at 1 gives OR
      checks++;
      if (a == 1'b0 && m !== (b & c)) begin
        failures++;
        $display("FAIL AND mode");
      end
      if (a == 1'b1 && m !== (b | c)) begin
        failures++;
        $display("FAIL OR mode");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
