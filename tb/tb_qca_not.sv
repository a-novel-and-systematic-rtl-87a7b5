// Self-checking testbench for qca_not: both input values.
module tb_qca_not;
  logic a, y;
  int checks = 0;
  int failures = 0;

  qca_not dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      a = 1'(i);
      #1;
      checks++;
      if (y !== (i == 0)) begin
        failures++;
        $display("FAIL not(%b) = %b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
