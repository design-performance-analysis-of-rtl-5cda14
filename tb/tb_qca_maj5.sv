// Self-checking testbench for qca_maj5: applies all 32 input patterns
// and compares y with a count of the ones (at least 3 ones give 1).
// Also checks the derived gates: with 2 inputs at 0 the gate is
// a 3-input AND, with them at 1 a 3-input OR.
module tb_qca_maj5;
  logic [4:0] x;
  logic       y;
  int checks = 0, failures = 0;

  qca_maj5 dut (.x(x), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      checks++;
      if (y !== ($countones(x) >= 3)) begin
        failures++;
        $display("FAIL maj5(%b) = %b", x, y);
      end
    end
    // AND / OR use of the gate
    for (int v = 0; v < 8; v++) begin
      x = {2'(0), 3'(v)};
      #1;
      checks++;
      if (y !== (&3'(v))) begin
        failures++;
        $display("FAIL AND use %b -> %b", x, y);
      end
      x = {{2{1'b1}}, 3'(v)};
      #1;
      checks++;
      if (y !== (|3'(v))) begin
        failures++;
        $display("FAIL OR use %b -> %b", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
