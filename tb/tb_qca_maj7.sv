// Self-checking testbench for qca_maj7: applies all 128 input patterns
// and compares y with a count of the ones (at least 4 ones give 1).
// Also checks the derived gates: with 3 inputs at 0 the gate is
// a 4-input AND, with them at 1 a 4-input OR.
module tb_qca_maj7;
  logic [6:0] x;
  logic       y;
  int checks = 0, failures = 0;

  qca_maj7 dut (.x(x), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      x = 7'(v);
      #1;
      checks++;
      if (y !== ($countones(x) >= 4)) begin
        failures++;
        $display("FAIL maj7(%b) = %b", x, y);
      end
    end
    // AND / OR use of the gate
    for (int v = 0; v < 16; v++) begin
      x = {3'(0), 4'(v)};
      #1;
      checks++;
      if (y !== (&4'(v))) begin
        failures++;
        $display("FAIL AND use %b -> %b", x, y);
      end
      x = {{3{1'b1}}, 4'(v)};
      #1;
      checks++;
      if (y !== (|4'(v))) begin
        failures++;
        $display("FAIL OR use %b -> %b", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
