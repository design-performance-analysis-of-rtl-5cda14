// Self-checking testbench for qca_maj3: applies all eight input patterns
// and compares y with a count of the ones in the pattern (at least two
// ones give 1). Also checks the two derived gates the RAM uses: third
// input 0 gives AND, third input 1 gives OR.
module tb_qca_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL maj3(%b) = %b", 3'(v), y);
      end
      if (c == 1'b0) begin
        checks++;
        if (y !== (a & b)) failures++;
      end else begin
        checks++;
        if (y !== (a | b)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
