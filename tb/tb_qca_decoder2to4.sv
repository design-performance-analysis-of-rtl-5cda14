// Self-checking testbench for qca_decoder2to4: for each of the four
// addresses the output must be the one-hot word with bit a set.
module tb_qca_decoder2to4;
  logic [1:0] a;
  logic [3:0] y;
  int checks = 0, failures = 0;

  qca_decoder2to4 dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = 2'(v);
      #1;
      checks++;
      if (y !== (4'b0001 << v)) begin
        failures++;
        $display("FAIL a=%0d y=%b", v, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
