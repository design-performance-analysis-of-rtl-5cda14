// Self-checking testbench for qca_or16: all-zero input, every single-bit
// input, and random input words, compared with the OR of the word.
module tb_qca_or16;
  logic [15:0] x;
  logic        y;
  int checks = 0, failures = 0;

  qca_or16 dut (.x(x), .y(y));

  task automatic check(logic [15:0] v);
    x = v;
    #1;
    checks++;
    if (y !== (v != 16'h0)) begin
      failures++;
      $display("FAIL or16(%h) = %b", v, y);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000);
    for (int i = 0; i < 16; i++) check(16'h0001 << i);
    for (int i = 0; i < 16; i++) check(~(16'h0001 << i));
    for (int i = 0; i < 200; i++) begin
      logic [15:0] v;
      v = 16'($urandom) & 16'($urandom) & 16'($urandom);  // sparse words
      check(v);
    end
    check(16'hffff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
