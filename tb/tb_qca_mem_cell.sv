// Self-checking testbench for qca_mem_cell.
//
// First the cell is taken through the read/write table of the erase cell:
// Erase=0 gives output 0; a selected write shows the written bit; a
// selected read returns it; a cycle without enable gives 0 and keeps the
// bit, so a later read still returns it; Erase=0 then clears it. Then
// random cycles are compared with a reference model: stored bit s,
// s' = erase_n ? (en&rw ? d : s) : 0, output = en & s'.
// Inputs change on the falling edge; the output is checked just before
// the rising edge that stores the bit.
module tb_qca_mem_cell;
  logic clk = 1'b0;
  logic en, rw, d, erase_n, q;
  int checks = 0, failures = 0;
  logic model_s;
  int n_write = 0, n_read = 0, n_erase = 0, n_hold = 0;

  qca_mem_cell dut (.clk(clk), .en(en), .rw(rw), .d(d), .erase_n(erase_n), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one cycle of inputs and check q against the model.
  task automatic cycle(logic e, logic w, logic dd, logic er, bit check_it = 1'b1);
    logic s_next, exp_q;
    @(negedge clk);
    en = e; rw = w; d = dd; erase_n = er;
    s_next = er ? ((e & w) ? dd : model_s) : 1'b0;
    exp_q  = e & s_next;
    #2;
    if (check_it) begin
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL en=%b rw=%b d=%b erase_n=%b s=%b : q=%b expected %b",
                 e, w, dd, er, model_s, q, exp_q);
      end
      if (!er) n_erase++;
      else if (e && w) n_write++;
      else if (e) n_read++;
      else n_hold++;
    end
    model_s = s_next;
  endtask

  initial begin
    model_s = 1'b0;
    en = 0; rw = 0; d = 0; erase_n = 0;
    // clear the loop (start-up value is arbitrary)
    cycle(0, 0, 0, 0, 1'b0);
    // Table of the erase cell, with D1 = 1 and then D1 = 0
    for (int k = 0; k < 2; k++) begin
      logic d1;
      d1 = (k == 0);
      cycle(1, 1, 1, 0);      // Erase 0 -> output 0
      cycle(1, 1, d1, 1);     // write D1 -> D1
      cycle(1, 0, ~d1, 1);    // read -> D1
      cycle(0, 1, ~d1, 1);    // not selected -> 0, bit kept
      cycle(0, 0, ~d1, 1);
      cycle(1, 0, 0, 1);      // read -> D1 again
      cycle(0, 0, 0, 0);      // erase while not selected
      cycle(1, 0, 1, 1);      // read -> 0
    end
    for (int i = 0; i < 2000; i++)
      cycle(1'($urandom), 1'($urandom), 1'($urandom), ($urandom_range(0, 9) != 0));
    if (n_write == 0 || n_read == 0 || n_erase == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL a case never happened: write=%0d read=%0d erase=%0d hold=%0d",
               n_write, n_read, n_erase, n_hold);
    end
    $display("cases: write=%0d read=%0d erase=%0d unselected=%0d", n_write, n_read, n_erase, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
