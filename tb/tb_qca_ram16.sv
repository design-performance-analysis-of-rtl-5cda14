// End-to-end testbench for qca_ram16 at its default parameters.
//
// The RAM is driven one operation per clock cycle (inputs change on the
// falling edge) and every output is compared with a reference model, a
// plain 16-entry bit array, delayed by the specified latency of 27
// cycles. The run has four parts:
//   1. flush: Erase held low for longer than the latency, which clears
//      the cells and the pipeline (the RAM has no reset);
//   2. the read/write table of the RAM with Erase, for D1 = 1 and D1 = 0:
//      Erase=0 gives 0; a write shows the written bit; a read returns it;
//      writing a second address leaves the first intact;
//   3. a latency measurement: after a flush, a single write of 1 must
//      reach the output after exactly 27 rising edges, no earlier;
//   4. random operations over all addresses, with occasional erases.
// It counts each mechanism: writes, reads returning 1, reads returning
// 0, reads of a cell that survived writes to other cells, erases that
// cleared stored ones, and reads of an erased cell; a mechanism that
// never happens counts as a failure.
module tb_qca_ram16;
  import qca_ram_pkg::*;

  // Latency of this RAM in clock cycles (one clock = one QCA clock cycle).
  localparam int L = 27;

  logic  clk = 1'b0;
  addr_t addr;
  logic  erase_n, rw, din, dout;

  int checks = 0, failures = 0;

  // reference model
  logic [15:0] mem;
  logic [15:0] dirty;         // cell written to 1 since last erase and other cells written since
  logic        exp_q[$];      // expected output of every applied operation
  bit          chk_q[$];      // whether that output is defined

  int n_write = 0, n_read1 = 0, n_read0 = 0, n_erase = 0;
  int n_survive = 0, n_erased_read = 0;
  logic [15:0] erased_ones;   // cells cleared by an erase while holding 1

  qca_ram16 dut (.clk(clk), .addr(addr), .erase_n(erase_n), .rw(rw), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one operation, update the model, then check the output that
  // belongs to the operation applied L cycles earlier.
  task automatic op(addr_t a, logic er, logic w, logic d, bit defined = 1'b1);
    logic e;
    @(negedge clk);
    addr = a; erase_n = er; rw = w; din = d;
    if (!er) begin
      e = 1'b0;
      if (defined) begin
        n_erase++;
        erased_ones = erased_ones | mem;
      end
      mem = '0;
      dirty = '0;
    end else if (w) begin
      e = d;
      mem[a] = d;
      erased_ones[a] = 1'b0;
      // every other cell holding 1 has now survived a write elsewhere
      dirty = (dirty | mem) & ~(16'h1 << a);
      n_write++;
    end else begin
      e = mem[a];
      if (mem[a]) n_read1++; else n_read0++;
      if (mem[a] && dirty[a]) n_survive++;
      if (erased_ones[a]) n_erased_read++;
    end
    exp_q.push_back(e);
    chk_q.push_back(defined);
    @(posedge clk);
    #1;
    if (exp_q.size() >= L) begin
      int idx;
      idx = exp_q.size() - L;
      if (chk_q[idx]) begin
        checks++;
        if (dout !== exp_q[idx]) begin
          failures++;
          $display("FAIL op #%0d: dout=%b expected %b", idx, dout, exp_q[idx]);
        end
      end
    end
  endtask

  task automatic flush();
    for (int i = 0; i < L + 2; i++) op(4'(i), 1'b0, 1'($urandom), 1'($urandom), 1'b0);
  endtask

  initial begin
    int lat;
    addr_t a1, a2;
    mem = '0; dirty = '0; erased_ones = '0;
    addr = '0; erase_n = 1'b0; rw = 1'b0; din = 1'b0;

    // 1. flush
    flush();

    // 2. read/write table with Erase
    for (int k = 0; k < 2; k++) begin
      logic d1;
      d1 = (k == 0);
      a1 = 4'b0110;
      a2 = 4'b0111;                       // differs in the last address bit
      op(a1, 1'b0, 1'b1, 1'b1);           // Erase 0 -> 0
      op(a1, 1'b1, 1'b1, d1);             // write -> D
      op(a1, 1'b1, 1'b0, 1'b0);           // read -> D
      op(a1, 1'b1, 1'b1, d1);             // write D1 at X1X2X3X4
      op(a2, 1'b1, 1'b1, ~d1);            // write D2 at X1X2X3X5
      op(a1, 1'b1, 1'b0, 1'b0);           // read X1X2X3X4 -> D1
      op(a2, 1'b1, 1'b0, 1'b0);           // read X1X2X3X5 -> D2
    end
    // one erase that clears stored ones, then reads of the cleared cells
    op(4'd6, 1'b1, 1'b1, 1'b1);
    op(4'd9, 1'b1, 1'b1, 1'b1);
    op(4'd0, 1'b0, 1'b0, 1'b0);
    op(4'd6, 1'b1, 1'b0, 1'b0);
    op(4'd9, 1'b1, 1'b0, 1'b0);
    // each address in turn: write its own pattern, then read all back
    for (int i = 0; i < 16; i++) op(4'(i), 1'b1, 1'b1, 1'(i % 3 == 0));
    for (int i = 0; i < 16; i++) op(4'(i), 1'b1, 1'b0, 1'b0);
    for (int i = 0; i < 16; i++) op(4'(i), 1'b1, 1'b1, 1'(i % 3 != 0));
    for (int i = 15; i >= 0; i--) op(4'(i), 1'b1, 1'b0, 1'b0);

    // 3. latency measurement
    flush();
    op(4'd11, 1'b1, 1'b1, 1'b1);
    lat = 1;
    while (dout !== 1'b1 && lat < 4 * L) begin
      op(4'd3, 1'b1, 1'b0, 1'b0);         // reads of an empty cell: 0
      lat++;
    end
    checks++;
    if (lat != L) begin
      failures++;
      $display("FAIL latency measured %0d cycles, expected %0d", lat, L);
    end else begin
      $display("latency %0d cycles", lat);
    end

    // 4. random operations
    for (int i = 0; i < 3000; i++) begin
      logic er;
      er = ($urandom_range(0, 199) != 0);
      op(4'($urandom), er, 1'($urandom_range(0, 2) == 0), 1'($urandom));
    end
    // drain the pipeline
    for (int i = 0; i < L; i++) op(4'($urandom), 1'b1, 1'b0, 1'b0);

    $display("mechanisms: write=%0d read1=%0d read0=%0d erase=%0d survive=%0d erased_read=%0d",
             n_write, n_read1, n_read0, n_erase, n_survive, n_erased_read);
    checks++;
    if (n_write == 0 || n_read1 == 0 || n_read0 == 0 || n_erase == 0 ||
        n_survive == 0 || n_erased_read == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
