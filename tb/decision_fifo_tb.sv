// Self-checking testbench for decision_fifo.
//
// Writes vectors in groups of SLOT with random gaps and pops whole slots
// at random times, with simultaneous writes and pops, fills the FIFO to
// the brim, and compares every popped slot with a queue model. Also
// checks rd_ready and full against the model's fill level.
module decision_fifo_tb;
  localparam int unsigned W = 16, SLOT = 4, NSLOT = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, wr_en, rd_en, rd_ready, full;
  logic [W-1:0] wr_data;
  logic [SLOT-1:0][W-1:0] rd_data;
  int checks = 0, failures = 0;

  decision_fifo #(.W(W), .SLOT(SLOT), .NSLOT(NSLOT)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [W-1:0] model [$];
  int n_full = 0, n_pop = 0, n_both = 0;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit w, r;
      int unsigned level;
      // fill phases and drain phases alternate every 500 cycles
      level = model.size();
      w = (level < SLOT * NSLOT) && ($urandom_range(0, 9) < ((cyc / 500) % 2 ? 3 : 8));
      r = (level >= SLOT) && ($urandom_range(0, 9) < ((cyc / 500) % 2 ? 4 : 1));
      @(negedge clk);
      check(rd_ready == (level >= SLOT), "rd_ready");
      check(full == (level == SLOT * NSLOT), "full");
      if (full) n_full++;
      wr_en = w; rd_en = r; wr_data = W'($urandom);
      if (r) begin
        for (int j = 0; j < SLOT; j++) check(rd_data[j] == model[j], $sformatf("pop %0d word %0d", n_pop, j));
        n_pop++;
        if (w) n_both++;
      end
      @(posedge clk);
      if (r) repeat (SLOT) void'(model.pop_front());
      if (w) model.push_back(wr_data);
    end
    check(n_full > 0, "FIFO never filled");
    check(n_both > 0, "no simultaneous write and pop");
    $display("pops %0d, cycles full %0d, write+pop %0d", n_pop, n_full, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
