// Self-checking testbench for psp_tracer.
//
// Part 1 loads the four look-up tables of the 4-state worked example
// (oldest first), once with 4-bit entries as produced by an ER(4,4) and
// once with the 2-bit entries of an ER(2,4). Starting from node 0 the
// pointer must pass nodes 2, 0 and 3, and the oldest table must give
// entry 0101 (2-bit: 01), one block period after the last table entered.
// Part 2 pushes random tables with random stalls into a chain of nine
// 16-node tables (trace over all eight cycles of the block period) and a
// chain of five (trace shorter than the period) and compares every output
// with a pointer walk over the stored tables, including the cycle it
// appears in.
module psp_tracer_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- worked example ----------------
  logic en_ex, shift_ex;
  logic [3:0][3:0] tab4;
  logic [3:0][1:0] tab2;
  logic ov4, ov2;
  logic [3:0] oe4;
  logic [1:0] oe2, op4, op2;

  psp_tracer #(.V(2), .W(4), .NB(3)) u_ex4 (.clk, .rst_n, .en(en_ex), .shift(shift_ex),
    .psp_in(tab4), .out_valid(ov4), .out_entry(oe4), .out_ptr(op4));
  psp_tracer #(.V(2), .W(2), .NB(3)) u_ex2 (.clk, .rst_n, .en(en_ex), .shift(shift_ex),
    .psp_in(tab2), .out_valid(ov2), .out_entry(oe2), .out_ptr(op2));

  // tables indexed [table][node], node 0 written first; table 0 = PSP(4,0)
  localparam logic [3:0] EX_TAB [4][4] = '{
    '{4'b0011, 4'b1101, 4'b1000, 4'b0101},   // PSP(4,0)
    '{4'b1111, 4'b0010, 4'b0010, 4'b1001},   // PSP(8,4)
    '{4'b1000, 4'b1011, 4'b0100, 4'b0100},   // PSP(12,8)
    '{4'b0010, 4'b1110, 4'b0010, 4'b0101}    // PSP(16,12)
  };

  // ---------------- random, v = 4 ----------------
  localparam int unsigned NT = 60;        // tables pushed
  logic en_r, shift_r;
  logic [15:0][7:0] tab_r;
  logic [15:0][7:0] tabs [NT + 1];
  logic ov8, ov4r;
  logic [7:0] oe8, oe4r;
  logic [3:0] op8, op4r;

  psp_tracer #(.V(4), .W(8), .NB(8)) u_r8 (.clk, .rst_n, .en(en_r), .shift(shift_r),
    .psp_in(tab_r), .out_valid(ov8), .out_entry(oe8), .out_ptr(op8));
  psp_tracer #(.V(4), .W(8), .NB(4)) u_r4 (.clk, .rst_n, .en(en_r), .shift(shift_r),
    .psp_in(tab_r), .out_valid(ov4r), .out_entry(oe4r), .out_ptr(op4r));

  function automatic logic [7:0] ref_out(int m, int nb, output logic [3:0] p);
    p = tabs[m][0][3:0];
    for (int k = 1; k < nb; k++) p = tabs[m - k][p][3:0];
    return tabs[m - nb][p];
  endfunction

  int unsigned ncyc = 0;             // decoding cycles
  int unsigned shift_cyc [NT + 1];   // decoding cycle of each shift
  int m_r = 0;                       // tables pushed
  int n_out8 = 0, n_out4 = 0;

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen;
    rst_n = 0; en_ex = 0; shift_ex = 0; tab4 = '0; tab2 = '0;
    en_r = 0; shift_r = 0; tab_r = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // part 1: four block periods of four cycles
    seen = 0;
    for (int c = 0; c < 16; c++) begin
      en_ex <= 1;
      shift_ex <= (c % 4 == 0);
      for (int s = 0; s < 4; s++) begin
        tab4[s] <= (c % 4 == 0) ? EX_TAB[c / 4][s] : 4'($urandom);
        tab2[s] <= (c % 4 == 0) ? EX_TAB[c / 4][s][1:0] : 2'($urandom);
      end
      #1;
      if (c == 15) begin
        check(ov4 && ov2, "example: output after fourth table plus three look-ups");
        check(oe4 == 4'b0101, $sformatf("example: ER(4,4) chain decodes %b", oe4));
        check(oe2 == 2'b01, $sformatf("example: ER(2,4) chain gives %b", oe2));
        check(op4 == 2'd3 && op2 == 2'd3, "example: pointer into oldest table is node 3");
        seen++;
      end else begin
        check(!ov4 && !ov2, $sformatf("example: no output at cycle %0d", c));
      end
      if (c == 13) check(op4 == 2'd2 && op2 == 2'd2, "example: first pointer is node 2");
      if (c == 14) check(op4 == 2'd0 && op2 == 2'd0, "example: second pointer is node 0");
      @(posedge clk);
    end
    en_ex <= 0; shift_ex <= 0;
    check(seen == 1, "example output seen");
    // part 2
    while (m_r < NT || ncyc < shift_cyc[NT] + 10) begin
      logic e, sh;
      e  = ($urandom_range(0, 3) != 0);
      sh = e && (ncyc % 8 == 0) && (m_r < NT);
      en_r <= e; shift_r <= sh;
      for (int s = 0; s < 16; s++) tab_r[s] <= 8'($urandom);
      #1;
      if (ov8) begin
        logic [3:0] p;
        automatic int m = n_out8 + 9;   // output belongs to the trace that started with table m
        check(oe8 == ref_out(m, 8, p) && op8 == p, $sformatf("NB=8 output %0d", n_out8));
        check(ncyc == shift_cyc[m] + 8, $sformatf("NB=8 output %0d cycle", n_out8));
        n_out8++;
      end
      if (ov4r) begin
        logic [3:0] p;
        automatic int m = n_out4 + 5;
        check(oe4r == ref_out(m, 4, p) && op4r == p, $sformatf("NB=4 output %0d", n_out4));
        check(ncyc == shift_cyc[m] + 4, $sformatf("NB=4 output %0d cycle", n_out4));
        n_out4++;
      end
      @(posedge clk);
      if (e) begin
        if (sh) begin
          m_r++;
          tabs[m_r] = tab_r;
          shift_cyc[m_r] = ncyc;
        end
        ncyc++;
      end
    end
    check(n_out8 == NT - 8, $sformatf("NB=8 outputs %0d", n_out8));
    check(n_out4 == NT - 4, $sformatf("NB=4 outputs %0d", n_out4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
