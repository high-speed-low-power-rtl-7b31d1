// Self-checking testbench for er_hl.
//
// Part 1 replays the 4-state worked example (v = 2): eight decision
// vectors through an ER(4,4) and an ER(2,4). After every vector the
// ER(4,4) registers must hold the exchange-register states of the example
// (newest known bits), and at t = 4 and t = 8 the complete look-up tables;
// the ER(2,4) must hold the two oldest bits of those tables.
// Part 2 drives random decision vectors, with random stalls, into the
// ER(8,8) and ER(4,8) of the 16-state units and compares every complete
// table with an explicit trace-back over the stored vectors.
module er_hl_tb;
  import spm_pkg::*;

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

  // ---------------- worked example, v = 2 ----------------
  logic       ex_en;
  logic [3:0] ex_dec;
  logic [3:0][3:0] ex44_psp;
  logic [3:0][1:0] ex24_psp;
  logic ex44_full, ex24_full;

  er_hl #(.V(2), .H(4), .L(4)) u_ex44 (.clk, .rst_n, .en(ex_en), .dec(ex_dec),
                                       .psp(ex44_psp), .phase(), .full(ex44_full));
  er_hl #(.V(2), .H(2), .L(4)) u_ex24 (.clk, .rst_n, .en(ex_en), .dec(ex_dec),
                                       .psp(ex24_psp), .phase(), .full(ex24_full));

  // decision of node i at time t (t = 1..8), node 0 first
  localparam logic [3:0] EX_V [1:8] = '{
    4'b1110,   // t=1: 0 1 1 1
    4'b0001,   // t=2: 1 0 0 0
    4'b1100,   // t=3: 0 0 1 1
    4'b0110,   // t=4: 0 1 1 0
    4'b1101,   // t=5: 1 0 1 1
    4'b1011,   // t=6: 1 1 0 1
    4'b0010,   // t=7: 0 1 0 0
    4'b1001    // t=8: 1 0 0 1
  };
  // expected ER(4,4) states, strings per node, 'x' = not yet defined
  string EX_ER [1:8][4] = '{
    '{"0xxx", "1xxx", "1xxx", "1xxx"},
    '{"11xx", "01xx", "00xx", "01xx"},
    '{"011x", "000x", "101x", "101x"},
    '{"0011", "1101", "1000", "0101"},
    '{"1xxx", "0xxx", "1xxx", "1xxx"},
    '{"10xx", "11xx", "01xx", "11xx"},
    '{"010x", "111x", "010x", "001x"},
    '{"1111", "0010", "0010", "1001"}
  };
  localparam logic [3:0][1:0] EX_PTR4 = '{2'b01, 2'b00, 2'b01, 2'b11}; // nodes 3..0
  localparam logic [3:0][1:0] EX_PTR8 = '{2'b01, 2'b10, 2'b10, 2'b11};

  // ---------------- random, v = 4 ----------------
  localparam int unsigned T_MAX = 400;
  logic        r_en;
  logic [15:0] r_dec;
  logic [15:0][7:0] r88_psp;
  logic [15:0][3:0] r48_psp;
  logic r88_full, r48_full;
  logic [15:0] hist [T_MAX + 1];
  int unsigned t_in = 0;   // vectors taken so far

  er_hl #(.V(4), .H(8), .L(8)) u_r88 (.clk, .rst_n, .en(r_en), .dec(r_dec),
                                      .psp(r88_psp), .phase(), .full(r88_full));
  er_hl #(.V(4), .H(4), .L(8)) u_r48 (.clk, .rst_n, .en(r_en), .dec(r_dec),
                                      .psp(r48_psp), .phase(), .full(r48_full));

  // first h decisions of the block (t2+1 .. t2+l] on node s's survivor
  function automatic logic [7:0] ref_portion(int unsigned t1, int unsigned l, int unsigned h,
                                             int unsigned s);
    logic [7:0] r = '0;
    int unsigned node = s;
    for (int unsigned t = t1; t > t1 - l; t--) begin
      logic d = hist[t][node];
      if (t <= t1 - l + h) r[t - (t1 - l) - 1] = d;
      node = pred_node(node, d, 4);
    end
    return r;
  endfunction

  int blocks88 = 0, blocks48 = 0;

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; ex_en = 0; ex_dec = '0; r_en = 0; r_dec = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // part 1
    for (int t = 1; t <= 8; t++) begin
      ex_en <= 1; ex_dec <= EX_V[t];
      @(posedge clk);
      ex_en <= 0;
      #1;
      for (int s = 0; s < 4; s++)
        for (int b = 0; b < 4; b++) begin
          automatic byte c = EX_ER[t][s][b];
          if (c != "x")
            check(ex44_psp[s][3-b] == (c == "1"), $sformatf("ER(4,4) t=%0d node %0d bit %0d", t, s, b));
        end
      if (t == 4) check(ex24_psp == EX_PTR4, "ER(2,4) table at t=4");
      if (t == 8) check(ex24_psp == EX_PTR8, "ER(2,4) table at t=8");
      check(ex44_full == (t == 4 || t == 8), $sformatf("ER(4,4) full flag t=%0d", t));
      check(ex24_full == (t == 4 || t == 8), $sformatf("ER(2,4) full flag t=%0d", t));
    end
    // part 2
    while (t_in < T_MAX) begin
      r_en  <= ($urandom_range(0, 4) != 0);
      r_dec <= 16'($urandom);
      @(posedge clk);
      if (r_en) begin
        t_in++;
        hist[t_in] = r_dec;
      end
      #1;
      if (r_en && t_in % 8 == 0) begin
        check(r88_full && r48_full, $sformatf("full flags at t=%0d", t_in));
        for (int s = 0; s < 16; s++) begin
          check(r88_psp[s] == ref_portion(t_in, 8, 8, s), $sformatf("ER(8,8) t=%0d node %0d", t_in, s));
          check(r48_psp[s] == 4'(ref_portion(t_in, 8, 4, s)), $sformatf("ER(4,8) t=%0d node %0d", t_in, s));
        end
        blocks88++;
      end else if (r_en) begin
        check(!r88_full && !r48_full, $sformatf("no full flag at t=%0d", t_in));
      end
    end
    r_en <= 0;
    check(blocks88 == T_MAX / 8, "number of complete blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
