// Self-checking testbench for pcp_spm.
//
// Two units, the 16-state one at its default size (v = 4, L = 64, h = 8)
// and the 4-state example size (v = 2, L = 12, h = 4), receive random
// decision vectors built around a random "true" state sequence (the true
// state's decision always points to the true predecessor, all others are
// random), with random stalls. Every decoded block is compared with a
// plain bit-by-bit trace-back, from node 0 at the end of the newest
// block, over the stored decision vectors; its decoding cycle is compared
// with the expected latency of (L/h+1)*h + L/h cycles. The fraction of
// decoded bits equal to the true data is printed for information.
module pcp_spm_tb;
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

  localparam int unsigned T_MAX = 2000;

  // ---- default-size unit ----
  logic        en;
  logic [15:0] dec_a;
  logic [3:0]  dec_b;
  logic        ov_a, ov_b;
  logic [7:0]  ob_a;
  logic [3:0]  ob_b;

  pcp_spm u_a (.clk, .rst_n, .dec_valid(en), .dec(dec_a), .out_valid(ov_a), .out_bits(ob_a));
  pcp_spm #(.V(2), .L(12), .H(4)) u_b (.clk, .rst_n, .dec_valid(en), .dec(dec_b),
                                       .out_valid(ov_b), .out_bits(ob_b));

  logic [15:0] hist_a [T_MAX + 1];
  logic [3:0]  hist_b [T_MAX + 1];
  int unsigned true_a [T_MAX + 1];   // true state at t
  int unsigned true_b [T_MAX + 1];

  // decisions of block b (h bits, newest in MSB) by trace-back from node 0
  function automatic logic [7:0] ref_block(bit big, int b, int v, int l, int h);
    logic [7:0] r = '0;
    int unsigned node = 0;
    int nb = l / h;
    int t1 = (b + nb + 1) * h;
    for (int t = t1; t > b * h; t--) begin
      logic d = big ? hist_a[t][node] : hist_b[t][node];
      if (t <= (b + 1) * h) r[t - b * h - 1] = d;
      node = pred_node(node, d, v);
    end
    return r;
  endfunction

  // decisions of block b on the true path
  function automatic logic [7:0] true_block(bit big, int b, int h);
    logic [7:0] r = '0;
    for (int t = b * h + 1; t <= (b + 1) * h; t++)
      r[t - b * h - 1] = big ? true_a[t - 1][0] : true_b[t - 1][0];
    return r;
  endfunction

  int unsigned ncyc = 0;
  int nblk_a = 0, nblk_b = 0, match_a = 0, match_b = 0, stalls = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; dec_a = '0; dec_b = '0;
    true_a[0] = $urandom_range(0, 15);
    true_b[0] = $urandom_range(0, 3);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (ncyc < T_MAX) begin
      logic e;
      e = ($urandom_range(0, 5) != 0);
      en <= e;
      if (e) begin
        automatic int unsigned t = ncyc + 1;
        logic [15:0] va;
        logic [3:0]  vb;
        true_a[t] = ($urandom_range(0, 1) << 3) | (true_a[t - 1] >> 1);
        true_b[t] = ($urandom_range(0, 1) << 1) | (true_b[t - 1] >> 1);
        va = 16'($urandom);
        vb = 4'($urandom);
        va[true_a[t]] = true_a[t - 1][0];
        vb[true_b[t]] = true_b[t - 1][0];
        hist_a[t] = va;
        hist_b[t] = vb;
        dec_a <= va;
        dec_b <= vb;
      end else begin
        stalls++;
      end
      #1;
      if (ov_a) begin
        check(e, "output only in a decoding cycle");
        check(ob_a == ref_block(1, nblk_a, 4, 64, 8), $sformatf("v=4 block %0d", nblk_a));
        check(ncyc == nblk_a * 8 + 80, $sformatf("v=4 block %0d latency %0d", nblk_a, ncyc - nblk_a * 8));
        if (ob_a == true_block(1, nblk_a, 8)) match_a++;
        nblk_a++;
      end
      if (ov_b) begin
        check(ob_b == 4'(ref_block(0, nblk_b, 2, 12, 4)), $sformatf("v=2 block %0d", nblk_b));
        check(ncyc == nblk_b * 4 + 19, $sformatf("v=2 block %0d latency %0d", nblk_b, ncyc - nblk_b * 4));
        if (ob_b == 4'(true_block(0, nblk_b, 4))) match_b++;
        nblk_b++;
      end
      @(posedge clk);
      if (e) ncyc++;
    end
    en <= 0;
    check(nblk_a == (T_MAX - 81) / 8 + 1, $sformatf("v=4 blocks decoded %0d", nblk_a));
    check(nblk_b == (T_MAX - 20) / 4 + 1, $sformatf("v=2 blocks decoded %0d", nblk_b));
    check(stalls > 0, "stalls exercised");
    $display("blocks equal to the true data: v=4 %0d of %0d, v=2 %0d of %0d", match_a, nblk_a, match_b, nblk_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
