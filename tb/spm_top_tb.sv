// End-to-end testbench for spm_top at its default parameters (v = 4,
// L = 64, h = 8 for both units).
//
// One stream of 16-bit decision vectors, built around a random true state
// sequence, is fed to both units, each with its own random stall pattern.
// Every decoded block of either unit is checked against a bit-by-bit
// trace-back from node 0 and against the true data where the survivors
// have converged (counted only), and its decoding cycle against the
// latency of 80 cycles. Both units must deliver the same blocks. The test
// counts how often each mechanism of the design happened: exchange-register
// blocks completed and tables shifted, pre-compiled trace-backs finished,
// trace-backs ending in a shift cycle, FIFO writes and block pops,
// combinational trace-backs, and stalls; any of them that never happened
// is a failure.
module spm_top_tb;
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

  localparam int unsigned T_MAX = 3000;
  localparam int unsigned H = 8, NB = 8, LAT = 80;

  logic        ptb_en, pcp_en, ptb_ov, pcp_ov;
  logic [15:0] ptb_dec, pcp_dec;
  logic [7:0]  ptb_ob, pcp_ob;

  spm_top dut (
    .clk, .rst_n,
    .ptb_dec_valid(ptb_en), .ptb_dec(ptb_dec), .ptb_out_valid(ptb_ov), .ptb_out_bits(ptb_ob),
    .pcp_dec_valid(pcp_en), .pcp_dec(pcp_dec), .pcp_out_valid(pcp_ov), .pcp_out_bits(pcp_ob)
  );

  logic [15:0] hist [T_MAX + 1];
  int unsigned tstate [T_MAX + 1];
  logic [7:0]  ptb_blocks [T_MAX / H];

  function automatic logic [7:0] ref_block(int b);
    logic [7:0] r = '0;
    int unsigned node = 0;
    for (int t = (b + NB + 1) * H; t > b * H; t--) begin
      logic d = hist[t][node];
      if (t <= (b + 1) * H) r[t - b * H - 1] = d;
      node = pred_node(node, d, 4);
    end
    return r;
  endfunction

  function automatic logic [7:0] true_block(int b);
    logic [7:0] r;
    for (int t = b * H + 1; t <= (b + 1) * H; t++) r[t - b * H - 1] = tstate[t - 1][0];
    return r;
  endfunction

  int unsigned ptb_t = 0, pcp_t = 0;            // vectors taken by each unit
  int ptb_nb = 0, pcp_nb = 0, match = 0;
  int n_ptb_shift = 0, n_pcp_shift = 0, n_ptb_stall = 0, n_pcp_stall = 0;
  int n_fifo_wr = 0, n_fifo_pop = 0, n_out_on_shift = 0, n_comb_tb = 0;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tstate[0] = $urandom_range(0, 15);
    for (int t = 1; t <= T_MAX; t++) begin
      tstate[t] = ($urandom_range(0, 1) << 3) | (tstate[t - 1] >> 1);
      hist[t] = 16'($urandom);
      hist[t][tstate[t]] = tstate[t - 1][0];
    end
    rst_n = 0; ptb_en = 0; pcp_en = 0; ptb_dec = '0; pcp_dec = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (ptb_t < T_MAX || pcp_t < T_MAX) begin
      logic ep, ec;
      ep = (ptb_t < T_MAX) && ($urandom_range(0, 7) != 0);
      ec = (pcp_t < T_MAX) && ($urandom_range(0, 4) != 0);
      ptb_en <= ep; pcp_en <= ec;
      ptb_dec <= ep ? hist[ptb_t + 1] : 16'($urandom);
      pcp_dec <= ec ? hist[pcp_t + 1] : 16'($urandom);
      if (!ep && ptb_t < T_MAX) n_ptb_stall++;
      if (!ec && pcp_t < T_MAX) n_pcp_stall++;
      #1;
      // mechanisms
      if (ep && dut.u_ptb.u_er.full) n_ptb_shift++;
      if (ec && dut.u_pcp.u_er.full) n_pcp_shift++;
      if (dut.u_pcp.u_fifo.wr_en) n_fifo_wr++;
      if (dut.u_pcp.u_fifo.rd_en) n_fifo_pop++;
      if (ptb_ov && dut.u_ptb.u_er.full) n_out_on_shift++;
      // outputs
      if (ptb_ov) begin
        check(ep, "PTB output only in a decoding cycle");
        check(ptb_ob == ref_block(ptb_nb), $sformatf("PTB block %0d", ptb_nb));
        check(ptb_t == ptb_nb * H + LAT, $sformatf("PTB block %0d latency %0d", ptb_nb, ptb_t - ptb_nb * H));
        if (ptb_ob == true_block(ptb_nb)) match++;
        ptb_blocks[ptb_nb] = ptb_ob;
        ptb_nb++;
      end
      if (pcp_ov) begin
        check(ec, "PCP output only in a decoding cycle");
        check(pcp_ob == ref_block(pcp_nb), $sformatf("PCP block %0d", pcp_nb));
        check(pcp_t == pcp_nb * H + LAT, $sformatf("PCP block %0d latency %0d", pcp_nb, pcp_t - pcp_nb * H));
        if (pcp_nb < ptb_nb) check(pcp_ob == ptb_blocks[pcp_nb], $sformatf("PTB and PCP agree on block %0d", pcp_nb));
        if (pcp_ob[7:4] != '0 || pcp_ob[3:0] != '0) n_comb_tb++;
        pcp_nb++;
      end
      @(posedge clk);
      if (ep) ptb_t++;
      if (ec) pcp_t++;
    end
    ptb_en <= 0; pcp_en <= 0;
    check(ptb_nb == (T_MAX - LAT - 1) / H + 1, $sformatf("PTB blocks %0d", ptb_nb));
    check(pcp_nb == (T_MAX - LAT - 1) / H + 1, $sformatf("PCP blocks %0d", pcp_nb));
    check(n_ptb_shift == T_MAX / H - 1, "PTB table shifts");
    check(n_pcp_shift == T_MAX / H - 1, "PCP table shifts");
    check(n_fifo_wr == (T_MAX / H) * (H - 4), "FIFO writes");
    check(n_fifo_pop == pcp_nb, "FIFO pops");
    check(n_ptb_stall > 0 && n_pcp_stall > 0, "stalls happened");
    check(n_out_on_shift > 0, "trace-back ending in a shift cycle happened");
    check(n_comb_tb > 0, "combinational trace-back produced data");
    $display("mechanisms: PTB shifts %0d, PCP shifts %0d, PTB stalls %0d, PCP stalls %0d",
             n_ptb_shift, n_pcp_shift, n_ptb_stall, n_pcp_stall);
    $display("mechanisms: FIFO writes %0d, FIFO pops %0d, outputs in shift cycle %0d, comb TB %0d",
             n_fifo_wr, n_fifo_pop, n_out_on_shift, n_comb_tb);
    $display("decoded blocks PTB %0d PCP %0d, equal to true data %0d", ptb_nb, pcp_nb, match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
