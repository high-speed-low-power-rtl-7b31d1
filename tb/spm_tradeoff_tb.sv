// Workload testbench: other power/latency trade-off points of the
// pre-compiled schemes for the 16-state, L = 64 decoder.
//
// The PTB unit is run as ER(16,16) and ER(32,32), the PCP unit as
// ER(4,16) and ER(4,32), all on one random decision stream (random true
// path, random stalls shared by all units). Every decoded block is checked
// against a bit-by-bit trace-back from node 0 and its output cycle against
// the latency (L/h+1)*h + L/h: 84 cycles for h = 16, 98 for h = 32. For
// the PTB these equal the paper's latency formula; for the PCP the paper's
// formula adds a longer term for a trace-back that takes one step per
// cycle (91 and 121), which this design's single-cycle trace-back avoids.
module spm_tradeoff_tb;
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
  localparam int unsigned L = 64;

  logic        en;
  logic [15:0] dec;
  logic [3:0]  ov;
  logic [15:0] ob16_ptb, ob16_pcp;
  logic [31:0] ob32_ptb, ob32_pcp;

  ptb_spm #(.V(4), .L(L), .H(16)) u_ptb16 (.clk, .rst_n, .dec_valid(en), .dec, .out_valid(ov[0]), .out_bits(ob16_ptb));
  ptb_spm #(.V(4), .L(L), .H(32)) u_ptb32 (.clk, .rst_n, .dec_valid(en), .dec, .out_valid(ov[1]), .out_bits(ob32_ptb));
  pcp_spm #(.V(4), .L(L), .H(16)) u_pcp16 (.clk, .rst_n, .dec_valid(en), .dec, .out_valid(ov[2]), .out_bits(ob16_pcp));
  pcp_spm #(.V(4), .L(L), .H(32)) u_pcp32 (.clk, .rst_n, .dec_valid(en), .dec, .out_valid(ov[3]), .out_bits(ob32_pcp));

  logic [15:0] hist [T_MAX + 1];
  int unsigned tstate [T_MAX + 1];

  function automatic logic [31:0] ref_block(int b, int h);
    logic [31:0] r = '0;
    int unsigned node = 0;
    for (int t = (b + L / h + 1) * h; t > b * h; t--) begin
      logic d = hist[t][node];
      if (t <= (b + 1) * h) r[t - b * h - 1] = d;
      node = pred_node(node, d, 4);
    end
    return r;
  endfunction

  int unsigned ncyc = 0;
  int nblk [4] = '{0, 0, 0, 0};
  localparam int H_OF [4] = '{16, 32, 16, 32};
  localparam string NAME [4] = '{"PTB ER(16,16)", "PTB ER(32,32)", "PCP ER(4,16)", "PCP ER(4,32)"};

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
    rst_n = 0; en = 0; dec = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (ncyc < T_MAX) begin
      logic e;
      e = ($urandom_range(0, 5) != 0);
      en <= e;
      dec <= e ? hist[ncyc + 1] : 16'($urandom);
      #1;
      for (int u = 0; u < 4; u++) begin
        if (ov[u]) begin
          automatic int h = H_OF[u];
          automatic logic [31:0] got = (u == 0) ? 32'(ob16_ptb) : (u == 1) ? ob32_ptb :
                                       (u == 2) ? 32'(ob16_pcp) : ob32_pcp;
          automatic logic [31:0] exp = ref_block(nblk[u], h);
          if (h == 16) exp[31:16] = '0;
          check(e, "output only in a decoding cycle");
          check(got == exp, $sformatf("%s block %0d", NAME[u], nblk[u]));
          check(ncyc == nblk[u] * h + (L / h + 1) * h + L / h,
                $sformatf("%s block %0d latency %0d", NAME[u], nblk[u], ncyc - nblk[u] * h));
          nblk[u]++;
        end
      end
      @(posedge clk);
      if (e) ncyc++;
    end
    en <= 0;
    for (int u = 0; u < 4; u++) begin
      automatic int h = H_OF[u];
      automatic int lat = (L / h + 1) * h + L / h;
      check(nblk[u] == (T_MAX - lat - 1) / h + 1, $sformatf("%s blocks %0d", NAME[u], nblk[u]));
      $display("%s: %0d blocks, latency %0d cycles", NAME[u], nblk[u], lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
