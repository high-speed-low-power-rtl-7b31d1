// Self-checking testbench for comb_traceback.
//
// Checks the worked example (4 states: from node 3 at t = 4 through the
// vectors of t = 4 and t = 3 gives decisions 0 then 1, i.e. bits 01) and
// then random start nodes and vectors for the 16-state, 4-vector
// configuration against a trace-back written with the package function.
module comb_traceback_tb;
  import spm_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [1:0]      ex_start, ex_end;
  logic [1:0][3:0] ex_vecs;
  logic [1:0]      ex_bits;
  comb_traceback #(.V(2), .D(2)) u_ex (.start(ex_start), .vecs(ex_vecs), .bits(ex_bits), .end_node(ex_end));

  logic [3:0]       r_start, r_end;
  logic [3:0][15:0] r_vecs;
  logic [3:0]       r_bits;
  comb_traceback #(.V(4), .D(4)) u_r (.start(r_start), .vecs(r_vecs), .bits(r_bits), .end_node(r_end));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ex_start = 2'd3;
    ex_vecs[0] = 4'b1100;   // t=3, nodes 3..0
    ex_vecs[1] = 4'b0110;   // t=4
    #1;
    check(ex_bits == 2'b01, $sformatf("example bits %b", ex_bits));
    check(ex_end == 2'd1, $sformatf("example end node %0d", ex_end));
    for (int i = 0; i < 2000; i++) begin
      int unsigned s;
      logic [3:0] exp_bits;
      r_start = 4'($urandom);
      for (int j = 0; j < 4; j++) r_vecs[j] = 16'($urandom);
      #1;
      s = r_start;
      for (int j = 3; j >= 0; j--) begin
        exp_bits[j] = r_vecs[j][s];
        s = pred_node(s, exp_bits[j], 4);
      end
      check(r_bits == exp_bits, $sformatf("random %0d bits", i));
      check(r_end == 4'(s), $sformatf("random %0d end node", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
