// spm_top -- the two proposed surviving-path memory units for a 16-state
// (v = 4) Viterbi decoder with convergence length L = 64, side by side:
// the pre-compiled trace-back unit with an ER(8,8) and the pre-compiled
// pointer unit with an ER(4,8). They are alternative implementations of
// the same function; each has its own decision-vector input (from the
// decoder's add-compare-select unit, which is not part of this design)
// and its own decoded output, 8 bits every 8 decoding cycles, 80 cycles
// after the oldest of them entered. Given the same decisions both give the
// same bits. Clock and active-low synchronous reset are shared.
module spm_top #(
  parameter int unsigned V     = 4,
  parameter int unsigned L     = 64,
  parameter int unsigned H_PTB = 8,
  parameter int unsigned H_PCP = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // pre-compiled trace-back unit
  input  logic              ptb_dec_valid,
  input  logic [2**V-1:0]   ptb_dec,
  output logic              ptb_out_valid,
  output logic [H_PTB-1:0]  ptb_out_bits,
  // pre-compiled pointer unit
  input  logic              pcp_dec_valid,
  input  logic [2**V-1:0]   pcp_dec,
  output logic              pcp_out_valid,
  output logic [H_PCP-1:0]  pcp_out_bits
);

  ptb_spm #(.V(V), .L(L), .H(H_PTB)) u_ptb (
    .clk, .rst_n, .dec_valid(ptb_dec_valid), .dec(ptb_dec),
    .out_valid(ptb_out_valid), .out_bits(ptb_out_bits)
  );

  pcp_spm #(.V(V), .L(L), .H(H_PCP)) u_pcp (
    .clk, .rst_n, .dec_valid(pcp_dec_valid), .dec(pcp_dec),
    .out_valid(pcp_out_valid), .out_bits(pcp_out_bits)
  );

endmodule
