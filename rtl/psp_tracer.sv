// psp_tracer -- pre-compiled surviving-path blocks and the pre-compiled
// trace-back (PTB) that runs through them.
//
// A chain of NB+1 blocks, each holding one complete output of the
// exchange register (N entries of W bits), is shifted once per block
// period: on a decoding cycle with shift = 1 block 0 takes psp_in and
// block k takes block k-1. Block 0 is therefore the newest look-up table,
// block NB the oldest.
//
// In the shift cycle the trace-back starts from node START in the table
// being loaded (psp_in) and keeps the V low bits of the selected entry:
// the node the survivor passed through at the start of that block. In
// each of the next NB-1 decoding cycles one more block is looked up
// (block k in cycle k after the shift), so W decisions are traced back
// per cycle. In cycle NB after the shift the pointer selects the entry of
// the oldest block: that entry is the output. With NB*H >= L these blocks
// cover the convergence length, so the output is decoded data.
//
// The chain of tables, the shift every block period, the arbitrary start
// node (node 0) and one table look-up per cycle follow the paper. The
// look-up of the newest table straight from the exchange register in the
// shift cycle, the fill counter that suppresses outputs until the chain
// holds real tables, the enable and the reset are this design's choices.
//
// Outputs are combinational from registers: out_valid is high for one
// decoding cycle (en = 1) per block period once the chain is full;
// out_entry is the selected entry of block NB and out_ptr the pointer that
// selected it (the survivor's node at the end of that block). When NB
// equals the block period the output cycle is also the next shift cycle,
// which reads the registers before they shift.
module psp_tracer #(
  parameter int unsigned V     = 4,   // N = 2**V nodes
  parameter int unsigned W     = 8,   // bits per table entry (h for PTB, v for PCP)
  parameter int unsigned NB    = 8,   // look-ups before the decoded block (L/h)
  parameter int unsigned START = 0    // node the trace-back starts from
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,        // decoding cycle
  input  logic                   shift,     // psp_in holds a complete table
  input  logic [2**V-1:0][W-1:0] psp_in,
  output logic                   out_valid,
  output logic [W-1:0]           out_entry,
  output logic [V-1:0]           out_ptr
);
  localparam int unsigned N  = 2**V;
  localparam int unsigned KW = $clog2(NB + 1);

  logic [NB:0][N-1:0][W-1:0] blk;       // blk[0] newest, blk[NB] oldest
  logic [V-1:0]              ptr;
  logic [KW-1:0]             step;      // index of the block looked up now
  logic                      tracing;
  logic [KW:0]               nshift;    // shifts so far, saturating at NB+1

  initial begin
    assert (W >= V && NB >= 1 && START < N)
      else $error("psp_tracer: need W >= V, NB >= 1, START < 2**V");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blk     <= '0;
      ptr     <= '0;
      step    <= '0;
      tracing <= 1'b0;
      nshift  <= '0;
    end else if (en) begin
      if (shift) begin
        blk[0] <= psp_in;
        for (int unsigned k = 1; k <= NB; k++) blk[k] <= blk[k-1];
        ptr     <= psp_in[START][V-1:0];
        step    <= KW'(1);
        tracing <= 1'b1;
        if (nshift <= (KW+1)'(NB)) nshift <= nshift + 1'b1;
      end else if (tracing) begin
        if (step == KW'(NB)) begin
          tracing <= 1'b0;
        end else begin
          ptr  <= blk[step][ptr][V-1:0];
          step <= step + 1'b1;
        end
      end
    end
  end

  assign out_valid = en && tracing && (step == KW'(NB)) && (nshift > (KW+1)'(NB));
  assign out_entry = blk[NB][ptr];
  assign out_ptr   = ptr;

endmodule
