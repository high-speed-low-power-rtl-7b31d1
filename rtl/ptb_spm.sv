// ptb_spm -- surviving-path memory unit with pre-compiled trace-back (PTB).
//
// An exchange register ER(h,h) (er_hl with H = L = h) turns every h
// decision vectors into a look-up table: for each node, the h decisions of
// its survivor over the block, whose v low bits name the node the
// survivor came from h cycles earlier. Every h cycles the table is pushed
// into a chain of L/h+1 tables (psp_tracer), and a pointer walks from node
// 0 through the chain, one table per decoding cycle, i.e. h trace-back
// steps per cycle. After L/h look-ups the trace-back has covered the
// convergence length L, and the entry selected in the oldest table is
// h decoded bits.
//
// Interface: one decision vector per cycle with dec_valid = 1 (bit i =
// decision of node i). out_valid pulses once per h decoding cycles once
// the chain is full; out_bits[h-1] is the newest decision of the decoded
// block and out_bits[0] the oldest. A decision is the input bit that left
// the encoder state, so out_bits are the decoded data delayed by v.
//
// Latency: the oldest decision of a block is output (L/h+1)*h + L/h
// decoding cycles after it entered (80 for v = 4, L = 64, h = 8), as the
// paper's latency formula gives. Stalls (dec_valid = 0) freeze the unit.
//
// The architecture follows the paper; the enable, the reset, the
// start node 0 and the output bit order are choices of this design.
module ptb_spm #(
  parameter int unsigned V = 4,    // N = 2**V states
  parameter int unsigned L = 64,   // convergence length
  parameter int unsigned H = 8     // ER(h,h) width and block period
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            dec_valid,
  input  logic [2**V-1:0] dec,
  output logic            out_valid,
  output logic [H-1:0]    out_bits
);
  localparam int unsigned N  = 2**V;
  localparam int unsigned NB = L / H;   // pre-compiled trace-back steps

  initial begin
    assert (L % H == 0 && NB <= H)
      else $error("ptb_spm: need h dividing L and L/h <= h");
  end

  logic [N-1:0][H-1:0]     psp;
  logic                    full;

  er_hl #(.V(V), .H(H), .L(H)) u_er (
    .clk, .rst_n, .en(dec_valid), .dec,
    .psp, .phase(), .full
  );

  psp_tracer #(.V(V), .W(H), .NB(NB), .START(0)) u_trace (
    .clk, .rst_n, .en(dec_valid), .shift(full), .psp_in(psp),
    .out_valid, .out_entry(out_bits), .out_ptr()
  );

endmodule
