// er_hl -- partial exchange register ER(h,l).
//
// For each of the N = 2**V trellis nodes an H-bit register follows the
// node's surviving path. Decision vectors arrive one per decoding cycle
// (en = 1). The stream is cut into blocks of L vectors. During the first
// H vectors of a block each register shifts right and takes its own
// decision bit into the MSB, after copying the register of its
// predecessor node (exchange). During the remaining L-H vectors it only
// copies the predecessor's register. At the end of a block the register
// of node i therefore holds the first H decisions of the block on the
// survivor of node i: MSB = decision at t2+H, LSB = decision at t2+1,
// where t2 is the block start. Its V least significant bits are the
// number of the survivor's node at t2 (the pre-compiled pointer).
// ER(h,h) (H = L) gives full h-bit surviving-path portions; ER(v,l)
// (H = V) gives only the pointer.
//
// The shift/exchange rule and the meaning of the bits follow the
// paper's description and worked example; the split into a shift
// phase and an exchange-only phase for H < L, the enable, the phase
// output and the synchronous active-low reset are choices of this design.
//
// Timing: full = 1 in the decoding cycles in which psp holds a complete
// block (the cycle after the L-th vector of the block was taken). In that
// same cycle the register already takes the first vector of the next
// block, so a consumer must capture psp on that edge.
module er_hl #(
  parameter int unsigned V = 4,   // constraint length minus one, N = 2**V states
  parameter int unsigned H = 8,   // width h of each surviving-path portion
  parameter int unsigned L = 8    // depth l of the block, in decoding cycles
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,      // decision vector valid
  input  logic [2**V-1:0]             dec,     // decision vector V_t, bit i = node i
  output logic [2**V-1:0][H-1:0]      psp,     // per node surviving-path portion
  output logic [$clog2(L)-1:0]        phase,   // index of the next vector in its block
  output logic                        full     // psp holds a complete block
);
  import spm_pkg::*;

  localparam int unsigned N = 2**V;

  logic primed;   // at least one complete block has been taken

  initial begin
    assert (H >= V && H >= 2 && L >= H)
      else $error("er_hl: need V <= H <= L and H >= 2");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      psp    <= '0;
      phase  <= '0;
      primed <= 1'b0;
    end else if (en) begin
      for (int unsigned s = 0; s < N; s++) begin
        automatic int unsigned p = pred_node(s, dec[s], V);
        if (int'(phase) < int'(H))
          psp[s] <= {dec[s], psp[p][H-1:1]};
        else
          psp[s] <= psp[p];
      end
      if (int'(phase) == int'(L) - 1) begin
        phase  <= '0;
        primed <= 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  assign full = primed && (phase == '0);

endmodule
