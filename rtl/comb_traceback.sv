// comb_traceback -- combinational trace-back over D decision vectors.
//
// Starting from node start at the time of the newest vector, the block
// reads that node's decision bit, steps to the predecessor node
// {s[V-2:0], d} and repeats down to the oldest vector. bits[D-1] is the
// decision of the newest vector, bits[0] that of the oldest; end_node is
// the node reached before the oldest vector. It is a chain of D N-to-1
// multiplexers with no state.
//
// The paper uses such a trace-back, started from the pointer of the
// pre-compiled pointer chain, to decode the h-v bits of a block that the
// pointer exchange register does not keep; the ordering of the ports is
// this design's choice.
module comb_traceback #(
  parameter int unsigned V = 4,   // N = 2**V nodes
  parameter int unsigned D = 4    // number of vectors traced (h - v)
) (
  input  logic [V-1:0]           start,
  input  logic [D-1:0][2**V-1:0] vecs,     // vecs[0] oldest, vecs[D-1] newest
  output logic [D-1:0]           bits,
  output logic [V-1:0]           end_node
);
  always_comb begin
    automatic logic [V-1:0] s = start;
    for (int j = int'(D) - 1; j >= 0; j--) begin
      bits[j] = vecs[j][s];
      s       = {s[V-2:0], bits[j]};
    end
    end_node = s;
  end

endmodule
