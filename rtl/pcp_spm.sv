// pcp_spm -- surviving-path memory unit with a pre-compiled pointer (PCP).
//
// Before convergence the trace-back only needs, per block of h cycles,
// the node each survivor came from, so the exchange register is cut down
// to ER(v,h) (er_hl with H = V, L = h): v bits per node that, at the end
// of a block, give the survivor's node at the block start; they are also
// the v oldest decisions of the block. These pointer tables go through
// the same chain and pointer walk as in the PTB unit (psp_tracer with
// v-bit entries), which yields, once per block period, the v oldest
// decisions of the block being decoded and the survivor's node at its end.
// The h-v newer decision vectors of every block, which the pointer
// register does not keep, are stored in a FIFO (decision_fifo); a
// combinational trace-back (comb_traceback) starting from that node
// decodes them. Together they give h decoded bits per block.
//
// Interface and timing are those of ptb_spm: one decision vector per
// cycle with dec_valid = 1, out_valid once per h cycles, out_bits[h-1]
// newest decision, latency (L/h+1)*h + L/h decoding cycles (80 for v = 4,
// L = 64, h = 8), the first term of the paper's latency formula for
// this scheme.
//
// The split into pointer chain, FIFO and trace-back follows the paper.
// The FIFO holds L/h+2 blocks of h-v vectors, one block more than the
// paper's memory count, because the trace-back reads the oldest block
// in the same cycle in which the vectors of the newest block are still
// arriving; the table chain likewise keeps L/h+1 tables. Enable, reset and
// bit order are this design's choices.
module pcp_spm #(
  parameter int unsigned V = 4,    // N = 2**V states
  parameter int unsigned L = 64,   // convergence length
  parameter int unsigned H = 8     // block length h of the ER(v,h)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            dec_valid,
  input  logic [2**V-1:0] dec,
  output logic            out_valid,
  output logic [H-1:0]    out_bits
);
  localparam int unsigned N  = 2**V;
  localparam int unsigned NB = L / H;   // pointer look-ups
  localparam int unsigned D  = H - V;   // vectors per block kept in the FIFO

  initial begin
    assert (L % H == 0 && NB <= H && H > V)
      else $error("pcp_spm: need h dividing L, L/h <= h and h > v");
  end

  logic [N-1:0][V-1:0]  ptr_tab;
  logic [$clog2(H)-1:0] phase;
  logic                 full;
  logic [V-1:0]         ptr_bits;   // v oldest decisions of the decoded block
  logic [V-1:0]         blk_end;    // survivor's node at the end of that block
  logic                 ptr_valid;

  er_hl #(.V(V), .H(V), .L(H)) u_er (
    .clk, .rst_n, .en(dec_valid), .dec,
    .psp(ptr_tab), .phase, .full
  );

  psp_tracer #(.V(V), .W(V), .NB(NB), .START(0)) u_pointer (
    .clk, .rst_n, .en(dec_valid), .shift(full), .psp_in(ptr_tab),
    .out_valid(ptr_valid), .out_entry(ptr_bits), .out_ptr(blk_end)
  );

  logic [D-1:0][N-1:0] fifo_vecs;
  logic                fifo_ready;

  decision_fifo #(.W(N), .SLOT(D), .NSLOT(NB + 2)) u_fifo (
    .clk, .rst_n,
    .wr_en(dec_valid && (int'(phase) >= int'(V))), .wr_data(dec),
    .rd_en(ptr_valid), .rd_data(fifo_vecs), .rd_ready(fifo_ready), .full()
  );

  logic [D-1:0] tb_bits;

  comb_traceback #(.V(V), .D(D)) u_tb (
    .start(blk_end), .vecs(fifo_vecs), .bits(tb_bits), .end_node()
  );

  assign out_valid = ptr_valid;
  assign out_bits  = {tb_bits, ptr_bits};

  // The trace-back must find the block it decodes complete in the FIFO.
  always_ff @(posedge clk) begin
    if (rst_n && ptr_valid) assert (fifo_ready) else $error("pcp_spm: FIFO block missing");
  end

endmodule
