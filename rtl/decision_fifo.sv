// decision_fifo -- FIFO of decision vectors, written one vector at a time
// and read one slot of SLOT vectors at a time.
//
// The pre-compiled pointer unit stores here, per block, the SLOT = h-v
// decision vectors that its pointer exchange register does not record,
// and later pops them a whole block at a time for the combinational
// trace-back. Storage is a circular buffer of NSLOT*SLOT words; writes
// are expected in groups of SLOT so that every slot starts at a multiple
// of SLOT.
//
// That such a FIFO exists, and what it holds, follows the paper. The
// circular-buffer organisation, the slot-wide read port, the depth (set
// by the instantiating unit) and the flags are this design's choices.
//
// Timing: a write (wr_en) lands at the clock edge. rd_data always shows
// the oldest slot, combinationally from the array; rd_en pops it at the
// edge. rd_ready is high when a whole slot is present. A write and a pop
// may happen in the same cycle. Writing into a full FIFO or popping an
// incomplete slot is an error (assertions).
module decision_fifo #(
  parameter int unsigned W     = 16,  // bits per decision vector
  parameter int unsigned SLOT  = 4,   // vectors per slot
  parameter int unsigned NSLOT = 10   // slots
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [W-1:0]           wr_data,
  input  logic                   rd_en,
  output logic [SLOT-1:0][W-1:0] rd_data,   // rd_data[0] oldest vector
  output logic                   rd_ready,
  output logic                   full
);
  localparam int unsigned DEPTH = SLOT * NSLOT;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned SW    = (NSLOT > 1) ? $clog2(NSLOT) : 1;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr;
  logic [SW-1:0] rd_slot;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_slot <= '0;
      count   <= '0;
    end else begin
      if (wr_en) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (rd_en) rd_slot <= (rd_slot == SW'(NSLOT - 1)) ? '0 : rd_slot + 1'b1;
      count <= count + (wr_en ? CW'(1) : CW'(0)) - (rd_en ? CW'(SLOT) : CW'(0));
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < SLOT; j++)
      rd_data[j] = mem[AW'(rd_slot * SLOT + j)];
  end

  assign rd_ready = (count >= CW'(SLOT));
  assign full     = (count == CW'(DEPTH));

  // A write into a full FIFO, or a pop of an incomplete slot, loses data.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(wr_en && full && !rd_en)) else $error("decision_fifo: write while full");
      assert (!(rd_en && !rd_ready))      else $error("decision_fifo: pop of incomplete slot");
    end
  end

endmodule
