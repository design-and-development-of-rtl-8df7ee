// jesd204_ls: lane alignment buffer of one JESD204B receive lane.
//
// The lanes of one link arrive with different delays. Each lane writes its
// de-framed words into this FIFO starting at the first multiframe start
// (bomf) after SYNC~ is released, one word per clock from then on, and
// raises dready as soon as it holds data. The link's common dread, the AND
// of all its lanes' dready, then pops every lane at once, so words that left
// the transmitters together come out together. A lane whose skew exceeds the
// buffer depth overflows: dovf is set and stays set until SYNC~ is requested
// again (sync = 0), which also empties the buffer.
//
// Timing: dout is registered and holds the word popped by dread in the
// previous clock. Depth DEPTH words (power of two).
// The buffer's ports (din, bomf, dread, dout, dovf, dready, sync) are those
// of the lane receiver; its organisation as a FIFO started at the first
// multiframe and its depth are this design's choices.
module jesd204_ls #(
  parameter int DEPTH = 16
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [15:0] din,
  input  logic        bomf,
  input  logic        sync,
  input  logic        dread,
  output logic [15:0] dout,
  output logic        dovf,
  output logic        dready
);

  localparam int AW = $clog2(DEPTH);

  logic [15:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic        writing;
  logic        wr_en, rd_en;
  logic [AW:0] fill;

  always_comb begin
    fill  = wr_ptr - rd_ptr;
    wr_en = sync && (writing || bomf);
    rd_en = dread && (fill != '0);
    dready = writing && (fill != '0);
  end

  always_ff @(posedge clock) begin
    if (wr_en && (fill != (AW+1)'(DEPTH) || rd_en)) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clock) begin
    if (reset || !sync) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      writing <= 1'b0;
      dovf    <= 1'b0;
      dout    <= '0;
    end else begin
      if (wr_en) begin
        writing <= 1'b1;
        if (fill == (AW+1)'(DEPTH) && !rd_en) dovf <= 1'b1;
        else                                   wr_ptr <= wr_ptr + 1'b1;
      end
      if (rd_en) begin
        dout   <= mem[rd_ptr[AW-1:0]];
        rd_ptr <= rd_ptr + 1'b1;
      end
    end
  end

  initial begin
    assert ((1 << AW) == DEPTH && DEPTH >= 2) else $error("jesd204_ls: DEPTH must be a power of two");
  end

endmodule
