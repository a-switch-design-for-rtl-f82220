// sw_buf_ctrl: buffer controller for one RAM of an output stage.
//
// The RAM is cut into 2**part buffers of DEPTH >> part words each (for 32
// words: 1x32, 2x16, 4x8, 8x4 or 16x2), and part can be rewritten at run
// time; rewriting it empties every buffer of this RAM. Each buffer is a
// circular queue with three pointers:
//   wr  - next free slot, advanced when the ack controller accepts a word;
//   snd - next word to put on the channel, advanced when the arbiter grants
//         the buffer (words may be sent before earlier ones are acked);
//   cmt - oldest word not yet acknowledged, advanced by a positive ack
//         (the word is erased).
// A negative ack rolls snd back to cmt so the refused word and all words
// sent after it go again, in order, and flips the buffer's epoch bit; acks
// that come back carrying the old epoch belong to words already rolled back
// and are ignored.
//
// Outputs per buffer: full (the LENGTH-Full table: no space for another
// word; buffers outside the partition read as full), pending (the STATUS
// table: a word waits to be sent) and the current epoch. Address outputs
// are combinational from the pointers; all updates happen at the clock
// edge. A rollback on the same cycle as a grant of the same buffer wins.
// The pointer scheme and the epoch bit are this design's own; the document
// gives only the partitioning and the two tables.
module sw_buf_ctrl
  import sw_pkg::*;
#(
  parameter int DEPTH = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // partition
  input  logic                 part_we,
  input  logic [PART_W-1:0]    part_in,
  output logic [PART_W-1:0]    part,
  // write side (from the ack controller)
  input  logic                 wr_en,
  input  logic [BUF_W-1:0]     wr_buf,
  output logic [AW-1:0]        wr_addr,
  // send side (from the arbiter)
  input  logic                 snd_en,
  input  logic [BUF_W-1:0]     snd_buf,
  output logic [AW-1:0]        snd_addr,
  // acknowledgement (cycle 4 of the transaction)
  input  logic                 ack_valid,
  input  logic [BUF_W-1:0]     ack_buf,
  input  logic                 ack_epoch,
  input  logic                 ack_ok,
  // tables
  output logic [MAX_BUFS-1:0]  full,
  output logic [MAX_BUFS-1:0]  pending,
  output logic [MAX_BUFS-1:0]  epoch
);

  typedef logic [AW:0] ptr_t;

  ptr_t wr_p  [MAX_BUFS];
  ptr_t snd_p [MAX_BUFS];
  ptr_t cmt_p [MAX_BUFS];

  // Largest legal partition: no more than MAX_BUFS buffers, at least 1 word.
  localparam int PART_MAX = (BUF_W < AW) ? BUF_W : AW;

  logic [PART_W-1:0] part_clip;
  assign part_clip = (int'(part_in) > PART_MAX) ? PART_W'(PART_MAX) : part_in;

  ptr_t size;      // words per buffer
  ptr_t off_mask;  // size - 1
  assign size     = ptr_t'(DEPTH) >> part;
  assign off_mask = size - ptr_t'(1);

  function automatic logic [AW-1:0] slot(logic [BUF_W-1:0] b, ptr_t p);
    ptr_t base;
    base = ptr_t'(b) << (AW - int'(part));
    return AW'(base | (p & off_mask));
  endfunction

  assign wr_addr  = slot(wr_buf, wr_p[wr_buf]);
  assign snd_addr = slot(snd_buf, snd_p[snd_buf]);

  always_comb begin
    for (int b = 0; b < MAX_BUFS; b++) begin
      if (b < (1 << part)) begin
        full[b]    = ptr_t'(wr_p[b] - cmt_p[b]) >= size;
        pending[b] = wr_p[b] != snd_p[b];
      end else begin
        full[b]    = 1'b1;
        pending[b] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part <= PART_W'(RESET_PART);
      for (int b = 0; b < MAX_BUFS; b++) begin
        wr_p[b]  <= '0;
        snd_p[b] <= '0;
        cmt_p[b] <= '0;
        epoch[b] <= 1'b0;
      end
    end else if (part_we) begin
      part <= part_clip;
      for (int b = 0; b < MAX_BUFS; b++) begin
        wr_p[b]  <= '0;
        snd_p[b] <= '0;
        cmt_p[b] <= '0;
        epoch[b] <= ~epoch[b];
      end
    end else begin
      // A granted buffer must hold an unsent word; an accepted word needs space.
      a_snd_pending: assert (!snd_en || pending[snd_buf]);
      a_wr_space:    assert (!wr_en || !full[wr_buf]);
      if (wr_en) wr_p[wr_buf] <= wr_p[wr_buf] + ptr_t'(1);
      if (snd_en) snd_p[snd_buf] <= snd_p[snd_buf] + ptr_t'(1);
      if (ack_valid && ack_epoch == epoch[ack_buf]) begin
        if (ack_ok) begin
          cmt_p[ack_buf] <= cmt_p[ack_buf] + ptr_t'(1);
        end else begin
          snd_p[ack_buf] <= cmt_p[ack_buf];
          epoch[ack_buf] <= ~epoch[ack_buf];
        end
      end
    end
  end

endmodule
