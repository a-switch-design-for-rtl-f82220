// sw_input_stage: input stage of one switch port.
//
// The address controller registers the buffer-id arriving on the
// Address-line (cycle 2 of a transaction). In the next cycle, while the word
// is on the Data-line, it dispatches the buffer number and the word to the
// output stage named by the buffer-id, and drives the Ack-line with the
// answer of that output stage's ack controller (the acks of all output
// stages, each qualified by its own request, are ORed together).
//
// Ordering guard: when a word is refused because its buffer is full, the
// sender has already launched up to NACK_HOLD later words of the same
// buffer. The input stage remembers each refused buffer-id for NACK_HOLD
// cycles and refuses every word for it in that time without asking the
// output stage, so that no later word can overtake the refused one. An
// address that names this port itself (there is no RAM for a U-turn) or no
// port at all is refused.
//
// The dispatch and ack collection follow the document; the ordering guard
// is this design's own.
//
// fwd_data is the Data-line itself, wired to every output stage: only the
// request (fwd_req) decides which one stores the word.
module sw_input_stage
  import sw_pkg::*;
#(
  parameter port_e PORT = P_N
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // input channel
  input  addr_t                  addr_i,
  input  word_t                  data_i,
  output logic                   ack_o,
  // to the output stages
  output logic  [NPORTS-1:0]     fwd_req,
  output logic  [BUF_W-1:0]      fwd_buf,
  output word_t                  fwd_data,
  input  logic  [NPORTS-1:0]     fwd_ack
);

  addr_t cur;                 // address of the word now on the Data-line
  addr_t hist [NACK_HOLD];    // recently refused buffer-ids
  logic  legal, held, nack;

  assign legal = cur.valid && cur.port != PORT && 3'(cur.port) < 3'(NPORTS);

  always_comb begin
    held = 1'b0;
    for (int k = 0; k < NACK_HOLD; k++)
      if (hist[k].valid && hist[k].port == cur.port && hist[k].bufn == cur.bufn)
        held = 1'b1;
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      fwd_req[p] = legal && !held && 3'(cur.port) == 3'(p);
  end

  assign fwd_buf  = cur.bufn;
  assign fwd_data = data_i;
  assign ack_o    = |(fwd_ack & fwd_req);
  assign nack     = cur.valid && !held && !ack_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0;
      for (int k = 0; k < NACK_HOLD; k++) hist[k] <= '0;
    end else begin
      a_ack_needs_req: assert (!ack_o || (cur.valid && !held));
      cur     <= addr_i;
      hist[0] <= nack ? cur : '0;
      for (int k = 1; k < NACK_HOLD; k++) hist[k] <= hist[k-1];
    end
  end

endmodule
