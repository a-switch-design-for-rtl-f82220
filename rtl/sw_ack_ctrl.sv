// sw_ack_ctrl: acknowledgement controller of an output stage.
//
// Each of the four RAMs of an output stage is written by exactly one input
// stage. In the data cycle of a transaction (cycle 3) that input stage
// presents the buffer number it decoded from the Address-line. The ack
// controller looks the buffer up in the LENGTH-Full table of that RAM and
// answers true when the buffer has room, false when it is full; a true
// answer is also the RAM's write enable, so a word that is refused is simply
// not stored. Purely combinational: the answer is valid in the same cycle
// as the request, as the transaction protocol requires.
module sw_ack_ctrl
  import sw_pkg::*;
(
  input  logic [NMEMS-1:0]              req,
  input  logic [NMEMS-1:0][BUF_W-1:0]   req_buf,
  input  logic [NMEMS-1:0][MAX_BUFS-1:0] full,
  output logic [NMEMS-1:0]              ack,
  output logic [NMEMS-1:0]              wr_en
);

  always_comb begin
    for (int m = 0; m < NMEMS; m++) begin
      ack[m]   = req[m] && !full[m][req_buf[m]];
      wr_en[m] = ack[m];
    end
  end

endmodule
