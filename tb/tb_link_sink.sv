// tb_link_sink: testbench model of a receiver on one channel (the
// processor side of a network interface, or a downstream switch).
// It registers the address, and in the data cycle accepts the word with a
// probability of accept_pct percent, answering on the Ack-line. Like a
// switch input stage it refuses, for NACK_HOLD cycles after refusing a
// word, every later word for the same address, so words cannot overtake
// each other. Each accepted word is shown for one cycle on rx_*.
module tb_link_sink
  import sw_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  int    accept_pct,
  input  addr_t addr_i,
  input  word_t data_i,
  output logic  ack_o,
  output logic  rx_valid,
  output addr_t rx_addr,
  output word_t rx_data
);
  addr_t cur = '0;
  addr_t hist [NACK_HOLD];
  logic  coin = 0;
  logic  held;
  int unsigned refusals = 0;

  initial for (int k = 0; k < NACK_HOLD; k++) hist[k] = '0;

  always_comb begin
    held = 0;
    for (int k = 0; k < NACK_HOLD; k++)
      if (hist[k].valid && hist[k].port == cur.port && hist[k].bufn == cur.bufn) held = 1;
  end

  assign ack_o    = cur.valid && !held && coin;
  assign rx_valid = ack_o;
  assign rx_addr  = cur;
  assign rx_data  = data_i;

  always @(posedge clk) begin
    if (!rst_n) begin
      cur <= '0;
      for (int k = 0; k < NACK_HOLD; k++) hist[k] <= '0;
    end else begin
      if (cur.valid && !held && !ack_o) refusals++;
      hist[0] <= (cur.valid && !held && !ack_o) ? cur : '0;
      for (int k = 1; k < NACK_HOLD; k++) hist[k] <= hist[k-1];
      cur  <= addr_i;
      coin <= ($urandom_range(0, 99) < accept_pct);
    end
  end
endmodule
