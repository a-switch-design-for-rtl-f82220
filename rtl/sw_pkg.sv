// sw_pkg: types and constants shared by the switch and the mesh.
//
// A switch has five ports (north, east, south, west, local). Each output
// port holds four RAMs, one per input direction other than itself, and each
// RAM is cut into up to MAX_BUFS buffers (virtual channels). A buffer is
// named by the output port that holds it, the input direction it stores and
// its number inside that RAM, as in "S3.E-S{3}". On a link only the port and
// the buffer number travel: the input direction is implied by the link.
//
// The word is 4 bytes and a RAM holds 32 words, as in the synthesized
// switch. MAX_BUFS = 16 allows the 2-word buffers used in the latency
// experiments; the reset partition is 4 buffers of 8 words. The encodings
// (port numbering, address and configuration formats) are this design's own.
package sw_pkg;

  localparam int DATA_W   = 32;             // one word, 4 bytes
  localparam int NPORTS   = 5;
  localparam int NMEMS    = 4;              // RAMs per output stage
  localparam int MAX_BUFS = 16;             // most buffers per RAM
  localparam int BUF_W    = $clog2(MAX_BUFS);
  localparam int PART_W   = $clog2(BUF_W + 1); // log2(buffers per RAM), 0..BUF_W
  localparam int WEIGHT_W = 4;
  localparam int RESET_PART = 2;            // 4 buffers per RAM after reset
  // Cycles after a refused word during which later words for the same
  // buffer are refused too: the words the sender had already launched
  // before it saw the refusal (grant, address, data, ack = 4 cycles).
  localparam int NACK_HOLD = 3;

  typedef enum logic [2:0] {
    P_N = 3'd0,
    P_E = 3'd1,
    P_S = 3'd2,
    P_W = 3'd3,
    P_L = 3'd4
  } port_e;

  // Address/Cmd line: which buffer of the receiving switch the word is for.
  typedef struct packed {
    logic              valid;
    port_e             port;   // output port inside the receiving switch
    logic [BUF_W-1:0]  bufn;   // buffer number inside the RAM of that port
  } addr_t;

  localparam int ADDR_W = $bits(addr_t);

  typedef logic [DATA_W-1:0] word_t;

  // Configuration write into one switch.
  typedef enum logic [1:0] {
    CFG_ROUTE  = 2'd0,   // value[ADDR_W-1:0] = addr_t the buffer sends to
    CFG_WEIGHT = 2'd1,   // value[WEIGHT_W-1:0] = round robin weight
    CFG_PART   = 2'd2    // value[PART_W-1:0] = log2(buffers in this RAM)
  } cfg_kind_e;

  typedef struct packed {
    logic              we;
    cfg_kind_e         kind;
    port_e             port;   // output stage
    logic [1:0]        mem;    // RAM inside the output stage
    logic [BUF_W-1:0]  bufn;   // buffer inside the RAM
    logic [7:0]        value;
  } cfg_t;

  // Which input direction RAM m of output port p stores: the four
  // directions other than p, in port order.
  function automatic port_e mem_src(port_e p, logic [1:0] m);
    logic [2:0] s;
    s = {1'b0, m};
    if (s >= 3'(p)) s = s + 3'd1;
    return port_e'(s);
  endfunction

  // Which RAM of output port p stores data that came in on port q (q != p).
  function automatic logic [1:0] mem_of(port_e p, port_e q);
    logic [2:0] s;
    s = 3'(q);
    if (s > 3'(p)) s = s - 3'd1;
    return s[1:0];
  endfunction

endpackage
