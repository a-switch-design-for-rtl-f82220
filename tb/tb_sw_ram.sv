// tb_sw_ram: self-checking test of the RAM module.
// Random writes and reads against a reference array; a read returns the
// word stored at the previous clock edge, one cycle after the request, and
// rdata holds when no read is requested.
// No ports; runs from its own clock, with a cycle watchdog. The one-read/
// one-write organisation is the switch's; the read timing checked is this
// design's.
module tb_sw_ram;
  localparam int DEPTH = 32;
  localparam int W = 32;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we, re;
  logic [4:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] ref_mem [DEPTH];
  logic [W-1:0] expect_q;
  int checks = 0, failures = 0;

  sw_ram #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 5'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 5'($urandom); wdata = $urandom;
      re = 1; raddr = 5'($urandom);
      expect_q = ref_mem[raddr];           // read sees the old word
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("read %0d: got %h expected %h", raddr, rdata, expect_q);
      end
      // no read: output holds
      @(negedge clk); we = 0; re = 0; raddr = 5'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
