// tb_sw_route_table: self-checking test of the routing table.
// After reset every route is invalid and every weight 1; random writes of
// routes and weights must then read back from the addressed entry only.
// No ports; writes on the falling edge, checks one cycle later; cycle
// watchdog. The reset values checked are this design's choice.
module tb_sw_route_table;
  import sw_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic route_we, weight_we;
  logic [5:0] widx;
  logic [7:0] wvalue;
  addr_t route [N];
  logic [WEIGHT_W-1:0] weight [N];
  addr_t ref_route [N];
  logic [WEIGHT_W-1:0] ref_weight [N];
  int checks = 0, failures = 0;

  sw_route_table #(.N(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (route[i] !== ref_route[i] || weight[i] !== ref_weight[i]) begin
        failures++;
        $display("entry %0d: route %h/%h weight %0d/%0d", i, route[i], ref_route[i], weight[i], ref_weight[i]);
      end
    end
  endtask

  initial begin
    route_we = 0; weight_we = 0; widx = 0; wvalue = 0;
    for (int i = 0; i < N; i++) begin ref_route[i] = '0; ref_weight[i] = 1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      route_we = $urandom_range(0, 1); weight_we = $urandom_range(0, 1);
      widx = 6'($urandom); wvalue = 8'($urandom);
      @(posedge clk);
      if (route_we)  ref_route[widx]  = addr_t'(wvalue);
      if (weight_we) ref_weight[widx] = wvalue[WEIGHT_W-1:0];
      @(negedge clk); route_we = 0; weight_we = 0;
      if (n % 10 == 0) compare_all();
    end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
