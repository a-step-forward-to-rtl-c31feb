// weight_regs_tb: self-checking test of the synaptic weight register bank.
//
// Checks the reset values, random writes against a shadow copy, that a write with
// `we` low or to an address beyond the bank changes nothing.
module weight_regs_tb;
  import reservoir_pkg::*;

  localparam int NW = 12;
  localparam int AW = 4;
  localparam weight_t INIT [NW] = '{4'sd1, -4'sd1, 4'sd2, -4'sd2, 4'sd3, -4'sd3,
                                     4'sd4, -4'sd4, 4'sd5, -4'sd5, 4'sd6, -4'sd6};

  logic          clk = 1'b0;
  logic          rst;
  logic          we;
  logic [AW-1:0] waddr;
  weight_t       wdata;
  weight_t       weights [NW];
  weight_t       shadow  [NW];
  int            checks = 0;
  int            failures = 0;

  weight_regs #(.NW(NW), .AW(AW), .WINIT(INIT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic compare(input string when);
    for (int i = 0; i < NW; i++)
      check(weights[i] == shadow[i], $sformatf("%s: weight %0d = %0d, expected %0d", when, i, weights[i], shadow[i]));
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; waddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    shadow = INIT;
    compare("reset");
    for (int i = 0; i < 300; i++) begin
      we    = $urandom_range(0, 1);
      waddr = 4'($urandom);
      wdata = 4'($urandom);
      @(posedge clk);
      if (we && int'(waddr) < NW) shadow[waddr] = wdata;
      #1;
      compare("after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
