// synapse_accum_tb: self-checking test of the synapse accumulation unit.
//
// For every pulse pattern of a 4-synapse unit, and random patterns of an 8-synapse
// unit with a different shift, V_s must equal popcount(pulses) * 4096 / 2^SHIFT.
module synapse_accum_tb;
  import reservoir_pkg::*;

  logic [3:0] p4;
  logic [7:0] p8;
  vmem_t      vs4, vs8;
  int         checks = 0;
  int         failures = 0;

  synapse_accum #(.NS(4), .SHIFT(3)) dut4 (.pulses(p4), .vs(vs4));
  synapse_accum #(.NS(8), .SHIFT(5)) dut8 (.pulses(p8), .vs(vs8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      p4 = 4'(i);
      #1;
      check(int'(vs4) == $countones(p4) * 512, $sformatf("NS=4 pulses=%b vs=%0d", p4, vs4));
    end
    for (int i = 0; i < 200; i++) begin
      p8 = 8'($urandom);
      #1;
      check(int'(vs8) == $countones(p8) * 128, $sformatf("NS=8 pulses=%b vs=%0d", p8, vs8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
