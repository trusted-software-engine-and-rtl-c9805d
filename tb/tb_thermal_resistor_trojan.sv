// Testbench for thermal_resistor_trojan with BIT_CYCLES=9: for a whole pass
// the heater pin must be on for exactly the cycles of 1 bits (one cycle
// behind the trigger) and off for 0 bits and outside the pass.
module tb_thermal_resistor_trojan;
  localparam int W = 128, BC = 9;
  logic clk = 0, rst = 1, trigger = 0;
  logic [W-1:0] key;
  logic heater, active;
  int checks = 0, failures = 0;

  thermal_resistor_trojan #(.WIDTH(W), .BIT_CYCLES(BC)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad = 0, on = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    check(!heater, "off before trigger");
    trigger = 1; @(negedge clk); trigger = 0;
    @(negedge clk);
    for (int c = 0; c < W * BC; c++) begin
      if (heater != key[W - 1 - c / BC]) bad++;
      if (heater) on++;
      @(negedge clk);
    end
    check(bad == 0, $sformatf("%0d cycles wrong", bad));
    check(on == BC * $countones(key), "heating time matches the ones in the key");
    repeat (5) @(negedge clk);
    check(!heater && !active, "off after the pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
