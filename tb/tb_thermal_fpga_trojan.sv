// Testbench for thermal_fpga_trojan with BIT_CYCLES=9 and 64 dummy
// registers: during a 1 bit every register must change on every clock
// (after the first cycle of the bit), during a 0 bit and outside a pass
// all must be zero. The number of register flips must match the ones in
// the key.
module tb_thermal_fpga_trojan;
  localparam int W = 128, BC = 9, N = 64;
  logic clk = 0, rst = 1, trigger = 0;
  logic [W-1:0] key;
  logic [N-1:0] dummy_regs, prev;
  logic active;
  int checks = 0, failures = 0;

  thermal_fpga_trojan #(.WIDTH(W), .N_DUMMY(N), .BIT_CYCLES(BC)) dut (.*);

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
    int bad = 0, full_flips = 0, ones_cycles = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    check(dummy_regs == '0, "quiet before trigger");
    trigger = 1; @(negedge clk); trigger = 0;
    @(negedge clk);
    prev = dummy_regs;
    for (int c = 0; c < W * BC; c++) begin
      logic bitv;
      bitv = key[W - 1 - c / BC];
      if (!bitv && dummy_regs != '0) bad++;
      if (bitv && c % BC != 0) begin
        ones_cycles++;
        if ((dummy_regs ^ prev) == '1) full_flips++;
        else bad++;
      end
      prev = dummy_regs;
      @(negedge clk);
    end
    check(bad == 0, $sformatf("%0d cycles wrong", bad));
    check(full_flips == (BC - 1) * $countones(key) && full_flips == ones_cycles,
          $sformatf("full-bank flips %0d", full_flips));
    repeat (5) @(negedge clk);
    check(dummy_regs == '0 && !active, "quiet after the pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
