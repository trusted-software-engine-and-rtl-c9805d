// Testbench for trojan_key_sequencer with BIT_CYCLES=7: after a trigger,
// every cycle must carry the expected key bit (MSB first, 7 cycles each),
// `active` must last exactly 128*7 cycles, a trigger during a pass must be
// ignored, the key must be copied at the trigger, and a second trigger must
// start a new pass.
module tb_trojan_key_sequencer;
  localparam int W = 128, BC = 7;
  logic clk = 0, rst = 1, trigger = 0;
  logic [W-1:0] key;
  logic active, bit_val;
  logic [6:0] bit_index;
  int checks = 0, failures = 0;

  trojan_key_sequencer #(.WIDTH(W), .BIT_CYCLES(BC)) dut (.*);

  always #5 clk = ~clk;

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

  task automatic pass_check(logic [W-1:0] k);
    int bad = 0;
    key = k; trigger = 1;
    @(negedge clk);
    trigger = 0;
    key = ~k;                              // copied at the trigger
    for (int c = 0; c < W * BC; c++) begin
      if (c == 300) trigger = 1;           // ignored mid-pass
      if (c == 301) trigger = 0;
      if (!(active && bit_val == k[W - 1 - c / BC] && bit_index == 7'(W - 1 - c / BC))) bad++;
      @(negedge clk);
    end
    check(bad == 0, $sformatf("%0d cycles with a wrong bit", bad));
    check(!active && !bit_val, "idle after 128 bits");
    repeat (20) @(negedge clk);
    check(!active, "stays idle");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!active && !bit_val, "idle after reset");
    pass_check({$urandom, $urandom, $urandom, $urandom});
    pass_check(128'hFFFF0000_A5A5A5A5_00000001_80000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
