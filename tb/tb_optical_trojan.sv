// Testbench for optical_trojan at the default 50 MHz clock and tones
// (2 kHz for 0, 4 kHz for 1), with each bit shortened to 50,000 cycles
// (BIT_CYCLES) so that a whole 128-bit pass simulates quickly. Within each
// bit the LED must toggle every 12,500 cycles for a 0 and every 6,250 for a
// 1; the key is read back from the tones; the LED is off outside a pass.
module tb_optical_trojan;
  localparam int W = 128, BC = 50_000;
  logic clk = 0, rst = 1, trigger = 0;
  logic [W-1:0] key;
  logic led, active;
  int checks = 0, failures = 0;

  optical_trojan #(.WIDTH(W), .BIT_CYCLES(BC)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] decoded;
    int bad_half = 0, n_ones = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (100) @(negedge clk);
    check(!led, "LED off before trigger");
    trigger = 1; @(negedge clk); trigger = 0;
    // the LED follows the sequencer by one cycle
    @(negedge clk);
    for (int b = 0; b < W; b++) begin
      int toggles, run, want;
      logic prev;
      toggles = 0; run = 0;
      want = key[W - 1 - b] ? 6_250 : 12_500;
      prev = led;
      for (int c = 0; c < BC; c++) begin
        @(negedge clk);
        run++;
        if (led != prev) begin
          toggles++;
          if (run != want) bad_half++;
          run = 0;
          prev = led;
        end
      end
      // 50,000 cycles hold 8 half periods of 4 kHz or 4 of 2 kHz (the last
      // toggle of a bit coincides with the next bit's restart)
      decoded[W - 1 - b] = (toggles > 5);
      if (key[W - 1 - b]) n_ones++;
    end
    check(bad_half == 0, $sformatf("%0d half periods of the wrong length", bad_half));
    check(decoded == key, $sformatf("decoded %h want %h", decoded, key));
    check(n_ones > 0 && n_ones < W, "both tones used");
    repeat (10) @(negedge clk);
    check(!led && !active, "LED off after the pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
