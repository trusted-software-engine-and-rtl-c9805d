// Testbench for em_trojan with BIT_CYCLES=20. Over a whole 128-bit pass,
// during a 1 bit the antenna pin must copy the clock (high in the high
// half, low in the low half, one rising edge per cycle); during a 0 bit and
// outside a pass it must stay low. The key is read back from the edges.
module tb_em_trojan;
  localparam int W = 128, BC = 20;
  logic clk = 0, rst = 1, trigger = 0;
  logic [W-1:0] key;
  logic antenna, active;
  int checks = 0, failures = 0;
  int edges = 0;

  em_trojan #(.WIDTH(W), .BIT_CYCLES(BC)) dut (.*);

  always #10 clk = ~clk;
  always @(posedge antenna) edges++;

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
    logic [W-1:0] decoded;
    int bad = 0, e0;
    key = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    check(edges == 0 && !antenna, "quiet before trigger");
    trigger = 1; @(negedge clk); trigger = 0;
    for (int b = 0; b < W; b++) begin
      e0 = edges;
      for (int c = 0; c < BC; c++) begin
        // sample the middle of the high and low halves of the clock
        @(posedge clk); #5;
        if (c > 0 && antenna != key[W - 1 - b]) bad++;
        @(negedge clk); #5;
        if (c < BC - 1 && antenna != 1'b0) bad++;
      end
      decoded[W - 1 - b] = (edges - e0 > BC / 2);
    end
    check(bad == 0, $sformatf("%0d samples off", bad));
    check(decoded == key, $sformatf("decoded %h want %h", decoded, key));
    repeat (3) @(negedge clk);
    e0 = edges;
    repeat (50) @(negedge clk);
    check(edges == e0 && !active, "quiet after the pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
