// Testbench for s2p_deserializer: random words are shifted in MSB first
// under a frame strobe and must come out whole with a `valid` pulse two
// cycles after the last bit; frames one bit short or one bit long must
// raise `framing_error` and leave `data` unchanged.
module tb_s2p_deserializer;
  localparam int W = 128;
  logic clk = 0, rst = 1, frame = 0;
  logic [0:0] sdata = '0;
  logic [0:0][W-1:0] data;
  logic valid, framing_error;
  int checks = 0, failures = 0;

  s2p_deserializer #(.WIDTH(W), .LANES(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [W-1:0] w, int nbits, output bit got_valid, output bit got_err);
    for (int i = 0; i < nbits; i++) begin
      frame = 1; sdata[0] = (i < W) ? w[W-1-i] : 1'b1;
      @(negedge clk);
    end
    check(!valid && !framing_error, "nothing right after the last bit");
    frame = 0; sdata = '0;
    @(negedge clk);
    got_valid = valid; got_err = framing_error;
    @(negedge clk);
    check(!valid && !framing_error, "one-cycle pulses");
  endtask

  initial begin
    logic [W-1:0] w, last;
    bit v, e;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int job = 0; job < 5; job++) begin
      for (int k = 0; k < W / 32; k++) w[32*k +: 32] = $urandom;
      send(w, W, v, e);
      check(v && !e, "valid for a full frame");
      check(data[0] == w, $sformatf("word %0d: got %h want %h", job, data[0], w));
      last = w;
    end
    send(~last, W - 1, v, e);
    check(!v && e, "short frame flagged");
    check(data[0] == last, "short frame dropped");
    send(~last, W + 1, v, e);
    check(!v && e, "long frame flagged");
    check(data[0] == last, "long frame dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
