// Testbench for p2s_serializer: random two-lane words are shifted out and
// compared bit by bit (MSB first) with the words given; the frame must start
// one cycle after `start`, last exactly WIDTH cycles and be followed by a
// one-cycle `done`. A start during a frame must be ignored.
module tb_p2s_serializer;
  localparam int W = 128;
  logic clk = 0, rst = 1, start = 0;
  logic [1:0][W-1:0] data;
  logic frame, busy, done;
  logic [1:0] sdata;
  int checks = 0, failures = 0;

  p2s_serializer #(.WIDTH(W), .LANES(2)) dut (.*);

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

  initial begin
    logic [1:0][W-1:0] sent, other;
    int frame_len;
    data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!frame && !busy, "idle after reset");
    for (int job = 0; job < 6; job++) begin
      for (int l = 0; l < 2; l++)
        for (int k = 0; k < W / 32; k++) sent[l][32*k +: 32] = $urandom;
      data = sent; start = 1;
      @(negedge clk); start = 0;
      // data changes after start must not matter
      data = ~sent;
      frame_len = 0;
      check(frame == 1, "frame one cycle after start");
      while (frame) begin
        check(sdata[1] == sent[1][W-1-frame_len] && sdata[0] == sent[0][W-1-frame_len],
              $sformatf("bit %0d of job %0d", frame_len, job));
        if (frame_len == 10) begin
          // a second start mid-frame is ignored
          other = ~sent; data = other; start = 1;
        end else start = 0;
        frame_len++;
        @(negedge clk);
        check(frame_len != W || done, "done right after last bit");
      end
      start = 0;
      check(frame_len == W, $sformatf("frame length %0d", frame_len));
      @(negedge clk);
      check(!done && !frame, "single done, no restarted frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
