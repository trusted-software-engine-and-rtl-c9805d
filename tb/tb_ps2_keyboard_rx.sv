// Testbench for ps2_keyboard_rx: a keyboard model sends 11-bit frames at
// about 12.5 kHz on the default 50 MHz clock. Every well-formed byte must
// appear on `code` with one `code_valid`; a frame with wrong parity or a
// missing stop bit must give `frame_error` only; a frame cut off half way
// must be dropped after the idle timeout so the next byte decodes cleanly.
module tb_ps2_keyboard_rx;
  logic clk = 0, rst = 1, ps2_clk = 1, ps2_data = 1;
  logic [7:0] code;
  logic code_valid, frame_error;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last_code;

  ps2_keyboard_rx dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  always @(posedge clk) begin
    if (code_valid) begin n_valid++; last_code = code; end
    if (frame_error) n_err++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send `nbits` bits of a frame (start, data LSB first, parity, stop).
  task automatic ps2_frame(logic [7:0] b, bit good_parity, bit good_stop, int nbits);
    logic [10:0] f;
    f = {good_stop, ~^b ^ !good_parity, b, 1'b0};
    for (int i = 0; i < nbits; i++) begin
      ps2_data = f[i];
      #20us; ps2_clk = 0;
      #40us; ps2_clk = 1;
      #20us;
    end
    ps2_data = 1;
    #100us;
  endtask

  initial begin
    logic [7:0] b;
    int v0, e0;
    #1us rst = 0;
    #10us;
    for (int i = 0; i < 12; i++) begin
      b = 8'($urandom);
      v0 = n_valid; e0 = n_err;
      ps2_frame(b, 1, 1, 11);
      check(n_valid == v0 + 1 && n_err == e0, $sformatf("one code for byte %h", b));
      check(last_code == b, $sformatf("code %h want %h", last_code, b));
    end
    v0 = n_valid; e0 = n_err;
    ps2_frame(8'h5A, 0, 1, 11);
    check(n_valid == v0 && n_err == e0 + 1, "bad parity flagged");
    v0 = n_valid; e0 = n_err;
    ps2_frame(8'h1C, 1, 0, 11);
    check(n_valid == v0 && n_err == e0 + 1, "bad stop bit flagged");
    // cut-off frame, then idle longer than the timeout
    ps2_frame(8'hFF, 1, 1, 5);
    #300us;
    v0 = n_valid; e0 = n_err;
    ps2_frame(8'h29, 1, 1, 11);
    check(n_valid == v0 + 1 && last_code == 8'h29 && n_err == e0, "resynchronised after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
