// Testbench for lcd_controller, with the clock set to 1 MHz (CLK_KHZ=1000)
// so that the 15 ms power-on wait takes 15,000 cycles. An LCD model decodes
// the 4-bit bus. Checked: nothing is written before 15 ms, the first four
// pulses are the wake-up nibbles 3,3,3,2 with the specified waits between
// them, the setup commands follow, `ready` rises, E pulses last E_CYCLES,
// RW stays low, and after a refresh pass both screen lines equal `frame`,
// also after `frame` changes.
module tb_lcd_controller;
  localparam int KHZ = 1000;
  logic clk = 0, rst = 1;
  logic [31:0][7:0] frame;
  logic lcd_e, lcd_rs, lcd_rw, ready;
  logic [3:0] lcd_d;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint e_rise, e_fall[$];
  logic [3:0] first_nibbles[$];
  logic [7:0] cmd_log[$];

  lcd_controller #(.CLK_KHZ(KHZ)) dut (.*);
  lcd_monitor mon (.lcd_e, .lcd_rs, .lcd_rw, .lcd_d);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(posedge lcd_e) e_rise = cyc;
  always @(negedge lcd_e) begin
    e_fall.push_back(cyc);
    if (first_nibbles.size() < 4) first_nibbles.push_back(lcd_d);
    checks++;
    if (cyc - e_rise != 12) begin failures++; $display("FAIL: E high for %0d cycles", cyc - e_rise); end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_screen(string tag);
    for (int i = 0; i < 16; i++) begin
      check(mon.at(0, i) == frame[i], $sformatf("%s line 1 col %0d", tag, i));
      check(mon.at(1, i) == frame[16 + i], $sformatf("%s line 2 col %0d", tag, i));
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) frame[i] = 8'h41 + 8'($urandom_range(0, 25));
    repeat (3) @(negedge clk);
    rst = 0;
    wait (ready);
    check(e_fall.size() == 12, $sformatf("init pulses %0d", e_fall.size()));
    check(e_fall[0] >= 15000, "15 ms power-on wait");
    check(first_nibbles.size() == 4 && first_nibbles[0] == 3 && first_nibbles[1] == 3
          && first_nibbles[2] == 3 && first_nibbles[3] == 2, "wake-up nibbles 3,3,3,2");
    check(e_fall[1] - e_fall[0] >= 4100, "4.1 ms after first wake-up nibble");
    check(e_fall[2] - e_fall[1] >= 100, "100 us after second wake-up nibble");
    check(mon.four_bit && mon.cmds == 8, "4-bit mode and 8 init commands");
    check(mon.data_writes == 0, "no characters before init ends");
    // two refresh passes: 2 * 32 characters
    wait (mon.data_writes >= 64);
    check_screen("first frame");
    check(mon.rw_writes_high == 0 && mon.rs_mismatch == 0, "RW low, RS steady within a byte");
    for (int i = 0; i < 32; i++) frame[i] = 8'h30 + 8'($urandom_range(0, 9));
    wait (mon.data_writes >= 128);
    check_screen("second frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
