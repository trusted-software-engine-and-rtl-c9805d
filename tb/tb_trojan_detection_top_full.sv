// Full-size testbench: trojan_detection_top with every parameter at its
// default (50 MHz clock, real PS/2 and LCD timing, half-second Trojan bits).
// One complete operation: store a key, wait for the LCD to initialise, type
// "HI" and press Enter; the checked ciphertext must appear on the LCD. Then
// the Trojans are triggered and the first two key bits (one second) are
// read back from the LED tone, the antenna, the resistor and the die bank.
module tb_trojan_detection_top_full;
  import aes_model_pkg::*;

  logic clk = 0, rst = 1;
  logic ps2_clk = 1, ps2_data = 1, mode_sw = 1;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_d;
  logic key_wr = 0;
  logic [127:0] key_value = '0;
  logic [31:0] to_sw_data, from_sw_data;
  logic to_sw_control, to_sw_read, to_sw_exists, from_sw_control, from_sw_write, from_sw_full;
  logic halted, busy, self_test;
  logic enc_core_rst, enc_core_load, enc_core_done, dec_core_rst, dec_core_load, dec_core_done;
  logic [127:0] enc_core_key, enc_core_txtin, enc_core_txtout, dec_core_key, dec_core_txtin, dec_core_txtout;
  logic trojan_trigger = 0, trojan_led, trojan_antenna, trojan_heater;
  logic [63:0] trojan_dummy_regs;
  logic [3:0] trojan_active;

  int checks = 0, failures = 0;

  trojan_detection_top dut (.*);

  aes_core_model #(.DECRYPT(1'b0)) enc_core (
    .clk, .rst(enc_core_rst), .load(enc_core_load), .key(enc_core_key), .txtin(enc_core_txtin),
    .trojan_leak(1'b0), .done(enc_core_done), .txtout(enc_core_txtout));
  aes_core_model #(.DECRYPT(1'b1)) dec_core (
    .clk, .rst(dec_core_rst), .load(dec_core_load), .key(dec_core_key), .txtin(dec_core_txtin),
    .trojan_leak(1'b0), .done(dec_core_done), .txtout(dec_core_txtout));
  sw_engine_model sw (
    .clk, .rst, .to_sw_data, .to_sw_control, .to_sw_read, .to_sw_exists,
    .from_sw_data, .from_sw_control, .from_sw_write, .from_sw_full);
  lcd_monitor mon (.lcd_e, .lcd_rs, .lcd_rw, .lcd_d);

  // 50 MHz, edges offset from the whole microseconds of the keyboard model
  initial begin #5ns; forever #10ns clk = ~clk; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1500ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ps2_byte(logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      #20us; ps2_clk = 0;
      #40us; ps2_clk = 1;
      #20us;
    end
    ps2_data = 1;
    #200us;
  endtask

  task automatic press(logic [7:0] sc);
    ps2_byte(sc); ps2_byte(8'hF0); ps2_byte(sc);
  endtask

  function automatic byte hexc(logic [3:0] v);
    return (v < 10) ? byte'("0") + byte'(v) : byte'("A") + byte'(v) - 10;
  endfunction

  function automatic bit lcd_shows_hex(logic [127:0] v);
    for (int i = 0; i < 32; i++)
      if (mon.at(i / 16, i % 16) != hexc(v[124 - 4*i +: 4])) return 0;
    return 1;
  endfunction

  int led_toggles = 0, antenna_edges = 0;
  always @(trojan_led) led_toggles++;
  always @(posedge trojan_antenna) antenna_edges++;

  initial begin
    logic [127:0] key, ct;
    int n, t0, a0, heat, die;
    // the first two key bits sent are 1 then 0, so both tones are seen
    key = 128'h8BEE_F000_0123_4567_89AB_CDEF_0000_0001;
    #1us rst = 0;
    @(negedge clk);
    key_value = key; key_wr = 1;
    @(negedge clk);
    key_wr = 0;
    wait (dut.lcd_rw == 1'b0 && mon.cmds >= 8);
    press(8'h33);   // H
    press(8'h43);   // I
    press(8'h5A);   // Enter
    ct = aes128_encrypt(key, {"HI", {14{8'h20}}});
    wait (dut.u_user.state == 2'd2 || halted);
    n = mon.data_writes;
    wait (mon.data_writes >= n + 64);
    check(!halted, "consistent result accepted");
    check(lcd_shows_hex(ct), "ciphertext on the LCD");
    check(enc_core.jobs == 1 && sw.jobs == 1, "one job on the core and on the engine");

    // Trojans: first two half-second bits (1 then 0)
    @(negedge clk); trojan_trigger = 1; @(negedge clk); trojan_trigger = 0;
    for (int b = 0; b < 2; b++) begin
      t0 = led_toggles; a0 = antenna_edges; heat = 0; die = 0;
      for (int s = 0; s < 500; s++) begin
        #1ms;
        if (trojan_heater) heat++;
        if (trojan_dummy_regs != '0) die++;
      end
      // one bit: 0.5 s; 4 kHz -> 4000 toggles, 2 kHz -> 2000 toggles
      if (key[127 - b]) begin
        check(led_toggles - t0 >= 3990 && led_toggles - t0 <= 4010, $sformatf("4 kHz tone: %0d toggles", led_toggles - t0));
        check(antenna_edges - a0 >= 24_999_000, $sformatf("50 MHz on the antenna: %0d edges", antenna_edges - a0));
        check(heat >= 499 && die >= 499, "heat sources on");
      end else begin
        check(led_toggles - t0 >= 1990 && led_toggles - t0 <= 2010, $sformatf("2 kHz tone: %0d toggles", led_toggles - t0));
        check(antenna_edges - a0 <= 2, $sformatf("antenna quiet: %0d edges", antenna_edges - a0));
        check(heat <= 1 && die <= 1, "heat sources off");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
