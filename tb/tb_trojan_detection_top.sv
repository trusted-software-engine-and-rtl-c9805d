// End-to-end testbench for trojan_detection_top at a 1 MHz clock
// (CLK_KHZ=1000) with each leaked key bit held 1,000 cycles (BIT_CYCLES).
// Around the design: a PS/2 keyboard model, an LCD model, behavioural AES
// encryption and decryption cores on the untrusted board (the encryption
// core can be switched to leak the key through its text pins), and a
// behavioural software AES engine on the FSL links.
//
// The run: store a key; type a string in encrypt mode and press Enter; the
// ciphertext must appear on the LCD as hex; switch to decrypt mode and send
// the ciphertext's first 16 characters' worth of block back (checking the
// decryption path); trigger the side-channel Trojans and read the key back
// from each of their outputs; then switch the encryption core to leak the
// key in its results and check that the trusted layer halts. Each mechanism
// is counted, and one that never happened counts as a failure. The trusted
// layer's periodic self-test is cut to TP cycles, so it runs on both cores
// during the long idle spell while the Trojans leak; job counts allow for it.
module tb_trojan_detection_top;
  import aes_model_pkg::*;
  localparam int KHZ = 1000, BC = 1000, ND = 64, TP = 30_000;

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
  logic [ND-1:0] trojan_dummy_regs;
  logic [3:0] trojan_active;
  logic core_leak = 0;

  int checks = 0, failures = 0;

  trojan_detection_top #(.CLK_KHZ(KHZ), .BIT_CYCLES(BC), .N_DUMMY(ND), .TEST_PERIOD(TP)) dut (.*);

  aes_core_model #(.DECRYPT(1'b0), .LATENCY(11)) enc_core (
    .clk, .rst(enc_core_rst), .load(enc_core_load), .key(enc_core_key), .txtin(enc_core_txtin),
    .trojan_leak(core_leak), .done(enc_core_done), .txtout(enc_core_txtout));
  aes_core_model #(.DECRYPT(1'b1), .LATENCY(11)) dec_core (
    .clk, .rst(dec_core_rst), .load(dec_core_load), .key(dec_core_key), .txtin(dec_core_txtin),
    .trojan_leak(1'b0), .done(dec_core_done), .txtout(dec_core_txtout));
  sw_engine_model #(.DELAY(40)) sw (
    .clk, .rst, .to_sw_data, .to_sw_control, .to_sw_read, .to_sw_exists,
    .from_sw_data, .from_sw_control, .from_sw_write, .from_sw_full);
  lcd_monitor mon (.lcd_e, .lcd_rs, .lcd_rw, .lcd_d);

  // 1 MHz; edges offset from the whole microseconds used by the keyboard model
  initial begin #250ns; forever #500ns clk = ~clk; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- keyboard ----------------------------------------------------------
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

  function automatic logic [7:0] sc_of(byte c);
    case (c)
      "A": return 8'h1C; "B": return 8'h32; "C": return 8'h21; "D": return 8'h23;
      "E": return 8'h24; "H": return 8'h33; "L": return 8'h4B; "O": return 8'h44;
      "R": return 8'h2D; "S": return 8'h1B; "T": return 8'h2C; "W": return 8'h1D;
      "K": return 8'h42; "X": return 8'h22;
      "1": return 8'h16; "2": return 8'h1E; " ": return 8'h29;
      default: return 8'h45;
    endcase
  endfunction

  task automatic type_str(string s);
    for (int i = 0; i < s.len(); i++) press(sc_of(s[i]));
  endtask

  function automatic logic [127:0] pad16(string s);
    logic [127:0] v = {16{8'h20}};
    for (int i = 0; i < s.len() && i < 16; i++) v[127 - 8*i -: 8] = s[i];
    return v;
  endfunction

  function automatic byte hexc(logic [3:0] v);
    return (v < 10) ? byte'("0") + byte'(v) : byte'("A") + byte'(v) - 10;
  endfunction

  task automatic refresh();
    int n;
    n = mon.data_writes;
    wait (mon.data_writes >= n + 64);
  endtask

  function automatic bit lcd_shows_hex(logic [127:0] v);
    for (int i = 0; i < 32; i++)
      if (mon.at(i / 16, i % 16) != hexc(v[124 - 4*i +: 4])) return 0;
    return 1;
  endfunction

  // ---- mechanism counters -------------------------------------------------
  int n_enc_ok = 0, n_dec_ok = 0, n_halt = 0, n_mode_switch = 0, n_backspace = 0;
  int n_led_leak = 0, n_em_leak = 0, n_heat_leak = 0, n_die_leak = 0, n_key_store = 0;
  int n_self_enc = 0, n_self_dec = 0, n_self_ok = 0;

  // self-tests: which core each went to, and how many ended back in idle
  logic self_q = 0;
  always @(negedge clk) begin
    if (!rst && self_test && !self_q) begin
      if (dut.u_trusted.op_enc) n_self_enc++; else n_self_dec++;
    end
    if (!rst && !self_test && self_q && !halted) n_self_ok++;
    self_q = self_test;
  end

  // ---- Trojan observers: read the key back from each side channel ---------
  task automatic observe_trojans(logic [127:0] k);
    logic [127:0] from_led, from_em, from_heat, from_die;
    int led_t, em_e, heat_c, die_c;
    logic led_p;
    wait (trojan_active == 4'hF);
    @(negedge clk);
    for (int b = 0; b < 128; b++) begin
      led_t = 0; em_e = 0; heat_c = 0; die_c = 0; led_p = trojan_led;
      for (int c = 0; c < BC; c++) begin
        @(posedge clk); #250ns;
        if (trojan_antenna) em_e++;
        @(negedge clk);
        if (trojan_led != led_p) led_t++;
        led_p = trojan_led;
        if (trojan_heater) heat_c++;
        if (trojan_dummy_regs != '0) die_c++;
      end
      // 1 MHz clock: 2 kHz -> 250-cycle half periods (4 toggles per 1000
      // cycles), 4 kHz -> 125 (8 toggles)
      from_led[127 - b]  = (led_t > 6);
      from_em[127 - b]   = (em_e > BC / 2);
      from_heat[127 - b] = (heat_c > BC / 2);
      from_die[127 - b]  = (die_c > BC / 2);
    end
    check(from_led == k,  $sformatf("key from LED tones %h", from_led));
    check(from_em == k,   $sformatf("key from antenna %h", from_em));
    check(from_heat == k, $sformatf("key from resistor %h", from_heat));
    check(from_die == k,  $sformatf("key from die heating %h", from_die));
    if (from_led == k) n_led_leak++;
    if (from_em == k) n_em_leak++;
    if (from_heat == k) n_heat_leak++;
    if (from_die == k) n_die_leak++;
  endtask

  initial begin
    logic [127:0] key, pt, ct;
    int jobs0;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #3us rst = 0;
    #2us;
    @(negedge clk);
    key_value = key; key_wr = 1;
    @(negedge clk); key_wr = 0; key_value = '0;
    n_key_store++;
    wait (mon.four_bit && mon.cmds >= 8);

    // ---- encryption through the whole system ----
    type_str("HELLO WORLDX");
    press(8'h66);                            // Backspace removes the X
    n_backspace++;
    press(8'h5A);                            // Enter
    pt = pad16("HELLO WORLD");
    ct = aes128_encrypt(key, pt);
    wait (dut.u_user.state == 2'd2 || halted);
    refresh();
    check(!halted, "no halt on a consistent encryption");
    check(lcd_shows_hex(ct), "ciphertext shown on the LCD");
    check(sw.jobs == 1 + n_self_enc + n_self_dec && enc_core.jobs == 1 + n_self_enc
          && dec_core.jobs == n_self_dec, "one job on each side");
    check(enc_core.key == key, "the core got the stored key");
    if (!halted && lcd_shows_hex(ct)) n_enc_ok++;

    // ---- decryption mode ----
    mode_sw = 0;
    n_mode_switch++;
    type_str("SECRET TEXT 12");
    press(8'h5A);
    pt = pad16("SECRET TEXT 12");
    wait (dut.u_user.state == 2'd2 || halted);
    refresh();
    check(!halted, "no halt on a consistent decryption");
    check(lcd_shows_hex(aes128_decrypt(key, pt)), "decrypted block shown on the LCD");
    check(dec_core.jobs == 1 + n_self_dec && sw.jobs == 2 + n_self_enc + n_self_dec, "decryption core used");
    if (!halted && lcd_shows_hex(aes128_decrypt(key, pt))) n_dec_ok++;

    // ---- side-channel Trojans on the untrusted board ----
    @(negedge clk); trojan_trigger = 1; @(negedge clk); trojan_trigger = 0;
    observe_trojans(key);
    check(!halted, "side channels are not seen by the consistency check");
    check(n_self_enc > 0 && n_self_dec > 0 && n_self_ok == n_self_enc + n_self_dec,
          $sformatf("self-tests passed: %0d on encryption, %0d on decryption", n_self_enc, n_self_dec));

    // ---- Trojan leaking through the text pins: the trusted layer halts ----
    mode_sw = 1;
    n_mode_switch++;
    core_leak = 1;
    type_str("ATTACK");
    press(8'h5A);
    wait (halted || dut.u_user.state == 2'd2);
    repeat (10) @(negedge clk);
    check(halted, "leaking core halts the system");
    check(enc_core_rst && dec_core_rst, "untrusted cores held in reset");
    check(dut.u_user.state == 2'd1, "the leaked result never reached the user");
    if (halted) n_halt++;
    jobs0 = sw.jobs;
    // nothing more goes through
    type_str("B");
    press(8'h5A);
    repeat (2 * TP) @(negedge clk);
    check(sw.jobs == jobs0 && enc_core.jobs + dec_core.jobs == sw.jobs, "no further jobs or self-tests after the halt");

    check(n_key_store > 0, "mechanism: key stored in trusted layer");
    check(n_enc_ok > 0, "mechanism: checked encryption");
    check(n_dec_ok > 0, "mechanism: checked decryption");
    check(n_mode_switch > 0, "mechanism: encrypt/decrypt switch");
    check(n_backspace > 0, "mechanism: keyboard editing");
    check(n_halt > 0, "mechanism: halt on inconsistency");
    check(n_led_leak > 0, "mechanism: optical Trojan");
    check(n_em_leak > 0, "mechanism: EM Trojan");
    check(n_heat_leak > 0, "mechanism: resistor thermal Trojan");
    check(n_die_leak > 0, "mechanism: FPGA thermal Trojan");
    check(n_self_ok > 0, "mechanism: periodic self-test");
    $display("mechanisms: key_store=%0d enc_ok=%0d dec_ok=%0d mode_switch=%0d backspace=%0d halt=%0d led=%0d em=%0d resistor=%0d die=%0d self_test=%0d",
             n_key_store, n_enc_ok, n_dec_ok, n_mode_switch, n_backspace, n_halt,
             n_led_leak, n_em_leak, n_heat_leak, n_die_leak, n_self_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
