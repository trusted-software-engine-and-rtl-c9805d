// Testbench for user_module at a 1 MHz clock (CLK_KHZ=1000). A PS/2
// keyboard model types keys (make code, then 0xF0 and the code on release);
// an LCD model decodes the display; the testbench plays the trusted module.
// Checked: typed text and the prompt on the LCD, Backspace, the 16-character
// limit, Enter ignored while the trusted side is busy, the 128-bit block and
// mode handed over with one `load_out`, the result shown as 32 hex digits,
// `done_out` acknowledging it, and a new key press starting over.
module tb_user_module;
  localparam int KHZ = 1000;
  logic clk = 0, rst = 1, ps2_clk = 1, ps2_data = 1, mode_sw = 1;
  logic [127:0] text_out, text_in = '0;
  logic load_out, done_out, encrypt_sw, load_in = 0, done_in = 0;
  logic lcd_e, lcd_rs, lcd_rw, lcd_ready;
  logic [3:0] lcd_d;
  int checks = 0, failures = 0, n_load = 0, n_done = 0;
  logic [127:0] last_text;
  logic last_mode;

  user_module #(.CLK_KHZ(KHZ)) dut (.*);
  lcd_monitor mon (.lcd_e, .lcd_rs, .lcd_rw, .lcd_d);

  // 1 MHz; edges offset from the whole microseconds used by the keyboard model
  initial begin #250ns; forever #500ns clk = ~clk; end

  always @(posedge clk) begin
    if (load_out && !rst) begin n_load++; last_text = text_out; last_mode = encrypt_sw; end
    if (done_out && !rst) n_done++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2s;
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

  function automatic logic [7:0] sc_of(byte c);
    case (c)
      "H": return 8'h33; "E": return 8'h24; "L": return 8'h4B; "O": return 8'h44;
      "W": return 8'h1D; "R": return 8'h2D; "D": return 8'h23; " ": return 8'h29;
      "1": return 8'h16; "2": return 8'h1E; "A": return 8'h1C; "Z": return 8'h1A;
      default: return 8'h45;
    endcase
  endfunction

  task automatic type_str(string s);
    for (int i = 0; i < s.len(); i++) press(sc_of(s[i]));
  endtask

  task automatic refresh();
    int n;
    n = mon.data_writes;
    wait (mon.data_writes >= n + 64);
  endtask

  function automatic string line(int l);
    string s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(mon.at(l, i))};
    return s;
  endfunction

  function automatic logic [127:0] pad16(string s);
    logic [127:0] v = {16{8'h20}};
    for (int i = 0; i < s.len() && i < 16; i++) v[127 - 8*i -: 8] = s[i];
    return v;
  endfunction

  function automatic byte hexc(logic [3:0] v);
    return (v < 10) ? byte'("0") + byte'(v) : byte'("A") + byte'(v) - 10;
  endfunction

  initial begin
    logic [127:0] res;
    string want;
    #3us rst = 0;
    wait (lcd_ready);
    type_str("HELLO");
    press(8'h66);                       // Backspace
    type_str(" W");
    refresh();
    check(line(0) == "ENCRYPT:        ", {"prompt: ", line(0)});
    check(line(1) == "HELL W          ", {"typed: ", line(1)});
    // Enter while the trusted module is busy does nothing
    done_in = 0;
    press(8'h5A);
    check(n_load == 0, $sformatf("no load while trusted side busy %0d", n_load));
    done_in = 1;
    press(8'h5A);
    check(n_load == 1, $sformatf("one load_out on Enter %0d", n_load));
    check(last_text == pad16("HELL W"), $sformatf("block %h", last_text));
    check(last_mode == 1'b1, "encrypt mode handed over");
    done_in = 0;
    // result comes back
    res = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk); text_in = res; load_in = 1;
    @(negedge clk); load_in = 0; text_in = '0;
    repeat (3) @(negedge clk);
    check(n_done == 1, "done_out acknowledges the result");
    refresh();
    want = "";
    for (int i = 0; i < 16; i++) want = {want, string'(hexc(res[124 - 4*i +: 4]))};
    check(line(0) == want, {"hex line 1: ", line(0), " want ", want});
    want = "";
    for (int i = 16; i < 32; i++) want = {want, string'(hexc(res[124 - 4*i +: 4]))};
    check(line(1) == want, {"hex line 2: ", line(1), " want ", want});
    // a new key press starts over; decrypt mode; 16-character limit
    done_in = 1;
    mode_sw = 0;
    type_str("A1Z2A1Z2A1Z2A1Z2A1");     // 18 keys, only 16 kept
    refresh();
    check(line(0) == "DECRYPT:        ", {"decrypt prompt: ", line(0)});
    check(line(1) == "A1Z2A1Z2A1Z2A1Z2", {"16 chars: ", line(1)});
    press(8'h5A);
    check(n_load == 2 && last_text == pad16("A1Z2A1Z2A1Z2A1Z2") && last_mode == 1'b0,
          "second block in decrypt mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
