// Testbench for trusted_module. The testbench plays the user module and the
// untrusted board (a behavioural responder on each serial link that decodes
// the frame and answers with the reference AES result, optionally
// corrupted); a behavioural software engine answers on the FSL links.
// Checked: jobs in both modes reach the right core and come back to the
// user with the right text; frame timing (start 2 cycles after load_out,
// 128 bits); `load_in` 5 cycles after the last answer bit; a wrong answer,
// an unasked frame and a short frame each halt the layer, hold the cores in
// reset and block further jobs; the key register. With TEST_PERIOD cut to
// TP cycles: a self-test starts exactly TP cycles into an idle spell, sends
// the fixed test block to the encryption and then the decryption core,
// returns to idle without a `load_in`, and halts the layer when the core
// answers wrongly.
module tb_trusted_module;
  import tsd_pkg::*;
  import aes_model_pkg::*;
  logic clk = 0, rst = 1;
  logic key_wr = 0;
  logic [127:0] key_value = '0, text_out = '0, text_in;
  logic load_out = 0, done_out = 0, encrypt_sw = 1, load_in, done_in;
  link_down_t enc_down, dec_down;
  link_up_t   enc_up, dec_up;
  logic [31:0] to_sw_data, from_sw_data;
  logic to_sw_control, to_sw_read, to_sw_exists, from_sw_control, from_sw_write, from_sw_full;
  logic halted, busy, self_test;
  localparam int unsigned TP = 3000;
  localparam logic [127:0] TT = 128'h00112233_44556677_8899AABB_CCDDEEFF;
  int checks = 0, failures = 0;
  longint cyc = 0;

  trusted_module #(.TEST_PERIOD(TP)) dut (.*);
  sw_engine_model #(.DELAY(30)) sw (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- behavioural untrusted board: one responder per link --------------
  // corrupt: flip a result bit; extra: add one bit to the answer frame
  bit corrupt = 0, extra = 0;
  int enc_frames = 0, dec_frames = 0, frame_len = 0;
  longint t_frame_start = 0, t_last_answer_bit = 0;
  logic [127:0] last_k, last_t;

  task automatic respond(bit dec);
    logic [127:0] k, t, r;
    int n = 0;
    t_frame_start = cyc;
    while (dec ? dec_down.load : enc_down.load) begin
      k = {k[126:0], dec ? dec_down.key : enc_down.key};
      t = {t[126:0], dec ? dec_down.txtin : enc_down.txtin};
      n++;
      @(negedge clk);
    end
    frame_len = n;
    last_k = k; last_t = t;
    r = dec ? aes128_decrypt(k, t) : aes128_encrypt(k, t);
    if (corrupt) r[5] = ~r[5];
    repeat (15) @(negedge clk);
    for (int i = 0; i < 128 + int'(extra); i++) begin
      if (dec) begin dec_up.done = 1; dec_up.txtout = r[127 - (i % 128)]; end
      else     begin enc_up.done = 1; enc_up.txtout = r[127 - (i % 128)]; end
      t_last_answer_bit = cyc;
      @(negedge clk);
    end
    enc_up = '0; dec_up = '0;
  endtask

  initial begin
    enc_up = '0; dec_up = '0;
    forever begin
      @(negedge clk);
      if (enc_down.load && !enc_down.rst) begin enc_frames++; respond(0); end
      else if (dec_down.load && !dec_down.rst) begin dec_frames++; respond(1); end
    end
  end

  // ---- user side ---------------------------------------------------------
  int n_load_in = 0;
  longint t_load_in = 0, t_load_out = 0;
  logic [127:0] got;
  always @(negedge clk) if (load_in && !rst) begin n_load_in++; got = text_in; t_load_in = cyc; end

  longint t_rst_release = 0;
  task automatic do_reset();
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    t_rst_release = cyc;
    @(negedge clk);
  endtask

  // first cycle self_test is seen high, and how many self-tests began
  int n_self = 0;
  longint t_self = 0;
  logic self_q = 0;
  always @(negedge clk) begin
    if (self_test && !self_q && !rst) begin n_self++; t_self = cyc; end
    self_q = self_test;
  end

  task automatic set_key(logic [127:0] k);
    key_value = k; key_wr = 1;
    @(negedge clk);
    key_wr = 0;
  endtask

  task automatic job(logic [127:0] t, bit enc, output bit finished);
    int n0 = n_load_in;
    int w = 0;
    wait (done_in || halted);
    @(negedge clk);
    text_out = t; encrypt_sw = enc; load_out = 1; t_load_out = cyc;
    @(negedge clk);
    load_out = 0;
    while (n_load_in == n0 && !halted && w < 2000) begin @(negedge clk); w++; end
    finished = (n_load_in != n0);
    if (finished) begin
      repeat (2) @(negedge clk);
      done_out = 1;
      @(negedge clk);
      done_out = 0;
    end
  endtask

  initial begin
    logic [127:0] k, t;
    bit fin;
    int e0, d0;
    do_reset();
    check(done_in && !halted && !busy, "idle after reset");
    k = {$urandom, $urandom, $urandom, $urandom};
    set_key(k);
    for (int i = 0; i < 6; i++) begin
      t = {$urandom, $urandom, $urandom, $urandom};
      e0 = enc_frames; d0 = dec_frames;
      job(t, i % 2 == 0, fin);
      check(fin && !halted, $sformatf("job %0d finished", i));
      if (i % 2 == 0) begin
        check(enc_frames == e0 + 1 && dec_frames == d0, "job went to the encryption core");
        check(got == aes128_encrypt(k, t), $sformatf("job %0d ciphertext", i));
      end else begin
        check(dec_frames == d0 + 1 && enc_frames == e0, "job went to the decryption core");
        check(got == aes128_decrypt(k, t), $sformatf("job %0d plaintext", i));
      end
      check(frame_len == 128, $sformatf("down frame %0d bits", frame_len));
      check(t_frame_start - t_load_out == 2, $sformatf("frame start %0d after load_out", t_frame_start - t_load_out));
      check(t_load_in - t_last_answer_bit == 5, $sformatf("load_in %0d after last answer bit", t_load_in - t_last_answer_bit));
    end
    check(sw.jobs == 6 && sw.protocol_errors == 0, "software engine saw six well-formed jobs");
    // a new key is used for the next job
    k = ~k;
    set_key(k);
    t = 128'h0;
    job(t, 1, fin);
    check(fin && got == aes128_encrypt(k, t), "new key in use");

    // ---- wrong answer from the core: halt ----
    corrupt = 1;
    job(t, 1, fin);
    corrupt = 0;
    check(!fin && halted, "mismatch halts");
    check(enc_down.rst && dec_down.rst && !done_in, "cores held in reset, not ready");
    e0 = enc_frames;
    @(negedge clk); load_out = 1; text_out = t; @(negedge clk); load_out = 0;
    repeat (300) @(negedge clk);
    check(enc_frames == e0 && halted && n_load_in == 7, "no job while halted");

    // ---- frame the trusted side did not ask for: halt ----
    do_reset();
    check(!halted, "reset clears halt");
    repeat (5) @(negedge clk);
    for (int i = 0; i < 128; i++) begin dec_up.done = 1; dec_up.txtout = i[0]; @(negedge clk); end
    dec_up = '0;
    repeat (4) @(negedge clk);
    check(halted, "unasked frame halts");

    // ---- over-long answer frame: halt ----
    do_reset();
    set_key(k);
    extra = 1;
    job(t, 0, fin);
    extra = 0;
    check(!fin && halted, "malformed answer halts");

    // ---- periodic self-tests ----
    do_reset();
    k = {$urandom, $urandom, $urandom, $urandom};
    set_key(k);
    e0 = enc_frames; d0 = dec_frames;
    begin
      int s0, l0, j0;
      s0 = n_self; l0 = n_load_in; j0 = sw.jobs;
      while (n_self == s0 && cyc < t_rst_release + TP + 50) @(negedge clk);
      check(n_self == s0 + 1 && t_self - t_rst_release == TP,
            $sformatf("self-test began %0d cycles into the idle spell", t_self - t_rst_release));
      wait (done_in || halted);
      @(negedge clk);
      check(!halted && enc_frames == e0 + 1 && dec_frames == d0 && last_t == TT && last_k == k,
            "first self-test: test block and key to the encryption core");
      check(n_load_in == l0 && sw.jobs == j0 + 1 && !self_test, "self-test passed silently");
      while (n_self == s0 + 1 && !halted) @(negedge clk);
      wait (done_in || halted);
      @(negedge clk);
      check(!halted && dec_frames == d0 + 1 && last_t == TT, "second self-test to the decryption core");
      corrupt = 1;
      while (n_self == s0 + 2 && !halted) @(negedge clk);
      repeat (400) @(negedge clk);
      corrupt = 0;
      check(halted && n_load_in == l0, "failed self-test halts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
