// Testbench for untrusted_wrapper with a behavioural AES encryption core.
// The testbench shifts random keys and texts down the link and collects the
// returned frame; the result must equal the reference AES-128 encryption.
// Checked as well: `core_load` 3 cycles after the last bit, the answer frame
// 2 cycles after `core_done` and exactly 128 bits long, `stored_key`, a
// short frame starting nothing, and the link reset reaching the core.
module tb_untrusted_wrapper;
  import tsd_pkg::*;
  import aes_model_pkg::*;
  logic clk = 0;
  link_down_t down;
  link_up_t   up;
  logic core_rst, core_load, core_done;
  logic [127:0] core_key, core_txtin, core_txtout, stored_key;
  int checks = 0, failures = 0;
  longint cyc = 0, t_last_bit, t_load, t_done, t_frame;
  int n_load = 0;

  untrusted_wrapper dut (.*);
  aes_core_model #(.DECRYPT(1'b0), .LATENCY(11)) core (
    .clk, .rst(core_rst), .load(core_load), .key(core_key), .txtin(core_txtin),
    .trojan_leak(1'b0), .done(core_done), .txtout(core_txtout)
  );

  always #5 clk = ~clk;
  // cyc numbers clock cycles; the testbench samples at falling edges
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (core_load && !core_rst) begin n_load++; t_load = cyc; end
    if (core_done) t_done = cyc;
  end

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

  task automatic send(logic [127:0] k, logic [127:0] t, int nbits);
    for (int i = 0; i < nbits; i++) begin
      down.load = 1; down.key = k[127 - i]; down.txtin = t[127 - i];
      t_last_bit = cyc;
      @(negedge clk);
    end
    down.load = 0; down.key = 0; down.txtin = 0;
  endtask

  task automatic receive(output logic [127:0] r, output int n);
    n = 0;
    while (!up.done) @(negedge clk);
    t_frame = cyc;
    while (up.done) begin
      r = {r[126:0], up.txtout};
      n++;
      @(negedge clk);
    end
  endtask

  initial begin
    logic [127:0] k, t, r;
    int n;
    down = '0; down.rst = 1;
    repeat (4) @(negedge clk);
    down.rst = 0;
    @(negedge clk);
    for (int job = 0; job < 4; job++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      t = {$urandom, $urandom, $urandom, $urandom};
      if (job == 0) begin
        k = 128'h000102030405060708090a0b0c0d0e0f;
        t = 128'h00112233445566778899aabbccddeeff;
      end
      send(k, t, 128);
      receive(r, n);
      check(n == 128, $sformatf("answer frame %0d bits", n));
      check(r == aes128_encrypt(k, t), $sformatf("job %0d result %h", job, r));
      if (job == 0) check(r == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 vector");
      check(t_load - t_last_bit == 3, $sformatf("core_load %0d cycles after last bit", t_load - t_last_bit));
      check(t_frame - t_done == 2, $sformatf("answer %0d cycles after core_done", t_frame - t_done));
      check(stored_key == k, "stored key");
    end
    // a short frame starts nothing
    n = n_load;
    send(k, t, 100);
    repeat (300) @(negedge clk);
    check(n_load == n && !up.done, "short frame ignored");
    // link reset reaches the core
    down.rst = 1;
    @(negedge clk);
    check(core_rst, "core reset follows link reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
