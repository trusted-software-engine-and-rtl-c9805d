// aes_core_model: behavioural model of the commercial AES-128 core on the
// untrusted board (not synthesizable; for simulation only).
//
// A `load` pulse takes `key` and `txtin`; LATENCY cycles later `done` pulses
// with the result on `txtout` (encryption, or decryption when DECRYPT=1).
// With `trojan_leak` high the core behaves like a compromised part that
// leaks the key through its text pins: the result is XORed with the key.
module aes_core_model #(
  parameter bit          DECRYPT = 1'b0,
  parameter int unsigned LATENCY = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [127:0] key,
  input  logic [127:0] txtin,
  input  logic         trojan_leak,
  output logic         done,
  output logic [127:0] txtout
);
  import aes_model_pkg::*;

  int unsigned  wait_cnt;
  bit           running;
  logic [127:0] res;
  int unsigned  jobs;

  initial begin
    done = 1'b0; txtout = '0; running = 1'b0; wait_cnt = 0; jobs = 0;
  end

  always @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      running <= 1'b0;
    end else if (load) begin
      res      = DECRYPT ? aes128_decrypt(key, txtin) : aes128_encrypt(key, txtin);
      if (trojan_leak) res ^= key;
      running  <= 1'b1;
      wait_cnt <= LATENCY;
      jobs     <= jobs + 1;
    end else if (running) begin
      if (wait_cnt <= 1) begin
        running <= 1'b0;
        done    <= 1'b1;
        txtout  <= res;
      end else begin
        wait_cnt <= wait_cnt - 1;
      end
    end
  end
endmodule
