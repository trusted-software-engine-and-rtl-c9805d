// sw_engine_model: behavioural model of the processor running the trusted
// software AES engine, seen through its two FSL links (simulation only).
//
// It pops words from the job link: a header word with the control bit set
// (bit 0: 1 = encrypt, 0 = decrypt), four key words and four text words,
// most significant first. After DELAY cycles it pushes the four result
// words, most significant first, onto the result link. A job word arriving
// out of place counts in `protocol_errors`.
module sw_engine_model #(
  parameter int unsigned DELAY = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] to_sw_data,
  input  logic        to_sw_control,
  output logic        to_sw_read,
  input  logic        to_sw_exists,
  output logic [31:0] from_sw_data,
  output logic        from_sw_control,
  output logic        from_sw_write,
  input  logic        from_sw_full
);
  import aes_model_pkg::*;

  int unsigned  n_words, jobs, protocol_errors, delay_cnt, out_idx;
  bit           op_enc, computing, sending;
  logic [127:0] key, text, res;

  initial begin
    n_words = 0; jobs = 0; protocol_errors = 0; delay_cnt = 0; out_idx = 0;
    computing = 0; sending = 0; op_enc = 1; key = '0; text = '0; res = '0;
  end

  assign to_sw_read      = to_sw_exists && !computing && !sending && !rst;
  assign from_sw_control = 1'b0;
  assign from_sw_data    = res[127 - 32*out_idx -: 32];
  assign from_sw_write   = sending && !from_sw_full && !rst;

  always @(posedge clk) begin
    if (rst) begin
      n_words <= 0; computing <= 0; sending <= 0; out_idx <= 0;
    end else begin
      if (to_sw_read) begin
        if (n_words == 0) begin
          if (!to_sw_control) protocol_errors <= protocol_errors + 1;
          op_enc  <= to_sw_data[0];
          n_words <= 1;
        end else begin
          if (to_sw_control) protocol_errors <= protocol_errors + 1;
          if (n_words <= 4) key  <= {key[95:0], to_sw_data};
          else              text <= {text[95:0], to_sw_data};
          if (n_words == 8) begin
            n_words   <= 0;
            computing <= 1;
            delay_cnt <= DELAY;
          end else n_words <= n_words + 1;
        end
      end
      if (computing) begin
        if (delay_cnt <= 1) begin
          res       <= op_enc ? aes128_encrypt(key, text) : aes128_decrypt(key, text);
          computing <= 0;
          sending   <= 1;
          out_idx   <= 0;
          jobs      <= jobs + 1;
        end else delay_cnt <= delay_cnt - 1;
      end
      if (from_sw_write) begin
        if (out_idx == 3) sending <= 0;
        out_idx <= out_idx + 1;
        if (out_idx == 3) out_idx <= 0;
      end
    end
  end
endmodule
