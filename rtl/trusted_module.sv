// trusted_module: the trust-enabling layer between the user and the
// untrusted AES chip.
//
// It keeps the AES key, so the key never has to pass through the user side.
// For each text block the user module hands over, it
//   1. shifts key and text, MSB first, over the serial link to the AES core
//      chosen by `encrypt_sw` (encryption or decryption core on the
//      untrusted board), and at the same time
//   2. sends the same job to the trusted software AES engine over an FSL
//      link: one header word (control bit set, bit 0 = 1 for encrypt), four
//      key words, four text words, most significant word first;
//   3. collects the core's serial answer and the engine's four result words;
//   4. compares them. Equal: the result goes to the user module (`load_in`
//      pulse with `text_in`). Different: the layer halts for good, holds both
//      untrusted cores in reset and raises `halted`; only `rst` clears it.
// A frame from an untrusted core that was not asked for, or one with the
// wrong number of bits, is treated as a mismatch as well.
//
// Self-test: after TEST_PERIOD idle cycles (one second at 50 MHz) the layer
// runs a job of its own, the fixed block TEST_TEXT with the stored key,
// alternately on the encryption and the decryption core, through the same
// compare. `self_test` is high while it runs and `done_in` is low; a match
// returns to idle without telling the user, a mismatch halts as above. A
// user `load_out` in the cycle a self-test falls due takes precedence.
//
// User-side handshake: `done_in` is high while the layer is idle and ready;
// `load_out` (one cycle, with `text_out` and `encrypt_sw`) starts a job;
// after `load_in` the layer waits for `done_out` from the user module
// before it is ready again.
//
// Timing: the down-link frame starts 2 cycles after `load_out` and lasts
// WIDTH cycles; `load_in` comes 5 cycles after the cycle that carried the
// last bit of the core's answer, provided the software result is in by then.
//
// From the document: key storage in this layer, hardware serialisation to
// the untrusted board, a software AES engine on the trusted side, comparing
// the two results and stopping on a mismatch. In the document the compare is
// done by the processor's software; here it is done in hardware, and the
// processor only supplies the reference result. Periodic self-tests follow
// the document's description of the trusted layer; their period and test
// block are this design's own, as are the link framing, FSL word order and
// the user handshake.
module trusted_module
  import tsd_pkg::*;
#(
  parameter int unsigned WIDTH     = 128,
  parameter int unsigned FSL_W     = 32,
  parameter int unsigned FSL_DEPTH = 16,
  parameter int unsigned TEST_PERIOD = 50_000_000,
  parameter logic [WIDTH-1:0] TEST_TEXT = WIDTH'(128'h00112233_44556677_8899AABB_CCDDEEFF)
) (
  input  logic             clk,
  input  logic             rst,
  // key storage
  input  logic             key_wr,
  input  logic [WIDTH-1:0] key_value,
  // user module side (names as seen from the user module)
  input  logic [WIDTH-1:0] text_out,
  input  logic             load_out,
  input  logic             done_out,
  input  logic             encrypt_sw,
  output logic [WIDTH-1:0] text_in,
  output logic             load_in,
  output logic             done_in,
  // serial links to the untrusted encryption and decryption cores
  output link_down_t       enc_down,
  input  link_up_t         enc_up,
  output link_down_t       dec_down,
  input  link_up_t         dec_up,
  // FSL link to the software engine (processor reads)
  output logic [FSL_W-1:0] to_sw_data,
  output logic             to_sw_control,
  input  logic             to_sw_read,
  output logic             to_sw_exists,
  // FSL link from the software engine (processor writes)
  input  logic [FSL_W-1:0] from_sw_data,
  input  logic             from_sw_control,
  input  logic             from_sw_write,
  output logic             from_sw_full,
  // status
  output logic             halted,
  output logic             busy,
  output logic             self_test        // the running job is a self-test
);
  localparam int unsigned NW    = WIDTH / FSL_W;   // words per block
  localparam int unsigned NJOB  = 1 + 2 * NW;      // header + key + text
  localparam int unsigned IW    = $clog2(NJOB + 1);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_CHECK, S_ACK, S_HALT} state_e;
  state_e state;

  logic [WIDTH-1:0] key_q, text_q, hw_q, sw_q;
  logic             op_enc;          // 1: job is for the encryption core
  logic             hw_got, sw_got;
  logic [IW-1:0]    wr_idx;          // next word to send to the engine
  logic [IW-1:0]    rd_cnt;          // result words received
  localparam int unsigned TW = $clog2(TEST_PERIOD + 1);
  logic [TW-1:0]    idle_cnt;        // idle cycles since the last job
  logic             test_op;         // core the next self-test goes to
  logic             test_due;
  assign test_due = (idle_cnt == TW'(TEST_PERIOD - 1));

  // ---------------- serial down-link (one serializer, routed) -------------
  logic             ser_start, ser_frame;  // ser_start: one cycle after load_out
  logic [1:0]       ser_bits;
  logic             ser_busy, ser_done;

  p2s_serializer #(.WIDTH(WIDTH), .LANES(2)) u_ser (
    .clk, .rst, .start(ser_start), .data({key_q, text_q}),
    .frame(ser_frame), .sdata(ser_bits), .busy(ser_busy), .done(ser_done)
  );

  always_comb begin
    enc_down = '0;
    dec_down = '0;
    enc_down.rst = rst || (state == S_HALT);
    dec_down.rst = rst || (state == S_HALT);
    if (op_enc) begin
      enc_down.load  = ser_frame;
      enc_down.key   = ser_bits[1];
      enc_down.txtin = ser_bits[0];
    end else begin
      dec_down.load  = ser_frame;
      dec_down.key   = ser_bits[1];
      dec_down.txtin = ser_bits[0];
    end
  end

  // ---------------- serial up-links ---------------------------------------
  logic [0:0][WIDTH-1:0] enc_res, dec_res;
  logic                  enc_valid, enc_ferr, dec_valid, dec_ferr;

  s2p_deserializer #(.WIDTH(WIDTH), .LANES(1)) u_des_enc (
    .clk, .rst(enc_down.rst), .frame(enc_up.done), .sdata(enc_up.txtout),
    .data(enc_res), .valid(enc_valid), .framing_error(enc_ferr)
  );
  s2p_deserializer #(.WIDTH(WIDTH), .LANES(1)) u_des_dec (
    .clk, .rst(dec_down.rst), .frame(dec_up.done), .sdata(dec_up.txtout),
    .data(dec_res), .valid(dec_valid), .framing_error(dec_ferr)
  );

  // ---------------- FSL links to the software engine ----------------------
  logic [FSL_W-1:0] job_word;
  logic             job_ctrl, job_write, job_full;
  logic [FSL_W-1:0] res_word;
  logic             res_ctrl, res_read, res_exists;

  fsl_fifo #(.WIDTH(FSL_W), .DEPTH(FSL_DEPTH)) u_fsl_to_sw (
    .clk, .rst,
    .m_data(job_word), .m_control(job_ctrl), .m_write(job_write), .m_full(job_full),
    .s_data(to_sw_data), .s_control(to_sw_control), .s_read(to_sw_read), .s_exists(to_sw_exists)
  );
  fsl_fifo #(.WIDTH(FSL_W), .DEPTH(FSL_DEPTH)) u_fsl_from_sw (
    .clk, .rst,
    .m_data(from_sw_data), .m_control(from_sw_control), .m_write(from_sw_write), .m_full(from_sw_full),
    .s_data(res_word), .s_control(res_ctrl), .s_read(res_read), .s_exists(res_exists)
  );

  // Word wr_idx of the job: 0 header, 1..NW key, NW+1..2NW text.
  always_comb begin
    job_ctrl = (wr_idx == 0);
    job_word = '0;
    if (wr_idx == 0) begin
      job_word[0] = op_enc;
    end else if (wr_idx <= IW'(NW)) begin
      job_word = key_q[WIDTH - FSL_W*int'(wr_idx) +: FSL_W];
    end else begin
      job_word = text_q[WIDTH - FSL_W*(int'(wr_idx) - NW) +: FSL_W];
    end
  end
  assign job_write = (state == S_RUN) && (wr_idx < IW'(NJOB)) && !job_full;
  assign res_read  = (state == S_RUN) && (rd_cnt < IW'(NW)) && res_exists;

  // An answer frame that was not asked for, or a broken one.
  logic hw_bad;
  assign hw_bad = enc_ferr || dec_ferr
               || (enc_valid && !(state == S_RUN && op_enc && !hw_got))
               || (dec_valid && !(state == S_RUN && !op_enc && !hw_got));


  // ---------------- control ------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      key_q   <= '0;
      text_q  <= '0;
      hw_q    <= '0;
      sw_q    <= '0;
      text_in <= '0;
      op_enc  <= 1'b1;
      idle_cnt <= '0;
      test_op <= 1'b1;
      self_test <= 1'b0;
      hw_got  <= 1'b0;
      sw_got  <= 1'b0;
      wr_idx  <= '0;
      rd_cnt  <= '0;
      load_in <= 1'b0;
      ser_start <= 1'b0;
    end else begin
      load_in <= 1'b0;
      ser_start <= 1'b0;
      if (key_wr && state == S_IDLE) key_q <= key_value;
      if (hw_bad && state != S_HALT) begin
        state <= S_HALT;
      end else begin
        unique case (state)
          S_IDLE: begin
            idle_cnt <= idle_cnt + 1'b1;
            if (load_out || test_due) begin
              // A user job wins over a self-test due in the same cycle.
              text_q    <= load_out ? text_out : TEST_TEXT;
              op_enc    <= load_out ? encrypt_sw : test_op;
              self_test <= !load_out;
              if (!load_out) test_op <= !test_op;
              idle_cnt  <= '0;
              hw_got    <= 1'b0;
              sw_got    <= 1'b0;
              wr_idx    <= '0;
              rd_cnt    <= '0;
              ser_start <= 1'b1;
              state     <= S_RUN;
            end
          end
          S_RUN: begin
            if (job_write) wr_idx <= wr_idx + 1'b1;
            if (res_read) begin
              sw_q   <= {sw_q[WIDTH-FSL_W-1:0], res_word};
              rd_cnt <= rd_cnt + 1'b1;
              if (rd_cnt == IW'(NW - 1)) sw_got <= 1'b1;
            end
            if (op_enc && enc_valid) begin
              hw_q   <= enc_res[0];
              hw_got <= 1'b1;
            end
            if (!op_enc && dec_valid) begin
              hw_q   <= dec_res[0];
              hw_got <= 1'b1;
            end
            if (hw_got && sw_got && wr_idx == IW'(NJOB)) state <= S_CHECK;
          end
          S_CHECK: begin
            if (hw_q == sw_q && self_test) begin
              self_test <= 1'b0;
              state     <= S_IDLE;
            end else if (hw_q == sw_q) begin
              text_in <= hw_q;
              load_in <= 1'b1;
              state   <= S_ACK;
            end else begin
              state   <= S_HALT;
            end
          end
          S_ACK:  if (done_out) state <= S_IDLE;
          S_HALT: state <= S_HALT;
          default: state <= S_HALT;
        endcase
      end
    end
  end

  assign done_in = (state == S_IDLE);
  assign halted  = (state == S_HALT);
  assign busy    = (state == S_RUN) || (state == S_CHECK) || ser_busy;

  // A job is only accepted while idle; the processor must not overfill the
  // result link.
  a_load_when_ready: assert property (@(posedge clk) disable iff (rst)
    load_out |-> (done_in || halted))
    else $error("trusted_module: load_out while a job is running");

endmodule
