// trojan_detection_top: a trusted layer that checks a commercial AES chip
// for hardware Trojans, and the Trojans it is meant to catch.
//
// Board 1 (trusted) holds the user module (PS/2 keyboard in, 2x16 LCD out)
// and the trusted module. Board 2 (untrusted) holds one wrapper per AES core,
// encryption and decryption, joined to board 1 only by a few serial wires:
// per core a reset, a frame strobe and the key and text bits going down, a
// frame strobe and the result bits coming back, all on board 1's clock. The
// trusted module runs every job on the untrusted core and on a trusted
// software AES engine and halts the system when the answers differ.
//
// The AES cores and the processor that runs the software engine are not in
// this RTL: their connections are ports of this module (`enc_core_*`,
// `dec_core_*`, the `to_sw_*` and `from_sw_*` FSL links).
//
// Board 2 also carries the four key-leaking Trojans (LED tones, radio
// emission, a heated resistor, a heated die). They read the key as the
// encryption wrapper received it and start on `trojan_trigger`. They leak
// through side channels, not through the text pins, so the consistency
// check does not see them; they are here as the untrusted layer "with
// Trojans".
//
// Parameters: CLK_KHZ is the board clock (50 MHz); BIT_CYCLES is how long
// the Trojans hold each key bit (half a second at 50 MHz);
// TEST_PERIOD is the idle time before the trusted layer tests a core on
// its own (one second at 50 MHz).
module trojan_detection_top
  import tsd_pkg::*;
#(
  parameter int unsigned CLK_KHZ    = 50_000,
  parameter int unsigned BIT_CYCLES = 25_000_000,
  parameter int unsigned N_DUMMY    = 64,
  parameter int unsigned TEST_PERIOD = 50_000_000
) (
  input  logic                  clk,
  input  logic                  rst,
  // user I/O on board 1
  input  logic                  ps2_clk,
  input  logic                  ps2_data,
  input  logic                  mode_sw,
  output logic                  lcd_e,
  output logic                  lcd_rs,
  output logic                  lcd_rw,
  output logic [3:0]            lcd_d,
  // key storage in the trusted layer
  input  logic                  key_wr,
  input  logic [KEY_BITS-1:0]   key_value,
  // FSL links to/from the processor running the software AES engine
  output logic [FSL_WIDTH-1:0]  to_sw_data,
  output logic                  to_sw_control,
  input  logic                  to_sw_read,
  output logic                  to_sw_exists,
  input  logic [FSL_WIDTH-1:0]  from_sw_data,
  input  logic                  from_sw_control,
  input  logic                  from_sw_write,
  output logic                  from_sw_full,
  // status
  output logic                  halted,
  output logic                  busy,
  output logic                  self_test,
  // AES encryption core on board 2
  output logic                  enc_core_rst,
  output logic                  enc_core_load,
  output logic [KEY_BITS-1:0]   enc_core_key,
  output logic [BLOCK_BITS-1:0] enc_core_txtin,
  input  logic                  enc_core_done,
  input  logic [BLOCK_BITS-1:0] enc_core_txtout,
  // AES decryption core on board 2
  output logic                  dec_core_rst,
  output logic                  dec_core_load,
  output logic [KEY_BITS-1:0]   dec_core_key,
  output logic [BLOCK_BITS-1:0] dec_core_txtin,
  input  logic                  dec_core_done,
  input  logic [BLOCK_BITS-1:0] dec_core_txtout,
  // Trojans on board 2
  input  logic                  trojan_trigger,
  output logic                  trojan_led,
  output logic                  trojan_antenna,
  output logic                  trojan_heater,
  output logic [N_DUMMY-1:0]    trojan_dummy_regs,
  output logic [3:0]            trojan_active
);
  // user module <-> trusted module
  logic [BLOCK_BITS-1:0] text_out, text_in;
  logic                  load_out, done_out, encrypt_sw, load_in, done_in;
  logic                  lcd_ready;

  // board 1 <-> board 2
  link_down_t enc_down, dec_down;
  link_up_t   enc_up, dec_up;

  user_module #(.WIDTH(BLOCK_BITS), .CLK_KHZ(CLK_KHZ)) u_user (
    .clk, .rst, .ps2_clk, .ps2_data, .mode_sw,
    .text_out, .load_out, .done_out, .encrypt_sw,
    .text_in, .load_in, .done_in,
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_d, .lcd_ready
  );

  trusted_module #(.WIDTH(BLOCK_BITS), .FSL_W(FSL_WIDTH), .TEST_PERIOD(TEST_PERIOD)) u_trusted (
    .clk, .rst, .key_wr, .key_value,
    .text_out, .load_out, .done_out, .encrypt_sw,
    .text_in, .load_in, .done_in,
    .enc_down, .enc_up, .dec_down, .dec_up,
    .to_sw_data, .to_sw_control, .to_sw_read, .to_sw_exists,
    .from_sw_data, .from_sw_control, .from_sw_write, .from_sw_full,
    .halted, .busy, .self_test
  );

  logic [KEY_BITS-1:0] enc_stored_key, dec_stored_key;

  untrusted_wrapper #(.WIDTH(BLOCK_BITS)) u_enc_wrap (
    .clk, .down(enc_down), .up(enc_up),
    .core_rst(enc_core_rst), .core_load(enc_core_load), .core_key(enc_core_key),
    .core_txtin(enc_core_txtin), .core_done(enc_core_done), .core_txtout(enc_core_txtout),
    .stored_key(enc_stored_key)
  );

  untrusted_wrapper #(.WIDTH(BLOCK_BITS)) u_dec_wrap (
    .clk, .down(dec_down), .up(dec_up),
    .core_rst(dec_core_rst), .core_load(dec_core_load), .core_key(dec_core_key),
    .core_txtin(dec_core_txtin), .core_done(dec_core_done), .core_txtout(dec_core_txtout),
    .stored_key(dec_stored_key)
  );

  // ---------------- Trojans on the untrusted board ------------------------
  // Board 2 has no reset of its own other than the link reset; the Trojans
  // run from board 2's power-on state, modelled here by the system reset.
  optical_trojan #(.WIDTH(KEY_BITS), .CLK_HZ(CLK_KHZ * 1000), .BIT_CYCLES(BIT_CYCLES)) u_optical (
    .clk, .rst, .trigger(trojan_trigger), .key(enc_stored_key),
    .led(trojan_led), .active(trojan_active[0])
  );
  em_trojan #(.WIDTH(KEY_BITS), .BIT_CYCLES(BIT_CYCLES)) u_em (
    .clk, .rst, .trigger(trojan_trigger), .key(enc_stored_key),
    .antenna(trojan_antenna), .active(trojan_active[1])
  );
  thermal_resistor_trojan #(.WIDTH(KEY_BITS), .BIT_CYCLES(BIT_CYCLES)) u_resistor (
    .clk, .rst, .trigger(trojan_trigger), .key(enc_stored_key),
    .heater(trojan_heater), .active(trojan_active[2])
  );
  thermal_fpga_trojan #(.WIDTH(KEY_BITS), .N_DUMMY(N_DUMMY), .BIT_CYCLES(BIT_CYCLES)) u_fpga_heat (
    .clk, .rst, .trigger(trojan_trigger), .key(enc_stored_key),
    .dummy_regs(trojan_dummy_regs), .active(trojan_active[3])
  );

endmodule
