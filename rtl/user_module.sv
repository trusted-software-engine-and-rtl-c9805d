// user_module: the user's side of the system, a keyboard in and an LCD out.
//
// The user types up to 16 characters on a PS/2 keyboard; they collect in a
// 16-byte buffer and appear on line 2 of the 2x16 LCD, under a prompt
// ("ENCRYPT:" or "DECRYPT:", following the encrypt/decrypt switch). Enter
// hands the buffer, as one 128-bit block (first character in the top byte,
// unused places filled with spaces), to the trusted module with a one-cycle
// `load_out`, provided the trusted module shows it is ready (`done_in`).
// The module then waits for `load_in`; the returned block is shown as 32
// hexadecimal digits over both LCD lines, and `done_out` acknowledges it.
// The next key press clears the screen and starts a new string.
//
// Keys: scan code set 2 make codes for A-Z, 0-9 and space are typed
// (letters in upper case); Backspace deletes; Enter sends. Break codes
// (0xF0 prefix) and the 0xE0 extended prefix are skipped.
//
// From the document: a keyboard controller, an LCD controller, a text buffer
// sent on for encryption, and the result shown on the LCD; the signal names
// towards the trusted module follow its block diagram. The key set, screen
// layout and hex display of the result are this design's choices.
module user_module #(
  parameter int unsigned WIDTH   = 128,
  parameter int unsigned CLK_KHZ = 50_000
) (
  input  logic             clk,
  input  logic             rst,
  // keyboard
  input  logic             ps2_clk,
  input  logic             ps2_data,
  // encrypt (1) / decrypt (0) slide switch
  input  logic             mode_sw,
  // to the trusted module
  output logic [WIDTH-1:0] text_out,
  output logic             load_out,
  output logic             done_out,
  output logic             encrypt_sw,
  // from the trusted module
  input  logic [WIDTH-1:0] text_in,
  input  logic             load_in,
  input  logic             done_in,
  // LCD
  output logic             lcd_e,
  output logic             lcd_rs,
  output logic             lcd_rw,
  output logic [3:0]       lcd_d,
  output logic             lcd_ready
);
  localparam int unsigned NCHAR = WIDTH / 8;

  typedef enum logic [1:0] {U_TYPING, U_WAIT, U_SHOW} ustate_e;
  ustate_e state;

  logic [7:0] code;
  logic       code_valid, frame_error;

  ps2_keyboard_rx #(.CLK_KHZ(CLK_KHZ)) u_kbd (
    .clk, .rst, .ps2_clk, .ps2_data, .code, .code_valid, .frame_error
  );

  // Scan code set 2 -> ASCII (0 = not a typing key).
  function automatic logic [7:0] to_ascii(logic [7:0] sc);
    unique case (sc)
      8'h1C: return "A"; 8'h32: return "B"; 8'h21: return "C"; 8'h23: return "D";
      8'h24: return "E"; 8'h2B: return "F"; 8'h34: return "G"; 8'h33: return "H";
      8'h43: return "I"; 8'h3B: return "J"; 8'h42: return "K"; 8'h4B: return "L";
      8'h3A: return "M"; 8'h31: return "N"; 8'h44: return "O"; 8'h4D: return "P";
      8'h15: return "Q"; 8'h2D: return "R"; 8'h1B: return "S"; 8'h2C: return "T";
      8'h3C: return "U"; 8'h2A: return "V"; 8'h1D: return "W"; 8'h22: return "X";
      8'h35: return "Y"; 8'h1A: return "Z";
      8'h45: return "0"; 8'h16: return "1"; 8'h1E: return "2"; 8'h26: return "3";
      8'h25: return "4"; 8'h2E: return "5"; 8'h36: return "6"; 8'h3D: return "7";
      8'h3E: return "8"; 8'h46: return "9"; 8'h29: return " ";
      default: return 8'h00;
    endcase
  endfunction

  localparam logic [7:0] SC_ENTER = 8'h5A;
  localparam logic [7:0] SC_BKSP  = 8'h66;
  localparam logic [7:0] SC_BREAK = 8'hF0;
  localparam logic [7:0] SC_EXT   = 8'hE0;

  function automatic logic [7:0] hex_digit(logic [3:0] v);
    return (v < 4'd10) ? 8'h30 + 8'(v) : 8'h37 + 8'(v);
  endfunction

  logic [NCHAR-1:0][7:0] buf_q;    // buf_q[NCHAR-1] is the first character
  logic [$clog2(NCHAR+1)-1:0] len;
  logic                  skip_next;
  logic [WIDTH-1:0]      result_q;
  logic                  key_event;
  logic [7:0]            key_ascii;

  assign key_event = code_valid && !skip_next && code != SC_BREAK && code != SC_EXT;
  assign key_ascii = to_ascii(code);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= U_TYPING;
      buf_q     <= {NCHAR{8'h20}};
      len       <= '0;
      skip_next <= 1'b0;
      result_q  <= '0;
      load_out  <= 1'b0;
      done_out  <= 1'b0;
      text_out  <= '0;
    end else begin
      load_out <= 1'b0;
      done_out <= 1'b0;
      if (code_valid) skip_next <= (code == SC_BREAK);
      unique case (state)
        U_TYPING: if (key_event) begin
          if (code == SC_ENTER) begin
            if (done_in) begin
              text_out <= buf_q;
              load_out <= 1'b1;
              state    <= U_WAIT;
            end
          end else if (code == SC_BKSP) begin
            if (len != 0) begin
              buf_q[NCHAR - int'(len)] <= 8'h20;
              len <= len - 1'b1;
            end
          end else if (key_ascii != 8'h00 && int'(len) != NCHAR) begin
            buf_q[NCHAR - 1 - int'(len)] <= key_ascii;
            len <= len + 1'b1;
          end
        end
        U_WAIT: if (load_in) begin
          result_q <= text_in;
          done_out <= 1'b1;
          state    <= U_SHOW;
        end
        U_SHOW: if (key_event) begin
          buf_q <= {NCHAR{8'h20}};
          len   <= '0;
          state <= U_TYPING;
          if (key_ascii != 8'h00) begin
            buf_q[NCHAR-1] <= key_ascii;
            len <= 1;
          end
        end
        default: state <= U_TYPING;
      endcase
    end
  end

  assign encrypt_sw = mode_sw;

  // Screen contents.
  logic [31:0][7:0] frame;
  always_comb begin
    frame = {32{8'h20}};
    if (state == U_SHOW) begin
      for (int i = 0; i < 32; i++)
        frame[i] = (i < WIDTH / 4) ? hex_digit(result_q[WIDTH - 4 - 4*i +: 4]) : 8'h20;
    end else begin
      frame[0] = mode_sw ? "E" : "D";
      frame[1] = "N"; frame[2] = "C"; frame[3] = "R"; frame[4] = "Y";
      frame[5] = "P"; frame[6] = "T"; frame[7] = ":";
      if (!mode_sw) begin frame[1] = "E"; end
      for (int i = 0; i < 16; i++)
        frame[16 + i] = (i < NCHAR) ? buf_q[NCHAR - 1 - i] : 8'h20;
      if (state == U_WAIT) frame[15] = "*";   // busy mark
    end
  end

  lcd_controller #(.CLK_KHZ(CLK_KHZ)) u_lcd (
    .clk, .rst, .frame, .lcd_e, .lcd_rs, .lcd_rw, .lcd_d, .ready(lcd_ready)
  );

endmodule
