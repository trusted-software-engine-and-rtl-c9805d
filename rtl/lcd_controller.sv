// lcd_controller: drives the 2x16 character LCD in its 4-bit bus mode.
//
// The display is an HD44780-compatible controller written through four
// data lines, one nibble (high nibble first) per pulse of the enable line
// `lcd_e`. After power-up the controller waits 15 ms, sends the 4-bit wake-
// up nibbles 3, 3, 3, 2, then the commands 0x28 (two lines, 4-bit bus),
// 0x06 (address increments), 0x0C (display on, no cursor) and 0x01 (clear).
// From then on it keeps rewriting the whole screen from `frame`: command
// 0x80 (start of line 1), characters 0..15, command 0xC0 (start of line 2),
// characters 16..31, and over again, so a change in `frame` shows within
// one refresh pass. `lcd_rw` is always 0 (write only); `ready` is high once
// the initialisation has finished.
//
// Timing per nibble: 2 cycles of setup, E_CYCLES cycles with E high, then
// 1 us before the second nibble of a byte; each byte is followed by 40 us
// (1.64 ms after a clear), the power-on waits are 15 ms, 4.1 ms, 100 us and
// 40 us. All waits are derived from CLK_KHZ.
//
// The document only says that the user module houses an LCD controller for
// the board's 2x16 display. The command sequence and delays are the usual
// ones for this display controller and are this design's choice, as is the
// continuous refresh.
module lcd_controller #(
  parameter int unsigned CLK_KHZ  = 50_000,
  parameter int unsigned E_CYCLES = 12
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [31:0][7:0] frame,   // frame[0..15] line 1, [16..31] line 2
  output logic            lcd_e,
  output logic            lcd_rs,
  output logic            lcd_rw,
  output logic [3:0]      lcd_d,
  output logic            ready
);
  import tsd_pkg::us_to_cycles;

  localparam int unsigned W15MS  = us_to_cycles(CLK_KHZ, 15_000);
  localparam int unsigned W4MS   = us_to_cycles(CLK_KHZ, 4_100);
  localparam int unsigned W100US = us_to_cycles(CLK_KHZ, 100);
  localparam int unsigned W40US  = us_to_cycles(CLK_KHZ, 40);
  localparam int unsigned W1640  = us_to_cycles(CLK_KHZ, 1_640);
  localparam int unsigned W1US   = us_to_cycles(CLK_KHZ, 1);
  localparam int unsigned CW     = $clog2(W15MS + 1);

  // Step numbers: 0 power-on wait, 1-4 wake-up nibbles, 5-8 setup commands,
  // 9..42 one refresh pass (then back to 9).
  localparam int unsigned FIRST_REFRESH = 9;
  localparam int unsigned LAST_STEP     = 42;

  typedef enum logic [2:0] {P_WAIT, P_SETUP, P_EHIGH, P_GAP, P_POST} phase_e;

  phase_e      phase;
  logic [5:0]  step;
  logic        second;        // sending the low nibble of a byte
  logic [CW-1:0] cnt;

  // What the current step sends.
  logic        st_nibble_only, st_rs;
  logic [7:0]  st_byte;
  logic [CW-1:0] st_wait;

  always_comb begin
    st_nibble_only = 1'b0;
    st_rs          = 1'b0;
    st_byte        = 8'h00;
    st_wait        = CW'(W40US);
    unique case (step)
      6'd1: begin st_nibble_only = 1'b1; st_byte = 8'h30; st_wait = CW'(W4MS);   end
      6'd2: begin st_nibble_only = 1'b1; st_byte = 8'h30; st_wait = CW'(W100US); end
      6'd3: begin st_nibble_only = 1'b1; st_byte = 8'h30; end
      6'd4: begin st_nibble_only = 1'b1; st_byte = 8'h20; end
      6'd5: st_byte = 8'h28;
      6'd6: st_byte = 8'h06;
      6'd7: st_byte = 8'h0C;
      6'd8: begin st_byte = 8'h01; st_wait = CW'(W1640); end
      6'd9:  st_byte = 8'h80;
      6'd26: st_byte = 8'hC0;
      default: begin
        if (step >= 6'd10 && step <= 6'd25) begin
          st_rs   = 1'b1;
          st_byte = frame[step - 6'd10];
        end else if (step >= 6'd27 && step <= 6'd42) begin
          st_rs   = 1'b1;
          st_byte = frame[step - 6'd11];
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= P_WAIT;
      step   <= '0;
      second <= 1'b0;
      cnt    <= '0;
      lcd_e  <= 1'b0;
      lcd_rs <= 1'b0;
      lcd_d  <= '0;
      ready  <= 1'b0;
    end else begin
      unique case (phase)
        P_WAIT: begin   // power-on delay, step 0 only
          if (cnt == CW'(W15MS - 1)) begin
            cnt   <= '0;
            step  <= 6'd1;
            phase <= P_SETUP;
          end else cnt <= cnt + 1'b1;
        end
        P_SETUP: begin
          lcd_rs <= st_rs;
          lcd_d  <= second ? st_byte[3:0] : st_byte[7:4];
          if (cnt == CW'(1)) begin
            cnt   <= '0;
            phase <= P_EHIGH;
            lcd_e <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        P_EHIGH: begin
          if (cnt == CW'(E_CYCLES - 1)) begin
            cnt   <= '0;
            lcd_e <= 1'b0;
            phase <= (st_nibble_only || second) ? P_POST : P_GAP;
          end else cnt <= cnt + 1'b1;
        end
        P_GAP: begin    // between the two nibbles of a byte
          if (cnt == CW'(W1US - 1)) begin
            cnt    <= '0;
            second <= 1'b1;
            phase  <= P_SETUP;
          end else cnt <= cnt + 1'b1;
        end
        P_POST: begin   // command / data execution time
          if (cnt == st_wait - 1'b1) begin
            cnt    <= '0;
            second <= 1'b0;
            phase  <= P_SETUP;
            if (step == 6'(LAST_STEP)) step <= 6'(FIRST_REFRESH);
            else step <= step + 1'b1;
            if (step == 6'd8) ready <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: phase <= P_WAIT;
      endcase
    end
  end

  assign lcd_rw = 1'b0;

endmodule
