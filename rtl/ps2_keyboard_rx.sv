// ps2_keyboard_rx: receiver for the PS/2 keyboard port.
//
// The keyboard drives both PS/2 lines. Each byte comes as an 11-bit frame:
// a 0 start bit, eight data bits LSB first, an odd-parity bit and a 1 stop
// bit, each valid on a falling edge of ps2_clk (10-16.7 kHz). The lines are
// brought into the clock domain through two flip-flops; a falling edge of
// the synchronised clock samples the data line. A complete, well-formed
// frame pulses `code_valid` with the byte on `code`; a frame with a bad
// start, parity or stop bit pulses `frame_error` instead. If the clock line
// stays idle for TIMEOUT_US in the middle of a frame, the partial frame is
// dropped so that the receiver falls back into step.
//
// Timing: `code_valid` comes 3 clock cycles after the falling ps2_clk edge
// of the stop bit.
//
// The document only names a keyboard controller in the user module; the
// PS/2 frame format is the standard one, and the timeout is this design's
// choice.
module ps2_keyboard_rx #(
  parameter int unsigned CLK_KHZ    = 50_000,
  parameter int unsigned TIMEOUT_US = 200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] code,
  output logic       code_valid,
  output logic       frame_error
);
  localparam int unsigned TMO = tsd_pkg::us_to_cycles(CLK_KHZ, TIMEOUT_US);
  localparam int unsigned TW  = $clog2(TMO + 1);

  logic [2:0]  clk_sync;
  logic [1:0]  dat_sync;
  logic        fall;
  logic [10:0] shreg;     // bits arrive LSB first: shreg[0] is the start bit
  logic [3:0]  nbits;
  logic [TW-1:0] idle;

  assign fall = clk_sync[2] && !clk_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync    <= 3'b111;
      dat_sync    <= 2'b11;
      shreg       <= '0;
      nbits       <= '0;
      idle        <= '0;
      code        <= '0;
      code_valid  <= 1'b0;
      frame_error <= 1'b0;
    end else begin
      clk_sync    <= {clk_sync[1:0], ps2_clk};
      dat_sync    <= {dat_sync[0], ps2_data};
      code_valid  <= 1'b0;
      frame_error <= 1'b0;
      if (fall) begin
        idle  <= '0;
        shreg <= {dat_sync[1], shreg[10:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          // eleventh edge: the ten bits so far hold the start bit in
          // shreg[1], data in shreg[9:2], parity in shreg[10]; the stop
          // bit is the one sampled now
          if (!shreg[1] && dat_sync[1] && ^{shreg[10:2]}) begin
            code       <= shreg[9:2];
            code_valid <= 1'b1;
          end else begin
            frame_error <= 1'b1;
          end
        end else begin
          nbits <= nbits + 1'b1;
        end
      end else if (nbits != 0) begin
        if (idle == TW'(TMO)) begin
          nbits <= '0;
          idle  <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end

endmodule
