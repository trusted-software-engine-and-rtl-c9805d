// untrusted_wrapper: the wrapper around one AES core on the untrusted board.
//
// The trusted board drives this board's clock, reset and serial inputs over
// the board-to-board connector. While `down.load` is high the wrapper shifts
// in the key and the input text, one bit of each per clock, MSB first. When
// exactly WIDTH bits have arrived it gives both words to the AES core with a
// one-cycle `core_load`, waits for `core_done`, and shifts the core's result
// back, MSB first, with `up.done` high for the WIDTH cycles of the frame.
// `down.rst` resets the wrapper and, through `core_rst`, the core.
//
// The AES core itself sits outside this module (ports `core_*`), because
// it is the untrusted commercial part being checked. `stored_key` is the last
// key received; on the untrusted board it is what a leaking Trojan can reach.
//
// Timing: `core_load` pulses 3 cycles after the cycle that carried the last
// key bit; the up-link frame starts 2 cycles after `core_done`.
//
// The document shows one wrapper per AES core on the second board; how the
// wrapper frames the serial data is this design's choice.
module untrusted_wrapper
  import tsd_pkg::*;
#(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  link_down_t       down,
  output link_up_t         up,
  // AES core
  output logic             core_rst,
  output logic             core_load,
  output logic [WIDTH-1:0] core_key,
  output logic [WIDTH-1:0] core_txtin,
  input  logic             core_done,
  input  logic [WIDTH-1:0] core_txtout,
  // key as held on this board
  output logic [WIDTH-1:0] stored_key
);
  logic                  rst;
  logic [1:0][WIDTH-1:0] rx_words;
  logic                  rx_valid, rx_ferr;
  logic [WIDTH-1:0]      result_q;
  logic                  send;
  logic [0:0]            tx_bit;
  logic                  tx_frame, tx_busy, tx_done;

  assign rst      = down.rst;
  assign core_rst = down.rst;

  s2p_deserializer #(.WIDTH(WIDTH), .LANES(2)) u_rx (
    .clk, .rst, .frame(down.load), .sdata({down.key, down.txtin}),
    .data(rx_words), .valid(rx_valid), .framing_error(rx_ferr)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      core_load <= 1'b0;
      result_q  <= '0;
      send      <= 1'b0;
    end else begin
      core_load <= rx_valid;
      send      <= 1'b0;
      if (core_done) begin
        result_q <= core_txtout;
        send     <= 1'b1;
      end
    end
  end

  assign core_key   = rx_words[1];
  assign core_txtin = rx_words[0];
  assign stored_key = rx_words[1];

  p2s_serializer #(.WIDTH(WIDTH), .LANES(1)) u_tx (
    .clk, .rst, .start(send), .data(result_q),
    .frame(tx_frame), .sdata(tx_bit), .busy(tx_busy), .done(tx_done)
  );

  assign up.done   = tx_frame;
  assign up.txtout = tx_bit[0];

endmodule
