// s2p_deserializer: serial-to-parallel converter for the board-to-board link.
//
// While `frame` is high, one bit per lane is shifted in each clock, most
// significant first. When `frame` falls, the word is complete: if exactly
// WIDTH bits arrived, `valid` pulses for one cycle with the word on `data`;
// any other count pulses `framing_error` instead and the word is dropped.
//
// Timing: `valid` (or `framing_error`) is high two cycles after the cycle
// that carried the last frame bit; `data` holds its value until the next frame ends.
//
// It is the receiving half of the serial link between the two boards; the
// bit-count check is this design's choice.
module s2p_deserializer #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned LANES = 1
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        frame,
  input  logic [LANES-1:0]            sdata,
  output logic [LANES-1:0][WIDTH-1:0] data,
  output logic                        valid,
  output logic                        framing_error
);
  localparam int unsigned CW = $clog2(WIDTH + 2);

  logic [LANES-1:0][WIDTH-1:0] shreg;
  logic [CW-1:0]               count;
  logic                        frame_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg         <= '0;
      data          <= '0;
      count         <= '0;
      frame_q       <= 1'b0;
      valid         <= 1'b0;
      framing_error <= 1'b0;
    end else begin
      frame_q       <= frame;
      valid         <= 1'b0;
      framing_error <= 1'b0;
      if (frame) begin
        for (int l = 0; l < LANES; l++) shreg[l] <= {shreg[l][WIDTH-2:0], sdata[l]};
        // Saturate one past WIDTH so an over-long frame is still caught.
        if (count <= CW'(WIDTH)) count <= count + 1'b1;
      end else if (frame_q) begin
        count <= '0;
        if (count == CW'(WIDTH)) begin
          data  <= shreg;
          valid <= 1'b1;
        end else begin
          framing_error <= 1'b1;
        end
      end
    end
  end

endmodule
