// p2s_serializer: parallel-to-serial converter for the board-to-board link.
//
// A start pulse while idle loads LANES words of WIDTH bits. On the next
// WIDTH clock cycles, `frame` is high and each lane's bit, most significant
// first, sits on `sdata`. Several lanes share one frame strobe, so the key
// and the text of one AES job go out side by side on separate wires.
//
// Timing: start in cycle t -> frame high in cycles t+1 .. t+WIDTH, `done`
// pulses in cycle t+WIDTH+1. A start while busy is ignored.
//
// The document names a hardware parallel-to-serial converter on the trusted
// board; the framing (strobe held high for the whole word, MSB first) is
// this design's choice.
module p2s_serializer #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned LANES = 2
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic [LANES-1:0][WIDTH-1:0] data,
  output logic                        frame,
  output logic [LANES-1:0]            sdata,
  output logic                        busy,
  output logic                        done
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [LANES-1:0][WIDTH-1:0] shreg;
  logic [CW-1:0]               remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      remaining <= '0;
      frame     <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (remaining == 0) begin
        frame <= 1'b0;
        if (start) begin
          shreg     <= data;
          remaining <= CW'(WIDTH);
          frame     <= 1'b1;
        end
      end else begin
        for (int l = 0; l < LANES; l++) shreg[l] <= {shreg[l][WIDTH-2:0], 1'b0};
        remaining <= remaining - 1'b1;
        frame     <= (remaining != 1);
        if (remaining == 1) done <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) sdata[l] = frame ? shreg[l][WIDTH-1] : 1'b0;
  end

  assign busy = frame;

endmodule
