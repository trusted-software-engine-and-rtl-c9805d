// fsl_fifo: one Fast Simplex Link, a point-to-point FIFO channel.
//
// The master side writes a data word and a control bit with M_Write when
// M_Full is low; the slave side sees S_Exists while a word is waiting,
// reads it from S_Data/S_Control and pops it with S_Read. Both sides share
// one clock. Writes to a full FIFO and reads from an empty one are ignored
// (and flagged by assertions in simulation).
//
// Timing: a word written in cycle t is visible to the slave in cycle t+1.
//
// The document uses FSL links, FIFO-based, to join its peripherals to the
// processor; the depth of 16 words and the first-word-fall-through read are
// this design's choices.
module fsl_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  // master (writer) side
  input  logic [WIDTH-1:0] m_data,
  input  logic             m_control,
  input  logic             m_write,
  output logic             m_full,
  // slave (reader) side
  output logic [WIDTH-1:0] s_data,
  output logic             s_control,
  input  logic             s_read,
  output logic             s_exists
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH:0]  mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic [AW:0]     count;
  logic            do_wr, do_rd;

  assign m_full   = (count == (AW+1)'(DEPTH));
  assign s_exists = (count != 0);
  assign do_wr    = m_write && !m_full;
  assign do_rd    = s_read && s_exists;
  assign {s_control, s_data} = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= {m_control, m_data};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(m_write && m_full))
    else $error("fsl_fifo: write to a full link");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(s_read && !s_exists))
    else $error("fsl_fifo: read from an empty link");

endmodule
