// Testbench for fsl_fifo: random writes and reads against a queue model,
// including filling the link to its depth (M_Full must rise at exactly
// DEPTH words) and draining it (S_Exists must fall when empty); the
// control bit must travel with its word.
module tb_fsl_fifo;
  localparam int W = 32, D = 16;
  logic clk = 0, rst = 1;
  logic [W-1:0] m_data = '0, s_data;
  logic m_control = 0, m_write = 0, m_full, s_control, s_read = 0, s_exists;
  int checks = 0, failures = 0;
  logic [W:0] model[$];

  fsl_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle: optionally write and/or read, then compare with the model.
  task automatic cycle(bit wr, bit rd);
    logic [W:0] w;
    w = {1'($urandom), W'($urandom)};
    m_write = wr && !m_full; {m_control, m_data} = w;
    s_read  = rd && s_exists;
    check(s_exists == (model.size() != 0), "exists matches model");
    check(m_full == (model.size() == D), "full matches model");
    if (s_read) check({s_control, s_data} == model[0], "head word and control bit");
    @(posedge clk);
    if (s_read) void'(model.pop_front());
    if (m_write) model.push_back(w);
    @(negedge clk);
    m_write = 0; s_read = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < D + 3; i++) cycle(1, 0);     // fill past full
    check(m_full && model.size() == D, "full at depth");
    for (int i = 0; i < D + 3; i++) cycle(0, 1);     // drain past empty
    check(!s_exists && model.size() == 0, "empty after drain");
    for (int i = 0; i < 2000; i++) cycle($urandom_range(0, 1), $urandom_range(0, 1));
    for (int i = 0; i < 10; i++) cycle(1, 1);        // simultaneous
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
