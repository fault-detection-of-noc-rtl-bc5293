// tb_fifo_test_mux: drives random normal-path and test-path values and checks
// that the memory sees the normal path when test_ctrl is low and the test path
// when it is high, signal by signal.
module tb_fifo_test_mux;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic test_ctrl, wen_int, ren_int, t_we, t_re, m_we, m_re;
  logic [2:0] n_waddr, n_raddr, t_waddr, t_raddr, m_waddr, m_raddr;
  logic [31:0] n_wdata, t_wdata, m_wdata;

  always #5 clk = ~clk;

  fifo_test_mux #(.DATA_W(32), .DEPTH(8)) dut (.*);

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int c = 0; c < 200; c++) begin
      test_ctrl = c[0];
      {wen_int, ren_int, t_we, t_re} = 4'($urandom());
      {n_waddr, n_raddr, t_waddr, t_raddr} = 12'($urandom());
      n_wdata = $urandom(); t_wdata = $urandom();
      #1;
      chk(32'(m_we),    32'(test_ctrl ? t_we    : wen_int), "we (mu7)");
      chk(32'(m_re),    32'(test_ctrl ? t_re    : ren_int), "re (mu6)");
      chk(32'(m_waddr), 32'(test_ctrl ? t_waddr : n_waddr), "waddr");
      chk(32'(m_raddr), 32'(test_ctrl ? t_raddr : n_raddr), "raddr");
      chk(m_wdata,      test_ctrl ? t_wdata : n_wdata,      "wdata");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
