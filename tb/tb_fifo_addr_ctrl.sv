// tb_fifo_addr_ctrl: checks the circular address counter with lap bit against
// an integer model (address = n mod DEPTH, lap = (n / DEPTH) mod 2 after n
// increments), under random increments, for a power-of-two depth and for a
// depth of 6 where the wrap is not a natural overflow.
module tb_fifo_addr_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic inc8 = 1'b0, inc6 = 1'b0;
  logic [2:0] addr8, addr6;
  logic lap8, lap6;
  int n8 = 0, n6 = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fifo_addr_ctrl #(.DEPTH(8)) dut8 (.clk, .rst_n, .inc(inc8), .addr(addr8), .lap(lap8));
  fifo_addr_ctrl #(.DEPTH(6)) dut6 (.clk, .rst_n, .inc(inc6), .addr(addr6), .lap(lap6));

  task automatic chk(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    chk(32'(addr8), 0, "reset addr"); chk(32'(lap8), 0, "reset lap");
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      inc8 = ($urandom_range(0, 3) != 0);
      inc6 = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (inc8) n8++;
      if (inc6) n6++;
      chk(32'(addr8), 32'(n8 % 8), "addr depth 8"); chk(32'(lap8), 32'((n8 / 8) % 2), "lap depth 8");
      chk(32'(addr6), 32'(n6 % 6), "addr depth 6"); chk(32'(lap6), 32'((n6 / 6) % 2), "lap depth 6");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
