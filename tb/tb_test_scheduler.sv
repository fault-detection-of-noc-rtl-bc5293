// tb_test_scheduler: checks when the scheduler starts a test. A stand-in for
// the test circuit holds busy high for B cycles after each start. Expected
// behaviour, worked out by hand from the timing rule: with no requests the
// first start comes P-1 cycles after reset and each later one B+P cycles after
// the previous; a request while idle starts a test in the same cycle; a
// request while busy starts one in the first idle cycle; with PERIOD = 0 no
// test starts unless requested.
module tb_test_scheduler;
  localparam int P = 10;
  localparam int B = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, req0 = 1'b0;
  logic busy = 1'b0, busy0 = 1'b0;
  logic start, start0;
  int busy_left = 0;
  int cyc = 0;
  int checks = 0, failures = 0;
  int starts [$];
  int starts0 = 0;

  always #5 clk = ~clk;

  test_scheduler #(.PERIOD(P)) dut  (.clk, .rst_n, .test_req(req),  .busy(busy),  .start(start));
  test_scheduler #(.PERIOD(0)) dut0 (.clk, .rst_n, .test_req(req0), .busy(busy0), .start(start0));

  // stand-in for the test circuit, and a log of start cycles
  always @(posedge clk) if (rst_n) begin
    if (start) begin
      if (busy) begin failures++; $display("FAIL start while busy"); end
      starts.push_back(cyc);
      busy_left = B;
    end else if (busy_left > 0) busy_left--;
    if (start0) starts0++;
    cyc++;
  end
  always @(negedge clk) busy = (busy_left > 0);

  task automatic chk(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    // three periodic starts
    wait (starts.size() == 3);
    chk(32'(starts[0]), 32'(P - 1), "first periodic start");
    chk(32'(starts[1] - starts[0]), 32'(B + P), "period 2");
    chk(32'(starts[2] - starts[1]), 32'(B + P), "period 3");
    // a request while idle: start in the same cycle
    repeat (B + 2) @(negedge clk);
    req = 1'b1; req0 = 1'b1;
    #1 chk(32'(start), 1, "request while idle"); chk(32'(start0), 1, "request, PERIOD 0");
    @(negedge clk); req = 1'b0; req0 = 1'b0;
    // a request while busy: served at the first idle cycle
    begin
      int n;
      n = starts.size();
      @(negedge clk); chk(32'(busy), 1, "busy after start");
      req = 1'b1;
      @(negedge clk); req = 1'b0;
      wait (starts.size() == n + 1);
      chk(32'(starts[n] - starts[n-1]), 32'(B + 1), "pending request served after busy");
    end
    repeat (100) @(posedge clk);
    chk(32'(starts0), 1, "PERIOD 0 starts only on request");
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
