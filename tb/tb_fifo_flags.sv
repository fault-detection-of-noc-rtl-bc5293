// tb_fifo_flags: exhaustive check of the full/empty rule. For every read
// position r (0 .. 2*DEPTH-1 counting the lap) and every occupancy n
// (0 .. DEPTH), the write position is r + n modulo 2*DEPTH; empty must be
// n == 0, full n == DEPTH and count n. Run for depths 8 and 6.
module tb_fifo_flags;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [2:0] wa8, ra8, wa6, ra6;
  logic wl8, rl8, wl6, rl6;
  logic full8, empty8, full6, empty6;
  logic [3:0] cnt8, cnt6;

  always #5 clk = ~clk;

  fifo_flags #(.DEPTH(8)) dut8 (.waddr(wa8), .wlap(wl8), .raddr(ra8), .rlap(rl8),
                                .full(full8), .empty(empty8), .count(cnt8));
  fifo_flags #(.DEPTH(6)) dut6 (.waddr(wa6), .wlap(wl6), .raddr(ra6), .rlap(rl6),
                                .full(full6), .empty(empty6), .count(cnt6));

  task automatic chk(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < 16; r++) begin
      for (int n = 0; n <= 8; n++) begin
        int w;
        w = (r + n) % 16;
        ra8 = 3'(r % 8); rl8 = (r >= 8); wa8 = 3'(w % 8); wl8 = (w >= 8);
        if (r < 12 && n <= 6) begin
          int w6;
          w6 = (r + n) % 12;
          ra6 = 3'(r % 6); rl6 = (r >= 6); wa6 = 3'(w6 % 6); wl6 = (w6 >= 6);
        end
        #1;
        chk(32'(empty8), 32'(n == 0), "empty8"); chk(32'(full8), 32'(n == 8), "full8"); chk(32'(cnt8), 32'(n), "count8");
        if (r < 12 && n <= 6) begin
          chk(32'(empty6), 32'(n == 0), "empty6"); chk(32'(full6), 32'(n == 6), "full6"); chk(32'(cnt6), 32'(n), "count6");
        end
        @(posedge clk);
      end
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
