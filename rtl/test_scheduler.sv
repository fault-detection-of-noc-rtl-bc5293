// test_scheduler: decides when the online test of the FIFO memory runs. The
// test is periodic: an interval counter counts router-clock cycles while no
// test is running and requests a test every PERIOD cycles. A test can also be
// requested at any time with test_req; a request that arrives while a test is
// running is held and served when that test ends. PERIOD = 0 disables the
// periodic requests. The period value is this design's own choice.
//
// Timing: start is a one-cycle pulse, given only while busy is low, in the
// cycle the interval counter reaches PERIOD-1 or a request is present. The
// counter restarts from zero on every start.
module test_scheduler #(
  parameter int unsigned PERIOD = 4096,
  parameter int unsigned CW     = (PERIOD > 1) ? $clog2(PERIOD) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic test_req,
  input  logic busy,
  output logic start
);

  logic [CW-1:0] timer;
  logic          pend;
  logic          tick;

  always_comb begin
    tick  = (PERIOD != 0) && (timer == CW'(PERIOD - 1));
    start = !busy && (pend || test_req || tick);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0;
      pend  <= 1'b0;
    end else if (start) begin
      timer <= '0;
      pend  <= 1'b0;
    end else begin
      if (test_req) pend <= 1'b1;
      if (!busy && !tick) timer <= timer + CW'(1);
    end
  end

endmodule
