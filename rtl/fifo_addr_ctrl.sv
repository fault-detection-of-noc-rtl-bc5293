// fifo_addr_ctrl: address controller of one side (write or read) of the
// counter-address RAM FIFO. The buffer is used as a circular buffer: the
// address counts 0 .. DEPTH-1 and wraps to 0, and at every wrap the lap bit
// toggles. The lap bit records, modulo 2, how many times the buffer has been
// traversed, which is all the full/empty logic needs: the two sides can differ
// by at most one traversal.
//
// Two instances are used, one advanced by the write enable and one by the read
// enable; each manages its own side independently. The FIFO organisation this
// follows clocks its two controllers independently; here both run on the
// router clock, which is this design's choice for a router input buffer.
//
// Interface: inc advances addr on the rising edge of clk; lap is the wrap
// parity. rst_n is an active-low asynchronous reset to address 0, lap 0.
module fifo_addr_ctrl #(
  parameter int unsigned DEPTH = fifo_test_pkg::DEPTH_DEF,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc,
  output logic [AW-1:0] addr,
  output logic          lap
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      lap  <= 1'b0;
    end else if (inc) begin
      if (addr == LAST) begin
        addr <= '0;
        lap  <= ~lap;
      end else begin
        addr <= addr + AW'(1);
      end
    end
  end

endmodule
