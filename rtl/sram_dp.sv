// sram_dp: dual-port static RAM that stores the FIFO words of one router input
// channel. One write port and one read port with independent addresses allow a
// write and a read in the same cycle, which is the dual-port RAM-type FIFO
// organisation the design builds on.
//
// Timing: both ports are synchronous to clk. A write (we) stores wdata at waddr
// on the rising edge. A read (re) loads the word at raddr into the rdata
// register on the rising edge, so the word is visible one cycle after re; rdata
// holds its value while re is low. A read of the row being written in the same
// cycle returns the old contents (read-before-write).
//
// Fault injection (verification aid, this design's own addition): while fi_en
// is high, bit fi_bit of row fi_addr behaves as a cell stuck at fi_val: it is
// stored as fi_val on a write and reads back as fi_val. Tie fi_en low in use.
// The array itself is not reset, like a real SRAM macro.
module sram_dp #(
  parameter int unsigned DATA_W = fifo_test_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH  = fifo_test_pkg::DEPTH_DEF,
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                      clk,
  // write port
  input  logic                      we,
  input  logic [AW-1:0]             waddr,
  input  logic [DATA_W-1:0]         wdata,
  // read port
  input  logic                      re,
  input  logic [AW-1:0]             raddr,
  output logic [DATA_W-1:0]         rdata,
  // stuck-at cell fault injection
  input  logic                      fi_en,
  input  logic [AW-1:0]             fi_addr,
  input  logic [$clog2(DATA_W)-1:0] fi_bit,
  input  logic                      fi_val
);

  logic [DATA_W-1:0] mem [DEPTH];

  // Apply the injected stuck-at cell, if any, to a word of row addr.
  function automatic logic [DATA_W-1:0] stuck(input logic [DATA_W-1:0] word,
                                              input logic [AW-1:0]     addr);
    logic [DATA_W-1:0] w;
    w = word;
    if (fi_en && addr == fi_addr) w[fi_bit] = fi_val;
    return w;
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= stuck(wdata, waddr);
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= stuck(mem[raddr], raddr);
  end

endmodule
