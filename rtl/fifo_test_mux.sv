// fifo_test_mux: the multiplexers between the FIFO memory and its two users.
// When test_ctrl is low, the memory is driven by the normal FIFO path: the
// internal enables wen_int and ren_int (router clock domain) and the write and
// read address counters. When test_ctrl is high, the test circuit drives the
// enables, both addresses and the write data. The read- and write-enable
// multiplexers are the specified mu6 and mu7; the address and data
// multiplexers are the further multiplexers the test path needs (their naming
// and exact arrangement are this design's own).
//
// Purely combinational.
module fifo_test_mux #(
  parameter int unsigned DATA_W = fifo_test_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH  = fifo_test_pkg::DEPTH_DEF,
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              test_ctrl,
  // normal path
  input  logic              wen_int,
  input  logic [AW-1:0]     n_waddr,
  input  logic [DATA_W-1:0] n_wdata,
  input  logic              ren_int,
  input  logic [AW-1:0]     n_raddr,
  // test path
  input  logic              t_we,
  input  logic [AW-1:0]     t_waddr,
  input  logic [DATA_W-1:0] t_wdata,
  input  logic              t_re,
  input  logic [AW-1:0]     t_raddr,
  // to the memory
  output logic              m_we,
  output logic [AW-1:0]     m_waddr,
  output logic [DATA_W-1:0] m_wdata,
  output logic              m_re,
  output logic [AW-1:0]     m_raddr
);

  always_comb begin
    m_re    = test_ctrl ? t_re    : ren_int;   // read-enable multiplexer (mu6)
    m_we    = test_ctrl ? t_we    : wen_int;   // write-enable multiplexer (mu7)
    m_waddr = test_ctrl ? t_waddr : n_waddr;
    m_wdata = test_ctrl ? t_wdata : n_wdata;
    m_raddr = test_ctrl ? t_raddr : n_raddr;
  end

endmodule
