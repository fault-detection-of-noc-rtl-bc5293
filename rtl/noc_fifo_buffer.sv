// noc_fifo_buffer: input-channel buffer of a NoC router with an online,
// transparent SOA-MATS++ memory test. Flits arrive on data_in and are stored
// in a dual-port SRAM organised as a circular FIFO; on request by the
// downstream side they leave on data_out. Every TEST_PERIOD cycles (or on
// test_req) the test circuit takes the memory over, inverts, restores and
// verifies every row in turn, and hands it back with the contents unchanged,
// so buffered flits survive the test. Faulty rows and bit positions are
// reported on fault / fault_addr / fault_mask; fault_event pulses on every
// failing comparison.
//
// Structure: two address controllers (write, read) with lap bits, full/empty
// logic, the SRAM, the normal/test multiplexers (read- and write-enable
// multiplexers mu6/mu7 plus address and data multiplexers), the test circuit
// and the test scheduler. The FIFO organisation, the flag rule, the test
// algorithm and the multiplexing follow the specification; the depth, the stall policy
// during a test, the period and the output timing are this design's own.
//
// Interface and timing (single router clock, active-low asynchronous reset):
//   push/data_in: a flit is written on a rising edge where push && !full.
//   pop: a flit is read on a rising edge where pop && !empty; it appears on
//        data_out in the next cycle, marked by dout_valid for that one cycle.
//   During a test (test_ctrl high, 6*DEPTH+1 cycles) full and empty are both
//   forced high, so neither side transfers: the buffer is paused, not flushed.
//   test_done pulses in the last test cycle; fault results then hold until
//   the next test starts.
//   fi_*: stuck-at cell injection into the SRAM for verification; tie fi_en
//   low in use.
module noc_fifo_buffer #(
  parameter int unsigned DATA_W      = fifo_test_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH       = fifo_test_pkg::DEPTH_DEF,
  parameter int unsigned TEST_PERIOD = 4096,
  parameter int unsigned AW          = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // upstream (write) side
  input  logic                      push,
  input  logic [DATA_W-1:0]         data_in,
  output logic                      full,
  // downstream (read) side
  input  logic                      pop,
  output logic [DATA_W-1:0]         data_out,
  output logic                      dout_valid,
  output logic                      empty,
  output logic [AW:0]               count,
  // online test
  input  logic                      test_req,
  output logic                      test_ctrl,
  output logic                      test_done,
  output logic                      fault_event,
  output logic                      fault,
  output logic [AW-1:0]             fault_addr,
  output logic [DATA_W-1:0]         fault_mask,
  // fault injection into the memory (verification only)
  input  logic                      fi_en,
  input  logic [AW-1:0]             fi_addr,
  input  logic [$clog2(DATA_W)-1:0] fi_bit,
  input  logic                      fi_val
);

  logic              full_int, empty_int;
  logic              wen_int, ren_int;
  logic [AW-1:0]     waddr, raddr;
  logic              wlap, rlap;
  logic              start;
  logic              t_we, t_re;
  logic [AW-1:0]     t_waddr, t_raddr;
  logic [DATA_W-1:0] t_wdata;
  logic              m_we, m_re;
  logic [AW-1:0]     m_waddr, m_raddr;
  logic [DATA_W-1:0] m_wdata, m_rdata;

  // Internal enables of the normal path; the FIFO is paused during a test.
  always_comb begin
    wen_int = push && !full_int  && !test_ctrl;
    ren_int = pop  && !empty_int && !test_ctrl;
    full    = full_int  || test_ctrl;
    empty   = empty_int || test_ctrl;
    data_out = m_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout_valid <= 1'b0;
    else        dout_valid <= ren_int;
  end

  fifo_addr_ctrl #(.DEPTH(DEPTH), .AW(AW)) u_wr_ctrl (
    .clk, .rst_n, .inc(wen_int), .addr(waddr), .lap(wlap)
  );

  fifo_addr_ctrl #(.DEPTH(DEPTH), .AW(AW)) u_rd_ctrl (
    .clk, .rst_n, .inc(ren_int), .addr(raddr), .lap(rlap)
  );

  fifo_flags #(.DEPTH(DEPTH), .AW(AW)) u_flags (
    .waddr, .wlap, .raddr, .rlap, .full(full_int), .empty(empty_int), .count
  );

  test_scheduler #(.PERIOD(TEST_PERIOD)) u_sched (
    .clk, .rst_n, .test_req, .busy(test_ctrl), .start
  );

  soa_mats_test #(.DATA_W(DATA_W), .DEPTH(DEPTH), .AW(AW)) u_test (
    .clk, .rst_n, .start, .busy(test_ctrl), .done(test_done),
    .t_re, .t_raddr, .t_rdata(m_rdata), .t_we, .t_waddr, .t_wdata,
    .err_pulse(fault_event), .fault, .fault_addr, .fault_mask
  );

  fifo_test_mux #(.DATA_W(DATA_W), .DEPTH(DEPTH), .AW(AW)) u_mux (
    .test_ctrl,
    .wen_int, .n_waddr(waddr), .n_wdata(data_in), .ren_int, .n_raddr(raddr),
    .t_we, .t_waddr, .t_wdata, .t_re, .t_raddr,
    .m_we, .m_waddr, .m_wdata, .m_re, .m_raddr
  );

  sram_dp #(.DATA_W(DATA_W), .DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk, .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .re(m_re), .raddr(m_raddr), .rdata(m_rdata),
    .fi_en, .fi_addr, .fi_bit, .fi_val
  );

  // The normal path never touches the memory while the test owns it.
  a_no_normal_access_in_test: assert property (
    @(posedge clk) test_ctrl |-> !(wen_int || ren_int));

endmodule
