// soa_mats_test: test circuit running the transparent SOA-MATS++ test on the
// FIFO memory, row by row, without destroying its contents.
//
// For each row i (0 .. DEPTH-1) three runs j are made, each starting with a
// read of the row into temp:
//   j = 0 (invert):  original <= temp; write ~temp back.
//   j = 1 (restore): result = temp ^ original, which must be all ones;
//                    write ~temp back, restoring the original word.
//   j = 2 (verify):  result = temp ^ original, which must be all zeros.
// Any bit deviating from the expected pattern marks a faulty bit of that row.
// The last read catches faults the first two runs could not expose.
// This sequence and the compare rule follow the specified algorithm; the
// cycle schedule, the reporting outputs and the reset are this design's own.
//
// Timing: the memory read is synchronous (word one cycle after the request),
// so each run takes two cycles, T_READ then T_EVAL, with the write-back issued
// in T_EVAL on the memory's separate write port. A complete test takes
// 6*DEPTH cycles in T_READ/T_EVAL plus one T_DONE cycle; busy is high for
// those 6*DEPTH+1 cycles, starting the cycle after start is seen in T_IDLE.
// done pulses in the T_DONE cycle. start is ignored while busy.
//
// Results: fault is cleared when a test starts and set by the first deviating
// compare; fault_addr is the first faulty row, fault_mask the OR of all
// deviating bit positions seen during the test. err_pulse flags each failing
// compare as it happens.
module soa_mats_test
  import fifo_test_pkg::*;
#(
  parameter int unsigned DATA_W = fifo_test_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH  = fifo_test_pkg::DEPTH_DEF,
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,      // test_ctrl: test owns the memory
  output logic              done,
  // memory access of the test path
  output logic              t_re,
  output logic [AW-1:0]     t_raddr,
  input  logic [DATA_W-1:0] t_rdata,
  output logic              t_we,
  output logic [AW-1:0]     t_waddr,
  output logic [DATA_W-1:0] t_wdata,
  // results
  output logic              err_pulse,
  output logic              fault,
  output logic [AW-1:0]     fault_addr,
  output logic [DATA_W-1:0] fault_mask
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  test_state_e       state;
  test_run_e         run;       // j
  logic [AW-1:0]     row;       // i
  logic [DATA_W-1:0] original;
  logic [DATA_W-1:0] syndrome;  // deviating bits of the current compare
  logic              cmp_en;

  // Compare of the current read word with the saved original.
  always_comb begin
    cmp_en   = (state == T_EVAL) && (run != RUN_INVERT);
    syndrome = '0;
    if (cmp_en) begin
      if (run == RUN_RESTORE) syndrome = ~(t_rdata ^ original);  // expect all ones
      else                    syndrome =  (t_rdata ^ original);  // expect all zeros
    end
  end

  always_comb begin
    busy      = (state != T_IDLE);
    done      = (state == T_DONE);
    t_re      = (state == T_READ);
    t_raddr   = row;
    t_we      = (state == T_EVAL) && (run != RUN_VERIFY);
    t_waddr   = row;
    t_wdata   = ~t_rdata;
    err_pulse = (syndrome != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      run        <= RUN_INVERT;
      row        <= '0;
      original   <= '0;
      fault      <= 1'b0;
      fault_addr <= '0;
      fault_mask <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (start) begin
          state      <= T_READ;
          run        <= RUN_INVERT;
          row        <= '0;
          fault      <= 1'b0;
          fault_addr <= '0;
          fault_mask <= '0;
        end
        T_READ: state <= T_EVAL;
        T_EVAL: begin
          if (run == RUN_INVERT) original <= t_rdata;
          if (err_pulse) begin
            fault      <= 1'b1;
            fault_mask <= fault_mask | syndrome;
            if (!fault) fault_addr <= row;
          end
          if (run == RUN_VERIFY) begin
            run <= RUN_INVERT;
            if (row == LAST) begin
              state <= T_DONE;
            end else begin
              row   <= row + AW'(1);
              state <= T_READ;
            end
          end else begin
            run   <= (run == RUN_INVERT) ? RUN_RESTORE : RUN_VERIFY;
            state <= T_READ;
          end
        end
        T_DONE: state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
