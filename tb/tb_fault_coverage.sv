// tb_fault_coverage: stuck-at fault coverage of the online test on the
// complete buffer at its default parameters. Every single stuck-at-0 and
// stuck-at-1 cell of the SRAM (DEPTH rows x DATA_W bits x 2 values) is
// injected in turn, with random flits in every row; a requested test must
// report exactly that row and bit. A fault-free test between the faults must
// report nothing and leave the buffered flits intact. Coverage is printed as
// detected / injected; every fault must be detected.
module tb_fault_coverage;
  import fifo_test_pkg::*;
  localparam int unsigned DATA_W = DATA_W_DEF;
  localparam int unsigned DEPTH  = DEPTH_DEF;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0, test_req = 1'b0;
  logic [DATA_W-1:0] data_in = '0, data_out;
  logic full, empty, dout_valid, test_ctrl, test_done, fault_event, fault;
  logic [AW:0] count;
  logic [AW-1:0] fault_addr;
  logic [DATA_W-1:0] fault_mask;
  logic fi_en = 1'b0, fi_val = 1'b0;
  logic [AW-1:0] fi_addr = '0;
  logic [$clog2(DATA_W)-1:0] fi_bit = '0;

  int checks = 0, failures = 0, injected = 0, detected = 0;
  logic [DATA_W-1:0] flits [DEPTH];

  always #5 clk = ~clk;

  noc_fifo_buffer dut (.*);

  task automatic chk(input logic [DATA_W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Fill the buffer completely with random flits (pushes go through the FIFO,
  // so row k receives flit k after the buffer has been emptied at row 0).
  task automatic fill();
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      flits[k] = $urandom();
      push = 1'b1; data_in = flits[k];
    end
    @(negedge clk); push = 1'b0;
  endtask

  // Pop every flit and compare with what was pushed.
  task automatic drain_and_check();
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk); pop = 1'b1;
      @(negedge clk); pop = 1'b0;
      chk(32'(dout_valid), 1, "flit out");
      chk(data_out, flits[k], "flit survives test");
    end
  endtask

  task automatic run_test();
    @(negedge clk); test_req = 1'b1;
    @(negedge clk); test_req = 1'b0;
    while (test_ctrl) @(negedge clk);
  endtask

  task automatic drain_blind();
    while (!empty) begin
      @(negedge clk); pop = 1'b1;
      @(negedge clk); pop = 1'b0;
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    for (int v = 0; v < 2; v++) begin
      for (int r = 0; r < DEPTH; r++) begin
        for (int b = 0; b < DATA_W; b++) begin
          // the write address is back at row 0 whenever the buffer is empty
          // after a whole number of fills
          fill();
          @(negedge clk);
          fi_en = 1'b1; fi_addr = AW'(r); fi_bit = 5'(b); fi_val = v[0];
          run_test();
          injected++;
          chk(32'(fault), 1, "fault detected");
          chk(32'(fault_addr), 32'(r), "faulty row");
          chk(fault_mask, DATA_W'(1) << b, "faulty bit");
          if (fault && fault_addr == AW'(r) && fault_mask == (DATA_W'(1) << b)) detected++;
          fi_en = 1'b0;
          drain_blind();
        end
        // a fault-free test with flits buffered: nothing reported, flits intact
        fill();
        run_test();
        chk(32'(fault), 0, "no fault on repaired memory");
        drain_and_check();
      end
    end
    $display("stuck-at coverage: %0d of %0d single-cell faults detected", detected, injected);
    chk(32'(detected), 32'(2 * DEPTH * DATA_W), "full coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
