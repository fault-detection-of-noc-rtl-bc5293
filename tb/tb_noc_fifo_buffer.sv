// tb_noc_fifo_buffer: end-to-end test of the testable router input buffer at
// its default parameters (32-bit words, depth 8, test period 4096 cycles).
//
// Phase 1: random flit traffic for 20000 cycles, with occasional test
// requests on top of the periodic tests. A queue model checks every flit that
// leaves (order and value, data_out one cycle after the accepted pop), the
// full/empty flags and the count against the model occupancy, that nothing
// is accepted while a test runs, and that buffered flits survive each test.
// Phase 2: with the buffer drained, stuck-at cells are injected one at a
// time and a requested test must report the faulty row and bit; a following
// test of the repaired memory must report no fault.
// Each mechanism is counted, and a mechanism that never happened is a failure:
// push, pop, simultaneous push and pop, push refused when full, pop refused
// when empty, address wrap-around, periodic test, requested test, request held
// while a test runs, test with flits buffered, traffic paused by a test, and
// fault detection.
module tb_noc_fifo_buffer;
  import fifo_test_pkg::*;
  localparam int unsigned DATA_W = DATA_W_DEF;
  localparam int unsigned DEPTH  = DEPTH_DEF;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned PERIOD = 4096;
  localparam int unsigned TEST_CYCLES = 6 * DEPTH + 1;

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

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] q [$];
  logic [DATA_W-1:0] exp_out;
  bit exp_valid = 0;
  int cycle = 0, last_test_end = 0, busy_len = 0;

  // mechanism counters
  int n_push = 0, n_pop = 0, n_both = 0, n_full_block = 0, n_empty_block = 0;
  int n_wrap = 0, n_periodic = 0, n_requested = 0, n_held_req = 0;
  int n_test_with_data = 0, n_paused = 0, n_detect = 0;

  always #5 clk = ~clk;

  noc_fifo_buffer dut (.*);

  task automatic chk(input logic [DATA_W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %h expected %h", what, cycle, got, exp);
    end
  endtask

  // One clock cycle of traffic. Inputs are set after the falling edge and the
  // model is updated from what the buffer accepts at the next rising edge.
  task automatic step(input int p_push, input int p_pop, input bit req);
    bit acc_push, acc_pop;
    @(negedge clk);
    // data_out check for the pop accepted in the previous cycle
    chk(32'(dout_valid), 32'(exp_valid), "dout_valid");
    if (exp_valid) chk(32'(data_out), 32'(exp_out), "flit order/value");
    push = ($urandom_range(0, 99) < p_push);
    pop  = ($urandom_range(0, 99) < p_pop);
    data_in = $urandom();
    test_req = req;
    #1;
    // flags against the model
    if (!test_ctrl) begin
      chk(32'(full),  32'(q.size() == DEPTH), "full flag");
      chk(32'(empty), 32'(q.size() == 0),     "empty flag");
      chk(32'(count), 32'(q.size()), "count");
    end else begin
      chk(32'({full, empty}), 32'(2'b11), "flags forced during test");
      if (push || pop) n_paused++;
    end
    if (req && test_ctrl) n_held_req++;
    acc_push = push && !full;
    acc_pop  = pop && !empty;
    if (push && full && !test_ctrl) n_full_block++;
    if (pop && empty && !test_ctrl) n_empty_block++;
    if (acc_push && acc_pop) n_both++;
    exp_valid = acc_pop;
    if (acc_pop) begin
      exp_out = q.pop_front();
      n_pop++;
    end
    if (acc_push) begin
      q.push_back(data_in);
      n_push++;
    end
    if (acc_push && (n_push % DEPTH) == 0) n_wrap++;
    @(posedge clk);
    cycle++;
  endtask

  // test activity monitor: duration, periodic vs requested starts
  bit req_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (test_req) req_seen <= 1'b1;
    if (test_ctrl) begin
      if (busy_len == 0) begin
        if (req_seen || test_req) n_requested++;
        else n_periodic++;
        req_seen <= 1'b0;
        if (q.size() > 0) n_test_with_data++;
      end
      busy_len++;
      if (test_done) begin
        chk(32'(busy_len), 32'(TEST_CYCLES), "test duration");
        busy_len = 0;
      end
    end
    if (fault_event && !fi_en) begin
      failures++;
      $display("FAIL fault reported on a fault-free memory at cycle %0d", cycle);
    end
  end

  task automatic wait_test_end();
    do step(0, 0, 0); while (!test_ctrl);
    do step(0, 0, 0); while (test_ctrl);
  endtask

  initial begin
    #12 rst_n = 1'b1;
    // Phase 1: traffic with periodic and requested tests
    for (int c = 0; c < 20000; c++) begin
      int pp, pq;
      // alternate between filling and draining stretches
      if ((c / 300) % 2 == 0) begin pp = 70; pq = 40; end
      else                    begin pp = 35; pq = 70; end
      step(pp, pq, (c % 6000) == 5000 || (c % 6000) == 5020);
    end
    // drain
    while (q.size() > 0 || exp_valid) step(0, 100, 0);
    // Phase 2: fault detection
    for (int n = 0; n < 6; n++) begin
      int row, bitpos;
      row = $urandom_range(0, DEPTH - 1);
      bitpos = $urandom_range(0, DATA_W - 1);
      @(negedge clk);
      fi_en = 1'b1; fi_addr = AW'(row); fi_bit = 5'(bitpos); fi_val = n[0];
      step(0, 0, 1);
      wait_test_end();
      chk(32'(fault), 1, "fault detected");
      chk(32'(fault_addr), 32'(row), "faulty row");
      chk(32'(fault_mask), 32'(DATA_W'(1) << bitpos), "faulty bit");
      if (fault && fault_addr == AW'(row)) n_detect++;
      @(negedge clk); fi_en = 1'b0;
    end
    step(0, 0, 1);
    wait_test_end();
    chk(32'(fault), 0, "no fault after repair");
    // traffic still works after the fault phase
    for (int c = 0; c < 200; c++) step(50, 50, 0);
    while (q.size() > 0 || exp_valid) step(0, 100, 0);

    $display("mechanisms: push=%0d pop=%0d push+pop=%0d full_block=%0d empty_block=%0d wrap=%0d",
             n_push, n_pop, n_both, n_full_block, n_empty_block, n_wrap);
    $display("mechanisms: periodic_test=%0d requested_test=%0d held_request=%0d test_with_data=%0d paused=%0d detected=%0d",
             n_periodic, n_requested, n_held_req, n_test_with_data, n_paused, n_detect);
    checks++; if (n_push == 0)           begin failures++; $display("FAIL never: push"); end
    checks++; if (n_pop == 0)            begin failures++; $display("FAIL never: pop"); end
    checks++; if (n_both == 0)           begin failures++; $display("FAIL never: push and pop"); end
    checks++; if (n_full_block == 0)     begin failures++; $display("FAIL never: full"); end
    checks++; if (n_empty_block == 0)    begin failures++; $display("FAIL never: empty"); end
    checks++; if (n_wrap == 0)           begin failures++; $display("FAIL never: wrap"); end
    checks++; if (n_periodic == 0)       begin failures++; $display("FAIL never: periodic test"); end
    checks++; if (n_requested == 0)      begin failures++; $display("FAIL never: requested test"); end
    checks++; if (n_held_req == 0)       begin failures++; $display("FAIL never: held request"); end
    checks++; if (n_test_with_data == 0) begin failures++; $display("FAIL never: test with data"); end
    checks++; if (n_paused == 0)         begin failures++; $display("FAIL never: paused traffic"); end
    checks++; if (n_detect == 0)         begin failures++; $display("FAIL never: fault detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
