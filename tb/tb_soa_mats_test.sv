// tb_soa_mats_test: checks the transparent SOA-MATS++ test circuit against a
// memory model held in this testbench (synchronous read, one stuck-at cell
// that can be switched on).
//  - Access order: for every row, read, write ~original, read, write
//    original, read, with the row addresses 0 .. DEPTH-1 in turn; the
//    written words are checked against the word saved before the test.
//  - Cycle count: busy for 6*DEPTH+1 cycles, done in the last of them.
//  - Transparency: a fault-free memory holds the same words after the test.
//  - Detection: a stuck-at-0 or stuck-at-1 cell at a random row and bit must
//    give fault = 1, fault_addr = row and fault_mask = that bit only.
module tb_soa_mats_test;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned AW     = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, t_re, t_we, err_pulse, fault;
  logic [AW-1:0] t_raddr, t_waddr, fault_addr;
  logic [DATA_W-1:0] t_rdata, t_wdata, fault_mask;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] saved [DEPTH];
  logic fi_en = 1'b0, fi_val = 1'b0;
  int fi_row = 0, fi_bit = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  soa_mats_test #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  function automatic logic [DATA_W-1:0] stuck_cell(input logic [DATA_W-1:0] w, input int row);
    if (fi_en && row == fi_row) w[fi_bit] = fi_val;
    return w;
  endfunction

  // memory model
  always @(posedge clk) begin
    if (t_we) mem[t_waddr] <= stuck_cell(t_wdata, int'(t_waddr));
    if (t_re) t_rdata <= stuck_cell(mem[t_raddr], int'(t_raddr));
  end

  task automatic chk(input logic [DATA_W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Runs one test and checks its accesses and duration.
  task automatic run_test(input bit check_access);
    int busy_cycles = 0, nr = 0, nw = 0;
    bit seen_done = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (busy) begin
      // expected access in this cycle: cycle k of the test, row k/6, step k%6
      int k, row, step;
      k = busy_cycles; row = k / 6; step = k % 6;
      if (k < 6 * DEPTH && check_access) begin
        chk(32'(t_re), 32'((step % 2) == 0), "read request slot");
        chk(32'(t_we), 32'(step == 1 || step == 3), "write slot");
        if (t_re) chk(32'(t_raddr), 32'(row), "read row");
        if (t_we) begin
          chk(32'(t_waddr), 32'(row), "write row");
          chk(32'(t_wdata), 32'(step == 1 ? ~saved[row] : saved[row]), "written word");
        end
      end
      if (t_re) nr++;
      if (t_we) nw++;
      if (done) begin
        seen_done = 1;
        chk(32'(busy_cycles), 32'(6 * DEPTH), "done in last busy cycle");
      end
      busy_cycles++;
      @(negedge clk);
    end
    chk(32'(busy_cycles), 32'(6 * DEPTH + 1), "test duration");
    chk(32'(seen_done), 1, "done seen");
    chk(32'(nr), 32'(3 * DEPTH), "reads per test");
    chk(32'(nw), 32'(2 * DEPTH), "writes per test");
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      mem[a] = $urandom();
      saved[a] = mem[a];
    end
    #12 rst_n = 1'b1;
    chk(32'(busy), 0, "idle after reset");
    // fault-free run
    run_test(1);
    chk(32'(fault), 0, "no fault in fault-free memory");
    for (int a = 0; a < DEPTH; a++) chk(32'(mem[a]), 32'(saved[a]), "contents restored");
    // stuck-at faults
    for (int n = 0; n < 8; n++) begin
      fi_row = $urandom_range(0, DEPTH - 1);
      fi_bit = $urandom_range(0, DATA_W - 1);
      fi_val = n[0];
      fi_en  = 1'b1;
      run_test(0);
      chk(32'(fault), 1, "stuck-at fault detected");
      chk(32'(fault_addr), 32'(fi_row), "faulty row");
      chk(32'(fault_mask), 32'(DATA_W'(1) << fi_bit), "faulty bit");
      fi_en = 1'b0;
      for (int a = 0; a < DEPTH; a++) begin
        mem[a] = $urandom();
        saved[a] = mem[a];
      end
    end
    // fault flag is cleared by the next fault-free test
    run_test(1);
    chk(32'(fault), 0, "fault cleared by next test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
