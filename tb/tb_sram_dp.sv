// tb_sram_dp: self-checking test of the dual-port SRAM. Fills every row with
// random words, reads them back and checks the one-cycle read latency, that
// rdata holds while re is low, read-before-write on a same-row collision, a
// simultaneous write and read of different rows, and the stuck-at injection
// (on read and on write). Expected values come from a plain array model.
module tb_sram_dp;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned AW     = 3;

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic fi_en = 1'b0, fi_val = 1'b0;
  logic [AW-1:0] fi_addr = '0;
  logic [4:0] fi_bit = '0;
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_dp #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input logic [DATA_W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input int a, input logic [DATA_W-1:0] d);
    @(negedge clk); we = 1'b1; waddr = AW'(a); wdata = d; re = 1'b0;
    @(negedge clk); we = 1'b0;
  endtask

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = $urandom();
      wr(a, model[a]);
    end
    // read back, one-cycle latency
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); re = 1'b1; raddr = AW'(a);
      @(posedge clk); #1;
      check(rdata, model[a], "read back");
      @(negedge clk); re = 1'b0; raddr = AW'((a + 1) % DEPTH);
      @(posedge clk); #1;
      check(rdata, model[a], "hold while re low");
    end
    // same-row write and read: old word is returned
    @(negedge clk); re = 1'b1; raddr = 3'd2; we = 1'b1; waddr = 3'd2; wdata = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    check(rdata, model[2], "read-before-write");
    model[2] = 32'hDEAD_BEEF;
    @(negedge clk); we = 1'b0;
    @(posedge clk); #1;
    check(rdata, model[2], "new word after write");
    // different rows in the same cycle
    @(negedge clk); re = 1'b1; raddr = 3'd5; we = 1'b1; waddr = 3'd6; wdata = 32'h1234_5678;
    @(posedge clk); #1;
    check(rdata, model[5], "parallel read");
    model[6] = 32'h1234_5678;
    @(negedge clk); we = 1'b0; raddr = 3'd6;
    @(posedge clk); #1;
    check(rdata, model[6], "parallel write");
    // stuck-at-1 on bit 7 of row 4, seen on read
    @(negedge clk); fi_en = 1'b1; fi_addr = 3'd4; fi_bit = 5'd7; fi_val = 1'b1;
    re = 1'b1; raddr = 3'd4;
    @(posedge clk); #1;
    check(rdata, model[4] | 32'h80, "stuck-at-1 read");
    // stuck-at-0 on bit 0 of row 1, written and read
    @(negedge clk); fi_addr = 3'd1; fi_bit = 5'd0; fi_val = 1'b0; re = 1'b0;
    we = 1'b1; waddr = 3'd1; wdata = 32'hFFFF_FFFF;
    @(negedge clk); we = 1'b0; fi_en = 1'b0; re = 1'b1; raddr = 3'd1;
    @(posedge clk); #1;
    check(rdata, 32'hFFFF_FFFE, "stuck-at-0 stored by write");
    // other rows untouched by injection
    @(negedge clk); raddr = 3'd4;
    @(posedge clk); #1;
    check(rdata, model[4], "row 4 after injection removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
