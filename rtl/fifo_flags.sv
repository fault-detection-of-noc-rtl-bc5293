// fifo_flags: full and empty detection for the circular-buffer FIFO. The FIFO
// is empty when the read and write addresses are equal and both have traversed
// the buffer the same number of times (equal lap bits). It is full when the
// addresses are equal but the write side has made one more traversal (lap bits
// differ). The occupancy count is also produced for observation.
//
// Purely combinational; both flags are never high together.
module fifo_flags #(
  parameter int unsigned DEPTH = fifo_test_pkg::DEPTH_DEF,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [AW-1:0]   waddr,
  input  logic            wlap,
  input  logic [AW-1:0]   raddr,
  input  logic            rlap,
  output logic            full,
  output logic            empty,
  output logic [AW:0]     count
);

  always_comb begin
    empty = (waddr == raddr) && (wlap == rlap);
    full  = (waddr == raddr) && (wlap != rlap);
    if (wlap == rlap) count = (AW+1)'(waddr) - (AW+1)'(raddr);
    else              count = (AW+1)'(DEPTH) + (AW+1)'(waddr) - (AW+1)'(raddr);
    a_not_full_and_empty: assert (!(full && empty));
  end

endmodule
