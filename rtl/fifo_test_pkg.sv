// fifo_test_pkg: types and default sizes shared by the testable NoC input
// buffer. The buffer word is 32 bits wide, as specified for the router's FIFO
// buffer. The depth of 8 words is this design's own choice: the specification
// leaves the depth open.
// The test-run enum names the three passes of the transparent SOA-MATS++ test
// (invert, restore, verify) that are applied to every FIFO row.
package fifo_test_pkg;

  localparam int unsigned DATA_W_DEF = 32;
  localparam int unsigned DEPTH_DEF  = 8;

  // State of the transparent test controller.
  typedef enum logic [1:0] {
    T_IDLE = 2'd0,  // normal FIFO operation
    T_READ = 2'd1,  // read request for row i issued to the memory
    T_EVAL = 2'd2,  // read word available: save / compare / write back
    T_DONE = 2'd3   // all rows tested, one-cycle completion
  } test_state_e;

  // Test run j of Algorithm 1 for the current row.
  typedef enum logic [1:0] {
    RUN_INVERT  = 2'd0,  // j = 0: original <= word, write ~word
    RUN_RESTORE = 2'd1,  // j = 1: compare (expect all ones), write ~word
    RUN_VERIFY  = 2'd2   // j = 2: compare (expect all zeros)
  } test_run_e;

endpackage
