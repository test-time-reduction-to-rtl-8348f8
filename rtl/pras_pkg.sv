// pras_pkg: types shared by the progressive random-access scan (PRAS) test logic.
//
// A PRAS test sequencer receives one command per two-pattern path-delay test. The command kind
// selects which steps of the test procedure run:
//   CMD_INDEP  - an independent test (I, J): row reads and difference writes of I, I apply,
//                optional P load, difference writes of J, J apply, Q latch.
//   CMD_LINK   - the next test of a linked test set: only J writes, J apply and Q latch.
//   CMD_UNLOAD - row reads only, to observe the result of the last test.
// The statistics record is returned when a command completes. Field widths are this design's
// choice and hold the counts of arrays of up to 65535 flip-flops.
package pras_pkg;

  typedef enum logic [1:0] {
    CMD_INDEP  = 2'd0,
    CMD_LINK   = 2'd1,
    CMD_UNLOAD = 2'd2
  } pras_cmd_kind_e;

  typedef struct packed {
    logic [15:0] n_wi;      // flip-flop writes spent on the initializing vector I
    logic [15:0] n_wj;      // flip-flop writes spent on the transition vector J
    logic [15:0] n_read;    // row reads
    logic        p_loaded;  // the response P was loaded into L1 (Step 2b)
    logic [31:0] cycles;    // clock cycles from the first to the last step of the command
  } pras_stats_t;

endpackage
