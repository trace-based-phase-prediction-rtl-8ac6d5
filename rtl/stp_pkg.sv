// Shared constants and types of the super-trace phase-prediction controller.
//
// The controller watches the committed instruction stream of a two-backend
// core (Big out-of-order and Little in-order sharing one frontend), cuts
// it into super-traces at backward branches, predicts the next super-trace
// and, through a pattern history table, on which backend it should run.
//
// Sizes that come from the design description: 9-bit super-trace IDs
// (512-entry tables), 3-bit head-PC tags, 2-bit confidence and PHT counters,
// a 300-instruction minimum super-trace length, 12 hashed backedges and a
// 5% performance-loss target. PC width, counter widths and the number of
// regression metrics are this implementation's choice.
package stp_pkg;

  localparam int unsigned PC_W       = 32; // PC width (choice; Alpha is 64-bit, low bits suffice)
  localparam int unsigned ID_W       = 9;  // super-trace ID width
  localparam int unsigned HEAD_W     = 3;  // head-PC tag bits (PC[4:2])
  localparam int unsigned CONF_W     = 2;  // successor confidence counter
  localparam int unsigned NUM_BE     = 12; // backedges folded into the ID
  localparam int unsigned CYC_W      = 24; // per-super-trace cycle counts
  localparam int unsigned NUM_METRIC = 6;  // regression inputs
  localparam int unsigned METRIC_W   = 16; // width of one metric counter
  localparam int unsigned COEF_W     = 16; // signed regression coefficient, Q8.8

  typedef logic [ID_W-1:0]   strace_id_t;
  typedef logic [HEAD_W-1:0] head_tag_t;

  typedef enum logic {BACKEND_BIG = 1'b0, BACKEND_LITTLE = 1'b1} backend_e;

  // One successor slot of the next-super-trace table (14 bits).
  typedef struct packed {
    strace_id_t        id;
    head_tag_t         head;
    logic [CONF_W-1:0] conf;
  } succ_t;

  // One row of the next-super-trace table: two successors (28 bits).
  typedef struct packed {
    succ_t way1;
    succ_t way0;
  } succ_row_t;

  // Performance counters of one finished super-trace, as reported by the
  // backend it ran on.
  typedef struct packed {
    backend_e                            ran_on;   // backend that executed it
    logic [CYC_W-1:0]                    cycles;   // observed cycles
    logic [NUM_METRIC-1:0][METRIC_W-1:0] metric;   // regression inputs, see below
    // metric[0] committed instructions, [1] L1 data-cache misses,
    // [2] L2 misses, [3] branch mispredicts, [4] ILP estimate,
    // [5] MLP estimate / dependences on earlier super-traces
  } perf_sample_t;

  // Regression coefficients for one estimation direction: a constant term
  // in cycles, then one signed Q8.8 multiplier for the observed cycle count
  // (coef[0]) and one for each metric (coef[1+i] for metric[i]).
  typedef struct packed {
    logic signed [CYC_W-1:0]                  bias;
    logic        [NUM_METRIC:0][COEF_W-1:0]   coef;
  } regr_coef_t;

endpackage
