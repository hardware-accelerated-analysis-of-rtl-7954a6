// e2erta_pkg: types and constants shared by the end-to-end response time
// analysis (E2ERTA) accelerator.
//
// Times (computation times c, periods t, deadlines d, packet lengths L,
// response times r and R) are unsigned integers of TW bits, in the same unit
// (typically clock cycles of the analysed NoC). Utilisations c/t are fixed
// point numbers with FRAC fraction bits, saturated at 1.0. These widths are
// choices of this design; the analysis itself does not fix them.
//
// Tasks and flows are identified by their index in the input tables, and the
// index is also their priority: index 0 is the highest priority. Core ids
// number the mesh column by column: core = col * MESH_ROWS + row, row 0 at
// the top edge, which is the numbering of the 3x3 example mesh (IP(0)..IP(8)).
package e2erta_pkg;

  localparam int unsigned TW    = 32;   // width of every time value
  localparam int unsigned FRAC  = 16;   // fraction bits of a utilisation
  localparam int unsigned CW    = 8;    // width of a core id (up to 256 cores)
  localparam int unsigned IW    = 8;    // width of a task/flow index
  localparam int unsigned UW    = FRAC + 1;       // utilisation, 0 .. 1.0
  localparam logic [UW-1:0] U_ONE = UW'(1) << FRAC;

  typedef logic [TW-1:0] time_t;
  typedef logic [UW-1:0] util_t;
  typedef logic [CW-1:0] core_t;
  typedef logic [IW-1:0] idx_t;

  // One row of the task table: the task mapping (core) and the task
  // information (c, t, d).
  typedef struct packed {
    core_t core;   // processing core the task is mapped on
    time_t c;      // worst-case computation time
    time_t t;      // period (must be non-zero)
    time_t d;      // deadline
  } task_info_t;

  // One row of the application table: a packet flow from an initial task to
  // a destination task carrying a packet of len flits.
  typedef struct packed {
    idx_t  src;    // initial (sending) task
    idx_t  dst;    // destination (receiving) task
    time_t len;    // packet length L in flits
  } flow_info_t;

  // Assembly schemes: which speed-up components run before the exact test.
  typedef enum logic [1:0] {
    SCHEME_E2ERTA  = 2'b00,  // exact recurrence only
    SCHEME_PRE     = 2'b01,  // PRE upper bound, exact recurrence if it fails
    SCHEME_NLB     = 2'b10,  // exact recurrence started at the lower bound
    SCHEME_PRENLB  = 2'b11   // PRE, then NLB-started recurrence
  } scheme_e;

  // Number of unidirectional links of a cols x rows mesh, counting the
  // injection and ejection link of every core.
  function automatic int unsigned num_links(int unsigned cols, int unsigned rows);
    return 2 * cols * rows + 2 * cols * (rows - 1) + 2 * rows * (cols - 1);
  endfunction

endpackage
