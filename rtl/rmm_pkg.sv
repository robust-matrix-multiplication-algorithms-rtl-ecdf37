// rmm_pkg: shared constants, types and schedule formulas of the robust
// tree-systolic matrix multiplier.
//
// The multiplier computes C = A x B for n x n matrices on a tree of 3n-2
// identical processors that is reached through a single I/O port. Every
// element enters and leaves through that port on a fixed schedule, so the
// cycle numbers below are the whole contract between the port and the array.
//
// Cycle convention used throughout: "pumped at t" means the element is on the
// port input during cycle t and is captured into the root buffer at the end of
// cycle t; "extracted at t" means the result is on the port output (the last
// stage of the root's C buffer) during cycle t.
//
// The schedule (explicit-initialisation form, 1 <= i,j <= n):
//   c_ij (zero)  pumped    2n(i+j-2) + 2(i-1)
//   b_ij         pumped    4(n^2-1) + 2(n+1)(i-1) - 2(j-1)
//   a_ij         pumped    2n(2n-3) + 2(n*j + i - 1)
//   c_ij result  extracted 2(3n-2)(n+1) + 2n(i+j-2) + 2(i-1)
// In the self-initialising form every time is reduced by 4n(n-1).
// Element width, accumulator width and index width are this design's choice.
package rmm_pkg;

  // Default problem size: the 3 x 3 example on the seven-node tree.
  localparam int unsigned DEF_N      = 3;
  localparam int unsigned DEF_DATA_W = 16;  // width of an A or B element
  localparam int unsigned DEF_ACC_W  = 32;  // width of a C element (wraps)
  localparam int unsigned IDX_W      = 8;   // row / column index width

  typedef logic [IDX_W-1:0] idx_t;

  // Processor number in a tree description (0 = no processor).
  typedef logic [15:0] node_t;

  // One slot of a port stream: which matrix element occupies this cycle.
  typedef struct packed {
    logic valid;
    idx_t row;   // 1-based
    idx_t col;   // 1-based
  } elem_tag_t;

  // Number of processors needed for an n x n product.
  function automatic int unsigned num_procs(input int unsigned n);
    return 3 * n - 2;
  endfunction

  // Depth of the reverse C buffer of every processor.
  function automatic int unsigned cbuf_depth(input int unsigned n);
    return 2 * n + 1;
  endfunction

  // Cycles saved by the self-initialising form.
  function automatic int unsigned init_cycles(input int unsigned n);
    return 4 * n * (n - 1);
  endfunction

  function automatic int unsigned t_pump_c(input int unsigned n, i, j);
    return 2 * n * (i + j - 2) + 2 * (i - 1);
  endfunction

  function automatic int unsigned t_pump_b(input int unsigned n, i, j);
    return 4 * (n * n - 1) + 2 * (n + 1) * (i - 1) - 2 * (j - 1);
  endfunction

  function automatic int unsigned t_pump_a(input int unsigned n, i, j);
    return 2 * n * (2 * n - 3) + 2 * (n * j + i - 1);
  endfunction

  function automatic int unsigned t_extract_c(input int unsigned n, i, j);
    return 2 * (3 * n - 2) * (n + 1) + 2 * n * (i + j - 2) + 2 * (i - 1);
  endfunction

endpackage
