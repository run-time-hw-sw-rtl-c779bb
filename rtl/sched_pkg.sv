// sched_pkg: types, constants and the default task graph shared by the run-time
// HW/SW scheduler.
//
// A task is mapped to one of three processing units. The scheduler receives the
// mapping as two bits per task, SW and HW, and decodes them here:
//   SW=1        -> master processor (MS)
//   SW=0, HW=1  -> reconfigurable computing unit (RCU, hardware task)
//   SW=0, HW=0  -> slave processor (SL)
// The two-bit coding of the three units follows the scheduler's interface; which
// combination means which unit is this design's choice.
//
// The package also holds the default data-flow graph: the 20-task motion-detection
// graph ("icam_complex") used as the main example of the scheduler. A graph is an
// N x N bit matrix, dfg[p][s] = 1 when task s depends on task p (row = predecessor,
// column = successor). Task k of the drawing is index k-1.
package sched_pkg;

  // Largest task count the graph type below can describe; modules use its
  // top-left N x N corner.
  localparam int unsigned MAX_TASKS = 32;

  typedef enum logic [1:0] {
    UNIT_SL = 2'b00,
    UNIT_HW = 2'b01,
    UNIT_MS = 2'b10
  } unit_e;

  // Decode the SW/HW pair of one task into its unit.
  function automatic unit_e unit_of(input logic sw, input logic hw);
    if (sw)      return UNIT_MS;
    else if (hw) return UNIT_HW;
    else         return UNIT_SL;
  endfunction

  typedef logic [MAX_TASKS-1:0][MAX_TASKS-1:0] dfg_t;

  // Edge helper: tasks numbered from 1 as in the drawings.
  function automatic dfg_t add_edge(input dfg_t g, input int p, input int s);
    dfg_t r;
    r = g;
    r[p-1][s-1] = 1'b1;
    return r;
  endfunction

  // 20-task motion-detection graph: tasks 1..10 are the real processing chain
  // (averaging, subtraction, threshold, erosion/dilation, reconstruction,
  // dilation, labeling, covering, motion test, background update); tasks 11..20
  // are added fork/join structure.
  function automatic dfg_t icam_complex_dfg();
    dfg_t g;
    g = '0;
    g = add_edge(g, 1, 2);   g = add_edge(g, 1, 11);
    g = add_edge(g, 2, 3);   g = add_edge(g, 3, 4);
    g = add_edge(g, 4, 5);   g = add_edge(g, 4, 15);
    g = add_edge(g, 5, 6);
    g = add_edge(g, 6, 7);   g = add_edge(g, 6, 17);
    g = add_edge(g, 7, 8);   g = add_edge(g, 7, 19);
    g = add_edge(g, 8, 9);   g = add_edge(g, 9, 10);
    g = add_edge(g, 11, 12);
    g = add_edge(g, 12, 4);  g = add_edge(g, 12, 13); g = add_edge(g, 12, 14);
    g = add_edge(g, 13, 15); g = add_edge(g, 14, 16);
    g = add_edge(g, 15, 17);
    g = add_edge(g, 16, 17); g = add_edge(g, 16, 18);
    g = add_edge(g, 18, 19);
    g = add_edge(g, 19, 9);  g = add_edge(g, 19, 20);
    g = add_edge(g, 20, 10);
    return g;
  endfunction

  localparam dfg_t ICAM_COMPLEX_DFG = icam_complex_dfg();

endpackage
