// pars_pkg: sizes and shared definitions of the PARS control plane for a
// Benes switch fabric built from 2x2 microring (MRR) switching elements.
//
// A switching element is in one of two states, encoded as in the route
// vectors of the route search: Bar = 0 (signal stays on the through port),
// Cross = 1 (signal is dropped to the other output). An N x N Benes network
// (N a power of two, N >= 2) has 2*log2(N)-1 stages of N/2 elements, that is
// N*log2(N) - N/2 elements in all, and N/2 distinct routes between any input
// and any output. Every route crosses exactly one element per stage.
//
// Switching elements are numbered row by row: element (row r, stage t) has
// index r*STAGES + t. For the 4x4 network this gives S0 S1 S2 along the top
// row and S3 S4 S5 along the bottom row, as in the usual 4x4 drawing.
package pars_pkg;

  typedef enum logic {
    SW_BAR   = 1'b0,
    SW_CROSS = 1'b1
  } sw_state_e;

  // log2 of the radix, at least 1
  function automatic int benes_log2(input int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // number of switching stages
  function automatic int benes_stages(input int n);
    return 2 * benes_log2(n) - 1;
  endfunction

  // number of 2x2 switching elements: N*log2(N) - N/2
  function automatic int benes_switches(input int n);
    return (n / 2) * benes_stages(n);
  endfunction

  // number of distinct routes between one input and one output
  function automatic int benes_routes(input int n);
    return n / 2;
  endfunction

  // width of an index that can hold values 0..v-1 (at least 1 bit)
  function automatic int idx_w(input int v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
