// benes_model_pkg: behavioural model of an N x N Benes fabric of 2x2
// switching elements, used by the testbenches as an independent reference.
//
// The model follows light through the fabric stage by stage on numbered
// lines 0..N-1. At stage t, element (row r) joins lines 2r and 2r+1; Bar
// keeps a signal on its line, Cross swaps the pair. Between stages the lines
// are permuted: in the left half (t < log2N-1) a block of m = N>>t lines
// sends local line 2j+q to local line q*m/2 + j (upper outputs to the upper
// half, lower outputs to the lower half); the right half applies the inverse
// permutations in mirror order. Element (row r, stage t) has index
// r*STAGES + t. An exhaustive search over the state of the one element met
// per stage gives every route between two ports and the least number of
// elements a route must move away from a given default-state vector.
package benes_model_pkg;

  localparam int MAXS = 512;   // enough for N up to 64
  typedef logic [MAXS-1:0] vec_t;

  function automatic int lg(input int n);
    int l = 0;
    while ((1 << l) < n) l++;
    return (l < 1) ? 1 : l;
  endfunction

  function automatic int stages(input int n);
    return 2 * lg(n) - 1;
  endfunction

  // line permutation between stage t and stage t+1
  function automatic int next_line(input int n, input int t, input int line);
    int l = lg(n);
    int m, b, loc, tt;
    if (t < l - 1) begin
      m   = n >> t;
      b   = line / m;
      loc = line % m;
      return b * m + (loc % 2) * (m / 2) + loc / 2;
    end else begin
      tt  = 2 * l - 3 - t;
      m   = n >> tt;
      b   = line / m;
      loc = line % m;
      return b * m + 2 * (loc % (m / 2)) + loc / (m / 2);
    end
  endfunction

  // output reached from input `in` under configuration cfg; path gets the
  // elements passed
  function automatic int trace(input int n, input vec_t cfg, input int in,
                               output vec_t path);
    int st = stages(n);
    int line = in;
    int e;
    path = '0;
    for (int t = 0; t < st; t++) begin
      e = (line / 2) * st + t;
      path[e] = 1'b1;
      if (cfg[e]) line = line ^ 1;
      if (t < st - 1) line = next_line(n, t, line);
    end
    return line;
  endfunction

  // all routes from `in` to `out`: number found and least cost against d
  // (elements on the path whose required state differs from d)
  function automatic void search(input int n, input vec_t d, input int in,
                                 input int out, output int count,
                                 output int min_cost);
    int st = stages(n);
    int line, e, cost;
    count = 0;
    min_cost = 1 << 30;
    for (int c = 0; c < (1 << st); c++) begin
      line = in;
      cost = 0;
      for (int t = 0; t < st; t++) begin
        e = (line / 2) * st + t;
        if (c[t]) line = line ^ 1;
        if (c[t] != d[e]) cost++;
        if (t < st - 1) line = next_line(n, t, line);
      end
      if (line == out) begin
        count++;
        if (cost < min_cost) min_cost = cost;
      end
    end
  endfunction

  // elements on the path of cfg whose state differs from d
  function automatic int path_cost(input vec_t cfg, input vec_t path,
                                   input vec_t d);
    return $countones(path & (cfg ^ d));
  endfunction

endpackage
