// route_lut: table of every route of an N x N Benes network.
//
// For each input-output pair c = (in_port, out_port) the table holds the list
// L_c of all N/2 routes. A route is a pair of S-bit vectors: cfg gives the
// state each element on the path must take (Bar 0, Cross 1) and mask marks
// the elements the path passes through (one per stage). Elements off the
// path are don't-care in cfg and read as 0.
//
// The contents are produced at elaboration by the route search: the network
// is taken apart recursively. The outer stages of an n x n Benes network
// connect the upper output of first-stage element j to input j of the upper
// n/2 sub-network and the lower output to input j of the lower one, and
// mirror this on the last stage. Route bit k[level] (most significant bit
// for the outermost level) says whether the route uses the upper (0) or lower
// (1) sub-network at that level, which fixes the state of the first- and
// last-stage element it passes; the 2x2 centre element then connects the
// remaining input to the remaining output. The table is a ROM of N*N*(N/2)
// entries, read combinationally.
//
// Interface: in_port, out_port select c; route_cfg[k], route_mask[k] are
// route k of L_c. No clock.
module route_lut #(
  parameter int N = 8,
  localparam int S   = pars_pkg::benes_switches(N),
  localparam int R   = pars_pkg::benes_routes(N),
  localparam int PW  = pars_pkg::benes_log2(N)
) (
  input  logic [PW-1:0]       in_port,
  input  logic [PW-1:0]       out_port,
  output logic [R-1:0][S-1:0] route_cfg,
  output logic [R-1:0][S-1:0] route_mask
);

  localparam int LOGN   = pars_pkg::benes_log2(N);
  localparam int STAGES = pars_pkg::benes_stages(N);

  // Route k from input i to output o: element states (sel = 0) or the
  // elements on the path (sel = 1).
  function automatic logic [S-1:0] benes_route(input int i, input int o,
                                               input int k, input bit sel);
    logic [S-1:0] r_cfg, r_mask;
    int n, row_off, ii, oo, sub, lvl;
    r_cfg = '0;
    r_mask = '0;
    n = N;
    row_off = 0;
    ii = i;
    oo = o;
    for (lvl = 0; lvl < LOGN - 1; lvl++) begin
      sub = (k >> (LOGN - 2 - lvl)) & 1;
      // first-stage element of this sub-network, stage lvl
      r_cfg[(row_off + ii / 2) * STAGES + lvl]  = 1'((ii % 2) ^ sub);
      r_mask[(row_off + ii / 2) * STAGES + lvl] = 1'b1;
      // last-stage element of this sub-network, stage STAGES-1-lvl
      r_cfg[(row_off + oo / 2) * STAGES + (STAGES - 1 - lvl)]  = 1'((oo % 2) ^ sub);
      r_mask[(row_off + oo / 2) * STAGES + (STAGES - 1 - lvl)] = 1'b1;
      row_off = row_off + sub * (n / 4);
      ii = ii / 2;
      oo = oo / 2;
      n = n / 2;
    end
    // centre 2x2 element
    r_cfg[row_off * STAGES + (LOGN - 1)]  = 1'(ii ^ oo);
    r_mask[row_off * STAGES + (LOGN - 1)] = 1'b1;
    return sel ? r_mask : r_cfg;
  endfunction

  logic [R-1:0][S-1:0] rom_cfg  [N*N];
  logic [R-1:0][S-1:0] rom_mask [N*N];

  for (genvar gi = 0; gi < N; gi++) begin : g_in
    for (genvar go = 0; go < N; go++) begin : g_out
      for (genvar gk = 0; gk < R; gk++) begin : g_route
        localparam logic [S-1:0] CFG  = benes_route(gi, go, gk, 1'b0);
        localparam logic [S-1:0] MASK = benes_route(gi, go, gk, 1'b1);
        assign rom_cfg[gi*N + go][gk]  = CFG;
        assign rom_mask[gi*N + go][gk] = MASK;
      end
    end
  end

  always_comb begin
    route_cfg  = rom_cfg[{in_port, out_port}];
    route_mask = rom_mask[{in_port, out_port}];
  end

endmodule
