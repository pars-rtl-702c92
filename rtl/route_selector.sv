// route_selector: picks the lowest-power route of a list of candidates.
//
// Each candidate route k is compared bit by bit with the default-state
// vector D using XNOR: R_D = route_cfg[k] XNOR D is 1 where an element of
// the route is already in its default state and 0 where the route forces it
// into the other, more power-hungry state. Only the elements the route
// passes through count (route_mask), so the cost of route k is the number of
// path elements with R_D = 0. All R costs are formed in parallel and a
// linear scan keeps the first route whose cost is strictly below the best so
// far, so ties go to the lower route index.
//
// The chosen configuration sets the path elements as the route needs and
// leaves every other element in its default state, where it draws the least
// power. With D = 0 (all elements Bar by default) this is the
// configuration-aware mechanism: fewest elements in Cross. With D from the
// trimming classifier it is the trimming-aware mechanism.
//
// Interface: d, route_cfg[k], route_mask[k] in; sel_idx, sel_cfg (S-bit
// fabric configuration) and sel_cost out. Purely combinational.
module route_selector #(
  parameter int S = 20,   // number of switching elements
  parameter int R = 4,    // number of candidate routes
  parameter int P = 5,    // elements on one route (stages)
  localparam int IW = pars_pkg::idx_w(R),
  localparam int CW = $clog2(P + 1)
) (
  input  logic [S-1:0]        d,
  input  logic [R-1:0][S-1:0] route_cfg,
  input  logic [R-1:0][S-1:0] route_mask,
  output logic [IW-1:0]       sel_idx,
  output logic [S-1:0]        sel_cfg,
  output logic [CW-1:0]       sel_cost
);

  logic [R-1:0][S-1:0]  r_d;    // R XNOR D
  logic [R-1:0][CW-1:0] cost;

  always_comb begin
    for (int k = 0; k < R; k++) begin
      r_d[k]  = ~(route_cfg[k] ^ d);
      cost[k] = '0;
      for (int s = 0; s < S; s++) begin
        cost[k] = cost[k] + CW'(route_mask[k][s] && !r_d[k][s]);
      end
    end
  end

  always_comb begin
    sel_idx  = '0;
    sel_cost = cost[0];
    for (int k = 1; k < R; k++) begin
      if (cost[k] < sel_cost) begin
        sel_idx  = IW'(k);
        sel_cost = cost[k];
      end
    end
    sel_cfg = (route_cfg[sel_idx] & route_mask[sel_idx]) | (d & ~route_mask[sel_idx]);
  end

endmodule
