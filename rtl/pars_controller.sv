// pars_controller: PARS power-aware route selection for an N x N Benes
// fabric of microring switching elements.
//
// Because of process and thermal variations, some switching elements need
// less trimming power in Cross than in Bar. The controller therefore keeps a
// per-element default state D and, for every connection request, chooses
// among all routes of the requested input-output pair the one that forces
// the fewest elements out of their default state.
//
// Structure:
//   trim_classifier  P_TB / P_TC codes -> candidate default-state vector
//   D register       loaded from the classifier when trim_load is 1
//   route_lut        all N/2 routes of the requested pair (read in parallel)
//   route_selector   XNOR with D, count mismatches on the path, take the min
//   output register  fabric configuration, route index and cost
//
// Modes: mode_ca = 0 selects the trimming-aware mechanism (D as loaded);
// mode_ca = 1 selects the configuration-aware mechanism, which treats every
// element as Bar by default (D = 0) and so minimises the number of elements
// set to Cross. The mode is sampled with each request.
//
// Timing: a request (req_valid with req_in, req_out) is accepted on every
// clock edge; its result appears one cycle later with cfg_valid = 1.
// trim_load updates D at the same edge, so a request in the cycle of a load
// still uses the previous D. Reset (rst_n low, synchronous) sets D to all
// Bar, the as-designed default, and clears cfg_valid and cfg to all Bar.
// cfg holds its last value when no request is made.
//
// The selection rule, the XNOR comparison, the route table and the two
// mechanisms follow PARS; the clocking, the D register, the request
// interface, the tie rule (lowest route index) and setting elements off the
// chosen path to their default state are this design's choices.
module pars_controller #(
  parameter int N  = 8,   // fabric radix (power of two)
  parameter int TW = 8,   // width of a trimming-power code
  localparam int S  = pars_pkg::benes_switches(N),
  localparam int R  = pars_pkg::benes_routes(N),
  localparam int P  = pars_pkg::benes_stages(N),
  localparam int PW = pars_pkg::benes_log2(N),
  localparam int IW = pars_pkg::idx_w(R),
  localparam int CW = $clog2(P + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // trimming-power codes of every element, loaded into D on trim_load
  input  logic                trim_load,
  input  logic [S-1:0][TW-1:0] p_tb,
  input  logic [S-1:0][TW-1:0] p_tc,
  // mechanism: 0 trimming-aware, 1 configuration-aware
  input  logic                mode_ca,
  // connection request
  input  logic                req_valid,
  input  logic [PW-1:0]       req_in,
  input  logic [PW-1:0]       req_out,
  // fabric configuration (Bar 0, Cross 1 per element)
  output logic                cfg_valid,
  output logic [S-1:0]        cfg,
  output logic [IW-1:0]       cfg_route,
  output logic [CW-1:0]       cfg_cost,
  output logic [S-1:0]        default_state
);

  // the Benes construction needs a power-of-two radix of at least 2
  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_radix
    $error("pars_controller: N = %0d is not a power of two >= 2", N);
  end

  logic [S-1:0]        d_new;
  logic [S-1:0]        d_q;
  logic [S-1:0]        d_eff;
  logic [R-1:0][S-1:0] route_cfg;
  logic [R-1:0][S-1:0] route_mask;
  logic [IW-1:0]       sel_idx;
  logic [S-1:0]        sel_cfg;
  logic [CW-1:0]       sel_cost;

  trim_classifier #(.S(S), .TW(TW)) u_classifier (
    .p_tb (p_tb),
    .p_tc (p_tc),
    .d    (d_new)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q <= '0;
    end else if (trim_load) begin
      d_q <= d_new;
    end
  end

  assign d_eff         = mode_ca ? '0 : d_q;
  assign default_state = d_q;

  route_lut #(.N(N)) u_lut (
    .in_port    (req_in),
    .out_port   (req_out),
    .route_cfg  (route_cfg),
    .route_mask (route_mask)
  );

  route_selector #(.S(S), .R(R), .P(P)) u_selector (
    .d          (d_eff),
    .route_cfg  (route_cfg),
    .route_mask (route_mask),
    .sel_idx    (sel_idx),
    .sel_cfg    (sel_cfg),
    .sel_cost   (sel_cost)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_valid <= 1'b0;
      cfg       <= '0;
      cfg_route <= '0;
      cfg_cost  <= '0;
    end else begin
      cfg_valid <= req_valid;
      if (req_valid) begin
        cfg       <= sel_cfg;
        cfg_route <= sel_idx;
        cfg_cost  <= sel_cost;
      end
    end
  end

  // a result can never count more elements than a route passes through
  always_ff @(posedge clk) begin
    if (rst_n && cfg_valid) begin
      assert (int'(cfg_cost) <= P)
        else $error("pars_controller: cost %0d exceeds path length %0d", cfg_cost, P);
    end
  end

endmodule
