// pars_radix_run: drives one PARS controller of radix N through a
// workload and reports its own check and failure counts (used by
// tb_pars_radix).
//
// For TRIALS random variation patterns it loads trimming codes and requests
// every input-output pair twice, once with the configuration-aware and once
// with the trimming-aware mechanism. Each result is checked with the
// behavioural fabric model (connects the pair, optimal cost, off-path
// elements at default). The two mechanisms are then compared on the same
// default-state vector: the number of path elements the configuration-aware
// choice forces away from their default may never be below the
// trimming-aware one. Totals of these counts are printed as the workload's
// outcome. With FIG3 = 1 (only for N = 4) the 4x4 example is replayed first:
// S3 and S5 prefer Cross, so I3 -> O3 must go S3 Cross, S1 Bar, S5 Cross in
// the trimming-aware mechanism and S3, S4, S5 Bar in the configuration-aware
// one, and I0 -> O0 must go S0, S1, S2 Bar.
module pars_radix_run #(
  parameter int N      = 4,
  parameter int TRIALS = 20,
  parameter bit FIG3   = 0
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   ca_off_default,
  output int   ta_off_default,
  output bit   done
);
  import benes_model_pkg::*;

  localparam int TW = 8;
  localparam int S  = pars_pkg::benes_switches(N);
  localparam int R  = pars_pkg::benes_routes(N);
  localparam int PW = pars_pkg::benes_log2(N);
  localparam int IW = pars_pkg::idx_w(R);
  localparam int CW = $clog2(pars_pkg::benes_stages(N) + 1);

  logic                 rst_n, trim_load, mode_ca, req_valid;
  logic [S-1:0][TW-1:0] p_tb, p_tc;
  logic [PW-1:0]        req_in, req_out;
  logic                 cfg_valid;
  logic [S-1:0]         cfg, default_state;
  logic [IW-1:0]        cfg_route;
  logic [CW-1:0]        cfg_cost;

  pars_controller #(.N(N), .TW(TW)) dut (
    .clk, .rst_n, .trim_load, .p_tb, .p_tc, .mode_ca,
    .req_valid, .req_in, .req_out,
    .cfg_valid, .cfg, .cfg_route, .cfg_cost, .default_state);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=%0d %s", N, what);
    end
  endtask

  // one request; returns the configuration one cycle later
  task automatic request(input int i, input int o, input bit ca,
                         output logic [S-1:0] c);
    req_valid = 1'b1; req_in = PW'(i); req_out = PW'(o); mode_ca = ca;
    @(posedge clk); #1;
    req_valid = 1'b0;
    chk(cfg_valid == 1'b1, "cfg_valid one cycle after request");
    c = cfg;
  endtask

  task automatic load_d(input logic [S-1:0] want);
    for (int s = 0; s < S; s++) begin
      p_tb[s] = TW'(40 + $urandom % 200);
      p_tc[s] = want[s] ? p_tb[s] - TW'(1 + $urandom % 40) : p_tb[s] + TW'($urandom % 15);
    end
    trim_load = 1'b1;
    @(posedge clk); #1;
    trim_load = 1'b0;
    chk(default_state == want, $sformatf("default state %h expected %h", default_state, want));
  endtask

  initial begin
    logic [S-1:0] d, c_ca, c_ta;
    vec_t path;
    int cnt, mc, cost_ca, cost_ta;
    checks = 0; failures = 0; ca_off_default = 0; ta_off_default = 0; done = 0;
    rst_n = 1'b0; trim_load = 1'b0; mode_ca = 1'b0; req_valid = 1'b0;
    req_in = '0; req_out = '0; p_tb = '0; p_tc = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    if (FIG3) begin
      load_d(S'(6'b101000));                 // S3 and S5 prefer Cross
      request(3, 3, 1'b0, c_ta);
      chk(c_ta == S'(6'b101000), $sformatf("4x4 I3->O3 trimming-aware cfg %b", c_ta));
      chk(cfg_cost == '0, "4x4 I3->O3 trimming-aware cost");
      request(3, 3, 1'b1, c_ca);
      chk(c_ca == '0, $sformatf("4x4 I3->O3 configuration-aware cfg %b", c_ca));
      request(0, 0, 1'b1, c_ca);
      chk(c_ca == '0 && cfg_cost == '0, $sformatf("4x4 I0->O0 configuration-aware cfg %b", c_ca));
    end
    for (int t = 0; t < TRIALS; t++) begin
      for (int s = 0; s < S; s++) d[s] = ($urandom % 2 == 0);
      load_d(d);
      for (int i = 0; i < N; i++) begin
        for (int o = 0; o < N; o++) begin
          request(i, o, 1'b1, c_ca);
          chk(trace(N, vec_t'(c_ca), i, path) == o, $sformatf("CA %0d->%0d does not connect", i, o));
          search(N, '0, i, o, cnt, mc);
          chk(int'(cfg_cost) == mc && $countones(vec_t'(c_ca) & path) == mc,
              $sformatf("CA %0d->%0d not fewest Cross", i, o));
          cost_ca = path_cost(vec_t'(c_ca), path, vec_t'(d));
          request(i, o, 1'b0, c_ta);
          chk(trace(N, vec_t'(c_ta), i, path) == o, $sformatf("TA %0d->%0d does not connect", i, o));
          search(N, vec_t'(d), i, o, cnt, mc);
          cost_ta = path_cost(vec_t'(c_ta), path, vec_t'(d));
          chk(cnt == R && int'(cfg_cost) == mc && cost_ta == mc, $sformatf("TA %0d->%0d not optimal", i, o));
          chk(((c_ta ^ d) & ~path[S-1:0]) == '0, $sformatf("TA %0d->%0d off-path element", i, o));
          chk(cost_ta <= cost_ca, $sformatf("TA %0d->%0d worse than CA", i, o));
          ca_off_default += cost_ca;
          ta_off_default += cost_ta;
        end
      end
    end
    done = 1;
  end
endmodule
