// tb_pars_controller: end-to-end test of the PARS controller at its default
// size (8x8 Benes, 20 elements, 8-bit trimming codes).
//
// The testbench loads random trimming-power codes, keeps its own copy of
// the default-state vector (Cross where P_TC < P_TB) and issues random
// connection requests in both mechanisms. For every result, one cycle after
// its request, it checks with the behavioural fabric model that the
// configuration connects the requested input to the requested output, that
// the reported cost is the number of path elements away from the default
// state, that no route of the pair costs less (exhaustive model search),
// and that every element off the path sits in its default state. It also
// checks reset values, that cfg_valid follows req_valid by exactly one
// cycle, that cfg holds while idle and that a load takes effect one cycle
// later. Every mechanism must occur at least once: trimming loads, both
// mechanisms, mode switches, a trimming-aware choice that uses Cross
// elements the configuration-aware one would avoid, a route other than the
// first, a load in the same cycle as a request, idle holds and a reset in
// the middle of the run.
module tb_pars_controller;
  import benes_model_pkg::*;

  localparam int N = 8, TW = 8, S = 20, R = 4, PW = 3;

  logic                 clk;
  logic                 rst_n;
  logic                 trim_load;
  logic [S-1:0][TW-1:0] p_tb, p_tc;
  logic                 mode_ca;
  logic                 req_valid;
  logic [PW-1:0]        req_in, req_out;
  logic                 cfg_valid;
  logic [S-1:0]         cfg;
  logic [1:0]           cfg_route;
  logic [2:0]           cfg_cost;
  logic [S-1:0]         default_state;

  pars_controller dut (
    .clk, .rst_n, .trim_load, .p_tb, .p_tc, .mode_ca,
    .req_valid, .req_in, .req_out,
    .cfg_valid, .cfg, .cfg_route, .cfg_cost, .default_state);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_load = 0, n_ta = 0, n_ca = 0, n_switch = 0, n_ta_cross = 0;
  int n_route_nz = 0, n_load_req = 0, n_idle_hold = 0, n_reset = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  logic [S-1:0] d_ref;        // default-state vector the DUT should hold
  logic [S-1:0] d_next;
  // request of the previous cycle
  bit           p_valid;
  int           p_in, p_out;
  logic [S-1:0] p_deff;
  bit           p_ca;
  logic [S-1:0] cfg_prev;
  bit           last_mode;
  bit           have_mode;

  task automatic check_result();
    vec_t path;
    int   reached, cnt, mc, cnt0, mc0, cost;
    chk(cfg_valid == p_valid, $sformatf("cfg_valid %0b expected %0b", cfg_valid, p_valid));
    chk(default_state == d_ref, $sformatf("default_state %h expected %h", default_state, d_ref));
    if (!p_valid) begin
      chk(cfg == cfg_prev, "cfg changed while idle");
      n_idle_hold++;
      return;
    end
    reached = trace(N, vec_t'(cfg), p_in, path);
    chk(reached == p_out, $sformatf("%0d->%0d: configuration %h reaches %0d", p_in, p_out, cfg, reached));
    cost = path_cost(vec_t'(cfg), path, vec_t'(p_deff));
    chk(int'(cfg_cost) == cost, $sformatf("%0d->%0d: cost %0d, path has %0d", p_in, p_out, cfg_cost, cost));
    search(N, vec_t'(p_deff), p_in, p_out, cnt, mc);
    chk(cnt == R && cost == mc, $sformatf("%0d->%0d: cost %0d, best %0d", p_in, p_out, cost, mc));
    chk(((cfg ^ p_deff) & ~path[S-1:0]) == '0, $sformatf("%0d->%0d: off-path element not at default", p_in, p_out));
    chk(int'(cfg_route) < R, "route index out of range");
    if (cfg_route != 0) n_route_nz++;
    if (!p_ca) begin
      // fewest Cross elements any route needs
      search(N, '0, p_in, p_out, cnt0, mc0);
      if ($countones(vec_t'(cfg) & path) > mc0) n_ta_cross++;
    end
  endtask

  initial begin
    rst_n = 1'b0; trim_load = 1'b0; mode_ca = 1'b0; req_valid = 1'b0;
    req_in = '0; req_out = '0;
    p_tb = '0; p_tc = '0;
    d_ref = '0; p_valid = 0; cfg_prev = '0; have_mode = 0;
    repeat (3) @(posedge clk);
    #1;
    chk(cfg_valid == 1'b0 && cfg == '0 && default_state == '0 && cfg_cost == '0,
        "reset values");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // drive this cycle's inputs
      trim_load = ($urandom % 15 == 0) || (cyc == 1);
      for (int s = 0; s < S; s++) begin
        p_tb[s] = TW'($urandom);
        p_tc[s] = ($urandom % 8 == 0) ? p_tb[s] : TW'($urandom);
        d_next[s] = (p_tc[s] < p_tb[s]);
      end
      req_valid = ($urandom % 6 != 0);
      mode_ca   = ($urandom % 4 == 0);
      req_in    = PW'($urandom);
      req_out   = PW'($urandom);
      @(posedge clk);
      #1;
      // account for what was sampled at this edge
      if (req_valid) begin
        if (mode_ca) n_ca++; else n_ta++;
        if (have_mode && mode_ca != last_mode) n_switch++;
        last_mode = mode_ca; have_mode = 1;
        if (trim_load) n_load_req++;
      end
      p_valid = req_valid;
      p_in = int'(req_in);
      p_out = int'(req_out);
      p_ca = mode_ca;
      p_deff = mode_ca ? '0 : d_ref;   // request uses the D held before the edge
      if (trim_load) begin
        d_ref = d_next;
        n_load++;
      end
      check_result();
      cfg_prev = cfg;
      // one reset in the middle of the run
      if (cyc == 3000) begin
        rst_n = 1'b0; req_valid = 1'b0; trim_load = 1'b0;
        @(posedge clk);
        #1;
        chk(cfg_valid == 1'b0 && cfg == '0 && default_state == '0, "reset in run");
        d_ref = '0; p_valid = 0; cfg_prev = '0; n_reset++;
        rst_n = 1'b1;
      end
    end
    $display("mechanisms: loads=%0d trimming-aware=%0d configuration-aware=%0d mode switches=%0d",
             n_load, n_ta, n_ca, n_switch);
    $display("            cross-default used=%0d non-first route=%0d load+request=%0d idle holds=%0d resets=%0d",
             n_ta_cross, n_route_nz, n_load_req, n_idle_hold, n_reset);
    chk(n_load > 0, "no trimming load");
    chk(n_ta > 0, "no trimming-aware request");
    chk(n_ca > 0, "no configuration-aware request");
    chk(n_switch > 0, "no mode switch");
    chk(n_ta_cross > 0, "trimming-aware choice never used a Cross default");
    chk(n_route_nz > 0, "only the first route was ever chosen");
    chk(n_load_req > 0, "no load in the cycle of a request");
    chk(n_idle_hold > 0, "no idle cycle");
    chk(n_reset > 0, "no reset in the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
