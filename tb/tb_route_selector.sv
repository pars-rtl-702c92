// tb_route_selector: drives the selector with random and directed candidate
// lists and default-state vectors and compares index, cost and the chosen
// fabric configuration with a reference computed in the testbench: cost =
// path elements whose route state differs from the default, lowest cost
// wins, the first route wins a tie, and elements off the chosen path take
// their default state.
module tb_route_selector;
  localparam int S = 20, R = 4, P = 5;

  logic [S-1:0]        d;
  logic [R-1:0][S-1:0] rc, rm;
  logic [1:0]          sel_idx;
  logic [S-1:0]        sel_cfg;
  logic [2:0]          sel_cost;
  int checks = 0, failures = 0;

  route_selector #(.S(S), .R(R), .P(P)) dut (
    .d(d), .route_cfg(rc), .route_mask(rm),
    .sel_idx(sel_idx), .sel_cfg(sel_cfg), .sel_cost(sel_cost));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random mask with exactly P bits set
  function automatic logic [S-1:0] rand_mask();
    logic [S-1:0] m = '0;
    int n = 0, b;
    while (n < P) begin
      b = int'($urandom % S);
      if (!m[b]) begin m[b] = 1'b1; n++; end
    end
    return m;
  endfunction

  task automatic check();
    int cost [R];
    int best, bi;
    logic [S-1:0] exp_cfg;
    #1;
    best = 1 << 30; bi = 0;
    for (int k = 0; k < R; k++) begin
      cost[k] = 0;
      for (int s = 0; s < S; s++)
        if (rm[k][s] && (rc[k][s] != d[s])) cost[k]++;
      if (cost[k] < best) begin best = cost[k]; bi = k; end
    end
    for (int s = 0; s < S; s++) exp_cfg[s] = rm[bi][s] ? rc[bi][s] : d[s];
    checks += 3;
    if (int'(sel_idx) != bi) begin failures++; $display("FAIL idx %0d exp %0d", sel_idx, bi); end
    if (int'(sel_cost) != best) begin failures++; $display("FAIL cost %0d exp %0d", sel_cost, best); end
    if (sel_cfg !== exp_cfg) begin failures++; $display("FAIL cfg %h exp %h", sel_cfg, exp_cfg); end
  endtask

  initial begin
    // directed: every route costs the same -> route 0
    d = '0;
    for (int k = 0; k < R; k++) begin rm[k] = rand_mask(); rc[k] = rm[k] & 20'h00001; end
    for (int k = 0; k < R; k++) begin rm[k] = 20'h0001F << (k * 5); rc[k] = 20'h00001 << (k * 5); end
    check();
    // directed: only the last route matches the defaults
    d = 20'hF0000;
    for (int k = 0; k < R; k++) begin rm[k] = 20'h0001F << (k * 5); rc[k] = 20'h0001F << (k * 5); end
    rc[0] = '0;
    check();
    // directed: configuration-aware case, route 2 has fewest Cross elements
    d = '0;
    rc[0] = 20'h00007; rc[1] = 20'h00060; rc[2] = 20'h00400; rc[3] = 20'h18000;
    check();
    for (int i = 0; i < 3000; i++) begin
      d = S'($urandom);
      for (int k = 0; k < R; k++) begin
        rm[k] = rand_mask();
        rc[k] = S'($urandom) & rm[k];
        if ($urandom % 3 == 0) rc[k] = (d & rm[k]) ^ (S'(1) << ($urandom % S)) & rm[k];
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
