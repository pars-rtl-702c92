// tb_route_lut: checks the route table of an 8x8 and a 4x4 Benes network
// against the behavioural fabric model. For every input-output pair and
// every route: the path holds one element per stage, the configuration
// carries the input to the requested output through exactly the masked
// elements, no element off the path is set, all routes of a pair differ and
// their number equals the number of routes the exhaustive model search
// finds. The 4x4 table is also checked against the two routes from I0 to
// O0 of the 4x4 example: S0, S1, S2 all Bar, and S0, S2 Cross through S4.
module tb_route_lut;
  import benes_model_pkg::*;

  localparam int N8 = 8, S8 = 20, R8 = 4;
  localparam int N4 = 4, S4 = 6,  R4 = 2;

  logic [2:0]            in8, out8;
  logic [R8-1:0][S8-1:0] cfg8, mask8;
  logic [1:0]            in4, out4;
  logic [R4-1:0][S4-1:0] cfg4, mask4;
  int checks = 0, failures = 0;

  route_lut #(.N(N8)) dut8 (.in_port(in8), .out_port(out8), .route_cfg(cfg8), .route_mask(mask8));
  route_lut #(.N(N4)) dut4 (.in_port(in4), .out_port(out4), .route_cfg(cfg4), .route_mask(mask4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // checks one route list of an n x n network
  task automatic check_pair(input int n, input int r, input int i, input int o,
                            input vec_t cfgs[], input vec_t masks[]);
    vec_t path;
    int reached, cnt, mc;
    search(n, '0, i, o, cnt, mc);
    chk(cnt == r, $sformatf("N=%0d %0d->%0d model finds %0d routes, table has %0d", n, i, o, cnt, r));
    for (int k = 0; k < r; k++) begin
      reached = trace(n, cfgs[k], i, path);
      chk(reached == o, $sformatf("N=%0d %0d->%0d route %0d reaches %0d", n, i, o, k, reached));
      chk(path == masks[k], $sformatf("N=%0d %0d->%0d route %0d mask %h path %h", n, i, o, k, masks[k], path));
      chk($countones(masks[k]) == stages(n), $sformatf("N=%0d %0d->%0d route %0d path length", n, i, o, k));
      chk((cfgs[k] & ~masks[k]) == '0, $sformatf("N=%0d %0d->%0d route %0d sets off-path element", n, i, o, k));
      for (int k2 = 0; k2 < k; k2++)
        chk({cfgs[k], masks[k]} != {cfgs[k2], masks[k2]},
            $sformatf("N=%0d %0d->%0d routes %0d and %0d equal", n, i, o, k2, k));
    end
  endtask

  vec_t c8[], m8[], c4[], m4[];
  bit   found_green, found_yellow;

  initial begin
    c8 = new[R8]; m8 = new[R8]; c4 = new[R4]; m4 = new[R4];
    for (int i = 0; i < N8; i++) begin
      for (int o = 0; o < N8; o++) begin
        in8 = 3'(i); out8 = 3'(o);
        #1;
        for (int k = 0; k < R8; k++) begin c8[k] = vec_t'(cfg8[k]); m8[k] = vec_t'(mask8[k]); end
        check_pair(N8, R8, i, o, c8, m8);
      end
    end
    for (int i = 0; i < N4; i++) begin
      for (int o = 0; o < N4; o++) begin
        in4 = 2'(i); out4 = 2'(o);
        #1;
        for (int k = 0; k < R4; k++) begin c4[k] = vec_t'(cfg4[k]); m4[k] = vec_t'(mask4[k]); end
        check_pair(N4, R4, i, o, c4, m4);
      end
    end
    // 4x4 example, I0 -> O0
    in4 = 2'd0; out4 = 2'd0;
    #1;
    found_green = 0; found_yellow = 0;
    for (int k = 0; k < R4; k++) begin
      if (mask4[k] == 6'b000111 && cfg4[k] == 6'b000000) found_green = 1;
      if (mask4[k] == 6'b010101 && cfg4[k] == 6'b000101) found_yellow = 1;
    end
    chk(found_green, "4x4 I0->O0: route S0 S1 S2 all Bar missing");
    chk(found_yellow, "4x4 I0->O0: route S0 Cross, S4 Bar, S2 Cross missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
