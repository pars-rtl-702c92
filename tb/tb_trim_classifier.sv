// tb_trim_classifier: checks the default-state choice of every element
// against a reference (Cross exactly when P_TC < P_TB) on directed cases
// (ties, extremes) and random trimming-power codes.
module tb_trim_classifier;
  localparam int S  = 20;
  localparam int TW = 8;

  logic [S-1:0][TW-1:0] p_tb, p_tc;
  logic [S-1:0]         d;
  int checks = 0, failures = 0;

  trim_classifier #(.S(S), .TW(TW)) dut (.p_tb(p_tb), .p_tc(p_tc), .d(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic exp;
    #1;
    for (int s = 0; s < S; s++) begin
      exp = (int'(p_tc[s]) < int'(p_tb[s]));
      checks++;
      if (d[s] !== exp) begin
        failures++;
        $display("FAIL s=%0d p_tb=%0d p_tc=%0d d=%b exp=%b", s, p_tb[s], p_tc[s], d[s], exp);
      end
    end
  endtask

  initial begin
    // ties stay Bar
    for (int s = 0; s < S; s++) begin p_tb[s] = TW'(s * 7); p_tc[s] = TW'(s * 7); end
    check_all();
    // extremes
    for (int s = 0; s < S; s++) begin
      p_tb[s] = (s % 2) ? '1 : '0;
      p_tc[s] = (s % 2) ? '0 : '1;
    end
    check_all();
    // differ by one code
    for (int s = 0; s < S; s++) begin
      p_tb[s] = TW'(100 + (s % 3));
      p_tc[s] = TW'(101);
    end
    check_all();
    for (int i = 0; i < 500; i++) begin
      for (int s = 0; s < S; s++) begin
        p_tb[s] = TW'($urandom);
        p_tc[s] = ($urandom % 4 == 0) ? p_tb[s] : TW'($urandom);
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
