// tb_pars_radix: runs the PARS controller at the three radices of the
// evaluation (2x2, 4x4 and 8x8 Benes) on random variation patterns, with
// the 4x4 worked example replayed first. For each radix it prints how many
// path elements were held away from their default state by the
// configuration-aware and by the trimming-aware mechanism over all
// input-output pairs; the trimming-aware total must be lower wherever a
// route choice exists (N >= 4).
module tb_pars_radix;
  logic clk;
  int   c2, f2, a2, t2, c4, f4, a4, t4, c8, f8, a8, t8;
  bit   d2, d4, d8;
  int   checks, failures;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  pars_radix_run #(.N(2), .TRIALS(20), .FIG3(0)) u2 (.clk, .checks(c2), .failures(f2),
    .ca_off_default(a2), .ta_off_default(t2), .done(d2));
  pars_radix_run #(.N(4), .TRIALS(20), .FIG3(1)) u4 (.clk, .checks(c4), .failures(f4),
    .ca_off_default(a4), .ta_off_default(t4), .done(d4));
  pars_radix_run #(.N(8), .TRIALS(20), .FIG3(0)) u8 (.clk, .checks(c8), .failures(f8),
    .ca_off_default(a8), .ta_off_default(t8), .done(d8));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + c8, f2 + f4 + f8 + 1);
    $finish;
  end

  initial begin
    wait (d2 && d4 && d8);
    checks = c2 + c4 + c8 + 3;
    failures = f2 + f4 + f8;
    $display("N=2: elements off default  configuration-aware %0d  trimming-aware %0d", a2, t2);
    $display("N=4: elements off default  configuration-aware %0d  trimming-aware %0d", a4, t4);
    $display("N=8: elements off default  configuration-aware %0d  trimming-aware %0d", a8, t8);
    if (a2 != t2) failures++;   // one route per pair: nothing to choose
    if (!(t4 < a4)) failures++;
    if (!(t8 < a8)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
