// tb_ccd_bist_top: end-to-end test of the soft-test/repair BIST.
//
// Runs the self-checking scenario of ccd_bist_e2e on three small
// configurations side by side: 16 x 12 pixels with 3 test circuits (the
// default number), 16 x 12 with 1 and 17 x 12 with 5. Each one writes a new
// defective image per window, runs seven windows (time-outs, null and real
// repairs, complete passes, a map erase) and compares the defect map, the
// repaired image, the counters and the cycle counts with a reference model
// after every window; each counts every mechanism and fails if one never
// happened.
module tb_ccd_bist_top;
  int c3, f3, c1, f1, c5, f5;
  bit d3, d1, d5;
  logic clk = 0;
  always #5 clk = ~clk;

  ccd_bist_e2e #(.IMG_W(16), .IMG_H(12), .N_TC(3)) u_tc3 (.checks(c3), .failures(f3), .done(d3));
  ccd_bist_e2e #(.IMG_W(16), .IMG_H(12), .N_TC(1)) u_tc1 (.checks(c1), .failures(f1), .done(d1));
  ccd_bist_e2e #(.IMG_W(17), .IMG_H(12), .N_TC(5)) u_tc5 (.checks(c5), .failures(f5), .done(d5));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c3 + c5, f1 + f3 + f5 + 1);
    $finish;
  end

  initial begin
    wait (d1 && d3 && d5);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c3 + c5, f1 + f3 + f5);
    $finish;
  end
endmodule
