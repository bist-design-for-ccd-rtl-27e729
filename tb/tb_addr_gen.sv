// tb_addr_gen: checks the address generator on a 9 x 6 image with three
// test circuits. Two full test passes are walked group by group: every load
// address of the 15-pixel block, every centre flash address, the end-of-block
// and end-of-pass flags and the wrap to the first group. Then the repair scan
// is walked over all interior pixels, with the 9-pixel load around each
// scanned pixel and the write-back address. Reference addresses are computed
// from (row, column) in the testbench.
module tb_addr_gen;
  localparam int unsigned IMG_W = 9;
  localparam int unsigned IMG_H = 6;
  localparam int unsigned N_TC  = 3;
  localparam int unsigned AW    = $clog2(IMG_W * IMG_H);
  localparam int unsigned TW    = 2;
  logic clk = 0, rst_n = 0;
  logic pos_clear = 0, grp_next = 0, grp_last, rep_start = 0, rep_step = 0, rep_at_last;
  logic ld_start = 0, ld_step = 0, mode_repair = 0, ld_last;
  logic [TW-1:0] tc_sel = '0;
  logic [AW-1:0] fm_addr, fl_addr, rep_addr;
  int checks = 0, failures = 0;

  addr_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_TC(N_TC)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // the block around centre row r, first centre column c, ncol columns
  task automatic walk_load(input int r, input int c, input int ncol);
    @(negedge clk); ld_start = 1;
    @(negedge clk); ld_start = 0;
    for (int i = 0; i < 3 * ncol; i++) begin
      expect_eq(int'(fm_addr), (r - 1 + i % 3) * IMG_W + c - 1 + i / 3, "load address");
      expect_eq(int'(ld_last), int'(i == 3 * ncol - 1), "ld_last");
      ld_step = 1;
      @(negedge clk);
      ld_step = 0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int starts [3] = '{1, 4, 5};
    int pr, pc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++)
      for (int g = 0; g < 3; g++)
        for (int r = 1; r <= IMG_H - 2; r++) begin
          walk_load(r, starts[g], N_TC + 2);
          for (int k = 0; k < N_TC; k++) begin
            tc_sel = TW'(k);
            #1;
            expect_eq(int'(fl_addr), r * IMG_W + starts[g] + N_TC - 1 - k, "centre address");
          end
          expect_eq(int'(grp_last), int'(g == 2 && r == IMG_H - 2), "grp_last");
          grp_next = 1;
          @(negedge clk);
          grp_next = 0;
        end
    // clear from the middle of a pass
    grp_next = 1; @(negedge clk); grp_next = 0;
    pos_clear = 1; @(negedge clk); pos_clear = 0;
    tc_sel = 2'd2; #1;
    expect_eq(int'(fl_addr), IMG_W + 1, "after pos_clear");

    // repair scan
    mode_repair = 1;
    rep_start = 1; @(negedge clk); rep_start = 0;
    for (int r = 1; r <= IMG_H - 2; r++)
      for (int c = 1; c <= IMG_W - 2; c++) begin
        expect_eq(int'(fl_addr), r * IMG_W + c, "scan address");
        expect_eq(int'(rep_at_last), int'(r == IMG_H - 2 && c == IMG_W - 2), "rep_at_last");
        rep_step = 1; @(negedge clk); rep_step = 0;
        expect_eq(int'(rep_addr), r * IMG_W + c, "repair address");
        if ((r + c) % 4 == 0) walk_load(r, c, 3);
      end
    expect_eq(int'(fl_addr), IMG_W + 1, "scan wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
