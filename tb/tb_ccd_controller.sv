// tb_ccd_controller: checks the window sequencer with the address generator
// on a 10 x 7 image, three test circuits, and testbench models of the flash
// and of the test circuits' verdicts (a fixed pseudo-random code per pixel).
// Checked per window: the number of frame loads and repair stores, that
// every store goes to a recorded pixel, the flash contents against a
// reference (recorded defects never overwritten), the counters, the cycle
// count formula and the time-out / end-of-pass flags.
module tb_ccd_controller;
  import bist_pkg::*;
  localparam int unsigned IMG_W = 10;
  localparam int unsigned IMG_H = 7;
  localparam int unsigned N_TC  = 3;
  localparam int unsigned AW    = $clog2(IMG_W * IMG_H);
  localparam int unsigned CW    = 32;
  localparam int unsigned TW    = 2;
  localparam int          N_REG = 9 + 3 * (N_TC - 1);
  localparam int          GRP_CYC = N_REG + N_TC + 2;
  localparam int          N_INT = (IMG_W - 2) * (IMG_H - 2);
  localparam int          LAST_GRP = IMG_W - 1 - N_TC;

  logic clk = 0, rst_n = 0, start = 0, map_erase = 0, map_busy = 0;
  logic [CW-1:0] window_len = '0;
  logic busy, window_done, win_timeout, win_pass_end;
  logic [AW:0] defect_count, cnt_repaired, cnt_tested, cnt_skipped;
  logic [CW-1:0] cycles;
  logic pos_clear, grp_next, grp_last, rep_start, rep_step, rep_at_last;
  logic ld_start, ld_step, mode_repair, ld_last;
  logic [TW-1:0] tc_sel;
  logic ld_req, st_req, fl_en, fl_we;
  logic [2:0] fl_rdata;
  map_code_e sel_code;
  logic [AW-1:0] fm_addr, fl_addr, rep_addr;

  ccd_controller #(.N_TC(N_TC), .AW(AW), .CW(CW)) dut (.*);
  addr_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_TC(N_TC)) u_ag (.*);

  always #5 clk = ~clk;

  // flash model
  logic [2:0] flash [IMG_W * IMG_H];
  always_ff @(posedge clk)
    if (fl_en) begin
      if (fl_we) flash[fl_addr] <= sel_code;
      else       fl_rdata       <= flash[fl_addr];
    end

  // verdict per pixel: about one in six defective
  function automatic logic [2:0] verdict(input int a);
    int h = (a * 37 + 11) % 23;
    return (h < 4) ? 3'(h) : 3'b100;
  endfunction
  assign sel_code = map_code_e'(verdict(int'(fl_addr)));

  int checks = 0, failures = 0;
  int n_loads, n_stores, n_bad_store;
  logic [2:0] ref_map [IMG_W * IMG_H];
  int ref_row = 1, ref_col = 1, ref_defects = 0;

  always @(posedge clk) if (busy) begin
    if (ld_req) n_loads++;
    if (st_req) begin
      n_stores++;
      if (ref_map[rep_addr][2] != 1'b0) n_bad_store++;
    end
  end

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_window(input int len);
    int t, repairs = 0, tested = 0, skipped = 0, groups = 0, p;
    bit timeout = 0, passed = 0;
    if (ref_defects > 0) begin
      foreach (ref_map[i]) if (ref_map[i][2] == 1'b0) repairs++;
      t = N_INT + 1 + 12 * repairs;
    end else t = 0;
    forever begin
      if (t >= len) begin timeout = 1; break; end
      for (int k = 0; k < N_TC; k++) begin
        p = ref_row * IMG_W + ref_col + k;
        if (ref_map[p][2] == 1'b0) skipped++;
        else begin
          ref_map[p] = verdict(p);
          tested++;
          if (ref_map[p][2] == 1'b0) ref_defects++;
        end
      end
      groups++;
      t += GRP_CYC;
      if (ref_row == IMG_H - 2 && ref_col == LAST_GRP) begin passed = 1; ref_row = 1; ref_col = 1; break; end
      if (ref_row < IMG_H - 2) ref_row++;
      else begin ref_row = 1; ref_col = (ref_col + N_TC > LAST_GRP) ? LAST_GRP : ref_col + N_TC; end
    end
    n_loads = 0; n_stores = 0; n_bad_store = 0;
    @(negedge clk); start = 1; window_len = CW'(len);
    @(negedge clk); start = 0;
    while (!window_done) @(negedge clk);
    expect_eq(cycles, t + (timeout ? 1 : 0), "cycles");
    expect_eq(win_timeout, timeout, "timeout flag");
    expect_eq(win_pass_end, passed, "pass flag");
    expect_eq(n_loads, groups * N_REG + repairs * 9, "frame loads");
    expect_eq(n_stores, repairs, "repair stores");
    expect_eq(n_bad_store, 0, "stores to unrecorded pixels");
    expect_eq(cnt_repaired, repairs, "repaired");
    expect_eq(cnt_tested, tested, "tested");
    expect_eq(cnt_skipped, skipped, "skipped");
    expect_eq(defect_count, ref_defects, "defects");
    for (int i = 0; i < IMG_W * IMG_H; i++) begin
      checks++;
      if (flash[i] != ref_map[i]) begin
        failures++;
        if (failures < 20) $display("flash[%0d] = %03b expected %03b", i, flash[i], ref_map[i]);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < IMG_W * IMG_H; i++) begin flash[i] = 3'b111; ref_map[i] = 3'b111; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_window(7 * GRP_CYC);     // null repair, times out
    run_window(100000);          // repair, finishes the pass
    run_window(100000);          // a full pass, everything recorded skipped
    run_window(N_INT + 50);      // repair only, then out of time
    // start is ignored while the flash is busy
    @(negedge clk); map_busy = 1; start = 1;
    @(negedge clk); start = 0;
    expect_eq(busy, 0, "start ignored while flash busy");
    map_busy = 0;
    // map erase restarts the count and the position
    @(negedge clk); map_erase = 1;
    @(negedge clk); map_erase = 0;
    expect_eq(defect_count, 0, "defects after erase");
    for (int i = 0; i < IMG_W * IMG_H; i++) begin flash[i] = 3'b111; ref_map[i] = 3'b111; end
    ref_row = 1; ref_col = 1; ref_defects = 0;
    run_window(100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
