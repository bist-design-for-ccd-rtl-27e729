// ccd_bist_e2e: end-to-end check of one configuration of the soft-test/repair
// BIST, used by tb_ccd_bist_top (which runs it with 1, 3 and 5 test circuits).
//
// The testbench plays the test image generator: every window it writes a new
// smooth gray image into the frame memory, with about 10 % of the pixels
// defective (stuck low, stuck high, low or high sensitive, fixed per pixel
// like hard defects). A behavioural reference model repeats the whole
// algorithm in the testbench's own code: null repair while nothing is
// recorded, repair of recorded pixels with the mean of the medium four
// neighbours in row-major order, then group-by-group MMF tests that never
// overwrite a recorded defect, resuming where the last window stopped. After
// every window the defect map and the repaired image are read back through
// the host ports and compared entry by entry, the status counters are
// compared, and the window's cycle count is checked against
//   repair: interior pixels + 1 + 12 per repaired pixel (0 for a null repair)
//   test:   20 cycles per group of three pixels, +1 when time ran out.
// The reference numbers test circuits the way the hardware does (the first
// one tests the right-most centre of a group), so the order of writes and
// skips matches. Every mechanism (null repair, repair, time-out, end of pass with the
// shifted last column group, skipped test of a recorded pixel, each of the
// four fault classes, map erase) is counted and must occur.
module ccd_bist_e2e #(
  parameter int unsigned IMG_W = 16,
  parameter int unsigned IMG_H = 12,
  parameter int unsigned N_TC  = 3
) (
  output int checks,
  output int failures,
  output bit done
);
  import bist_pkg::*;
  localparam int unsigned PIX_W = 12;
  localparam int unsigned DEPTH = IMG_W * IMG_H;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned CW    = 32;
  localparam int          GRP_CYC  = 9 + 3 * (N_TC - 1) + N_TC + 2;
  localparam int          N_INT    = (IMG_W - 2) * (IMG_H - 2);
  localparam int          LAST_GRP = IMG_W - 1 - N_TC;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [CW-1:0] window_len = '0;
  logic busy, window_done, win_timeout, win_pass_end;
  logic [AW:0] defect_count, cnt_repaired, cnt_tested, cnt_skipped;
  logic [CW-1:0] cycles;
  logic img_en = 0, img_we = 0, img_rvalid;
  logic [AW-1:0] img_addr = '0;
  logic [PIX_W-1:0] img_wdata = '0, img_rdata;
  logic map_erase = 0, map_busy, map_rd_en = 0, map_rvalid;
  logic [AW-1:0] map_rd_addr = '0;
  logic [2:0] map_rdata;

  ccd_bist_top #(.PIX_W(PIX_W), .IMG_W(IMG_W), .IMG_H(IMG_H), .N_TC(N_TC)) dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_null_repair = 0, n_repair = 0, n_timeout = 0, n_pass_end = 0, n_skip = 0, n_erase = 0;
  int n_class [5];

  // reference state
  int       ref_img [DEPTH];
  logic [2:0] ref_map [DEPTH];
  int       ref_defects = 0;
  int       ref_row = 1, ref_col = 1;
  int       defect_kind [DEPTH];   // 0 none, 1 stuck low, 2 stuck high, 3 low sens, 4 high sens

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- reference algorithm
  function automatic int mmf_avg(input int r, input int c);
    int v [8];
    int n = 0, t;
    for (int dc = -1; dc <= 1; dc++)
      for (int dr = -1; dr <= 1; dr++)
        if (dr != 0 || dc != 0) begin v[n] = ref_img[(r + dr) * IMG_W + c + dc]; n++; end
    for (int i = 1; i < 8; i++)
      for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin t = v[j]; v[j] = v[j-1]; v[j-1] = t; end
    return (v[2] + v[3] + v[4] + v[5]) / 4;
  endfunction

  function automatic logic [2:0] ref_code(input int r, input int c);
    int a = mmf_avg(r, c);
    int p = ref_img[r * IMG_W + c];
    int d = (p > a) ? p - a : a - p;
    if (a != 0 && real'(d) < 0.1 * real'(a) - 1.0e-9) return 3'b100;
    if (p == 0) return 3'b000;
    if (p == (1 << PIX_W) - 1) return 3'b010;
    if (p < a) return 3'b001;
    return 3'b011;
  endfunction

  // ---------------------------------------------------------------- image generator
  function automatic int gray(input int w, input int r, input int c);
    return 1200 + 30 * r + 20 * c + (w * 53) % 400 + int'($urandom_range(0, 12)) - 6;
  endfunction

  task automatic write_image(input int w);
    int v;
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        v = gray(w, r, c);
        case (defect_kind[r * IMG_W + c])
          1: v = 0;
          2: v = (1 << PIX_W) - 1;
          3: v = v / 2;
          4: v = v + v / 2;
          default: ;
        endcase
        ref_img[r * IMG_W + c] = v;
        @(negedge clk);
        img_en = 1; img_we = 1; img_addr = AW'(r * IMG_W + c); img_wdata = PIX_W'(v);
      end
    @(negedge clk);
    img_en = 0; img_we = 0;
  endtask

  task automatic erase_map();
    @(negedge clk); map_erase = 1;
    @(negedge clk); map_erase = 0;
    while (map_busy) @(negedge clk);
    for (int i = 0; i < DEPTH; i++) ref_map[i] = 3'b111;
    ref_defects = 0; ref_row = 1; ref_col = 1;
    n_erase++;
    expect_eq(defect_count, 0, "defect count after erase");
  endtask

  task automatic compare_memories(input int w);
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); map_rd_en = 1; map_rd_addr = AW'(i);
      @(negedge clk); map_rd_en = 0;
      expect_eq(map_rvalid, 1, "map_rvalid");
      checks++;
      if (map_rdata != ref_map[i]) begin
        failures++;
        if (failures < 20) $display("window %0d map[%0d,%0d] = %03b expected %03b",
                                    w, i / IMG_W, i % IMG_W, map_rdata, ref_map[i]);
      end
      img_en = 1; img_we = 0; img_addr = AW'(i);
      @(negedge clk); img_en = 0;
      checks++;
      if (int'(img_rdata) != ref_img[i]) begin
        failures++;
        if (failures < 20) $display("window %0d pixel[%0d,%0d] = %0d expected %0d",
                                    w, i / IMG_W, i % IMG_W, img_rdata, ref_img[i]);
      end
    end
  endtask

  // one window: returns after window_done, checks it against the reference
  task automatic run_window(input int w, input int len);
    int repairs = 0, tested = 0, skipped = 0, groups = 0, exp_cycles, t, p;
    logic [2:0] code;
    bit passed = 0, timeout = 0;
    write_image(w);
    // reference repair
    if (ref_defects > 0) begin
      for (int r = 1; r <= IMG_H - 2; r++)
        for (int c = 1; c <= IMG_W - 2; c++)
          if (ref_map[r * IMG_W + c][2] == 1'b0) begin
            ref_img[r * IMG_W + c] = mmf_avg(r, c);
            repairs++;
          end
      t = N_INT + 1 + 12 * repairs;
      n_repair += (repairs > 0);
    end else begin
      t = 0;
      n_null_repair++;
    end
    // reference test
    forever begin
      if (t >= len) begin timeout = 1; break; end
      for (int k = 0; k < N_TC; k++) begin
        p = ref_row * IMG_W + ref_col + N_TC - 1 - k;
        if (ref_map[p][2] == 1'b0) skipped++;
        else begin
          code = ref_code(ref_row, ref_col + N_TC - 1 - k);
          ref_map[p] = code;
          tested++;
          n_class[code]++;
          if (code[2] == 1'b0) ref_defects++;
        end
      end
      groups++;
      t += GRP_CYC;
      if (ref_row == IMG_H - 2 && ref_col == LAST_GRP) begin
        passed = 1; ref_row = 1; ref_col = 1; break;
      end
      if (ref_row < IMG_H - 2) ref_row++;
      else begin
        ref_row = 1;
        ref_col = (ref_col + N_TC > LAST_GRP) ? LAST_GRP : ref_col + N_TC;
      end
    end
    exp_cycles = t + (timeout ? 1 : 0);
    n_skip += (skipped > 0);
    n_timeout += timeout;
    n_pass_end += passed;
    // run the hardware
    @(negedge clk);
    start = 1; window_len = CW'(len);
    @(negedge clk);
    start = 0;
    while (!window_done) @(negedge clk);
    expect_eq(cycles, exp_cycles, "window cycles");
    expect_eq(win_timeout, timeout, "time-out flag");
    expect_eq(win_pass_end, passed, "end-of-pass flag");
    expect_eq(cnt_repaired, repairs, "repaired count");
    expect_eq(cnt_tested, tested, "tested count");
    expect_eq(cnt_skipped, skipped, "skipped count");
    expect_eq(defect_count, ref_defects, "defect count");
    expect_eq(busy, 0, "idle after window");
    compare_memories(w);
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    // hard defects: about 10 %, at least one of each kind inside
    for (int i = 0; i < DEPTH; i++)
      defect_kind[i] = ($urandom_range(0, 99) < 10) ? int'($urandom_range(1, 4)) : 0;
    defect_kind[2 * IMG_W + 3] = 1;
    defect_kind[5 * IMG_W + 8] = 2;
    defect_kind[7 * IMG_W + 12] = 3;
    defect_kind[9 * IMG_W + 14] = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    erase_map();
    // first windows: a short one that runs out of time, then complete passes
    run_window(0, 5 * GRP_CYC);
    run_window(1, 100000);
    run_window(2, 100000);
    run_window(3, N_INT + 100);          // repair eats most of it
    run_window(4, 100000);
    run_window(5, 3 * GRP_CYC + 400);
    // erase and start over
    erase_map();
    run_window(6, 100000);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_class[i] == 0) begin failures++; $display("map code %0d never written", i); end
    end
    foreach (n_class[i]) $display("map code %0d written %0d times", i, n_class[i]);
    $display("%0d test circuits: null repairs %0d, repairing windows %0d, time-outs %0d, pass ends %0d, windows with skips %0d, erases %0d",
             N_TC, n_null_repair, n_repair, n_timeout, n_pass_end, n_skip, n_erase);
    checks += 6;
    if (n_null_repair == 0) failures++;
    if (n_repair == 0)      failures++;
    if (n_timeout == 0)     failures++;
    if (n_pass_end == 0)    failures++;
    if (n_skip == 0)        failures++;
    if (n_erase < 2)        failures++;
    done = 1;
  end
endmodule
