// tb_ccd_bist_full: one complete soft-test operation at the full default
// size: a 4096 x 4096, 12-bit frame and three parallel test circuits.
//
// The map is erased, a synthetic image with about 10 % hard-defective pixels
// (computed from a hash of the pixel position, so the testbench needs no
// image storage) is written through the image port, and one window long
// enough for a whole pass is run. The window is the first one, so its repair
// is null. Afterwards the whole defect map is read back and compared with
// the MMF test worked out in the testbench for every interior pixel (border
// pixels stay erased), and the cycle count is checked against 20 cycles per
// group of three pixels.
module tb_ccd_bist_full;
  import bist_pkg::*;
  localparam int unsigned PIX_W = 12;
  localparam int unsigned IMG_W = 4096;
  localparam int unsigned IMG_H = 4096;
  localparam int unsigned N_TC  = 3;
  localparam int unsigned DEPTH = IMG_W * IMG_H;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned CW    = 32;
  localparam longint      GROUPS_PER_ROW = (IMG_W - 2 + N_TC - 1) / N_TC;
  localparam longint      N_GROUPS = GROUPS_PER_ROW * (IMG_H - 2);

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

  ccd_bist_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint exp_defects = 0;
  int n_class [5];

  function automatic int unsigned hash(input int r, input int c);
    int unsigned h = int'(r) * 32'h9E3779B1 ^ int'(c) * 32'h85EBCA77;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12;
    return h;
  endfunction

  // captured pixel value: smooth gray plus noise, or a hard defect
  function automatic int pixel(input int r, input int c);
    int unsigned h = hash(r, c);
    int v = 1400 + r / 16 + c / 16 + int'(h % 16);
    if ((h >> 8) % 100 < 10)
      case ((h >> 16) % 4)
        0: v = 0;
        1: v = (1 << PIX_W) - 1;
        2: v = v / 2;
        default: v = v + v / 2;
      endcase
    return v;
  endfunction

  function automatic logic [2:0] ref_code(input int r, input int c);
    int v [8];
    int n = 0, t, a, p, d;
    for (int dc = -1; dc <= 1; dc++)
      for (int dr = -1; dr <= 1; dr++)
        if (dr != 0 || dc != 0) begin v[n] = pixel(r + dr, c + dc); n++; end
    for (int i = 1; i < 8; i++)
      for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin t = v[j]; v[j] = v[j-1]; v[j-1] = t; end
    a = (v[2] + v[3] + v[4] + v[5]) / 4;
    p = pixel(r, c);
    d = (p > a) ? p - a : a - p;
    if (a != 0 && 10 * d < a) return 3'b100;
    if (p == 0) return 3'b000;
    if (p == (1 << PIX_W) - 1) return 3'b010;
    if (p < a) return 3'b001;
    return 3'b011;
  endfunction

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e;
    int pr, pc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // erase the defect map
    @(negedge clk); map_erase = 1;
    @(negedge clk); map_erase = 0;
    while (map_busy) @(negedge clk);
    // capture one image
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        img_en = 1; img_we = 1; img_addr = AW'(r * IMG_W + c); img_wdata = PIX_W'(pixel(r, c));
        @(negedge clk);
      end
    img_en = 0; img_we = 0;
    // one window, long enough for a whole pass
    @(negedge clk); start = 1; window_len = '1;
    @(negedge clk); start = 0;
    while (!window_done) @(negedge clk);
    checks += 4;
    if (!win_pass_end || win_timeout) begin failures++; $display("window did not end at the end of the pass"); end
    if (cycles != CW'(20 * N_GROUPS)) begin failures++; $display("cycles %0d expected %0d", cycles, 20 * N_GROUPS); end
    if (cnt_repaired != 0) begin failures++; $display("first window must not repair"); end
    if (longint'(cnt_tested) + longint'(cnt_skipped) != N_TC * N_GROUPS) begin
      failures++; $display("tested+skipped %0d expected %0d", cnt_tested + cnt_skipped, N_TC * N_GROUPS);
    end
    // read the whole map back, one read per cycle
    for (int a = 0; a < int'(DEPTH); a++) begin
      map_rd_en = 1; map_rd_addr = AW'(a);
      @(negedge clk);
      pr = a / IMG_W; pc = a % IMG_W;
      if (pr == 0 || pc == 0 || pr == IMG_H - 1 || pc == IMG_W - 1) e = 3'b111;
      else begin
        e = ref_code(pr, pc);
        n_class[e]++;
        if (e[2] == 1'b0) exp_defects++;
      end
      checks++;
      if (map_rdata != e || !map_rvalid) begin
        failures++;
        if (failures < 20) $display("map[%0d,%0d] = %03b expected %03b", pr, pc, map_rdata, e);
      end
    end
    map_rd_en = 0;
    checks++;
    if (longint'(defect_count) != exp_defects) begin
      failures++; $display("defect count %0d expected %0d", defect_count, exp_defects);
    end
    foreach (n_class[i]) $display("map code %0d: %0d pixels", i, n_class[i]);
    $display("window took %0d cycles for %0d groups", cycles, N_GROUPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
