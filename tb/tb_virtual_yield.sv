// tb_virtual_yield: virtual yield over repeated test/repair windows.
//
// A 32 x 32 sensor with 10 %, 7 % or 3 % hard-defective interior pixels, half
// of them stuck white and half stuck black, sees a new mid-gray image every
// window. After each window the repaired image is read back and the virtual
// yield is the share of pixels within 10 % of the true gray value. Six window
// lengths are tried, set as fractions of the time one test circuit needs for
// a whole pass (0.595, 0.357, 0.119, 0.0595, 0.0357, 0.0119), for designs with
// 1, 3 and 5 test circuits (one instance each, running side by side).
//
// Checked: the yield after the last window is not below the first window's;
// with the longest window the yield reaches 99 %; a longer window never needs
// more windows to reach 99 % than a shorter one; 3 and 5 test circuits never
// need more windows than one. The yield curves are printed.
module tb_virtual_yield;
  localparam int unsigned W      = 32;
  localparam int unsigned DEPTH  = W * W;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned NTCS   [3] = '{1, 3, 5};
  localparam int unsigned RATES  [3] = '{10, 7, 3};
  localparam real         FRACS  [6] = '{0.595, 0.357, 0.119, 0.0595, 0.0357, 0.0119};
  localparam int          ROUNDS = 30;
  localparam int          PASS1  = (W - 2) * (W - 2) * 12;   // one test circuit, one pass

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int reach [3][3][6];       // windows needed to reach 99 % (ROUNDS+1 = never)
  int finished = 0;

  for (genvar t = 0; t < 3; t++) begin : g_tc
    localparam int unsigned N = NTCS[t];
    logic start = 0, busy, window_done, win_timeout, win_pass_end;
    logic [31:0] window_len = '0, cycles;
    logic [AW:0] defect_count, cnt_repaired, cnt_tested, cnt_skipped;
    logic img_en = 0, img_we = 0, img_rvalid, map_erase = 0, map_busy, map_rd_en = 0, map_rvalid;
    logic [AW-1:0] img_addr = '0, map_rd_addr = '0;
    logic [11:0] img_wdata = '0, img_rdata;
    logic [2:0] map_rdata;
    int truth [DEPTH];
    int kind  [DEPTH];     // 0 good, 1 black, 2 white

    ccd_bist_top #(.IMG_W(W), .IMG_H(W), .N_TC(N)) dut (.*);

    initial begin
      int good, y_first, y_last, v;
      string line;
      @(posedge rst_n);
      for (int ri = 0; ri < 3; ri++)
        for (int wi = 0; wi < 6; wi++) begin
          // the same defect pattern for every window length of a rate
          void'($urandom(1000 * ri + 17));
          foreach (kind[i]) begin
            int r, c;
            r = i / W;
            c = i % W;
            kind[i] = 0;
            if (r > 0 && c > 0 && r < W - 1 && c < W - 1 && $urandom_range(0, 999) < RATES[ri] * 10)
              kind[i] = 1 + int'($urandom_range(0, 1));
          end
          @(negedge clk); map_erase = 1;
          @(negedge clk); map_erase = 0;
          while (map_busy) @(negedge clk);
          reach[t][ri][wi] = ROUNDS + 1;
          line = "";
          for (int round = 1; round <= ROUNDS; round++) begin
            // new image
            for (int a = 0; a < int'(DEPTH); a++) begin
              truth[a] = 1800 + (a / W) * 4 + (a % W) * 3 + int'($urandom_range(0, 10));
              v = (kind[a] == 1) ? 0 : (kind[a] == 2) ? 4095 : truth[a];
              img_en = 1; img_we = 1; img_addr = AW'(a); img_wdata = 12'(v);
              @(negedge clk);
            end
            img_en = 0; img_we = 0;
            window_len = 32'(int'(FRACS[wi] * real'(PASS1)));
            start = 1; @(negedge clk); start = 0;
            while (!window_done) @(negedge clk);
            // read back and measure
            good = 0;
            for (int a = 0; a < int'(DEPTH); a++) begin
              img_en = 1; img_addr = AW'(a);
              @(negedge clk);
              v = int'(img_rdata);
              if (10 * ((v > truth[a]) ? v - truth[a] : truth[a] - v) < truth[a]) good++;
            end
            img_en = 0;
            if (round == 1) y_first = good;
            y_last = good;
            if (good * 100 >= 99 * int'(DEPTH) && reach[t][ri][wi] > ROUNDS) reach[t][ri][wi] = round;
            if (round % 3 == 0) line = {line, $sformatf(" %5.1f", 100.0 * good / DEPTH)};
          end
          $display("%0d TC, %2d %% defects, W = %6.4f pass: yield %s", N, RATES[ri], FRACS[wi], line);
          checks++;
          if (y_last < y_first) begin failures++; $display("  yield fell"); end
        end
      finished++;
    end
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == 3);
    for (int t = 0; t < 3; t++)
      for (int ri = 0; ri < 3; ri++) begin
        checks++;
        if (reach[t][ri][0] > ROUNDS) begin
          failures++; $display("%0d TC, %0d %%: longest window never reached 99 %%", NTCS[t], RATES[ri]);
        end
        for (int wi = 1; wi < 6; wi++) begin
          checks++;
          if (reach[t][ri][wi] < reach[t][ri][wi-1]) begin
            failures++; $display("%0d TC, %0d %%: window %0d faster than a longer one", NTCS[t], RATES[ri], wi);
          end
        end
        if (t > 0) for (int wi = 0; wi < 6; wi++) begin
          checks++;
          if (reach[t][ri][wi] > reach[0][ri][wi]) begin
            failures++; $display("%0d TC slower than 1 TC (%0d %%, window %0d)", NTCS[t], RATES[ri], wi);
          end
        end
      end
    $display("windows to reach 99 %% (31 = not within 30):");
    for (int t = 0; t < 3; t++)
      for (int ri = 0; ri < 3; ri++)
        $display("  %0d TC, %2d %%: %p", NTCS[t], RATES[ri], reach[t][ri]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
