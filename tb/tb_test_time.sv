// tb_test_time: testing time against sensor size and number of parallel
// test circuits (1, 2, 3 and 5 test circuits; 64 x 64 up to 1024 x 1024 pixels).
//
// Each configuration is a separate instance of the design that tests one
// flat gray frame in one window. The cycle count of the pass must equal
//   groups * (9 + 3(n-1) loads + 1 + n stores + 1),
// groups = ceil((W-2)/n) * (H-2), and must fall as n grows. The counts are
// printed as a table.
module tb_test_time;
  localparam int unsigned SIZES [5] = '{64, 128, 256, 512, 1024};
  localparam int unsigned NTCS  [4] = '{1, 2, 3, 5};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint result [5][4];
  int finished = 0;

  for (genvar s = 0; s < 5; s++) begin : g_size
    for (genvar t = 0; t < 4; t++) begin : g_tc
      localparam int unsigned W  = SIZES[s];
      localparam int unsigned N  = NTCS[t];
      localparam int unsigned AW = $clog2(W * W);
      logic start = 0, busy, window_done, win_timeout, win_pass_end;
      logic [31:0] window_len = '1, cycles;
      logic [AW:0] defect_count, cnt_repaired, cnt_tested, cnt_skipped;
      logic img_en = 0, img_we = 0, img_rvalid, map_erase = 0, map_busy, map_rd_en = 0, map_rvalid;
      logic [AW-1:0] img_addr = '0, map_rd_addr = '0;
      logic [11:0] img_wdata = '0, img_rdata;
      logic [2:0] map_rdata;

      ccd_bist_top #(.IMG_W(W), .IMG_H(W), .N_TC(N)) dut (.*);

      initial begin
        longint groups, exp;
        @(posedge rst_n);
        @(negedge clk); map_erase = 1;
        @(negedge clk); map_erase = 0;
        while (map_busy) @(negedge clk);
        for (int a = 0; a < int'(W * W); a++) begin
          img_en = 1; img_we = 1; img_addr = AW'(a); img_wdata = 12'd2000;
          @(negedge clk);
        end
        img_en = 0; img_we = 0;
        start = 1; @(negedge clk); start = 0;
        while (!window_done) @(negedge clk);
        groups = longint'((W - 2 + N - 1) / N) * (W - 2);
        exp    = groups * (9 + 3 * (N - 1) + 1 + N + 1);
        result[s][t] = longint'(cycles);
        checks++;
        if (longint'(cycles) != exp || !win_pass_end) begin
          failures++;
          $display("%0dx%0d, %0d test circuits: %0d cycles, expected %0d", W, W, N, cycles, exp);
        end
        checks++;
        if (defect_count != 0) begin failures++; $display("flat frame produced defects"); end
        finished++;
      end
    end
  end

  initial begin
    repeat (16000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == 20);
    $display("pixels      1 TC        2 TC        3 TC        5 TC   (cycles per pass)");
    for (int s = 0; s < 5; s++) begin
      $display("%4dx%-4d %10d  %10d  %10d  %10d", SIZES[s], SIZES[s],
               result[s][0], result[s][1], result[s][2], result[s][3]);
      for (int t = 1; t < 4; t++) begin
        checks++;
        if (result[s][t] >= result[s][t-1]) begin
          failures++;
          $display("%0d test circuits not faster than %0d", NTCS[t], NTCS[t-1]);
        end
      end
      $display("  speed-up of 3 over 1 test circuit: %0.2f, of 5 over 3: %0.2f",
               real'(result[s][0]) / real'(result[s][2]), real'(result[s][2]) / real'(result[s][3]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
