// tb_sort_select4: checks SORT & SELECT 4 against an insertion sort.
// Random neighbourhoods (narrow and full value ranges, so ties occur) are
// applied; the four outputs must equal ranks 3..6 of the eight inputs.
module tb_sort_select4;
  localparam int unsigned PIX_W = 12;
  logic [PIX_W-1:0] nbr [8];
  logic [PIX_W-1:0] mid [4];
  int checks = 0, failures = 0;

  sort_select4 #(.PIX_W(PIX_W)) dut (.nbr, .mid);

  task automatic check_one();
    int v [8];
    int t;
    for (int i = 0; i < 8; i++) v[i] = int'(nbr[i]);
    for (int i = 1; i < 8; i++)
      for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin
        t = v[j]; v[j] = v[j-1]; v[j-1] = t;
      end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(mid[k]) != v[k+2]) begin
        failures++;
        if (failures < 10) $display("mismatch rank %0d: got %0d expected %0d", k+2, mid[k], v[k+2]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 8; i++)
        nbr[i] = (n % 2 == 0) ? PIX_W'($urandom_range(0, 7)) : PIX_W'($urandom);
      #1;
      check_one();
    end
    // descending input
    for (int i = 0; i < 8; i++) nbr[i] = PIX_W'(800 - 100 * i);
    #1;
    check_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
