// tb_test_circuit: checks the MMF soft test of one 3x3 window.
// The reference drops the two smallest and two largest neighbours, takes the
// truncated mean of the rest and applies |AVG - P5| / AVG < 0.1 in real
// arithmetic, then the fault-class rule. Random gray windows with a normal,
// slightly off, stuck or mis-sensitive centre are applied.
module tb_test_circuit;
  import bist_pkg::*;
  localparam int unsigned PIX_W = 12;
  logic [PIX_W-1:0] win [9];
  logic [PIX_W-1:0] avg;
  logic             normal;
  map_code_e        code;
  int checks = 0, failures = 0;
  int seen [8];

  test_circuit #(.PIX_W(PIX_W)) dut (.win, .avg, .normal, .code);

  task automatic check_one();
    int v [8];
    int t, ea, c;
    real ratio;
    logic en;
    logic [2:0] ec;
    for (int i = 0; i < 4; i++) v[i] = int'(win[i]);
    for (int i = 5; i < 9; i++) v[i-1] = int'(win[i]);
    for (int i = 1; i < 8; i++)
      for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin
        t = v[j]; v[j] = v[j-1]; v[j-1] = t;
      end
    ea = (v[2] + v[3] + v[4] + v[5]) / 4;
    c  = int'(win[4]);
    if (ea == 0) en = 1'b0;
    else begin
      ratio = real'((c > ea) ? c - ea : ea - c) / real'(ea);
      en = ratio < 0.1 - 1.0e-12;
    end
    if (en)                             ec = 3'b100;
    else if (c == 0)                    ec = 3'b000;
    else if (c == (1 << PIX_W) - 1)     ec = 3'b010;
    else if (c < ea)                    ec = 3'b001;
    else                                ec = 3'b011;
    seen[ec]++;
    checks += 3;
    if (int'(avg) != ea) failures++;
    if (normal != en) failures++;
    if (code != map_code_e'(ec)) failures++;
    if (int'(avg) != ea || normal != en || code != map_code_e'(ec))
      if (failures < 10) $display("window centre %0d: avg %0d/%0d normal %0b/%0b code %0d/%0d",
                                  c, avg, ea, normal, en, code, ec);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base, kind;
    for (int n = 0; n < 5000; n++) begin
      base = $urandom_range(500, 3500);
      for (int i = 0; i < 9; i++) win[i] = PIX_W'(base + $urandom_range(0, 60) - 30);
      // a few wild neighbours, which MMF must ignore
      if ($urandom_range(0, 3) == 0) win[$urandom_range(0, 3)] = '0;
      if ($urandom_range(0, 3) == 0) win[$urandom_range(5, 8)] = '1;
      kind = $urandom_range(0, 5);
      case (kind)
        0: win[4] = '0;
        1: win[4] = '1;
        2: win[4] = PIX_W'(base / 2);
        3: win[4] = PIX_W'(base + base / 2 > 4094 ? 4094 : base + base / 2);
        4: win[4] = PIX_W'(base + $urandom_range(0, base / 5) - base / 10);
        default: ;
      endcase
      #1;
      check_one();
    end
    // exact threshold: AVG = 100, centre 110 is abnormal, 109 normal
    for (int i = 0; i < 9; i++) win[i] = PIX_W'(100);
    win[4] = PIX_W'(110); #1; check_one();
    checks++; if (normal) failures++;
    win[4] = PIX_W'(109); #1; check_one();
    checks++; if (!normal) failures++;
    // all-black neighbourhood: AVG = 0, reported abnormal
    for (int i = 0; i < 9; i++) win[i] = '0;
    #1; check_one();
    // every class must have occurred
    foreach (seen[i]) if (i <= 4) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("class %0d never produced", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
