// tb_pixel_regs: checks the pixel register shift chain (15 registers).
// Random values are shifted in with random gaps; after every cycle the
// registers must hold the last 15 shifted values, newest in P[1].
module tb_pixel_regs;
  localparam int unsigned PIX_W = 12;
  localparam int unsigned N_REG = 15;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic [PIX_W-1:0] din = '0;
  logic [PIX_W-1:0] q [N_REG];
  int checks = 0, failures = 0;
  int hist [$];

  pixel_regs #(.PIX_W(PIX_W), .N_REG(N_REG)) dut (.clk, .rst_n, .shift_en, .din, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_REG; i++) hist.push_back(0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      shift_en = ($urandom_range(0, 3) != 0);
      din      = PIX_W'($urandom);
      @(posedge clk);
      if (shift_en) begin
        hist.push_front(int'(din));
        void'(hist.pop_back());
      end
      #1;
      for (int k = 0; k < N_REG; k++) begin
        checks++;
        if (int'(q[k]) != hist[k]) begin
          failures++;
          if (failures < 10) $display("P[%0d] = %0d, expected %0d", k + 1, q[k], hist[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
