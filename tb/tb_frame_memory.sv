// tb_frame_memory: checks the single-port frame SRAM (64 x 64 pixels).
// Writes a full random image, then reads random addresses back and checks
// that data appears one cycle after the read and holds while idle.
module tb_frame_memory;
  localparam int unsigned PIX_W = 12;
  localparam int unsigned DEPTH = 64 * 64;
  localparam int unsigned AW    = $clog2(DEPTH);
  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0]    addr = '0;
  logic [PIX_W-1:0] wdata = '0, rdata;
  logic [PIX_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  frame_memory #(.PIX_W(PIX_W), .DEPTH(DEPTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PIX_W-1:0] held;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'(a); wdata = PIX_W'($urandom);
      ref_mem[a] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = 1; we = 0; addr = AW'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[addr]) begin
        failures++;
        if (failures < 10) $display("addr %0d: read %0h expected %0h", addr, rdata, ref_mem[addr]);
      end
      // idle cycle: output holds
      held = rdata; en = 0;
      @(negedge clk);
      checks++;
      if (rdata !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
