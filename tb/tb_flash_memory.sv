// tb_flash_memory: checks the defect map flash model (32 x 32 entries).
// Bulk erase must keep busy high for one cycle per word and leave every cell
// at 111; programmed codes must read back one cycle later; an erase clears
// them again.
module tb_flash_memory;
  localparam int unsigned DEPTH = 1024;
  localparam int unsigned AW    = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, erase = 0, busy, en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [2:0]    wdata = '0, rdata;
  logic [2:0]    ref_mem [DEPTH];
  int checks = 0, failures = 0;

  flash_memory #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .erase, .busy, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_erase();
    int n = 0;
    @(negedge clk); erase = 1;
    @(negedge clk); erase = 0;
    while (busy) begin @(negedge clk); n++; end
    checks++;
    if (n != DEPTH) begin failures++; $display("erase took %0d cycles", n); end
    for (int a = 0; a < DEPTH; a++) ref_mem[a] = 3'b111;
  endtask

  task automatic read_all();
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); en = 1; we = 0; addr = AW'(a);
      @(negedge clk); en = 0;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %0b expected %0b", a, rdata, ref_mem[a]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    do_erase();
    read_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'($urandom_range(0, DEPTH - 1)); wdata = 3'($urandom_range(0, 4));
      ref_mem[addr] = wdata;
    end
    @(negedge clk); en = 0; we = 0;
    read_all();
    do_erase();
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
