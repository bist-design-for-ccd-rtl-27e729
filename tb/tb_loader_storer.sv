// tb_loader_storer: checks the frame memory port sharing with a small
// memory model in the testbench. Host writes fill it while the BIST is idle;
// BIST loads must come back as a shift one cycle later with the right data;
// a BIST store must reach the memory; host requests while the BIST is
// active must be ignored; host reads return one cycle later with rvalid.
module tb_loader_storer;
  localparam int unsigned PIX_W = 12;
  localparam int unsigned AW    = 8;
  logic clk = 0, rst_n = 0, bist_active = 0;
  logic ld_req = 0, st_req = 0, shift_en, host_en = 0, host_we = 0, host_rvalid;
  logic [AW-1:0] ld_addr = '0, st_addr = '0, host_addr = '0;
  logic [PIX_W-1:0] st_data = '0, shift_data, host_wdata = '0, host_rdata;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [PIX_W-1:0] mem_wdata, mem_rdata;
  logic [PIX_W-1:0] mem [1 << AW];
  logic [PIX_W-1:0] ref_mem [1 << AW];
  int checks = 0, failures = 0;

  loader_storer #(.PIX_W(PIX_W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  // memory model: synchronous, one cycle read latency
  always_ff @(posedge clk)
    if (mem_en) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else        mem_rdata     <= mem[mem_addr];
    end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // host fills the memory
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      host_en = 1; host_we = 1; host_addr = AW'(i); host_wdata = PIX_W'($urandom);
      ref_mem[i] = host_wdata;
    end
    @(negedge clk); host_en = 0; host_we = 0;
    // BIST loads, back to back
    bist_active = 1;
    for (int n = 0; n < 200; n++) begin
      a = $urandom_range(0, (1 << AW) - 1);
      ld_req = 1; ld_addr = AW'(a);
      // a host write while active must be ignored
      host_en = 1; host_we = 1; host_addr = AW'(a); host_wdata = ~ref_mem[a];
      @(negedge clk);
      ld_req = 0; host_en = 0; host_we = 0;
      expect_eq(int'(shift_en), 1, "shift_en after load");
      expect_eq(int'(shift_data), int'(ref_mem[a]), "loaded pixel");
      if (n % 5 == 0) begin
        // a store of a repaired value, elsewhere than the last load
        a = (a + 1 + int'($urandom_range(0, 100))) % (1 << AW);
        st_req = 1; st_addr = AW'(a); st_data = PIX_W'($urandom); ref_mem[a] = st_data;
        @(negedge clk);
        st_req = 0;
        expect_eq(int'(shift_en), 0, "no shift after store");
      end
    end
    @(negedge clk);
    expect_eq(int'(shift_en), 0, "no shift when idle");
    bist_active = 0;
    // host reads everything back
    for (int i = 0; i < (1 << AW); i++) begin
      host_en = 1; host_we = 0; host_addr = AW'(i);
      @(negedge clk);
      host_en = 0;
      expect_eq(int'(host_rvalid), 1, "host_rvalid");
      expect_eq(int'(host_rdata), int'(ref_mem[i]), "host read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
