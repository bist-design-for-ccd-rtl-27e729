// flash_memory: behavioural model of the non-volatile flash that keeps the
// cumulative defective pixel map, one 3-bit code per pixel (see bist_pkg).
//
// This is a behavioural model of a flash macro, not logic to be synthesized:
// a real flash has its own program/erase timing, which the design does not
// give. The model is idealised: a read returns the code on the next cycle, a
// program (write) takes one cycle, and a bulk erase sweeps the array one
// word per cycle, setting every cell to 3'b111 (erased = "not tested yet"),
// with busy high until it is done. Accesses during an erase are ignored.
//
// Interface: en/we/addr/wdata/rdata form one synchronous port, addressed by
// pixel index (row * width + column), as in the frame memory.
module flash_memory #(
  parameter int unsigned DEPTH = 4096 * 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          erase,
  output logic          busy,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [2:0]    wdata,
  output logic [2:0]    rdata
);

  logic [2:0]    cells [DEPTH];
  logic [AW-1:0] erase_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      erase_addr <= '0;
    end else if (!busy) begin
      if (erase) begin
        busy       <= 1'b1;
        erase_addr <= '0;
      end
    end else begin
      if (erase_addr == AW'(DEPTH - 1)) busy <= 1'b0;
      erase_addr <= erase_addr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (busy) begin
      cells[erase_addr] <= 3'b111;
    end else if (en) begin
      if (we) cells[addr] <= wdata;
      else    rdata       <= cells[addr];
    end
  end

endmodule
