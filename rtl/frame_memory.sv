// frame_memory: the frame store of the imaging system, an ordinary SRAM with
// one read/write port.
//
// It holds one captured image, one PIX_W-bit word per pixel, addressed
// row-major (address = row * IMG_W + column). Size by default 4096 x 4096
// 12-bit words: the 16-megapixel CCD and the 12-bit ADC of the design.
//
// Timing: synchronous. With en high, a write stores wdata at addr on the
// clock edge; a read returns the word in rdata on the next cycle (rdata holds
// its value otherwise). The memory is assumed fault free, as in the design.
module frame_memory #(
  parameter int unsigned PIX_W = 12,
  parameter int unsigned DEPTH = 4096 * 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [PIX_W-1:0] wdata,
  output logic [PIX_W-1:0] rdata
);

  logic [PIX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
