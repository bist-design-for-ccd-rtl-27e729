// loader_storer: the only user of the frame memory's single read/write port.
//
// While the BIST is active it turns load requests into memory reads and
// hands each returned pixel to the pixel registers as one shift, one cycle
// later (the memory's read latency); store requests write a repaired pixel
// back. While the BIST is idle the port belongs to the host side, which
// writes captured images (the ADC path) and reads the repaired image.
//
// Loading into the pixel registers follows the design; the host side and
// the write-back of repaired pixels through the same port are this design's
// own choices for the repair step and the image path.
//
// Timing: a load issued in cycle t shifts into P[1] at the end of cycle t+1,
// so N back-to-back loads take N+1 cycles. Host reads return in host_rdata
// one cycle after the request, flagged by host_rvalid.
module loader_storer #(
  parameter int unsigned PIX_W = 12,
  parameter int unsigned AW    = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bist_active,
  // BIST side
  input  logic             ld_req,
  input  logic [AW-1:0]    ld_addr,
  input  logic             st_req,
  input  logic [AW-1:0]    st_addr,
  input  logic [PIX_W-1:0] st_data,
  output logic             shift_en,
  output logic [PIX_W-1:0] shift_data,
  // host side (image capture and readout)
  input  logic             host_en,
  input  logic             host_we,
  input  logic [AW-1:0]    host_addr,
  input  logic [PIX_W-1:0] host_wdata,
  output logic [PIX_W-1:0] host_rdata,
  output logic             host_rvalid,
  // frame memory port
  output logic             mem_en,
  output logic             mem_we,
  output logic [AW-1:0]    mem_addr,
  output logic [PIX_W-1:0] mem_wdata,
  input  logic [PIX_W-1:0] mem_rdata
);

  always_comb begin
    if (bist_active) begin
      mem_en    = ld_req | st_req;
      mem_we    = st_req;
      mem_addr  = st_req ? st_addr : ld_addr;
      mem_wdata = st_data;
    end else begin
      mem_en    = host_en;
      mem_we    = host_we;
      mem_addr  = host_addr;
      mem_wdata = host_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_en    <= 1'b0;
      host_rvalid <= 1'b0;
    end else begin
      shift_en    <= bist_active & ld_req & ~st_req;
      host_rvalid <= ~bist_active & host_en & ~host_we;
    end
  end

  assign shift_data = mem_rdata;
  assign host_rdata = mem_rdata;

  // one port: a load and a store may not be requested in the same cycle
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(ld_req && st_req));

endmodule
