// pixel_regs: the pixel registers P[1]..P[N_REG] shared by the test circuits.
//
// The registers form a shift chain: the frame memory data enters P[1] and each
// shift moves P[k] into P[k+1]. N_REG = 9 + 3(N_TC - 1), so three parallel test
// circuits share 15 registers; test circuit k (k = 1..N_TC) reads the nine
// registers P[3(k-1)+1] .. P[3(k-1)+9], so neighbouring test circuits share six
// registers (two pixel columns).
//
// The register count and the sharing follow the design; the shift chain is
// read from its block diagram, where the memory data line enters P[1] only.
// Reset clears the registers. Timing: one shift per cycle with shift_en high.
//
// Interface: q[0] is P[1], q[N_REG-1] is P[N_REG].
module pixel_regs #(
  parameter int unsigned PIX_W = 12,
  parameter int unsigned N_REG = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic [PIX_W-1:0] din,
  output logic [PIX_W-1:0] q [N_REG]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_REG; k++) q[k] <= '0;
    end else if (shift_en) begin
      q[0] <= din;
      for (int k = 1; k < N_REG; k++) q[k] <= q[k-1];
    end
  end

endmodule
