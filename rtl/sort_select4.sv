// sort_select4: the SORT & SELECT 4 unit of a test circuit.
//
// Sorts the eight pixels that surround the pixel under test and forwards the
// middle four of them (ranks 3 to 6 in ascending order), i.e. it drops the two
// darkest and the two brightest neighbours. Their mean is the "mean medium
// four" reference of the soft test.
//
// The dropping of 2+2 extremes follows the design; the circuit is this
// design's own choice: a purely combinational odd-even transposition sorting
// network (8 stages, 28 compare-exchange cells). There is no clock; the result
// is valid in the same cycle as the inputs.
//
// Interface: nbr[0..7] are the neighbour values in any order; mid[0..3] are
// the selected values in ascending order.
module sort_select4 #(
  parameter int unsigned PIX_W = 12
) (
  input  logic [PIX_W-1:0] nbr [8],
  output logic [PIX_W-1:0] mid [4]
);

  logic [PIX_W-1:0] stage [9][8];

  always_comb begin
    stage[0] = nbr;
    for (int s = 0; s < 8; s++) begin
      stage[s+1] = stage[s];
      // even stages compare pairs (0,1)(2,3)..., odd stages (1,2)(3,4)...
      for (int i = s % 2; i + 1 < 8; i += 2) begin
        if (stage[s][i] > stage[s][i+1]) begin
          stage[s+1][i]   = stage[s][i+1];
          stage[s+1][i+1] = stage[s][i];
        end
      end
    end
    for (int k = 0; k < 4; k++) mid[k] = stage[8][k+2];
  end

endmodule
