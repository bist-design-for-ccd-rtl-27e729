// test_circuit: soft test of one pixel against its 3x3 neighbourhood.
//
// The pixel under test is the centre of a 3x3 window. Its eight neighbours go
// through SORT & SELECT 4; the middle four are added (ADDER) and divided by
// four (a 2-bit right shift, truncating) to give AVG, the mean of the medium
// four. The comparator then checks
//     |AVG - P5| / AVG < C,   with C = C_NUM / C_DEN (0.1 by default),
// evaluated without a divider as |AVG - P5| * C_DEN < AVG * C_NUM. When it
// holds the pixel is normal. Note that with AVG = 0 the strict comparison
// fails, so a pixel in an all-black neighbourhood is reported abnormal.
//
// The test itself, the threshold 0.1 and the divide-by-4 follow the design.
// The split of an abnormal pixel into the four fault classes is this
// design's own rule: value 0 -> stuck low, full scale -> stuck high,
// otherwise below AVG -> low sensitive, above AVG -> high sensitive.
//
// Interface: win[0..8] is the window in column-major order, win[4] is the
// pixel under test. All outputs are combinational. avg also serves the
// repair step as the replacement ("normal") value of a defective pixel.
module test_circuit
  import bist_pkg::*;
#(
  parameter int unsigned PIX_W = 12,
  parameter int unsigned C_NUM = 1,
  parameter int unsigned C_DEN = 10
) (
  input  logic [PIX_W-1:0] win [9],
  output logic [PIX_W-1:0] avg,
  output logic             normal,
  output map_code_e        code
);

  localparam int unsigned PROD_W = PIX_W + $clog2(C_DEN + C_NUM + 1) + 1;

  logic [PIX_W-1:0] nbr [8];
  logic [PIX_W-1:0] mid [4];
  logic [PIX_W+1:0] sum;
  logic [PIX_W-1:0] centre, diff;
  logic [PROD_W-1:0] lhs, rhs;

  always_comb begin
    for (int k = 0; k < 4; k++) nbr[k] = win[k];
    for (int k = 4; k < 8; k++) nbr[k] = win[k+1];
  end

  sort_select4 #(.PIX_W(PIX_W)) u_sort (.nbr(nbr), .mid(mid));

  always_comb begin
    centre = win[4];
    sum    = (PIX_W+2)'(mid[0]) + (PIX_W+2)'(mid[1]) + (PIX_W+2)'(mid[2]) + (PIX_W+2)'(mid[3]);
    avg    = PIX_W'(sum >> 2);
    diff   = (avg > centre) ? avg - centre : centre - avg;
    lhs    = PROD_W'(diff) * PROD_W'(C_DEN);
    rhs    = PROD_W'(avg) * PROD_W'(C_NUM);
    normal = lhs < rhs;
    if (normal)                  code = MAP_NORMAL;
    else if (centre == '0)       code = MAP_STUCK_LOW;
    else if (centre == '1)       code = MAP_STUCK_HIGH;
    else if (centre < avg)       code = MAP_LOW_SENS;
    else                         code = MAP_HIGH_SENS;
  end

endmodule
