// addr_gen: address generator of the BIST.
//
// It computes the frame memory address of every pixel loaded into the pixel
// registers and the flash address of every map entry read or written. It
// keeps three positions:
//  * the test position (grp_row, grp_col): the group of N_TC horizontally
//    adjacent pixels under test, centre columns grp_col .. grp_col+N_TC-1.
//    Groups are visited column-group by column-group, top to bottom within a
//    column group (the loop order of the soft test: columns outside, rows
//    inside). Only interior pixels (rows 1..IMG_H-2, columns 1..IMG_W-2) have
//    a full 3x3 neighbourhood and are tested. If the interior width is not a
//    multiple of N_TC, the last column group is moved left to end at column
//    IMG_W-2, so a few columns are tested twice. The position is kept from one
//    window to the next, so each window resumes where the last one stopped.
//  * the repair scan position (rep_row, rep_col), interior pixels in
//    row-major order, plus the previous position (the one whose map code has
//    just come back from the pipelined flash read).
//  * the load counter (ld_dc, ld_dr): column offset and row offset inside the
//    block being loaded. Loading is column by column, top to bottom inside a
//    column, so N_TC+2 columns of 3 pixels (9 + 3(N_TC-1) loads) in test mode
//    and 3 columns in repair mode.
//
// The vertical load order and the sharing of loaded columns follow the
// design; the group traversal, the border handling and the repair scan order
// are this design's own choices.
//
// Timing: all outputs are combinational from the registered positions; each
// command input changes the positions on the next clock edge.
// Addresses are row * IMG_W + column.
module addr_gen #(
  parameter int unsigned IMG_W = 4096,
  parameter int unsigned IMG_H = 4096,
  parameter int unsigned N_TC  = 3,
  localparam int unsigned AW   = $clog2(IMG_W * IMG_H),
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H),
  localparam int unsigned TW   = (N_TC > 1) ? $clog2(N_TC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // test position
  input  logic          pos_clear,   // back to the first group
  input  logic          grp_next,    // advance to the next group (wraps)
  output logic          grp_last,    // current group is the last of a pass
  // repair scan
  input  logic          rep_start,   // scan position to the first pixel
  input  logic          rep_step,    // previous <= current, current advances
  output logic          rep_at_last, // current scan position is the last pixel
  // load counter
  input  logic          ld_start,
  input  logic          ld_step,
  input  logic          mode_repair, // 1: loads around the previous scan position
  output logic          ld_last,     // current load is the last of the block
  // addresses
  input  logic [TW-1:0] tc_sel,      // test circuit index 0..N_TC-1 (P[3k+1..])
  output logic [AW-1:0] fm_addr,     // frame address of the current load
  output logic [AW-1:0] fl_addr,     // flash address: test centre / scan position
  output logic [AW-1:0] rep_addr     // address of the pixel being repaired
);

  localparam int unsigned LAST_ROW = IMG_H - 2;
  localparam int unsigned LAST_COL = IMG_W - 2;
  localparam int unsigned LAST_GRP = IMG_W - 1 - N_TC;   // first centre column of the last group
  localparam int unsigned DCW      = $clog2(N_TC + 2);

  logic [YW-1:0]  grp_row, rep_row, prev_row, base_row;
  logic [XW-1:0]  grp_col, rep_col, prev_col, base_col;
  logic [1:0]     ld_dr;
  logic [DCW-1:0] ld_dc;

  // ---------------------------------------------------------------- test position
  assign grp_last = (grp_row == YW'(LAST_ROW)) && (grp_col == XW'(LAST_GRP));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp_row <= YW'(1);
      grp_col <= XW'(1);
    end else if (pos_clear) begin
      grp_row <= YW'(1);
      grp_col <= XW'(1);
    end else if (grp_next) begin
      if (grp_row != YW'(LAST_ROW)) begin
        grp_row <= grp_row + 1'b1;
      end else begin
        grp_row <= YW'(1);
        if (grp_col == XW'(LAST_GRP))                        grp_col <= XW'(1);
        else if (int'(grp_col) + N_TC > LAST_GRP)            grp_col <= XW'(LAST_GRP);
        else                                                 grp_col <= grp_col + XW'(N_TC);
      end
    end
  end

  // ---------------------------------------------------------------- repair scan
  assign rep_at_last = (rep_row == YW'(LAST_ROW)) && (rep_col == XW'(LAST_COL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_row  <= YW'(1);
      rep_col  <= XW'(1);
      prev_row <= YW'(1);
      prev_col <= XW'(1);
    end else if (rep_start) begin
      rep_row <= YW'(1);
      rep_col <= XW'(1);
    end else if (rep_step) begin
      prev_row <= rep_row;
      prev_col <= rep_col;
      if (rep_col != XW'(LAST_COL)) begin
        rep_col <= rep_col + 1'b1;
      end else begin
        rep_col <= XW'(1);
        rep_row <= (rep_row == YW'(LAST_ROW)) ? YW'(1) : rep_row + 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- load counter
  assign ld_last = (ld_dr == 2'd2) &&
                   (ld_dc == (mode_repair ? DCW'(2) : DCW'(N_TC + 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_dr <= '0;
      ld_dc <= '0;
    end else if (ld_start) begin
      ld_dr <= '0;
      ld_dc <= '0;
    end else if (ld_step) begin
      if (ld_dr == 2'd2) begin
        ld_dr <= '0;
        ld_dc <= ld_dc + 1'b1;
      end else begin
        ld_dr <= ld_dr + 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- addresses
  always_comb begin
    base_row = mode_repair ? prev_row : grp_row;
    base_col = mode_repair ? prev_col : grp_col;
    // top-left corner of the block is (base_row-1, base_col-1)
    fm_addr  = AW'(AW'(base_row) + AW'(ld_dr) - AW'(1)) * AW'(IMG_W)
             + AW'(base_col) + AW'(ld_dc) - AW'(1);
    // test circuit k reads the registers loaded last, so k = 0 is the
    // right-most centre column of the group
    fl_addr  = mode_repair
             ? AW'(rep_row) * AW'(IMG_W) + AW'(rep_col)
             : AW'(grp_row) * AW'(IMG_W) + AW'(grp_col) + AW'(N_TC - 1) - AW'(tc_sel);
    rep_addr = AW'(prev_row) * AW'(IMG_W) + AW'(prev_col);
  end

endmodule
