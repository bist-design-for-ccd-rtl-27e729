// ccd_bist_top: off-device soft-test/repair BIST for a CCD imaging system.
//
// A CCD's defective pixels cannot be repaired on the sensor, so this BIST
// finds them in the captured images and repairs them in the frame memory.
// Each pixel is compared with the mean of the medium four (MMF) of its eight
// neighbours; a deviation of 10 % or more marks it defective in a cumulative
// defect map kept in flash. In every later window the recorded pixels are
// replaced by their neighbourhood mean before testing goes on.
//
// Structure: frame memory (one read/write port) -> loader/storer -> a shift
// chain of 9 + 3(N_TC-1) pixel registers -> N_TC parallel test circuits, each
// reading nine registers, overlapping its neighbour by six. A multiplexer
// picks one test circuit's verdict at a time for the flash. The address
// generator produces both memories' addresses; the controller sequences the
// repair and test phases of each window. N_TC = 3 is the default, the
// configuration the design settles on; 1 and 5 are the other ones studied.
//
// Interface:
//  * img_*   : frame memory access while the BIST is idle: the ADC path
//              writes a captured image, the host reads the repaired image
//              (read data one cycle later, img_rvalid).
//  * map_*   : read of the defect map while idle (one cycle later,
//              map_rvalid); map_erase bulk-erases it (map_busy while erasing)
//              and restarts the test position.
//  * start / window_len : run one repair+test window of at most window_len
//              cycles on the image in the frame memory; window_done pulses
//              at its end, with the status outputs valid from then on.
// The image sensor and ADC are outside: their digitised pixels arrive on
// img_*. Addresses are row * IMG_W + column.
// The assertions are disabled during reset through rst_n, which the linter
// reports as a synchronous use of the asynchronous reset; it drives no logic.
module ccd_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned PIX_W = 12,
  parameter int unsigned IMG_W = 4096,
  parameter int unsigned IMG_H = 4096,
  parameter int unsigned N_TC  = 3,
  parameter int unsigned C_NUM = 1,
  parameter int unsigned C_DEN = 10,
  parameter int unsigned CW    = 32,
  localparam int unsigned DEPTH = IMG_W * IMG_H,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned N_REG = 9 + 3 * (N_TC - 1),
  localparam int unsigned TW    = (N_TC > 1) ? $clog2(N_TC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // window control and status
  input  logic             start,
  input  logic [CW-1:0]    window_len,
  output logic             busy,
  output logic             window_done,
  output logic             win_timeout,
  output logic             win_pass_end,
  output logic [AW:0]      defect_count,
  output logic [AW:0]      cnt_repaired,
  output logic [AW:0]      cnt_tested,
  output logic [AW:0]      cnt_skipped,
  output logic [CW-1:0]    cycles,
  // image capture / readout (ADC side)
  input  logic             img_en,
  input  logic             img_we,
  input  logic [AW-1:0]    img_addr,
  input  logic [PIX_W-1:0] img_wdata,
  output logic [PIX_W-1:0] img_rdata,
  output logic             img_rvalid,
  // defect map access
  input  logic             map_erase,
  output logic             map_busy,
  input  logic             map_rd_en,
  input  logic [AW-1:0]    map_rd_addr,
  output logic [2:0]       map_rdata,
  output logic             map_rvalid
);

  // address generator <-> controller
  logic          pos_clear, grp_next, grp_last, rep_start, rep_step, rep_at_last;
  logic          ld_start, ld_step, mode_repair, ld_last;
  logic [TW-1:0] tc_sel;
  logic [AW-1:0] ag_fm_addr, ag_fl_addr, ag_rep_addr;
  // loader/storer
  logic             ld_req, st_req, shift_en;
  logic [PIX_W-1:0] shift_data;
  logic             fm_en, fm_we;
  logic [AW-1:0]    fm_addr;
  logic [PIX_W-1:0] fm_wdata, fm_rdata;
  // pixel registers and test circuits
  logic [PIX_W-1:0] preg [N_REG];
  logic [PIX_W-1:0] tc_avg  [N_TC];
  map_code_e        tc_code [N_TC];
  logic             tc_norm [N_TC];
  map_code_e        sel_code;
  // flash
  logic          ctl_fl_en, ctl_fl_we;
  logic          fl_en, fl_we;
  logic [AW-1:0] fl_addr;
  logic [2:0]    fl_rdata;

  addr_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_TC(N_TC)) u_addr_gen (
    .clk, .rst_n,
    .pos_clear, .grp_next, .grp_last,
    .rep_start, .rep_step, .rep_at_last,
    .ld_start, .ld_step, .mode_repair, .ld_last,
    .tc_sel,
    .fm_addr (ag_fm_addr),
    .fl_addr (ag_fl_addr),
    .rep_addr(ag_rep_addr)
  );

  ccd_controller #(.N_TC(N_TC), .AW(AW), .CW(CW)) u_ctrl (
    .clk, .rst_n,
    .start, .window_len, .map_erase, .map_busy,
    .busy, .window_done, .win_timeout, .win_pass_end,
    .defect_count, .cnt_repaired, .cnt_tested, .cnt_skipped, .cycles,
    .pos_clear, .grp_next, .grp_last,
    .rep_start, .rep_step, .rep_at_last,
    .ld_start, .ld_step, .mode_repair, .ld_last,
    .tc_sel,
    .ld_req, .st_req,
    .fl_en   (ctl_fl_en),
    .fl_we   (ctl_fl_we),
    .fl_rdata,
    .sel_code
  );

  loader_storer #(.PIX_W(PIX_W), .AW(AW)) u_ls (
    .clk, .rst_n,
    .bist_active(busy),
    .ld_req, .ld_addr(ag_fm_addr),
    .st_req, .st_addr(ag_rep_addr), .st_data(tc_avg[0]),
    .shift_en, .shift_data,
    .host_en(img_en), .host_we(img_we), .host_addr(img_addr),
    .host_wdata(img_wdata), .host_rdata(img_rdata), .host_rvalid(img_rvalid),
    .mem_en(fm_en), .mem_we(fm_we), .mem_addr(fm_addr),
    .mem_wdata(fm_wdata), .mem_rdata(fm_rdata)
  );

  frame_memory #(.PIX_W(PIX_W), .DEPTH(DEPTH)) u_frame (
    .clk, .en(fm_en), .we(fm_we), .addr(fm_addr), .wdata(fm_wdata), .rdata(fm_rdata)
  );

  pixel_regs #(.PIX_W(PIX_W), .N_REG(N_REG)) u_pregs (
    .clk, .rst_n, .shift_en, .din(shift_data), .q(preg)
  );

  // test circuit k reads P[3k+1] .. P[3k+9]; the chain holds the last loaded
  // pixel in P[1], so the window in load order is P[3k+9] down to P[3k+1]
  for (genvar k = 0; k < N_TC; k++) begin : g_tc
    logic [PIX_W-1:0] win [9];
    always_comb for (int i = 0; i < 9; i++) win[i] = preg[3*k + 8 - i];
    test_circuit #(.PIX_W(PIX_W), .C_NUM(C_NUM), .C_DEN(C_DEN)) u_tc (
      .win, .avg(tc_avg[k]), .normal(tc_norm[k]), .code(tc_code[k])
    );
    // a verdict is "normal" exactly when the comparator passes
    a_norm: assert property (@(posedge clk) disable iff (!rst_n) tc_norm[k] == (tc_code[k] == MAP_NORMAL));
  end

  // result multiplexer in front of the flash data input
  assign sel_code = tc_code[tc_sel];

  // flash port: the controller while a window runs, the host map read otherwise
  always_comb begin
    if (busy) begin
      fl_en   = ctl_fl_en;
      fl_we   = ctl_fl_we;
      fl_addr = ag_fl_addr;
    end else begin
      fl_en   = map_rd_en;
      fl_we   = 1'b0;
      fl_addr = map_rd_addr;
    end
  end

  flash_memory #(.DEPTH(DEPTH)) u_flash (
    .clk, .rst_n,
    .erase(map_erase & ~busy), .busy(map_busy),
    .en(fl_en), .we(fl_we), .addr(fl_addr), .wdata(sel_code), .rdata(fl_rdata)
  );

  assign map_rdata = fl_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) map_rvalid <= 1'b0;
    else        map_rvalid <= ~busy & ~map_busy & map_rd_en;
  end

endmodule
