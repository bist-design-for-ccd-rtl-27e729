// ccd_controller: sequencer of the on-line soft-test/repair BIST.
//
// Work is done in windows. A window starts with `start` (a new image is in the
// frame memory) and lasts at most window_len clock cycles, counted from start.
// Inside a window:
//  1. Repair. The defective pixel map is scanned, one map entry per cycle
//     (pipelined flash reads). For every recorded defect the 3x3
//     neighbourhood is loaded into the pixel registers and the mean of the
//     medium four neighbours (test circuit 1's AVG) is written back to the
//     frame memory in place of the defective pixel. While no defect has been
//     recorded yet the repair is null and the scan is skipped.
//  2. Testing. Group after group of N_TC adjacent pixels is loaded
//     (9 + 3(N_TC-1) pixel loads, while the old map codes of the N_TC centres
//     are read from the flash), then the N_TC verdicts are written to the
//     flash one per cycle through the result multiplexer. A centre whose map
//     entry already records a defect is skipped, so a recorded defect is never
//     overwritten (the map is cumulative). Before each group the elapsed time
//     is compared with window_len; the window ends when it is used up, or when
//     the last group of the image has been tested (end of a pass). The test
//     position is kept, so the next window resumes there.
//
// Repair-then-test windows, the null first repair, the cumulative map and
// the parallel test circuits follow the design. The window counted in clock
// cycles, the repair value (neighbourhood AVG), the skip of recorded pixels,
// the end of a window at the end of a pass and the defect counter are this
// design's own choices.
//
// Timing per test group: (N_REG + 1) load cycles, N_TC store cycles, one
// decision cycle: 20 cycles for 3 test circuits (3 pixels), 12 for one.
// Per repaired pixel: 9 + 1 load cycles, one write, one scan cycle.
module ccd_controller
  import bist_pkg::*;
#(
  parameter int unsigned N_TC = 3,
  parameter int unsigned AW   = 24,
  parameter int unsigned CW   = 32,
  localparam int unsigned TW  = (N_TC > 1) ? $clog2(N_TC) : 1,
  localparam int unsigned RW  = $clog2(N_TC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host control
  input  logic          start,
  input  logic [CW-1:0] window_len,
  input  logic          map_erase,     // clear the defect count and test position
  input  logic          map_busy,      // flash busy erasing
  output logic          busy,          // owns the memory ports
  output logic          window_done,   // one-cycle pulse at the end of a window
  output logic          win_timeout,   // last window ended because its time ran out
  output logic          win_pass_end,  // last window ended at the end of a pass
  output logic [AW:0]   defect_count,  // defects recorded in the map
  output logic [AW:0]   cnt_repaired,  // pixels repaired in the last window
  output logic [AW:0]   cnt_tested,    // pixels tested (map written) in the last window
  output logic [AW:0]   cnt_skipped,   // tests skipped, centre already recorded
  output logic [CW-1:0] cycles,        // cycles used by the last window
  // address generator
  output logic          pos_clear,
  output logic          grp_next,
  input  logic          grp_last,
  output logic          rep_start,
  output logic          rep_step,
  input  logic          rep_at_last,
  output logic          ld_start,
  output logic          ld_step,
  output logic          mode_repair,
  input  logic          ld_last,
  output logic [TW-1:0] tc_sel,
  // loader/storer
  output logic          ld_req,
  output logic          st_req,
  // flash
  output logic          fl_en,
  output logic          fl_we,
  input  logic [2:0]    fl_rdata,
  input  map_code_e     sel_code       // verdict of test circuit tc_sel (result mux)
);

  typedef enum logic [3:0] {
    S_IDLE, S_REP_SCAN, S_REP_LOAD, S_REP_WAIT, S_REP_WR,
    S_TEST_GRP, S_TEST_LOAD, S_TEST_WAIT, S_TEST_STORE, S_DONE
  } state_e;

  state_e        state, state_n;
  logic [CW-1:0] timer;
  logic          scan_pend, scan_done;
  logic [TW-1:0] k;           // store index / old-code read index
  logic          rd_pend;
  logic [RW-1:0] rd_k;
  logic [2:0]    old_code [N_TC];
  logic          timed_out, pass_end;

  assign busy = (state != S_IDLE);

  // ------------------------------------------------------------ next state and commands
  always_comb begin
    state_n     = state;
    pos_clear   = 1'b0;
    grp_next    = 1'b0;
    rep_start   = 1'b0;
    rep_step    = 1'b0;
    ld_start    = 1'b0;
    ld_step     = 1'b0;
    mode_repair = 1'b0;
    tc_sel      = k;
    ld_req      = 1'b0;
    st_req      = 1'b0;
    fl_en       = 1'b0;
    fl_we       = 1'b0;
    unique case (state)
      S_IDLE: begin
        pos_clear = map_erase;
        if (start && !map_busy && !map_erase) begin
          if (defect_count == '0) state_n = S_TEST_GRP;   // null repair
          else begin
            rep_start = 1'b1;
            state_n   = S_REP_SCAN;
          end
        end
      end
      S_REP_SCAN: begin
        mode_repair = 1'b1;
        if (scan_pend && is_defect(fl_rdata)) begin
          ld_start = 1'b1;
          state_n  = S_REP_LOAD;
        end else if (scan_done) begin
          state_n = S_TEST_GRP;
        end else begin
          fl_en    = 1'b1;                                // read map at scan position
          rep_step = 1'b1;
        end
      end
      S_REP_LOAD: begin
        mode_repair = 1'b1;
        ld_req      = 1'b1;
        ld_step     = 1'b1;
        if (ld_last) state_n = S_REP_WAIT;
      end
      S_REP_WAIT: begin
        mode_repair = 1'b1;
        state_n     = S_REP_WR;
      end
      S_REP_WR: begin
        mode_repair = 1'b1;
        st_req      = 1'b1;
        state_n     = S_REP_SCAN;
      end
      S_TEST_GRP: begin
        if (timer >= window_len) state_n = S_DONE;
        else begin
          ld_start = 1'b1;
          state_n  = S_TEST_LOAD;
        end
      end
      S_TEST_LOAD: begin
        ld_req  = 1'b1;
        ld_step = 1'b1;
        tc_sel  = TW'(rd_k);
        fl_en   = int'(rd_k) < N_TC;                    // read old codes of the centres
        if (ld_last) state_n = S_TEST_WAIT;
      end
      S_TEST_WAIT: state_n = S_TEST_STORE;
      S_TEST_STORE: begin
        fl_en = !is_defect(old_code[k]);
        fl_we = fl_en;
        if (int'(k) == N_TC - 1) begin
          grp_next = 1'b1;
          state_n  = grp_last ? S_DONE : S_TEST_GRP;
        end
      end
      S_DONE:  state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      timer        <= '0;
      scan_pend    <= 1'b0;
      scan_done    <= 1'b0;
      k            <= '0;
      rd_pend      <= 1'b0;
      rd_k         <= '0;
      timed_out    <= 1'b0;
      pass_end     <= 1'b0;
      window_done  <= 1'b0;
      win_timeout  <= 1'b0;
      win_pass_end <= 1'b0;
      defect_count <= '0;
      cnt_repaired <= '0;
      cnt_tested   <= '0;
      cnt_skipped  <= '0;
      cycles       <= '0;
      for (int i = 0; i < N_TC; i++) old_code[i] <= 3'b111;
    end else begin
      state       <= state_n;
      window_done <= 1'b0;
      if (state == S_IDLE) begin
        timer <= '0;
        if (map_erase) defect_count <= '0;
        if (state_n != S_IDLE) begin
          cnt_repaired <= '0;
          cnt_tested   <= '0;
          cnt_skipped  <= '0;
          timed_out    <= 1'b0;
          pass_end     <= 1'b0;
          scan_pend    <= 1'b0;
          scan_done    <= 1'b0;
        end
      end else begin
        timer <= timer + 1'b1;
      end

      // repair scan bookkeeping
      if (state == S_REP_SCAN) begin
        if (fl_en) begin
          scan_pend <= 1'b1;
          if (rep_at_last) scan_done <= 1'b1;
        end else begin
          scan_pend <= 1'b0;
        end
      end
      if (state == S_REP_WR) cnt_repaired <= cnt_repaired + 1'b1;

      // old map codes of the group's centres, read during the load
      if (state == S_TEST_GRP) begin
        rd_k    <= '0;
        rd_pend <= 1'b0;
        k       <= '0;
      end
      if (state == S_TEST_LOAD) begin
        rd_pend <= fl_en;
        if (fl_en) rd_k <= rd_k + 1'b1;
      end
      if (rd_pend) old_code[int'(rd_k) - 1] <= fl_rdata;

      // verdicts
      if (state == S_TEST_STORE) begin
        k <= k + 1'b1;
        if (fl_we) begin
          cnt_tested <= cnt_tested + 1'b1;
          if (is_defect(sel_code)) defect_count <= defect_count + 1'b1;
        end else begin
          cnt_skipped <= cnt_skipped + 1'b1;
        end
        if (int'(k) == N_TC - 1 && grp_last) pass_end <= 1'b1;
      end
      if (state == S_TEST_GRP && timer >= window_len) timed_out <= 1'b1;

      if (state == S_DONE) begin
        window_done  <= 1'b1;
        win_timeout  <= timed_out;
        win_pass_end <= pass_end;
        cycles       <= timer;
      end
    end
  end

  // a repair write and a load never share the frame memory port
  a_port: assert property (@(posedge clk) disable iff (!rst_n) !(ld_req && st_req));
  // the flash is only written with a verdict while testing
  a_flash_wr: assert property (@(posedge clk) disable iff (!rst_n) fl_we |-> state == S_TEST_STORE);

endmodule
