// sr_ctrl: control logic of the super-resolution engine.
//
// Runs N iterations of back-projection over the high-resolution (HR) frame.
// Each iteration scans the HR pixels in raster order, NUM_PPU pixels at a
// time (one per pixel calculation module, PPU). Time is divided into slots of
// SLOT_CYCLES cycles, counted by the slot (clock cycle) counter:
//
//   cycles 0..K-1       for frame k = cycle: issue the reads of the 2x2 HR
//                       window and of the low-resolution (LR) pixel that frame
//                       k's shifted grid maps onto each pixel
//   cycle K             issue the read of the current HR pixel itself
//   cycles 1..K+1       capture the read data into the operand registers
//   cycle SLOT-1        hand the operands to all PPUs (ppu_valid) and latch
//                       the positions of the next group of NUM_PPU pixels
//
// so each PPU starts one pixel per slot, and one iteration takes about
// SLOT_CYCLES * ceil(HR pixels / NUM_PPU) cycles. Frame alignment costs no
// extra hardware: each frame's shift vector (shift_y, shift_x, in HR pixels)
// only offsets the read addresses. The HR frame is stored in four banks by
// (row parity, column parity), so any 2x2 window is one read per bank.
//
// The HR frame is double buffered: an iteration reads buffer rd_buf and
// writes buffer !rd_buf; after the last result of an iteration is written the
// buffers swap. Results of a group arrive together from the PPUs and are
// written back one per cycle (NUM_PPU <= SLOT_CYCLES, so write-back of one
// group ends before the next group's results arrive).
//
// Handshake: pulse start for one cycle while idle with n_iter, shift_y and
// shift_x valid (they are latched). busy stays high until the last iteration
// has been written back; done then pulses for one cycle. n_iter = 0 finishes
// at once. cycle_count counts the cycles of the last run.
//
// The slot length, the cycle counter, the shift vectors as address offsets and
// the parallel pixel modules follow the published design. The raster scan,
// the banking, the double buffering, the fetch schedule within a slot and the
// start/busy/done handshake are this design's choices.
module sr_ctrl
  import sr_pkg::*;
#(
  parameter int unsigned LR_H        = 240,
  parameter int unsigned LR_W        = 320,
  parameter int unsigned NUM_FRAMES  = 5,
  parameter int unsigned NUM_PPU     = 4,
  parameter int unsigned SLOT        = SLOT_CYCLES,
  parameter int unsigned SHIFT_W     = 4,
  parameter int unsigned ITER_W      = 8,
  parameter int unsigned PPU_LATENCY = 59,
  localparam int unsigned HR_H       = 2 * LR_H,
  localparam int unsigned HR_W       = 2 * LR_W,
  localparam int unsigned HR_PIX     = HR_H * HR_W,
  localparam int unsigned LR_PIX     = LR_H * LR_W,
  localparam int unsigned BANK_WORDS = HR_PIX / NUM_BANKS,
  localparam int unsigned BANK_AW    = $clog2(BANK_WORDS),
  localparam int unsigned LR_AW      = $clog2(NUM_FRAMES * LR_PIX),
  localparam int unsigned TAG_W      = 1 + 2 + BANK_AW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // run control
  input  logic                      start,
  input  logic [ITER_W-1:0]         n_iter,
  input  logic signed [SHIFT_W-1:0] shift_y [NUM_FRAMES],
  input  logic signed [SHIFT_W-1:0] shift_x [NUM_FRAMES],
  output logic                      busy,
  output logic                      done,
  output logic [ITER_W-1:0]         iter,
  output logic [31:0]               cycle_count,
  // HR memory (four banks, one read port per PPU, registered read)
  output logic                      rd_buf,
  output logic [BANK_AW-1:0]        hyp_raddr [NUM_PPU][NUM_BANKS],
  input  fp32_t                     hyp_rdata [NUM_PPU][NUM_BANKS],
  output logic [NUM_BANKS-1:0]      hyp_we,
  output logic [BANK_AW-1:0]        hyp_waddr,
  output fp32_t                     hyp_wdata,
  // LR memory (all frames, one read port per PPU, registered read)
  output logic [LR_AW-1:0]          lr_raddr [NUM_PPU],
  input  fp32_t                     lr_rdata [NUM_PPU],
  // pixel calculation modules
  output logic                      ppu_valid,
  output fp32_t                     ppu_win     [NUM_PPU][NUM_FRAMES][4],
  output fp32_t                     ppu_lr      [NUM_PPU][NUM_FRAMES],
  output logic                      ppu_lane_ok [NUM_PPU][NUM_FRAMES],
  output fp32_t                     ppu_hyp     [NUM_PPU],
  output logic [TAG_W-1:0]          ppu_tag     [NUM_PPU],
  input  logic                      res_valid,
  input  fp32_t                     res_pix     [NUM_PPU],
  input  logic [TAG_W-1:0]          res_tag     [NUM_PPU]
);
  localparam int unsigned SLOT_W = $clog2(SLOT);
  localparam int unsigned ROW_W  = $clog2(HR_H + 1);
  localparam int unsigned COL_W  = $clog2(HR_W + NUM_PPU + 1);
  localparam int unsigned PIX_W  = $clog2(HR_PIX + NUM_PPU + 1);
  localparam int unsigned HW2    = HR_W / 2;
  localparam int unsigned OUT_W  = $clog2(PPU_LATENCY / SLOT + 3);
  localparam int unsigned LANE_W = (NUM_FRAMES > 1) ? $clog2(NUM_FRAMES) : 1;
  localparam int unsigned PPU_W  = (NUM_PPU > 1) ? $clog2(NUM_PPU) : 1;

  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_NEXT} state_t;

  // Read request for one PPU in one cycle: bank addresses, LR address, which
  // lane it feeds and the window parities needed to put the banks in order.
  typedef struct packed {
    logic [NUM_BANKS-1:0][BANK_AW-1:0] bank_addr;
    logic [LR_AW-1:0]                  lr_addr;
    logic                              ok;
    logic                              par_r;
    logic                              par_c;
  } rdreq_t;

  state_t                     state;
  logic [ITER_W-1:0]          n_iter_q;
  logic signed [SHIFT_W-1:0]  sy_q [NUM_FRAMES];
  logic signed [SHIFT_W-1:0]  sx_q [NUM_FRAMES];
  logic [SLOT_W-1:0]          slot_cnt;

  // scan position of the next group
  logic [ROW_W-1:0]           scan_row [NUM_PPU];
  logic [COL_W-1:0]           scan_col [NUM_PPU];
  logic [PIX_W-1:0]           scan_pix;            // linear index of PPU 0's pixel
  logic                       scan_done;

  // group being fetched
  logic                       f_act;
  logic [ROW_W-1:0]           f_row [NUM_PPU];
  logic [COL_W-1:0]           f_col [NUM_PPU];
  logic                       f_ok  [NUM_PPU];

  // one-cycle-delayed copy of the request, to route the returning data
  logic                       cap_en;
  logic [SLOT_W-1:0]          cap_idx;
  rdreq_t                     cap_req [NUM_PPU];

  // write-back
  logic                       wb_act;
  logic [PPU_W-1:0]           wb_idx;
  fp32_t                      wb_pix [NUM_PPU];
  logic [TAG_W-1:0]           wb_tag [NUM_PPU];
  logic [OUT_W-1:0]           outstanding;

  // ------------------------------------------------------------------
  // Address generation (combinational) for the current slot cycle
  // ------------------------------------------------------------------
  rdreq_t req [NUM_PPU];

  // Window request for HR pixel (y, x) and frame k with shift (sy, sx).
  // Frame k's LR pixel (cy, cx) covers HR rows 2*cy+sy .. 2*cy+sy+1 and
  // columns 2*cx+sx .. 2*cx+sx+1; the window origin is (r0, c0).
  function automatic rdreq_t make_req(input int y, input int x, input int sy, input int sx,
                                      input int k, input logic centre, input logic pix_ok);
    rdreq_t r;
    int ty, tx, cy, cx, r0, c0, rr, cc;
    logic ok;
    if (centre) begin
      r0 = y; c0 = x; cy = 0; cx = 0; ok = pix_ok;
    end else begin
      ty = y - sy;
      tx = x - sx;
      cy = ty >>> 1;
      cx = tx >>> 1;
      r0 = y - (ty & 1);
      c0 = x - (tx & 1);
      ok = pix_ok && (cy >= 0) && (cy < int'(LR_H)) && (cx >= 0) && (cx < int'(LR_W)) &&
           (r0 >= 0) && (r0 + 1 < int'(HR_H)) && (c0 >= 0) && (c0 + 1 < int'(HR_W));
      if (!ok) begin
        r0 = 0; c0 = 0; cy = 0; cx = 0;
      end
    end
    for (int b = 0; b < int'(NUM_BANKS); b++) begin
      rr = r0 + (((b >> 1) & 1) ^ (r0 & 1));
      cc = c0 + ((b & 1) ^ (c0 & 1));
      if (rr >= int'(HR_H)) rr = r0;   // beyond the last row: unused, keep in range
      if (cc >= int'(HR_W)) cc = c0;
      r.bank_addr[b] = BANK_AW'((rr >> 1) * int'(HW2) + (cc >> 1));
    end
    r.lr_addr = LR_AW'(k * int'(LR_PIX) + cy * int'(LR_W) + cx);
    r.ok      = ok;
    r.par_r   = r0[0];
    r.par_c   = c0[0];
    return r;
  endfunction

  logic issue_rd;
  assign issue_rd = f_act && (int'(slot_cnt) <= int'(NUM_FRAMES));

  always_comb begin
    for (int p = 0; p < int'(NUM_PPU); p++) begin
      int k;
      k = (int'(slot_cnt) < int'(NUM_FRAMES)) ? int'(slot_cnt) : 0;
      req[p] = make_req(int'(f_row[p]), int'(f_col[p]), int'(sy_q[k]), int'(sx_q[k]),
                        k, int'(slot_cnt) == int'(NUM_FRAMES), f_ok[p]);
      for (int b = 0; b < int'(NUM_BANKS); b++) hyp_raddr[p][b] = req[p].bank_addr[b];
      lr_raddr[p] = req[p].lr_addr;
    end
  end

  // ------------------------------------------------------------------
  // Operand capture: data returns one cycle after the request
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_en  <= 1'b0;
      cap_idx <= '0;
    end else begin
      cap_en  <= issue_rd;
      cap_idx <= slot_cnt;
    end
  end

  logic [LANE_W-1:0] cap_lane;
  assign cap_lane = LANE_W'(cap_idx);

  always_ff @(posedge clk) begin
    cap_req <= req;
    if (cap_en) begin
      for (int p = 0; p < int'(NUM_PPU); p++) begin
        if (int'(cap_idx) == int'(NUM_FRAMES)) begin
          ppu_hyp[p] <= hyp_rdata[p][{cap_req[p].par_r, cap_req[p].par_c}];
        end else begin
          for (int w = 0; w < 4; w++) begin
            ppu_win[p][cap_lane][w] <=
              hyp_rdata[p][{cap_req[p].par_r ^ w[1], cap_req[p].par_c ^ w[0]}];
          end
          ppu_lr[p][cap_lane]      <= lr_rdata[p];
          ppu_lane_ok[p][cap_lane] <= cap_req[p].ok;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Sequencing: slot counter, scan, issue, iterations
  // ------------------------------------------------------------------
  logic slot_last, group_issue, iter_end;
  assign slot_last   = (int'(slot_cnt) == int'(SLOT) - 1);
  assign group_issue = f_act && slot_last;
  assign iter_end    = (state == ST_RUN) && scan_done && !f_act && (outstanding == '0);
  assign ppu_valid   = group_issue;
  assign busy        = (state != ST_IDLE);

  always_comb begin
    for (int p = 0; p < int'(NUM_PPU); p++) begin
      ppu_tag[p] = {f_ok[p], f_row[p][0], f_col[p][0],
                    BANK_AW'((int'(f_row[p]) >> 1) * int'(HW2) + (int'(f_col[p]) >> 1))};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      n_iter_q    <= '0;
      iter        <= '0;
      rd_buf      <= 1'b0;
      done        <= 1'b0;
      slot_cnt    <= '0;
      scan_pix    <= '0;
      scan_done   <= 1'b0;
      f_act       <= 1'b0;
      cycle_count <= '0;
      for (int p = 0; p < int'(NUM_PPU); p++) begin
        scan_row[p] <= '0;
        scan_col[p] <= '0;
        f_row[p]    <= '0;
        f_col[p]    <= '0;
        f_ok[p]     <= 1'b0;
      end
      for (int k = 0; k < int'(NUM_FRAMES); k++) begin
        sy_q[k] <= '0;
        sx_q[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (busy) cycle_count <= cycle_count + 32'd1;

      case (state)
        ST_IDLE: begin
          if (start) begin
            n_iter_q    <= n_iter;
            sy_q        <= shift_y;
            sx_q        <= shift_x;
            iter        <= '0;
            cycle_count <= 32'd1;
            state       <= ST_NEXT;
          end
        end

        // start an iteration, or finish the run
        ST_NEXT: begin
          if (iter == n_iter_q) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end else begin
            for (int p = 0; p < int'(NUM_PPU); p++) begin
              scan_row[p] <= '0;
              scan_col[p] <= COL_W'(p);
            end
            scan_pix  <= '0;
            scan_done <= 1'b0;
            f_act     <= 1'b0;
            slot_cnt  <= SLOT_W'(SLOT - 1);   // first RUN cycle only latches a group
            state     <= ST_RUN;
          end
        end

        ST_RUN: begin
          slot_cnt <= slot_last ? '0 : slot_cnt + 1'b1;

          // the next group is latched in the slot's last cycle, while the
          // current group is handed to the PPUs
          if (slot_last) begin
            f_act <= !scan_done;
            if (!scan_done) begin
              for (int p = 0; p < int'(NUM_PPU); p++) begin
                f_row[p] <= scan_row[p];
                f_col[p] <= scan_col[p];
                f_ok[p]  <= (int'(scan_pix) + p) < int'(HR_PIX);
                if (int'(scan_col[p]) + int'(NUM_PPU) >= int'(HR_W)) begin
                  scan_col[p] <= COL_W'(int'(scan_col[p]) + int'(NUM_PPU) - int'(HR_W));
                  scan_row[p] <= scan_row[p] + 1'b1;
                end else begin
                  scan_col[p] <= scan_col[p] + COL_W'(NUM_PPU);
                end
              end
              scan_pix <= scan_pix + PIX_W'(NUM_PPU);
              if (int'(scan_pix) + int'(NUM_PPU) >= int'(HR_PIX)) scan_done <= 1'b1;
            end
          end

          if (iter_end) begin
            iter   <= iter + 1'b1;
            rd_buf <= ~rd_buf;
            state  <= ST_NEXT;
          end
        end

        default: state <= ST_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // Write-back: the results of a group are written one per cycle
  // ------------------------------------------------------------------
  logic wb_last;
  assign wb_last = wb_act && (int'(wb_idx) == int'(NUM_PPU) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_act      <= 1'b0;
      wb_idx      <= '0;
      outstanding <= '0;
    end else begin
      if (res_valid) begin
        wb_act <= 1'b1;
        wb_idx <= '0;
      end else if (wb_last) begin
        wb_act <= 1'b0;
      end else if (wb_act) begin
        wb_idx <= wb_idx + 1'b1;
      end
      outstanding <= outstanding + OUT_W'(group_issue) - OUT_W'(wb_last);
    end
  end

  always_ff @(posedge clk) begin
    if (res_valid) begin
      wb_pix <= res_pix;
      wb_tag <= res_tag;
    end
  end

  logic [TAG_W-1:0] wb_cur_tag;
  assign wb_cur_tag = wb_tag[wb_idx];
  assign hyp_waddr  = wb_cur_tag[BANK_AW-1:0];
  assign hyp_wdata  = wb_pix[wb_idx];

  always_comb begin
    hyp_we = '0;
    if (wb_act && wb_cur_tag[TAG_W-1]) hyp_we[wb_cur_tag[TAG_W-2 -: 2]] = 1'b1;
  end

  // ------------------------------------------------------------------
  // Rules of the schedule
  // ------------------------------------------------------------------
  initial begin
    assert (SLOT >= NUM_FRAMES + 2) else $error("sr_ctrl: a slot must hold the fetch of all frames");
    assert (SLOT >= NUM_PPU + 1)    else $error("sr_ctrl: a slot must hold the write-back of a group");
    assert (NUM_PPU <= HR_W)        else $error("sr_ctrl: NUM_PPU must not exceed the HR width");
  end

  a_wb_free: assert property (@(posedge clk) disable iff (!rst_n) !(res_valid && wb_act && !wb_last))
    else $error("sr_ctrl: results arrived during write-back");
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("sr_ctrl: start while busy");
endmodule
