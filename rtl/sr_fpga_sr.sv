// sr_fpga_sr: FPGA super-resolution engine (iterative back-projection).
//
// Builds one high-resolution (HR) frame of 2*LR_H x 2*LR_W pixels from
// NUM_FRAMES low-resolution (LR) frames of LR_H x LR_W pixels. Starting from
// an initial hypothesis H (for example an enlarged average of the LR frames)
// each of n_iter iterations computes, for every HR pixel,
//
//   H'(y,x) = H(y,x) - BP_GAIN * sum_k ( avg2x2 of H over frame k's pixel
//                                         that covers (y,x)  -  O_k(pixel) )
//
// i.e. H is shifted by frame k's shift vector and scaled down, compared with
// the LR frame O_k, and the errors of all frames are scaled back up, combined
// and subtracted from H.
//
// Parts: frame memory (LR frames, and the HR frame in two buffers of four
// banks), the control logic (sr_ctrl) and NUM_PPU floating point pixel
// calculation modules (sr_pixel_calc) working in parallel, one new pixel each
// per 12-cycle slot. All pixel values are IEEE-754 single precision.
//
// Use, all while busy is low:
//   1. Load the LR frames (load_hyp = 0, load_frame = k) and the initial H
//      (load_hyp = 1) pixel by pixel with load_we, load_row, load_col and
//      load_data. One pixel per cycle.
//   2. Pulse start with n_iter and the per-frame shift vectors (shift_y,
//      shift_x: signed, in HR pixels; frame k's LR pixel (cy,cx) covers HR
//      rows 2*cy+shift_y[k] .. +1 and columns 2*cx+shift_x[k] .. +1).
//   3. Wait for done. cycle_count then holds the run's length in cycles.
//   4. Read the result with rd_row, rd_col; rd_data follows one cycle later.
// Loads go to the buffer holding the current H, so a second run continues
// from the last result unless H is reloaded. rst_n is asynchronous and
// active low; no memory is written while it is held (memory contents are not
// cleared by it).
//
// Defaults are the published configuration: 240x320 LR frames, five frames,
// a 480x640 result, 12-cycle slots and four pixel modules (the budget FPGA;
// the larger FPGA held nine).
module sr_fpga_sr
  import sr_pkg::*;
#(
  parameter int unsigned LR_H       = 240,
  parameter int unsigned LR_W       = 320,
  parameter int unsigned NUM_FRAMES = 5,
  parameter int unsigned NUM_PPU    = 4,
  parameter int unsigned SHIFT_W    = 4,
  parameter int unsigned ITER_W     = 8,
  parameter fp32_t       DOWN_SCALE = FP_QUARTER,
  parameter fp32_t       BP_GAIN    = FP_FIFTH,
  localparam int unsigned HR_H      = 2 * LR_H,
  localparam int unsigned HR_W      = 2 * LR_W,
  localparam int unsigned ROW_W     = $clog2(HR_H),
  localparam int unsigned COL_W     = $clog2(HR_W),
  localparam int unsigned FRAME_W   = (NUM_FRAMES > 1) ? $clog2(NUM_FRAMES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // frame loading
  input  logic                      load_we,
  input  logic                      load_hyp,
  input  logic [FRAME_W-1:0]        load_frame,
  input  logic [ROW_W-1:0]          load_row,
  input  logic [COL_W-1:0]          load_col,
  input  fp32_t                     load_data,
  // run control
  input  logic                      start,
  input  logic [ITER_W-1:0]         n_iter,
  input  logic signed [SHIFT_W-1:0] shift_y [NUM_FRAMES],
  input  logic signed [SHIFT_W-1:0] shift_x [NUM_FRAMES],
  output logic                      busy,
  output logic                      done,
  output logic [ITER_W-1:0]         iter,
  output logic [31:0]               cycle_count,
  // result read-back
  input  logic [ROW_W-1:0]          rd_row,
  input  logic [COL_W-1:0]          rd_col,
  output fp32_t                     rd_data
);
  localparam int unsigned HR_PIX      = HR_H * HR_W;
  localparam int unsigned LR_PIX      = LR_H * LR_W;
  localparam int unsigned BANK_WORDS  = HR_PIX / NUM_BANKS;
  localparam int unsigned BANK_AW     = $clog2(BANK_WORDS);
  localparam int unsigned LR_WORDS    = NUM_FRAMES * LR_PIX;
  localparam int unsigned LR_AW       = $clog2(LR_WORDS);
  localparam int unsigned TAG_W       = 1 + 2 + BANK_AW;
  localparam int unsigned PPU_LATENCY = 3 * ADD_LAT + 2 * MUL_LAT + ADD_LAT * $clog2(NUM_FRAMES) + ADD_LAT;

  // ---------------- controller ----------------
  logic                     rd_buf;
  logic [BANK_AW-1:0]       c_hyp_raddr [NUM_PPU][NUM_BANKS];
  fp32_t                    c_hyp_rdata [NUM_PPU][NUM_BANKS];
  logic [NUM_BANKS-1:0]     c_hyp_we;
  logic [BANK_AW-1:0]       c_hyp_waddr;
  fp32_t                    c_hyp_wdata;
  logic [LR_AW-1:0]         lr_raddr [NUM_PPU];
  fp32_t                    lr_rdata [NUM_PPU];
  logic                     ppu_valid;
  fp32_t                    ppu_win     [NUM_PPU][NUM_FRAMES][4];
  fp32_t                    ppu_lr      [NUM_PPU][NUM_FRAMES];
  logic                     ppu_lane_ok [NUM_PPU][NUM_FRAMES];
  fp32_t                    ppu_hyp     [NUM_PPU];
  logic [TAG_W-1:0]         ppu_tag     [NUM_PPU];
  logic                     res_valid_v [NUM_PPU];
  fp32_t                    res_pix     [NUM_PPU];
  logic [TAG_W-1:0]         res_tag     [NUM_PPU];

  sr_ctrl #(
    .LR_H(LR_H), .LR_W(LR_W), .NUM_FRAMES(NUM_FRAMES), .NUM_PPU(NUM_PPU),
    .SLOT(SLOT_CYCLES), .SHIFT_W(SHIFT_W), .ITER_W(ITER_W), .PPU_LATENCY(PPU_LATENCY)
  ) u_ctrl (
    .clk, .rst_n, .start, .n_iter, .shift_y, .shift_x, .busy, .done, .iter, .cycle_count,
    .rd_buf,
    .hyp_raddr (c_hyp_raddr), .hyp_rdata (c_hyp_rdata),
    .hyp_we (c_hyp_we), .hyp_waddr (c_hyp_waddr), .hyp_wdata (c_hyp_wdata),
    .lr_raddr, .lr_rdata,
    .ppu_valid, .ppu_win, .ppu_lr, .ppu_lane_ok, .ppu_hyp, .ppu_tag,
    .res_valid (res_valid_v[0]), .res_pix, .res_tag
  );

  // ---------------- pixel calculation modules ----------------
  for (genvar p = 0; p < NUM_PPU; p++) begin : g_ppu
    sr_pixel_calc #(
      .NUM_FRAMES(NUM_FRAMES), .TAG_W(TAG_W), .DOWN_SCALE(DOWN_SCALE), .BP_GAIN(BP_GAIN)
    ) u_ppu (
      .clk, .rst_n,
      .in_valid   (ppu_valid),
      .in_win     (ppu_win[p]),
      .in_lr      (ppu_lr[p]),
      .in_lane_ok (ppu_lane_ok[p]),
      .in_hyp     (ppu_hyp[p]),
      .in_tag     (ppu_tag[p]),
      .out_valid  (res_valid_v[p]),
      .out_pix    (res_pix[p]),
      .out_tag    (res_tag[p])
    );
  end

  // ---------------- host address decode ----------------
  // HR pixel (row, col) lives in bank {row[0], col[0]} at word
  // (row/2)*(HR_W/2) + col/2.
  logic [1:0]         ld_bank, rdh_bank, rdh_bank_q;
  logic [BANK_AW-1:0] ld_hword, rdh_word;
  logic [LR_AW-1:0]   ld_lword;

  assign ld_bank  = {load_row[0], load_col[0]};
  assign ld_hword = BANK_AW'((int'(load_row) >> 1) * int'(HR_W / 2) + (int'(load_col) >> 1));
  assign ld_lword = LR_AW'(int'(load_frame) * int'(LR_PIX) + int'(load_row) * int'(LR_W) + int'(load_col));
  assign rdh_bank = {rd_row[0], rd_col[0]};
  assign rdh_word = BANK_AW'((int'(rd_row) >> 1) * int'(HR_W / 2) + (int'(rd_col) >> 1));

  // ---------------- HR frame: two buffers of four banks ----------------
  logic  host_ld_hyp;
  assign host_ld_hyp = load_we && load_hyp && !busy;

  fp32_t bank_rdata [2][NUM_BANKS][NUM_PPU];
  logic  rd_buf_q;

  for (genvar f = 0; f < 2; f++) begin : g_buf
    for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
      logic               we;
      logic [BANK_AW-1:0] waddr;
      fp32_t              wdata;
      logic [BANK_AW-1:0] raddr [NUM_PPU];

      always_comb begin
        if (busy) begin
          // the controller writes the buffer it does not read
          we    = c_hyp_we[b] && (rd_buf != 1'(f));
          waddr = c_hyp_waddr;
          wdata = c_hyp_wdata;
        end else begin
          we    = host_ld_hyp && (rd_buf == 1'(f)) && (ld_bank == 2'(b));
          waddr = ld_hword;
          wdata = load_data;
        end
        if (!rst_n) we = 1'b0;            // no writes while reset is held
        for (int p = 0; p < NUM_PPU; p++) raddr[p] = c_hyp_raddr[p][b];
        if (!busy) raddr[0] = rdh_word;   // host read-back through port 0
      end

      sr_frame_ram #(.WORDS(BANK_WORDS), .NRD(NUM_PPU)) u_ram (
        .clk, .we, .waddr, .wdata, .raddr, .rdata (bank_rdata[f][b])
      );
    end
  end

  always_ff @(posedge clk) begin
    rd_buf_q   <= rd_buf;
    rdh_bank_q <= rdh_bank;
  end

  always_comb begin
    for (int p = 0; p < NUM_PPU; p++)
      for (int b = 0; b < NUM_BANKS; b++)
        c_hyp_rdata[p][b] = bank_rdata[rd_buf_q][b][p];
  end
  assign rd_data = bank_rdata[rd_buf_q][rdh_bank_q][0];

  // ---------------- LR frames ----------------
  sr_frame_ram #(.WORDS(LR_WORDS), .NRD(NUM_PPU)) u_lr_ram (
    .clk,
    .we    (rst_n && load_we && !load_hyp && !busy),
    .waddr (ld_lword),
    .wdata (load_data),
    .raddr (lr_raddr),
    .rdata (lr_rdata)
  );

  initial begin
    assert (LR_W % 1 == 0 && HR_W % 2 == 0) else $error("sr_fpga_sr: HR width must be even");
  end
endmodule
