// tb_sr_workload_p9: the larger FPGA configuration of the original work:
// full-size frames (five 240x320 frames, a 480x640 result) with nine pixel
// modules instead of the default four. Runs five iterations, compares every
// result pixel bit for bit with a reference model (scatter form, single
// precision steps in double precision reals), checks the run length (one
// 12-cycle slot per group of nine pixels per iteration, plus drain; the last
// group of each iteration is partly empty since 307,200 is not a multiple of
// nine) and that the run length at 122.25 MHz gives the reported 59.692
// frames/s for five iterations within 1%.
module tb_sr_workload_p9;
  import tb_sr_ref_pkg::*;

  localparam int LR_H = 240, LR_W = 320, K = 5, P = 9;
  localparam int HR_H = 2 * LR_H, HR_W = 2 * LR_W, HR_PIX = HR_H * HR_W;
  localparam int SLOT = 12, PPU_LAT = 59, NITER = 5;
  localparam real F_CLK_MHZ = 122.25, PUB_FPS = 59.692;
  localparam int G = (HR_PIX + P - 1) / P;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_we = 1'b0, load_hyp = 1'b0;
  logic [2:0] load_frame = '0;
  logic [8:0] load_row = '0, rd_row = '0;
  logic [9:0] load_col = '0, rd_col = '0;
  logic [31:0] load_data = '0, rd_data;
  logic start = 1'b0;
  logic [7:0] n_iter = '0, iter;
  logic signed [3:0] shift_y [K], shift_x [K];
  logic busy, done;
  logic [31:0] cycle_count;
  logic ci_clk_en = 1'b1, ci_reset = 1'b1, ci_start = 1'b0, ci_done;
  logic [1:0] ci_n = '0;
  logic [31:0] ci_dataa = '0, ci_datab = '0, ci_result;

  int checks = 0, failures = 0;
  logic [31:0] truth [HR_H][HR_W];
  logic [31:0] lr    [K][LR_H][LR_W];
  logic [31:0] href  [HR_H][HR_W];
  logic [31:0] esum  [HR_H][HR_W];
  int sy [K] = '{0, 1, 0, 1, -1};
  int sx [K] = '{0, 0, 1, 1, 1};

  always #5 clk = ~clk;

  sr_top #(.NUM_PPU(P)) dut (.*);

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] downscale(input int r, input int c);
    return fmul(fadd(fadd(href[r][c], href[r][c+1]), fadd(href[r+1][c], href[r+1][c+1])), 32'h3E800000);
  endfunction

  // one iteration; the per-frame errors are added in the RTL's tree order
  // ((e0 + e1) + e2) + (e3 + e4), so they are kept per frame first
  task automatic ref_iteration();
    logic [31:0] e [K][HR_H][HR_W];
    for (int k = 0; k < K; k++)
      for (int y = 0; y < HR_H; y++)
        for (int x = 0; x < HR_W; x++) e[k][y][x] = 32'h0;
    for (int k = 0; k < K; k++)
      for (int cy = 0; cy < LR_H; cy++)
        for (int cx = 0; cx < LR_W; cx++) begin
          int r0, c0;
          logic [31:0] s;
          r0 = 2 * cy + sy[k];
          c0 = 2 * cx + sx[k];
          if (r0 >= 0 && r0 + 1 < HR_H && c0 >= 0 && c0 + 1 < HR_W) begin
            s = fsub(downscale(r0, c0), lr[k][cy][cx]);
            e[k][r0][c0] = s; e[k][r0][c0+1] = s; e[k][r0+1][c0] = s; e[k][r0+1][c0+1] = s;
          end
        end
    for (int y = 0; y < HR_H; y++)
      for (int x = 0; x < HR_W; x++)
        esum[y][x] = fadd(fadd(fadd(e[0][y][x], e[1][y][x]), e[2][y][x]), fadd(e[3][y][x], e[4][y][x]));
    for (int y = 0; y < HR_H; y++)
      for (int x = 0; x < HR_W; x++) href[y][x] = fsub(href[y][x], fmul(esum[y][x], 32'h3E4CCCCD));
  endtask

  function automatic real residual();
    real r = 0.0, d;
    for (int k = 0; k < K; k++)
      for (int cy = 0; cy < LR_H; cy++)
        for (int cx = 0; cx < LR_W; cx++) begin
          int r0, c0;
          r0 = 2 * cy + sy[k]; c0 = 2 * cx + sx[k];
          if (r0 >= 0 && r0 + 1 < HR_H && c0 >= 0 && c0 + 1 < HR_W) begin
            d = f2r(downscale(r0, c0)) - f2r(lr[k][cy][cx]);
            r += (d < 0.0) ? -d : d;
          end
        end
    return r;
  endfunction

  initial begin
    int cycles, lo, hi, bad;
    real res0, res1;
    // synthetic scene and frames
    for (int y = 0; y < HR_H; y++)
      for (int x = 0; x < HR_W; x++)
        truth[y][x] = r2f(128.0 + 80.0 * $sin(0.11 * y + 0.05 * x) * $cos(0.07 * x) +
                          real'($urandom_range(255, 0)) / 32.0);
    for (int k = 0; k < K; k++)
      for (int cy = 0; cy < LR_H; cy++)
        for (int cx = 0; cx < LR_W; cx++) begin
          int r0, c0;
          r0 = 2 * cy + sy[k]; c0 = 2 * cx + sx[k];
          r0 = (r0 < 0) ? 0 : (r0 > HR_H - 2) ? HR_H - 2 : r0;
          c0 = (c0 < 0) ? 0 : (c0 > HR_W - 2) ? HR_W - 2 : c0;
          lr[k][cy][cx] = fmul(fadd(fadd(truth[r0][c0], truth[r0][c0+1]),
                                    fadd(truth[r0+1][c0], truth[r0+1][c0+1])), 32'h3E800000);
        end
    for (int y = 0; y < HR_H; y++)
      for (int x = 0; x < HR_W; x++) href[y][x] = lr[0][y / 2][x / 2];
    for (int k = 0; k < K; k++) begin
      shift_y[k] = 4'(sy[k]);
      shift_x[k] = 4'(sx[k]);
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1; ci_reset = 1'b0;
    @(negedge clk);
    // load
    load_we = 1'b1;
    load_hyp = 1'b0;
    for (int k = 0; k < K; k++)
      for (int r = 0; r < LR_H; r++)
        for (int c = 0; c < LR_W; c++) begin
          load_frame = 3'(k); load_row = 9'(r); load_col = 10'(c); load_data = lr[k][r][c];
          @(negedge clk);
        end
    load_hyp = 1'b1;
    for (int r = 0; r < HR_H; r++)
      for (int c = 0; c < HR_W; c++) begin
        load_row = 9'(r); load_col = 10'(c); load_data = href[r][c];
        @(negedge clk);
      end
    load_we = 1'b0;

    res0 = residual();
    for (int i = 0; i < NITER; i++) ref_iteration();
    res1 = residual();

    // run
    n_iter = 8'(NITER);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 6_000_000) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (!done || iter != 8'(NITER)) begin
      failures++;
      $display("run did not finish: done=%0b iter=%0d", done, iter);
    end
    lo = NITER * G * SLOT;
    hi = NITER * (G * SLOT + PPU_LAT + P + 8) + 4;
    checks++;
    if (int'(cycle_count) < lo || int'(cycle_count) > hi) begin
      failures++;
      $display("cycle count %0d outside [%0d, %0d]", cycle_count, lo, hi);
    end
    $display("%0d iterations over %0dx%0d pixels: %0d cycles (%0d per iteration); residual %f -> %f",
             NITER, HR_H, HR_W, cycle_count, cycle_count / NITER, res0, res1);
    checks++;
    if (!(res1 < res0)) failures++;
    begin
      real fps;
      fps = F_CLK_MHZ * 1.0e6 / real'(cycle_count);
      $display("at %0.2f MHz: %0.4f s per frame, %0.2f frames/s (reported %0.2f)", F_CLK_MHZ,
               1.0 / fps, fps, PUB_FPS);
      checks++;
      if (fps < 0.99 * PUB_FPS || fps > 1.01 * PUB_FPS) failures++;
    end

    // read back and compare
    bad = 0;
    for (int r = 0; r < HR_H; r++)
      for (int c = 0; c < HR_W; c++) begin
        rd_row = 9'(r); rd_col = 10'(c);
        @(negedge clk);
        checks++;
        if (rd_data !== href[r][c]) begin
          failures++;
          bad++;
          if (bad < 6) $display("pixel (%0d,%0d) = %h, expected %h", r, c, rd_data, href[r][c]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
