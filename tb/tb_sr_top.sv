// tb_sr_top: end-to-end test of the top level at a reduced frame size.
//
// Engine: a ground-truth HR image is made up, five LR frames are produced
// from it by shifting and 2x2 averaging, and the initial hypothesis is frame
// 0 enlarged by pixel replication. The engine runs several iterations; the
// read-back frame is compared bit for bit with a reference model written as a
// scatter (each LR pixel's error is spread over its 2x2 footprint), unlike the
// RTL's per-pixel gather. Also checked: the run length (one group of NUM_PPU
// pixels per 12-cycle slot, plus pipeline drain), the iteration counter, a
// run with zero iterations, a second run continuing from the first result,
// and that the mismatch between the hypothesis and the LR frames shrinks.
// Counted mechanisms: buffer swaps between iterations, lanes dropped at the
// frame border, a partly filled last group, shifted (offset) reads.
//
// Custom-instruction unit: a short sequence of multiply, add and subtract
// requests with reference results.
module tb_sr_top;
  import tb_sr_ref_pkg::*;

  localparam int LR_H = 4, LR_W = 5, K = 5, P = 3;
  localparam int HR_H = 2 * LR_H, HR_W = 2 * LR_W, HR_PIX = HR_H * HR_W;
  localparam int SLOT = 12, PPU_LAT = 59;
  localparam int G = (HR_PIX + P - 1) / P;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_we = 1'b0, load_hyp = 1'b0;
  logic [2:0] load_frame = '0;
  logic [$clog2(HR_H)-1:0] load_row = '0, rd_row = '0;
  logic [$clog2(HR_W)-1:0] load_col = '0, rd_col = '0;
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
  int cnt_swaps = 0, cnt_border_lanes = 0, cnt_partial_groups = 0, cnt_shifted = 0, cnt_ci = 0;

  logic [31:0] truth [HR_H][HR_W];
  logic [31:0] lr    [K][LR_H][LR_W];
  logic [31:0] href  [HR_H][HR_W];
  int sy [K], sx [K];

  always #5 clk = ~clk;

  sr_top #(.LR_H(LR_H), .LR_W(LR_W), .NUM_FRAMES(K), .NUM_PPU(P)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic logic [31:0] downscale(input logic [31:0] h [HR_H][HR_W], input int r, input int c);
    return fmul(fadd(fadd(h[r][c], h[r][c+1]), fadd(h[r+1][c], h[r+1][c+1])), 32'h3E800000);
  endfunction

  task automatic ref_iteration();
    logic [31:0] e [K][HR_H][HR_W];
    logic [31:0] nh [HR_H][HR_W];
    logic [31:0] s;
    for (int k = 0; k < K; k++)
      for (int y = 0; y < HR_H; y++)
        for (int x = 0; x < HR_W; x++) e[k][y][x] = 32'h0;
    // scatter: each LR pixel whose footprint lies inside the HR frame
    for (int k = 0; k < K; k++)
      for (int cy = 0; cy < LR_H; cy++)
        for (int cx = 0; cx < LR_W; cx++) begin
          int r0, c0;
          r0 = 2 * cy + sy[k];
          c0 = 2 * cx + sx[k];
          if (r0 >= 0 && r0 + 1 < HR_H && c0 >= 0 && c0 + 1 < HR_W) begin
            s = fsub(downscale(href, r0, c0), lr[k][cy][cx]);
            for (int dr = 0; dr < 2; dr++)
              for (int dc = 0; dc < 2; dc++) e[k][r0+dr][c0+dc] = s;
          end
        end
    for (int y = 0; y < HR_H; y++)
      for (int x = 0; x < HR_W; x++) begin
        s = fadd(fadd(fadd(e[0][y][x], e[1][y][x]), e[2][y][x]), fadd(e[3][y][x], e[4][y][x]));
        nh[y][x] = fsub(href[y][x], fmul(s, 32'h3E4CCCCD));
      end
    href = nh;
  endtask

  // lanes of the gather that fall off the frame in one iteration
  function automatic int border_lanes();
    int n = 0;
    for (int k = 0; k < K; k++)
      for (int y = 0; y < HR_H; y++)
        for (int x = 0; x < HR_W; x++) begin
          int ty, tx, cy, cx, r0, c0;
          ty = y - sy[k]; tx = x - sx[k];
          cy = (ty >= 0) ? ty / 2 : -((1 - ty) / 2);
          cx = (tx >= 0) ? tx / 2 : -((1 - tx) / 2);
          r0 = 2 * cy + sy[k]; c0 = 2 * cx + sx[k];
          if (!(cy >= 0 && cy < LR_H && cx >= 0 && cx < LR_W && r0 >= 0 && r0 + 1 < HR_H &&
                c0 >= 0 && c0 + 1 < HR_W)) n++;
        end
    return n;
  endfunction

  // sum of |downscaled hypothesis - LR| over all frames (a real number)
  function automatic real residual(input logic [31:0] h [HR_H][HR_W]);
    real r = 0.0, d;
    for (int k = 0; k < K; k++)
      for (int cy = 0; cy < LR_H; cy++)
        for (int cx = 0; cx < LR_W; cx++) begin
          int r0, c0;
          r0 = 2 * cy + sy[k]; c0 = 2 * cx + sx[k];
          if (r0 >= 0 && r0 + 1 < HR_H && c0 >= 0 && c0 + 1 < HR_W) begin
            d = f2r(downscale(h, r0, c0)) - f2r(lr[k][cy][cx]);
            r += (d < 0.0) ? -d : d;
          end
        end
    return r;
  endfunction

  // ---------------- bus tasks ----------------
  task automatic load_pixel(input bit hyp, input int frame, input int row, input int col,
                            input logic [31:0] v);
    load_we = 1'b1; load_hyp = hyp; load_frame = 3'(frame);
    load_row = $bits(load_row)'(row); load_col = $bits(load_col)'(col); load_data = v;
    @(negedge clk);
    load_we = 1'b0;
  endtask

  task automatic load_all();
    for (int k = 0; k < K; k++)
      for (int r = 0; r < LR_H; r++)
        for (int c = 0; c < LR_W; c++) load_pixel(1'b0, k, r, c, lr[k][r][c]);
    for (int r = 0; r < HR_H; r++)
      for (int c = 0; c < HR_W; c++) load_pixel(1'b1, 0, r, c, href[r][c]);
  endtask

  task automatic run(input int n, output int cycles);
    n_iter = 8'(n);
    for (int k = 0; k < K; k++) begin
      shift_y[k] = 4'(sy[k]);
      shift_x[k] = 4'(sx[k]);
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    check(done, "run did not finish");
    check(!busy, "busy after done");
    check(iter == 8'(n), $sformatf("iteration counter %0d, expected %0d", iter, n));
  endtask

  task automatic compare_frame(input string tag);
    int bad = 0;
    for (int r = 0; r < HR_H; r++)
      for (int c = 0; c < HR_W; c++) begin
        rd_row = $bits(rd_row)'(r); rd_col = $bits(rd_col)'(c);
        @(negedge clk);
        checks++;
        if (rd_data !== href[r][c]) begin
          failures++;
          bad++;
          if (bad < 6) $display("%s: pixel (%0d,%0d) = %h, expected %h", tag, r, c, rd_data, href[r][c]);
        end
      end
  endtask

  function automatic void make_frames();
    for (int y = 0; y < HR_H; y++)
      for (int x = 0; x < HR_W; x++)
        truth[y][x] = r2f(128.0 + 60.0 * $sin(0.9 * y) * $cos(0.7 * x) + real'($urandom_range(255, 0)) / 16.0);
    for (int k = 0; k < K; k++)
      for (int cy = 0; cy < LR_H; cy++)
        for (int cx = 0; cx < LR_W; cx++) begin
          int r0, c0;
          r0 = 2 * cy + sy[k]; c0 = 2 * cx + sx[k];
          r0 = (r0 < 0) ? 0 : (r0 > HR_H - 2) ? HR_H - 2 : r0;
          c0 = (c0 < 0) ? 0 : (c0 > HR_W - 2) ? HR_W - 2 : c0;
          lr[k][cy][cx] = downscale(truth, r0, c0);
        end
    for (int y = 0; y < HR_H; y++)
      for (int x = 0; x < HR_W; x++) href[y][x] = lr[0][y / 2][x / 2];
  endfunction

  // ---------------- test sequence ----------------
  initial begin
    int cycles, niter, lo, hi;
    real res0, res1;
    for (int k = 0; k < K; k++) begin
      shift_y[k] = '0; shift_x[k] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1; ci_reset = 1'b0;
    @(negedge clk);

    // run 1: sub-pixel shifts, several iterations
    sy = '{0, 1, 0, 1, -1};
    sx = '{0, 0, 1, 1, 2};
    make_frames();
    load_all();
    res0 = residual(href);
    niter = 3;
    for (int i = 0; i < niter; i++) begin
      ref_iteration();
      cnt_border_lanes += border_lanes();
    end
    res1 = residual(href);
    run(niter, cycles);
    compare_frame("run 1");
    cnt_swaps += int'(iter);
    for (int k = 0; k < K; k++) if (sy[k] != 0 || sx[k] != 0) cnt_shifted++;
    if (HR_PIX % P != 0) cnt_partial_groups += niter;
    lo = niter * G * SLOT;
    hi = niter * (G * SLOT + PPU_LAT + P + 8) + 4;
    check(cycles >= lo && cycles <= hi && int'(cycle_count) >= lo && int'(cycle_count) <= hi,
          $sformatf("run length %0d / counter %0d outside [%0d, %0d]", cycles, cycle_count, lo, hi));
    $display("run 1: %0d iterations in %0d cycles (%0d groups of %0d pixels); residual %f -> %f",
             niter, cycle_count, G, P, res0, res1);
    check(res1 < res0, "back-projection did not reduce the residual");

    // run 2: zero iterations leaves the frame alone
    run(0, cycles);
    check(cycles <= 4, "zero-iteration run took too long");
    compare_frame("run 2");

    // run 3: continue from the result with other shifts (LR frames unchanged)
    sy = '{0, -1, 1, 0, 2};
    sx = '{0, 1, -1, 0, 0};
    for (int i = 0; i < 2; i++) begin
      ref_iteration();
      cnt_border_lanes += border_lanes();
    end
    run(2, cycles);
    compare_frame("run 3");
    cnt_swaps += int'(iter);
    if (HR_PIX % P != 0) cnt_partial_groups += 2;

    // custom-instruction unit
    for (int i = 0; i < 30; i++) begin
      logic [31:0] e;
      int waited;
      ci_n = 2'(i % 3);
      ci_dataa = rand_pix();
      ci_datab = rand_pix();
      e = (ci_n == 2'd0) ? fmul(ci_dataa, ci_datab) : (ci_n == 2'd1) ? fadd(ci_dataa, ci_datab)
                                                                     : fsub(ci_dataa, ci_datab);
      ci_start = 1'b1;
      @(negedge clk);
      ci_start = 1'b0;
      waited = 1;
      while (!ci_done && waited < 20) begin
        @(negedge clk);
        waited++;
      end
      check(ci_done && ci_result == e && waited == ((ci_n == 2'd0) ? 5 : 7),
            $sformatf("custom instruction %0d: %h expected %h", ci_n, ci_result, e));
      cnt_ci++;
    end

    $display("buffer swaps %0d, border lanes %0d, partial groups %0d, shifted frames %0d, custom instructions %0d",
             cnt_swaps, cnt_border_lanes, cnt_partial_groups, cnt_shifted, cnt_ci);
    check(cnt_swaps > 0, "no buffer swap");
    check(cnt_border_lanes > 0, "no border lane");
    check(cnt_partial_groups > 0, "no partial group");
    check(cnt_shifted > 0, "no shifted frame");
    check(cnt_ci > 0, "no custom instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
