// tb_sr_ctrl: self-checking test of the control logic on its own.
//
// The testbench models the memories and the pixel modules. Every HR memory
// word holds a code of its pixel position and every LR word a code of
// (frame, row, column), so the operands the controller hands to a pixel
// module show exactly which pixels it fetched. For every issued pixel the test
// checks the 2x2 window, the LR pixel, the lane-valid bit and the centre pixel
// against positions worked out from the shift vectors, and that issues come
// once per 12-cycle slot. A model pixel module returns a marked code after a
// fixed latency; the test checks that each result is written once per
// iteration, to the right bank and word of the buffer not being read, and that
// the buffers swap, the iteration count and done are right.
module tb_sr_ctrl;
  localparam int LR_H = 3, LR_W = 4, K = 3, P = 5, SLOT = 12, LAT = 30;
  localparam int HR_H = 2 * LR_H, HR_W = 2 * LR_W, HR_PIX = HR_H * HR_W, LR_PIX = LR_H * LR_W;
  localparam int BW = HR_PIX / 4, HW2 = HR_W / 2;
  localparam int BANK_AW = $clog2(BW), LR_AW = $clog2(K * LR_PIX), TAG_W = 3 + BANK_AW;
  localparam int NITER = 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] n_iter = '0, iter;
  logic signed [3:0] shift_y [K], shift_x [K];
  logic busy, done, rd_buf;
  logic [31:0] cycle_count;
  logic [BANK_AW-1:0] hyp_raddr [P][4];
  logic [31:0] hyp_rdata [P][4];
  logic [3:0] hyp_we;
  logic [BANK_AW-1:0] hyp_waddr;
  logic [31:0] hyp_wdata;
  logic [LR_AW-1:0] lr_raddr [P];
  logic [31:0] lr_rdata [P];
  logic ppu_valid;
  logic [31:0] ppu_win [P][K][4];
  logic [31:0] ppu_lr [P][K];
  logic ppu_lane_ok [P][K];
  logic [31:0] ppu_hyp [P];
  logic [TAG_W-1:0] ppu_tag [P];
  logic res_valid;
  logic [31:0] res_pix [P];
  logic [TAG_W-1:0] res_tag [P];

  int checks = 0, failures = 0;
  int sy [K] = '{0, 1, -1};
  int sx [K] = '{0, -1, 2};
  int issue_no = 0, last_issue = -100, cyc = 0;
  int writes [HR_PIX];
  int n_lane_off = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sr_ctrl #(.LR_H(LR_H), .LR_W(LR_W), .NUM_FRAMES(K), .NUM_PPU(P), .PPU_LATENCY(LAT)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (cycle %0d): %s", cyc, what);
    end
  endtask

  function automatic logic [31:0] hcode(input int r, input int c);
    return 32'h4000_0000 | (r << 12) | c;
  endfunction
  function automatic logic [31:0] lcode(input int k, input int r, input int c);
    return 32'h2000_0000 | (k << 20) | (r << 10) | c;
  endfunction

  // memory models: registered reads; HR contents are position codes and stay so
  always @(posedge clk) begin
    for (int p = 0; p < P; p++) begin
      for (int b = 0; b < 4; b++) begin
        int w;
        w = int'(hyp_raddr[p][b]);
        hyp_rdata[p][b] <= hcode(2 * (w / HW2) + (b >> 1), 2 * (w % HW2) + (b & 1));
      end
      begin
        int a;
        a = int'(lr_raddr[p]);
        lr_rdata[p] <= lcode(a / LR_PIX, (a % LR_PIX) / LR_W, a % LR_W);
      end
    end
  end

  // pixel-module model: fixed latency, result = code with a marker bit
  logic [TAG_W-1:0] tag_pipe [LAT][P];
  logic [31:0]      pix_pipe [LAT][P];
  logic             v_pipe   [LAT];
  always @(posedge clk) begin
    v_pipe[0] <= ppu_valid;
    for (int p = 0; p < P; p++) begin
      tag_pipe[0][p] <= ppu_tag[p];
      pix_pipe[0][p] <= ppu_hyp[p] | 32'h0080_0000;
    end
    for (int i = 1; i < LAT; i++) begin
      v_pipe[i] <= v_pipe[i-1];
      tag_pipe[i] <= tag_pipe[i-1];
      pix_pipe[i] <= pix_pipe[i-1];
    end
  end
  assign res_valid = rst_n && v_pipe[LAT-1];
  assign res_tag   = tag_pipe[LAT-1];
  assign res_pix   = pix_pipe[LAT-1];

  // check every issue
  always @(negedge clk) begin
    if (rst_n && ppu_valid) begin
      int g, pix, y, x;
      g = issue_no % ((HR_PIX + P - 1) / P);
      if (last_issue >= 0 && g != 0) check(cyc - last_issue == SLOT, $sformatf("issue spacing %0d", cyc - last_issue));
      last_issue = cyc;
      for (int p = 0; p < P; p++) begin
        pix = g * P + p;
        y = pix / HR_W;
        x = pix % HR_W;
        check(ppu_tag[p][TAG_W-1] == (pix < HR_PIX), "pixel valid bit");
        if (pix < HR_PIX) begin
          check(ppu_hyp[p] == hcode(y, x), $sformatf("centre of (%0d,%0d): %h", y, x, ppu_hyp[p]));
          check(ppu_tag[p][TAG_W-2 -: 2] == {y[0], x[0]} &&
                int'(ppu_tag[p][BANK_AW-1:0]) == (y / 2) * HW2 + x / 2, "tag address");
          for (int k = 0; k < K; k++) begin
            int cy, cx, r0, c0;
            logic ok;
            // LR pixel of frame k whose 2x2 footprint contains (y, x)
            cy = -100; cx = -100;
            for (int a = -2; a <= LR_H + 1; a++) if (y - sy[k] - 2 * a >= 0 && y - sy[k] - 2 * a <= 1) cy = a;
            for (int a = -2; a <= LR_W + 1; a++) if (x - sx[k] - 2 * a >= 0 && x - sx[k] - 2 * a <= 1) cx = a;
            r0 = 2 * cy + sy[k];
            c0 = 2 * cx + sx[k];
            ok = (cy >= 0 && cy < LR_H && cx >= 0 && cx < LR_W && r0 >= 0 && r0 + 1 < HR_H &&
                  c0 >= 0 && c0 + 1 < HR_W);
            check(ppu_lane_ok[p][k] == ok, $sformatf("lane %0d valid for (%0d,%0d)", k, y, x));
            if (ok) begin
              check(ppu_lr[p][k] == lcode(k, cy, cx), $sformatf("LR pixel lane %0d (%0d,%0d)", k, y, x));
              check(ppu_win[p][k][0] == hcode(r0, c0) && ppu_win[p][k][1] == hcode(r0, c0 + 1) &&
                    ppu_win[p][k][2] == hcode(r0 + 1, c0) && ppu_win[p][k][3] == hcode(r0 + 1, c0 + 1),
                    $sformatf("window lane %0d (%0d,%0d)", k, y, x));
            end else begin
              n_lane_off++;
            end
          end
        end
      end
      issue_no++;
    end
  end

  // check every write
  always @(negedge clk) begin
    if (rst_n && hyp_we != 4'b0) begin
      int b, w, y, x;
      check($onehot(hyp_we), "one bank written at a time");
      b = (hyp_we[3] || hyp_we[2]) ? 2 : 0;
      b += (hyp_we[3] || hyp_we[1]) ? 1 : 0;
      w = int'(hyp_waddr);
      y = 2 * (w / HW2) + (b >> 1);
      x = 2 * (w % HW2) + (b & 1);
      check(hyp_wdata == (hcode(y, x) | 32'h0080_0000), $sformatf("write data for (%0d,%0d)", y, x));
      writes[y * HR_W + x]++;
    end
  end

  initial begin
    int t0, t1;
    for (int k = 0; k < K; k++) begin
      shift_y[k] = 4'(sy[k]);
      shift_x[k] = 4'(sx[k]);
    end
    for (int i = 0; i < HR_PIX; i++) writes[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && rd_buf == 1'b0, "idle after reset");
    n_iter = 8'(NITER);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    for (int it = 0; it < NITER; it++) begin
      // wait for the buffer swap that ends this iteration
      while (rd_buf == 1'(it % 2) && cyc - t0 < 10000) @(negedge clk);
      for (int i = 0; i < HR_PIX; i++) begin
        check(writes[i] == 1, $sformatf("pixel %0d written %0d times in iteration %0d", i, writes[i], it));
        writes[i] = 0;
      end
    end
    while (!done && cyc - t0 < 10000) @(negedge clk);
    t1 = cyc;
    check(done && iter == 8'(NITER), "done with all iterations");
    @(negedge clk);
    check(!busy && !done, "idle again");
    check(issue_no == NITER * ((HR_PIX + P - 1) / P), $sformatf("%0d issues", issue_no));
    check(int'(cycle_count) >= NITER * ((HR_PIX + P - 1) / P) * SLOT &&
          int'(cycle_count) <= NITER * (((HR_PIX + P - 1) / P) * SLOT + LAT + P + 8) + 4,
          $sformatf("cycle count %0d", cycle_count));
    check(n_lane_off > 0, "no lane fell off the frame");
    $display("issues %0d, lanes off the frame %0d, cycles %0d", issue_no, n_lane_off, cycle_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
