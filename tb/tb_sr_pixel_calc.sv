// tb_sr_pixel_calc: self-checking test of the floating point pixel module.
// Applies a random operation every SLOT = 12 cycles, as the controller does,
// plus back-to-back operations, with random windows, low-resolution pixels and
// lane-valid bits. Each result is compared, bit for bit, with a reference that
// repeats the same sequence of single precision operations in double
// precision reals rounded to single precision after every step. out_valid
// must rise exactly LATENCY = 59 cycles after in_valid and carry the tag.
module tb_sr_pixel_calc;
  import tb_sr_ref_pkg::*;

  localparam int K     = 5;
  localparam int TAG_W = 12;
  localparam int LAT   = 59;
  localparam int N     = 600;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             in_valid = 1'b0;
  logic [31:0]      in_win [K][4];
  logic [31:0]      in_lr [K];
  logic             in_lane_ok [K];
  logic [31:0]      in_hyp;
  logic [TAG_W-1:0] in_tag;
  logic             out_valid;
  logic [31:0]      out_pix;
  logic [TAG_W-1:0] out_tag;

  int checks = 0, failures = 0, cycle = 0;
  logic [31:0]      exp_pix [N];
  logic [TAG_W-1:0] exp_tag [N];
  int               exp_cyc [N];
  int               n_out = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sr_pixel_calc #(.NUM_FRAMES(K), .TAG_W(TAG_W)) dut (.*);

  initial begin
    repeat (N * 14 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] reference();
    logic [31:0] e_sum, e [K], lo;
    for (int k = 0; k < K; k++) begin
      lo   = fmul(fadd(fadd(in_win[k][0], in_win[k][1]), fadd(in_win[k][2], in_win[k][3])),
                  32'h3E800000);
      e[k] = in_lane_ok[k] ? fsub(lo, in_lr[k]) : 32'h0;
    end
    // tree order of the module: ((e0 + e1) + e2) + (e3 + e4)
    e_sum = fadd(fadd(fadd(e[0], e[1]), e[2]), fadd(e[3], e[4]));
    return fsub(in_hyp, fmul(e_sum, 32'h3E4CCCCD));
  endfunction

  // output checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (n_out >= N) begin
        failures++;
        $display("unexpected output");
      end else begin
        if (out_pix !== exp_pix[n_out] || out_tag !== exp_tag[n_out] || cycle != exp_cyc[n_out]) begin
          failures++;
          if (failures < 10)
            $display("result %0d: pix %h tag %h cycle %0d, expected %h %h %0d", n_out, out_pix,
                     out_tag, cycle, exp_pix[n_out], exp_tag[n_out], exp_cyc[n_out]);
        end
      end
      n_out++;
    end
  end

  initial begin
    for (int k = 0; k < K; k++) begin
      in_lr[k] = '0; in_lane_ok[k] = 1'b0;
      for (int w = 0; w < 4; w++) in_win[k][w] = '0;
    end
    in_hyp = '0; in_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      for (int k = 0; k < K; k++) begin
        for (int w = 0; w < 4; w++) in_win[k][w] = rand_pix();
        in_lr[k]      = rand_pix();
        in_lane_ok[k] = ($urandom_range(7, 0) != 0);
      end
      in_hyp   = rand_pix();
      in_tag   = TAG_W'($urandom);
      in_valid = 1'b1;
      exp_pix[i] = reference();
      exp_tag[i] = in_tag;
      exp_cyc[i] = cycle + LAT;
      @(negedge clk);
      in_valid = 1'b0;
      // inputs change while no operation is issued; they must not matter
      for (int k = 0; k < K; k++) in_lr[k] = rand_pix();
      in_hyp = rand_pix();
      // first half: one operation per 12-cycle slot; second half: every 2 cycles
      if (i < N / 2) repeat (10) @(negedge clk);
    end
    repeat (LAT + 5) @(negedge clk);
    if (n_out != N) begin
      failures++;
      $display("got %0d results, expected %0d", n_out, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
