// sr_pixel_calc: floating point pixel calculation module.
//
// Computes one new pixel of the high-resolution hypothesis frame H per
// operation, following one pass of iterative back-projection for that pixel:
//
//   resize frame   l_k = DOWN_SCALE * ((w_k0 + w_k1) + (w_k2 + w_k3))
//                  (the 2x2 window of H that frame k's shifted pixel grid maps
//                   onto this pixel is averaged down to one low-res pixel)
//   compare        e_k = l_k - O_k         (O_k: the low-res pixel of frame k)
//                  e_k = +0 when lane k is not valid (window off the frame)
//   resize error   E   = BP_GAIN * sum_k e_k   (error spread back to the
//                                               high-res pixel and combined)
//   adjust         H'  = H - E
//
// All values are IEEE-754 single precision. There are NUM_FRAMES parallel
// lanes, one per low-resolution frame, a pipelined adder tree, one multiplier
// and one subtractor. The whole datapath is pipelined: a new operation can be
// accepted every cycle (the controller issues one per 12-cycle slot) and the
// result appears LATENCY cycles after in_valid, with
//   LATENCY = 3*ADD_LAT + 2*MUL_LAT + ADD_LAT*clog2(NUM_FRAMES) + ADD_LAT
//           = 59 cycles for 5 frames.
// tag is carried alongside unchanged (the controller puts the destination
// address there).
//
// The four stages (resize frame, compare, resize error, adjust) and the use of
// add, subtract and multiply units in them follow the published design. The
// 2x2 box average, the 0.25 and 1/NUM_FRAMES constants and the zero
// contribution of invalid lanes are this design's choices.
module sr_pixel_calc
  import sr_pkg::*;
#(
  parameter int unsigned NUM_FRAMES = 5,
  parameter int unsigned TAG_W      = 18,
  parameter fp32_t       DOWN_SCALE = FP_QUARTER,
  parameter fp32_t       BP_GAIN    = FP_FIFTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            in_win     [NUM_FRAMES][4],  // H(r0,c0) H(r0,c0+1) H(r0+1,c0) H(r0+1,c0+1)
  input  fp32_t            in_lr      [NUM_FRAMES],     // O_k at the matching low-res position
  input  logic             in_lane_ok [NUM_FRAMES],     // window and O_k lie inside the frames
  input  fp32_t            in_hyp,                      // current H at the output position
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            out_pix,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned TREE_LAT   = ADD_LAT * $clog2(NUM_FRAMES);
  localparam int unsigned RESIZE_LAT = 2 * ADD_LAT + MUL_LAT;           // l_k ready
  localparam int unsigned CMP_LAT    = RESIZE_LAT + ADD_LAT;            // e_k ready
  localparam int unsigned ERR_LAT    = CMP_LAT + TREE_LAT + MUL_LAT;    // E ready
  localparam int unsigned LATENCY    = ERR_LAT + ADD_LAT;

  fp32_t err_masked [NUM_FRAMES];

  // ---------------- per-frame lanes: resize frame, compare ----------------
  for (genvar k = 0; k < NUM_FRAMES; k++) begin : g_lane
    fp32_t sum_top, sum_bot, sum4, low, lr_d, err;
    logic  ok_d;

    sr_fp_addsub u_add_top (.clk(clk), .a(in_win[k][0]), .b(in_win[k][1]), .sub(1'b0), .y(sum_top));
    sr_fp_addsub u_add_bot (.clk(clk), .a(in_win[k][2]), .b(in_win[k][3]), .sub(1'b0), .y(sum_bot));
    sr_fp_addsub u_add_all (.clk(clk), .a(sum_top), .b(sum_bot), .sub(1'b0), .y(sum4));
    sr_fp_mul    u_scale   (.clk(clk), .a(sum4), .b(DOWN_SCALE), .y(low));

    sr_delay #(.WIDTH(32), .DEPTH(RESIZE_LAT)) u_lr_d (.clk(clk), .d(in_lr[k]), .q(lr_d));
    sr_fp_addsub u_cmp (.clk(clk), .a(low), .b(lr_d), .sub(1'b1), .y(err));

    sr_delay #(.WIDTH(1), .DEPTH(CMP_LAT)) u_ok_d (.clk(clk), .d(in_lane_ok[k]), .q(ok_d));
    assign err_masked[k] = ok_d ? err : FP_POS_ZERO;
  end

  // ---------------- combine and resize error ----------------
  fp32_t err_sum, err_hr, hyp_d;

  sr_fp_sum_tree #(.N(NUM_FRAMES)) u_tree (.clk(clk), .in(err_masked), .sum(err_sum));
  sr_fp_mul u_gain (.clk(clk), .a(err_sum), .b(BP_GAIN), .y(err_hr));

  // ---------------- adjust hypothesis ----------------
  sr_delay #(.WIDTH(32), .DEPTH(ERR_LAT)) u_hyp_d (.clk(clk), .d(in_hyp), .q(hyp_d));
  sr_fp_addsub u_adjust (.clk(clk), .a(hyp_d), .b(err_hr), .sub(1'b1), .y(out_pix));

  // ---------------- side band: valid and tag ----------------
  sr_delay #(.WIDTH(TAG_W), .DEPTH(LATENCY)) u_tag_d (.clk(clk), .d(in_tag), .q(out_tag));

  logic [LATENCY-1:0] valid_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_sr <= '0;
    else        valid_sr <= {valid_sr[LATENCY-2:0], in_valid};
  end
  assign out_valid = valid_sr[LATENCY-1];
endmodule
