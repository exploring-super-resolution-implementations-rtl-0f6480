// sr_top: top level holding the two hardware designs side by side.
//
//  * u_engine (sr_fpga_sr): the all-hardware super-resolution engine, with
//    its frame-load, run-control and read-back ports brought out unchanged
//    (see sr_fpga_sr for the protocol).
//  * u_ci (sr_fp_ci): the floating point custom-instruction unit of the
//    hardware/software variant. The soft-core processor that would drive it is
//    not part of this RTL, so its custom-instruction port (ci_*) is brought
//    out instead.
//
// The two share only the clock; the engine has an active-low reset, the
// custom-instruction unit the processor's active-high reset. Parameters are
// passed to the engine; their defaults are the published configuration.
module sr_top
  import sr_pkg::*;
#(
  parameter int unsigned LR_H       = 240,
  parameter int unsigned LR_W       = 320,
  parameter int unsigned NUM_FRAMES = 5,
  parameter int unsigned NUM_PPU    = 4,
  parameter int unsigned SHIFT_W    = 4,
  parameter int unsigned ITER_W     = 8,
  localparam int unsigned ROW_W     = $clog2(2 * LR_H),
  localparam int unsigned COL_W     = $clog2(2 * LR_W),
  localparam int unsigned FRAME_W   = (NUM_FRAMES > 1) ? $clog2(NUM_FRAMES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // super-resolution engine
  input  logic                      load_we,
  input  logic                      load_hyp,
  input  logic [FRAME_W-1:0]        load_frame,
  input  logic [ROW_W-1:0]          load_row,
  input  logic [COL_W-1:0]          load_col,
  input  fp32_t                     load_data,
  input  logic                      start,
  input  logic [ITER_W-1:0]         n_iter,
  input  logic signed [SHIFT_W-1:0] shift_y [NUM_FRAMES],
  input  logic signed [SHIFT_W-1:0] shift_x [NUM_FRAMES],
  output logic                      busy,
  output logic                      done,
  output logic [ITER_W-1:0]         iter,
  output logic [31:0]               cycle_count,
  input  logic [ROW_W-1:0]          rd_row,
  input  logic [COL_W-1:0]          rd_col,
  output fp32_t                     rd_data,
  // custom-instruction port of the hardware/software variant
  input  logic                      ci_clk_en,
  input  logic                      ci_reset,
  input  logic                      ci_start,
  input  logic [1:0]                ci_n,
  input  fp32_t                     ci_dataa,
  input  fp32_t                     ci_datab,
  output logic                      ci_done,
  output fp32_t                     ci_result
);
  sr_fpga_sr #(
    .LR_H(LR_H), .LR_W(LR_W), .NUM_FRAMES(NUM_FRAMES), .NUM_PPU(NUM_PPU),
    .SHIFT_W(SHIFT_W), .ITER_W(ITER_W)
  ) u_engine (
    .clk, .rst_n, .load_we, .load_hyp, .load_frame, .load_row, .load_col, .load_data,
    .start, .n_iter, .shift_y, .shift_x, .busy, .done, .iter, .cycle_count,
    .rd_row, .rd_col, .rd_data
  );

  sr_fp_ci u_ci (
    .clk, .clk_en (ci_clk_en), .reset (ci_reset), .start (ci_start), .n (ci_n),
    .dataa (ci_dataa), .datab (ci_datab), .done (ci_done), .result (ci_result)
  );
endmodule
