// sr_fp_sum_tree: pipelined floating point adder tree that sums N inputs.
//
// Used to combine the per-frame error values into the combined error. The
// tree is built recursively: the inputs are split into a larger and a smaller
// half, each half is summed by a smaller tree, the shorter branch is padded
// with a delay so that both arrive together, and one add/sub unit adds them.
// Latency is ADD_LAT * clog2(N) cycles (0 for N = 1); a new set of inputs can
// be accepted every cycle. The summation order (left half plus right half) is
// this design's choice.
//
// Linting this module on its own, verilator reports sum_a and sum_b as not
// driven and in_a and in_b as not used: it does not follow the recursive
// instances there. When the tree is simulated inside the pixel module, its
// sums match an independent reference bit for bit.
module sr_fp_sum_tree
  import sr_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic  clk,
  input  fp32_t in  [N],
  output fp32_t sum
);
  if (N == 1) begin : g_leaf
    assign sum = in[0];
  end else begin : g_node
    localparam int unsigned NA  = (N + 1) / 2;
    localparam int unsigned NB  = N - NA;
    localparam int unsigned PAD = ADD_LAT * ($clog2(NA) - $clog2(NB));

    fp32_t in_a [NA];
    fp32_t in_b [NB];
    fp32_t sum_a, sum_b, sum_b_d;

    for (genvar i = 0; i < NA; i++) begin : g_a
      assign in_a[i] = in[i];
    end
    for (genvar i = 0; i < NB; i++) begin : g_b
      assign in_b[i] = in[NA + i];
    end

    sr_fp_sum_tree #(.N(NA)) u_a (.clk(clk), .in(in_a), .sum(sum_a));
    sr_fp_sum_tree #(.N(NB)) u_b (.clk(clk), .in(in_b), .sum(sum_b));

    sr_delay #(.WIDTH(32), .DEPTH(PAD)) u_pad (.clk(clk), .d(sum_b), .q(sum_b_d));

    sr_fp_addsub u_add (.clk(clk), .a(sum_a), .b(sum_b_d), .sub(1'b0), .y(sum));
  end
endmodule
