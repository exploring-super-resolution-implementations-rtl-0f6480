// sr_fp_mul: single precision floating point multiplier.
//
// y = a * b. Fully pipelined: operands presented in cycle t give y in cycle
// t + LATENCY; LATENCY defaults to the 5 cycles of the published unit.
//
// Implementation: the operands are registered, the product is computed by
// sr_pkg::fp_mul (round to nearest even, subnormals flushed to zero) and then
// passes LATENCY-1 further registers for retiming. The internal structure is
// this design's own; the published design used a vendor megafunction.
module sr_fp_mul
  import sr_pkg::*;
#(
  parameter int unsigned LATENCY = MUL_LAT
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  fp32_t a_q, b_q;

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
  end

  sr_delay #(.WIDTH(32), .DEPTH(LATENCY - 1)) u_pipe (
    .clk (clk),
    .d   (fp_mul(a_q, b_q)),
    .q   (y)
  );

  initial assert (LATENCY >= 1) else $error("sr_fp_mul: LATENCY must be at least 1");
endmodule
