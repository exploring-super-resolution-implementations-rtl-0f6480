// sr_fp_addsub: shared single precision floating point add/subtract unit.
//
// y = a + b when sub = 0, y = a - b when sub = 1: a single control bit turns
// the adder into a subtractor, as in the published design. The unit is fully
// pipelined: operands presented in cycle t give y in cycle t + LATENCY, and a
// new operation can start every cycle. LATENCY defaults to the 7 cycles of the
// published unit.
//
// Implementation: the operands are registered, the result is computed by
// sr_pkg::fp_add (round to nearest even, subnormals flushed to zero) and then
// passes LATENCY-1 further registers, which a synthesis tool with register
// retiming spreads through the logic. The internal structure is this design's
// own; the published design used a vendor megafunction.
module sr_fp_addsub
  import sr_pkg::*;
#(
  parameter int unsigned LATENCY = ADD_LAT
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);
  fp32_t a_q, b_q;

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= {b[31] ^ sub, b[30:0]};
  end

  sr_delay #(.WIDTH(32), .DEPTH(LATENCY - 1)) u_pipe (
    .clk (clk),
    .d   (fp_add(a_q, b_q)),
    .q   (y)
  );

  initial assert (LATENCY >= 1) else $error("sr_fp_addsub: LATENCY must be at least 1");
endmodule
