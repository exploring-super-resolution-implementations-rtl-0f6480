// sr_delay: fixed-length shift register that delays a WIDTH-bit value by
// DEPTH clock cycles (DEPTH = 0 is a plain wire). Used to keep side data
// (low-resolution pixels, hypothesis pixels, tags, valid bits) aligned with
// the floating point pipelines. It has no reset: the valid bit that travels
// beside the data is reset where it is created.
module sr_delay #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[DEPTH-1];
  end
endmodule
