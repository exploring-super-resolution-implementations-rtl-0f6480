// tb_sr_fp_mul: self-checking test of the single precision multiplier.
// Applies one product per cycle (corner cases first, then random operands)
// and checks each result exactly LAT = 5 cycles later against double
// precision reference arithmetic rounded to single precision. A unit with a
// different latency mismatches, so the latency is checked too.
module tb_sr_fp_mul;
  import tb_sr_ref_pkg::*;

  localparam int LAT = 5;
  localparam int N   = 30000;

  logic        clk = 1'b0;
  logic [31:0] a = '0, b = '0, y;
  logic        sub = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] op_a [N], op_b [N], expv [N];
  logic        op_s [N];

  always #5 clk = ~clk;

  sr_fp_mul dut (.clk, .a, .b, .y);

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x;
    // corner cases: cancellation, ties, zeros, overflow
    x = rand_f(10);
    op_a[0] = x;            op_b[0] = x;            op_s[0] = 1'b1;
    op_a[1] = x;            op_b[1] = {~x[31], x[30:0]}; op_s[1] = 1'b0;
    op_a[2] = 32'h3F800000; op_b[2] = 32'h3F800001; op_s[2] = 1'b1;
    op_a[3] = 32'h3F800000; op_b[3] = 32'h33800000; op_s[3] = 1'b0;  // tie, even
    op_a[4] = 32'h3F800001; op_b[4] = 32'h33800000; op_s[4] = 1'b0;  // tie, odd
    op_a[5] = 32'h00000000; op_b[5] = 32'h80000000; op_s[5] = 1'b0;
    op_a[6] = 32'h80000000; op_b[6] = 32'h80000000; op_s[6] = 1'b0;
    op_a[7] = 32'h4B000000; op_b[7] = 32'h3F000000; op_s[7] = 1'b1;
    op_a[8] = 32'h7F7FFFFF; op_b[8] = 32'h7F7FFFFF; op_s[8] = 1'b0;  // overflow
    op_a[9] = 32'h40000000; op_b[9] = 32'h00000000; op_s[9] = 1'b1;
    for (int i = 10; i < N; i++) begin
      op_s[i] = 1'($urandom);
      case (i % 3)
        0: begin op_a[i] = rand_f(30); op_b[i] = rand_f(30); end
        1: begin  // nearly equal magnitudes: deep cancellation
          x = rand_f(8);
          op_a[i] = x;
          op_b[i] = {x[31:12] ^ 20'($urandom_range(3, 0)), 12'($urandom)};
        end
        default: begin op_a[i] = rand_pix(); op_b[i] = rand_pix(); end
      endcase
    end
    for (int i = 0; i < N; i++) expv[i] = fmul(op_a[i], op_b[i]);

    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        checks++;
        if (y !== expv[n - LAT]) begin
          failures++;
          if (failures < 10)
            $display("op %0d: %h %s %h = %h, expected %h", n - LAT, op_a[n - LAT],
                     "*", op_b[n - LAT], y, expv[n - LAT]);
        end
      end
      if (n < N) begin
        a = op_a[n]; b = op_b[n]; sub = op_s[n];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
