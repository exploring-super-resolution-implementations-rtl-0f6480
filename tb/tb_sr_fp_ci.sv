// tb_sr_fp_ci: self-checking test of the floating point custom-instruction
// unit. Issues multiply, add and subtract requests the way a processor that
// waits for done would, with random gaps and clk_en low at times, and checks
// each result against reference single precision arithmetic and its latency
// (done exactly 5 cycles after start for a multiply, 7 for add and subtract).
module tb_sr_fp_ci;
  import tb_sr_ref_pkg::*;

  logic        clk = 1'b0, clk_en = 1'b1, reset = 1'b1, start = 1'b0;
  logic [1:0]  n = '0;
  logic [31:0] dataa = '0, datab = '0, result;
  logic        done;
  int checks = 0, failures = 0;
  int n_mul = 0, n_add = 0, n_sub = 0, n_stall = 0;

  always #5 clk = ~clk;

  sr_fp_ci dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    int lat, waited;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // a request with clk_en low must be ignored
      if ($urandom_range(9, 0) == 0) begin
        clk_en = 1'b0; start = 1'b1; n_stall++;
        @(negedge clk);
        start = 1'b0; clk_en = 1'b1;
        repeat (8) begin
          @(negedge clk);
          checks++;
          if (done) failures++;
        end
      end
      n     = 2'($urandom_range(2, 0));
      dataa = ($urandom_range(1, 0) == 0) ? rand_pix() : rand_f(20);
      datab = ($urandom_range(1, 0) == 0) ? rand_pix() : rand_f(20);
      case (n)
        2'd0: begin e = fmul(dataa, datab); lat = 5; n_mul++; end
        2'd1: begin e = fadd(dataa, datab); lat = 7; n_add++; end
        default: begin e = fsub(dataa, datab); lat = 7; n_sub++; end
      endcase
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      dataa = $urandom; datab = $urandom;   // operands are only sampled with start
      waited = 1;
      while (!done && waited < 20) begin
        @(negedge clk);
        waited++;
      end
      checks++;
      if (!done || waited != lat || result !== e) begin
        failures++;
        if (failures < 10)
          $display("op %0d n=%0d: done=%0b after %0d cycles result %h, expected %h after %0d",
                   i, n, done, waited, result, e, lat);
      end
      repeat ($urandom_range(2, 0)) @(negedge clk);
    end
    if (n_mul == 0 || n_add == 0 || n_sub == 0 || n_stall == 0) failures++;
    $display("multiplies %0d adds %0d subtracts %0d ignored requests %0d", n_mul, n_add, n_sub, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
