// sr_fp_ci: floating point custom-instruction unit for a soft-core processor.
//
// In the hardware/software variant of the design the algorithm runs as a
// program on a soft RISC processor, and every floating point multiply, add and
// subtract is handed to this unit, which is attached beside the processor's
// ALU; a multiplexer in the ALU stage picks its result instead of the ALU's.
//
// Interface (a multi-cycle custom instruction as on a Nios II style core):
//   start  one-cycle request (taken when clk_en is high) with dataa, datab and
//          the operation n: 0 = multiply, 1 = add, 2 = subtract (3 = add)
//   done   one-cycle pulse with result
// An add or subtract completes ADD_LAT (7) cycles after start, a multiply
// MUL_LAT (5) cycles after start. The units are pipelined, so a new request
// may follow every cycle as long as no two results would complete in the same
// cycle (an assertion checks this); a processor that waits for done never
// does that.
//
// The three operations and their single precision format follow the published
// design; the port names, the operation encoding and the handshake are this
// design's choice, modelled on the usual soft-core custom-instruction port.
module sr_fp_ci
  import sr_pkg::*;
(
  input  logic       clk,
  input  logic       clk_en,
  input  logic       reset,
  input  logic       start,
  input  logic [1:0] n,
  input  fp32_t      dataa,
  input  fp32_t      datab,
  output logic       done,
  output fp32_t      result
);
  typedef enum logic [1:0] {CI_MUL = 2'd0, CI_ADD = 2'd1, CI_SUB = 2'd2} ci_op_t;

  logic               go;
  logic               is_mul;
  logic [ADD_LAT-1:0] add_v;
  logic [MUL_LAT-1:0] mul_v;
  fp32_t              add_y, mul_y;

  assign go     = start && clk_en;
  assign is_mul = (ci_op_t'(n) == CI_MUL);

  sr_fp_addsub u_addsub (
    .clk, .a (dataa), .b (datab), .sub (ci_op_t'(n) == CI_SUB), .y (add_y)
  );
  sr_fp_mul u_mul (.clk, .a (dataa), .b (datab), .y (mul_y));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      add_v <= '0;
      mul_v <= '0;
    end else begin
      add_v <= {add_v[ADD_LAT-2:0], go && !is_mul};
      mul_v <= {mul_v[MUL_LAT-2:0], go && is_mul};
    end
  end

  assign done   = add_v[ADD_LAT-1] || mul_v[MUL_LAT-1];
  assign result = add_v[ADD_LAT-1] ? add_y : mul_y;

  a_one_result: assert property (@(posedge clk) disable iff (reset)
                                 !(add_v[ADD_LAT-1] && mul_v[MUL_LAT-1]))
    else $error("sr_fp_ci: add and multiply results collided");
endmodule
