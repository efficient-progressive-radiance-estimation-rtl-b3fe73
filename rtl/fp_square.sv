// fp_square: pipelined IEEE 754 single-precision squarer, y = a*a.
//
// The result of the inputs presented in cycle t appears on y after STAGES
// rising clock edges (default 2, the depth the PREU data path is built
// around).  A new operation may start every cycle; there is no stall and no
// reset because validity is tracked by the surrounding pipeline.
//
// The operation itself is the combinational function fp_mul_f of fp32_pkg
// (round to nearest even, denormals flushed to zero); the STAGES registers
// follow it so that synthesis can retime them into the logic.  The stage
// count follows the engine's unit table; the internal arithmetic is this
// design's own.
module fp_square
  import fp32_pkg::*;
#(
    parameter int unsigned STAGES = 2
) (
    input  logic  clk,
    input  fp32_t a,
    output fp32_t y
);

  fp32_t pipe [STAGES];

  always_ff @(posedge clk) begin
    pipe[0] <= fp_mul_f(a, a);
    for (int i = 1; i < int'(STAGES); i++) pipe[i] <= pipe[i-1];
  end

  assign y = pipe[STAGES-1];

endmodule
