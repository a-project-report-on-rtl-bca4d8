// phase_accumulator: the adder SMP and phase register RgP of the generator.
//
// On every rising clock edge RgP <= RgP + f, wrapping modulo 2**PHASE_W, so
// the output frequency is f * fclk / 2**PHASE_W. The adder and register
// follow the published circuit; the asynchronous, active-high clear is this
// design's reading of the original's flip-flops with asynchronous clear.
//
// Interface: clk, rst (async, active high), f (frequency word),
// phase (RgP). Timing: phase changes one clock after f is applied.
module phase_accumulator #(
  parameter int unsigned PHASE_W = sincos_pkg::PHASE_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PHASE_W-1:0] f,
  output logic [PHASE_W-1:0] phase
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) phase <= '0;
    else     phase <= phase + f;
  end
endmodule
