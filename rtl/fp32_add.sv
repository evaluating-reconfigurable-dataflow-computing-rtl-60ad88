// fp32_add: pipelined IEEE single precision adder, y = a + b.
//
// The operation is evaluated in one combinational block (himeno_pkg::fp_add) and
// followed by LAT register stages, which a synthesis tool is expected to retime
// into the logic. Rounding is round-to-nearest-even; subnormal inputs and results
// become signed zero. The unit advances only when en is high, so a whole kernel
// built from such units stalls as one. Latency: LAT en-cycles (LAT >= 1).
// The document only asks for IEEE single precision; the latency, the retiming
// style and the subnormal flush are choices of this design.
module fp32_add
  import himeno_pkg::*;
#(
  parameter int LAT = 2
) (
  input  logic  clk,
  input  logic  en,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  fp32_t stage [LAT];

  always_ff @(posedge clk) begin
    if (en) begin
      stage[0] <= fp_add(a, b);
      for (int s = 1; s < LAT; s++) stage[s] <= stage[s-1];
    end
  end

  assign y = stage[LAT-1];

  initial assert (LAT >= 1) else $error("fp32_add: LAT must be at least 1");
endmodule
