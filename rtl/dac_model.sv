// dac_model: behavioural model of an N-bit digital-to-analogue converter.
// Not synthesizable logic: it stands for the analogue part behind the vector
// register.
//
// aout = code / 2^N, so the all-ones "meaningless" word reads 255/256 =
// 0.996094 for N = 8, as in the source's test. Combinational, no delay.
module dac_model #(
  parameter int N = 8
) (
  input  logic [N-1:0] code,
  output real          aout
);
  localparam real FULL = real'(2 ** N);

  always_comb aout = real'(code) / FULL;
endmodule
