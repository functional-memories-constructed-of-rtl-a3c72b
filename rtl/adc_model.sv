// adc_model: behavioural model of an N-bit analogue-to-digital converter.
// Not synthesizable logic: it stands for the analogue part in front of the
// vector register.
//
// code = round(ain * 2^N), limited to 0 .. 2^N-1. Rounding to nearest is taken
// from the source's numbers (0.888889 -> 228, 0.777778 -> 199 for N = 8); the
// converter's inner workings are not given. Combinational, no delay.
module adc_model #(
  parameter int N = 8
) (
  input  real          ain,
  output logic [N-1:0] code
);
  localparam real FULL = real'(2 ** N);

  always_comb begin
    real s;
    s = ain * FULL;
    if (s < 0.0)              code = '0;
    else if (s >= FULL - 0.5) code = '1;
    else                      code = N'($rtoi(s + 0.5));
  end
endmodule
