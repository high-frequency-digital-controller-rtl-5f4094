// Behavioural model of the external memory that holds the compensator tables.
//
// Asynchronous read-only memory of 32 words of 9 bits. Its image is the PID
// law d(n+1) = d(n) + a*e(n) + b*e(n-1) + c*e(n-2): word t*9 + i holds
// coefficient t (a, b, c) times e = i - 4, in two's complement. Unused words
// read as zero. Data follow the address after ACCESS_NS while rd is high.
module ext_memory_model #(
  parameter int  COEF_A    = 25,
  parameter int  COEF_B    = -24,
  parameter int  COEF_C    = 1,
  parameter real ACCESS_NS = 40.0
) (
  input  logic [4:0] addr,
  input  logic       rd,
  output logic [8:0] data
);
  timeunit 1ns;
  timeprecision 1fs;

  function automatic logic [8:0] word(input int a);
    int coef [3];
    coef = '{COEF_A, COEF_B, COEF_C};
    if (a >= 27) return '0;
    return 9'(coef[a / 9] * (a % 9 - 4));
  endfunction

  always @(addr or rd) data <= #(ACCESS_NS) (rd ? word(int'(addr)) : 9'h1FF);

endmodule
