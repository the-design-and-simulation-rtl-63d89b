// optical_adder: the parallel signed-digit adder, M adder blocks side by
// side.
//
// Block k adds operand pair (a[k], b[k]). The blocks share nothing, so all
// M additions are done at the same time and each takes the same three
// steps whatever the word length N. M = 6 blocks of N = 15 digits is the
// size of the published example; both are parameters.
//
// Interface (per block k, digit vectors little-endian):
//   a[k], b[k]      N-digit operands
//   sum[k]          N+1-digit sum
//   step1_t/w[k]    T and W digits after step one
//   step2_t/w[k]    T' and W' digits after step two
// Timing: combinational; no clock, no handshake. A user who wants the
// adder pipelined registers the operands and the sums around it.
module optical_adder
  import bsd_pkg::*;
#(
  parameter int unsigned M = 6,
  parameter int unsigned N = 15
) (
  input  digit_t [M-1:0][N-1:0] a,
  input  digit_t [M-1:0][N-1:0] b,
  output digit_t [M-1:0][N:0]   sum,
  output digit_t [M-1:0][N:0]   step1_t,
  output digit_t [M-1:0][N:0]   step1_w,
  output digit_t [M-1:0][N:0]   step2_t,
  output digit_t [M-1:0][N:0]   step2_w
);

  for (genvar k = 0; k < M; k++) begin : g_block
    bsd_adder_block #(.N(N)) u_block (
      .x      (a[k]),
      .y      (b[k]),
      .sum    (sum[k]),
      .step1_t(step1_t[k]),
      .step1_w(step1_w[k]),
      .step2_t(step2_t[k]),
      .step2_w(step2_w[k])
    );
  end

endmodule
