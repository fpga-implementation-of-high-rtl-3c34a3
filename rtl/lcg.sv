// lcg: one linear congruential generator modulo 2^N,
//   x_{i+1} = (2^R + 1) * x_i + B  (mod 2^N).
// With the multiplier of the form 2^R + 1 the update is the three-operand sum
// (x << R) + x + B, done by one three_operand_adder (carry-in 0); the bits
// above N-1 are dropped, which is the reduction mod 2^N. For a full period
// 2^N, B must be odd and R >= 2; other values are refused at elaboration.
// Bit N of the adder's sum and its carry out are left unused on purpose:
// dropping them is the reduction mod 2^N.
// Timing: state loads SEED on a clock edge with rst_n low (synchronous reset)
// and otherwise advances once per clock. next_state is combinational.
module lcg #(
  parameter int unsigned N    = 32,  // modulus 2^N
  parameter int unsigned R    = 6,   // multiplier a = 2^R + 1
  parameter logic [N-1:0] B   = 1,   // increment
  parameter logic [N-1:0] SEED = 1   // initial value x_0
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] state,       // x_i
  output logic [N-1:0] next_state   // x_{i+1}
);
  // Full-period conditions of an LCG modulo 2^N: a = 1 (mod 4), b odd.
  if (R < 2) begin : g_bad_r
    $error("lcg: R must be at least 2 for a full period");
  end
  if (B[0] == 1'b0) begin : g_bad_b
    $error("lcg: B must be odd for a full period");
  end

  logic [N:0] sum;
  logic       carryout;

  three_operand_adder #(.N(N)) u_add (
    .a       (state << R),
    .b       (state),
    .c       (B),
    .cin     (1'b0),
    .sum     (sum),
    .carryout(carryout)
  );

  assign next_state = sum[N-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) state <= SEED;
    else        state <= next_state;
  end
endmodule
