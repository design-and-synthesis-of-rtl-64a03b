// roba_round: rounding block of the ROBA multiplier.
//
// Rounds an unsigned N-bit value to the nearest power of two and returns it
// as a one-hot word (all zero for a zero input). A value 3*2^(p-2), which lies
// exactly between two powers of two, is rounded up, because that gives the
// smaller logic; the one exception is 3, which rounds down to 2.
//
// Each output bit i (3 <= i <= N-1) is set when no input bit above i is set
// and either bit i is the leading one with a 0 below it (round down), or bit
// i is 0 with "11" just below it (round up):
//   ar[i] = (~a[i] & a[i-1] & a[i-2] | a[i] & ~a[i-1]) & ~|a[N-1:i+1]
// Bits 2, 1 and 0 use the special terms a[2]&~a[1], a[1] and a[0], each
// qualified by the bits above. With EXT = 1 (unsigned multiplier) one more
// bit is produced, ar[N] = a[N-1] & a[N-2], since an N-bit "11x..x" rounds
// to 2^N. With EXT = 0 (signed multipliers) the input is a magnitude of at
// most 2^(N-1) and N output bits suffice.
//
// Purely combinational. These equations are taken from the source paper.
module roba_round #(
  parameter int unsigned N   = roba_pkg::ROBA_N,
  parameter bit          EXT = 1'b1
) (
  input  logic [N-1:0]     a,
  output logic [N-1+EXT:0] ar
);

  // zero_above[i] is 1 when every input bit above bit i is zero.
  logic [N-1:0] zero_above;

  always_comb begin
    zero_above[N-1] = 1'b1;
    for (int i = N - 2; i >= 0; i--) begin
      zero_above[i] = zero_above[i+1] & ~a[i+1];
    end

    ar = '0;
    for (int i = 3; i < N; i++) begin
      ar[i] = ((~a[i] & a[i-1] & a[i-2]) | (a[i] & ~a[i-1])) & zero_above[i];
    end
    ar[2] = a[2] & ~a[1] & zero_above[2];
    ar[1] = a[1] & zero_above[1];
    ar[0] = a[0] & zero_above[0];
    if (EXT) begin
      ar[N-1+EXT] = a[N-1] & a[N-2];
    end
  end

  initial begin
    assert (N >= roba_pkg::ROBA_MIN_N)
      else $error("roba_round: N must be at least %0d", roba_pkg::ROBA_MIN_N);
  end

endmodule
