// galois_fetcher: index generator for the Galois automorphism X -> X^k.
//
// For a polynomial of dimension n = 2^logn (negacyclic ring, X^n = -1) the
// automorphism moves coefficient i to position i*k mod 2n, negated when that
// position is n or above. After start, the fetcher presents i = 0, 1, ...,
// n-1 in order; each index is held until next is asserted. It keeps
// i*k mod 2n with one adder and one conditional subtraction instead of a
// multiplier. k must be odd (the document's "efficient Galois indexing";
// how the indexing is computed is this design's choice).
//
// Timing: valid rises the cycle after start; one index per cycle with next
// held high; last marks index n-1.
module galois_fetcher #(
  parameter int unsigned LOGN_MAX = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [LOGN_MAX:0]   k,
  input  logic [3:0]          logn,
  input  logic                next,
  output logic                valid,
  output logic                last,
  output logic [LOGN_MAX-1:0] src,
  output logic [LOGN_MAX-1:0] dst,
  output logic                neg
);
  logic [LOGN_MAX:0]   acc, kr, n1;
  logic [LOGN_MAX+1:0] n2;
  logic [LOGN_MAX+1:0] sum;
  logic [3:0]          lg;

  assign n1  = (LOGN_MAX+1)'(1) << lg;          // n
  assign n2  = (LOGN_MAX+2)'(2) << lg;          // 2n
  assign sum = {1'b0, acc} + {1'b0, kr};
  assign neg = (acc >= n1);
  assign dst = LOGN_MAX'(neg ? acc - n1 : acc);
  assign last = valid && ({1'b0, src} == n1 - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0; src <= '0; acc <= '0; kr <= '0; lg <= '0;
    end else if (start) begin
      valid <= 1'b1;
      src   <= '0;
      acc   <= '0;
      lg    <= logn;
      kr    <= (LOGN_MAX+1)'(k & (((LOGN_MAX+2)'(2) << logn) - 1'b1));   // k mod 2n
    end else if (valid && next) begin
      if (last) valid <= 1'b0;
      src <= src + 1'b1;
      acc <= (sum >= n2) ? (LOGN_MAX+1)'(sum - n2) : sum[LOGN_MAX:0];
    end
  end
endmodule
