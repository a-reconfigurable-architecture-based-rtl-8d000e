// tdf_chain: the delay/adder chain of a transposed-form FIR filter.
//
// For N taps the chain holds N-1 partial-sum registers s[1..N-1] and an
// output register. On every enabled clock edge
//     s[N-1] <= p[N-1]
//     s[k]   <= p[k] + s[k+1]        k = 1 .. N-2
//     y      <= p[0] + s[1]
// where p[k] = b(k) * x(n) are the products of the current sample with every
// coefficient. After the edge for sample n, y = sum_k b(k) x(n-k): the
// transposed structure of y(n) = sum b(k) x(n-k) in which each delay sits
// between two adders instead of on the input line.
// The adders and registers are AW bits wide (65 bits for 64-bit products),
// as in the filter's transposed form; this design adds an enable so that the
// chain advances once per input sample rather than once per clock.
//
// Interface: p[N] products (PW bits signed), en advances the chain,
// y (AW bits signed) is the filter output.
// Timing: y is registered; a product presented with en appears in y on the
// same edge weighted by its tap position; rst is synchronous and clears all
// registers.
module tdf_chain #(
  parameter int N  = 11,
  parameter int PW = 64,
  parameter int AW = 65
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [PW-1:0] p [N],
  output logic signed [AW-1:0] y
);

  if (N < 2) begin : g_bad_n
    $error("tdf_chain: N must be at least 2");
  end

  // s[0] is unused; s[k] feeds the adder of tap k-1.
  logic signed [AW-1:0] s [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) s[k] <= '0;
      y <= '0;
    end else if (en) begin
      s[0] <= '0;
      for (int k = 1; k < N - 1; k++) s[k] <= AW'(p[k]) + s[k+1];
      s[N-1] <= AW'(p[N-1]);
      y      <= AW'(p[0]) + s[1];
    end
  end

endmodule
