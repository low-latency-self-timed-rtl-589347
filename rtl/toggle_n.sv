// toggle_n: N-way transition Toggle.
//
// Input transitions go in turn to o[0], o[1], ..., o[N-1] and back to o[0];
// it behaves as an N-bit transition-sensitive Johnson counter. This design
// builds it as a binary tree of two-way Toggles stored heap-style in nd[]:
// nd[1] is the input, the Toggle at nd[2^k + m] (level k) drives
// nd[2^(k+1) + m] and nd[2^(k+1) + m + 2^k], and o[j] = nd[N + j]. The root
// therefore picks the lowest bit of the output number, the next level the
// next bit, which gives round-robin order. N must be a power of two (N = 1 is
// a plain wire). Latency is log2(N) Toggle stages.
//
// Origin: the N-way Toggle (an N-bit transition Johnson counter) is the
// published element; its construction was not given, and the tree of two-way
// Toggles is this design's choice.
module toggle_n #(
  parameter int N = 4
) (
  input  logic         clr,
  input  logic         t,
  output logic [N-1:0] o
);
  localparam int L = $clog2(N);

  if (N < 1 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("toggle_n: N must be a power of two");
  end

  logic [2*N-1:1] nd;

  assign nd[1] = t;
  for (genvar k = 0; k < L; k++) begin : g_level
    for (genvar m = 0; m < (1 << k); m++) begin : g_tog
      toggle2 u_tog (
        .clr(clr), .t(nd[(1 << k) + m]),
        .o0(nd[(2 << k) + m]), .o1(nd[(2 << k) + m + (1 << k)])
      );
    end
  end
  assign o = nd[2*N-1:N];
endmodule
