// ladner_fischer_adder: W-bit parallel prefix adder with a Ladner-Fischer
// carry tree; {cout, sum} = a + b + cin.
//
// Three stages, as in the design's parallel prefix adder:
//   pre-processing   p[i] = a[i] ^ b[i], g[i] = a[i] & b[i]; cin is folded
//                    into bit 0 as g[0] | p[0] & cin
//   carry generation group (G, P) pairs combined with the prefix operator
//                    G(i:k) = G(i:j) | P(i:j) & G(j-1:k), P(i:k) = P(i:j) & P(j-1:k)
//   post-processing  sum[i] = p[i] ^ G(i-1:0), cout = G(W-1:0)
// Tree shape (this implementation's reading of "Ladner-Fischer"): one level
// combines each odd bit with the even bit below it, a Sklansky
// (divide-and-conquer) tree of ceil(log2(W/2)) levels then builds the prefixes
// of all odd bits, and one last level derives the even-bit prefixes from their
// odd neighbours. That is log2(W)+1 operator levels with half the fanout of a
// plain Sklansky tree. Purely combinational.
module ladner_fischer_adder #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned K = W / 2;                     // odd bit positions
  localparam int unsigned L = (K > 1) ? $clog2(K) : 0;   // Sklansky levels over them

  if (W < 2) begin : g_bad
    $error("ladner_fischer_adder: W must be at least 2");
  end

  // ---- pre-processing (equations 1 and 2)
  logic [W-1:0] p, g, gc;
  assign p  = a ^ b;
  assign g  = a & b;
  assign gc = {g[W-1:1], g[0] | (p[0] & cin)};

  // ---- carry generation
  // gt[l][k], pt[l][k]: group generate/propagate of odd bit 2k+1 after level l.
  logic [L:0][K-1:0] gt, pt;

  for (genvar k = 0; k < K; k++) begin : g_pair
    assign gt[0][k] = gc[2*k+1] | (p[2*k+1] & gc[2*k]);
    assign pt[0][k] = p[2*k+1] & p[2*k];
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar k = 0; k < K; k++) begin : g_node
      if (((k >> l) & 1) == 1) begin : g_op
        localparam int unsigned J = ((k >> l) << l) - 1;  // top of the lower half-block
        assign gt[l+1][k] = gt[l][k] | (pt[l][k] & gt[l][J]);
        assign pt[l+1][k] = pt[l][k] & pt[l][J];
      end else begin : g_buf
        assign gt[l+1][k] = gt[l][k];
        assign pt[l+1][k] = pt[l][k];
      end
    end
  end

  // gpre[i] = G(i:0) including cin
  logic [W-1:0] gpre;
  assign gpre[0] = gc[0];
  for (genvar i = 1; i < W; i++) begin : g_fin
    if (i % 2 == 1) begin : g_odd
      assign gpre[i] = gt[L][i/2];
    end else begin : g_even
      assign gpre[i] = gc[i] | (p[i] & gt[L][i/2-1]);
    end
  end

  // ---- post-processing (equation 5)
  assign sum  = p ^ {gpre[W-2:0], cin};
  assign cout = gpre[W-1];
endmodule
