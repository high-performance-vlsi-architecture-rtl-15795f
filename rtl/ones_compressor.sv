// Ones compressor: counts how many of J input bits are set.
//
// Built as a counter tree: a first layer of full adders turns each group of three
// input bits into a 2-bit sum, then every following layer adds the partial sums
// in pairs with one more output bit, halving their number, until one sum is left.
// An odd partial sum left over in a layer is passed on unchanged to the next one.
// For J = 24882 this is 8294 full adders followed by 14 adder layers and a 16-bit
// result. Purely combinational.
module ones_compressor #(
  parameter int unsigned J  = cluster_pkg::J_VEC,
  localparam int unsigned CW = cluster_pkg::cmp_width(J)
) (
  input  logic [J-1:0]  bits,
  output logic [CW-1:0] count
);

  localparam int unsigned NL = cluster_pkg::cmp_levels(J);
  localparam int unsigned N0 = (J + 2) / 3;

  // number of partial sums in layer l
  function automatic int unsigned sums_at(int unsigned l);
    int unsigned n = N0;
    for (int unsigned i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  logic [3*N0-1:0] padded;
  assign padded = (3*N0)'(bits);

  for (genvar l = 0; l <= NL; l++) begin : g_lvl
    localparam int unsigned NS = sums_at(l);
    localparam int unsigned SW = 2 + l;
    logic [SW-1:0] s [NS];
    if (l == 0) begin : g_fa
      for (genvar i = 0; i < NS; i++) begin : g_cell
        assign s[i] = SW'(padded[3*i]) + SW'(padded[3*i+1]) + SW'(padded[3*i+2]);
      end
    end else begin : g_add
      localparam int unsigned NP = sums_at(l - 1);
      for (genvar i = 0; i < NS; i++) begin : g_cell
        if (2*i + 1 < NP) begin : g_pair
          assign s[i] = SW'(g_lvl[l-1].s[2*i]) + SW'(g_lvl[l-1].s[2*i+1]);
        end else begin : g_pass
          assign s[i] = SW'(g_lvl[l-1].s[2*i]);
        end
      end
    end
  end

  assign count = g_lvl[NL].s[0];

endmodule
