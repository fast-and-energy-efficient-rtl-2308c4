// Brent-Kung parallel-prefix network.
// From the bit generate g[i] = a[i] & b[i] and propagate p[i] = a[i] ^ b[i]
// it forms, for every bit position i, the group generate gg[i] = G[i:0] and
// group propagate pp[i] = P[i:0], using the prefix operator
//   (G, P)[hi] o (G, P)[lo] = (G_hi | P_hi & G_lo, P_hi & P_lo).
// Forward (up) tree: log2(WIDTH) levels; at level l every position
// i = k*2^l - 1 absorbs the span ending 2^(l-1) below it, so the full-width
// prefix at the top bit is ready first. Backward (down) tree: log2(WIDTH)-1
// levels fill in the remaining positions i = k*2^l + 2^(l-1) - 1. Each node
// drives at most two others and the tree has about 2*WIDTH nodes.
// The network carries no carry-in; the core stage merges its carry later.
// WIDTH must be a power of two. Combinational, 2*log2(WIDTH)-1 levels.
// Using the Brent-Kung network follows the adder's description; the
// levels and node placement are the standard Brent-Kung ones.
module bk_prefix #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] g,
  input  logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] gg,
  output logic [WIDTH-1:0] pp
);
  localparam int unsigned LOG = $clog2(WIDTH);
  localparam int unsigned NLEV = 2 * LOG;   // level 0 = input, up, then down

  if ((1 << LOG) != WIDTH || WIDTH < 2) begin : g_width_check
    $error("bk_prefix: WIDTH must be a power of two, at least 2");
  end

  // gl[v] / pl[v]: group signals after level v.
  logic [WIDTH-1:0] gl [NLEV];
  logic [WIDTH-1:0] pl [NLEV];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar v = 1; v < NLEV; v++) begin : g_lev
    // Up levels 1..LOG have span 2^v; down levels LOG+1.. go back down.
    localparam bit          UP   = (v <= LOG);
    localparam int unsigned L    = UP ? v : (2 * LOG - v);
    localparam int unsigned STEP = 1 << L;
    localparam int unsigned HALF = STEP >> 1;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      localparam bit NODE = UP ? ((i % STEP) == STEP - 1)
                               : (i >= STEP && (i % STEP) == HALF - 1);
      if (NODE) begin : g_node
        assign gl[v][i] = gl[v-1][i] | (pl[v-1][i] & gl[v-1][i-HALF]);
        assign pl[v][i] = pl[v-1][i] & pl[v-1][i-HALF];
      end else begin : g_wire
        assign gl[v][i] = gl[v-1][i];
        assign pl[v][i] = pl[v-1][i];
      end
    end
  end

  assign gg = gl[NLEV-1];
  assign pp = pl[NLEV-1];
endmodule
