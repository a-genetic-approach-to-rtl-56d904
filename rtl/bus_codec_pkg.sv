// bus_codec_pkg: constants and types shared by the low-power address bus
// encoders and decoders.
//
// The address bus is 32 bits wide. It is cut into clusters of adjacent lines
// and every cluster is encoded on its own by a bijective map: 8-bit clusters
// for the truth-table encoder (GEG), 4-bit clusters for the gate-netlist
// encoder (GNEG). The GNEG netlist is a matrix of 3 columns by 5 rows of
// gates, each gate one of AND, OR, NOT, XOR or WIRE fed from two earlier
// nodes. The cluster widths, the matrix size and the gate set follow the
// published method; the field widths of a gene, the node numbering and the
// default chromosome are choices of this design.
package bus_codec_pkg;

  // Bus and cluster sizes of the main configuration.
  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned GEG_W      = 8;   // GEG8: 8-bit clusters
  localparam int unsigned GNEG_W     = 4;   // GNEG4: 4-bit clusters
  localparam int unsigned GNEG_COLS  = 3;   // "3x5 gate matrix": 3 columns ...
  localparam int unsigned GNEG_ROWS  = 5;   // ... of 5 gates each
  localparam int unsigned GNEG_GATES = GNEG_COLS * GNEG_ROWS;

  // T0 stride: byte addresses of 32-bit words.
  localparam logic [ADDR_W-1:0] T0_STRIDE = 32'd4;

  // Gate types of the GNEG template.
  typedef enum logic [2:0] {
    G_AND  = 3'd0,
    G_OR   = 3'd1,
    G_NOT  = 3'd2,   // inverts input a, ignores b
    G_XOR  = 3'd3,
    G_WIRE = 3'd4    // passes input a, ignores b
  } gate_e;

  // Width of a node index. Nodes are numbered: the N cluster inputs first
  // (0..N-1), then the gates column by column (N + col*ROWS + row).
  localparam int unsigned NODE_IDX_W = 8;
  typedef logic [NODE_IDX_W-1:0] node_idx_t;

  // One gene of the chromosome: the triplet (input a, input b, gate type).
  typedef struct packed {
    node_idx_t a;
    node_idx_t b;
    gate_e     op;
  } gene_t;

  function automatic gene_t mk_gene(node_idx_t a, node_idx_t b, gate_e op);
    gene_t g;
    g.a  = a;
    g.b  = b;
    g.op = op;
    return g;
  endfunction

  // Default chromosome of one 4-bit cluster (inputs x0..x3 are nodes 0..3).
  // It stands in for the chromosome a GNEG run evolves for an application:
  //   y0 = x0, y1 = x1 ^ x0, y2 = ~x2, y3 = x3 ^ ~x2
  // which is a bijection (x0 = y0, x1 = y1^y0, x2 = ~y2, x3 = y3^y2).
  // Genes are listed from gate 0 (column 0, row 0) upwards, so gate k is
  // element [k] of the packed array.
  localparam gene_t [GNEG_GATES-1:0] GNEG_DEFAULT_GENES = {
    // column 2: nodes 14..18
    mk_gene(0,  0,  G_WIRE),   // node 18 (unused)
    mk_gene(9,  9,  G_WIRE),   // node 17 = x3 ^ ~x2
    mk_gene(12, 12, G_WIRE),   // node 16 = ~x2
    mk_gene(10, 10, G_WIRE),   // node 15 = x1 ^ x0
    mk_gene(11, 11, G_WIRE),   // node 14 = x0
    // column 1: nodes 9..13
    mk_gene(4,  5,  G_OR),     // node 13 (unused)
    mk_gene(5,  5,  G_WIRE),   // node 12 = ~x2
    mk_gene(7,  7,  G_WIRE),   // node 11 = x0
    mk_gene(4,  4,  G_WIRE),   // node 10 = x1 ^ x0
    mk_gene(6,  5,  G_XOR),    // node 9  = x3 ^ ~x2
    // column 0: nodes 4..8
    mk_gene(0,  1,  G_AND),    // node 8 (unused)
    mk_gene(0,  0,  G_WIRE),   // node 7 = x0
    mk_gene(3,  3,  G_WIRE),   // node 6 = x3
    mk_gene(2,  2,  G_NOT),    // node 5 = ~x2
    mk_gene(1,  0,  G_XOR)     // node 4 = x1 ^ x0
  };

  // Output taps of the default chromosome: y3..y0 = nodes 17, 16, 15, 14.
  localparam node_idx_t [GNEG_W-1:0] GNEG_DEFAULT_OUT_SEL = {
    node_idx_t'(17), node_idx_t'(16), node_idx_t'(15), node_idx_t'(14)
  };

  // Default GEG truth tables. A GEG run yields one table per cluster for a
  // given application's address trace; without such a trace this design uses
  // a per-cluster affine permutation  enc(i) = (A_c * i + B_c) mod 2^w  with
  // A_c = 2c + 3 (odd, hence invertible) and B_c = 16c + 1.
  // The result is laid out as a packed [clusters][2^w][w] array: entry i of
  // cluster c sits at bits ((c * 2^w) + i) * w +: w. It is returned in a
  // vector big enough for any split of the 32-bit bus into clusters of up to 8 bits (32 * 2^w bits); the caller casts it to
  // its own width.
  localparam int unsigned GEG_TABLE_MAX_BITS = ADDR_W * 256;

  function automatic logic [GEG_TABLE_MAX_BITS-1:0] geg_default_table(
      int unsigned w, int unsigned clusters);
    logic [GEG_TABLE_MAX_BITS-1:0] t;
    int unsigned rows, mask, v;
    t    = '0;
    rows = 1 << w;
    mask = rows - 1;
    for (int unsigned c = 0; c < clusters; c++) begin
      for (int unsigned i = 0; i < rows; i++) begin
        v = ((2 * c + 3) * i + 16 * c + 1) & mask;
        for (int unsigned b = 0; b < w; b++)
          t[((c * rows) + i) * w + b] = v[b];
      end
    end
    return t;
  endfunction

endpackage
