// gneg_gate_matrix: one netlist of the gate-matrix encoder (GNEG).
//
// The circuit is a template of COLS columns with ROWS gates each. Every gate
// takes two inputs from any earlier node (a circuit input or a gate of a
// previous column) and is one of AND, OR, NOT, XOR or WIRE; NOT and WIRE use
// only their first input. Each of the N outputs taps any node. A chromosome of
// triplets (input a, input b, gate type) per gate plus the output taps fixes
// the whole circuit; in synthesis the unused gates and the WIREs disappear.
//
// Node numbering: inputs are nodes 0..N-1, gate (col, row) is node
// N + col*ROWS + row, and GENES[col*ROWS + row] is its gene.
// Elaboration stops with an error if a gate reads a node of its own or a
// later column, or an output taps a node that does not exist.
//
// Interface: x_i (N bits) in, y_o (N bits) out. Purely combinational.
// The gate set, the triplet coding and the 3x5 size follow the published
// method (read as 3 columns of 5 gates); the node numbering, the 8-bit index
// fields and the default chromosome are this design's own.
module gneg_gate_matrix
  import bus_codec_pkg::*;
#(
  parameter int unsigned N    = GNEG_W,
  parameter int unsigned COLS = GNEG_COLS,
  parameter int unsigned ROWS = GNEG_ROWS,
  localparam int unsigned G   = COLS * ROWS,
  parameter gene_t     [G-1:0] GENES   = GNEG_DEFAULT_GENES,
  parameter node_idx_t [N-1:0] OUT_SEL = GNEG_DEFAULT_OUT_SEL
) (
  input  logic [N-1:0] x_i,
  output logic [N-1:0] y_o
);

  localparam int unsigned NODES = N + G;

  // All node values: inputs, then gates.
  logic [NODES-1:0] node;

  assign node[N-1:0] = x_i;

  for (genvar col = 0; col < COLS; col++) begin : g_col
    for (genvar row = 0; row < ROWS; row++) begin : g_row
      localparam int unsigned K     = col * ROWS + row;
      localparam int unsigned LIMIT = N + col * ROWS;   // first node not readable
      localparam gene_t       GENE  = GENES[K];

      if (int'(GENE.a) >= LIMIT || int'(GENE.b) >= LIMIT) begin : g_bad_gene
        $error("gneg_gate_matrix: gate %0d reads a node of its own or a later column", K);
      end

      localparam int unsigned IA = int'(GENE.a);
      localparam int unsigned IB = int'(GENE.b);

      logic a, b;
      assign a = node[IA];
      assign b = node[IB];

      always_comb begin
        unique case (GENE.op)
          G_AND:   node[N+K] = a & b;
          G_OR:    node[N+K] = a | b;
          G_NOT:   node[N+K] = ~a;
          G_XOR:   node[N+K] = a ^ b;
          default: node[N+K] = a;        // G_WIRE
        endcase
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    if (int'(OUT_SEL[o]) >= NODES) begin : g_bad_tap
      $error("gneg_gate_matrix: output %0d taps a node that does not exist", o);
    end
    localparam int unsigned IO = int'(OUT_SEL[o]);
    assign y_o[o] = node[IO];
  end

endmodule
