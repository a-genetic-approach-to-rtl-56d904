// gneg_encoder: gate-netlist bus encoder (GNEG).
//
// The BUS_W-bit address bus is cut into BUS_W/N clusters of N adjacent lines
// (cluster c holds lines c*N .. c*N+N-1) and each cluster goes through its own
// evolved gate matrix (gneg_gate_matrix). Because every chromosome is a
// bijection on N-bit words the bus needs no extra lines.
//
// GENES[c] and OUT_SEL[c] are the chromosome of cluster c. By default every
// cluster gets the placeholder chromosome of bus_codec_pkg; an application's
// evolved chromosomes replace it.
//
// Interface: addr_i in, code_o out. Purely combinational, no clock.
// With the default chromosome, bit 0 of every cluster is a plain wire from
// the input (y0 = x0), which is what a WIRE-rich evolved netlist looks like.
// 4-bit clusters and the 3x5 matrix follow the published GNEG4
// configuration; the default chromosome is this design's own.
module gneg_encoder
  import bus_codec_pkg::*;
#(
  parameter int unsigned BUS_W = ADDR_W,
  parameter int unsigned N     = GNEG_W,
  parameter int unsigned COLS  = GNEG_COLS,
  parameter int unsigned ROWS  = GNEG_ROWS,
  localparam int unsigned C    = BUS_W / N,
  localparam int unsigned G    = COLS * ROWS,
  parameter gene_t     [C-1:0][G-1:0] GENES   = {C{GNEG_DEFAULT_GENES}},
  parameter node_idx_t [C-1:0][N-1:0] OUT_SEL = {C{GNEG_DEFAULT_OUT_SEL}}
) (
  input  logic [BUS_W-1:0] addr_i,
  output logic [BUS_W-1:0] code_o
);

  if (BUS_W % N != 0) begin : g_bad_split
    $error("gneg_encoder: BUS_W must be a multiple of N");
  end

  for (genvar c = 0; c < C; c++) begin : g_cluster
    gneg_gate_matrix #(
      .N      (N),
      .COLS   (COLS),
      .ROWS   (ROWS),
      .GENES  (GENES[c]),
      .OUT_SEL(OUT_SEL[c])
    ) u_matrix (
      .x_i(addr_i[c*N +: N]),
      .y_o(code_o[c*N +: N])
    );
  end

endmodule
