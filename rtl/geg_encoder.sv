// geg_encoder: truth-table bus encoder (GEG).
//
// The address bus of BUS_W lines is cut into BUS_W/W clusters of W adjacent
// lines (cluster c holds lines c*W .. c*W+W-1). Each cluster is replaced by
// its entry in that cluster's encoding table, a bijection on W-bit words, so
// no extra bus lines are needed and the receiver can always invert it.
// The tables are the product of an offline search that minimises the
// transitions of one application's address stream; they are passed in as the
// ENC_TABLE parameter and become fixed logic in synthesis.
//
// ENC_TABLE is a packed [clusters][2^W][W] array: ENC_TABLE[c][i] is the
// code sent for value i in cluster c (the "Encode" column of the chromosome).
// Its default is a placeholder permutation (see bus_codec_pkg), not an
// evolved table.
//
// Interface: addr_i in, code_o out. Purely combinational, no clock.
// The cluster sizes (8 by default, 4 also used) follow the published method;
// the placeholder table is this design's own.
module geg_encoder
  import bus_codec_pkg::*;
#(
  parameter int unsigned BUS_W = ADDR_W,
  parameter int unsigned W     = GEG_W,
  localparam int unsigned C    = BUS_W / W,
  parameter logic [C-1:0][(1<<W)-1:0][W-1:0] ENC_TABLE =
      (C * (1 << W) * W)'(geg_default_table(W, C))
) (
  input  logic [BUS_W-1:0] addr_i,
  output logic [BUS_W-1:0] code_o
);

  if (BUS_W % W != 0) begin : g_bad_split
    $error("geg_encoder: BUS_W must be a multiple of W");
  end

  for (genvar c = 0; c < C; c++) begin : g_cluster
    always_comb code_o[c*W +: W] = ENC_TABLE[c][addr_i[c*W +: W]];
  end

endmodule
