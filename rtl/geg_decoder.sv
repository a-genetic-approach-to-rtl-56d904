// geg_decoder: inverse of the truth-table bus encoder (GEG).
//
// The received word is cut into the same clusters as in geg_encoder and each
// cluster is looked up in the inverse of that cluster's encoding table. The
// inverse ("Decode" column of the chromosome) is computed at elaboration by
// swapping the input and output columns of ENC_TABLE, so the encoder and the
// decoder of one link are configured with the same parameter. Elaboration
// stops with an error if a cluster's table is not a permutation.
//
// Interface: code_i in, addr_o out. Purely combinational, no clock.
module geg_decoder
  import bus_codec_pkg::*;
#(
  parameter int unsigned BUS_W = ADDR_W,
  parameter int unsigned W     = GEG_W,
  localparam int unsigned C    = BUS_W / W,
  parameter logic [C-1:0][(1<<W)-1:0][W-1:0] ENC_TABLE =
      (C * (1 << W) * W)'(geg_default_table(W, C))
) (
  input  logic [BUS_W-1:0] code_i,
  output logic [BUS_W-1:0] addr_o
);

  localparam int unsigned ROWS = 1 << W;
  typedef logic [C-1:0][ROWS-1:0][W-1:0] table_t;

  // Swap the columns: DEC[c][ENC[c][i]] = i.
  function automatic table_t invert(table_t enc);
    table_t dec = '0;
    for (int unsigned c = 0; c < C; c++)
      for (int unsigned i = 0; i < ROWS; i++)
        dec[c][enc[c][i]] = W'(i);
    return dec;
  endfunction

  // A table is a permutation when every code is produced exactly once.
  function automatic bit is_permutation(table_t enc);
    logic [ROWS-1:0] seen;
    for (int unsigned c = 0; c < C; c++) begin
      seen = '0;
      for (int unsigned i = 0; i < ROWS; i++) begin
        if (seen[enc[c][i]]) return 1'b0;
        seen[enc[c][i]] = 1'b1;
      end
    end
    return 1'b1;
  endfunction

  localparam table_t DEC_TABLE = invert(ENC_TABLE);

  if (!is_permutation(ENC_TABLE)) begin : g_not_bijective
    $error("geg_decoder: ENC_TABLE is not a bijection, the bus cannot be decoded");
  end

  for (genvar c = 0; c < C; c++) begin : g_cluster
    always_comb addr_o[c*W +: W] = DEC_TABLE[c][code_i[c*W +: W]];
  end

endmodule
