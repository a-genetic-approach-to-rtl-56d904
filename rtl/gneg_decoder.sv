// gneg_decoder: inverse of the gate-netlist bus encoder (GNEG).
//
// For every cluster the decoder needs the inverse of the evolved netlist's
// function. It is obtained the way a truth-table decoder is: at elaboration
// each cluster's chromosome is simulated on all 2^N inputs, the resulting
// truth table has its input and output columns swapped, and the inverse table
// is looked up at run time (synthesis turns it into N-input logic).
// Elaboration stops with an error if a chromosome is not a bijection, which
// is the condition O(C) = 0 of the GNEG fitness function.
//
// Interface: code_i in, addr_o out. Purely combinational, no clock.
// Takes the same parameters as gneg_encoder. That the decoder is built from
// the inverted truth table, rather than evolved as a netlist of its own, is
// this design's choice.
module gneg_decoder
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
  input  logic [BUS_W-1:0] code_i,
  output logic [BUS_W-1:0] addr_o
);

  localparam int unsigned WORDS = 1 << N;
  typedef logic [C-1:0][WORDS-1:0][N-1:0] table_t;

  // Output of cluster c's netlist for input x.
  function automatic logic [N-1:0] eval(int unsigned c, logic [N-1:0] x);
    logic [(1<<NODE_IDX_W)-1:0] node;   // indexed by a full node_idx_t
    logic a, b;
    logic [N-1:0] y;
    node = '0;
    node[N-1:0] = x;
    for (int unsigned k = 0; k < G; k++) begin
      a = node[GENES[c][k].a];
      b = node[GENES[c][k].b];
      case (GENES[c][k].op)
        G_AND:   node[N+k] = a & b;
        G_OR:    node[N+k] = a | b;
        G_NOT:   node[N+k] = ~a;
        G_XOR:   node[N+k] = a ^ b;
        default: node[N+k] = a;
      endcase
    end
    for (int unsigned o = 0; o < N; o++) y[o] = node[OUT_SEL[c][o]];
    return y;
  endfunction

  function automatic table_t inverse_table();
    table_t dec = '0;
    for (int unsigned c = 0; c < C; c++)
      for (int unsigned i = 0; i < WORDS; i++)
        dec[c][eval(c, N'(i))] = N'(i);
    return dec;
  endfunction

  // Number of clusters whose netlist maps two inputs onto one output.
  function automatic int unsigned non_bijective_clusters();
    logic [WORDS-1:0] seen;
    logic [N-1:0] y;
    int unsigned bad = 0;
    for (int unsigned c = 0; c < C; c++) begin
      seen = '0;
      for (int unsigned i = 0; i < WORDS; i++) begin
        y = eval(c, N'(i));
        if (seen[y]) begin
          bad++;
          break;
        end
        seen[y] = 1'b1;
      end
    end
    return bad;
  endfunction

  localparam table_t DEC_TABLE = inverse_table();

  if (non_bijective_clusters() != 0) begin : g_not_bijective
    $error("gneg_decoder: a chromosome is not a bijection, the bus cannot be decoded");
  end

  for (genvar c = 0; c < C; c++) begin : g_cluster
    always_comb addr_o[c*N +: N] = DEC_TABLE[c][code_i[c*N +: N]];
  end

endmodule
