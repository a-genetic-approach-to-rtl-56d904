// tb_gneg_gate_matrix: self-checking test of the GNEG gate-matrix template.
//
// 1. The default 3x5 chromosome is checked exhaustively against its intended
//    function y0 = x0, y1 = x1^x0, y2 = ~x2, y3 = x3^~x2.
// 2. A 2-column, 4-row chromosome that uses every gate type, reads inputs
//    from two columns back and taps a circuit input directly is checked
//    exhaustively against hand-written expressions.
module tb_gneg_gate_matrix;
  import bus_codec_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Second chromosome: nodes 0..3 inputs, 4..7 column 0, 8..11 column 1.
  localparam gene_t [7:0] GENES2 = {
    mk_gene(5, 5, G_WIRE),   // node 11 = x2 | x3 (unused)
    mk_gene(7, 1, G_OR),     // node 10 = (x0 ^ x3) | x1
    mk_gene(6, 2, G_AND),    // node 9  = ~x1 & x2
    mk_gene(4, 5, G_XOR),    // node 8  = (x0 & x1) ^ (x2 | x3)
    mk_gene(0, 3, G_XOR),    // node 7  = x0 ^ x3
    mk_gene(1, 0, G_NOT),    // node 6  = ~x1
    mk_gene(2, 3, G_OR),     // node 5  = x2 | x3
    mk_gene(0, 1, G_AND)     // node 4  = x0 & x1
  };
  localparam node_idx_t [3:0] OUT2 = {node_idx_t'(3), node_idx_t'(10), node_idx_t'(9), node_idx_t'(8)};

  logic [3:0] x, y_def, y2;

  gneg_gate_matrix u_def (.x_i(x), .y_o(y_def));
  gneg_gate_matrix #(.N(4), .COLS(2), .ROWS(4), .GENES(GENES2), .OUT_SEL(OUT2)) u_two (.x_i(x), .y_o(y2));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] e1, e2;
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      e1 = {x[3] ^ ~x[2], ~x[2], x[1] ^ x[0], x[0]};
      e2 = {x[3], (x[0] ^ x[3]) | x[1], ~x[1] & x[2], (x[0] & x[1]) ^ (x[2] | x[3])};
      check(y_def == e1, $sformatf("default chromosome: x=%b y=%b expected %b", x, y_def, e1));
      check(y2 == e2, $sformatf("second chromosome: x=%b y=%b expected %b", x, y2, e2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
