// tb_gneg_decoder: self-checking test of the GNEG bus decoder.
//
// The default 32-bit decoder must undo a reference model of the default
// chromosome (y0 = x0, y1 = x1^x0, y2 = ~x2, y3 = x3^~x2), exhaustively per
// cluster and on random words. An 8-bit instance with a second, XOR-only
// bijective chromosome in its upper cluster checks per-cluster inversion.
module tb_gneg_decoder;
  import bus_codec_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Prefix XOR: y0 = x0, y1 = x0^x1, y2 = x0^x1^x2, y3 = x0^x1^x2^x3.
  localparam gene_t [14:0] PX_GENES = {
    mk_gene(0, 0, G_WIRE), mk_gene(0, 0, G_WIRE), mk_gene(0, 0, G_WIRE),
    mk_gene(0, 0, G_WIRE), mk_gene(0, 0, G_WIRE),            // column 2
    mk_gene(0, 0, G_WIRE), mk_gene(0, 0, G_WIRE), mk_gene(0, 0, G_WIRE),
    mk_gene(5, 6, G_XOR),                                     // node 10 = x0^x1^x2^x3
    mk_gene(5, 2, G_XOR),                                     // node 9  = x0^x1^x2
    mk_gene(0, 0, G_WIRE), mk_gene(0, 0, G_WIRE),
    mk_gene(2, 3, G_XOR),                                     // node 6  = x2^x3
    mk_gene(0, 1, G_XOR),                                     // node 5  = x0^x1
    mk_gene(0, 0, G_WIRE)                                     // node 4  = x0
  };
  localparam node_idx_t [3:0] PX_OUT = {node_idx_t'(10), node_idx_t'(9), node_idx_t'(5), node_idx_t'(4)};

  localparam gene_t     [1:0][14:0] MIX_GENES = {PX_GENES, GNEG_DEFAULT_GENES};
  localparam node_idx_t [1:0][3:0]  MIX_OUT   = {PX_OUT, GNEG_DEFAULT_OUT_SEL};

  logic [31:0] code, addr;
  logic [7:0]  c8, a8;

  gneg_decoder u_dut (.code_i(code), .addr_o(addr));
  gneg_decoder #(.BUS_W(8), .GENES(MIX_GENES), .OUT_SEL(MIX_OUT)) u_mix (.code_i(c8), .addr_o(a8));

  function automatic logic [3:0] f_def(logic [3:0] x);
    return {x[3] ^ ~x[2], ~x[2], x[1] ^ x[0], x[0]};
  endfunction

  function automatic logic [3:0] f_px(logic [3:0] x);
    return {^x, ^x[2:0], ^x[1:0], x[0]};
  endfunction

  function automatic logic [31:0] enc_model(logic [31:0] a);
    logic [31:0] r;
    for (int c = 0; c < 8; c++) r[c*4 +: 4] = f_def(a[c*4 +: 4]);
    return r;
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a;
    logic [7:0]  x8;
    for (int i = 0; i < 16; i++) begin
      a = '0;
      for (int c = 0; c < 8; c++) a[c*4 +: 4] = 4'(i * 3 + c);
      code = enc_model(a);
      x8   = {4'(i), 4'(i ^ 9)};
      c8   = {f_px(x8[7:4]), f_def(x8[3:0])};
      #1;
      check(addr == a, $sformatf("sweep: dec(%h)=%h, expected %h", code, addr, a));
      check(a8 == x8, $sformatf("per-cluster: dec(%h)=%h, expected %h", c8, a8, x8));
    end
    for (int n = 0; n < 500; n++) begin
      a    = $urandom;
      code = enc_model(a);
      #1;
      check(addr == a, $sformatf("random: dec(%h)=%h, expected %h", code, addr, a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
