// tb_gneg_encoder: self-checking test of the GNEG bus encoder.
//
// 1. The default 32-bit encoder (eight 4-bit clusters, all with the default
//    chromosome) is checked on random addresses and on a sweep that puts a
//    different value in each cluster.
// 2. An 8-bit instance with a different chromosome per cluster checks that
//    each cluster uses its own netlist and its own lines.
module tb_gneg_encoder;
  import bus_codec_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Chromosome "swap": y = {x0, x1, x2, x3} via WIREs only (bit reversal).
  localparam gene_t [14:0] REV_GENES = {
    {5{mk_gene(0, 0, G_WIRE)}},
    {5{mk_gene(0, 0, G_WIRE)}},
    mk_gene(0, 0, G_WIRE), mk_gene(0, 0, G_WIRE), mk_gene(0, 0, G_WIRE),
    mk_gene(0, 0, G_WIRE), mk_gene(3, 3, G_WIRE)
  };
  localparam node_idx_t [3:0] REV_OUT = {node_idx_t'(0), node_idx_t'(1), node_idx_t'(2), node_idx_t'(4)};

  localparam gene_t     [1:0][14:0] MIX_GENES = {REV_GENES, GNEG_DEFAULT_GENES};
  localparam node_idx_t [1:0][3:0]  MIX_OUT   = {REV_OUT, GNEG_DEFAULT_OUT_SEL};

  logic [31:0] addr, code;
  logic [7:0]  a8, c8;

  gneg_encoder u_dut (.addr_i(addr), .code_o(code));
  gneg_encoder #(.BUS_W(8), .GENES(MIX_GENES), .OUT_SEL(MIX_OUT)) u_mix (.addr_i(a8), .code_o(c8));

  function automatic logic [3:0] f_def(logic [3:0] x);
    return {x[3] ^ ~x[2], ~x[2], x[1] ^ x[0], x[0]};
  endfunction

  function automatic logic [31:0] model(logic [31:0] a);
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
    logic [7:0] e8;
    for (int i = 0; i < 16; i++) begin
      addr = 32'h0;
      for (int c = 0; c < 8; c++) addr[c*4 +: 4] = 4'(i + c * 5);
      a8 = {4'(i), 4'(15 - i)};
      #1;
      check(code == model(addr), $sformatf("sweep %h -> %h, expected %h", addr, code, model(addr)));
      e8 = {a8[4], a8[5], a8[6], a8[7], f_def(a8[3:0])};
      check(c8 == e8, $sformatf("per-cluster chromosomes %h -> %h, expected %h", a8, c8, e8));
    end
    for (int n = 0; n < 500; n++) begin
      addr = $urandom;
      #1;
      check(code == model(addr), $sformatf("random %h -> %h, expected %h", addr, code, model(addr)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
