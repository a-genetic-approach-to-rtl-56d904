// tb_geg_encoder: self-checking test of the GEG truth-table encoder.
//
// 1. A 3-bit, one-cluster instance loaded with the 8-row example chromosome
//    (encode column 5 1 3 6 0 7 4 2) is checked on all eight inputs.
// 2. The default 32-bit instance (four 8-bit clusters) is checked on random
//    addresses and on every value of every cluster against a reference model
//    of the default table, enc_c(i) = ((2c+3)*i + 16c + 1) mod 256.
// 3. A 32-bit instance with 4-bit clusters (the GEG4 configuration, eight
//    clusters) is checked on random addresses the same way, mod 16.
module tb_geg_encoder;
  import bus_codec_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Example table: row i holds the code of word i.
  localparam logic [0:0][7:0][2:0] EX_TABLE = {3'd2, 3'd4, 3'd7, 3'd0, 3'd6, 3'd3, 3'd1, 3'd5};
  localparam int EX_ENC [8] = '{5, 1, 3, 6, 0, 7, 4, 2};

  logic [2:0]  ex_addr, ex_code;
  logic [31:0] addr, code;

  geg_encoder #(.BUS_W(3), .W(3), .ENC_TABLE(EX_TABLE)) u_ex (.addr_i(ex_addr), .code_o(ex_code));
  geg_encoder u_dut (.addr_i(addr), .code_o(code));

  logic [31:0] code4;
  geg_encoder #(.BUS_W(32), .W(4)) u_geg4 (.addr_i(addr), .code_o(code4));

  function automatic logic [31:0] model4(logic [31:0] a);
    logic [31:0] r;
    for (int c = 0; c < 8; c++) r[c*4 +: 4] = 4'((2*c + 3) * int'(a[c*4 +: 4]) + 16*c + 1);
    return r;
  endfunction

  function automatic logic [31:0] model(logic [31:0] a);
    logic [31:0] r;
    for (int c = 0; c < 4; c++) r[c*8 +: 8] = 8'((2*c + 3) * int'(a[c*8 +: 8]) + 16*c + 1);
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
    for (int i = 0; i < 8; i++) begin
      ex_addr = 3'(i);
      #1;
      check(ex_code == 3'(EX_ENC[i]), $sformatf("example table: enc(%0d)=%0d, expected %0d", i, ex_code, EX_ENC[i]));
    end
    // every value of every cluster, clusters driven with different values
    for (int i = 0; i < 256; i++) begin
      addr = {8'(i), 8'(i + 85), 8'(255 - i), 8'(i * 7)};
      #1;
      check(code == model(addr), $sformatf("sweep %h -> %h, expected %h", addr, code, model(addr)));
    end
    for (int n = 0; n < 500; n++) begin
      addr = $urandom;
      #1;
      check(code == model(addr), $sformatf("random %h -> %h, expected %h", addr, code, model(addr)));
      check(code4 == model4(addr), $sformatf("GEG4 random %h -> %h, expected %h", addr, code4, model4(addr)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
