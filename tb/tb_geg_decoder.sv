// tb_geg_decoder: self-checking test of the GEG decoder.
//
// 1. A 3-bit instance configured with the example encode column must produce
//    the example decode column 4 1 7 2 6 0 3 5, i.e. the inverse computed at
//    elaboration matches the printed one.
// 2. The default 32-bit decoder must undo a reference model of the default
//    encoder tables, for every value of every cluster and random words.
// 3. A 32-bit decoder with 4-bit clusters (GEG4) must undo the matching
//    model, mod 16, on random words.
module tb_geg_decoder;
  import bus_codec_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [0:0][7:0][2:0] EX_TABLE = {3'd2, 3'd4, 3'd7, 3'd0, 3'd6, 3'd3, 3'd1, 3'd5};
  localparam int EX_DEC [8] = '{4, 1, 7, 2, 6, 0, 3, 5};

  logic [2:0]  ex_code, ex_addr;
  logic [31:0] code, addr;

  geg_decoder #(.BUS_W(3), .W(3), .ENC_TABLE(EX_TABLE)) u_ex (.code_i(ex_code), .addr_o(ex_addr));
  geg_decoder u_dut (.code_i(code), .addr_o(addr));

  logic [31:0] code4, addr4;
  geg_decoder #(.BUS_W(32), .W(4)) u_geg4 (.code_i(code4), .addr_o(addr4));

  function automatic logic [31:0] enc_model4(logic [31:0] a);
    logic [31:0] r;
    for (int c = 0; c < 8; c++) r[c*4 +: 4] = 4'((2*c + 3) * int'(a[c*4 +: 4]) + 16*c + 1);
    return r;
  endfunction

  function automatic logic [31:0] enc_model(logic [31:0] a);
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
    logic [31:0] a;
    for (int i = 0; i < 8; i++) begin
      ex_code = 3'(i);
      #1;
      check(ex_addr == 3'(EX_DEC[i]), $sformatf("example table: dec(%0d)=%0d, expected %0d", i, ex_addr, EX_DEC[i]));
    end
    for (int i = 0; i < 256; i++) begin
      a    = {8'(i * 3), 8'(i), 8'(i ^ 8'h5a), 8'(255 - i)};
      code = enc_model(a);
      #1;
      check(addr == a, $sformatf("sweep: dec(%h)=%h, expected %h", code, addr, a));
    end
    for (int n = 0; n < 500; n++) begin
      a     = $urandom;
      code  = enc_model(a);
      code4 = enc_model4(a);
      #1;
      check(addr == a, $sformatf("random: dec(%h)=%h, expected %h", code, addr, a));
      check(addr4 == a, $sformatf("GEG4 random: dec(%h)=%h, expected %h", code4, addr4, a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
