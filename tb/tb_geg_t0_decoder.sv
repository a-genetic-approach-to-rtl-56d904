// tb_geg_t0_decoder: self-checking test of the hybrid GEG+T0 decoder.
//
// The testbench computes the bus traffic of a fetch-like address stream with
// its own model of the hybrid encoder (frozen bus and in-seq high for an
// address equal to the previous one plus 4, default GEG code otherwise) and
// drives it into the default 32-bit decoder, which must return every address
// in the cycle it is presented. Idle cycles with a garbage bus word must not
// disturb the decoder's stored address.
module tb_geg_t0_decoder;
  import bus_codec_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        clk = 1'b0, rst_n = 1'b0, bvalid = 1'b0, in_seq = 1'b0;
  logic [31:0] bus = '0, addr;

  always #5 clk = ~clk;

  geg_t0_decoder u_dut (
    .clk(clk), .rst_n(rst_n), .bus_valid_i(bvalid), .bus_i(bus),
    .in_seq_i(in_seq), .addr_o(addr)
  );

  function automatic logic [31:0] geg_model(logic [31:0] a);
    logic [31:0] r;
    for (int c = 0; c < 4; c++) r[c*8 +: 8] = 8'((2*c + 3) * int'(a[c*8 +: 8]) + 16*c + 1);
    return r;
  endfunction

  logic [31:0] m_prev, m_bus;
  bit          m_have;
  int          n_seq = 0, n_geg = 0;

  task automatic transfer(logic [31:0] a);
    bit s;
    s = m_have && (a == m_prev + 32'd4);
    if (!s) m_bus = geg_model(a);
    if (s) n_seq++; else n_geg++;
    bus    = m_bus;
    in_seq = s;
    bvalid = 1'b1;
    #1;
    check(addr == a, $sformatf("decoded %h expected %h (in_seq=%b)", addr, a, s));
    @(posedge clk);
    #1;
    bvalid = 1'b0;
    m_prev = a;
    m_have = 1'b1;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pc;
    @(posedge clk);
    #1;
    rst_n  = 1'b1;
    m_have = 1'b0;
    m_bus  = '0;
    pc = 32'h0800_0000;
    for (int n = 0; n < 400; n++) begin
      pc = ($urandom_range(0, 9) < 6) ? pc + 4 : $urandom & ~32'h3;
      transfer(pc);
      if ($urandom_range(0, 3) == 0) begin
        bus    = $urandom;
        in_seq = 1'($urandom);
        @(posedge clk);
        #1;
      end
    end
    check(n_seq > 0 && n_geg > 0, $sformatf("T0 branch %0d times, GEG branch %0d times", n_seq, n_geg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
