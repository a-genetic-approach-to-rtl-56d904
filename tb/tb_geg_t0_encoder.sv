// tb_geg_t0_encoder: self-checking test of the hybrid GEG+T0 encoder.
//
// A fetch-like stream (runs of consecutive word addresses broken by jumps,
// with idle cycles) is driven into the default 32-bit encoder. A reference
// model predicts, for every transfer, the in-seq line and the bus word: the
// unchanged bus word when the address is the previous one plus 4, the
// default GEG table code otherwise. The one-cycle latency is checked by
// sampling bus_valid_o on the cycle after each transfer, and the bus must hold
// its word through idle cycles. Both branches (T0 and GEG) must occur.
module tb_geg_t0_encoder;
  import bus_codec_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [31:0] addr = '0, bus;
  logic        bus_valid, in_seq;

  always #5 clk = ~clk;

  geg_t0_encoder u_dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid), .addr_i(addr),
    .bus_valid_o(bus_valid), .bus_o(bus), .in_seq_o(in_seq)
  );

  function automatic logic [31:0] geg_model(logic [31:0] a);
    logic [31:0] r;
    for (int c = 0; c < 4; c++) r[c*8 +: 8] = 8'((2*c + 3) * int'(a[c*8 +: 8]) + 16*c + 1);
    return r;
  endfunction

  logic [31:0] m_prev, m_bus;
  bit          m_have, m_seq;
  int          n_seq = 0, n_geg = 0;

  task automatic send(logic [31:0] a);
    addr  = a;
    valid = 1'b1;
    @(posedge clk);
    #1;
    valid = 1'b0;
    m_seq = m_have && (a == m_prev + 32'd4);
    if (m_seq) n_seq++;
    else begin
      n_geg++;
      m_bus = geg_model(a);
    end
    m_prev = a;
    m_have = 1'b1;
    check(bus_valid == 1'b1, "bus_valid_o not high one cycle after the transfer");
    check(in_seq == m_seq, $sformatf("addr %h: in_seq=%b expected %b", a, in_seq, m_seq));
    check(bus == m_bus, $sformatf("addr %h: bus=%h expected %h", a, bus, m_bus));
  endtask

  task automatic idle();
    @(posedge clk);
    #1;
    check(bus_valid == 1'b0, "bus_valid_o high without a transfer");
    check(bus == m_bus, "bus word changed during an idle cycle");
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
    rst_n = 1'b1;
    m_have = 1'b0;
    m_bus  = '0;
    check(bus == '0 && !bus_valid && !in_seq, "outputs not cleared by reset");
    pc = 32'h0001_0000;
    for (int n = 0; n < 400; n++) begin
      pc = ($urandom_range(0, 9) < 6) ? pc + 4 : $urandom & ~32'h3;
      send(pc);
      if ($urandom_range(0, 3) == 0) idle();
    end
    check(n_seq > 0 && n_geg > 0, $sformatf("T0 branch %0d times, GEG branch %0d times", n_seq, n_geg));
    $display("T0 transfers: %0d, GEG transfers: %0d", n_seq, n_geg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
