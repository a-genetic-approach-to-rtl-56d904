// tb_t0_encoder: self-checking test of the T0 in-sequence detector.
//
// The block is wired as a plain T0 encoder: the testbench registers code_o as
// the bus and feeds it back on last_code_i. A stream of sequential runs,
// jumps, idle cycles, a repeated address and a reset is driven; in-seq and
// the bus word are compared with a reference model every transfer, and the
// number of in-sequence transfers (frozen bus) is checked to be non-zero.
module tb_t0_encoder;
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
  logic [31:0] addr = '0, bus_q, code;
  logic        in_seq;

  always #5 clk = ~clk;

  t0_encoder u_dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid), .addr_i(addr),
    .last_code_i(bus_q), .in_seq_o(in_seq), .code_o(code)
  );

  always_ff @(posedge clk)
    if (!rst_n) bus_q <= '0;
    else if (valid) bus_q <= code;

  // reference state
  logic [31:0] m_prev, m_bus;
  bit          m_have;
  int          n_seq = 0;

  task automatic send(logic [31:0] a);
    logic        e_seq;
    logic [31:0] e_code;
    addr  = a;
    valid = 1'b1;
    #1;
    e_seq  = m_have && (a == m_prev + 32'd4);
    e_code = e_seq ? m_bus : a;
    check(in_seq == e_seq, $sformatf("addr %h: in_seq=%b expected %b", a, in_seq, e_seq));
    check(code == e_code, $sformatf("addr %h: code=%h expected %h", a, code, e_code));
    if (e_seq) n_seq++;
    @(posedge clk);
    #1;
    m_prev = a;
    m_have = 1'b1;
    m_bus  = e_code;
    valid  = 1'b0;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    rst_n  = 1'b1;
    m_have = 1'b0;
    m_bus  = '0;
    m_prev = '0;
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
    do_reset();
    send(32'h4);                 // 0 + 4 but first transfer: not in sequence
    for (int i = 0; i < 8; i++) send(32'h1000 + 4 * i);
    send(32'h1000 + 28);         // repeat: not in sequence
    send(32'h1000 + 32);         // in sequence again after the repeat
    repeat (3) @(posedge clk);   // idle cycles must not disturb the state
    #1;
    send(32'h1000 + 36);
    send(32'hffff_fffc);
    send(32'h0);                 // wrap-around counts as in sequence
    pc = 32'h0040_0000;
    for (int n = 0; n < 300; n++) begin
      pc = ($urandom_range(0, 9) < 6) ? pc + 4 : $urandom & ~32'h3;
      send(pc);
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk);
        #1;
      end
    end
    do_reset();
    send(32'h0040_0004);         // after reset never in sequence
    check(n_seq > 100, $sformatf("only %0d in-sequence transfers seen", n_seq));
    $display("in-sequence transfers: %0d", n_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
