// tb_t0_decoder: self-checking test of the T0 address predictor.
//
// The testbench plays a plain T0 receiver: for every transfer it picks the
// predicted address when in-seq is set, the bus word otherwise, and feeds the
// result back. The prediction must always be the last delivered address plus
// 4, including after idle cycles and after a reset (which clears it to 0).
module tb_t0_decoder;
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
  logic [31:0] dec_addr = '0, t0_addr;

  always #5 clk = ~clk;

  t0_decoder u_dut (.clk(clk), .rst_n(rst_n), .valid_i(valid), .dec_addr_i(dec_addr), .t0_addr_o(t0_addr));

  logic [31:0] m_last;

  task automatic receive(bit in_seq, logic [31:0] bus);
    #1;
    check(t0_addr == m_last + 32'd4, $sformatf("prediction %h expected %h", t0_addr, m_last + 32'd4));
    dec_addr = in_seq ? t0_addr : bus;
    valid    = 1'b1;
    @(posedge clk);
    #1;
    m_last = in_seq ? m_last + 32'd4 : bus;
    valid  = 1'b0;
    dec_addr = $urandom;         // must be ignored while valid is low
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    rst_n  = 1'b1;
    m_last = '0;
    receive(1'b0, 32'h2000);
    for (int i = 0; i < 5; i++) receive(1'b1, 32'h0);
    repeat (4) @(posedge clk);
    receive(1'b1, 32'h0);
    for (int n = 0; n < 300; n++) begin
      receive($urandom_range(0, 1) == 1, $urandom);
      if ($urandom_range(0, 3) == 0) @(posedge clk);
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    rst_n  = 1'b1;
    m_last = '0;
    receive(1'b1, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
