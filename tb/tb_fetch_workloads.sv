// tb_fetch_workloads: instruction-fetch workloads on the GEG8+T0 link.
//
// The four fetch-only benchmarks of the method's evaluation (a car dashboard
// controller, a DCT, an FFT and a matrix multiply) differ, as far as this link
// is concerned, mainly in how many fetch addresses follow their predecessor:
// 55.88 %, 60.31 %, 59.92 % and 63.63 %. Their traces are not available, so
// this testbench generates a synthetic stream for each with that fraction of
// sequential fetches (non-sequential fetches jump anywhere in a 256 KiB code
// region, 4000 fetches per benchmark, both this testbench's own choices).
//
// For every stream, the default 32-bit GEG8+T0 encoder drives the default
// decoder through a registered bus. The testbench checks that every address is
// delivered, that the share of transfers sent as T0 (in-seq high) is within 3
// points of the target, and that the link toggles fewer lines than the raw
// stream. It prints the transitions of the raw stream, of plain T0 (worked
// out by a model in the testbench) and of GEG8+T0. The GEG share of the
// saving depends on the application's table; the default table is a
// placeholder.
module tb_fetch_workloads;
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
  logic [31:0] addr = '0, bus, dec_addr;
  logic        bus_valid, in_seq;

  always #5 clk = ~clk;

  geg_t0_encoder u_enc (
    .clk(clk), .rst_n(rst_n), .valid_i(valid), .addr_i(addr),
    .bus_valid_o(bus_valid), .bus_o(bus), .in_seq_o(in_seq)
  );

  geg_t0_decoder u_dec (
    .clk(clk), .rst_n(rst_n), .bus_valid_i(bus_valid), .bus_i(bus),
    .in_seq_i(in_seq), .addr_o(dec_addr)
  );

  localparam int NBENCH = 4;
  localparam int NFETCH = 4000;
  string bench_name [NBENCH] = '{"dashb", "dct", "fft", "mat_mul"};
  int    seq_permil [NBENCH] = '{559, 603, 599, 636};   // in-sequence share, per mille

  logic [31:0] exp_q [$];
  int          n_in_seq;
  int          tr_raw, tr_link, tr_t0;
  logic [31:0] prev_bus;
  logic        prev_in_seq;

  always @(posedge clk) begin
    if (rst_n) begin
      if (bus_valid) begin
        logic [31:0] e;
        e = exp_q.size() > 0 ? exp_q.pop_front() : 32'hdead_beef;
        check(dec_addr == e, $sformatf("delivered %h expected %h", dec_addr, e));
        if (in_seq) n_in_seq++;
      end
      tr_link += $countones(prev_bus ^ bus) + int'(prev_in_seq != in_seq);
      prev_bus    = bus;
      prev_in_seq = in_seq;
    end
  end

  task automatic run_bench(int b);
    logic [31:0] pc, prev_pc, t0_bus;
    logic        t0_inc, s;
    // reset the link and the counters
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    exp_q.delete();
    n_in_seq = 0;
    tr_raw = 0;
    tr_link = 0;
    tr_t0 = 0;
    prev_bus = '0;
    prev_in_seq = 1'b0;
    pc = 32'h0040_0000;
    prev_pc = '0;
    t0_bus = '0;
    t0_inc = 1'b0;
    for (int k = 0; k < NFETCH; k++) begin
      if (k > 0 && $urandom_range(0, 999) < seq_permil[b]) pc = pc + 4;
      else pc = 32'h0040_0000 + ($urandom_range(0, 65535) << 2);
      // plain T0 model: data lines frozen on a sequential fetch, INC line toggles
      s = (k > 0) && (pc == prev_pc + 4);
      tr_t0 += int'(s != t0_inc) + (s ? 0 : $countones(t0_bus ^ pc));
      if (!s) t0_bus = pc;
      t0_inc = s;
      tr_raw += $countones(prev_pc ^ pc);
      prev_pc = pc;
      addr  = pc;
      valid = 1'b1;
      exp_q.push_back(pc);
      @(posedge clk);
      #1;
      valid = 1'b0;
    end
    @(posedge clk);
    #1;
    check(exp_q.size() == 0, $sformatf("%s: %0d addresses not delivered", bench_name[b], exp_q.size()));
    check(n_in_seq * 1000 > (seq_permil[b] - 30) * NFETCH && n_in_seq * 1000 < (seq_permil[b] + 30) * NFETCH,
          $sformatf("%s: %0d of %0d transfers in sequence, target %0d per mille",
                    bench_name[b], n_in_seq, NFETCH, seq_permil[b]));
    check(tr_link < tr_raw, $sformatf("%s: link toggled %0d lines, raw %0d", bench_name[b], tr_link, tr_raw));
    $display("%-8s in-seq %4.1f%%  transitions: raw %0d, T0 %0d (%0d%%), GEG8+T0 %0d (%0d%%)",
             bench_name[b], 100.0 * n_in_seq / NFETCH, tr_raw,
             tr_t0, 100 * (tr_raw - tr_t0) / tr_raw, tr_link, 100 * (tr_raw - tr_link) / tr_raw);
  endtask

  initial begin : watchdog
    repeat (NBENCH * (NFETCH + 10) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NBENCH; b++) run_bench(b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
