// tb_bus_codec_top: end-to-end test of the three address bus codecs at their
// default sizes (32-bit bus, GEG 8-bit clusters, GNEG 4-bit clusters with a
// 3x5 gate matrix, GEG8+T0 with stride 4).
//
// Each encoder's bus outputs are wired straight back into its decoder, as the
// bus lines would be. The testbench then
//   * replays the short reference stream 12 3 12 12 5 7 12 5 7 5 through the
//     GEG link, builds its compressed form (unordered pairs of consecutive
//     references with their counts) and checks both the printed pattern list
//     and that the bus transitions computed from the compressed form equal
//     those measured on the bus;
//   * drives a multiplexed address stream (instruction runs interleaved with
//     load/store addresses) through the GEG and GNEG links and checks that
//     every address comes back unchanged;
//   * drives an instruction-fetch stream with idle cycles and a reset in the
//     middle through the GEG+T0 link, checks every delivered address and the
//     one-cycle latency, and checks that it toggles fewer lines (data lines
//     plus in-seq) than the raw stream.
// It counts how often each mechanism occurred (T0 branch, GEG branch, idle
// cycle, reset, GEG link, GNEG link) and fails if one never did. Transition
// counts of all links are printed for reference; the GEG and GNEG savings
// depend on the application-specific tables, which are placeholders here.
module tb_bus_codec_top;
  import bus_codec_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] geg_addr_i = '0, geg_bus, geg_addr_o;
  logic [31:0] gneg_addr_i = '0, gneg_bus, gneg_addr_o;
  logic        fetch_valid = 1'b0, fetch_bus_valid, fetch_in_seq;
  logic [31:0] fetch_addr_i = '0, fetch_bus, fetch_addr_o;

  always #5 clk = ~clk;

  bus_codec_top u_top (
    .clk              (clk),
    .rst_n            (rst_n),
    .geg_addr_i       (geg_addr_i),
    .geg_bus_o        (geg_bus),
    .geg_bus_i        (geg_bus),
    .geg_addr_o       (geg_addr_o),
    .gneg_addr_i      (gneg_addr_i),
    .gneg_bus_o       (gneg_bus),
    .gneg_bus_i       (gneg_bus),
    .gneg_addr_o      (gneg_addr_o),
    .fetch_valid_i    (fetch_valid),
    .fetch_addr_i     (fetch_addr_i),
    .fetch_bus_valid_o(fetch_bus_valid),
    .fetch_bus_o      (fetch_bus),
    .fetch_in_seq_o   (fetch_in_seq),
    .fetch_bus_valid_i(fetch_bus_valid),
    .fetch_bus_i      (fetch_bus),
    .fetch_in_seq_i   (fetch_in_seq),
    .fetch_addr_o     (fetch_addr_o)
  );

  // mechanism counters
  int n_t0 = 0, n_geg_branch = 0, n_idle = 0, n_reset = 0, n_geg_link = 0, n_gneg_link = 0;
  // transition counters
  longint tr_mux_raw = 0, tr_geg = 0, tr_gneg = 0, tr_fetch_raw = 0, tr_fetch_enc = 0;

  function automatic int hamming(logic [31:0] a, logic [31:0] b);
    return $countones(a ^ b);
  endfunction

  // ---------------------------------------------------------------------
  // Compressed stream example on the GEG link
  // ---------------------------------------------------------------------
  task automatic compressed_stream_example();
    int s [10] = '{12, 3, 12, 12, 5, 7, 12, 5, 7, 5};
    int cnt [int];                     // key = hi*256 + lo, value = n_ij
    logic [31:0] code [int];           // bus word of each reference
    logic [31:0] prev_code;
    longint measured = 0, from_pairs = 0;
    string got = "";
    for (int k = 0; k < 10; k++) begin
      geg_addr_i = 32'(s[k]);
      #1;
      check(geg_addr_o == geg_addr_i, "GEG link round trip (example stream)");
      code[s[k]] = geg_bus;
      if (k > 0) begin
        measured += hamming(prev_code, geg_bus);
        if (s[k] != s[k-1]) begin
          int hi = s[k] > s[k-1] ? s[k] : s[k-1];
          int lo = s[k] > s[k-1] ? s[k-1] : s[k];
          if (cnt.exists(hi * 256 + lo)) cnt[hi * 256 + lo]++;
          else cnt[hi * 256 + lo] = 1;
        end
      end
      prev_code = geg_bus;
    end
    // list the patterns ordered by (lo, hi) as <lo, hi, n>
    for (int lo = 0; lo < 16; lo++)
      for (int hi = lo + 1; hi < 16; hi++)
        if (cnt.exists(hi * 256 + lo)) begin
          got = {got, $sformatf("<%0d,%0d,%0d>", lo, hi, cnt[hi * 256 + lo])};
          from_pairs += cnt[hi * 256 + lo] * hamming(code[hi], code[lo]);
        end
    check(got == "<3,12,2><5,7,3><5,12,2><7,12,1>", {"compressed stream is ", got});
    check(measured == from_pairs,
          $sformatf("bus transitions %0d, from compressed stream %0d", measured, from_pairs));
    n_geg_link++;
  endtask

  // ---------------------------------------------------------------------
  // Multiplexed bus: GEG8 and GNEG4 links
  // ---------------------------------------------------------------------
  task automatic multiplexed_stream(int n);
    logic [31:0] pc = 32'h0000_2000, a, prev_a = '0, prev_geg = '0, prev_gneg = '0;
    geg_addr_i  = prev_a;
    gneg_addr_i = prev_a;
    #1;
    prev_geg  = geg_bus;
    prev_gneg = gneg_bus;
    for (int k = 0; k < n; k++) begin
      case ($urandom_range(0, 9))
        0, 1, 2, 3, 4: begin pc += 4; a = pc; end                          // fetch, in sequence
        5:             begin pc = 32'h0000_2000 + ($urandom_range(0, 1023) << 2); a = pc; end  // branch
        6, 7:          a = 32'h1000_0000 + ($urandom_range(0, 4095) << 2);  // data
        default:       a = 32'h7fff_f000 + ($urandom_range(0, 255) << 2);   // stack
      endcase
      geg_addr_i  = a;
      gneg_addr_i = a;
      #1;
      check(geg_addr_o == a, $sformatf("GEG link: sent %h got %h", a, geg_addr_o));
      check(gneg_addr_o == a, $sformatf("GNEG link: sent %h got %h", a, gneg_addr_o));
      tr_mux_raw += hamming(prev_a, a);
      tr_geg     += hamming(prev_geg, geg_bus);
      tr_gneg    += hamming(prev_gneg, gneg_bus);
      prev_a = a;
      prev_geg = geg_bus;
      prev_gneg = gneg_bus;
      n_geg_link++;
      n_gneg_link++;
    end
  endtask

  // ---------------------------------------------------------------------
  // Instruction-fetch bus: GEG8+T0 link
  // ---------------------------------------------------------------------
  logic [31:0] exp_q [$];              // addresses in flight
  logic [31:0] prev_fetch_raw = '0, prev_fetch_bus = '0;
  logic        prev_in_seq = 1'b0;
  logic [31:0] last_sent = '0;
  bit          have_sent = 1'b0;

  // Receiver side: every cycle, check what the decoder delivers.
  always @(posedge clk) begin
    if (rst_n && fetch_bus_valid) begin
      logic [31:0] e;
      e = exp_q.size() > 0 ? exp_q.pop_front() : 32'hdead_beef;
      check(fetch_addr_o == e, $sformatf("fetch link: expected %h got %h", e, fetch_addr_o));
      if (fetch_in_seq) n_t0++; else n_geg_branch++;
    end
    if (rst_n) begin
      tr_fetch_enc += hamming(prev_fetch_bus, fetch_bus) + int'(prev_in_seq != fetch_in_seq);
      prev_fetch_bus = fetch_bus;
      prev_in_seq    = fetch_in_seq;
    end
  end

  task automatic fetch_send(logic [31:0] a);
    fetch_addr_i = a;
    fetch_valid  = 1'b1;
    exp_q.push_back(a);
    tr_fetch_raw += hamming(prev_fetch_raw, a);
    prev_fetch_raw = a;
    @(posedge clk);
    #1;
    fetch_valid = 1'b0;
    // latency: the word is on the bus, flagged valid, one cycle after
    check(fetch_bus_valid, "fetch bus not valid one cycle after the transfer");
  endtask

  task automatic fetch_stream(int n);
    logic [31:0] pc = 32'h0040_0000;
    for (int k = 0; k < n; k++) begin
      pc = ($urandom_range(0, 9) < 6) ? pc + 4 : 32'h0040_0000 + ($urandom_range(0, 65535) << 2);
      fetch_send(pc);
      if ($urandom_range(0, 4) == 0) begin
        @(posedge clk);
        #1;
        check(!fetch_bus_valid, "fetch bus valid during an idle cycle");
        n_idle++;
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    exp_q.delete();
    prev_fetch_bus = '0;
    prev_in_seq    = 1'b0;
    n_reset++;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset();
    compressed_stream_example();
    multiplexed_stream(5000);
    fetch_stream(3000);
    do_reset();
    fetch_send(32'h0040_0004);         // first after reset: GEG branch
    fetch_send(32'h0040_0008);         // then in sequence
    fetch_stream(2000);
    @(posedge clk);
    #1;
    check(exp_q.size() == 0, $sformatf("%0d fetch addresses never delivered", exp_q.size()));
    check(tr_fetch_enc < tr_fetch_raw,
          $sformatf("GEG+T0 bus toggled %0d lines, raw stream %0d", tr_fetch_enc, tr_fetch_raw));
    check(n_t0 > 0,         "T0 branch never taken");
    check(n_geg_branch > 0, "GEG branch of GEG+T0 never taken");
    check(n_idle > 0,       "no idle cycle on the fetch link");
    check(n_reset > 1,      "no reset in the middle of a stream");
    check(n_geg_link > 0,   "GEG link never used");
    check(n_gneg_link > 0,  "GNEG link never used");
    $display("mechanisms: T0=%0d GEG-branch=%0d idle=%0d reset=%0d GEG-link=%0d GNEG-link=%0d",
             n_t0, n_geg_branch, n_idle, n_reset, n_geg_link, n_gneg_link);
    $display("multiplexed bus transitions: raw=%0d GEG8=%0d GNEG4=%0d", tr_mux_raw, tr_geg, tr_gneg);
    $display("fetch bus transitions: raw=%0d GEG8+T0=%0d (saving %0d%%)",
             tr_fetch_raw, tr_fetch_enc, 100 * (tr_fetch_raw - tr_fetch_enc) / tr_fetch_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
