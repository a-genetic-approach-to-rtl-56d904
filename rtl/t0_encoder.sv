// t0_encoder: in-sequence detector of the T0 address code.
//
// T0 exploits runs of consecutive addresses (instruction fetch): when the new
// address equals the previous one plus STRIDE, the bus keeps the word it
// already carries and a side line, in-seq, tells the receiver to compute the
// address itself. Otherwise the address is sent as it is and in-seq is low.
//
// The word currently on the bus comes in on last_code_i, so the same block
// serves a plain T0 link (where the caller registers code_o and feeds it back)
// and the GEG+T0 link (where the bus may carry a GEG code instead of the
// address). The first transfer after reset is never in sequence.
//
// Interface: valid_i marks a transfer of addr_i in this cycle; in_seq_o and
// code_o are combinational from addr_i. The previous address is captured at
// the rising clk edge of a valid cycle. rst_n is active-low, synchronous.
// T0 itself and its in-seq line are the published scheme; the stride, the
// reset rule and the port split are this design's choices.
module t0_encoder
  import bus_codec_pkg::*;
#(
  parameter int unsigned     AW     = ADDR_W,
  parameter logic [AW-1:0]   STRIDE = AW'(T0_STRIDE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic [AW-1:0] addr_i,
  input  logic [AW-1:0] last_code_i,
  output logic          in_seq_o,
  output logic [AW-1:0] code_o
);

  logic [AW-1:0] prev_addr_q;
  logic          have_prev_q;

  always_comb begin
    in_seq_o = have_prev_q && (addr_i == prev_addr_q + STRIDE);
    code_o   = in_seq_o ? last_code_i : addr_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_addr_q <= '0;
      have_prev_q <= 1'b0;
    end else if (valid_i) begin
      prev_addr_q <= addr_i;
      have_prev_q <= 1'b1;
    end
  end

endmodule
