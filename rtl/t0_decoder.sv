// t0_decoder: address predictor of the T0 decoder.
//
// The receiver of a T0 link remembers the last address it delivered. When a
// transfer arrives with in-seq high, the address is that one plus STRIDE
// (t0_addr_o); otherwise the address is taken from the bus (plain T0) or from
// the GEG decoder (GEG+T0). The caller selects and feeds the address it
// finally delivers back on dec_addr_i, which is stored on every valid cycle.
//
// Interface: t0_addr_o is combinational from the stored address. dec_addr_i is
// captured at the rising clk edge when valid_i is high. rst_n is active-low,
// synchronous, and clears the stored address.
// The STRIDE value and the feedback port are this design's choices.
module t0_decoder
  import bus_codec_pkg::*;
#(
  parameter int unsigned   AW     = ADDR_W,
  parameter logic [AW-1:0] STRIDE = AW'(T0_STRIDE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic [AW-1:0] dec_addr_i,
  output logic [AW-1:0] t0_addr_o
);

  logic [AW-1:0] prev_addr_q;

  assign t0_addr_o = prev_addr_q + STRIDE;

  always_ff @(posedge clk) begin
    if (!rst_n)       prev_addr_q <= '0;
    else if (valid_i) prev_addr_q <= dec_addr_i;
  end

endmodule
