// geg_t0_decoder: hybrid GEG+T0 decoder.
//
// The received word goes through the inverse GEG tables and, in parallel, the
// T0 predictor offers the last delivered address plus STRIDE. The in-seq line
// picks one of the two. The chosen address is stored as the reference for the
// next in-sequence transfer.
//
// Interface: bus_valid_i marks a transfer; addr_o is combinational from
// bus_i, in_seq_i and the stored address and is valid in the same cycle.
// rst_n is active-low, synchronous. Takes the same ENC_TABLE and STRIDE as the
// matching geg_t0_encoder.
module geg_t0_decoder
  import bus_codec_pkg::*;
#(
  parameter int unsigned BUS_W = ADDR_W,
  parameter int unsigned W     = GEG_W,
  localparam int unsigned C    = BUS_W / W,
  parameter logic [C-1:0][(1<<W)-1:0][W-1:0] ENC_TABLE =
      (C * (1 << W) * W)'(geg_default_table(W, C)),
  parameter logic [BUS_W-1:0] STRIDE = BUS_W'(T0_STRIDE)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_valid_i,
  input  logic [BUS_W-1:0] bus_i,
  input  logic             in_seq_i,
  output logic [BUS_W-1:0] addr_o
);

  logic [BUS_W-1:0] t0_addr, geg_addr;

  t0_decoder #(.AW(BUS_W), .STRIDE(STRIDE)) u_t0 (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_i   (bus_valid_i),
    .dec_addr_i(addr_o),
    .t0_addr_o (t0_addr)
  );

  geg_decoder #(.BUS_W(BUS_W), .W(W), .ENC_TABLE(ENC_TABLE)) u_geg (
    .code_i(bus_i),
    .addr_o(geg_addr)
  );

  assign addr_o = in_seq_i ? t0_addr : geg_addr;

endmodule
