// geg_t0_encoder: hybrid GEG+T0 encoder for an instruction-fetch address bus.
//
// Every address is encoded by T0 and by the GEG truth tables at once. If it
// follows the previous address by STRIDE, the T0 code is sent: the bus keeps
// its current word and the in-seq line goes high, so no data line toggles.
// Otherwise the GEG code of the address is sent with in-seq low. The bus
// costs one line more than GEG alone (in-seq).
//
// Timing: an address presented with valid_i is on bus_o/in_seq_o after the
// next rising clk edge, with bus_valid_o high for that one cycle. Between
// transfers the bus and in-seq hold their values, so idle cycles cause no
// transitions. rst_n (active-low, synchronous) clears the bus to 0.
// The T0/GEG selection follows the published scheme; the output register,
// the valid strobes and the reset values are this design's choices.
module geg_t0_encoder
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
  input  logic             valid_i,
  input  logic [BUS_W-1:0] addr_i,
  output logic             bus_valid_o,
  output logic [BUS_W-1:0] bus_o,
  output logic             in_seq_o
);

  logic             in_seq;
  logic [BUS_W-1:0] t0_code, geg_code, next_code;

  t0_encoder #(.AW(BUS_W), .STRIDE(STRIDE)) u_t0 (
    .clk        (clk),
    .rst_n      (rst_n),
    .valid_i    (valid_i),
    .addr_i     (addr_i),
    .last_code_i(bus_o),
    .in_seq_o   (in_seq),
    .code_o     (t0_code)
  );

  geg_encoder #(.BUS_W(BUS_W), .W(W), .ENC_TABLE(ENC_TABLE)) u_geg (
    .addr_i(addr_i),
    .code_o(geg_code)
  );

  assign next_code = in_seq ? t0_code : geg_code;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_o       <= '0;
      in_seq_o    <= 1'b0;
      bus_valid_o <= 1'b0;
    end else begin
      bus_valid_o <= valid_i;
      if (valid_i) begin
        bus_o    <= next_code;
        in_seq_o <= in_seq;
      end
    end
  end

endmodule
