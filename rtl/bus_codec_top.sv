// bus_codec_top: low-power address bus codecs, encoder and decoder side.
//
// Three encoder/decoder pairs for a 32-bit address bus, each reducing the
// number of line transitions without adding data lines:
//   * GEG8 for a multiplexed (fetch + load/store) address bus: four 8-bit
//     clusters, each mapped through an application-specific truth table.
//   * GNEG4 for the same kind of bus: eight 4-bit clusters, each mapped by an
//     evolved 3x5 gate netlist, much smaller than the truth tables.
//   * GEG8+T0 for an instruction-fetch bus: in-sequence addresses freeze the
//     bus and raise the in-seq line, all others are sent GEG-encoded.
// The bus wires between encoder and decoder are not part of the logic: every
// encoder drives its bus on *_bus_o and every decoder reads it on *_bus_i, so
// a testbench or the chip's top level connects them (possibly through pads or
// long wires).
//
// Timing: the GEG8 and GNEG4 pairs are combinational (no clock). The GEG8+T0
// encoder registers the bus: an address with fetch_valid_i appears on
// fetch_bus_o/fetch_in_seq_o one clock later with fetch_bus_valid_o; its
// decoder is combinational and keeps the last address at the clock edge.
// rst_n is active-low and synchronous.
//
// Parameters: the GEG tables and GNEG chromosomes, one per link, come from
// the offline optimisation for the target application; the defaults are
// placeholders (see bus_codec_pkg).
module bus_codec_top
  import bus_codec_pkg::*;
#(
  parameter logic [ADDR_W/GEG_W-1:0][(1<<GEG_W)-1:0][GEG_W-1:0] GEG_TABLE =
      (ADDR_W * (1 << GEG_W))'(geg_default_table(GEG_W, ADDR_W / GEG_W)),
  parameter logic [ADDR_W/GEG_W-1:0][(1<<GEG_W)-1:0][GEG_W-1:0] FETCH_TABLE =
      (ADDR_W * (1 << GEG_W))'(geg_default_table(GEG_W, ADDR_W / GEG_W)),
  parameter gene_t     [ADDR_W/GNEG_W-1:0][GNEG_GATES-1:0] GNEG_GENES =
      {(ADDR_W/GNEG_W){GNEG_DEFAULT_GENES}},
  parameter node_idx_t [ADDR_W/GNEG_W-1:0][GNEG_W-1:0]     GNEG_OUT_SEL =
      {(ADDR_W/GNEG_W){GNEG_DEFAULT_OUT_SEL}}
) (
  input  logic              clk,
  input  logic              rst_n,

  // GEG8 link (multiplexed address bus)
  input  logic [ADDR_W-1:0] geg_addr_i,
  output logic [ADDR_W-1:0] geg_bus_o,
  input  logic [ADDR_W-1:0] geg_bus_i,
  output logic [ADDR_W-1:0] geg_addr_o,

  // GNEG4 link (multiplexed address bus)
  input  logic [ADDR_W-1:0] gneg_addr_i,
  output logic [ADDR_W-1:0] gneg_bus_o,
  input  logic [ADDR_W-1:0] gneg_bus_i,
  output logic [ADDR_W-1:0] gneg_addr_o,

  // GEG8+T0 link (instruction-fetch address bus)
  input  logic              fetch_valid_i,
  input  logic [ADDR_W-1:0] fetch_addr_i,
  output logic              fetch_bus_valid_o,
  output logic [ADDR_W-1:0] fetch_bus_o,
  output logic              fetch_in_seq_o,
  input  logic              fetch_bus_valid_i,
  input  logic [ADDR_W-1:0] fetch_bus_i,
  input  logic              fetch_in_seq_i,
  output logic [ADDR_W-1:0] fetch_addr_o
);

  // ---- GEG8 ----
  geg_encoder #(.BUS_W(ADDR_W), .W(GEG_W), .ENC_TABLE(GEG_TABLE)) u_geg_enc (
    .addr_i(geg_addr_i),
    .code_o(geg_bus_o)
  );

  geg_decoder #(.BUS_W(ADDR_W), .W(GEG_W), .ENC_TABLE(GEG_TABLE)) u_geg_dec (
    .code_i(geg_bus_i),
    .addr_o(geg_addr_o)
  );

  // ---- GNEG4 ----
  gneg_encoder #(
    .BUS_W(ADDR_W), .N(GNEG_W), .COLS(GNEG_COLS), .ROWS(GNEG_ROWS),
    .GENES(GNEG_GENES), .OUT_SEL(GNEG_OUT_SEL)
  ) u_gneg_enc (
    .addr_i(gneg_addr_i),
    .code_o(gneg_bus_o)
  );

  gneg_decoder #(
    .BUS_W(ADDR_W), .N(GNEG_W), .COLS(GNEG_COLS), .ROWS(GNEG_ROWS),
    .GENES(GNEG_GENES), .OUT_SEL(GNEG_OUT_SEL)
  ) u_gneg_dec (
    .code_i(gneg_bus_i),
    .addr_o(gneg_addr_o)
  );

  // ---- GEG8+T0 ----
  geg_t0_encoder #(.BUS_W(ADDR_W), .W(GEG_W), .ENC_TABLE(FETCH_TABLE)) u_fetch_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .valid_i    (fetch_valid_i),
    .addr_i     (fetch_addr_i),
    .bus_valid_o(fetch_bus_valid_o),
    .bus_o      (fetch_bus_o),
    .in_seq_o   (fetch_in_seq_o)
  );

  geg_t0_decoder #(.BUS_W(ADDR_W), .W(GEG_W), .ENC_TABLE(FETCH_TABLE)) u_fetch_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .bus_valid_i(fetch_bus_valid_i),
    .bus_i      (fetch_bus_i),
    .in_seq_i   (fetch_in_seq_i),
    .addr_o     (fetch_addr_o)
  );

endmodule
