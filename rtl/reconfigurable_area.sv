// reconfigurable_area: one partially reconfigurable area of the FPGA.
//
// An area holds at most one coprocessor at a time and is reached through
// the shared IO signal set (IOce, IOrw, IOreset, IOaddress, IOdata_out
// towards the area; IOack, IOdata_in back), which crosses into the area
// through bus macros (fixed routing, plain wires here).  A coprocessor in
// the area answers only when IOaddress equals its identifier.
//
// Partial reconfiguration itself cannot be written as RTL.  It is
// emulated: the area contains one instance of every coprocessor in the
// bitstream library (multiplier, divider, square root) and a register,
// loaded_id, naming the one that is currently "configured".  The
// configuration controller clears the area when it starts sending a
// bitstream to ICAP (cfg_clear) and names the new occupant when the
// transfer has finished (cfg_load, cfg_id).  A freshly loaded coprocessor
// starts from its reset state, as a newly configured circuit would.
// Only the configured instance is ever selected, so the others stay idle.
//
// IOreset with a matching IOaddress resets the coprocessor (INTR).
// io_ack/io_data_in are zero unless this area answers, so areas can be
// combined by OR-ing them.
module reconfigurable_area
  import fipre_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // configuration side (from the configuration controller)
  input  logic      cfg_clear,
  input  logic      cfg_load,
  input  copro_id_t cfg_id,
  output copro_id_t loaded_id,
  // IO signal set
  input  logic      io_ce,
  input  logic      io_rw,
  input  logic      io_reset,
  input  copro_id_t io_address,
  input  word_t     io_data_out,
  output logic      io_ack,
  output word_t     io_data_in
);

  copro_id_t id_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         id_q <= COPRO_NONE;
    else if (cfg_load)  id_q <= cfg_id;
    else if (cfg_clear) id_q <= COPRO_NONE;
  end
  assign loaded_id = id_q;

  logic hit, soft_rst;
  assign hit      = (id_q != COPRO_NONE) && (io_address == id_q);
  assign soft_rst = (io_reset && hit) || cfg_load || cfg_clear;

  logic  ack_m, ack_d, ack_s;
  word_t din_m, din_d, din_s;

  copro_mult u_mult (
    .clk, .rst_n, .soft_rst, .sel(hit && id_q == COPRO_MULT),
    .io_ce, .io_rw, .io_data_out, .io_ack(ack_m), .io_data_in(din_m)
  );
  copro_div u_div (
    .clk, .rst_n, .soft_rst, .sel(hit && id_q == COPRO_DIV),
    .io_ce, .io_rw, .io_data_out, .io_ack(ack_d), .io_data_in(din_d)
  );
  copro_sqrt u_sqrt (
    .clk, .rst_n, .soft_rst, .sel(hit && id_q == COPRO_SQRT),
    .io_ce, .io_rw, .io_data_out, .io_ack(ack_s), .io_data_in(din_s)
  );

  assign io_ack     = ack_m | ack_d | ack_s;
  assign io_data_in = din_m | din_d | din_s;

endmodule
