// reconfigurable_region: the set of N reconfigurable areas.
//
// All areas share the IO signal set driven by the R8R; their return lines
// (IOack, IOdata_in) are OR-ed, which is safe because only the area
// holding the addressed coprocessor drives them.  The R82R system uses
// two areas (N_AREAS = 2); the R81R variant uses one.  Configuration
// strobes arrive per area from the configuration controller.
module reconfigurable_region
  import fipre_pkg::*;
#(
  parameter int unsigned N_AREAS = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_AREAS-1:0]      cfg_clear,
  input  logic [N_AREAS-1:0]      cfg_load,
  input  copro_id_t               cfg_id,
  output copro_id_t [N_AREAS-1:0] loaded_id,
  input  logic                    io_ce,
  input  logic                    io_rw,
  input  logic                    io_reset,
  input  copro_id_t               io_address,
  input  word_t                   io_data_out,
  output logic                    io_ack,
  output word_t                   io_data_in
);

  logic  [N_AREAS-1:0] ack;
  word_t [N_AREAS-1:0] din;

  for (genvar a = 0; a < N_AREAS; a++) begin : g_area
    reconfigurable_area u_area (
      .clk, .rst_n,
      .cfg_clear(cfg_clear[a]), .cfg_load(cfg_load[a]), .cfg_id,
      .loaded_id(loaded_id[a]),
      .io_ce, .io_rw, .io_reset, .io_address, .io_data_out,
      .io_ack(ack[a]), .io_data_in(din[a])
    );
  end

  always_comb begin
    io_ack     = 1'b0;
    io_data_in = '0;
    for (int a = 0; a < N_AREAS; a++) begin
      io_ack     = io_ack | ack[a];
      io_data_in = io_data_in | din[a];
    end
  end

endmodule
