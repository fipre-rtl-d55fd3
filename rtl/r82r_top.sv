// r82r_top: the FPGA part of the R82R self-reconfigurable system.
//
// A fixed region holds the R8R processor's reconfiguration unit, the
// local memory, the system bus with its arbiter, the serial interface to
// the host and the configuration controller (CC).  A reconfigurable
// region holds N_AREAS areas (two in R82R, one in R81R), each able to
// hold one coprocessor (multiplier, divider or square root) at a time.
//
//   host --RS232--> serial_interface --+
//                                      +-- system_bus --+-- local_memory (port B)
//   R8 core bus port ------------------+                +-- config_controller regs
//   R8 core memory port -----------------------------------> local_memory (port A)
//   R8 core instr issue --> r8r_reconf_unit --reconf/remove/ack--> config_controller
//                               |   IOce/IOrw/IOreset/IOaddress/IOdata_out
//                               v                                 |
//                       reconfigurable_region <--area_clear/load--+
//   config_controller <--> configuration memory (off chip, ports)
//   config_controller  --> ICAP (FPGA primitive, ports)
//
// The base R8 core, the off-chip configuration memory and the ICAP
// primitive are not part of this RTL; their connections are ports of
// this module.  The bus macros between the regions are plain wires.
// The block structure and the signal names of the processor/area/CC
// connections follow the system diagram; everything inside the blocks
// that the description does not give is documented in each block.
// Master 0 of the system bus is the processor, master 1 the serial
// interface.
module r82r_top
  import fipre_pkg::*;
#(
  parameter int unsigned N_AREAS      = 2,
  parameter int unsigned MEM_ADDR_W   = 12,
  parameter int unsigned CM_ADDR_W    = 20,
  parameter int unsigned CLKS_PER_BIT = 208
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // R8 core: reconfiguration instruction issue
  input  logic                   instr_valid,
  input  reconf_op_e             instr_op,
  input  copro_id_t              instr_addr,
  input  word_t                  instr_rs1,
  input  word_t                  instr_rs2,
  output logic                   instr_busy,
  output logic                   instr_done,
  output word_t                  rt_data,
  // R8 core: local memory port
  input  logic                   mem_en,
  input  logic                   mem_we,
  input  logic [MEM_ADDR_W-1:0]  mem_addr,
  input  word_t                  mem_wdata,
  output word_t                  mem_rdata,
  // R8 core: system bus master port
  input  bus_req_t               cpu_bus_req,
  output bus_rsp_t               cpu_bus_rsp,
  // RS232 to the host computer
  input  logic                   uart_rxd,
  output logic                   uart_txd,
  // configuration memory (off chip)
  output logic [CM_ADDR_W-1:0]   cm_addr,
  output logic                   cm_rd,
  output logic                   cm_wr,
  output logic [7:0]             cm_wdata,
  input  logic [7:0]             cm_rdata,
  input  logic                   cm_ready,
  // ICAP
  output logic                   icap_ce,
  output logic [7:0]             icap_data,
  input  logic                   icap_busy,
  // occupants of the reconfigurable areas (observation)
  output copro_id_t [N_AREAS-1:0] area_occupant
);

  // R8R <-> CC and IO signal set
  logic      reconf, remove, cc_ack;
  logic      io_ce, io_rw, io_reset, io_ack;
  copro_id_t io_address;
  word_t     io_data_out, io_data_in;

  r8r_reconf_unit u_r8r (
    .clk, .rst_n,
    .instr_valid, .instr_op, .instr_addr, .instr_rs1, .instr_rs2,
    .instr_busy, .instr_done, .rt_data,
    .reconf, .remove, .cc_ack,
    .io_ce, .io_rw, .io_reset, .io_address, .io_data_out, .io_ack, .io_data_in
  );

  // system bus
  bus_req_t [1:0] m_req;
  bus_rsp_t [1:0] m_rsp;
  bus_req_t       mem_req, cc_req, ser_req;
  bus_rsp_t       mem_rsp, cc_rsp;

  assign m_req[0]    = cpu_bus_req;
  assign m_req[1]    = ser_req;
  assign cpu_bus_rsp = m_rsp[0];

  system_bus #(.N_MASTERS(2)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .mem_req, .mem_rsp, .cc_req, .cc_rsp
  );

  local_memory #(.ADDR_W(MEM_ADDR_W)) u_mem (
    .clk, .rst_n,
    .a_en(mem_en), .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
    .bus_req(mem_req), .bus_rsp(mem_rsp)
  );

  serial_interface #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_serial (
    .clk, .rst_n, .rxd(uart_rxd), .txd(uart_txd), .bus_req(ser_req), .bus_rsp(m_rsp[1])
  );

  // configuration controller
  logic [N_AREAS-1:0] area_clear, area_load;
  copro_id_t          area_id;

  config_controller #(.N_AREAS(N_AREAS), .CM_ADDR_W(CM_ADDR_W)) u_cc (
    .clk, .rst_n,
    .reconf, .remove, .io_address, .ack(cc_ack),
    .bus_req(cc_req), .bus_rsp(cc_rsp),
    .cm_addr, .cm_rd, .cm_wr, .cm_wdata, .cm_rdata, .cm_ready,
    .icap_ce, .icap_data, .icap_busy,
    .area_clear, .area_load, .area_id
  );

  // reconfigurable region (reached through the bus macros)
  reconfigurable_region #(.N_AREAS(N_AREAS)) u_region (
    .clk, .rst_n,
    .cfg_clear(area_clear), .cfg_load(area_load), .cfg_id(area_id),
    .loaded_id(area_occupant),
    .io_ce, .io_rw, .io_reset, .io_address, .io_data_out, .io_ack, .io_data_in
  );

endmodule
