// config_controller: hardware configuration controller (CC).
//
// The CC owns the configuration memory and the FPGA's configuration port
// (ICAP).  It is a slave of two parties:
//   * the host computer, through the system bus, which fills the
//     configuration memory with partial bitstreams and a directory
//     (start address and length of each coprocessor's bitstream) before
//     the application runs;
//   * the R8R processor, through reconf / remove / ack and IOaddress.
// On reconf (instruction SELR) it looks up whether the requested
// coprocessor already sits in an area.  If so it only marks the area as
// in use.  Otherwise it picks an area (an empty one first, else one whose
// coprocessor was dismissed with DISR), acknowledges the processor at
// once, and streams the bitstream byte by byte from configuration memory
// to ICAP.  When the last byte has been written the area is announced as
// holding the new coprocessor (area_load).  On remove (DISR) the area
// holding that coprocessor is marked as free to be replaced.
//
// What follows the description: the CC is hardware, a slave of the host
// and of the R8R, accesses the configuration memory on selection and
// sends the bitstream to the configuration interface, and the processor
// keeps running during reconfiguration.  This design's choices: the
// register map, the directory, the area-choice rule, the error flags
// (no area free, no bitstream for the identifier: the request is then
// acknowledged without loading) and the byte-wide memory and ICAP ports.
//
// Timing: SELR/DISR are acknowledged one cycle after the request (while
// no load is running).  Every byte then costs one configuration-memory
// read (cm_rd held until cm_ready) plus one ICAP write cycle (held off
// while icap_busy).  If cm_ready comes R cycles after cm_rd rises, a
// bitstream of L bytes takes L*(R+2) + 1 cycles from the acknowledge to
// the area_load strobe (ICAP never busy).
//
// Bus registers (word offsets inside the CC window, see fipre_pkg):
//   0 PTR_LO, 1 PTR_HI   configuration memory write pointer (R/W)
//   2 DATA               write: byte [7:0] to memory at pointer, pointer+1
//   3 STATUS             bit0 loading, bit1 no free area, bit2 unknown
//                        coprocessor; bits [7:4] area 0 and [11:8] area 1
//                        occupants; writing 1 to bit1/bit2 clears them
//   4 LOADS              number of completed reconfigurations
//   8+4*id+{0,1,2,3}     directory: base lo, base hi, length lo, length hi
module config_controller
  import fipre_pkg::*;
#(
  parameter int unsigned N_AREAS   = 2,
  parameter int unsigned CM_ADDR_W = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // R8R side
  input  logic                     reconf,
  input  logic                     remove,
  input  copro_id_t                io_address,
  output logic                     ack,
  // system bus slave (valid only for addresses inside the CC window)
  input  bus_req_t                 bus_req,
  output bus_rsp_t                 bus_rsp,
  // configuration memory (byte wide, request held until cm_ready)
  output logic [CM_ADDR_W-1:0]     cm_addr,
  output logic                     cm_rd,
  output logic                     cm_wr,
  output logic [7:0]               cm_wdata,
  input  logic [7:0]               cm_rdata,
  input  logic                     cm_ready,
  // physical configuration interface (ICAP)
  output logic                     icap_ce,
  output logic [7:0]               icap_data,
  input  logic                     icap_busy,
  // reconfigurable areas
  output logic [N_AREAS-1:0]       area_clear,
  output logic [N_AREAS-1:0]       area_load,
  output copro_id_t                area_id
);

  localparam int unsigned AREA_W = (N_AREAS > 1) ? $clog2(N_AREAS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_RD, S_WR, S_FINISH, S_HWR} state_e;
  state_e state_q;

  // directory
  logic [CM_ADDR_W-1:0] dir_base_q [NUM_COPRO_IDS];
  logic [CM_ADDR_W-1:0] dir_len_q  [NUM_COPRO_IDS];
  // area table
  logic      [N_AREAS-1:0] a_valid_q, a_used_q;
  copro_id_t [N_AREAS-1:0] a_id_q;

  logic [CM_ADDR_W-1:0] wptr_q, rptr_q, cnt_q;
  logic [7:0]           byte_q;
  logic [AREA_W-1:0]    victim_q;
  logic                 clear_q;
  logic                 ack_q, err_noarea_q, err_badid_q;
  logic                 rsp_ready_q;
  word_t                rsp_rdata_q;
  word_t                loads_q;

  // --- lookup of the requested identifier and choice of an area ---------
  logic              hit, have_free, have_dism;
  logic [AREA_W-1:0] hit_idx, free_idx, dism_idx;
  always_comb begin
    hit = 1'b0; have_free = 1'b0; have_dism = 1'b0;
    hit_idx = '0; free_idx = '0; dism_idx = '0;
    for (int a = N_AREAS-1; a >= 0; a--) begin
      if (a_valid_q[a] && a_id_q[a] == io_address) begin hit = 1'b1; hit_idx = AREA_W'(a); end
      if (!a_valid_q[a] && !a_used_q[a])           begin have_free = 1'b1; free_idx = AREA_W'(a); end
      if (a_valid_q[a] && !a_used_q[a])            begin have_dism = 1'b1; dism_idx = AREA_W'(a); end
    end
  end

  logic id_known;
  assign id_known = (io_address != COPRO_NONE) &&
                    (int'(io_address) < NUM_COPRO_IDS) &&
                    (dir_len_q[io_address[$clog2(NUM_COPRO_IDS)-1:0]] != '0);

  logic proc_req, host_req, host_data_wr;
  logic [CC_SPAN_W-1:0] off;
  assign off          = bus_req.addr[CC_SPAN_W-1:0];
  assign proc_req     = (reconf || remove) && !ack_q;
  assign host_req     = bus_req.valid && !rsp_ready_q;
  assign host_data_wr = host_req && bus_req.we && off == CC_SPAN_W'(CC_REG_DATA);

  // --- register read mux -------------------------------------------------
  word_t reg_rdata;
  always_comb begin
    reg_rdata = '0;
    if (off == CC_SPAN_W'(CC_REG_PTR_LO))      reg_rdata = word_t'(wptr_q);
    else if (off == CC_SPAN_W'(CC_REG_PTR_HI)) reg_rdata = word_t'(32'(wptr_q) >> 16);
    else if (off == CC_SPAN_W'(CC_REG_STATUS)) begin
      reg_rdata[0] = (state_q != S_IDLE && state_q != S_HWR);
      reg_rdata[1] = err_noarea_q;
      reg_rdata[2] = err_badid_q;
      for (int a = 0; a < N_AREAS && a < 2; a++)
        reg_rdata[4+4*a +: 4] = a_valid_q[a] ? a_id_q[a] : COPRO_NONE;
    end
    else if (off == CC_SPAN_W'(CC_REG_LOADS))  reg_rdata = loads_q;
    else if (int'(off) >= CC_REG_DIR && int'(off) < CC_REG_DIR + 4*NUM_COPRO_IDS) begin
      unique case (off[1:0])
        2'd0: reg_rdata = word_t'(dir_base_q[(int'(off) - CC_REG_DIR) / 4]);
        2'd1: reg_rdata = word_t'(32'(dir_base_q[(int'(off) - CC_REG_DIR) / 4]) >> 16);
        2'd2: reg_rdata = word_t'(dir_len_q[(int'(off) - CC_REG_DIR) / 4]);
        default: reg_rdata = word_t'(32'(dir_len_q[(int'(off) - CC_REG_DIR) / 4]) >> 16);
      endcase
    end
  end

  // --- main sequence -----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      a_valid_q    <= '0;
      a_used_q     <= '0;
      a_id_q       <= '0;
      wptr_q       <= '0;
      rptr_q       <= '0;
      cnt_q        <= '0;
      byte_q       <= '0;
      victim_q     <= '0;
      ack_q        <= 1'b0;
      clear_q      <= 1'b0;
      err_noarea_q <= 1'b0;
      err_badid_q  <= 1'b0;
      rsp_ready_q  <= 1'b0;
      rsp_rdata_q  <= '0;
      loads_q      <= '0;
      for (int i = 0; i < NUM_COPRO_IDS; i++) begin
        dir_base_q[i] <= '0;
        dir_len_q[i]  <= '0;
      end
    end else begin
      ack_q       <= 1'b0;
      clear_q     <= 1'b0;
      rsp_ready_q <= 1'b0;

      // register accesses other than DATA writes are answered at once
      if (host_req && !host_data_wr) begin
        rsp_ready_q <= 1'b1;
        rsp_rdata_q <= reg_rdata;
        if (bus_req.we) begin
          if (off == CC_SPAN_W'(CC_REG_PTR_LO))
            wptr_q <= CM_ADDR_W'({32'(wptr_q) >> 16, bus_req.wdata});
          else if (off == CC_SPAN_W'(CC_REG_PTR_HI))
            wptr_q <= CM_ADDR_W'({bus_req.wdata, word_t'(wptr_q)});
          else if (off == CC_SPAN_W'(CC_REG_STATUS)) begin
            if (bus_req.wdata[1]) err_noarea_q <= 1'b0;
            if (bus_req.wdata[2]) err_badid_q  <= 1'b0;
          end
          else if (int'(off) >= CC_REG_DIR && int'(off) < CC_REG_DIR + 4*NUM_COPRO_IDS) begin
            unique case (off[1:0])
              2'd0: dir_base_q[(int'(off) - CC_REG_DIR) / 4] <=
                      CM_ADDR_W'({32'(dir_base_q[(int'(off) - CC_REG_DIR) / 4]) >> 16, bus_req.wdata});
              2'd1: dir_base_q[(int'(off) - CC_REG_DIR) / 4] <=
                      CM_ADDR_W'({bus_req.wdata, word_t'(dir_base_q[(int'(off) - CC_REG_DIR) / 4])});
              2'd2: dir_len_q[(int'(off) - CC_REG_DIR) / 4] <=
                      CM_ADDR_W'({32'(dir_len_q[(int'(off) - CC_REG_DIR) / 4]) >> 16, bus_req.wdata});
              default: dir_len_q[(int'(off) - CC_REG_DIR) / 4] <=
                      CM_ADDR_W'({bus_req.wdata, word_t'(dir_len_q[(int'(off) - CC_REG_DIR) / 4])});
            endcase
          end
        end
      end

      unique case (state_q)
        S_IDLE: begin
          if (proc_req && reconf) begin
            ack_q <= 1'b1;
            if (hit) begin
              a_used_q[hit_idx] <= 1'b1;
            end else if (!id_known) begin
              err_badid_q <= 1'b1;
            end else if (have_free || have_dism) begin
              victim_q <= have_free ? free_idx : dism_idx;
              a_valid_q[have_free ? free_idx : dism_idx] <= 1'b0;
              a_used_q [have_free ? free_idx : dism_idx] <= 1'b1;
              a_id_q   [have_free ? free_idx : dism_idx] <= io_address;
              rptr_q <= dir_base_q[io_address[$clog2(NUM_COPRO_IDS)-1:0]];
              cnt_q  <= dir_len_q [io_address[$clog2(NUM_COPRO_IDS)-1:0]];
              clear_q <= 1'b1;
              state_q <= S_RD;
            end else begin
              err_noarea_q <= 1'b1;
            end
          end else if (proc_req && remove) begin
            ack_q <= 1'b1;
            if (hit) a_used_q[hit_idx] <= 1'b0;
          end else if (host_data_wr) begin
            state_q <= S_HWR;
          end
        end
        S_RD: if (cm_ready) begin
          byte_q  <= cm_rdata;
          state_q <= S_WR;
        end
        S_WR: if (!icap_busy) begin
          rptr_q  <= rptr_q + 1'b1;
          cnt_q   <= cnt_q - 1'b1;
          state_q <= (cnt_q == CM_ADDR_W'(1)) ? S_FINISH : S_RD;
        end
        S_FINISH: begin
          a_valid_q[victim_q] <= 1'b1;
          loads_q             <= loads_q + 1'b1;
          state_q             <= S_IDLE;
        end
        S_HWR: if (cm_ready) begin
          wptr_q      <= wptr_q + 1'b1;
          rsp_ready_q <= 1'b1;
          rsp_rdata_q <= '0;
          state_q     <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign ack = ack_q;

  assign bus_rsp.ready = rsp_ready_q;
  assign bus_rsp.rdata = rsp_rdata_q;

  assign cm_rd    = (state_q == S_RD);
  assign cm_wr    = (state_q == S_HWR);
  assign cm_addr  = (state_q == S_HWR) ? wptr_q : rptr_q;
  assign cm_wdata = bus_req.wdata[7:0];

  assign icap_ce   = (state_q == S_WR) && !icap_busy;
  assign icap_data = byte_q;

  assign area_id = a_id_q[victim_q];
  always_comb begin
    area_clear = '0;
    area_load  = '0;
    // the area goes empty while its new bitstream is being written
    if (clear_q)
      area_clear[victim_q] = 1'b1;
    if (state_q == S_FINISH)
      area_load[victim_q] = 1'b1;
  end

endmodule
