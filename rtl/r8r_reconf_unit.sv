// r8r_reconf_unit: execution of the reconfiguration instructions of R8R.
//
// R8R is the R8 processor extended with five instructions and with an
// interface to the configuration controller (CC) and to the
// reconfigurable areas.  This unit is that extension: the decoded
// instruction and its register operands come in from the core on the
// instr_* port, the unit performs the handshakes, and instr_done tells
// the core it may retire the instruction (with the read word on rt_data
// for RDR).  The core stalls while an instruction is in progress.
//
//   SELR a   remembers a as the selected coprocessor and raises reconf
//            with IOaddress = a until the CC acknowledges.  The CC accepts
//            the request before it loads a missing coprocessor, so the
//            core runs on during the reconfiguration; the first WRR/RDR to
//            the coprocessor waits (no IOack) until it is present.
//   DISR a   raises remove with IOaddress = a until the CC acknowledges.
//   INTR a   pulses IOreset for one cycle with IOaddress = a.
//   WRR      writes RS1 (command) then RS2 (data) to the selected
//            coprocessor: two transfers, IOce/IOrw = 1 held until IOack.
//   RDR      writes RS (command) then reads (IOce = 1, IOrw = 0) until
//            IOack; the word on IOdata_in is returned on rt_data.
//
// Signal names follow the system diagram; the instruction semantics
// follow the instruction table.  The two-transfer encoding of WRR/RDR,
// the held-until-acknowledged strobes and the non-blocking SELR are this
// design's choices.  A transfer needs at least two cycles (request, ack).
module r8r_reconf_unit
  import fipre_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // from/to the R8 core
  input  logic       instr_valid,
  input  reconf_op_e instr_op,
  input  copro_id_t  instr_addr,
  input  word_t      instr_rs1,    // RS1 for WRR, RS for RDR
  input  word_t      instr_rs2,    // RS2 for WRR
  output logic       instr_busy,
  output logic       instr_done,
  output word_t      rt_data,
  // to/from the configuration controller
  output logic       reconf,
  output logic       remove,
  input  logic       cc_ack,
  // IO signal set to the reconfigurable areas
  output logic       io_ce,
  output logic       io_rw,
  output logic       io_reset,
  output copro_id_t  io_address,
  output word_t      io_data_out,
  input  logic       io_ack,
  input  word_t      io_data_in
);

  typedef enum logic [2:0] {
    S_IDLE, S_CC, S_XFER1, S_XFER2, S_DONE
  } state_e;

  state_e     state_q;
  reconf_op_e op_q;
  copro_id_t  selected_q;
  word_t      rs2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      op_q        <= OP_SELR;
      selected_q  <= COPRO_NONE;
      rs2_q       <= '0;
      rt_data     <= '0;
      reconf      <= 1'b0;
      remove      <= 1'b0;
      io_ce       <= 1'b0;
      io_rw       <= 1'b0;
      io_reset    <= 1'b0;
      io_address  <= COPRO_NONE;
      io_data_out <= '0;
    end else begin
      io_reset <= 1'b0;
      unique case (state_q)
        S_IDLE: if (instr_valid) begin
          op_q  <= instr_op;
          rs2_q <= instr_rs2;
          unique case (instr_op)
            OP_SELR: begin
              selected_q <= instr_addr;
              io_address <= instr_addr;
              reconf     <= 1'b1;
              state_q    <= S_CC;
            end
            OP_DISR: begin
              io_address <= instr_addr;
              remove     <= 1'b1;
              state_q    <= S_CC;
            end
            OP_INTR: begin
              io_address <= instr_addr;
              io_reset   <= 1'b1;
              state_q    <= S_DONE;
            end
            OP_WRR, OP_RDR: begin
              io_address  <= selected_q;
              io_ce       <= 1'b1;
              io_rw       <= 1'b1;
              io_data_out <= instr_rs1;
              state_q     <= S_XFER1;
            end
            default: state_q <= S_DONE;
          endcase
        end
        S_CC: if (cc_ack) begin
          reconf  <= 1'b0;
          remove  <= 1'b0;
          state_q <= S_DONE;
        end
        S_XFER1: if (io_ack) begin
          // command accepted: data write (WRR) or read (RDR) follows at once
          io_ce       <= 1'b1;
          io_rw       <= (op_q == OP_WRR);
          io_data_out <= (op_q == OP_WRR) ? rs2_q : '0;
          state_q     <= S_XFER2;
        end
        S_XFER2: if (io_ack) begin
          io_ce   <= 1'b0;
          io_rw   <= 1'b0;
          if (op_q == OP_RDR) rt_data <= io_data_in;
          state_q <= S_DONE;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign instr_done = (state_q == S_DONE);
  assign instr_busy = (state_q != S_IDLE);

  // A strobe, once raised, stays up until it is acknowledged.
  a_ce_held: assert property (@(posedge clk) disable iff (!rst_n)
    io_ce && !io_ack |=> io_ce);
  a_cc_held: assert property (@(posedge clk) disable iff (!rst_n)
    (reconf || remove) && !cc_ack |=> (reconf || remove));

endmodule
