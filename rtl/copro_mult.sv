// copro_mult: 16 x 16 -> 32-bit unsigned multiplier coprocessor.
//
// One of the three arithmetic coprocessors of the R82R system.  The
// description gives only its function (16/32-bit multiplication done in
// hardware); the sequential shift-and-add datapath, one partial product
// per clock for 16 clocks, is this design's choice and keeps the unit
// small, in line with the roughly 140 LUTs the reported coprocessors use.
//
// Commands (see copro_shell for the transfer protocol):
//   WRR cmd=0, data=A          load multiplicand
//   WRR cmd=1, data=B          load multiplier and start
//   RDR cmd=0 / 1              product [15:0] / [31:16] (waits until done)
//   RDR cmd=3                  status, bit 0 = busy (answers at once)
// Timing: the product is ready 16 cycles after the start write.
module copro_mult
  import fipre_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  soft_rst,
  input  logic  sel,
  input  logic  io_ce,
  input  logic  io_rw,
  input  word_t io_data_out,
  output logic  io_ack,
  output word_t io_data_in
);

  logic  wr_en, rd_ready;
  word_t wr_cmd, wr_data, rd_cmd, rd_data;

  copro_shell u_shell (
    .clk, .rst_n, .soft_rst, .sel, .io_ce, .io_rw, .io_data_out,
    .io_ack, .io_data_in,
    .wr_en, .wr_cmd, .wr_data, .rd_cmd, .rd_data, .rd_ready
  );

  word_t       a_q, b_q;
  logic [31:0] acc_q;
  logic [31:0] mcand_q;
  logic [4:0]  cnt_q;
  logic        busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; acc_q <= '0; mcand_q <= '0; cnt_q <= '0; busy_q <= 1'b0;
    end else if (soft_rst) begin
      a_q <= '0; b_q <= '0; acc_q <= '0; mcand_q <= '0; cnt_q <= '0; busy_q <= 1'b0;
    end else if (wr_en && wr_cmd[1:0] == 2'd0) begin
      a_q <= wr_data;
    end else if (wr_en && wr_cmd[1:0] == 2'd1) begin
      b_q     <= wr_data;
      mcand_q <= {16'h0, a_q};
      acc_q   <= '0;
      cnt_q   <= 5'd16;
      busy_q  <= 1'b1;
    end else if (busy_q) begin
      if (b_q[0]) acc_q <= acc_q + mcand_q;
      b_q     <= b_q >> 1;
      mcand_q <= mcand_q << 1;
      cnt_q   <= cnt_q - 5'd1;
      if (cnt_q == 5'd1) busy_q <= 1'b0;
    end
  end

  always_comb begin
    unique case (rd_cmd[1:0])
      2'd0:    rd_data = acc_q[15:0];
      2'd1:    rd_data = acc_q[31:16];
      2'd3:    rd_data = {15'h0, busy_q};
      default: rd_data = '0;
    endcase
  end
  assign rd_ready = !busy_q || rd_cmd[1:0] == 2'd3;

endmodule
