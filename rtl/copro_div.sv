// copro_div: 32 / 16-bit unsigned divider coprocessor.
//
// One of the three arithmetic coprocessors of the R82R system.  The
// description gives only its function (16/32-bit division in hardware);
// the restoring shift-subtract datapath, one quotient bit per clock for
// 32 clocks, is this design's choice.  The quotient is kept at 32 bits so
// no dividend overflows it.  Division by zero sets a status flag and
// yields quotient 0xFFFFFFFF and remainder = low half of the dividend.
//
// Commands (see copro_shell for the transfer protocol):
//   WRR cmd=0, data            dividend [31:16]
//   WRR cmd=1, data            dividend [15:0]
//   WRR cmd=2, data            divisor, start
//   RDR cmd=0 / 1 / 2          quotient [15:0] / [31:16] / remainder (wait until done)
//   RDR cmd=3                  status: bit 0 busy, bit 1 divide by zero
// Timing: results are ready 32 cycles after the start write.
module copro_div
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

  logic [31:0] quo_q;     // shifts dividend out, quotient in
  logic [16:0] rem_q;     // partial remainder, one guard bit
  word_t       dvs_q;
  logic [5:0]  cnt_q;
  logic        busy_q, dz_q;
  logic [16:0] trial;

  assign trial = {rem_q[15:0], quo_q[31]} - {1'b0, dvs_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quo_q <= '0; rem_q <= '0; dvs_q <= '0; cnt_q <= '0; busy_q <= 1'b0; dz_q <= 1'b0;
    end else if (soft_rst) begin
      quo_q <= '0; rem_q <= '0; dvs_q <= '0; cnt_q <= '0; busy_q <= 1'b0; dz_q <= 1'b0;
    end else if (wr_en && wr_cmd[1:0] == 2'd0) begin
      quo_q[31:16] <= wr_data;
    end else if (wr_en && wr_cmd[1:0] == 2'd1) begin
      quo_q[15:0] <= wr_data;
    end else if (wr_en && wr_cmd[1:0] == 2'd2) begin
      dvs_q  <= wr_data;
      rem_q  <= '0;
      cnt_q  <= 6'd32;
      busy_q <= 1'b1;
      dz_q   <= (wr_data == '0);
    end else if (busy_q) begin
      // restoring step: shift in next dividend bit, subtract if it fits
      if (!trial[16] || dz_q) begin
        rem_q <= trial;
        quo_q <= {quo_q[30:0], 1'b1};
      end else begin
        rem_q <= {rem_q[15:0], quo_q[31]};
        quo_q <= {quo_q[30:0], 1'b0};
      end
      cnt_q <= cnt_q - 6'd1;
      if (cnt_q == 6'd1) busy_q <= 1'b0;
    end
  end

  always_comb begin
    unique case (rd_cmd[1:0])
      2'd0:    rd_data = quo_q[15:0];
      2'd1:    rd_data = quo_q[31:16];
      2'd2:    rd_data = rem_q[15:0];
      default: rd_data = {14'h0, dz_q, busy_q};
    endcase
  end
  assign rd_ready = !busy_q || rd_cmd[1:0] == 2'd3;

endmodule
