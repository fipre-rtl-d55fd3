// copro_sqrt: integer square root of a 32-bit unsigned number.
//
// One of the three arithmetic coprocessors of the R82R system.  The
// description gives only its function (square root in hardware on
// 16/32-bit operands); the digit-by-digit (restoring) algorithm, one root
// bit per clock for 16 clocks, is this design's choice.  It delivers
// root = floor(sqrt(x)) and remainder = x - root*root (17 bits).
//
// Commands (see copro_shell for the transfer protocol):
//   WRR cmd=0, data            radicand [31:16]
//   WRR cmd=1, data            radicand [15:0], start
//   RDR cmd=0                  root (waits until done)
//   RDR cmd=1 / 2              remainder [15:0] / [16]
//   RDR cmd=3                  status, bit 0 = busy
// Timing: results are ready 16 cycles after the start write.
module copro_sqrt
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

  logic [31:0] x_q;       // radicand, consumed two bits per step
  logic [16:0] rem_q;     // partial remainder, at most 2*root
  word_t       root_q;
  logic [4:0]  cnt_q;
  logic        busy_q;
  logic [18:0] rem_sh;
  logic [19:0] trial;

  assign rem_sh = {rem_q, x_q[31:30]};
  assign trial  = {1'b0, rem_sh} - {2'b00, root_q, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; rem_q <= '0; root_q <= '0; cnt_q <= '0; busy_q <= 1'b0;
    end else if (soft_rst) begin
      x_q <= '0; rem_q <= '0; root_q <= '0; cnt_q <= '0; busy_q <= 1'b0;
    end else if (wr_en && wr_cmd[1:0] == 2'd0) begin
      x_q[31:16] <= wr_data;
    end else if (wr_en && wr_cmd[1:0] == 2'd1) begin
      x_q[15:0] <= wr_data;
      rem_q     <= '0;
      root_q    <= '0;
      cnt_q     <= 5'd16;
      busy_q    <= 1'b1;
    end else if (busy_q) begin
      if (!trial[19]) begin
        rem_q  <= trial[16:0];
        root_q <= {root_q[14:0], 1'b1};
      end else begin
        rem_q  <= rem_sh[16:0];
        root_q <= {root_q[14:0], 1'b0};
      end
      x_q   <= x_q << 2;
      cnt_q <= cnt_q - 5'd1;
      if (cnt_q == 5'd1) busy_q <= 1'b0;
    end
  end

  always_comb begin
    unique case (rd_cmd[1:0])
      2'd0:    rd_data = root_q;
      2'd1:    rd_data = rem_q[15:0];
      2'd2:    rd_data = {15'h0, rem_q[16]};
      default: rd_data = {15'h0, busy_q};
    endcase
  end
  assign rd_ready = !busy_q || rd_cmd[1:0] == 2'd3;

endmodule
