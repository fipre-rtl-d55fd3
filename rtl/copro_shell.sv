// copro_shell: IO-bus side of a reconfigurable coprocessor.
//
// Every coprocessor talks to the R8R over the same signal set (IOce,
// IOrw, IOdata_out, IOack, IOdata_in).  This shell turns that signal set
// into a simple command/data interface for the arithmetic unit behind
// it, so each coprocessor only has to supply its registers.
//
// Protocol (this design's choice; the description only fixes that WRR
// sends a command and a data word and RDR sends a command and then reads):
//   * A transfer is requested by holding io_ce high, with io_rw = 1 for a
//     write (io_data_out valid) or 0 for a read.  The shell answers with a
//     one-cycle io_ack; a read returns its word on io_data_in in that cycle.
//   * The first write after an idle phase is a command word.  A second
//     write supplies the data for that command (wr_en pulse, WRR); a read
//     instead returns the register selected by the command (RDR).
//   * A read is acknowledged only when the unit reports rd_ready, so RDR
//     of a result stalls the processor until the computation has finished.
//   * io_data_in is zero outside the ack cycle so several areas can share
//     the return lines by OR-ing them.
//   * soft_rst (INTR, or a fresh configuration) returns the shell to the
//     idle phase.
module copro_shell
  import fipre_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst,
  input  logic        sel,          // this coprocessor is addressed and configured
  input  logic        io_ce,
  input  logic        io_rw,        // 1: write, 0: read
  input  word_t       io_data_out,
  output logic        io_ack,
  output word_t       io_data_in,
  // unit side
  output logic        wr_en,
  output word_t       wr_cmd,
  output word_t       wr_data,
  output word_t       rd_cmd,
  input  word_t       rd_data,
  input  logic        rd_ready
);

  logic  have_cmd_q;
  word_t cmd_q;
  logic  ack_q;
  word_t rdata_q;

  logic req;
  assign req = sel && io_ce && !ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_cmd_q <= 1'b0;
      cmd_q      <= '0;
      ack_q      <= 1'b0;
      rdata_q    <= '0;
    end else if (soft_rst) begin
      have_cmd_q <= 1'b0;
      cmd_q      <= '0;
      ack_q      <= 1'b0;
      rdata_q    <= '0;
    end else begin
      ack_q <= 1'b0;
      if (req && io_rw) begin
        ack_q <= 1'b1;
        if (have_cmd_q) begin
          have_cmd_q <= 1'b0;          // data word consumed
        end else begin
          cmd_q      <= io_data_out;   // command word
          have_cmd_q <= 1'b1;
        end
      end else if (req && !io_rw && rd_ready) begin
        ack_q      <= 1'b1;
        rdata_q    <= rd_data;
        have_cmd_q <= 1'b0;
      end
    end
  end

  assign wr_en      = req && io_rw && have_cmd_q && !soft_rst;
  assign wr_cmd     = cmd_q;
  assign wr_data    = io_data_out;
  assign rd_cmd     = cmd_q;
  assign io_ack     = ack_q;
  assign io_data_in = ack_q ? rdata_q : '0;

endmodule
