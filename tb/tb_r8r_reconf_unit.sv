// tb_r8r_reconf_unit: self-checking testbench for r8r_reconf_unit.
//
// Plays the R8 core (issues the five reconfiguration instructions with
// random operands) and models the configuration controller and a
// coprocessor that acknowledge after random delays.  Checks, for each
// instruction, the strobes and values that reach the CC and the IO
// signal set (reconf/remove with IOaddress; IOreset as a one-cycle pulse;
// WRR as command then data write to the selected coprocessor; RDR as
// command write then read, with the read word returned on rt_data), and
// the number of cycles an instruction takes when every answer is
// immediate.
module tb_r8r_reconf_unit;
  import fipre_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic instr_valid = 1'b0; reconf_op_e instr_op = OP_SELR; copro_id_t instr_addr = '0;
  word_t instr_rs1 = '0, instr_rs2 = '0;
  logic instr_busy, instr_done; word_t rt_data;
  logic reconf, remove, cc_ack = 1'b0;
  logic io_ce, io_rw, io_reset, io_ack = 1'b0; copro_id_t io_address;
  word_t io_data_out, io_data_in = '0;

  r8r_reconf_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int max_delay = 3;

  // responders, with random delay before each acknowledge
  int cc_wait = 0, io_wait = 0;
  copro_id_t cc_addr_seen; logic cc_was_sel;
  int n_reset = 0; copro_id_t reset_addr;
  logic [15:0] wlog [$];      // words written, in order
  copro_id_t   alog [$];      // IOaddress of each transfer
  int          n_reads = 0;
  word_t       read_word;

  always @(posedge clk) begin
    cc_ack <= 1'b0;
    io_ack <= 1'b0;
    io_data_in <= '0;
    if ((reconf || remove) && !cc_ack) begin
      if (cc_wait == 0) begin
        cc_ack <= 1'b1; cc_addr_seen <= io_address; cc_was_sel <= reconf;
        cc_wait <= $urandom % (max_delay + 1);
      end else cc_wait <= cc_wait - 1;
    end
    if (io_ce && !io_ack) begin
      if (io_wait == 0) begin
        io_ack <= 1'b1;
        alog.push_back(io_address);
        if (io_rw) wlog.push_back(io_data_out);
        else begin io_data_in <= read_word; n_reads++; end
        io_wait <= $urandom % (max_delay + 1);
      end else io_wait <= io_wait - 1;
    end
    if (io_reset) begin n_reset++; reset_addr <= io_address; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic issue(input reconf_op_e op, input copro_id_t a, input word_t r1, input word_t r2,
                       output int cyc);
    instr_valid = 1'b1; instr_op = op; instr_addr = a; instr_rs1 = r1; instr_rs2 = r2;
    @(posedge clk); #1; instr_valid = 1'b0; cyc = 1;
    while (!instr_done) begin @(posedge clk); #1; cyc++; end
    @(posedge clk); #1; cyc++;
  endtask

  initial begin
    int cyc, n0; copro_id_t sel, a; word_t r1, r2; logic timed;
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    sel = '0;
    for (int i = 0; i < 300; i++) begin
      if (i == 250) max_delay = 0;
      a  = copro_id_t'($urandom);
      r1 = word_t'($urandom); r2 = word_t'($urandom);
      read_word = word_t'($urandom);
      wlog.delete(); alog.delete();
      timed = (max_delay == 0) && (cc_wait == 0) && (io_wait == 0);
      case ($urandom % 5)
        0: begin
          issue(OP_SELR, a, r1, r2, cyc); sel = a;
          check("SELR reaches CC as reconf", cc_was_sel, 1);
          check("SELR address", cc_addr_seen, a);
          if (timed) check("SELR cycles", cyc, 4);
        end
        1: begin
          issue(OP_DISR, a, r1, r2, cyc);
          check("DISR reaches CC as remove", cc_was_sel, 0);
          check("DISR address", cc_addr_seen, a);
        end
        2: begin
          n0 = n_reset;
          issue(OP_INTR, a, r1, r2, cyc);
          check("INTR one reset pulse", n_reset - n0, 1);
          check("INTR address", reset_addr, a);
          if (timed) check("INTR cycles", cyc, 2);
        end
        3: begin
          issue(OP_WRR, a, r1, r2, cyc);
          check("WRR two writes", wlog.size(), 2);
          if (wlog.size() == 2) begin
            check("WRR command word", wlog[0], r1);
            check("WRR data word", wlog[1], r2);
          end
          check("WRR to selected coprocessor", alog.size() == 2 && alog[0] == sel && alog[1] == sel, 1);
          if (timed) check("WRR cycles", cyc, 6);
        end
        default: begin
          n0 = n_reads;
          issue(OP_RDR, a, r1, r2, cyc);
          check("RDR one write", wlog.size(), 1);
          if (wlog.size() == 1) check("RDR command word", wlog[0], r1);
          check("RDR one read", n_reads - n0, 1);
          check("RDR result", rt_data, read_word);
          check("RDR to selected coprocessor", alog.size() == 2 && alog[0] == sel && alog[1] == sel, 1);
          if (timed) check("RDR cycles", cyc, 6);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
