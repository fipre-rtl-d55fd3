// tb_r81r_top: the one-area variant (R81R) of the system, r82r_top with
// N_AREAS = 1.
//
// With a single area every change of coprocessor is a reconfiguration.
// The R8 core (played here) selects the multiplier, uses it, tries to
// select the divider while the multiplier is still in use (refused with
// the "no free area" flag), dismisses the multiplier, selects the
// divider (which replaces it), uses it, and finally brings the
// multiplier back.  Bitstreams are placed in the configuration memory
// model and the directory is written over the system bus by the core.
// Checks results, area occupant, CC flags, ICAP byte counts and the
// number of reconfigurations.
module tb_r81r_top;
  import fipre_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic instr_valid = 1'b0; reconf_op_e instr_op = OP_SELR; copro_id_t instr_addr = '0;
  word_t instr_rs1 = '0, instr_rs2 = '0; logic instr_busy, instr_done; word_t rt_data;
  logic mem_en = 1'b0, mem_we = 1'b0; logic [11:0] mem_addr = '0; word_t mem_wdata = '0, mem_rdata;
  bus_req_t cpu_bus_req = '0; bus_rsp_t cpu_bus_rsp;
  logic uart_rxd = 1'b1, uart_txd;
  logic [19:0] cm_addr; logic cm_rd, cm_wr, cm_ready; logic [7:0] cm_wdata, cm_rdata;
  logic icap_ce, icap_busy; logic [7:0] icap_data;
  copro_id_t [0:0] area_occupant;

  r82r_top #(.N_AREAS(1)) dut (.*);

  config_memory_model #(.ADDR_W(20), .WAIT(2)) u_cm (
    .clk, .addr(cm_addr), .rd(cm_rd), .wr(cm_wr), .wdata(cm_wdata), .rdata(cm_rdata), .ready(cm_ready));
  icap_model #(.BUSY_PCT(5)) u_icap (.clk, .ce(icap_ce), .data(icap_data), .busy(icap_busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endfunction

  task automatic exec(input reconf_op_e op, input copro_id_t a, input word_t r1, input word_t r2);
    instr_valid = 1'b1; instr_op = op; instr_addr = a; instr_rs1 = r1; instr_rs2 = r2;
    @(posedge clk); #1; instr_valid = 1'b0;
    while (!instr_done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask
  task automatic wrr(input word_t c, input word_t d); exec(OP_WRR, '0, c, d); endtask
  task automatic rdr(input word_t c, output word_t r); exec(OP_RDR, '0, c, '0); r = rt_data; endtask
  task automatic cpu_bus(input logic we, input word_t a, input word_t d, output word_t r);
    cpu_bus_req = '{valid: 1'b1, we: we, addr: a, wdata: d};
    do begin @(posedge clk); #1; end while (!cpu_bus_rsp.ready);
    r = cpu_bus_rsp.rdata;
    @(posedge clk); #1;
    cpu_bus_req = '0;
  endtask

  localparam int unsigned LEN = 300;

  initial begin
    word_t r, h, s;
    for (int id = 1; id <= 2; id++)
      for (int i = 0; i < LEN; i++) u_cm.mem[id * 'h1000 + i] = 8'(i + id);
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    for (int id = 1; id <= 2; id++) begin
      cpu_bus(1'b1, CC_BASE + CC_REG_DIR + 4*id + 0, word_t'(id * 'h1000), r);
      cpu_bus(1'b1, CC_BASE + CC_REG_DIR + 4*id + 2, word_t'(LEN), r);
    end

    exec(OP_SELR, COPRO_MULT, '0, '0);
    wrr(16'd0, 16'd300); wrr(16'd1, 16'd200); rdr(16'd0, r); rdr(16'd1, h);
    check("product in the single area", {h, r}, 32'd60000);
    check("area holds mult", area_occupant[0], COPRO_MULT);
    check("one bitstream through ICAP", u_icap.bytes, LEN);

    exec(OP_SELR, COPRO_DIV, '0, '0);
    cpu_bus(1'b0, CC_BASE + CC_REG_STATUS, '0, s);
    check("no free area while mult is in use", s[1], 1);
    check("mult still in the area", area_occupant[0], COPRO_MULT);
    cpu_bus(1'b1, CC_BASE + CC_REG_STATUS, 16'h0002, r);

    exec(OP_DISR, COPRO_MULT, '0, '0);
    exec(OP_SELR, COPRO_DIV, '0, '0);
    wrr(16'd0, 16'd0); wrr(16'd1, 16'd1000); wrr(16'd2, 16'd7);
    rdr(16'd0, r); rdr(16'd2, h);
    check("quotient after replacement", r, 142);
    check("remainder after replacement", h, 6);
    check("area holds div", area_occupant[0], COPRO_DIV);

    exec(OP_DISR, COPRO_DIV, '0, '0);
    exec(OP_SELR, COPRO_MULT, '0, '0);
    wrr(16'd0, 16'd12); wrr(16'd1, 16'd12); rdr(16'd0, r);
    check("mult back", r, 144);
    cpu_bus(1'b0, CC_BASE + CC_REG_LOADS, '0, r);
    check("three reconfigurations", r, 3);
    check("three bitstreams through ICAP", u_icap.bytes, 3 * LEN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
