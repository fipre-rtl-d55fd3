// tb_r82r_full: the R82R system at its default sizes, with bitstreams of
// the size used in the reported measurements.
//
// r82r_top is instantiated without parameter overrides (two areas,
// 115200-baud serial link at 208 clocks per bit, 20-bit configuration
// memory address).  The configuration memory model holds three 46 KB
// (47,104-byte) partial bitstreams, stored before the run as the host
// does before the system starts; the host then writes the directory over
// RS232 at full bit time.  The configuration memory answers three cycles
// after a request and ICAP is never busy, so a load costs 5 cycles per
// byte: 47,104 * 5 = 235,520 cycles from the acknowledge of SELR to the
// area_load strobe, 9.8 ms at the 24 MHz clock of
// the reported system (which measured about 10 ms).  The test checks
// that figure exactly, then runs on each coprocessor the number of
// operations at which the hardware version was reported to break even
// with software (750 multiplications, 260 divisions, 200 square roots),
// checking every result, and prints the cycles per operation.
module tb_r82r_full;
  import fipre_pkg::*;

  localparam int unsigned BS_LEN = 47104;

  logic clk = 1'b0, rst_n = 1'b1;
  logic instr_valid = 1'b0; reconf_op_e instr_op = OP_SELR; copro_id_t instr_addr = '0;
  word_t instr_rs1 = '0, instr_rs2 = '0; logic instr_busy, instr_done; word_t rt_data;
  logic mem_en = 1'b0, mem_we = 1'b0; logic [11:0] mem_addr = '0; word_t mem_wdata = '0, mem_rdata;
  bus_req_t cpu_bus_req = '0; bus_rsp_t cpu_bus_rsp;
  logic uart_rxd = 1'b1, uart_txd;
  logic [19:0] cm_addr; logic cm_rd, cm_wr, cm_ready; logic [7:0] cm_wdata, cm_rdata;
  logic icap_ce, icap_busy; logic [7:0] icap_data;
  copro_id_t [1:0] area_occupant;

  r82r_top dut (.*);

  config_memory_model #(.ADDR_W(20), .WAIT(2)) u_cm (
    .clk, .addr(cm_addr), .rd(cm_rd), .wr(cm_wr), .wdata(cm_wdata), .rdata(cm_rdata), .ready(cm_ready));
  icap_model #(.BUSY_PCT(0)) u_icap (.clk, .ce(icap_ce), .data(icap_data), .busy(icap_busy));

  always #5 clk = ~clk;
  localparam int CPB = 208;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endfunction

  task automatic h_send(input logic [7:0] b);
    uart_rxd = 1'b0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(posedge clk); end
    uart_rxd = 1'b1; repeat (CPB) @(posedge clk);
  endtask
  task automatic h_recv(output logic [7:0] b);
    while (uart_txd) @(posedge clk);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_txd; end
    repeat (CPB) @(posedge clk);
  endtask
  task automatic h_write(input word_t a, input word_t d);
    logic [7:0] r;
    h_send(8'h57); h_send(a[15:8]); h_send(a[7:0]); h_send(d[15:8]); h_send(d[7:0]);
    h_recv(r);
    check("host write acknowledged", r, 8'h4B);
  endtask

  task automatic exec(input reconf_op_e op, input copro_id_t a, input word_t r1, input word_t r2);
    instr_valid = 1'b1; instr_op = op; instr_addr = a; instr_rs1 = r1; instr_rs2 = r2;
    @(posedge clk); #1; instr_valid = 1'b0;
    while (!instr_done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask
  task automatic wrr(input word_t c, input word_t d); exec(OP_WRR, '0, c, d); endtask
  task automatic rdr(input word_t c, output word_t r); exec(OP_RDR, '0, c, '0); r = rt_data; endtask

  int unsigned base [4] = '{0, 'h00000, 'h10000, 'h20000};
  int unsigned exp_sum = 0;

  // measure one reconfiguration: cycles from the SELR acknowledge to area_load
  task automatic select_and_time(input copro_id_t id, output int cyc);
    instr_valid = 1'b1; instr_op = OP_SELR; instr_addr = id;
    @(posedge clk); #1; instr_valid = 1'b0;
    while (!dut.cc_ack) begin @(posedge clk); #1; end
    cyc = 0;
    while (!(|dut.area_load)) begin @(posedge clk); #1; cyc++; end
  endtask

  initial begin
    int cyc, t0; word_t r, h, s; logic [15:0] a, b; logic [31:0] x;
    // bitstream contents: byte i of bitstream id is (i * 7 + id * 13) mod 256
    for (int id = 1; id <= 3; id++)
      for (int i = 0; i < BS_LEN; i++) u_cm.mem[base[id] + i] = 8'((i * 7 + id * 13) % 256);
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    repeat (10) @(posedge clk); #1;

    for (int id = 1; id <= 3; id++) begin
      h_write(CC_BASE + CC_REG_DIR + 4*id + 0, word_t'(base[id]));
      h_write(CC_BASE + CC_REG_DIR + 4*id + 1, word_t'(base[id] >> 16));
      h_write(CC_BASE + CC_REG_DIR + 4*id + 2, word_t'(BS_LEN));
    end

    // multiplier: reconfiguration time, then 750 operations
    select_and_time(COPRO_MULT, cyc);
    check("46 KB load: cycles", cyc, BS_LEN * 5);
    $display("reconfiguration of a 46 KB bitstream: %0d cycles = %0.2f ms at 24 MHz", cyc, real'(cyc) / 24.0e3);
    check("46 KB load: bytes through ICAP", u_icap.bytes, BS_LEN);
    for (int i = 0; i < BS_LEN; i++) exp_sum = exp_sum * 31 + 32'((i * 7 + 13) % 256);
    check("46 KB load: ICAP checksum", u_icap.sum, exp_sum);
    @(posedge clk); #1;
    t0 = $time;
    for (int i = 0; i < 750; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      wrr(16'd0, a); wrr(16'd1, b); rdr(16'd0, r); rdr(16'd1, h);
      check("product", {h, r}, 32'(a) * 32'(b));
    end
    $display("750 multiplications: %0d cycles, %0d per operation", ($time - t0) / 10, ($time - t0) / 10 / 750);

    // divider into the second area, 260 operations
    select_and_time(COPRO_DIV, cyc);
    check("second area load: cycles", cyc, BS_LEN * 5);
    @(posedge clk); #1;
    t0 = $time;
    for (int i = 0; i < 260; i++) begin
      x = $urandom; b = 16'($urandom | 1);
      wrr(16'd0, x[31:16]); wrr(16'd1, x[15:0]); wrr(16'd2, b);
      rdr(16'd0, r); rdr(16'd1, h); rdr(16'd2, s);
      check("quotient", {h, r}, x / 32'(b));
      check("remainder", s, 16'(x % 32'(b)));
    end
    $display("260 divisions: %0d cycles, %0d per operation", ($time - t0) / 10, ($time - t0) / 10 / 260);

    // square root replaces the dismissed multiplier, 200 operations
    exec(OP_DISR, COPRO_MULT, '0, '0);
    select_and_time(COPRO_SQRT, cyc);
    check("replacement load: cycles", cyc, BS_LEN * 5);
    @(posedge clk); #1;
    check("sqrt replaced the multiplier in area 0", area_occupant[0], COPRO_SQRT);
    t0 = $time;
    for (int i = 0; i < 200; i++) begin
      x = $urandom;
      wrr(16'd0, x[31:16]); wrr(16'd1, x[15:0]); rdr(16'd0, r);
      check("root", 64'(r) * 64'(r) <= 64'(x) && (64'(r) + 1) * (64'(r) + 1) > 64'(x), 1);
    end
    $display("200 square roots: %0d cycles, %0d per operation", ($time - t0) / 10, ($time - t0) / 10 / 200);
    check("three loads through ICAP", u_icap.bytes, 3 * BS_LEN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
