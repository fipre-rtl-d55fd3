// tb_r82r_top: end-to-end testbench of the R82R system (r82r_top).
//
// The testbench plays the parts that are not in the RTL: the host
// computer on the serial line, the R8 core (it issues reconfiguration
// instructions, uses its local-memory port and its system-bus port), the
// off-chip configuration memory and ICAP (behavioural models).  The
// serial bit time is shortened to 8 clocks and the bitstreams are small;
// everything else is at its default size.
//
// Scenario:
//   1. the host loads a program image into local memory and three
//      bitstreams plus the directory into the configuration memory, all
//      over RS232; the core reads the image back through its memory port
//      and polls the CC over the bus while the host is active
//      (arbitration);
//   2. SELR mult: reconfiguration of area 0; the core keeps working
//      during it, and its first coprocessor access stalls until the load
//      has finished; products are checked;
//   3. SELR div: area 1; quotients checked; INTR aborts a division;
//   4. SELR sqrt with both areas in use: "no free area";
//   5. DISR mult, SELR sqrt: the dismissed area 0 is replaced; roots checked;
//   6. SELR div again: already present, no reconfiguration;
//   7. SELR mult: area 0 (sqrt dismissed first) reloaded with mult.
// The ICAP byte stream is compared with the stored bitstreams after each
// load.  Each mechanism is counted and must have happened at least once.
module tb_r82r_top;
  import fipre_pkg::*;

  localparam int CPB = 8;
  logic clk = 1'b0, rst_n = 1'b1;

  logic instr_valid = 1'b0; reconf_op_e instr_op = OP_SELR; copro_id_t instr_addr = '0;
  word_t instr_rs1 = '0, instr_rs2 = '0; logic instr_busy, instr_done; word_t rt_data;
  logic mem_en = 1'b0, mem_we = 1'b0; logic [11:0] mem_addr = '0; word_t mem_wdata = '0, mem_rdata;
  bus_req_t cpu_bus_req = '0; bus_rsp_t cpu_bus_rsp;
  logic uart_rxd = 1'b1, uart_txd;
  logic [19:0] cm_addr; logic cm_rd, cm_wr, cm_ready; logic [7:0] cm_wdata, cm_rdata;
  logic icap_ce, icap_busy; logic [7:0] icap_data;
  copro_id_t [1:0] area_occupant;

  r82r_top #(.CLKS_PER_BIT(CPB)) dut (.*);

  config_memory_model #(.ADDR_W(20), .WAIT(2)) u_cm (
    .clk, .addr(cm_addr), .rd(cm_rd), .wr(cm_wr), .wdata(cm_wdata), .rdata(cm_rdata), .ready(cm_ready));
  icap_model #(.BUSY_PCT(10)) u_icap (.clk, .ce(icap_ce), .data(icap_data), .busy(icap_busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (3000000) @(posedge clk);
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

  // ---- mechanism counters ------------------------------------------------
  int n_reconfig = 0, n_hit = 0, n_noarea = 0, n_replace = 0, n_io_stall = 0;
  int n_intr = 0, n_arb_conflict = 0, n_host_cmd = 0, n_par_work = 0, n_icap_busy = 0;
  always @(posedge clk) begin
    if (|dut.area_load) n_reconfig++;
    if (dut.u_bus.m_req[0].valid && dut.u_bus.m_req[1].valid && !dut.u_bus.busy) n_arb_conflict++;
    if (dut.io_ce && !dut.io_ack && dut.u_cc.state_q != 0) n_io_stall++;
    if (icap_busy && dut.u_cc.state_q == 2) n_icap_busy++;
  end

  // ---- host on RS232 -------------------------------------------------------
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
    n_host_cmd++;
  endtask
  task automatic h_read(input word_t a, output word_t d);
    logic [7:0] r0, r1;
    h_send(8'h52); h_send(a[15:8]); h_send(a[7:0]);
    h_recv(r0); h_recv(r1); d = {r0, r1};
    n_host_cmd++;
  endtask

  // ---- R8 core -------------------------------------------------------------
  task automatic exec(input reconf_op_e op, input copro_id_t a, input word_t r1, input word_t r2,
                      output int cyc);
    instr_valid = 1'b1; instr_op = op; instr_addr = a; instr_rs1 = r1; instr_rs2 = r2;
    @(posedge clk); #1; instr_valid = 1'b0; cyc = 1;
    while (!instr_done) begin @(posedge clk); #1; cyc++; end
    @(posedge clk); #1;
  endtask
  task automatic rdr(input word_t c, output word_t r);
    int cyc; exec(OP_RDR, '0, c, '0, cyc); r = rt_data;
  endtask
  task automatic wrr(input word_t c, input word_t d);
    int cyc; exec(OP_WRR, '0, c, d, cyc);
  endtask
  task automatic cpu_bus(input logic we, input word_t a, input word_t d, output word_t r);
    cpu_bus_req = '{valid: 1'b1, we: we, addr: a, wdata: d};
    do begin @(posedge clk); #1; end while (!cpu_bus_rsp.ready);
    r = cpu_bus_rsp.rdata;
    @(posedge clk); #1;
    cpu_bus_req = '0;
  endtask
  task automatic cc_status(output word_t s);
    cpu_bus(1'b0, CC_BASE + CC_REG_STATUS, '0, s);
  endtask
  task automatic wait_cc_idle();
    word_t s;
    do cc_status(s); while (s[0]);
  endtask

  // ---- bitstreams ------------------------------------------------------------
  int unsigned len  [4] = '{0, 24, 31, 19};
  int unsigned base [4] = '{0, 'h00000, 'h10000, 'h20000};
  logic [7:0]  bs   [4][32];
  int unsigned exp_sum = 0, exp_bytes = 0;
  task automatic expect_stream(input int id);
    for (int i = 0; i < len[id]; i++) exp_sum = exp_sum * 31 + 32'(bs[id][i]);
    exp_bytes += len[id];
  endtask
  task automatic check_stream(input string what);
    check({what, ": ICAP byte count"}, u_icap.bytes, exp_bytes);
    check({what, ": ICAP checksum"}, u_icap.sum, exp_sum);
  endtask

  word_t image [16];
  logic  host_done = 1'b0;

  initial begin
    word_t r, h, s; int cyc, n0;
    logic [15:0] a, b; logic [31:0] x;
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    repeat (10) @(posedge clk); #1;

    // ---- 1. host fills memories; the core polls the CC meanwhile -------
    fork
      begin
        for (int i = 0; i < 16; i++) begin image[i] = word_t'($urandom); h_write(word_t'(16'h0100 + i), image[i]); end
        for (int id = 1; id <= 3; id++) begin
          h_write(CC_BASE + CC_REG_PTR_LO, word_t'(base[id]));
          h_write(CC_BASE + CC_REG_PTR_HI, word_t'(base[id] >> 16));
          for (int i = 0; i < len[id]; i++) begin
            bs[id][i] = 8'($urandom);
            h_write(CC_BASE + CC_REG_DATA, {8'h0, bs[id][i]});
          end
          h_write(CC_BASE + CC_REG_DIR + 4*id + 0, word_t'(base[id]));
          h_write(CC_BASE + CC_REG_DIR + 4*id + 1, word_t'(base[id] >> 16));
          h_write(CC_BASE + CC_REG_DIR + 4*id + 2, word_t'(len[id]));
        end
        h_read(16'h0105, r);
        check("host reads back memory", r, image[5]);
        host_done = 1'b1;
      end
      begin
        while (!host_done) begin cc_status(s); repeat ($urandom % 5) @(posedge clk); #1; end
      end
    join
    for (int i = 0; i < 16; i++) begin
      mem_en = 1; mem_addr = 12'(16'h0100 + i); @(posedge clk); #1; mem_en = 0;
      check("program image in local memory", mem_rdata, image[i]);
    end
    check("bitstream stored in configuration memory", u_cm.mem[base[2] + 7], bs[2][7]);

    // ---- 2. SELR mult: non-blocking reconfiguration ---------------------
    exec(OP_SELR, COPRO_MULT, '0, '0, cyc);
    check("SELR returns before the load ends", cyc < int'(len[1]), 1);
    // the core keeps using its memory while the CC loads the area
    while (dut.u_cc.state_q != 0) begin
      mem_en = 1; mem_we = 1; mem_addr = 12'h200; mem_wdata = word_t'(n_par_work);
      @(posedge clk); #1; mem_en = 0; mem_we = 0; n_par_work++;
      if (n_par_work == 5) break;
    end
    n0 = n_io_stall;
    a = 16'd40000; b = 16'd50000;
    wrr(16'd0, a); wrr(16'd1, b);            // first accesses may wait for the load
    rdr(16'd0, r); rdr(16'd1, h);
    check("product 40000*50000", {h, r}, 32'd2000000000);
    check("first coprocessor access waited for the load", n_io_stall > n0, 1);
    expect_stream(1); check_stream("mult load");
    check("area 0 holds mult", area_occupant[0], COPRO_MULT);
    for (int i = 0; i < 10; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      wrr(16'd0, a); wrr(16'd1, b); rdr(16'd0, r); rdr(16'd1, h);
      check("product", {h, r}, 32'(a) * 32'(b));
    end

    // ---- 3. SELR div: area 1; INTR aborts --------------------------------
    exec(OP_SELR, COPRO_DIV, '0, '0, cyc);
    for (int i = 0; i < 10; i++) begin
      x = $urandom; b = 16'($urandom | 1);
      wrr(16'd0, x[31:16]); wrr(16'd1, x[15:0]); wrr(16'd2, b);
      rdr(16'd0, r); rdr(16'd1, h); rdr(16'd2, s);
      check("quotient", {h, r}, x / 32'(b));
      check("remainder", s, 16'(x % 32'(b)));
    end
    expect_stream(2); check_stream("div load");
    check("area 1 holds div", area_occupant[1], COPRO_DIV);
    wrr(16'd0, 16'h0); wrr(16'd1, 16'd1000); wrr(16'd2, 16'd3);
    exec(OP_INTR, COPRO_DIV, '0, '0, cyc); n_intr++;
    rdr(16'd3, s); check("INTR aborted the division", s, 0);

    // ---- 4. no free area -------------------------------------------------
    exec(OP_SELR, COPRO_SQRT, '0, '0, cyc);
    cc_status(s);
    if (s[1]) n_noarea++;
    check("no free area reported", s[1], 1);
    cpu_bus(1'b1, CC_BASE + CC_REG_STATUS, 16'h0002, r);

    // ---- 5. DISR mult, SELR sqrt replaces area 0 ---------------------------
    exec(OP_DISR, COPRO_MULT, '0, '0, cyc);
    exec(OP_SELR, COPRO_SQRT, '0, '0, cyc);
    wait_cc_idle();
    if (area_occupant[0] == COPRO_SQRT) n_replace++;
    check("dismissed area 0 replaced by sqrt", area_occupant[0], COPRO_SQRT);
    expect_stream(3); check_stream("sqrt load");
    for (int i = 0; i < 10; i++) begin
      x = $urandom;
      wrr(16'd0, x[31:16]); wrr(16'd1, x[15:0]); rdr(16'd0, r);
      check("root", 64'(r) * 64'(r) <= 64'(x) && (64'(r) + 1) * (64'(r) + 1) > 64'(x), 1);
    end

    // ---- 6. SELR div: present, no reconfiguration ---------------------------
    n0 = n_reconfig;
    exec(OP_SELR, COPRO_DIV, '0, '0, cyc);
    repeat (20) @(posedge clk); #1;
    if (n_reconfig == n0) n_hit++;
    check("present coprocessor not reloaded", n_reconfig, n0);
    wrr(16'd0, 16'h0); wrr(16'd1, 16'd100); wrr(16'd2, 16'd9); rdr(16'd0, r);
    check("div still works", r, 11);

    // ---- 7. mult back into area 0 ---------------------------------------------
    exec(OP_DISR, COPRO_SQRT, '0, '0, cyc);
    exec(OP_SELR, COPRO_MULT, '0, '0, cyc);
    wrr(16'd0, 16'd321); wrr(16'd1, 16'd123); rdr(16'd0, r);
    check("mult reloaded and working", r, word_t'(32'd321 * 32'd123));
    expect_stream(1); check_stream("mult reload");
    cpu_bus(1'b0, CC_BASE + CC_REG_LOADS, '0, r);
    check("four reconfigurations", r, 4);

    // ---- mechanisms ------------------------------------------------------------
    $display("reconfig=%0d hit=%0d noarea=%0d replace=%0d io_stall=%0d intr=%0d arb_conflict=%0d host_cmd=%0d par_work=%0d icap_busy=%0d",
             n_reconfig, n_hit, n_noarea, n_replace, n_io_stall, n_intr, n_arb_conflict, n_host_cmd, n_par_work, n_icap_busy);
    check("mechanism: reconfiguration", n_reconfig > 0, 1);
    check("mechanism: coprocessor already present", n_hit > 0, 1);
    check("mechanism: no free area", n_noarea > 0, 1);
    check("mechanism: dismissed area replaced", n_replace > 0, 1);
    check("mechanism: access stalled by a running load", n_io_stall > 0, 1);
    check("mechanism: coprocessor reset", n_intr > 0, 1);
    check("mechanism: bus arbitration between two masters", n_arb_conflict > 0, 1);
    check("mechanism: host commands over RS232", n_host_cmd > 0, 1);
    check("mechanism: core works during reconfiguration", n_par_work > 0, 1);
    check("mechanism: ICAP flow control", n_icap_busy > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
