// tb_config_controller: self-checking testbench for config_controller.
//
// Plays the host (system-bus register accesses) and the R8R (reconf /
// remove with IOaddress), with behavioural models of the configuration
// memory and of ICAP.  It stores three small bitstreams through the DATA
// register, writes the directory, and then checks: the byte stream that
// reaches ICAP (count and checksum) for every load; the area chosen
// (empty area first, then a dismissed one); that a loaded coprocessor is
// not loaded again; the "no free area" and "unknown coprocessor" flags;
// that SELR is acknowledged before the load (non-blocking) while a second
// request waits for the load to end; ICAP flow control; the area strobes;
// and the cycles per byte, (WAIT + 3) for a memory with WAIT wait cycles.
module tb_config_controller;
  import fipre_pkg::*;

  localparam int unsigned WAIT = 2;

  logic clk = 1'b0, rst_n = 1'b1;
  logic reconf = 1'b0, remove = 1'b0, ack;
  copro_id_t io_address = '0;
  bus_req_t bus_req = '0;
  bus_rsp_t bus_rsp;
  logic [19:0] cm_addr; logic cm_rd, cm_wr, cm_ready; logic [7:0] cm_wdata, cm_rdata;
  logic icap_ce, icap_busy; logic [7:0] icap_data;
  logic [1:0] area_clear, area_load; copro_id_t area_id;

  config_controller #(.N_AREAS(2), .CM_ADDR_W(20)) dut (.*);
  config_memory_model #(.ADDR_W(20), .WAIT(WAIT)) u_cm (
    .clk, .addr(cm_addr), .rd(cm_rd), .wr(cm_wr), .wdata(cm_wdata), .rdata(cm_rdata), .ready(cm_ready));
  icap_model u_icap (.clk, .ce(icap_ce), .data(icap_data), .busy(icap_busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clear [2] = '{0, 0};
  int n_load  [2] = '{0, 0};
  copro_id_t last_load_id;

  always @(posedge clk) begin
    for (int a = 0; a < 2; a++) begin
      if (area_clear[a]) n_clear[a]++;
      if (area_load[a]) begin n_load[a]++; last_load_id = area_id; end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%0h) expected %0d (%0h)", what, got, got, exp, exp);
    end
  endtask

  task automatic bus(input logic we, input int off, input word_t wd, output word_t rd, output int cyc);
    bus_req.valid = 1'b1; bus_req.we = we; bus_req.addr = CC_BASE + word_t'(off); bus_req.wdata = wd;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!bus_rsp.ready);
    rd = bus_rsp.rdata;
    bus_req = '0;
  endtask
  task automatic wr(input int off, input word_t wd);
    word_t r; int c; bus(1'b1, off, wd, r, c);
  endtask
  task automatic rd(input int off, output word_t r);
    int c; bus(1'b0, off, '0, r, c);
  endtask

  // R8R side: raise reconf or remove until ack; returns cycles to ack
  task automatic proc(input logic is_sel, input copro_id_t id, output int cyc);
    io_address = id; reconf = is_sel; remove = !is_sel; cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!ack);
    reconf = 1'b0; remove = 1'b0;
  endtask

  task automatic wait_idle(output int cyc);
    word_t s; cyc = 0;
    do begin rd(CC_REG_STATUS, s); cyc++; end while (s[0] && cyc < 100000);
  endtask

  // bitstreams
  int unsigned len  [4] = '{0, 40, 57, 23};
  int unsigned base [4] = '{0, 'h100, 'h2000, 'h5432};
  logic [7:0]  bs   [4][64];
  int unsigned exp_sum = 0, exp_bytes = 0;

  task automatic expect_stream(input int id);
    for (int i = 0; i < len[id]; i++) exp_sum = exp_sum * 31 + 32'(bs[id][i]);
    exp_bytes += len[id];
  endtask

  initial begin
    word_t s; int cyc, t0;
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;

    // host: bitstreams through the DATA register, then the directory
    for (int id = 1; id <= 3; id++) begin
      wr(CC_REG_PTR_LO, word_t'(base[id])); wr(CC_REG_PTR_HI, word_t'(base[id] >> 16));
      for (int i = 0; i < len[id]; i++) begin
        bs[id][i] = 8'($urandom);
        wr(CC_REG_DATA, {8'h0, bs[id][i]});
      end
      wr(CC_REG_DIR + 4*id + 0, word_t'(base[id])); wr(CC_REG_DIR + 4*id + 1, word_t'(base[id] >> 16));
      wr(CC_REG_DIR + 4*id + 2, word_t'(len[id]));  wr(CC_REG_DIR + 4*id + 3, 16'h0);
    end
    check("memory holds bitstream 2 byte 5", u_cm.mem[base[2] + 5], bs[2][5]);
    check("memory holds bitstream 3 last byte", u_cm.mem[base[3] + len[3] - 1], bs[3][len[3]-1]);
    rd(CC_REG_PTR_LO, s); check("write pointer advanced", s, word_t'(base[3] + len[3]));
    rd(CC_REG_DIR + 4*2 + 2, s); check("directory read back", s, len[2]);

    // SELR 1: loads into empty area 0; acknowledged before the load
    proc(1'b1, 4'd1, cyc);
    check("SELR acked at once", cyc, 1);
    t0 = $time;
    wait (area_load[0]); @(posedge clk); #1;
    expect_stream(1);
    check("load 1 cycles (WAIT+3 per byte)", ($time - t0) / 10, len[1] * (WAIT + 3) + 1);
    check("icap bytes after load 1", u_icap.bytes, exp_bytes);
    check("icap checksum after load 1", u_icap.sum, exp_sum);
    check("area 0 cleared once", n_clear[0], 1);
    check("area 0 loaded with mult", last_load_id, 1);
    rd(CC_REG_STATUS, s); check("status: area0=1 area1=0 idle", s, 16'h0010);

    // SELR 1 again: already loaded, no new load
    proc(1'b1, 4'd1, cyc);
    repeat (20) @(posedge clk); #1;
    rd(CC_REG_LOADS, s); check("no reload of a present coprocessor", s, 1);

    // SELR 2 with ICAP busy 40% of the time: loads into area 1
    u_icap.busy_pct = 40;
    proc(1'b1, 4'd2, cyc);
    wait_idle(cyc);
    expect_stream(2);
    check("icap bytes after load 2", u_icap.bytes, exp_bytes);
    check("icap checksum after load 2 (with busy)", u_icap.sum, exp_sum);
    check("icap was busy during load", u_icap.busy_cycles > 0, 1);
    check("area 1 loaded once", n_load[1], 1);
    u_icap.busy_pct = 0;

    // SELR 3: both areas in use -> error flag, nothing loaded
    proc(1'b1, 4'd3, cyc);
    repeat (5) @(posedge clk); #1;
    rd(CC_REG_STATUS, s); check("no free area flag", s, 16'h0212);
    wr(CC_REG_STATUS, 16'h0002);
    rd(CC_REG_LOADS, s); check("still two loads", s, 2);

    // DISR 1, then SELR 3 replaces the dismissed area 0; a further SELR 2
    // issued during the load waits until the load ends
    proc(1'b0, 4'd1, cyc);
    check("DISR acked", cyc, 1);
    proc(1'b1, 4'd3, cyc);
    t0 = $time;
    proc(1'b1, 4'd2, cyc);
    check("second request waits for the load", cyc > int'(len[3]) * (WAIT + 3), 1);
    expect_stream(3);
    check("icap bytes after load 3", u_icap.bytes, exp_bytes);
    check("icap checksum after load 3", u_icap.sum, exp_sum);
    rd(CC_REG_STATUS, s); check("status: area0=3 area1=2", s, 16'h0230);
    check("area 0 cleared twice", n_clear[0], 2);

    // unknown coprocessor
    proc(1'b1, 4'd5, cyc);
    rd(CC_REG_STATUS, s); check("unknown coprocessor flag", s, 16'h0234);
    rd(CC_REG_LOADS, s); check("three loads in all", s, 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
