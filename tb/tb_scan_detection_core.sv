// tb_scan_detection_core: end-to-end test of the scan detection core at its
// default sizes (128-row aggregate and suspicion lists, 256-row hash table,
// 64-row scanner list, two 2048-byte banks). The host configures it through
// the register port (1-cycle ticks, short time-outs, all thresholds 3); then
// Ethernet frames enter on the two MAC receive streams: MAC 0 faces the
// inside network 10.1.0.0/16, MAC 1 the outside servers. Phases:
//   1. benign TCP sessions (handshake, data, FIN exchange) of inside hosts;
//   2. an RST+ACK from a subnet nobody talked to (must be ignored);
//   3. a fast SYN scanner whose probes draw RST+ACK replies: blocked at the
//      fifth reply, its later frames in both directions dropped;
//   4. a stealth FIN scanner probing once per pause, with its neighbours
//      busy: suspected, timed out, hashed, found again, and blocked when
//      HASH_count reaches HASH_TH;
//   5. a burst of benign frames on both MACs at once with transmit
//      back-pressure, plus a non-IP frame;
//   6. a quiet period in which idle aggregate rows time out.
// Every frame's fate is worked out beforehand: passed frames must appear
// byte for byte on the other MAC, dropped ones nowhere. Each mechanism
// (pass, drop, spoof rejection, AGG_TH, suspicion entry, SUSP_TH, blocking,
// suspicion time-out and hashing, hash hit, HASH_TH, aggregate time-out,
// receive stall on full banks, transmit back-pressure) is counted and must
// occur. The status registers are read back at the end.
module tb_scan_detection_core;
  import sds_pkg::*;
  import tb_frame_pkg::*;
  localparam logic [7:0] FIN = 8'h01, SYN = 8'h02, RST = 8'h04, PSH = 8'h08, ACK = 8'h10;
  localparam int NM = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NM-1:0] rx_valid = '0, rx_ready, rx_last = '0;
  logic [7:0]    rx_data [NM];
  logic [NM-1:0] tx_valid, tx_ready = '1, tx_last;
  logic [7:0]    tx_data [NM];
  logic bus_wr = 0, bus_rd = 0; logic [4:0] bus_addr = 0; logic [31:0] bus_wdata = 0, bus_rdata;
  sds_events_t ev;
  logic frame_passed, frame_dropped;

  scan_detection_core dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- counters
  int n_pass = 0, n_drop = 0, n_spoof = 0, n_agg = 0, n_sadd = 0, n_sreach = 0, n_scn = 0;
  int n_hash_add = 0, n_hash_hit = 0, n_hash_reach = 0, n_agg_purge = 0, n_susp_purge = 0;
  int n_rx_stall = 0, n_tx_wait = 0;
  bit backpressure = 0;
  always_ff @(posedge clk) if (rst_n) begin
    n_pass       <= n_pass       + int'(frame_passed);
    n_drop       <= n_drop       + int'(frame_dropped);
    n_spoof      <= n_spoof      + int'(ev.spoof);
    n_agg        <= n_agg        + int'(ev.agg_reached);
    n_sadd       <= n_sadd       + int'(ev.susp_add);
    n_sreach     <= n_sreach     + int'(ev.susp_reached);
    n_scn        <= n_scn        + int'(ev.scanner_add);
    n_hash_add   <= n_hash_add   + int'(ev.hash_add);
    n_hash_hit   <= n_hash_hit   + int'(ev.hash_hit);
    n_hash_reach <= n_hash_reach + int'(ev.hash_reached);
    n_agg_purge  <= n_agg_purge  + int'(dut.u_sde.u_agg.purge_valid);
    n_susp_purge <= n_susp_purge + int'(dut.u_sde.u_susp.purge_valid);
    for (int m = 0; m < NM; m++) begin
      if (rx_valid[m] && !rx_ready[m] && !dut.u_te.rx_active) n_rx_stall <= n_rx_stall + 1;
      if (tx_valid[m] && !tx_ready[m]) n_tx_wait <= n_tx_wait + 1;
    end
  end

  // ---------------------------------------------------------------- frames
  frame_t exp_q [NM][$];
  int     exp_drops = 0, exp_pass = 0;

  task automatic send(input int m, input frame_t f, input bit pass);
    if (pass) begin exp_q[(m + 1) % NM].push_back(f); exp_pass++; end
    else exp_drops++;
    for (int i = 0; i < f.size(); i++) begin
      @(negedge clk);
      rx_valid[m] = 1; rx_data[m] = f[i]; rx_last[m] = (i == f.size() - 1);
      @(posedge clk);
      while (!rx_ready[m]) @(posedge clk);
    end
    @(negedge clk); rx_valid[m] = 0; rx_last[m] = 0;
  endtask

  // one packet, inside host (MAC 0) or outside server (MAC 1), then wait
  // until the core has dealt with it so the order of decisions is fixed
  task automatic pkt(input ip_t s, input ip_t d, input logic [7:0] fl, input bit pass,
                     input int payload = 0);
    int m, n0;
    m = (s[31:16] == 16'h0A01) ? 0 : 1;
    n0 = n_pass + n_drop;
    send(m, make_frame(s, d, fl, payload), pass);
    while (n_pass + n_drop == n0) @(posedge clk);
  endtask

  task automatic session(input ip_t h, input ip_t srv);
    pkt(h, srv, SYN, 1);
    pkt(srv, h, SYN | ACK, 1);
    pkt(h, srv, ACK, 1);
    pkt(h, srv, PSH | ACK, 1, 100);
    pkt(srv, h, PSH | ACK, 1, 300);
    pkt(h, srv, FIN | ACK, 1);
    pkt(srv, h, FIN | ACK, 1);
    pkt(h, srv, ACK, 1);
  endtask

  for (genvar m = 0; m < NM; m++) begin : g_tx
    initial begin
      frame_t got;
      forever begin
        @(negedge clk);
        tx_ready[m] = backpressure ? ($urandom_range(0, 2) == 0) : 1'b1;
        @(posedge clk);
        if (rst_n && tx_valid[m] && tx_ready[m]) begin
          got.push_back(tx_data[m]);
          if (tx_last[m]) begin
            if (exp_q[m].size() == 0) chk(0, $sformatf("unexpected frame on port %0d", m));
            else chk(got == exp_q[m].pop_front(), $sformatf("frame contents on port %0d", m));
            got.delete();
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- host
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); bus_wr = 1; bus_addr = 5'(a); bus_wdata = d;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); bus_rd = 1; bus_addr = 5'(a);
    @(negedge clk); bus_rd = 0; d = bus_rdata;
  endtask

  localparam ip_t F = 32'h0A01_01C8;   // fast scanner 10.1.1.200
  localparam ip_t T = 32'h0A01_024D;   // stealth scanner 10.1.2.77
  localparam ip_t V = 32'h1400_0009;   // scanned server 20.0.0.9
  localparam ip_t W = 32'h1400_0107;   // web server 20.0.1.7

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    for (int m = 0; m < NM; m++) rx_data[m] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wr(10, 0);            // one tick per clock
    wr(1, 3); wr(2, 3); wr(3, 3);
    wr(4, 20000); wr(7, 2000);       // aggregate time-out and check interval
    wr(5, 2000);  wr(8, 100);        // suspicion
    wr(6, 10000000); wr(9, 1000000); // hash

    // 1. benign sessions
    for (int h = 0; h < 6; h++) session(32'h0A01_0100 + 32'(h + 10), W);
    for (int h = 0; h < 4; h++) session(32'h0A01_0200 + 32'(h + 10), W + 32'(h));
    chk(n_scn == 0 && n_sadd == 0, "no suspect after benign traffic");

    // 2. spoofed reply
    pkt(32'h6300_0001, 32'h0A01_010A, RST | ACK, 1);
    chk(n_spoof == 1, "spoofed RST+ACK ignored");

    // 3. fast SYN scanner
    for (int i = 1; i <= 5; i++) begin
      pkt(F, V, SYN, 1);
      pkt(V, F, RST | ACK, i < 5);
    end
    chk(n_scn == 1, "fast scanner blocked");
    pkt(F, V, SYN, 0);
    pkt(V, F, SYN | ACK, 0);
    session(32'h0A01_0111, W);       // a neighbour still gets through

    // 4. stealth FIN scanner with pauses longer than the suspicion time-out
    for (int p = 1; p <= 7; p++) begin
      pkt(T, V, FIN, p < 6);
      for (int k = 0; k < 4; k++) begin
        pkt(32'h0A01_020A, W, PSH | ACK, 1, 50);
        pkt(W, 32'h0A01_020A, ACK, 1);
        repeat (700) @(posedge clk);
      end
    end
    // the fast scanner's suspicion row also times out and is hashed with
    // SUSP_count 3, which reaches HASH_TH again (it is already blocked)
    chk(n_hash_reach == 2 && n_scn == 2, "stealth scanner blocked");

    // 5. burst on both MACs with back-pressure, and a non-IP frame
    backpressure = 1;
    fork
      for (int n = 0; n < 12; n++) send(0, make_frame(32'h0A01_0305, W, PSH | ACK, $urandom_range(0, 400)), 1);
      for (int n = 0; n < 12; n++) send(1, make_frame(W, 32'h0A01_0305, PSH | ACK, $urandom_range(0, 400)), 1);
    join
    send(0, make_frame(0, 0, 0, 20, 8'd6, 5, 16'h0806), 1);
    wait (exp_q[0].size() == 0 && exp_q[1].size() == 0);
    backpressure = 0;

    // 6. quiet period: aggregate rows time out
    repeat (30000) @(posedge clk);

    chk(exp_q[0].size() == 0 && exp_q[1].size() == 0, "every passed frame delivered");
    chk(n_pass == exp_pass, $sformatf("passed %0d expected %0d", n_pass, exp_pass));
    chk(n_drop == exp_drops, $sformatf("dropped %0d expected %0d", n_drop, exp_drops));
    rd(16, d); chk(d == 32'(exp_pass + exp_drops), "packets decided register");
    rd(17, d); chk(d == 32'(exp_drops), "drop register");
    rd(18, d); chk(d == 2, "scanner register");

    $display("mechanisms: pass=%0d drop=%0d spoof=%0d agg_th=%0d susp_add=%0d susp_th=%0d block=%0d",
             n_pass, n_drop, n_spoof, n_agg, n_sadd, n_sreach, n_scn);
    $display("            susp_timeout=%0d hash_add=%0d hash_hit=%0d hash_th=%0d agg_timeout=%0d rx_stall=%0d tx_wait=%0d",
             n_susp_purge, n_hash_add, n_hash_hit, n_hash_reach, n_agg_purge, n_rx_stall, n_tx_wait);
    chk(n_pass > 0, "mechanism: pass");
    chk(n_drop > 0, "mechanism: drop");
    chk(n_spoof > 0, "mechanism: spoof rejection");
    chk(n_agg > 0, "mechanism: AGG_TH reached");
    chk(n_sadd > 0, "mechanism: suspicion entry");
    chk(n_sreach > 0, "mechanism: SUSP_TH reached");
    chk(n_scn > 0, "mechanism: scanner blocked");
    chk(n_susp_purge > 0, "mechanism: suspicion time-out");
    chk(n_hash_add > 0, "mechanism: hashing");
    chk(n_hash_hit > 0, "mechanism: hash hit");
    chk(n_hash_reach > 0, "mechanism: HASH_TH reached");
    chk(n_agg_purge > 0, "mechanism: aggregate time-out");
    chk(n_rx_stall > 0, "mechanism: receive stall on full banks");
    chk(n_tx_wait > 0, "mechanism: transmit back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
