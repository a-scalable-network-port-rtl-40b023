// tb_scan_detection_engine: self-checking test of the lists working together
// over time: the stealth scanner path. A scanner sends one FIN probe at a
// time with long pauses while a benign host of its subnet stays active. The
// expected course, worked out by hand for AGG_TH = 2, SUSP_TH = 5,
// HASH_TH = 4:
//   probe 2 lifts the subnet to AGG_TH and the scanner becomes a suspect;
//   during each pause its suspicion row times out and is hashed;
//   probes 3, 4 and 5 each find its hash row (HASH_count 1, 2, 3) and put it
//   back in the suspicion list; probe 6 brings HASH_count to 4, the scanner
//   is blocked and that probe is dropped, as is probe 7.
// The benign host must never be dropped, only one address may be blocked,
// and decisions must not be slowed down by the time-out scans.
module tb_scan_detection_engine;
  import sds_pkg::*;
  localparam logic [7:0] FIN = 8'h01, SYN = 8'h02, PSH = 8'h08, ACK = 8'h10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sds_cfg_t cfg;
  logic hdr_valid = 0, hdr_ready, decision_valid, decision_drop;
  pkt_hdr_t hdr;
  sds_events_t ev;
  time_t now;
  logic [4:0] scanner_count;

  scan_detection_engine #(.AGG_DEPTH(8), .ADST_DEPTH(8), .SUSP_DEPTH(8), .HASH_DEPTH(16),
                          .SCN_DEPTH(16)) dut (.*);

  int n_hash_add = 0, n_hash_hit = 0, n_hash_reach = 0, n_sadd = 0, n_scn = 0;
  always_ff @(posedge clk) if (rst_n) begin
    n_hash_add   <= n_hash_add   + int'(ev.hash_add);
    n_hash_hit   <= n_hash_hit   + int'(ev.hash_hit);
    n_hash_reach <= n_hash_reach + int'(ev.hash_reached);
    n_sadd       <= n_sadd       + int'(ev.susp_add);
    n_scn        <= n_scn        + int'(ev.scanner_add);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int max_cyc = 0;
  task automatic pkt(input ip_t s, input ip_t d, input logic [7:0] fl, input bit exp_drop,
                     input string what);
    int t0, c;
    @(negedge clk);
    hdr = '{is_ipv4: 1'b1, is_tcp: 1'b1, sip: s, dip: d, flags: fl};
    hdr_valid = 1;
    while (!hdr_ready) @(negedge clk);
    t0 = $time / 10;
    @(negedge clk); hdr_valid = 0;
    while (!decision_valid) @(negedge clk);
    c = $time / 10 - t0;
    if (!exp_drop && c > max_cyc) max_cyc = c;
    chk(decision_drop == exp_drop, $sformatf("%s: drop=%0d", what, decision_drop));
  endtask

  localparam ip_t T = 32'h0A02_0304, B = 32'h0A02_0311, V = 32'h1400_0009;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg = '{subnet_mask: 32'hFFFF_FF00, agg_th: 8'd2, susp_th: 8'd5, hash_th: 8'd4,
            agg_timeout: 32'd100000, susp_timeout: 32'd300, hash_timeout: 32'd1000000,
            agg_check: 32'd1000, susp_check: 32'd50, hash_check: 32'd1000, tick_div: 32'd0};
    hdr = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 1; p <= 7; p++) begin
      pkt(T, V, FIN, p >= 6, $sformatf("stealth probe %0d", p));
      if (p == 2) chk(n_sadd == 1, "suspected after probe 2");
      if (p >= 3 && p <= 5) chk(n_hash_hit == p - 2, $sformatf("hash hit on probe %0d", p));
      if (p == 6) chk(n_hash_reach == 1 && n_scn == 1, "blocked by HASH_TH");
      // long pause with benign traffic from the same subnet
      for (int k = 0; k < 10; k++) begin
        pkt(B, V, (k == 0) ? SYN : (PSH | ACK), 0, "benign host");
        pkt(V, B, ACK, 0, "reply to benign host");
        repeat (60) @(posedge clk);
      end
    end
    chk(n_hash_add >= 4, $sformatf("hash adds %0d", n_hash_add));
    chk(n_scn == 1 && scanner_count == 1, "only the scanner blocked");
    chk(max_cyc <= 40, $sformatf("decision latency %0d", max_cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
