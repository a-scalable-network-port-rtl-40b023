// tb_scan_detection_unit: self-checking test of the detection algorithm as
// run by the scan detection unit over the real lists (through
// scan_detection_engine with small lists). Directed packet sequences, with
// pass/drop worked out by hand from the rules:
//   - a non-IPv4 frame passes;
//   - an RST+ACK from a subnet nobody sent to is ignored as spoofed;
//   - a fast SYN scanner whose probes draw RST+ACK replies: its subnet
//     reaches AGG_TH after three replies and it becomes a suspect; two more
//     replies and one half-open probe bring SUSP_count to SUSP_TH and the
//     reply that does so is dropped, as is all later traffic to or from it;
//   - a FIN scanner (invalid flags) goes the same way through its own subnet;
//   - benign hosts in the scanners' subnets keep passing.
// It also measures the cycles from header to decision.
module tb_scan_detection_unit;
  import sds_pkg::*;
  localparam logic [7:0] FIN = 8'h01, SYN = 8'h02, RST = 8'h04, PSH = 8'h08, ACK = 8'h10;
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

  int n_spoof = 0, n_agg = 0, n_sadd = 0, n_sreach = 0, n_scn = 0, n_drop = 0;
  always_ff @(posedge clk) if (rst_n) begin
    n_spoof  <= n_spoof  + int'(ev.spoof);
    n_agg    <= n_agg    + int'(ev.agg_reached);
    n_sadd   <= n_sadd   + int'(ev.susp_add);
    n_sreach <= n_sreach + int'(ev.susp_reached);
    n_scn    <= n_scn    + int'(ev.scanner_add);
    n_drop   <= n_drop   + int'(ev.drop);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int max_cyc = 0, min_cyc = 1000;
  bit last_drop;
  task automatic pkt(input ip_t s, input ip_t d, input logic [7:0] fl, input bit exp_drop,
                     input string what, input bit ipv4 = 1, input bit tcp = 1);
    int t0, c;
    @(negedge clk);
    hdr = '{is_ipv4: ipv4, is_tcp: tcp, sip: s, dip: d, flags: fl};
    hdr_valid = 1;
    while (!hdr_ready) @(negedge clk);
    t0 = $time / 10;
    @(negedge clk); hdr_valid = 0;
    while (!decision_valid) @(negedge clk);
    c = $time / 10 - t0;
    if (ipv4 && tcp && !exp_drop) begin
      if (c > max_cyc) max_cyc = c;
      if (c < min_cyc) min_cyc = c;
    end
    last_drop = decision_drop;
    chk(decision_drop == exp_drop, $sformatf("%s: drop=%0d", what, decision_drop));
  endtask

  localparam ip_t H1 = 32'h0A01_0105, S = 32'h0A01_0142, V = 32'h1400_0009;
  localparam ip_t S2 = 32'h0A01_0207, H2 = 32'h0A01_0208, X = 32'h1E00_0001;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg = '{subnet_mask: 32'hFFFF_FF00, agg_th: 8'd3, susp_th: 8'd3, hash_th: 8'd4,
            agg_timeout: 32'hFFFF_FFFF, susp_timeout: 32'hFFFF_FFFF, hash_timeout: 32'hFFFF_FFFF,
            agg_check: 32'hFFFF_FFFF, susp_check: 32'hFFFF_FFFF, hash_check: 32'hFFFF_FFFF,
            tick_div: 32'd0};
    hdr = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    pkt(H1, V, SYN, 0, "non-IPv4", 0, 0);
    pkt(H1, V, SYN, 0, "benign SYN");
    pkt(V, H1, SYN | ACK, 0, "benign SYN+ACK");
    pkt(X, H1, RST | ACK, 0, "spoofed RST+ACK");
    chk(n_spoof == 1, "spoof seen");
    // fast SYN scanner S probing closed ports of V
    for (int i = 1; i <= 4; i++) begin
      pkt(S, V, SYN, 0, $sformatf("scan SYN %0d", i));
      pkt(V, S, RST | ACK, 0, $sformatf("RST+ACK %0d", i));
      if (i == 3) chk(n_agg == 1 && n_sadd == 1, "subnet reached AGG_TH, S suspected");
    end
    pkt(S, V, SYN, 0, "scan SYN 5");
    pkt(V, S, RST | ACK, 1, "RST+ACK 5 blocks S");
    chk(n_sreach == 1 && n_scn == 1, $sformatf("S reached SUSP_TH and was blocked %0d %0d", n_sreach, n_scn));
    pkt(S, V, SYN, 1, "blocked source");
    pkt(V, S, SYN | ACK, 1, "blocked destination");
    pkt(S, V, SYN, 1, "blocked non-TCP", 1, 0);
    pkt(H1, V, PSH | ACK, 0, "benign neighbour passes");
    // FIN scanner S2
    for (int i = 1; i <= 5; i++) begin
      pkt(S2, V, FIN, 0, $sformatf("FIN probe %0d", i));
      if (i == 3) chk(n_agg == 2 && n_sadd == 2, "S2 suspected");
    end
    pkt(S2, V, FIN, 1, "FIN probe 6 blocks S2");
    pkt(S2, V, FIN, 1, "S2 blocked");
    pkt(H2, V, SYN, 0, "benign neighbour of S2");
    chk(n_scn == 2 && scanner_count == 2, "two scanners");
    chk(n_drop == 6, $sformatf("drops %0d", n_drop));
    $display("decision latency of passed TCP headers: %0d..%0d cycles", min_cyc, max_cyc);
    chk(max_cyc <= 40, "latency bound");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
