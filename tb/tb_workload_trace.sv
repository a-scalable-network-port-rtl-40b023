// tb_workload_trace: replays two synthetic traffic traces through the scan
// detection engine at its default sizes (128-row aggregate and suspicion
// lists, 256-row hash table, 64-row scanner list) and measures how many
// scanners are missed and how many benign hosts are blocked.
//
// Trace 1, fast scanners, run for AGG_TH = SUSP_TH = 1, 4, 8 and 12 with
// HASH_TH = 8: 3000 benign inside hosts spread over 64 /24 subnets open TCP
// sessions to 64 outside servers (handshake, data both ways, FIN exchange).
// Every tenth host is a "busy" client whose connections are refused (SYN
// answered by RST+ACK) one time in six, the others one time in 32. 38
// scanners, placed in 38 of the 64 subnets, each run a SYN scan against one
// outside target: a closed port answers RST+ACK, an open one SYN+ACK
// followed by the scanner's RST. One step in six is a scanner probe.
//
// Trace 2, stealth scanners, run for HASH_TH = 4, 6 and 8 with AGG_TH =
// SUSP_TH = 5: 512 benign users, each of which once either has a connection
// refused or sends a data packet with no flags set, and 20 scanners that
// probe only once per window of 300 steps, long enough for their suspicion
// rows to time out between probes; each probes 32 times.
//
// Checks: every verdict is compared with a model of the scanner list kept
// from the engine's add requests (a packet is dropped exactly when its
// source or destination is listed before or after its processing); no
// scanner may be missed in any run; the number of blocked benign hosts may
// not rise as the thresholds rise; and fewer than one in 500 may be blocked
// at AGG_TH = SUSP_TH = 12 (those few come through the hash table, whose
// HASH_TH stays at 8 and whose 256 rows are shared by many hashed hosts).
// The decision time averaged over all packets is reported and must stay
// within the 28 cycles of a header that blocks nothing plus a small
// allowance for blocking and hashing work. The average spacing of headers
// sent back to back (accept to accept, including hand-offs of timed-out
// suspects to the hash table) is reported as well: it sets the throughput.
//
// Time runs at one tick per 100 clocks; the time-outs are scaled to the
// length of these traces. The host counts, subnet count, scanner counts and
// threshold values follow the evaluation the design was built for; the
// traffic mix, refusal rates, time-outs and trace lengths are this test's
// own. A xorshift generator with a fixed seed makes every run repeatable.
module tb_workload_trace;
  import sds_pkg::*;
  localparam logic [7:0] FIN = 8'h01, SYN = 8'h02, RST = 8'h04, PSH = 8'h08, ACK = 8'h10;
  localparam int SCN = 64;
  localparam int N_BENIGN1 = 3000, N_SCAN1 = 38, STEPS1 = 16000;
  localparam int N_BENIGN2 = 512, N_SCAN2 = 20, WIN2 = 300, NWIN2 = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sds_cfg_t cfg;
  logic hdr_valid = 0, hdr_ready, decision_valid, decision_drop;
  pkt_hdr_t hdr;
  sds_events_t ev;
  time_t now;
  logic [$clog2(SCN+1)-1:0] scanner_count;

  scan_detection_engine dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- repeatable random numbers -----------------------------
  logic [31:0] rng;
  function automatic int unsigned rnd(input int unsigned n);
    rng ^= rng << 13; rng ^= rng >> 17; rng ^= rng << 5;
    return rng % n;
  endfunction

  // ---------------- scanner list model ------------------------------------
  ip_t lst [SCN];
  bit  lst_v [SCN];
  int  lst_ptr;
  bit  ever [ip_t];

  function automatic bit listed(input ip_t a);
    for (int i = 0; i < SCN; i++) if (lst_v[i] && lst[i] == a) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk)
    if (rst_n && dut.scn_req_valid && dut.scn_req_ready && dut.scn_req_add) begin
      if (!listed(dut.scn_req_ip)) begin
        lst[lst_ptr] = dut.scn_req_ip; lst_v[lst_ptr] = 1'b1;
        lst_ptr = (lst_ptr + 1) % SCN;
      end
      ever[dut.scn_req_ip] = 1'b1;
    end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- one packet ---------------------------------------------
  longint n_pkt = 0, n_cyc = 0, n_gap = 0, n_gap_pkt = 0, prev_t0 = -1;
  int n_bad_verdict = 0;
  task automatic pkt(input ip_t s, input ip_t d, input logic [7:0] fl);
    bit before_l, exp_drop;
    longint t0;
    @(negedge clk);
    hdr = '{is_ipv4: 1'b1, is_tcp: 1'b1, sip: s, dip: d, flags: fl};
    hdr_valid = 1'b1;
    while (!hdr_ready) @(negedge clk);
    before_l = listed(s) || listed(d);
    t0 = cyc;
    if (prev_t0 >= 0 && t0 - prev_t0 < 100) begin n_gap += t0 - prev_t0; n_gap_pkt++; end
    prev_t0 = t0;
    @(negedge clk); hdr_valid = 1'b0;
    while (!decision_valid) @(negedge clk);
    n_pkt++; n_cyc += cyc - t0;
    exp_drop = before_l || listed(s) || listed(d);
    if (decision_drop != exp_drop) begin
      n_bad_verdict++;
      if (n_bad_verdict <= 10)
        $display("FAIL verdict %h -> %h flags %h: drop=%0d", s, d, fl, decision_drop);
    end
  endtask

  // ---------------- addresses ----------------------------------------------
  function automatic ip_t benign(input int h);
    return {8'd10, 8'd0, 8'(h % 64), 8'(1 + h / 64)};
  endfunction
  function automatic ip_t scanner1(input int j);
    return {8'd10, 8'd0, 8'((j * 37 + 11) % 64), 8'd200};
  endfunction
  function automatic ip_t scanner2(input int j);
    return {8'd10, 8'd0, 8'((j * 29 + 5) % 64), 8'd210};
  endfunction
  function automatic ip_t server(input int k);
    return {8'd20, 8'd0, 8'(k % 16), 8'(1 + k / 16)};
  endfunction
  function automatic ip_t target(input int j);
    return {8'd20, 8'd0, 8'(j % 16), 8'(100 + j)};
  endfunction

  // ---------------- traffic pieces -----------------------------------------
  // a benign session; refused: SYN answered by RST+ACK; null_flags: the
  // client's first data packet carries no flags
  task automatic session(input ip_t c, input ip_t s, input bit refused, input bit null_flags);
    pkt(c, s, SYN);
    if (refused) begin pkt(s, c, RST | ACK); return; end
    pkt(s, c, SYN | ACK);
    pkt(c, s, ACK);
    pkt(c, s, null_flags ? 8'h00 : (PSH | ACK));
    pkt(s, c, PSH | ACK);
    pkt(c, s, ACK);
    pkt(c, s, FIN | ACK);
    pkt(s, c, FIN | ACK);
    pkt(c, s, ACK);
  endtask

  task automatic probe(input ip_t sc, input ip_t t);
    pkt(sc, t, SYN);
    if (rnd(4) != 0) pkt(t, sc, RST | ACK);
    else begin pkt(t, sc, SYN | ACK); pkt(sc, t, RST); end
  endtask

  task automatic restart(input int agg_th, input int susp_th, input int hash_th,
                         input int susp_timeout, input int susp_check);
    cfg = '{subnet_mask: 32'hFFFF_FF00, agg_th: TH_W'(agg_th), susp_th: TH_W'(susp_th),
            hash_th: TH_W'(hash_th), agg_timeout: 32'd5000, susp_timeout: time_t'(susp_timeout),
            hash_timeout: 32'd1_000_000, agg_check: 32'd200, susp_check: time_t'(susp_check),
            hash_check: 32'd1000, tick_div: 32'd99};
    rst_n = 1'b0;
    for (int i = 0; i < SCN; i++) lst_v[i] = 1'b0;
    lst_ptr = 0; ever.delete();
    rng = 32'h1234_5678;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
  endtask

  // ---------------- trace 1: fast scanners -----------------------------------
  task automatic run_fast(input int th, output int fp, output int fn);
    restart(th, th, 8, 2000, 50);
    for (int i = 0; i < STEPS1; i++) begin
      if (i % 6 == 0) begin
        int j = (i / 6) % N_SCAN1;
        probe(scanner1(j), target(j));
      end else begin
        int h = int'(rnd(N_BENIGN1));
        bit busy = (h % 10 == 0);
        session(benign(h), server(int'(rnd(64))), busy ? (rnd(6) == 0) : (rnd(32) == 0), 1'b0);
      end
    end
    fp = 0; fn = 0;
    for (int h = 0; h < N_BENIGN1; h++) if (ever.exists(benign(h))) fp++;
    for (int j = 0; j < N_SCAN1; j++) if (!ever.exists(scanner1(j))) fn++;
    $display("fast scan trace AGG_TH=SUSP_TH=%0d HASH_TH=8: false positives %0d of %0d, false negatives %0d of %0d",
             th, fp, N_BENIGN1, fn, N_SCAN1);
  endtask

  // ---------------- trace 2: stealth scanners --------------------------------
  task automatic run_stealth(input int hth, output int fp, output int fn);
    bit done_bad [N_BENIGN2];
    restart(5, 5, hth, 300, 20);
    for (int h = 0; h < N_BENIGN2; h++) done_bad[h] = 1'b0;
    for (int i = 0; i < WIN2 * NWIN2; i++) begin
      int w = i % WIN2;
      if (w % 15 == 0 && w / 15 < N_SCAN2) begin
        int j = w / 15;
        probe(scanner2(j), target(j));
      end else begin
        int h = int'(rnd(N_BENIGN2));
        bit mk = !done_bad[h];
        done_bad[h] = 1'b1;
        session(benign(h), server(int'(rnd(64))), mk && h[0], mk && !h[0]);
      end
    end
    fp = 0; fn = 0;
    for (int h = 0; h < N_BENIGN2; h++) if (ever.exists(benign(h))) fp++;
    for (int j = 0; j < N_SCAN2; j++) if (!ever.exists(scanner2(j))) fn++;
    $display("stealth trace AGG_TH=SUSP_TH=5 HASH_TH=%0d: false positives %0d of %0d, false negatives %0d of %0d",
             hth, fp, N_BENIGN2, fn, N_SCAN2);
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int th1 [4];
    int th2 [3];
    int fp, fn, prev_fp;
    th1 = '{1, 4, 8, 12};
    th2 = '{4, 6, 8};
    hdr = '0;
    prev_fp = N_BENIGN1 + 1;
    foreach (th1[k]) begin
      run_fast(th1[k], fp, fn);
      chk(fn == 0, $sformatf("fast trace TH=%0d: every scanner blocked", th1[k]));
      chk(fp <= prev_fp, $sformatf("fast trace TH=%0d: false positives do not rise", th1[k]));
      prev_fp = fp;
    end
    chk(fp * 500 < N_BENIGN1, "fast trace TH=12: fewer than 1 in 500 benign hosts blocked");
    prev_fp = N_BENIGN2 + 1;
    foreach (th2[k]) begin
      run_stealth(th2[k], fp, fn);
      chk(fn == 0, $sformatf("stealth trace HASH_TH=%0d: every stealth scanner blocked", th2[k]));
      chk(fp <= prev_fp, $sformatf("stealth trace HASH_TH=%0d: false positives do not rise", th2[k]));
      prev_fp = fp;
    end
    chk(n_bad_verdict == 0, $sformatf("%0d of %0d verdicts differ from the scanner list model",
                                      n_bad_verdict, n_pkt));
    $display("packets %0d, average decision time %0d.%02d cycles", n_pkt, n_cyc / n_pkt,
             (n_cyc * 100 / n_pkt) % 100);
    chk(n_cyc <= 30 * n_pkt, "average decision time at most 30 cycles");
    $display("average spacing of back-to-back headers %0d.%02d cycles", n_gap / n_gap_pkt,
             (n_gap * 100 / n_gap_pkt) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
