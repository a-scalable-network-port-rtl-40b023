// tb_transfer_engine: self-checking test of the frame path. Two MAC receive
// streams send numbered TCP frames with random gaps; a model of the scan
// detection unit accepts each header after a random delay and drops frames
// whose source address is odd. Every passed frame must come out, byte for
// byte and in order, on the other MAC's transmit stream (which applies random
// back-pressure); dropped frames must not appear; a frame longer than a bank
// must be dropped without being judged; the receive side must stall while all
// banks are full.
module tb_transfer_engine;
  import sds_pkg::*;
  import tb_frame_pkg::*;
  localparam int NM = 2, NB = 2, BD = 256;
  localparam int FRAMES = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NM-1:0] rx_valid = '0, rx_ready, rx_last = '0;
  logic [7:0]    rx_data [NM];
  logic [NM-1:0] tx_valid, tx_ready = '0, tx_last;
  logic [7:0]    tx_data [NM];
  logic hdr_valid, hdr_ready = 0, decision_valid = 0, decision_drop = 0;
  pkt_hdr_t hdr;
  logic frame_passed, frame_dropped;

  transfer_engine #(.NUM_MACS(NM), .NUM_BANKS(NB), .BANK_DEPTH(BD)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  frame_t exp_q [NM][$];     // expected frames per transmit port
  int     hdr_seen = 0, passed = 0, dropped = 0, stall_cycles = 0, rx_done = 0;
  int     next_seq [NM];

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // receive streams
  for (genvar m = 0; m < NM; m++) begin : g_rx
    initial begin
      frame_t f;
      ip_t sip;
      rx_data[m] = 0;
      @(posedge rst_n);
      for (int n = 0; n < FRAMES; n++) begin
        sip = 32'hC000_0000 | (32'(m) << 16) | 32'(n);
        if (m == 0 && n == 7) f = make_frame(sip, 32'h0A000001, 8'h10, BD + 40);  // oversize
        else f = make_frame(sip, 32'h0A000001, 8'h10, $urandom_range(0, 120));
        if (!(m == 0 && n == 7) && !sip[0]) exp_q[(m + 1) % NM].push_back(f);
        for (int i = 0; i < f.size(); i++) begin
          @(negedge clk);
          rx_valid[m] = 1; rx_data[m] = f[i]; rx_last[m] = (i == f.size() - 1);
          @(posedge clk);
          while (!rx_ready[m]) begin
            stall_cycles++;
            @(posedge clk);
          end
        end
        @(negedge clk); rx_valid[m] = 0; rx_last[m] = 0;
        repeat ($urandom_range(0, 30)) @(negedge clk);
      end
      rx_done++;
    end
  end

  // scan detection unit model
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (hdr_valid) begin
        repeat ($urandom_range(0, 20)) @(negedge clk);
        hdr_ready = 1;
        @(negedge clk); hdr_ready = 0;
        hdr_seen++;
        begin
          int m, n;
          m = int'(hdr.sip[23:16]); n = int'(hdr.sip[15:0]);
          chk(hdr.is_tcp && n == next_seq[m], $sformatf("header order mac %0d seq %0d", m, n));
          next_seq[m] = n + 1;
          if (m == 0 && n == 6) next_seq[m] = 8;  // the oversize frame is never judged
        end
        repeat ($urandom_range(1, 25)) @(negedge clk);
        decision_valid = 1; decision_drop = hdr.sip[0];
        @(negedge clk); decision_valid = 0;
      end
    end
  end

  // transmit sinks
  for (genvar m = 0; m < NM; m++) begin : g_tx
    initial begin
      frame_t got;
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        tx_ready[m] = ($urandom_range(0, 3) != 0);
        @(posedge clk);
        if (tx_valid[m] && tx_ready[m]) begin
          got.push_back(tx_data[m]);
          if (tx_last[m]) begin
            if (exp_q[m].size() == 0) chk(0, "unexpected frame");
            else chk(got == exp_q[m].pop_front(), $sformatf("frame on port %0d", m));
            got.delete();
          end
        end
      end
    end
  end

  always_ff @(posedge clk) if (rst_n) begin
    if (frame_passed)  passed++;
    if (frame_dropped) dropped++;
  end

  initial begin
    for (int m = 0; m < NM; m++) next_seq[m] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (rx_done == NM);
    repeat (3000) @(posedge clk);
    chk(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all passed frames delivered");
    chk(hdr_seen == NM * FRAMES - 1, $sformatf("headers judged %0d", hdr_seen));
    chk(passed == NM * FRAMES / 2, $sformatf("passed %0d", passed));
    chk(dropped == NM * FRAMES / 2, $sformatf("dropped %0d", dropped));
    chk(stall_cycles > 0, "receive stalled on full banks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
