// tb_hash_table: self-checking test of the stealth-scanner hash table.
// Probes of an empty row must miss and change nothing; HASH_ADD must add the
// SUSP_count handed over; probes of an existing row add one; `reached` must
// rise at HASH_TH with the last hashed address and restart the count; two
// addresses that share a hash share one counter; rows idle past the time-out
// vanish. The hash (XOR of the address bytes for 256 rows) is recomputed in
// the testbench to build colliding addresses.
module tb_hash_table;
  import sds_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tick = 1; time_t now = 0; logic [7:0] hash_th = 8'd8;
  time_t check_interval = 1_000_000, timeout = 1_000_000;
  logic req_valid = 0, req_ready; hash_op_e req_op = HASH_PROBE; ip_t req_ip = 0;
  logic [7:0] req_amount = 0;
  logic resp_valid, resp_hit, resp_reached; ip_t resp_ip; logic [7:0] resp_count;
  logic purge_valid, scanning;
  int purges = 0;

  hash_table #(.DEPTH(DEPTH)) dut (.*);
  always_ff @(posedge clk) begin
    now <= now + 1;
    if (purge_valid) purges++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bit r_hit, r_reached; int r_count; ip_t r_ip; int r_lat;
  task automatic request(input hash_op_e op, input ip_t ip, input int amount);
    int t0;
    @(negedge clk); req_valid = 1; req_op = op; req_ip = ip; req_amount = 8'(amount);
    while (!req_ready) @(negedge clk);
    t0 = $time / 10;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    r_lat = $time / 10 - t0;
    r_hit = resp_hit; r_reached = resp_reached; r_count = resp_count; r_ip = resp_ip;
  endtask

  localparam ip_t A = 32'h0102_0304;   // hash 01^02^03^04 = 04
  localparam ip_t B = 32'h0000_0004;   // same hash
  localparam ip_t C = 32'h5566_7788;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    request(HASH_PROBE, A, 1);
    chk(!r_hit && !r_reached, "empty row misses");
    chk(r_lat == 1, $sformatf("latency %0d", r_lat));
    request(HASH_PROBE, A, 1);
    chk(!r_hit, "probe did not create a row");
    request(HASH_ADD, A, 5);
    chk(!r_hit && r_count == 5 && !r_reached, "add 5");
    request(HASH_PROBE, A, 1);
    chk(r_hit && r_count == 6, "probe adds one");
    request(HASH_PROBE, C, 1);
    chk(!r_hit, "other hash misses");
    request(HASH_PROBE, B, 1);
    chk(r_hit && r_count == 7 && !r_reached, "colliding address shares the row");
    request(HASH_PROBE, A, 1);
    chk(r_hit && r_count == 8 && r_reached && r_ip == A, "reached at HASH_TH");
    request(HASH_PROBE, A, 1);
    chk(r_hit && r_count == 1 && !r_reached, "count restarted");
    request(HASH_ADD, C, 9);
    chk(r_reached && r_ip == C, "add beyond threshold");
    // time-out of both rows
    timeout = 2000; check_interval = 100;
    repeat (4000) @(posedge clk);
    chk(purges == 2, $sformatf("purges %0d", purges));
    request(HASH_PROBE, A, 1);
    chk(!r_hit, "row timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
