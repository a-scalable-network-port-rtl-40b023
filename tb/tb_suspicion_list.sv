// tb_suspicion_list: self-checking test of the suspect list. One suspect is
// entered and driven through the four scanner properties: invalid flags,
// a received RST+ACK, a half-open connection (2 packets) and a completed
// handshake with no data (3 packets); a connection that carried data must not
// count. SUSP_count is compared after every packet with hand-worked values,
// `reached` must rise at SUSP_TH, unknown addresses must be left alone, and
// the idle suspect must come out of the purge port with its SUSP_count only
// once purge_ready allows it.
module tb_suspicion_list;
  import sds_pkg::*;
  localparam int DEPTH = 4;
  localparam logic [7:0] FIN = 8'h01, SYN = 8'h02, RST = 8'h04, PSH = 8'h08, ACK = 8'h10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tick = 1; time_t now = 0; logic [7:0] susp_th = 8'd4;
  time_t check_interval = 1_000_000, timeout = 1_000_000;
  logic req_valid = 0, req_ready; susp_op_e req_op = SUSP_ADD; ip_t req_ip = 0, req_peer = 0;
  logic [7:0] req_flags = 0;
  logic resp_valid, resp_hit, resp_inserted, resp_full, resp_reached; logic [4:0] resp_count;
  logic purge_valid, purge_ready = 0; ip_t purge_ip; logic [4:0] purge_count; logic scanning;

  suspicion_list #(.DEPTH(DEPTH)) dut (.*);

  ip_t p_ip; int p_cnt = -1, p_n = 0;
  always_ff @(posedge clk) begin
    now <= now + 1;
    if (purge_valid) begin p_ip = purge_ip; p_cnt = int'(purge_count); p_n++; end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bit r_hit, r_ins, r_reached; int r_count;
  task automatic request(input susp_op_e op, input ip_t ip, input ip_t peer, input logic [7:0] fl);
    @(negedge clk); req_valid = 1; req_op = op; req_ip = ip; req_peer = peer; req_flags = fl;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    r_hit = resp_hit; r_ins = resp_inserted; r_reached = resp_reached; r_count = resp_count;
  endtask

  task automatic expect_count(input int c, input bit reached, input string what);
    chk(r_hit, {what, ": hit"});
    chk(r_count == c, $sformatf("%s: count %0d, expected %0d", what, r_count, c));
    chk(r_reached == reached, {what, ": reached"});
  endtask

  localparam ip_t S = 32'hC0A8_0A0B;
  localparam ip_t V1 = 32'h0A00_0001, V2 = 32'h0A00_0002, V3 = 32'h0A00_0003;
  localparam ip_t V4 = 32'h0A00_0004, V5 = 32'h0A00_0005;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    request(SUSP_SRC, S, V1, FIN);
    chk(!r_hit && !r_ins, "unknown address untouched");
    request(SUSP_ADD, S, V1, SYN);
    chk(!r_hit && r_ins && r_count == 0, "suspect entered");
    request(SUSP_ADD, S, V1, SYN);
    chk(r_hit && !r_ins, "second add only refreshes");
    request(SUSP_SRC, S, V1, FIN);               expect_count(1, 0, "invalid flags");
    request(SUSP_DST, S, V1, RST | ACK);         expect_count(2, 0, "RST+ACK received");
    request(SUSP_SRC, S, V2, SYN);               expect_count(2, 0, "first connection opened");
    request(SUSP_DST, S, V2, SYN | ACK);         expect_count(2, 0, "SYN+ACK");
    request(SUSP_SRC, S, V3, SYN);               expect_count(3, 0, "half-open probe counted");
    request(SUSP_DST, S, V3, SYN | ACK);         expect_count(3, 0, "SYN+ACK");
    request(SUSP_SRC, S, V3, ACK);               expect_count(3, 0, "ACK");
    request(SUSP_SRC, S, V4, SYN);               expect_count(4, 1, "no-data connection counted");
    request(SUSP_DST, S, V4, SYN | ACK);         expect_count(4, 1, "SYN+ACK");
    request(SUSP_SRC, S, V4, ACK);               expect_count(4, 1, "ACK");
    request(SUSP_SRC, S, V4, PSH | ACK);         expect_count(4, 1, "data");
    request(SUSP_DST, S, V4, ACK);               expect_count(4, 1, "data ack");
    request(SUSP_SRC, S, V4, PSH | ACK);         expect_count(4, 1, "data");
    request(SUSP_SRC, S, V5, SYN);               expect_count(4, 1, "data connection not counted");
    request(SUSP_DST, S, V2, RST | ACK);         expect_count(5, 1, "second RST+ACK");
    request(SUSP_DST, V1, S, ACK);
    chk(!r_hit, "peer is not a suspect");
    // purge held back until purge_ready
    timeout = 100; check_interval = 10;
    repeat (400) @(posedge clk);
    chk(p_n == 0, "no purge while not ready");
    purge_ready = 1;
    repeat (100) @(posedge clk);
    chk(p_n == 1 && p_ip == S && p_cnt == 5, $sformatf("purged %0d %h %0d", p_n, p_ip, p_cnt));
    request(SUSP_SRC, S, V1, FIN);
    chk(!r_hit, "suspect gone after purge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
