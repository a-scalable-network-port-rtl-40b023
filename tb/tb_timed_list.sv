// tb_timed_list: self-checking test of the CAM + block RAM list. With a
// counter as the owner's update logic (new data = old data + 1), it checks
// insertion of new keys, hits on stored keys, the full condition, look-ups
// that do not write, the three-cycle request latency, and the time-out purge,
// which must hand out every idle key with its data and leave rows that are
// kept busy alone.
module tb_timed_list;
  import sds_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tick = 1; time_t now = 0; time_t check_interval = 1_000_000; time_t timeout = 1_000_000;
  logic req_valid = 0, req_ready; logic [31:0] req_key = 0;
  logic cur_valid, cur_hit; logic [7:0] cur_data; logic upd_write; logic [7:0] upd_data;
  logic resp_valid, resp_hit, resp_inserted, resp_full; logic [1:0] resp_addr;
  logic purge_valid, purge_ready = 1; logic [31:0] purge_key; logic [7:0] purge_data; logic scanning;
  logic want_write = 1;

  assign upd_write = want_write;
  assign upd_data  = cur_data + 8'd1;

  timed_list #(.DEPTH(DEPTH), .KEY_W(32), .DATA_W(8)) dut (.*);

  always_ff @(posedge clk) now <= now + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bit r_hit, r_ins, r_full; logic [7:0] r_data; int r_lat;
  task automatic request(input logic [31:0] k, input bit wr);
    int t0;
    @(negedge clk); req_valid = 1; req_key = k; want_write = wr;
    while (!req_ready) @(negedge clk);
    t0 = $time / 10;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    r_lat = $time / 10 - t0; r_hit = resp_hit; r_ins = resp_inserted; r_full = resp_full;
    r_data = upd_data;
  endtask

  int purged [logic [31:0]];
  always_ff @(posedge clk) if (purge_valid) begin
    purged[purge_key] = int'(purge_data);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] k [5];
    for (int i = 0; i < 5; i++) k[i] = 32'h0A00_0000 + 32'(i * 7 + 1);
    repeat (3) @(posedge clk); rst_n = 1;
    request(k[0], 1);
    chk(!r_hit && r_ins && r_data == 1, "first insert");
    chk(r_lat == 2, $sformatf("latency %0d", r_lat));
    request(k[0], 1);
    chk(r_hit && !r_ins && r_data == 2, "second hit");
    request(k[1], 0);
    chk(!r_hit && !r_ins && !r_full, "look-up only miss");
    for (int i = 1; i < 4; i++) begin
      request(k[i], 1);
      chk(!r_hit && r_ins, $sformatf("insert %0d", i));
    end
    request(k[4], 1);
    chk(!r_hit && !r_ins && r_full, "full");
    for (int i = 0; i < 4; i++) begin
      request(k[i], 1);
      chk(r_hit && r_data == ((i == 0) ? 3 : 2), $sformatf("hit %0d data %0d", i, r_data));
    end
    // time-out: keep k[2] alive, let the others go idle
    timeout = 200; check_interval = 20;
    for (int n = 0; n < 30; n++) begin
      request(k[2], 1);
      repeat (20) @(posedge clk);
    end
    chk(purged.exists(k[0]) && purged[k[0]] == 3, "k0 purged with data 3");
    chk(purged.exists(k[1]) && purged[k[1]] == 2, "k1 purged with data 2");
    chk(purged.exists(k[3]) && purged[k[3]] == 2, "k3 purged with data 2");
    chk(!purged.exists(k[2]), "busy k2 kept");
    timeout = 1_000_000;
    request(k[0], 0);
    chk(!r_hit, "k0 gone");
    request(k[2], 0);
    chk(r_hit, "k2 still there");
    request(k[4], 1);
    chk(!r_hit && r_ins, "room again after purge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
