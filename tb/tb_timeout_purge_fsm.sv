// tb_timeout_purge_fsm: self-checking test of the time-out scan. An 8-row
// list is modelled in the testbench (valid bits and arrival times, read one
// cycle after the scan's read enable). The test checks that exactly the rows
// older than the time-out are deleted, that nothing is deleted while the list
// is busy, that a row rewritten during its check survives, that purge_ready
// holds the delete back, and that a full scan of a quiet list takes the
// expected number of cycles (4 per row).
module tb_timeout_purge_fsm;
  import sds_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tick = 1; time_t now = 0; time_t check_interval = 0; time_t timeout = 100;
  logic b_en; logic [2:0] b_addr; logic row_valid; time_t row_arrival; logic rd_latch;
  logic busy = 0, wr_en = 0; logic [2:0] wr_addr = 0; logic purge_ready = 1;
  logic del_en; logic [2:0] del_addr; logic scanning;

  timeout_purge_fsm #(.DEPTH(DEPTH)) dut (.*);

  logic  v   [DEPTH];
  time_t arr [DEPTH];
  int    deleted [DEPTH];
  int    del_while_busy = 0, del_while_not_ready = 0;

  assign row_valid = v[b_addr];
  always_ff @(posedge clk) begin
    now <= now + 1;
    if (b_en) row_arrival <= arr[b_addr];
    if (del_en) begin
      deleted[del_addr]++;
      v[del_addr] <= 1'b0;
      if (busy) del_while_busy++;
      if (!purge_ready) del_while_not_ready++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_scan_done();
    // wait for a scan to start and end
    while (!scanning) @(posedge clk);
    while (scanning) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, t1;
    check_interval = 1_000_000;  // hold the scan back during set-up
    for (int i = 0; i < DEPTH; i++) begin v[i] = 0; arr[i] = 0; deleted[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (300) @(posedge clk);
    // rows 1, 4 and 6 are old, rows 0, 2 and 5 are fresh, 3 and 7 empty
    v[0] = 1; arr[0] = now - 10;
    v[1] = 1; arr[1] = now - 200;
    v[2] = 1; arr[2] = now - 50;
    v[4] = 1; arr[4] = now - 100;
    v[5] = 1; arr[5] = now;
    v[6] = 1; arr[6] = now - 250;
    check_interval = 0;
    wait_scan_done();
    check_interval = 1_000_000;
    for (int i = 0; i < DEPTH; i++)
      chk(deleted[i] == ((i == 1 || i == 4 || i == 6) ? 1 : 0), $sformatf("row %0d deletions %0d", i, deleted[i]));

    // a quiet list: 4 cycles per row plus start
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) v[i] = 0;
    check_interval = 0;
    t0 = $time / 10;
    wait_scan_done();
    t1 = $time / 10;
    check_interval = 1_000_000;
    chk((t1 - t0) >= 4 * DEPTH && (t1 - t0) <= 4 * DEPTH + 3, $sformatf("scan length %0d cycles", t1 - t0));

    // busy list: delete waits until busy falls
    for (int i = 0; i < DEPTH; i++) deleted[i] = 0;
    @(negedge clk); v[3] = 1; arr[3] = now - 500; busy = 1;
    check_interval = 0;
    repeat (200) @(posedge clk);
    chk(deleted[3] == 0, "no delete while busy");
    @(negedge clk); busy = 0;
    wait_scan_done();
    check_interval = 1_000_000;
    chk(deleted[3] == 1, "delete after busy");

    // purge_ready low: the delete is held back
    @(negedge clk); v[2] = 1; arr[2] = now - 500; purge_ready = 0; deleted[2] = 0;
    check_interval = 0;
    repeat (200) @(posedge clk);
    chk(deleted[2] == 0, "no delete while not ready");
    @(negedge clk); purge_ready = 1;
    wait_scan_done();
    check_interval = 1_000_000;
    chk(deleted[2] == 1, "delete after ready");

    // a row rewritten while waiting survives
    @(negedge clk); v[7] = 1; arr[7] = now - 500; busy = 1; deleted[7] = 0;
    check_interval = 0;
    repeat (100) @(posedge clk);
    @(negedge clk); wr_en = 1; wr_addr = 3'd7; arr[7] = now;
    @(negedge clk); wr_en = 0; busy = 0;
    wait_scan_done();
    check_interval = 1_000_000;
    chk(deleted[7] == 0, "rewritten row kept");
    chk(v[7] == 1, "rewritten row still valid");

    chk(del_while_busy == 0, "never deleted while busy");
    chk(del_while_not_ready == 0, "never deleted while not ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
