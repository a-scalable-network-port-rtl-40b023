// tb_config_regs: self-checking test of the register block. Checks the
// reset values, writes random values to every writable register and reads
// them back both through the register port and on the cfg output, checks
// that writes to read-only addresses change nothing, and that the status
// counters count the event pulses driven by the testbench.
module tb_config_regs;
  import sds_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic bus_wr = 0, bus_rd = 0; logic [4:0] bus_addr = 0; logic [31:0] bus_wdata = 0, bus_rdata;
  sds_cfg_t cfg; sds_events_t ev = '0; time_t now = 32'h1234; logic [31:0] scanner_count = 7;

  config_regs dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); bus_wr = 1; bus_addr = 5'(a); bus_wdata = d;
    @(negedge clk); bus_wr = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); bus_rd = 1; bus_addr = 5'(a);
    @(negedge clk); bus_rd = 0; d = bus_rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d, v [11];
    logic [31:0] rst_v [11] = '{32'hFFFF_FF00, 5, 5, 8, 60000, 60000, 3600000, 1000, 1000, 1000, 99999};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int a = 0; a < 11; a++) begin
      rd(a, d);
      chk(d == rst_v[a], $sformatf("reset value of %0d: %h", a, d));
    end
    for (int a = 0; a < 11; a++) begin
      v[a] = $urandom;
      if (a >= 1 && a <= 3) v[a] = v[a] & 32'hFF;
      wr(a, v[a]);
    end
    for (int a = 0; a < 11; a++) begin
      rd(a, d);
      chk(d == v[a], $sformatf("read back %0d", a));
    end
    chk(cfg.subnet_mask == v[0] && cfg.agg_th == v[1][7:0] && cfg.susp_th == v[2][7:0]
        && cfg.hash_th == v[3][7:0] && cfg.agg_timeout == v[4] && cfg.susp_timeout == v[5]
        && cfg.hash_timeout == v[6] && cfg.agg_check == v[7] && cfg.susp_check == v[8]
        && cfg.hash_check == v[9] && cfg.tick_div == v[10], "cfg output");
    wr(16, 32'hDEAD);
    wr(12, 32'hBEEF);
    chk(cfg.subnet_mask == v[0] && cfg.tick_div == v[10], "read-only writes ignored");
    // event counters
    for (int n = 0; n < 9; n++) begin
      @(negedge clk);
      ev = '0; ev.pkt = 1; ev.drop = (n % 3 == 0); ev.scanner_add = (n == 4);
      ev.susp_add = (n < 2); ev.hash_reached = (n == 8);
    end
    @(negedge clk); ev = '0;
    rd(16, d); chk(d == 9, "packet counter");
    rd(17, d); chk(d == 3, "drop counter");
    rd(18, d); chk(d == 1, "scanner counter");
    rd(19, d); chk(d == 2, "suspect counter");
    rd(20, d); chk(d == 1, "hash threshold counter");
    rd(21, d); chk(d == 32'h1234, "time");
    rd(22, d); chk(d == 7, "scanner rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
