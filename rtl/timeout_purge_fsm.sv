// timeout_purge_fsm: periodic time-out check and purge of the rows of one list.
//
// Every check_interval time units (tick pulses) the machine walks all DEPTH
// rows through the list memory's second port: GENERATE NEW ADDRESS, START
// BRAM READ, READ BRAM DATA, CHECK BRAM DATA. A row whose valid bit is set
// and whose arrival time lies at least `timeout` units in the past is timed
// out: the machine waits until the CAM and the list are free (WAIT FOR CAM TO
// GET FREE) and then deletes the row for exactly one cycle (DELETE ENTRY IN
// CAM, del_en). After the last row it returns to START. Because the scan uses
// its own memory port and only the one-cycle delete needs the list, packet
// processing is never stalled: the scan steals idle cycles.
// Timing: a row that is not timed out takes 4 cycles (new address, read,
// data, check), so a full scan of DEPTH rows takes about 4*DEPTH cycles plus
// 2 cycles (wait, delete) for each purged row, more if the list is busy.
//
// Interface: b_en/b_addr drive the list memory's scan port; row_valid and
// row_arrival are the valid bit and arrival time of the row read (sampled in
// READ BRAM DATA, one cycle after START BRAM READ); busy is high while the
// list is serving a packet; wr_en/wr_addr report every packet-side write so
// a row rewritten during its check is not purged; purge_ready lets the
// consumer of purged rows hold the delete back.
//
// The state names and their order follow the purge state machine of the
// aggregate list; the interval counter, the rewrite guard and purge_ready are
// this design's own.
module timeout_purge_fsm
  import sds_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  time_t         now,
  input  time_t         check_interval,
  input  time_t         timeout,
  // scan port
  output logic          b_en,
  output logic [AW-1:0] b_addr,
  input  logic          row_valid,
  input  time_t         row_arrival,
  output logic          rd_latch,
  // synchronisation with the packet side
  input  logic          busy,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic          purge_ready,
  // delete command
  output logic          del_en,
  output logic [AW-1:0] del_addr,
  output logic          scanning
);
  typedef enum logic [2:0] {
    S_START, S_GEN_ADDR, S_BRAM_RD_START, S_BRAM_RD, S_CHECK, S_WAIT_CAM, S_DELETE
  } state_t;

  state_t        state;
  logic [AW-1:0] row;
  logic          first;
  time_t         interval_cnt;
  logic          valid_q;
  time_t         arrival_q;
  logic          touched;
  logic          last_row;
  logic          timed_out;

  assign last_row  = (row == AW'(DEPTH - 1));
  assign timed_out = valid_q && !touched && ((now - arrival_q) >= timeout);

  assign b_en     = (state == S_BRAM_RD_START);
  assign b_addr   = row;
  assign rd_latch = (state == S_BRAM_RD);
  assign del_en   = (state == S_DELETE);
  assign del_addr = row;
  assign scanning = (state != S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_START;
      row          <= '0;
      first        <= 1'b1;
      interval_cnt <= '0;
      valid_q      <= 1'b0;
      arrival_q    <= '0;
      touched      <= 1'b0;
    end else begin
      if (wr_en && wr_addr == row) touched <= 1'b1;
      case (state)
        S_START: begin
          if (tick) interval_cnt <= interval_cnt + 1'b1;
          if (interval_cnt >= check_interval) begin
            interval_cnt <= '0;
            first        <= 1'b1;
            state        <= S_GEN_ADDR;
          end
        end
        S_GEN_ADDR: begin
          row     <= first ? '0 : row + 1'b1;
          first   <= 1'b0;
          touched <= 1'b0;
          state   <= S_BRAM_RD_START;
        end
        S_BRAM_RD_START: state <= S_BRAM_RD;
        S_BRAM_RD: begin
          valid_q   <= row_valid;
          arrival_q <= row_arrival;
          state     <= S_CHECK;
        end
        S_CHECK: begin
          if (timed_out)     state <= S_WAIT_CAM;
          else if (last_row) state <= S_START;
          else               state <= S_GEN_ADDR;
        end
        S_WAIT_CAM: begin
          if (touched)                    state <= last_row ? S_START : S_GEN_ADDR;
          else if (!busy && purge_ready)  state <= S_DELETE;
        end
        S_DELETE: state <= last_row ? S_START : S_GEN_ADDR;
        default: state <= S_START;
      endcase
    end
  end

endmodule
