// transfer_engine: moves frames from the MAC receive FIFOs through memory
// banks to the MAC transmit FIFOs, holding each frame until the scan
// detection decides to pass or drop it.
//
// Receive (DMA): when the next memory bank in round-robin order is empty and
// a MAC offers a frame (rx_valid), the engine locks onto that MAC (round
// robin between MACs) and copies the frame byte by byte into the bank. The
// header extraction unit watches the same bytes. One cycle after the last
// byte the bank is marked full together with its header, length and source
// MAC. Bytes beyond BANK_DEPTH are discarded and such a frame is dropped.
// Processing: banks are handled in the order they were filled. The bank's
// header is offered to the scan detection unit (hdr_valid/hdr_ready); on
// decision_valid the frame is either discarded or copied out of the bank to
// the transmit stream of the other MAC (MAC i forwards to MAC i+1 modulo
// NUM_MACS), after which the bank is free again.
// Streams are byte wide with valid/ready and a last flag; the transmit side
// sends one byte every two cycles (one cycle to read the bank, one to hand
// the byte over).
//
// Memory banks in block RAM, a DMA filling an empty bank with a complete
// frame, header extraction registers and the pass/drop copy to the transmit
// FIFO follow the described transfer engine; the number and depth of the
// banks, the byte-wide streams and the forwarding rule are this design's.
module transfer_engine
  import sds_pkg::*;
#(
  parameter int unsigned NUM_MACS   = 2,
  parameter int unsigned NUM_BANKS  = 2,
  parameter int unsigned BANK_DEPTH = 2048,
  localparam int unsigned BW = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned MW = (NUM_MACS > 1) ? $clog2(NUM_MACS) : 1,
  localparam int unsigned DW = $clog2(BANK_DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  // MAC receive FIFOs
  input  logic [NUM_MACS-1:0] rx_valid,
  output logic [NUM_MACS-1:0] rx_ready,
  input  logic [7:0]          rx_data [NUM_MACS],
  input  logic [NUM_MACS-1:0] rx_last,
  // MAC transmit FIFOs
  output logic [NUM_MACS-1:0] tx_valid,
  input  logic [NUM_MACS-1:0] tx_ready,
  output logic [7:0]          tx_data [NUM_MACS],
  output logic [NUM_MACS-1:0] tx_last,
  // scan detection unit
  output logic     hdr_valid,
  input  logic     hdr_ready,
  output pkt_hdr_t hdr,
  input  logic     decision_valid,
  input  logic     decision_drop,
  // status pulses
  output logic     frame_passed,
  output logic     frame_dropped
);
  typedef enum logic [2:0] {P_IDLE, P_HDR, P_WAIT, P_TX_RD, P_TX_SEND, P_FREE} pstate_t;

  // bank bookkeeping
  logic [NUM_BANKS-1:0] bank_full;
  pkt_hdr_t             bank_hdr [NUM_BANKS];
  logic [15:0]          bank_len [NUM_BANKS];
  logic [MW-1:0]        bank_src [NUM_BANKS];
  logic [NUM_BANKS-1:0] bank_ovf;

  // receive side
  logic          rx_active;
  logic [MW-1:0] rx_sel, rr_mac;
  logic [BW-1:0] wr_ptr, fin_bank;
  logic [15:0]   wr_cnt;
  logic          cur_valid, cur_last, rx_fire;
  logic [7:0]    cur_data;
  logic          pick_found;
  logic [MW-1:0] pick_mac;

  // processing side
  pstate_t       pstate;
  logic [BW-1:0] rd_ptr;
  logic [15:0]   rd_cnt;
  logic [MW-1:0] dst_mac;

  // header extraction
  logic        heu_valid;
  pkt_hdr_t    heu_hdr;
  logic [15:0] heu_len;

  // bank ports
  logic [7:0] bank_rdata [NUM_BANKS];

  function automatic logic [BW-1:0] next_bank(input logic [BW-1:0] b);
    return (b == BW'(NUM_BANKS - 1)) ? '0 : b + 1'b1;
  endfunction

  // round-robin choice of the MAC whose frame is taken next
  always_comb begin
    pick_found = 1'b0;
    pick_mac   = '0;
    for (int k = NUM_MACS - 1; k >= 0; k--) begin
      int unsigned m;
      m = (int'(rr_mac) + k) % NUM_MACS;
      if (rx_valid[m]) begin
        pick_found = 1'b1;
        pick_mac   = MW'(m);
      end
    end
  end

  always_comb begin
    rx_ready = '0;
    if (rx_active) rx_ready[rx_sel] = 1'b1;
  end
  assign cur_valid = rx_active && rx_valid[rx_sel];
  assign cur_data  = rx_data[rx_sel];
  assign cur_last  = rx_last[rx_sel];
  assign rx_fire   = cur_valid;

  header_extraction_unit u_heu (
    .clk, .rst_n,
    .in_valid (rx_fire),
    .in_data  (cur_data),
    .in_last  (cur_last),
    .hdr_valid(heu_valid),
    .hdr      (heu_hdr),
    .len      (heu_len)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic a_en;
    assign a_en = rx_fire && (wr_ptr == BW'(b)) && (wr_cnt < 16'(BANK_DEPTH));
    dp_ram #(.DEPTH(BANK_DEPTH), .WIDTH(8)) u_mem (
      .clk,
      .a_en    (a_en),
      .a_we    (a_en),
      .a_addr  (wr_cnt[DW-1:0]),
      .a_wdata (cur_data),
      .a_rdata (),
      .b_en    ((pstate == P_TX_RD) && (rd_ptr == BW'(b))),
      .b_we    (1'b0),
      .b_addr  (rd_cnt[DW-1:0]),
      .b_wdata (8'd0),
      .b_rdata (bank_rdata[b])
    );
  end

  assign dst_mac   = (NUM_MACS == 1) ? '0 : MW'((int'(bank_src[rd_ptr]) + 1) % NUM_MACS);
  assign hdr_valid = (pstate == P_HDR);
  assign hdr       = bank_hdr[rd_ptr];

  always_comb begin
    tx_valid = '0;
    tx_last  = '0;
    for (int m = 0; m < NUM_MACS; m++) tx_data[m] = bank_rdata[rd_ptr];
    if (pstate == P_TX_SEND) begin
      tx_valid[dst_mac] = 1'b1;
      tx_last[dst_mac]  = (rd_cnt == bank_len[rd_ptr] - 1'b1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_full <= '0;
      bank_ovf  <= '0;
      for (int b = 0; b < NUM_BANKS; b++) begin
        bank_hdr[b] <= '0;
        bank_len[b] <= '0;
        bank_src[b] <= '0;
      end
      rx_active <= 1'b0; rx_sel <= '0; rr_mac <= '0;
      wr_ptr <= '0; fin_bank <= '0; wr_cnt <= '0;
      pstate <= P_IDLE; rd_ptr <= '0; rd_cnt <= '0;
      frame_passed <= 1'b0; frame_dropped <= 1'b0;
    end else begin
      frame_passed  <= 1'b0;
      frame_dropped <= 1'b0;

      // receive (DMA into the next empty bank)
      if (!rx_active) begin
        if (pick_found && !bank_full[wr_ptr] && !(heu_valid && fin_bank == wr_ptr)) begin
          rx_active <= 1'b1;
          rx_sel    <= pick_mac;
          rr_mac    <= MW'((int'(pick_mac) + 1) % NUM_MACS);
          wr_cnt    <= '0;
        end
      end else if (rx_fire) begin
        if (cur_last) begin
          rx_active        <= 1'b0;
          fin_bank         <= wr_ptr;
          bank_src[wr_ptr] <= rx_sel;
          bank_ovf[wr_ptr] <= (wr_cnt >= 16'(BANK_DEPTH));
          wr_ptr           <= next_bank(wr_ptr);
        end else if (wr_cnt != 16'hFFFF) begin
          wr_cnt <= wr_cnt + 1'b1;
        end
      end
      if (heu_valid) begin
        bank_full[fin_bank] <= 1'b1;
        bank_hdr[fin_bank]  <= heu_hdr;
        bank_len[fin_bank]  <= heu_len;
      end

      // processing
      unique case (pstate)
        P_IDLE: if (bank_full[rd_ptr]) begin
          rd_cnt <= '0;
          pstate <= bank_ovf[rd_ptr] ? P_FREE : P_HDR;
          if (bank_ovf[rd_ptr]) frame_dropped <= 1'b1;
        end
        P_HDR:  if (hdr_ready) pstate <= P_WAIT;
        P_WAIT: if (decision_valid) begin
          if (decision_drop) begin
            frame_dropped <= 1'b1;
            pstate        <= P_FREE;
          end else begin
            pstate <= P_TX_RD;
          end
        end
        P_TX_RD: pstate <= P_TX_SEND;
        P_TX_SEND: if (tx_ready[dst_mac]) begin
          if (rd_cnt == bank_len[rd_ptr] - 1'b1) begin
            frame_passed <= 1'b1;
            pstate       <= P_FREE;
          end else begin
            rd_cnt <= rd_cnt + 1'b1;
            pstate <= P_TX_RD;
          end
        end
        P_FREE: begin
          bank_full[rd_ptr] <= 1'b0;
          rd_ptr            <= next_bank(rd_ptr);
          pstate            <= P_IDLE;
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end

endmodule
