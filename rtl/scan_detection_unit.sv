// scan_detection_unit: the controller that runs the detection algorithm on
// each packet header, by issuing requests to the five lists in turn.
//
// For an IPv4 header it does, in this order:
//   1. scanner list searched for source and destination; a hit drops the
//      packet and ends the work (non-TCP packets end here and pass);
//   2. for an RST+ACK reply, the aggregate destination list is checked for
//      the replier's subnet; a reply from a subnet nobody sent to is ignored
//      as spoofed. The destination's subnet is then entered in that list;
//   3. suspicion list updated for the source (as sender) and for the
//      destination (as receiver), if they are suspects;
//   4. the packet is "bad" if it carries invalid flags (subject: source) or
//      is a legitimate RST+ACK (subject: destination). For a bad packet the
//      hash table is probed for the subject;
//   5. aggregate source list updated for the subject's subnet (counting if
//      bad, entering the subnet if new);
//   6. a bad subject not yet suspected enters the suspicion list when its
//      hash row exists or its subnet's AGG_count reached AGG_TH;
//   7. every address whose SUSP_count or HASH_count reached its threshold is
//      added to the scanner list; the packet is dropped if its source or
//      destination was blocked before or during this work.
// The decision is given on decision_valid/decision_drop. Between packets the
// unit takes suspects purged from the suspicion list (held in a one-entry
// buffer), adds their SUSP_count to the hash table and blocks the address if
// HASH_count reaches HASH_TH. A waiting purged suspect is served before the
// next header (hdr_ready stays low meanwhile, 4 to 7 cycles): with headers
// arriving back to back it would otherwise wait forever, and the suspicion
// list's time-out scan, which holds its delete until the buffer is free,
// would stall with it.
//
// hash_req_amount is 8 bits wide to match HASH_count, but it carries either 1
// or a 5-bit SUSP_count, so its top three bits are always zero.
// Timing: each list request takes two or three cycles plus one cycle of this
// controller; a TCP header that blocks nothing takes 20 to 28 cycles.
// The algorithm steps follow the described one; their exact order, the
// choice of the subject address and the purge buffer are this design's.
module scan_detection_unit
  import sds_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // header in, decision out
  input  logic        hdr_valid,
  output logic        hdr_ready,
  input  pkt_hdr_t    hdr,
  output logic        decision_valid,
  output logic        decision_drop,
  // scanner list
  output logic        scn_req_valid,
  input  logic        scn_req_ready,
  output logic        scn_req_add,
  output ip_t         scn_req_ip,
  input  logic        scn_resp_valid,
  input  logic        scn_resp_hit,
  input  logic        scn_resp_added,
  // aggregate destination list
  output logic        adst_req_valid,
  input  logic        adst_req_ready,
  output ip_t         adst_req_ip,
  output logic        adst_req_touch,
  input  logic        adst_resp_valid,
  input  logic        adst_resp_hit,
  // aggregate source list
  output logic        agg_req_valid,
  input  logic        agg_req_ready,
  output ip_t         agg_req_ip,
  output logic        agg_req_incr,
  input  logic        agg_resp_valid,
  input  logic        agg_resp_reached,
  // suspicion list
  output logic        susp_req_valid,
  input  logic        susp_req_ready,
  output susp_op_e    susp_req_op,
  output ip_t         susp_req_ip,
  output ip_t         susp_req_peer,
  output logic [7:0]  susp_req_flags,
  input  logic        susp_resp_valid,
  input  logic        susp_resp_hit,
  input  logic        susp_resp_inserted,
  input  logic        susp_resp_reached,
  input  logic        susp_purge_valid,
  output logic        susp_purge_ready,
  input  ip_t         susp_purge_ip,
  input  logic [CNT_W-1:0] susp_purge_count,
  // hash table
  output logic        hash_req_valid,
  input  logic        hash_req_ready,
  output hash_op_e    hash_req_op,
  output ip_t         hash_req_ip,
  output logic [7:0]  hash_req_amount,
  input  logic        hash_resp_valid,
  input  logic        hash_resp_hit,
  input  logic        hash_resp_reached,
  input  ip_t         hash_resp_ip,
  // status
  output sds_events_t ev
);
  typedef enum logic [4:0] {
    U_IDLE, U_SCN_S, U_SCN_D, U_ADST_CHK, U_ADST_TOUCH, U_SUSP_S, U_SUSP_D,
    U_HASH_PROBE, U_AGG, U_SUSP_ADD, U_BLK_S, U_BLK_D, U_BLK_H, U_DECIDE,
    U_PURGE_HASH, U_PURGE_BLK
  } ustate_t;

  ustate_t   state;
  logic      issued;
  pkt_hdr_t  h;
  logic      drop_q, legit_q, hit_s, hit_d, reach_s, reach_d;
  logic      hash_hit_q, hash_reach_q;
  ip_t       hash_ip_q;
  logic      pend_valid;
  ip_t       pend_ip;
  logic [CNT_W-1:0] pend_cnt;

  logic rst_ack, invalid, bad, subj_is_src, subj_in_susp;
  ip_t  subject, other;

  assign rst_ack      = is_rst_ack(h.flags);
  assign invalid      = is_invalid_flags(h.flags);
  assign bad          = invalid || (rst_ack && legit_q);
  assign subj_is_src  = invalid || !rst_ack;
  assign subject      = subj_is_src ? h.sip : h.dip;
  assign other        = subj_is_src ? h.dip : h.sip;
  assign subj_in_susp = subj_is_src ? hit_s : hit_d;

  // conditional steps are skipped without a request
  logic step_needed;
  always_comb begin
    unique case (state)
      U_BLK_S:     step_needed = reach_s;
      U_BLK_D:     step_needed = reach_d;
      U_BLK_H:     step_needed = hash_reach_q;
      default:     step_needed = 1'b1;
    endcase
  end

  // request outputs
  always_comb begin
    scn_req_valid  = 1'b0; scn_req_add = 1'b0; scn_req_ip = h.sip;
    adst_req_valid = 1'b0; adst_req_ip = h.sip; adst_req_touch = 1'b0;
    agg_req_valid  = 1'b0; agg_req_ip = subject; agg_req_incr = bad;
    susp_req_valid = 1'b0; susp_req_op = SUSP_SRC; susp_req_ip = h.sip;
    susp_req_peer  = h.dip; susp_req_flags = h.flags;
    hash_req_valid = 1'b0; hash_req_op = HASH_PROBE; hash_req_ip = subject;
    hash_req_amount = 8'd1;
    unique case (state)
      U_SCN_S:      scn_req_valid = !issued;
      U_SCN_D:      begin scn_req_valid = !issued; scn_req_ip = h.dip; end
      U_ADST_CHK:   adst_req_valid = !issued;
      U_ADST_TOUCH: begin adst_req_valid = !issued; adst_req_ip = h.dip; adst_req_touch = 1'b1; end
      U_SUSP_S:     susp_req_valid = !issued;
      U_SUSP_D:     begin
                      susp_req_valid = !issued; susp_req_op = SUSP_DST;
                      susp_req_ip = h.dip; susp_req_peer = h.sip;
                    end
      U_HASH_PROBE: hash_req_valid = !issued;
      U_AGG:        agg_req_valid = !issued;
      U_SUSP_ADD:   begin
                      susp_req_valid = !issued; susp_req_op = SUSP_ADD;
                      susp_req_ip = subject; susp_req_peer = other;
                    end
      U_BLK_S:      begin scn_req_valid = !issued && reach_s; scn_req_add = 1'b1; end
      U_BLK_D:      begin scn_req_valid = !issued && reach_d; scn_req_add = 1'b1; scn_req_ip = h.dip; end
      U_BLK_H:      begin scn_req_valid = !issued && hash_reach_q; scn_req_add = 1'b1; scn_req_ip = hash_ip_q; end
      U_PURGE_HASH: begin
                      hash_req_valid = !issued; hash_req_op = HASH_ADD;
                      hash_req_ip = pend_ip; hash_req_amount = 8'(pend_cnt);
                    end
      U_PURGE_BLK:  begin scn_req_valid = !issued; scn_req_add = 1'b1; scn_req_ip = hash_ip_q; end
      default: ;
    endcase
  end

  wire req_fire = (scn_req_valid && scn_req_ready) || (adst_req_valid && adst_req_ready)
               || (agg_req_valid && agg_req_ready) || (susp_req_valid && susp_req_ready)
               || (hash_req_valid && hash_req_ready);
  wire resp = scn_resp_valid || adst_resp_valid || agg_resp_valid
           || susp_resp_valid || hash_resp_valid;
  wire step_done = issued ? resp : !step_needed;

  assign hdr_ready        = (state == U_IDLE) && !pend_valid;
  assign decision_valid   = (state == U_DECIDE);
  assign susp_purge_ready = !pend_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= U_IDLE; issued <= 1'b0; h <= '0;
      drop_q <= 1'b0; legit_q <= 1'b0; hit_s <= 1'b0; hit_d <= 1'b0;
      reach_s <= 1'b0; reach_d <= 1'b0; hash_hit_q <= 1'b0;
      hash_reach_q <= 1'b0; hash_ip_q <= '0;
      pend_valid <= 1'b0; pend_ip <= '0; pend_cnt <= '0;
    end else begin
      if (susp_purge_valid && !pend_valid) begin
        pend_valid <= 1'b1;
        pend_ip    <= susp_purge_ip;
        pend_cnt   <= susp_purge_count;
      end
      if (req_fire) issued <= 1'b1;
      if (step_done) issued <= 1'b0;

      unique case (state)
        U_IDLE: begin
          drop_q <= 1'b0; legit_q <= 1'b0; hit_s <= 1'b0; hit_d <= 1'b0;
          reach_s <= 1'b0; reach_d <= 1'b0; hash_hit_q <= 1'b0;
          hash_reach_q <= 1'b0;
          if (pend_valid) begin
            state <= U_PURGE_HASH;
          end else if (hdr_valid) begin
            h     <= hdr;
            state <= hdr.is_ipv4 ? U_SCN_S : U_DECIDE;
          end
        end
        U_SCN_S: if (step_done) begin
          if (scn_resp_hit) begin drop_q <= 1'b1; state <= U_DECIDE; end
          else state <= U_SCN_D;
        end
        U_SCN_D: if (step_done) begin
          if (scn_resp_hit) begin drop_q <= 1'b1; state <= U_DECIDE; end
          else if (!h.is_tcp) state <= U_DECIDE;
          else if (rst_ack)   state <= U_ADST_CHK;
          else                state <= U_ADST_TOUCH;
        end
        U_ADST_CHK: if (step_done) begin
          legit_q <= adst_resp_hit;
          state   <= U_ADST_TOUCH;
        end
        U_ADST_TOUCH: if (step_done) state <= U_SUSP_S;
        U_SUSP_S: if (step_done) begin
          hit_s   <= susp_resp_hit;
          reach_s <= susp_resp_reached;
          state   <= U_SUSP_D;
        end
        U_SUSP_D: if (step_done) begin
          hit_d   <= susp_resp_hit;
          reach_d <= susp_resp_reached;
          state   <= bad ? U_HASH_PROBE : U_AGG;
        end
        U_HASH_PROBE: if (step_done) begin
          hash_hit_q   <= hash_resp_hit;
          hash_reach_q <= hash_resp_reached;
          hash_ip_q    <= hash_resp_ip;
          state        <= U_AGG;
        end
        U_AGG: if (step_done) begin
          state <= (bad && !subj_in_susp && (hash_hit_q || agg_resp_reached))
                   ? U_SUSP_ADD : U_BLK_S;
        end
        U_SUSP_ADD: if (step_done) state <= U_BLK_S;
        U_BLK_S: if (step_done) begin
          if (issued) drop_q <= 1'b1;
          state <= U_BLK_D;
        end
        U_BLK_D: if (step_done) begin
          if (issued) drop_q <= 1'b1;
          state <= U_BLK_H;
        end
        U_BLK_H: if (step_done) begin
          if (issued && (hash_ip_q == h.sip || hash_ip_q == h.dip)) drop_q <= 1'b1;
          state <= U_DECIDE;
        end
        U_DECIDE: state <= U_IDLE;
        U_PURGE_HASH: if (step_done) begin
          pend_valid <= 1'b0;
          hash_ip_q  <= hash_resp_ip;
          state      <= hash_resp_reached ? U_PURGE_BLK : U_IDLE;
        end
        U_PURGE_BLK: if (step_done) state <= U_IDLE;
        default: state <= U_IDLE;
      endcase
    end
  end

  assign decision_drop = drop_q;

  always_comb begin
    ev              = '0;
    ev.pkt          = decision_valid;
    ev.drop         = decision_valid && drop_q;
    ev.spoof        = (state == U_ADST_CHK) && step_done && !adst_resp_hit;
    ev.agg_reached  = agg_resp_valid && agg_resp_reached;
    ev.hash_hit     = (state == U_HASH_PROBE) && hash_resp_valid && hash_resp_hit;
    ev.susp_add     = susp_resp_valid && susp_resp_inserted;
    ev.susp_reached = susp_resp_valid && susp_resp_reached;
    ev.hash_add     = (state == U_PURGE_HASH) && hash_resp_valid;
    ev.hash_reached = hash_resp_valid && hash_resp_reached;
    ev.scanner_add  = scn_resp_valid && scn_resp_added;
  end

endmodule
