// header_extraction_unit: copies the fields the scan detection needs out of
// an Ethernet frame while the frame streams into a memory bank.
//
// Bytes arrive one per cycle on in_valid/in_data, the last one flagged by
// in_last. A byte counter locates the fields of an untagged Ethernet II
// frame carrying IPv4: EtherType (bytes 12-13), version and header length
// (byte 14), protocol (byte 23), source address (26-29), destination address
// (30-33) and, for TCP, the flags byte at 14 + 4*IHL + 13. One cycle after
// the last byte, hdr_valid pulses with the header registers (is_ipv4,
// is_tcp, sip, dip, flags) and len, the frame length in bytes. A frame too
// short to hold a field is marked as not IPv4 or not TCP.
// The unit's place in the transfer engine and its role follow the described
// system; the byte-wide stream and the field offsets (standard Ethernet II,
// IPv4 and TCP layouts) are this design's.
module header_extraction_unit
  import sds_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_last,
  output logic        hdr_valid,
  output pkt_hdr_t    hdr,
  output logic [15:0] len
);
  logic [15:0] idx;
  logic [15:0] etype;
  logic [3:0]  ver, ihl;
  logic [7:0]  proto, flags;
  ip_t         sip, dip;
  logic        flags_seen;

  // field registers including the byte of this cycle
  logic [15:0] etype_n;
  logic [3:0]  ver_n, ihl_n;
  logic [7:0]  proto_n, flags_n;
  ip_t         sip_n, dip_n;
  logic        flags_seen_n;
  logic [15:0] flags_off;

  assign flags_off = 16'd14 + {10'd0, ihl, 2'b00} + 16'd13;

  always_comb begin
    etype_n = etype; ver_n = ver; ihl_n = ihl; proto_n = proto;
    sip_n = sip; dip_n = dip; flags_n = flags; flags_seen_n = flags_seen;
    if (idx == 16'd0) begin
      // a new frame: forget the previous one
      etype_n = '0; ver_n = '0; ihl_n = '0; proto_n = '0;
      sip_n = '0; dip_n = '0; flags_n = '0; flags_seen_n = 1'b0;
    end
    if (in_valid) begin
      if (idx == 16'd12) etype_n[15:8] = in_data;
      if (idx == 16'd13) etype_n[7:0]  = in_data;
      if (idx == 16'd14) begin ver_n = in_data[7:4]; ihl_n = in_data[3:0]; end
      if (idx == 16'd23) proto_n = in_data;
      if (idx >= 16'd26 && idx <= 16'd29) sip_n = {sip_n[23:0], in_data};
      if (idx >= 16'd30 && idx <= 16'd33) dip_n = {dip_n[23:0], in_data};
      if (idx > 16'd14 && idx == flags_off) begin
        flags_n      = in_data;
        flags_seen_n = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; etype <= '0; ver <= '0; ihl <= '0; proto <= '0;
      sip <= '0; dip <= '0; flags <= '0; flags_seen <= 1'b0;
      hdr_valid <= 1'b0; hdr <= '0; len <= '0;
    end else begin
      hdr_valid <= in_valid && in_last;
      if (in_valid) begin
        etype <= etype_n; ver <= ver_n; ihl <= ihl_n; proto <= proto_n;
        sip <= sip_n; dip <= dip_n; flags <= flags_n; flags_seen <= flags_seen_n;
        if (in_last) begin
          idx         <= '0;
          len         <= idx + 1'b1;
          hdr.is_ipv4 <= (etype_n == 16'h0800) && (ver_n == 4'd4) && (ihl_n >= 4'd5)
                         && (idx >= 16'd33);
          hdr.is_tcp  <= (etype_n == 16'h0800) && (ver_n == 4'd4) && (ihl_n >= 4'd5)
                         && (proto_n == 8'd6) && flags_seen_n;
          hdr.sip     <= sip_n;
          hdr.dip     <= dip_n;
          hdr.flags   <= flags_n;
        end else if (idx != 16'hFFFF) begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
