// tb_frame_pkg: builds Ethernet II frames for the testbenches. A frame is an
// untagged Ethernet header (EtherType 0x0800 for IPv4, or another type), an
// IPv4 header of ihl 32-bit words, and for protocol 6 a 20-byte TCP header
// with the given flags, followed by payload bytes; frames are padded to the
// 60-byte Ethernet minimum.
package tb_frame_pkg;
  typedef byte unsigned frame_t[$];

  function automatic frame_t make_frame(input logic [31:0] sip, input logic [31:0] dip,
                                        input logic [7:0] flags, input int payload = 0,
                                        input logic [7:0] proto = 8'd6, input int ihl = 5,
                                        input logic [15:0] etype = 16'h0800);
    frame_t f;
    for (int i = 0; i < 6; i++) f.push_back(8'h02);            // destination MAC
    for (int i = 0; i < 6; i++) f.push_back(8'h04);            // source MAC
    f.push_back(etype[15:8]); f.push_back(etype[7:0]);
    f.push_back({4'd4, 4'(ihl)});                              // version, IHL
    f.push_back(8'h00);
    f.push_back(8'h00); f.push_back(8'd40);                    // total length (unchecked)
    for (int i = 0; i < 4; i++) f.push_back(8'h00);            // id, fragment
    f.push_back(8'd64); f.push_back(proto);
    f.push_back(8'h00); f.push_back(8'h00);                    // checksum (unchecked)
    for (int i = 3; i >= 0; i--) f.push_back(sip[8*i +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(dip[8*i +: 8]);
    for (int i = 5; i < ihl; i++) for (int j = 0; j < 4; j++) f.push_back(8'h01); // options
    if (proto == 8'd6) begin
      f.push_back(8'h12); f.push_back(8'h34);                  // source port
      f.push_back(8'h00); f.push_back(8'h50);                  // destination port
      for (int i = 0; i < 8; i++) f.push_back(8'h00);          // seq, ack
      f.push_back(8'h50);                                      // data offset
      f.push_back(flags);
      for (int i = 0; i < 6; i++) f.push_back(8'h00);          // window, checksum, urgent
    end
    for (int i = 0; i < payload; i++) f.push_back(8'($urandom));
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction
endpackage
