// tb_frame_pkg: frame generator and reference models for the testbenches.
//
// make_frame builds an Ethernet II / IPv4 frame of a given length as a byte
// queue; frame_beat cuts byte queues into 256-bit stream beats (byte 0 in
// tdata[7:0]). ref_blocked is an independent model of the special-use
// address ranges, written as octet tests rather than prefix masks;
// ref_init_ttl is the initial-TTL rule written as a table search.
package tb_frame_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic bytes_t make_frame(input int len, input bit ipv4,
                                        input logic [31:0] src, input logic [31:0] dst,
                                        input logic [7:0] ttl);
    bytes_t f;
    for (int i = 0; i < len; i++) f.push_back(8'($urandom));
    if (len >= 14) begin
      f[12] = ipv4 ? 8'h08 : 8'h86;
      f[13] = ipv4 ? 8'h00 : 8'hDD;
    end
    if (len >= 34) begin
      f[14] = ipv4 ? 8'h45 : 8'h60;
      f[22] = ttl;
      f[23] = 8'd17;
      for (int k = 0; k < 4; k++) begin
        f[26+k] = src[31-8*k -: 8];
        f[30+k] = dst[31-8*k -: 8];
      end
    end
    return f;
  endfunction

  function automatic int num_beats(input int len);
    return (len + 31) / 32;
  endfunction

  function automatic void frame_beat(input bytes_t f, input int b,
                                     output logic [255:0] data, output logic [31:0] keep,
                                     output logic last);
    data = '0;
    keep = '0;
    for (int i = 0; i < 32; i++) begin
      if (b*32 + i < f.size()) begin
        data[i*8 +: 8] = f[b*32 + i];
        keep[i] = 1'b1;
      end
    end
    last = ((b + 1) * 32 >= f.size());
  endfunction

  function automatic bit ref_blocked(input logic [31:0] ip);
    byte unsigned a, b, c;
    a = ip[31:24]; b = ip[23:16]; c = ip[15:8];
    if (a == 0 || a == 10 || a == 127) return 1;
    if (a == 169 && b == 254) return 1;
    if (a == 172 && b >= 16 && b <= 31) return 1;
    if (a == 192 && b == 0 && c == 0) return 1;
    if (a == 192 && b == 88 && c == 99) return 1;
    if (a == 192 && b == 168) return 1;
    if (a == 198 && (b == 18 || b == 19)) return 1;
    if (a == 198 && b == 51 && c == 100) return 1;
    if (a == 203 && b == 0 && c == 113) return 1;
    if (a >= 224) return 1;  // multicast, reserved, limited broadcast
    return 0;
  endfunction

  function automatic int ref_init_ttl(input int ttl);
    int cands[6] = '{30, 32, 60, 64, 128, 255};
    foreach (cands[i]) if (ttl <= cands[i]) return cands[i];
    return 255;
  endfunction

  // A random public (non-blocked) source address.
  function automatic logic [31:0] rand_public_ip();
    logic [31:0] ip;
    do ip = $urandom; while (ref_blocked(ip));
    return ip;
  endfunction

endpackage
