// tb_util_pkg: helpers shared by the Ethane datapath testbenches.
//
// Frame construction from header fields, the frame's 64-bit words, the flow
// tuple expected for those fields (written straight from the fields, not by
// parsing the frame), a reference CRC computed by polynomial long division,
// and packing of a flow-table slot into its five 64-bit SRAM words.
package tb_util_pkg;
  import ethane_pkg::*;

  typedef logic [7:0] bytes_t[$];

  typedef struct {
    logic [47:0] da, sa;
    logic [15:0] ethertype;
    logic [3:0]  ihl;
    logic [7:0]  proto;
    logic [31:0] src, dst;
    logic [15:0] sport, dport;
    int          len;
    logic [2:0]  port;
  } frame_t;

  function automatic frame_t tcp_frame(logic [47:0] da, logic [47:0] sa,
                                       logic [31:0] src, logic [31:0] dst,
                                       logic [15:0] sp, logic [15:0] dp,
                                       int len, logic [2:0] port);
    frame_t f;
    f.da = da; f.sa = sa; f.ethertype = 16'h0800; f.ihl = 4'd5; f.proto = 8'd6;
    f.src = src; f.dst = dst; f.sport = sp; f.dport = dp; f.len = len; f.port = port;
    return f;
  endfunction

  function automatic void build_bytes(input frame_t f, ref bytes_t b);
    int off;
    b.delete();
    for (int i = 0; i < f.len; i++) b.push_back(8'((i * 7 + 3) & 8'hff));
    for (int i = 0; i < 6; i++) begin
      b[i]     = f.da[47 - 8*i -: 8];
      b[6 + i] = f.sa[47 - 8*i -: 8];
    end
    b[12] = f.ethertype[15:8];  b[13] = f.ethertype[7:0];
    if (f.ethertype == 16'h0800) begin
      b[14] = {4'h4, f.ihl};
      b[23] = f.proto;
      for (int i = 0; i < 4; i++) begin
        b[26 + i] = f.src[31 - 8*i -: 8];
        b[30 + i] = f.dst[31 - 8*i -: 8];
      end
      off = 14 + 4 * int'(f.ihl);
      if (off + 4 <= f.len) begin
        b[off]     = f.sport[15:8];  b[off + 1] = f.sport[7:0];
        b[off + 2] = f.dport[15:8];  b[off + 3] = f.dport[7:0];
      end
    end
  endfunction

  function automatic int nwords(int len);
    return (len + 7) / 8;
  endfunction

  function automatic logic [63:0] word_of(ref bytes_t b, input int w);
    logic [63:0] d;
    d = '0;
    for (int i = 0; i < 8; i++)
      if (8*w + i < b.size()) d[63 - 8*i -: 8] = b[8*w + i];
    return d;
  endfunction

  function automatic flow_tuple_t exp_tuple(frame_t f);
    flow_tuple_t t;
    logic ports;
    t = '0;
    t.mac_da = f.da[15:0];
    t.mac_sa = f.sa[15:0];
    t.ethertype = f.ethertype;
    t.in_port = f.port;
    if (f.ethertype == 16'h0800) begin
      t.ip_proto = f.proto;
      t.ip_src = f.src;
      t.ip_dst = f.dst;
      ports = (f.proto == 8'd6 || f.proto == 8'd17) && f.ihl >= 4'd5 &&
              (14 + 4 * int'(f.ihl) + 4 <= f.len) && (14 + 4 * int'(f.ihl) + 4 <= 80);
      if (ports) begin
        t.l4_src = f.sport;
        t.l4_dst = f.dport;
      end
    end
    return t;
  endfunction

  // CRC by long division: remainder of ((M xor ones<<128) * x^32) mod P,
  // which equals an MSB-first CRC-32 with an all-ones preset.
  function automatic logic [31:0] ref_crc(logic [159:0] m, logic [31:0] poly);
    logic [191:0] r;
    logic [32:0]  p;
    p = {1'b1, poly};
    r = {m ^ {32'hFFFF_FFFF, 128'h0}, 32'h0};
    for (int i = 191; i >= 32; i--)
      if (r[i]) r[i -: 33] = r[i -: 33] ^ p;
    return r[31:0];
  endfunction

  function automatic logic [31:0] hash_idx(flow_tuple_t t, logic [31:0] poly, int idx_w);
    logic [31:0] c;
    c = ref_crc({t, 5'b0}, poly);
    return c & ((32'd1 << idx_w) - 1);
  endfunction

  // 320-bit slot from its fields, written out bit range by bit range.
  function automatic logic [319:0] make_slot(flow_tuple_t t, logic valid, logic [2:0] dest,
                                             logic [47:0] ow_da, logic [47:0] ow_sa,
                                             logic [19:0] pkts, logic [31:0] bytes_);
    logic [319:0] s;
    s = '0;
    s[319:165] = t;
    s[164]     = valid;
    s[163:161] = dest;
    s[160:113] = ow_da;
    s[112:65]  = ow_sa;
    s[51:32]   = pkts;
    s[31:0]    = bytes_;
    return s;
  endfunction

endpackage
