// wpa2_ref_pkg: behavioural reference model for the testbenches.
//
// A straightforward, loop-based SHA-1 compression function (message
// schedule expanded in an 80-word array, no pipelining, no pre-addition)
// and the WPA2 chain PBKDF2 -> PRF -> HMAC MIC built from it the textbook
// way, U_1 ^ ... ^ U_n with full HMACs. It shares no code with the RTL.
// It also holds one synthetic handshake (SSID "UPC1234567", password
// "KCPFQWBR") whose pre-padded message blocks and expected results were
// produced with an independent software implementation of PBKDF2 and HMAC.
package wpa2_ref_pkg;

  typedef logic [159:0] dig_t;
  typedef logic [511:0] blk_t;

  function automatic dig_t ref_compress(input dig_t h, input blk_t m);
    logic [31:0] w [80];
    logic [31:0] a, b, c, d, e, f, k, tmp;
    for (int t = 0; t < 16; t++) w[t] = m[511-32*t -: 32];
    for (int t = 16; t < 80; t++) begin
      tmp  = w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16];
      w[t] = {tmp[30:0], tmp[31]};
    end
    {a, b, c, d, e} = h;
    for (int t = 0; t < 80; t++) begin
      case (t / 20)
        0: begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
        1: begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
        2: begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
        default: begin f = b ^ c ^ d;             k = 32'hCA62C1D6; end
      endcase
      tmp = {a[26:0], a[31:27]} + f + e + k + w[t];
      e = d; d = c; c = {b[1:0], b[31:2]}; b = a; a = tmp;
    end
    return {h[159:128] + a, h[127:96] + b, h[95:64] + c, h[63:32] + d, h[31:0] + e};
  endfunction

  localparam dig_t IV = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  function automatic blk_t pad20(input dig_t d);
    blk_t b;
    b = '0;
    b[511:352] = d;
    b[351:344] = 8'h80;
    b[63:0]    = 64'd672;   // (64 + 20) bytes
    return b;
  endfunction

  // HMAC-SHA1 of a key (zero padded to 64 bytes) over pre-padded blocks.
  function automatic dig_t hmac(input blk_t key, input blk_t msg [], input int nblk);
    dig_t inner;
    inner = ref_compress(IV, key ^ {64{8'h36}});
    for (int i = 0; i < nblk; i++) inner = ref_compress(inner, msg[i]);
    return ref_compress(ref_compress(IV, key ^ {64{8'h5C}}), pad20(inner));
  endfunction

  function automatic dig_t pbkdf2_block(input logic [63:0] pwd, input int iters,
                                        input blk_t salt);
    blk_t key, msg [];
    dig_t u, t;
    key    = {pwd, 448'd0};
    msg    = new[1];
    msg[0] = salt;
    u      = hmac(key, msg, 1);
    t      = u;
    for (int j = 2; j <= iters; j++) begin
      msg[0] = pad20(u);
      u      = hmac(key, msg, 1);
      t      = t ^ u;
    end
    return t;
  endfunction

  function automatic logic [255:0] ref_pmk(input logic [63:0] pwd, input int iters,
                                           input blk_t salt1, input blk_t salt2);
    dig_t t1, t2;
    t1 = pbkdf2_block(pwd, iters, salt1);
    t2 = pbkdf2_block(pwd, iters, salt2);
    return {t1, t2[159:64]};
  endfunction

  function automatic logic [127:0] ref_kck(input logic [255:0] pmk, input blk_t p0,
                                           input blk_t p1);
    blk_t msg [];
    dig_t d;
    msg = new[2];
    msg[0] = p0; msg[1] = p1;
    d = hmac({pmk, 256'd0}, msg, 2);
    return d[159:32];
  endfunction

  function automatic logic [127:0] ref_mic(input logic [127:0] kck, input blk_t m0,
                                           input blk_t m1);
    blk_t msg [];
    dig_t d;
    msg = new[2];
    msg[0] = m0; msg[1] = m1;
    d = hmac({kck, 384'd0}, msg, 2);
    return d[159:32];
  endfunction

  function automatic logic [127:0] ref_wpa2_mic(input logic [63:0] pwd, input int iters,
                                                input blk_t s1, input blk_t s2,
                                                input blk_t p0, input blk_t p1,
                                                input blk_t m0, input blk_t m1);
    return ref_mic(ref_kck(ref_pmk(pwd, iters, s1, s2), p0, p1), m0, m1);
  endfunction

  // Password k steps after p in base-26 ('A'..'Z', last character least
  // significant), computed through an integer instead of a carry chain.
  function automatic logic [63:0] pwd_add(input logic [63:0] p, input longint k);
    longint v;
    logic [63:0] r;
    v = 0;
    for (int i = 7; i >= 0; i--) v = v * 26 + longint'(p[8*i +: 8]) - 64'h41;
    v = v + k;
    for (int i = 0; i < 8; i++) begin
      r[8*i +: 8] = 8'h41 + 8'(v % 26);
      v = v / 26;
    end
    return r;
  endfunction

  // Synthetic handshake.
  localparam logic [63:0] HS_PWD   = "KCPFQWBR";
  localparam blk_t        HS_SALT1 = 512'h55504331323334353637000000018000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000270;
  localparam blk_t        HS_SALT2 = 512'h55504331323334353637000000028000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000270;
  localparam blk_t        HS_PRF0  = 512'h5061697277697365206b657920657870616e73696f6e000a1b2c3d4e5fa0b1c2d3e4f5101112131415161718191a1b1c1d1e1f202122232425262728292a2b2c;
  localparam blk_t        HS_PRF1  = 512'h2d2e2f808182838485868788898a8b8c8d8e8f909192939495969798999a9b9c9d9e9f0080000000000000000000000000000000000000000000000000000520;
  localparam blk_t        HS_MIC0  = 512'h0b30557a9fc4e90e33587da2c7ec11365b80a5caef14395e83a8cdf2173c6186abd0f51a3f6489aed3f81d42678cb1d6fb20456a8fb4d9fe23486d92b7dc0126;
  localparam blk_t        HS_MIC1  = 512'h4b7095badf04294e7398bde2072c51769bc0e50a2f54799ec3e80d32577ca1c6eb10358000000000000000000000000000000000000000000000000000000518;
  localparam logic [255:0] HS_PMK_4096 = 256'h9028c947ec5e72b507c5dd22706a466c5530af835cca383128dfad68e2316dbf;
  localparam logic [127:0] HS_KCK_4096 = 128'h7ca96ce8cf1ed2320d7b599a0c7108a3;
  localparam logic [127:0] HS_MIC_4096 = 128'h8eb46d4f3dd0abe15f2dc66e86ac8037;
  localparam logic [127:0] HS_MIC_1    = 128'h9bced1e660b884f689f14c0abe0bf84e;
  localparam logic [127:0] HS_MIC_2    = 128'h7c6b5d3447670d869164585969efd2dd;
  localparam logic [127:0] HS_MIC_3    = 128'hb9fb3dd262617804aa3c838e85b78cf1;

endpackage
