// tb_chimera_top: end-to-end test of both CHIMERA versions at their default
// parameters. The testbench plays the software on the RISC-V core: it runs
// ASCON-Hash, -Hasha, -XOF, -XOFa (32-byte output) and ASCON-128, -128a,
// -80pq encryption and decryption (128-byte plaintext, 16-byte associated
// data) three times, with the permutation done
//   * by the reference model (no hardware),
//   * by the CR version: state loaded with CR_LD, p^N with CR_PERM, state
//     read back with CR_ST,
//   * by the BRU version: constant addition and S-box in software, each
//     Sigma_i through a BRU_SIGi / BRU_RDH instruction pair,
// and requires all three to agree. Hash, Hasha and ASCON-128 encryption
// are also run as CR software that keeps the state resident in the
// coprocessor and moves only the words that data or key touch. Published values are checked too: the
// ASCON-Hash initial state (p12 of the Hash IV) and the ASCON-128 tag for
// key = nonce = 00..0f with empty data. Afterwards it exercises the protocol cases on both
// versions (kill, late commit, refused instruction, stall, backpressure)
// and counts how often each mechanism occurred; one that never occurred is
// a failure.
module tb_chimera_top;
  import chimera_pkg::*;
  import ascon_ref_pkg::*;

  typedef byte unsigned bytes_t[];
  typedef enum int {BE_REF, BE_CR, BE_BRU} backend_e;

  logic clk = 0, rst_n = 0;
  logic cr_issue_valid, cr_issue_ready, cr_commit_valid, cr_result_valid, cr_result_ready;
  xif_issue_req_t  cr_issue_req;
  xif_issue_resp_t cr_issue_resp;
  xif_commit_t     cr_commit;
  xif_result_t     cr_result;
  logic bru_issue_valid, bru_issue_ready, bru_commit_valid, bru_result_valid, bru_result_ready;
  xif_issue_req_t  bru_issue_req;
  xif_issue_resp_t bru_issue_resp;
  xif_commit_t     bru_commit;
  xif_result_t     bru_result;

  int checks = 0, failures = 0;
  int n_perm[13];
  logic [63:0] hash_x0_after_init;
  int n_ld = 0, n_st = 0, n_sig[5], n_rdh = 0;

  chimera_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cr_issue_valid_i(cr_issue_valid), .cr_issue_ready_o(cr_issue_ready), .cr_issue_req_i(cr_issue_req),
    .cr_issue_resp_o(cr_issue_resp), .cr_commit_valid_i(cr_commit_valid), .cr_commit_i(cr_commit),
    .cr_result_valid_o(cr_result_valid), .cr_result_ready_i(cr_result_ready), .cr_result_o(cr_result),
    .bru_issue_valid_i(bru_issue_valid), .bru_issue_ready_o(bru_issue_ready), .bru_issue_req_i(bru_issue_req),
    .bru_issue_resp_o(bru_issue_resp), .bru_commit_valid_i(bru_commit_valid), .bru_commit_i(bru_commit),
    .bru_result_valid_o(bru_result_valid), .bru_result_ready_i(bru_result_ready), .bru_result_o(bru_result));

  xif_host cr_host (.clk, .issue_valid(cr_issue_valid), .issue_ready(cr_issue_ready), .issue_req(cr_issue_req),
                    .issue_resp(cr_issue_resp), .commit_valid(cr_commit_valid), .commit(cr_commit),
                    .result_valid(cr_result_valid), .result_ready(cr_result_ready), .result(cr_result));
  xif_host bru_host (.clk, .issue_valid(bru_issue_valid), .issue_ready(bru_issue_ready), .issue_req(bru_issue_req),
                     .issue_resp(bru_issue_resp), .commit_valid(bru_commit_valid), .commit(bru_commit),
                     .result_valid(bru_result_valid), .result_ready(bru_result_ready), .result(bru_result));

  always #5 clk = ~clk;

  initial begin
    fork
      #50ms;
      wait (cr_host.hung || bru_host.hung);
    join_any
    failures++;
    $display("watchdog: %s", (cr_host.hung || bru_host.hung) ? "coprocessor stopped answering" : "time limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ instructions
  task automatic cr_do(input cr_op_e op, input int imm, input logic [31:0] a, input logic [31:0] b,
                       input bit kill, output logic [31:0] d, output bit acc);
    bit we; int lat;
    cr_host.offload(make_instr(5'(imm), UNIT_CR, 5'd11, 5'd10, 3'(op), 5'd12), a, b, kill, acc, d, lat, we);
    if (acc && !kill) begin
      if (op == CR_LD) n_ld++;
      if (op == CR_ST) n_st++;
      if (op == CR_PERM) n_perm[imm]++;
      if (!cr_host.bp_en && cr_host.commit_delay == 0)
        expect_eq("cr latency", 64'(lat), 64'(op == CR_PERM ? imm + 3 : 32'd3));
    end
  endtask

  task automatic bru_do(input bru_op_e op, input logic [63:0] x, input bit kill,
                        output logic [31:0] d, output bit acc);
    bit we; int lat;
    bru_host.offload(make_instr(5'd0, UNIT_BRU, 5'd11, 5'd10, 3'(op), 5'd12), x[31:0], x[63:32], kill,
                     acc, d, lat, we);
    if (acc && !kill) begin
      if (op == BRU_RDH) n_rdh++; else n_sig[int'(op)]++;
      if (!bru_host.bp_en && bru_host.commit_delay == 0) expect_eq("bru latency", 64'(lat), 1);
    end
  endtask

  // ------------------------------------------------------------ permutation
  // Hardware permutations are carried out by one server process, so the
  // instruction sequences below exist once in the testbench.
  state_t   srv_s;
  int       srv_n;
  backend_e srv_be;
  bit       srv_req = 0, srv_ack = 0;
  // CR-resident accesses: the state stays in REG0..REG9 between calls
  typedef enum int {OP_SYNC_PERM, OP_GET, OP_PUT, OP_PERM} srv_op_e;
  srv_op_e     srv_op = OP_SYNC_PERM;
  int          srv_w;
  logic [63:0] srv_v;
  int          n_resident_instr = 0;

  task automatic srv_call(input srv_op_e op, input int w, inout logic [63:0] v);
    srv_op = op; srv_w = w; srv_v = v; srv_be = BE_CR;
    srv_req = 1;
    wait (srv_ack);
    v = srv_v;
    srv_op = OP_SYNC_PERM;
    srv_req = 0;
    wait (!srv_ack);
  endtask

  task automatic cr_get(input int w, output logic [63:0] v);
    v = '0;
    srv_call(OP_GET, w, v);
  endtask

  task automatic cr_put(input int w, input logic [63:0] v);
    srv_call(OP_PUT, w, v);
  endtask

  task automatic cr_p(input int n);
    logic [63:0] v = 64'(n);
    srv_call(OP_PERM, n, v);
  endtask

  task automatic perm(input backend_e be, inout state_t s, input int n);
    if (be == BE_REF) begin
      s = state_t'(ref_perm(ref_state_t'(s), n));
    end else begin
      srv_s = s; srv_n = n; srv_be = be;
      srv_req = 1;
      wait (srv_ack);
      s = srv_s;
      srv_req = 0;
      wait (!srv_ack);
    end
  endtask

  initial forever begin
    logic [31:0] d, hi;
    bit acc;
    state_t t;
    wait (srv_req);
    if (srv_op == OP_GET) begin
      cr_do(CR_ST, 2 * srv_w, 0, 0, 0, d, acc);
      cr_do(CR_ST, 2 * srv_w + 1, 0, 0, 0, hi, acc);
      srv_v = {hi, d};
      n_resident_instr += 2;
    end else if (srv_op == OP_PUT) begin
      cr_do(CR_LD, srv_w, srv_v[31:0], srv_v[63:32], 0, d, acc);
      n_resident_instr += 1;
    end else if (srv_op == OP_PERM) begin
      cr_do(CR_PERM, srv_w, 0, 0, 0, d, acc);
      n_resident_instr += 1;
    end else if (srv_be == BE_CR) begin
      for (int w = 0; w < 5; w++) cr_do(CR_LD, w, srv_s[w][31:0], srv_s[w][63:32], 0, d, acc);
      cr_do(CR_PERM, srv_n, 0, 0, 0, d, acc);
      for (int r = 0; r < 10; r++) begin
        cr_do(CR_ST, r, 0, 0, 0, d, acc);
        srv_s[r/2][(r%2)*32 +: 32] = d;
      end
    end else begin
      for (int i = 12 - srv_n; i < 12; i++) begin
        srv_s[2] ^= {56'd0, RC[i]};
        srv_s = state_t'(ref_sbox(ref_state_t'(srv_s)));   // software S-box
        for (int w = 0; w < 5; w++) begin
          bru_do(bru_op_e'(w), srv_s[w], 0, d, acc);
          bru_do(BRU_RDH, '0, 0, hi, acc);
          t[w] = {hi, d};
        end
        srv_s = t;
      end
    end
    srv_ack = 1;
    wait (!srv_req);
    srv_ack = 0;
  end

  // ------------------------------------------------------------ byte helpers
  function automatic logic [63:0] ld_bytes(bytes_t b, int off, int n);
    logic [63:0] w = '0;
    for (int k = 0; k < n; k++) w[63-8*k -: 8] = b[off+k];
    return w;
  endfunction

  function automatic logic [63:0] pad(int n);
    return 64'h80 << (8 * (7 - n));
  endfunction

  function automatic logic [63:0] top_mask(int n);
    return (n == 0) ? 64'd0 : ~(64'hffff_ffff_ffff_ffff >> (8 * n));
  endfunction

  task automatic put_bytes(ref bytes_t o, input int off, input logic [63:0] w, input int n);
    for (int k = 0; k < n; k++) o[off+k] = w[63-8*k -: 8];
  endtask

  // ------------------------------------------------------------ hash / XOF
  // variant: 0 Hash, 1 Hasha, 2 XOF, 3 XOFa
  task automatic hash(input backend_e be, input int variant, input bytes_t m, input int outlen,
                      output bytes_t h);
    logic [63:0] iv [4] = '{64'h00400c0000000100, 64'h00400c0400000100,
                            64'h00400c0000000000, 64'h00400c0400000000};
    int b = (variant % 2 == 1) ? 8 : 12;
    int len = m.size(), off = 0;
    state_t s = '0;
    h = new[outlen];
    s[0] = iv[variant];
    perm(be, s, 12);
    hash_x0_after_init = s[0];
    while (len - off >= 8) begin
      s[0] ^= ld_bytes(m, off, 8);
      perm(be, s, b);
      off += 8;
    end
    s[0] ^= ld_bytes(m, off, len - off) ^ pad(len - off);
    perm(be, s, 12);
    off = 0;
    while (outlen - off > 8) begin
      put_bytes(h, off, s[0], 8);
      perm(be, s, b);
      off += 8;
    end
    put_bytes(h, off, s[0], outlen - off);
  endtask

  // ------------------------------------------------------------ AEAD
  // variant: 0 ASCON-128, 1 ASCON-128a, 2 ASCON-80pq. dec = 1 decrypts.
  task automatic aead(input backend_e be, input int variant, input bit dec, input bytes_t k,
                      input bytes_t n, input bytes_t ad, input bytes_t din,
                      output bytes_t dout, output logic [127:0] tag);
    int rate = (variant == 1) ? 16 : 8;
    int b    = (variant == 1) ? 8 : 6;
    logic [63:0] k0, k1, ka, kb, kc;
    state_t s = '0;
    int len, off;
    dout = new[din.size()];
    if (variant == 2) begin
      ka = ld_bytes(k, 0, 4) >> 32;  kb = ld_bytes(k, 4, 8);  kc = ld_bytes(k, 12, 8);
      s[0] = {32'ha0400c06, ka[31:0]}; s[1] = kb; s[2] = kc;
    end else begin
      k0 = ld_bytes(k, 0, 8); k1 = ld_bytes(k, 8, 8);
      s[0] = (variant == 1) ? 64'h80800c0800000000 : 64'h80400c0600000000;
      s[1] = k0; s[2] = k1;
    end
    s[3] = ld_bytes(n, 0, 8); s[4] = ld_bytes(n, 8, 8);
    perm(be, s, 12);
    if (variant == 2) begin s[2] ^= ka; s[3] ^= kb; s[4] ^= kc; end
    else              begin s[3] ^= k0; s[4] ^= k1; end
    // associated data
    len = ad.size(); off = 0;
    if (len > 0) begin
      while (len - off >= rate) begin
        s[0] ^= ld_bytes(ad, off, 8);
        if (rate == 16) s[1] ^= ld_bytes(ad, off + 8, 8);
        perm(be, s, b);
        off += rate;
      end
      if (len - off >= 8) begin
        s[0] ^= ld_bytes(ad, off, 8);
        s[1] ^= ld_bytes(ad, off + 8, len - off - 8) ^ pad(len - off - 8);
      end else
        s[0] ^= ld_bytes(ad, off, len - off) ^ pad(len - off);
      perm(be, s, b);
    end
    s[4] ^= 64'd1;
    // message
    len = din.size(); off = 0;
    while (len - off >= rate) begin
      for (int w = 0; w < rate / 8; w++) begin
        logic [63:0] c = ld_bytes(din, off + 8*w, 8);
        put_bytes(dout, off + 8*w, s[w] ^ c, 8);
        s[w] = dec ? c : (s[w] ^ c);
      end
      perm(be, s, b);
      off += rate;
    end
    begin
      int w = 0, r = len - off;
      if (r >= 8) begin
        logic [63:0] c = ld_bytes(din, off, 8);
        put_bytes(dout, off, s[0] ^ c, 8);
        s[0] = dec ? c : (s[0] ^ c);
        w = 1; r -= 8; off += 8;
      end
      begin
        logic [63:0] c = ld_bytes(din, off, r);
        put_bytes(dout, off, s[w] ^ c, r);
        s[w] = dec ? ((s[w] & ~top_mask(r)) | c) : (s[w] ^ c);
        s[w] ^= pad(r);
      end
    end
    // finalization
    if (variant == 0)      begin s[1] ^= k0; s[2] ^= k1; end
    else if (variant == 1) begin s[2] ^= k0; s[3] ^= k1; end
    else begin
      s[1] ^= {ka[31:0], kb[63:32]}; s[2] ^= {kb[31:0], kc[63:32]}; s[3] ^= {kc[31:0], 32'd0};
    end
    perm(be, s, 12);
    if (variant == 2) tag = {s[3] ^ kb, s[4] ^ kc};
    else              tag = {s[3] ^ k0, s[4] ^ k1};
  endtask

  // ------------------------------------------------------------ CR-resident software
  // ASCON-Hash/Hasha and ASCON-128 encryption written as CR software would
  // be: the 320-bit state is loaded once and stays in the coprocessor; only
  // the words that data or the key touch are read back and written again.
  task automatic hash_resident(input int variant, input bytes_t m, input int outlen, output bytes_t h);
    int b = (variant == 1) ? 8 : 12;
    int len = m.size(), off = 0;
    logic [63:0] v;
    h = new[outlen];
    cr_put(0, (variant == 1) ? 64'h00400c0400000100 : 64'h00400c0000000100);
    for (int w = 1; w < 5; w++) cr_put(w, 64'd0);
    cr_p(12);
    while (len - off >= 8) begin
      cr_get(0, v);
      cr_put(0, v ^ ld_bytes(m, off, 8));
      cr_p(b);
      off += 8;
    end
    cr_get(0, v);
    cr_put(0, v ^ ld_bytes(m, off, len - off) ^ pad(len - off));
    cr_p(12);
    off = 0;
    while (outlen - off > 8) begin
      cr_get(0, v);
      put_bytes(h, off, v, 8);
      cr_p(b);
      off += 8;
    end
    cr_get(0, v);
    put_bytes(h, off, v, outlen - off);
  endtask

  // ASCON-128 encryption; associated data and plaintext lengths must be
  // multiples of 8 bytes here.
  task automatic aead128_enc_resident(input bytes_t k, input bytes_t n, input bytes_t ad,
                                      input bytes_t pt, output bytes_t ct, output logic [127:0] tag);
    logic [63:0] k0 = ld_bytes(k, 0, 8), k1 = ld_bytes(k, 8, 8), v, v2;
    ct = new[pt.size()];
    cr_put(0, 64'h80400c0600000000);
    cr_put(1, k0); cr_put(2, k1);
    cr_put(3, ld_bytes(n, 0, 8)); cr_put(4, ld_bytes(n, 8, 8));
    cr_p(12);
    cr_get(3, v); cr_put(3, v ^ k0);
    cr_get(4, v); cr_put(4, v ^ k1);
    if (ad.size() > 0) begin
      for (int off = 0; off < ad.size(); off += 8) begin
        cr_get(0, v); cr_put(0, v ^ ld_bytes(ad, off, 8)); cr_p(6);
      end
      cr_get(0, v); cr_put(0, v ^ pad(0)); cr_p(6);
    end
    cr_get(4, v); cr_put(4, v ^ 64'd1);
    for (int off = 0; off < pt.size(); off += 8) begin
      cr_get(0, v);
      v ^= ld_bytes(pt, off, 8);
      put_bytes(ct, off, v, 8);
      cr_put(0, v);
      cr_p(6);
    end
    cr_get(0, v); cr_put(0, v ^ pad(0));
    cr_get(1, v); cr_put(1, v ^ k0);
    cr_get(2, v); cr_put(2, v ^ k1);
    cr_p(12);
    cr_get(3, v); cr_get(4, v2);
    tag = {v ^ k0, v2 ^ k1};
  endtask

  function automatic bytes_t seq(int n, int start = 0);
    bytes_t b = new[n];
    foreach (b[i]) b[i] = 8'(start + i);
    return b;
  endfunction

  function automatic logic [255:0] first32(bytes_t b);
    logic [255:0] v = '0;
    for (int i = 0; i < 32 && i < b.size(); i++) v[255-8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic bit same(bytes_t a, bytes_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  // ------------------------------------------------------------ main
  string hname [4] = '{"Hash", "Hasha", "XOF", "XOFa"};
  string aname [3] = '{"ASCON-128", "ASCON-128a", "ASCON-80pq"};

  initial begin
    bytes_t ref_h, hw_h, pt, ct_ref, ct_hw, pt_hw, key, nonce, ad;
    logic [127:0] t_ref, t_hw;
    logic [31:0] d;
    bit acc;
    foreach (n_perm[i]) n_perm[i] = 0;
    foreach (n_sig[i]) n_sig[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // published answers, on the CR version: the ASCON-Hash initial state
    hash(BE_CR, 0, seq(0), 32, hw_h);
    expect_eq("hash initial x0", 64'(hash_x0_after_init), HASH_INIT[0]);
    aead(BE_CR, 0, 0, seq(16), seq(16), seq(0), seq(0), ct_hw, t_hw);
    expect_eq("ASCON-128 KAT tag hi", t_hw[127:64], 64'he355159f292911f7);
    expect_eq("ASCON-128 KAT tag lo", t_hw[63:0], 64'h94cb1432a0103a8a);

    // hash family: 64-byte message, 32-byte output
    for (int v = 0; v < 4; v++) begin
      hash(BE_REF, v, seq(64, 3), 32, ref_h);
      for (int be = BE_CR; be <= BE_BRU; be++) begin
        cr_host.bp_en = (v == 1); bru_host.bp_en = (v == 1);
        hash(backend_e'(be), v, seq(64, 3), 32, hw_h);
        checks++;
        if (!same(ref_h, hw_h)) begin
          failures++;
          $display("%s on %s: %h vs %h", hname[v], be == BE_CR ? "CR" : "BRU", first32(hw_h), first32(ref_h));
        end
      end
    end
    cr_host.bp_en = 0; bru_host.bp_en = 0;

    // AEAD family: 128-byte plaintext, 16-byte associated data
    pt = seq(128, 17);
    ad = seq(16, 200);
    nonce = seq(16, 100);
    for (int v = 0; v < 3; v++) begin
      key = seq(v == 2 ? 20 : 16, 50);
      aead(BE_REF, v, 0, key, nonce, ad, pt, ct_ref, t_ref);
      for (int be = BE_CR; be <= BE_BRU; be++) begin
        aead(backend_e'(be), v, 0, key, nonce, ad, pt, ct_hw, t_hw);
        checks++;
        if (!same(ct_ref, ct_hw) || t_hw !== t_ref) begin
          failures++;
          $display("%s enc on %s: tag %h vs %h", aname[v], be == BE_CR ? "CR" : "BRU", t_hw, t_ref);
        end
        aead(backend_e'(be), v, 1, key, nonce, ad, ct_ref, pt_hw, t_hw);
        checks++;
        if (!same(pt, pt_hw) || t_hw !== t_ref) begin
          failures++;
          $display("%s dec on %s: tag %h vs %h", aname[v], be == BE_CR ? "CR" : "BRU", t_hw, t_ref);
        end
      end
    end

    // CR-resident software against the reference runs
    for (int v = 0; v < 2; v++) begin
      int i0;
      i0 = n_resident_instr;
      hash(BE_REF, v, seq(64, 3), 32, ref_h);
      hash_resident(v, seq(64, 3), 32, hw_h);
      checks++;
      if (!same(ref_h, hw_h)) begin failures++; $display("resident %s wrong", hname[v]); end
      $display("resident %s, 64-byte message: %0d CR instructions", hname[v], n_resident_instr - i0);
    end
    begin
      int i0;
      i0 = n_resident_instr;
      key = seq(16, 50);
      aead(BE_REF, 0, 0, key, nonce, ad, pt, ct_ref, t_ref);
      aead128_enc_resident(key, nonce, ad, pt, ct_hw, t_hw);
      checks++;
      if (!same(ct_ref, ct_hw) || t_hw !== t_ref) begin failures++; $display("resident ASCON-128 wrong"); end
      $display("resident ASCON-128 enc, 128-byte plaintext: %0d CR instructions", n_resident_instr - i0);
    end

    // protocol cases, CR
    cr_do(CR_ST, 0, 0, 0, 0, d, acc);
    begin
      logic [31:0] prev_d;
      prev_d = d;
      cr_do(CR_LD, 0, 32'h1111, 32'h2222, 1, d, acc);          // killed in the issue cycle
      cr_host.commit_delay = 2;
      cr_do(CR_PERM, 12, 0, 0, 1, d, acc);                     // killed late
      cr_host.commit_delay = 0;
      cr_do(CR_ST, 0, 0, 0, 0, d, acc);
      expect_eq("CR state kept over kills", 64'(d), 64'(prev_d));
    end
    cr_do(cr_op_e'(3'd7), 0, 0, 0, 0, d, acc);
    expect_eq("CR refuses funct3 7", 64'(acc), 0);
    fork
      cr_do(CR_PERM, 12, 0, 0, 0, d, acc);
      begin @(negedge clk); #2; cr_do(CR_ST, 9, 0, 0, 0, d, acc); end
    join
    // protocol cases, BRU
    bru_do(BRU_SIG2, 64'h1, 1, d, acc);
    bru_host.commit_delay = 3;
    bru_do(BRU_SIG2, 64'h1, 0, d, acc);
    bru_host.commit_delay = 0;
    bru_do(BRU_RDH, 0, 0, d, acc);
    bru_do(bru_op_e'(3'd6), 0, 0, d, acc);
    expect_eq("BRU refuses funct3 6", 64'(acc), 0);
    bru_host.bp_en = 1;
    fork
      bru_do(BRU_SIG0, 64'h5, 0, d, acc);
      begin @(negedge clk); #2; bru_do(BRU_RDH, 0, 0, d, acc); end
    join
    bru_host.bp_en = 0;

    // every mechanism must have happened
    begin
      string names [$];
      int    counts [$];
      names = '{"CR_LD", "CR_ST", "CR_PERM p12", "CR_PERM p8", "CR_PERM p6", "CR stall", "CR kill",
                "CR late commit", "CR refuse", "CR backpressure", "CR resident instructions",
                "BRU_SIG0", "BRU_SIG1", "BRU_SIG2", "BRU_SIG3", "BRU_SIG4", "BRU_RDH", "BRU stall",
                "BRU kill", "BRU late commit", "BRU refuse", "BRU backpressure"};
      counts = '{n_ld, n_st, n_perm[12], n_perm[8], n_perm[6], cr_host.stall_cycles, cr_host.kills,
                 cr_host.late_commits, cr_host.rejects, cr_host.bp_cycles, n_resident_instr,
                 n_sig[0], n_sig[1], n_sig[2], n_sig[3], n_sig[4], n_rdh, bru_host.stall_cycles,
                 bru_host.kills, bru_host.late_commits, bru_host.rejects, bru_host.bp_cycles};
      foreach (names[i]) begin
        $display("%-18s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("  never happened"); end
      end
    end
    expect_eq("CR ids", 64'(cr_host.id_errors), 0);
    expect_eq("BRU ids", 64'(bru_host.id_errors), 0);
    $display("simulated %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
