// tb_tls_accel: end-to-end test of the accelerator at W = 256.
//
// Runs a whole session through the host port: stores the keys, performs both
// Diffie-Hellman steps, RSA encryption of the shared secret and the RSA check
// (passing and failing), then CBC-AES with CMAC and with SHA-3, encrypting
// and decrypting, with a tampered ciphertext each to make the MAC check fail.
// Expected values come from published test vectors (SP 800-38A CBC, SP
// 800-38B CMAC), from SHA3-256 digests computed beforehand, from an RSA key
// pair made beforehand, and from a square-and-multiply reference using the
// simulator's wide arithmetic. It counts how often each mechanism occurred
// (both CMAC subkeys, interleaved CBC/CMAC blocks in the AES pipeline, SHA-3
// multi-block absorption, host stalls while SHA-3 permutes, ...) and fails
// any that never happened. It also reports the CBC+CMAC throughput at
// 100 MHz.
module tb_tls_accel;
  import tls_pkg::*;
  localparam int unsigned W  = 256;
  localparam int unsigned NW = W / 128;
  localparam logic [W-1:0] RSA_N = 256'heb786bb8c1d9f205955e1140e43b266ce1b112735f5661fa03f1229cedccd433;
  localparam logic [W-1:0] RSA_D = 256'h568bf44bfc343718864604e16d01b0a52ff2e9bb1016e6adf211fb5db0aecb81;
  localparam logic [W-1:0] RSA_E = W'(65537);
  localparam logic [127:0] AES_KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] IV      = 128'h000102030405060708090a0b0c0d0e0f;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic         en, rd_req, out_valid, busy, done, auth_ok, mac_ok;
  logic [5:0]   cmd;
  logic [127:0] data_in, data_out;
  int checks = 0, failures = 0;

  tls_accel #(.W(W)) dut (.*);

  logic [127:0] pt [4] = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                           128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  logic [127:0] cbc [4] = '{128'h7649abac8119b246cee98e9b12e9197d, 128'h5086cb9b507219ee95db113a917678b2,
                            128'h73bed6b8e3c1743b7116e69e22229516, 128'h3ff1caa1681fac09120eca307586e1a7};

  // ---------------- output capture and mechanism counters ----------------
  logic [127:0] outq [$];
  always @(posedge clk) if (!rst && out_valid) outq.push_back(data_out);

  int n_k1 = 0, n_k2 = 0, n_interleave = 0, n_sha_multi = 0, n_sha_stall = 0;
  int n_sec_write = 0, n_auth_pass = 0, n_auth_fail = 0, n_mac_pass = 0, n_mac_fail = 0;
  // controller states C_EBLK = 11, C_EMAC = 12, C_DBLK = 16; SHA-3 state S_ABSORB = 1
  logic prev_cbc_out;
  always @(posedge clk) if (!rst) begin
    // CMAC last block with a full block (K1) or a padded one (K2)
    if (dut.u_ctrl.st == 5'd12 && dut.u_ctrl.is_last)
      if (dut.u_ctrl.nb_cur == 5'd16) n_k1++; else n_k2++;
    // CBC and CMAC blocks leaving the AES pipeline on consecutive cycles
    if (dut.enc_out_valid && dut.enc_out_tag == 2'd1 && prev_cbc_out) n_interleave++;
    prev_cbc_out <= dut.enc_out_valid && dut.enc_out_tag == 2'd0;
    // SHA-3 permutation started with more message still to come
    if (dut.u_sha.st == 2'd1 && dut.sha_valid && !dut.sha_last &&
        dut.u_sha.pos + 8'd16 >= 8'd136) n_sha_multi++;
    // host word wanted but held off because SHA-3 is permuting
    if ((dut.u_ctrl.st == 5'd11 || dut.u_ctrl.st == 5'd16) &&
        dut.u_ctrl.is_sha && !dut.sha_ready) n_sha_stall++;
    if (dut.mem_sec_wr_en) n_sec_write++;
  end

  // ---------------- host tasks ----------------
  task automatic send_cmd(input logic [5:0] c);
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd = c; en = 1;
    @(negedge clk);
    en = 0;
  endtask

  task automatic send_word(input logic [127:0] d);
    bit r;
    data_in = d; en = 1;
    do begin r = rd_req; @(negedge clk); end while (!r);
    en = 0;
  endtask

  task automatic wait_done();
    while (busy) @(negedge clk);
  endtask

  task automatic store(input mode_e md, input logic [W-1:0] v);
    send_cmd({2'b00, md});
    for (int w = 0; w < NW; w++) send_word(v[128*w +: 128]);
    wait_done();
  endtask

  task automatic modexp_op(input modexp_op_e op, output logic [W-1:0] res);
    outq.delete();
    send_cmd({op, MODE_MODEXP});
    wait_done();
    @(negedge clk);
    res = '0;
    for (int w = 0; w < NW; w++) res[128*w +: 128] = outq[w];
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [W-1:0] ref_modexp(logic [W-1:0] base, logic [W-1:0] ex, logic [W-1:0] md);
    logic [2*W-1:0] r, b;
    r = (2*W)'(1);
    b = {{W{1'b0}}, base} % {{W{1'b0}}, md};
    for (int i = 0; i < W; i++) begin
      if (ex[i]) r = (r * b) % {{W{1'b0}}, md};
      b = (b * b) % {{W{1'b0}}, md};
    end
    return r[W-1:0];
  endfunction

  function automatic logic [127:0] fword(int w);   // message byte i = 37 i + 11
    logic [127:0] v;
    for (int b = 0; b < 16; b++) v[127 - 8*b -: 8] = 8'(((16*w + b) * 37 + 11) & 255);
    return v;
  endfunction

  // message word w of a test message: the SP 800-38A blocks or the formula
  function automatic logic [127:0] msg_word(bit formula, int w, int len);
    logic [127:0] v;
    int nb;
    v  = formula ? fword(w) : pt[w];
    nb = len - 16*w;
    if (nb < 16) v = v & ~({128{1'b1}} >> (8 * nb));
    return v;
  endfunction

  // encrypt, then return the ciphertext words (message blocks + tag blocks)
  task automatic encrypt(input mode_e md, input bit formula, input int len, output logic [127:0] ct [$],
                         output int cycles);
    int nb, t0;
    nb = (len + 15) / 16;
    outq.delete();
    send_cmd({2'b00, md});
    send_word(128'(len));
    send_word(IV);
    t0 = $time;
    for (int w = 0; w < nb; w++) send_word(msg_word(formula, w, len));
    wait_done();
    cycles = ($time - t0) / 10;
    @(negedge clk);
    ct = outq;
  endtask

  task automatic decrypt(input mode_e md, input int len, input logic [127:0] ct [$], output logic [127:0] p [$]);
    outq.delete();
    send_cmd({2'b00, md});
    send_word(128'(len));
    send_word(IV);
    foreach (ct[i]) send_word(ct[i]);
    wait_done();
    @(negedge clk);
    p = outq;
  endtask

  task automatic round_trip(input mode_e enc_md, input mode_e dec_md, input bit formula, input int len,
                            input logic [127:0] tag_ref, input logic [255:0] dig_ref, input string what);
    logic [127:0] ct [$], pl [$];
    int nb, cyc, ntag;
    nb   = (len + 15) / 16;
    ntag = (enc_md == MODE_ENC_CMAC) ? 1 : 2;
    encrypt(enc_md, formula, len, ct, cyc);
    check(ct.size() == nb + ntag, {what, ": ciphertext length"});
    if (!formula)
      for (int w = 0; w < nb && w < 4; w++)
        if (len >= 16*(w+1)) check(ct[w] == cbc[w], $sformatf("%s: CBC block %0d", what, w));
    if (enc_md == MODE_ENC_CMAC) check(dut.u_ctrl.mac == tag_ref, {what, ": CMAC tag"});
    else                         check(dut.u_sha.digest == dig_ref, {what, ": SHA-3 digest"});
    decrypt(dec_md, len, ct, pl);
    check(pl.size() == nb, {what, ": plaintext length"});
    for (int w = 0; w < nb; w++) check(pl[w] == msg_word(formula, w, len), $sformatf("%s: plaintext %0d", what, w));
    check(mac_ok == 1'b1, {what, ": MAC accepted"});
    if (mac_ok) n_mac_pass++;
    // flip one bit of the first block: the MAC check must fail
    ct[0][5] = ~ct[0][5];
    decrypt(dec_md, len, ct, pl);
    check(mac_ok == 1'b0, {what, ": tampered MAC rejected"});
    if (!mac_ok) n_mac_fail++;
  endtask

  initial begin
    logic [W-1:0] res, a_priv, b_priv, ga, gb, kab, rsa_c, secret;
    logic [127:0] ct [$];
    int cyc;
    en = 0; cmd = '0; data_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // ---- Diffie-Hellman ----
    a_priv = W'(64'hc0ffee12_3456789a);
    b_priv = W'(64'h0badcafe_1357abcd);
    // STORE_PUB takes e then N in one command
    send_cmd({2'b00, MODE_STORE_PUB});
    for (int w = 0; w < NW; w++) send_word(RSA_E[128*w +: 128]);
    for (int w = 0; w < NW; w++) send_word(RSA_N[128*w +: 128]);
    wait_done();
    check(dut.mem_pub_e == RSA_E && dut.mem_mod == RSA_N, "public key stored");
    store(MODE_STORE_PRIV, a_priv);
    store(MODE_STORE_PUBVAL, W'(2));
    modexp_op(OP_DHE, ga);
    check(ga == ref_modexp(W'(2), a_priv, RSA_N), "DHE public value g^a");
    gb = ref_modexp(W'(2), b_priv, RSA_N);
    store(MODE_STORE_PUBVAL, gb);
    modexp_op(OP_DHE, kab);
    check(kab == ref_modexp(gb, a_priv, RSA_N), "DHE shared key (g^b)^a");
    check(kab == ref_modexp(ga, b_priv, RSA_N), "DHE keys agree");
    check(dut.mem_secret == kab, "shared key stored");

    // ---- RSA: client encrypts the secret, server decrypts and compares ----
    modexp_op(OP_RSA_ENC, rsa_c);
    check(rsa_c == ref_modexp(kab, RSA_E, RSA_N), "RSA encryption");
    store(MODE_STORE_PRIV, RSA_D);
    store(MODE_STORE_PUBVAL, rsa_c);
    modexp_op(OP_RSA_VERIFY, res);
    check(res == kab, "RSA decryption");
    check(auth_ok == 1'b1, "RSA check passes");
    if (auth_ok) n_auth_pass++;
    store(MODE_STORE_PUBVAL, rsa_c ^ W'(4));
    modexp_op(OP_RSA_VERIFY, res);
    check(auth_ok == 1'b0, "RSA check fails on a wrong value");
    if (!auth_ok) n_auth_fail++;

    // ---- shared secret loaded directly; AES key = its low 128 bits ----
    secret = {{(W-128){1'b1}}, AES_KEY};
    store(MODE_STORE_SECRET, secret);
    check(dut.mem_secret == secret, "secret stored");

    round_trip(MODE_ENC_CMAC, MODE_DEC_CMAC, 1'b0, 64, 128'h51f0bebf7e3b9d92fc49741779363cfe, '0, "CMAC 64B");
    round_trip(MODE_ENC_CMAC, MODE_DEC_CMAC, 1'b0, 40, 128'hdfa66747de9ae63030ca32611497c827, '0, "CMAC 40B");
    round_trip(MODE_ENC_CMAC, MODE_DEC_CMAC, 1'b0, 16, 128'h070a16b46b4d4144f79bdd9dd04a287c, '0, "CMAC 16B");
    round_trip(MODE_ENC_SHA, MODE_DEC_SHA, 1'b0, 64, '0,
               256'h6f60436e8e4d99816a9acf8eca7513becbbdfd5db35efa80e563298a85f0ce18, "SHA 64B");
    round_trip(MODE_ENC_SHA, MODE_DEC_SHA, 1'b1, 200, '0,
               256'h298588fab178b5941df80b0c340c0bd1132713540627aaf3aac3b2fbf1f9fabc, "SHA 200B");

    // ---- throughput of CBC+CMAC and CBC+SHA on a 1024-byte message ----
    encrypt(MODE_ENC_CMAC, 1'b1, 1024, ct, cyc);
    $display("CBC+CMAC 1024 bytes: %0d cycles, %0d Mbps at 100 MHz", cyc, 1024 * 8 * 100 / cyc);
    check(cyc <= 64 * 15 + 40, "CBC+CMAC at least 850 Mbps at 100 MHz");
    encrypt(MODE_ENC_SHA, 1'b1, 1024, ct, cyc);
    $display("CBC+SHA 1024 bytes: %0d cycles, %0d Mbps at 100 MHz", cyc, 1024 * 8 * 100 / cyc);
    check(dut.u_sha.digest == 256'h59c2bd91a33e9401e9d4005c4ef48fb22710ddd513e4dcbd4949095338fa9bf3, "SHA 1024B digest");

    // ---- every mechanism must have happened ----
    check(n_k1 > 0, "CMAC subkey K1 used");
    check(n_k2 > 0, "CMAC subkey K2 used");
    check(n_interleave > 0, "CBC and CMAC interleaved in the AES pipeline");
    check(n_sha_multi > 0, "SHA-3 multi-block message");
    check(n_sha_stall > 0, "host held off while SHA-3 permutes");
    check(n_sec_write > 0, "DHE result written to the secret");
    check(n_auth_pass > 0 && n_auth_fail > 0, "RSA check both ways");
    check(n_mac_pass > 0 && n_mac_fail > 0, "MAC check both ways");
    $display("mechanisms: K1=%0d K2=%0d interleave=%0d sha_multi=%0d sha_stall=%0d sec_write=%0d auth=%0d/%0d mac=%0d/%0d",
             n_k1, n_k2, n_interleave, n_sha_multi, n_sha_stall, n_sec_write, n_auth_pass, n_auth_fail,
             n_mac_pass, n_mac_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
