// tb_tls_accel_full: one complete key exchange and record protection with the
// accelerator at its default size, 2048-bit operands.
//
// Stores a 2048-bit RSA public key (e = 65537) and modulus, runs both
// Diffie-Hellman steps with base 2 and 256-bit private exponents, encrypts
// the resulting secret with RSA, runs the RSA check with the 2048-bit private
// exponent, and then encrypts and decrypts a 64-byte record with CBC-AES and
// CMAC under the negotiated key. Modular results are compared with a
// square-and-multiply reference using the simulator's wide arithmetic; the
// RSA key pair was made beforehand. Cycle counts of each exponentiation are
// printed as milliseconds at 100 MHz, and the whole handshake as handshakes
// per second.
module tb_tls_accel_full;
  import tls_pkg::*;
  localparam int unsigned W  = 2048;
  localparam int unsigned NW = W / 128;
  localparam logic [W-1:0] RSA_N = 2048'he42929ba5a6ef0becc1eef65838772d85a8f766f5d156bdc3e7518b465fbdf6736815de7f194688c2a44baf23767fc82ed0ebf510d970bdf5d8583764f9ff7ee08f03771f8e2b8a0ec7a85fe8ac09e4d480acc11ee6e8b1fbb0575a467337f2ab2ec420267e6b418bf499cbcaef5237a3c22872c61d507f3b0d5da0df48254b7060d47dc67855767f7696186e94093b9b98cd43a384f3bf2dc61f7f8a87085b4ec9796ac2dfc9f96be71e5f05d66f4b57d902b1c3e7f6a19783321e9bb898bfc39eac4d0b26bd2047af17c6752816f20fd1f1b25de6b01c3d1b8daff27977fe0885e3eb28c74fe4149601028cbfeeab27e1776af83e6761543400d8dee53c83b;
  localparam logic [W-1:0] RSA_D = 2048'ha1de2e337e7b1ca3502f564a1fc15591f6d5b70194f96097555c3fd5a450c812f2915f2cf1b007680188d754864868d5fe16ab56769cc5988741f49d582a367c12ad51b8b3092e5144d43c01f530685e8d90d36c994aa5bb3234d25c7bb7062e25d80590ad63f83b6262782748bcb399c1d6012e548e0d612f00d8fd738d8f491ebca6a953ea560c75ee27560ed955346b99d69dc237d991ced1d01a6c9d4dc17d0d47de3b8c40d47db1f802ba2a1b624b971e7f3db46cd3b66ee9829b3fdbaf85149b47bc9b84c5a0923a4c5b1c21e0642a8ba10ef60202533c677cd52fa56ff484c54ef21b712cddae30547a49e059f9bb68df561b043ee267f310b63a2381;
  localparam logic [W-1:0] RSA_E = W'(65537);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic         en, rd_req, out_valid, busy, done, auth_ok, mac_ok;
  logic [5:0]   cmd;
  logic [127:0] data_in, data_out;
  int checks = 0, failures = 0;

  tls_accel dut (.*);

  logic [127:0] outq [$];
  always @(posedge clk) if (!rst && out_valid) outq.push_back(data_out);

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
    longint t0;
    outq.delete();
    t0 = $time;
    send_cmd({op, MODE_MODEXP});
    wait_done();
    $display("modexp op %0d: %0d cycles = %0d.%02d ms at 100 MHz", op, ($time - t0) / 10,
             ($time - t0) / 1000000, (($time - t0) / 10000) % 100);
    @(negedge clk);
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

  initial begin
    logic [W-1:0] a_priv, b_priv, ga, gb, rsa_c, res;
    longint hs_t0;
    logic [127:0] msg [4], ct [$], pl [$];
    en = 0; cmd = '0; data_in = '0;
    for (int i = 0; i < 4; i++) msg[i] = {4{32'(i * 32'h01010101 + 32'h600d5eed)}};
    for (int i = 0; i < 8; i++) a_priv[32*i +: 32] = $urandom;
    a_priv[W-1:256] = '0;
    a_priv[255] = 1'b1;
    repeat (3) @(negedge clk);
    rst = 0;

    send_cmd({2'b00, MODE_STORE_PUB});
    for (int w = 0; w < NW; w++) send_word(RSA_E[128*w +: 128]);
    for (int w = 0; w < NW; w++) send_word(RSA_N[128*w +: 128]);
    wait_done();
    store(MODE_STORE_PRIV, a_priv);
    store(MODE_STORE_PUBVAL, W'(2));
    hs_t0 = $time;
    modexp_op(OP_DHE, ga);
    check(ga == ref_modexp(W'(2), a_priv, RSA_N), "DHE 2^a mod N");
    // second DHE step with the peer's value g^b; the secret becomes g^ab
    for (int i = 0; i < 8; i++) b_priv[32*i +: 32] = $urandom;
    b_priv[W-1:256] = '0;
    gb = ref_modexp(W'(2), b_priv, RSA_N);
    store(MODE_STORE_PUBVAL, gb);
    modexp_op(OP_DHE, ga);
    check(ga == ref_modexp(gb, a_priv, RSA_N), "DHE shared key (g^b)^a mod N");
    check(dut.mem_secret == ga, "DHE result stored as secret");

    modexp_op(OP_RSA_ENC, rsa_c);
    check(rsa_c == ref_modexp(ga, RSA_E, RSA_N), "RSA encryption of the secret");
    store(MODE_STORE_PRIV, RSA_D);
    store(MODE_STORE_PUBVAL, rsa_c);
    modexp_op(OP_RSA_VERIFY, res);
    check(res == ga, "RSA decryption recovers the secret");
    check(auth_ok == 1'b1, "RSA check passes");
    $display("handshake (two DHE steps, RSA encryption, RSA check): %0d cycles, %0d.%01d handshakes/s at 100 MHz",
             ($time - hs_t0) / 10, 64'd1000000000 / ($time - hs_t0), (64'd10000000000 / ($time - hs_t0)) % 10);

    // record protection with the negotiated key (its low 128 bits)
    outq.delete();
    send_cmd({2'b00, MODE_ENC_CMAC});
    send_word(128'd64);
    send_word(128'h0f0e0d0c0b0a09080706050403020100);
    for (int i = 0; i < 4; i++) send_word(msg[i]);
    wait_done();
    @(negedge clk);
    ct = outq;
    check(ct.size() == 5, "ciphertext length");
    outq.delete();
    send_cmd({2'b00, MODE_DEC_CMAC});
    send_word(128'd64);
    send_word(128'h0f0e0d0c0b0a09080706050403020100);
    foreach (ct[i]) send_word(ct[i]);
    wait_done();
    @(negedge clk);
    pl = outq;
    check(pl.size() == 4, "plaintext length");
    for (int i = 0; i < 4 && i < pl.size(); i++) check(pl[i] == msg[i], "plaintext");
    check(mac_ok == 1'b1, "CMAC accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
